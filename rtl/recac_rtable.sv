// recac_rtable: the R-table, which holds the remapped (R) bit of every line
// of every remapped set.
//
// A remapped set stores both its own lines (R = 0) and lines moved out of a
// monitoring set by the index remapping (R = 1); two such lines may carry the
// same tag, so the R bit is part of the hit check. Rather than widening every
// tag, the R bits of the remapped sets only are kept here: A bits per row and
// one row per remapped set, A x T_rmp bits in all (the text's sizing). With
// 16 monitoring sets per core and 2 cores that is 32 rows of 16 bits, 64 bytes.
// A row is addressed by the monitoring group whose data the set receives
// (slot) and by the index bits above the K pattern bits.
//
// Reads are combinational and return the whole row, so the L2 can qualify all
// ways in the same cycle as its tag compare (the text reads the R-table in
// parallel with the tag directory). One bit is written per cycle, when a miss
// fills a line of a remapped set. The content needs no reset: a bit is only
// read for a valid line, and a line becomes valid only together with its bit.
module recac_rtable
  import recac_pkg::*;
#(
  parameter int unsigned N  = N_CORES,
  parameter int unsigned A  = WAYS,
  parameter int unsigned UW = IDX_W - PAT_W    // index bits above the pattern
) (
  input  logic                  clk,
  input  logic [$clog2(N)-1:0]  rd_slot,
  input  logic [UW-1:0]         rd_upper,
  output logic [A-1:0]          rd_row,
  input  logic                  wr_en,
  input  logic [$clog2(N)-1:0]  wr_slot,
  input  logic [UW-1:0]         wr_upper,
  input  logic [$clog2(A)-1:0]  wr_way,
  input  logic                  wr_bit
);
  localparam int unsigned ROWS = N << UW;
  localparam int unsigned RW   = $clog2(ROWS);

  logic [A-1:0] mem [ROWS];

  assign rd_row = mem[RW'({rd_slot, rd_upper})];

  always_ff @(posedge clk) begin
    if (wr_en) mem[RW'({wr_slot, wr_upper})][wr_way] <= wr_bit;
  end
endmodule

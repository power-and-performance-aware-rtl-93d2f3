// tb_recac_mem_model: behavioural model of the off-chip main memory for the
// ReCaC testbenches (not synthesizable, not part of the design).
//
// Accepts one line request at a time (mem_req_ready is high while idle).
// Writes are stored at once. A read answers with one mem_resp_valid pulse
// LATENCY cycles after it was accepted; a line never written reads as a
// pattern derived from its address. Counts reads and writes.
module tb_recac_mem_model #(
  parameter int unsigned AW      = 64,
  parameter int unsigned LW      = 1024,
  parameter int unsigned LATENCY = 250
) (
  input  logic          clk,
  input  logic          mem_req_valid,
  output logic          mem_req_ready,
  input  logic          mem_req_we,
  input  logic [AW-1:0] mem_req_addr,
  input  logic [LW-1:0] mem_req_wdata,
  output logic          mem_resp_valid,
  output logic [LW-1:0] mem_resp_rdata,
  output int            n_reads,
  output int            n_writes
);
  logic [LW-1:0] store [logic [AW-1:0]];
  logic          busy = 1'b0;
  int            wait_cnt = 0;
  logic [AW-1:0] rd_addr;

  function automatic logic [LW-1:0] default_line(input logic [AW-1:0] a);
    logic [LW-1:0] v;
    for (int i = 0; i < LW; i += 32) v[i +: 32] = a[31:0] ^ (32'h9E3779B9 * (i + 1)) ^ a[63:32];
    return v;
  endfunction

  initial begin n_reads = 0; n_writes = 0; mem_resp_valid = 0; mem_resp_rdata = '0; end
  assign mem_req_ready = !busy;

  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (busy) begin
      wait_cnt <= wait_cnt + 1;
      if (wait_cnt + 1 == int'(LATENCY)) begin
        busy           <= 1'b0;
        mem_resp_valid <= 1'b1;
        mem_resp_rdata <= store.exists(rd_addr) ? store[rd_addr] : default_line(rd_addr);
      end
    end else if (mem_req_valid) begin
      if (mem_req_we) begin
        store[mem_req_addr] = mem_req_wdata;
        n_writes <= n_writes + 1;
      end else begin
        busy     <= 1'b1;
        wait_cnt <= 0;
        rd_addr  <= mem_req_addr;
        n_reads  <= n_reads + 1;
      end
    end
  end
endmodule

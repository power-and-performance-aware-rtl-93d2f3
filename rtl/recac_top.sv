// recac_top: ReCaC, a reconfigurable shared L2 cache for chip multiprocessors
// that partitions its ways among the cores for both power and performance.
//
// Blocks and their connections (Figure 10):
//   recac_os_regs         OS-visible registers: IRL mask, current/new patterns
//                         and R registers, APD registers, flush command.
//   recac_l2_cache        the L2 itself, with the IRL in front of it, the
//                         R-table beside it, a drowsy bit per line and
//                         quota-enforcing replacement. Its monitoring sets send
//                         profiling events to
//   recac_sdh             the stack distance histograms (one per core), which
//                         give each core's predicted misses for 1..A ways.
//   recac_partition_logic runs the performance step (minMisses) and the power
//                         step on those curves and the APD registers, and
//                         returns the ways each core may use.
//   interval timer        (here) every INTERVAL_CYC cycles closes an interval:
//                         it snapshots the histograms, starts the partitioning
//                         and puts every L2 line into the drowsy mode.
// The new quotas take effect when the partitioning logic finishes, a few
// hundred cycles into the next interval. Until the first decision each core
// has A/N ways. The per-line voltage controllers, the memory and the cores are
// outside this top; the drowsy bits are the controllers' inputs.
//
// PARALLEL selects the parallel eATD of recac_l2_cache for programs whose
// threads share data; the default is the plain eATD.
//
// Interfaces: one L2 request port shared by the cores (the core number comes
// with each request), a line-wide memory port, and a word-wide OS register
// port. See recac_l2_cache for the request and memory handshakes. Event
// outputs pulse for one cycle each time the named mechanism happens.
module recac_top
  import recac_pkg::*;
#(
  parameter int unsigned N           = N_CORES,
  parameter int unsigned A           = WAYS,
  parameter int unsigned NSETS       = SETS,
  parameter int unsigned K           = PAT_W,
  parameter int unsigned INTERVAL_CYC = INTERVAL,
  parameter int unsigned EWAY        = E_WAY,
  parameter int unsigned EMEM        = E_MEM,
  parameter bit          PARALLEL    = 1'b0    // parallel eATD for shared data
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // core side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic [$clog2(N)-1:0]  req_core,
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic                  req_we,
  input  logic [LINE_W-1:0]     req_wdata,
  output logic                  resp_valid,
  output logic [$clog2(N)-1:0]  resp_core,
  output logic                  resp_hit,
  output logic [LINE_W-1:0]     resp_rdata,
  // memory side
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_we,
  output logic [ADDR_W-1:0]     mem_req_addr,
  output logic [LINE_W-1:0]     mem_req_wdata,
  input  logic                  mem_resp_valid,
  input  logic [LINE_W-1:0]     mem_resp_rdata,
  // OS register port
  input  logic                  cfg_we,
  input  logic [7:0]            cfg_addr,
  input  logic [31:0]           cfg_wdata,
  output logic [31:0]           cfg_rdata,
  // status
  output logic [$clog2(A):0]    quota      [N],
  output logic [$clog2(A):0]    min_misses [N],
  output logic                  flush_busy,
  output logic                  interval_end,   // pulse: interval boundary
  output logic                  part_done,      // pulse: new partition applied
  output logic                  power_saving,   // last partition saves power
  output logic                  prof_valid,     // pulse: monitoring-set access
  output logic                  evt_remap,
  output logic                  evt_wake,
  output logic                  evt_wb,
  output logic [$clog2(NSETS*A):0] awake_lines
);
  localparam int unsigned SW = CNT_W + $clog2(A) + 1;

  logic [K-1:0]     mask;
  logic [K-1:0]     cur  [N];
  logic [K-1:0]     newp [N][N];
  logic             rreg [N][N];
  logic [APD_W-1:0] apd  [N];
  logic             flush;

  recac_os_regs #(.N(N), .K(K)) u_regs (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .mask, .cur, .newp, .rreg, .apd, .flush
  );

  logic                  p_hit;
  logic [$clog2(N)-1:0]  p_core;
  logic [$clog2(A)-1:0]  p_pos;

  recac_l2_cache #(.N(N), .A(A), .NSETS(NSETS), .K(K), .PARALLEL(PARALLEL)) u_l2 (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_core, .req_addr, .req_we, .req_wdata,
    .resp_valid, .resp_core, .resp_hit, .resp_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata,
    .mask, .cur, .newp, .rreg, .flush_req(flush), .flush_busy,
    .quota, .drowsy_all(interval_end),
    .prof_valid, .prof_core(p_core), .prof_hit(p_hit), .prof_pos(p_pos),
    .evt_remap, .evt_wake, .evt_wb, .awake_lines
  );

  logic [SW-1:0] curve [N][A];

  recac_sdh #(.N(N), .A(A)) u_sdh (
    .clk, .rst_n,
    .evt_valid(prof_valid), .evt_core(p_core), .evt_hit(p_hit), .evt_pos(p_pos),
    .snap(interval_end), .curve
  );

  logic part_busy;
  logic start_q;

  recac_partition_logic #(.N(N), .A(A), .SW(SW), .EMEM(EMEM), .EWAY(EWAY)) u_part (
    .clk, .rst_n, .start(start_q), .curve, .apd,
    .busy(part_busy), .done(part_done), .power_saving,
    .min_misses, .part_out(quota)
  );

  // interval timer: the histograms are snapshotted at the boundary and the
  // partitioning starts one cycle later, on the snapshot
  logic [$clog2(INTERVAL_CYC+1)-1:0] icnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt         <= '0;
      interval_end <= 1'b0;
      start_q      <= 1'b0;
    end else begin
      start_q      <= interval_end && !part_busy;
      interval_end <= 1'b0;
      if (icnt == $bits(icnt)'(INTERVAL_CYC - 1)) begin
        icnt         <= '0;
        interval_end <= 1'b1;
      end else begin
        icnt <= icnt + 1'b1;
      end
    end
  end
endmodule

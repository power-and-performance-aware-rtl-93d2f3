// tb_recac_scale4: the ReCaC L2 built for four cores (N = 4, the rest at the
// default 2 MB, 16 ways, 1024 sets, 750,000-cycle intervals, 250-cycle memory),
// the scaling configuration of the evaluation.
//
// Each core runs a synthetic thread on its own 16 monitoring sets (low index
// bits = core number) and 16 normal sets (low bits 8 + core):
//   L  streams through lines it never reuses (1 way is enough);
//   S  reuses 2 lines per set (2 ways);
//   H  cycles through 12 lines per set (hits only with 12 or more ways).
// Mix S-S-S-S must leave 8 of the 16 ways drowsy with {2,2,2,2}; mix L-H-S-L
// needs every way ({1,12,2,1}), so the power step must keep the performance
// partition. With four cores the performance step walks 13^4 = 28,561
// candidates, which the test also times. Every read is checked against the
// memory image.
module tb_recac_scale4;
  import recac_pkg::*;
  localparam int MEM_LAT = 250;
  localparam int NSET_USED = 16;           // of each kind per core
  localparam int N_MIX = 2;
  localparam int NC = 4;
  typedef enum int {T_L, T_S, T_H} kind_e;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                rst_n;
  logic                req_valid, req_ready, req_we;
  logic [1:0]          req_core, resp_core;
  logic [ADDR_W-1:0]   req_addr;
  logic [LINE_W-1:0]   req_wdata, resp_rdata;
  logic                resp_valid, resp_hit;
  logic                mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [ADDR_W-1:0]   mem_req_addr;
  logic [LINE_W-1:0]   mem_req_wdata, mem_resp_rdata;
  logic                cfg_we;
  logic [7:0]          cfg_addr;
  logic [31:0]         cfg_wdata, cfg_rdata;
  logic [4:0]          quota [NC];
  logic [4:0]          min_misses [NC];
  logic                flush_busy, interval_end, part_done, power_saving, prof_valid;
  logic                evt_remap, evt_wake, evt_wb;
  logic [14:0]         awake_lines;
  int                  n_reads, n_writes;

  recac_top #(.N(NC)) dut (.*);
  tb_recac_mem_model #(.AW(ADDR_W), .LW(LINE_W), .LATENCY(MEM_LAT)) mem (.*);

  int checks = 0, failures = 0;
  int mix = 0;
  int n_int = 0, n_part = 0;
  bit stop = 0;
  kind_e kinds [N_MIX][NC] = '{'{T_S, T_S, T_S, T_S}, '{T_L, T_H, T_S, T_L}};
  int    want  [N_MIX][NC] = '{'{2, 2, 2, 2}, '{1, 12, 2, 1}};
  int    mm    [N_MIX][NC] = '{'{10, 2, 2, 2}, '{1, 12, 2, 1}};   // performance step
  longint t_start = 0, t_run = 0, cyc = 0;

  function automatic int want_prod(input int m);
    int p = 1;
    for (int c = 0; c < NC; c++) p *= mm[m][c];
    return p;
  endfunction

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  always @(posedge clk) begin
    cyc++;
    if (interval_end) begin
      n_int++;
      t_start = cyc;
    end
    if (part_done) t_run = cyc - t_start;
  end

  function automatic logic [LINE_W-1:0] mem_default(input logic [ADDR_W-1:0] a);
    logic [LINE_W-1:0] v;
    for (int i = 0; i < LINE_W; i += 32) v[i +: 32] = a[31:0] ^ (32'h9E3779B9 * (i + 1)) ^ a[63:32];
    return v;
  endfunction

  task automatic access(input int core, input logic [ADDR_W-1:0] a);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_core = 2'(core); req_addr = a; req_we = 0;
    @(posedge clk);
    #1 req_valid = 0;
    do @(negedge clk); while (!resp_valid);
    checks++;
    if (resp_rdata !== mem_default(a)) fail($sformatf("read data of %h (core %0d)", a, core));
  endtask

  // k-th access of a thread of the given kind on core c in mix m
  function automatic logic [ADDR_W-1:0] addr_of(input int c, input int m, input kind_e k, input int n);
    int set, j;
    longint tag;
    j   = n % (2 * NSET_USED);
    set = (j < NSET_USED) ? (c + 64 * j) : (8 + c + 64 * (j - NSET_USED));
    case (k)
      T_L:     tag = longint'(n) / (2 * NSET_USED);
      T_S:     tag = (longint'(n) / (2 * NSET_USED)) % 2;
      default: tag = (longint'(n) / (2 * NSET_USED)) % 12;
    endcase
    tag = tag + longint'(c) * 64'h100_0000 + longint'(m) * 64'h1_0000;
    return {TAG_W'(tag), IDX_W'(set), OFF_W'(0)};
  endfunction

  initial begin
    int n;
    wait (rst_n);
    n = 0;
    while (!stop) begin
      for (int c = 0; c < NC; c++) access(c, addr_of(c, mix, kinds[mix][c], n));
      n++;
    end
  end

  initial begin
    int i0;
    rst_n = 0; req_valid = 0; req_we = 0; req_core = 0; req_addr = 0; req_wdata = 0;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int m = 0; m < N_MIX; m++) begin
      mix = m;
      // skip the interval the mix starts in, decide on the next full one
      i0 = n_int;
      wait (n_int == i0 + 2);
      @(posedge part_done);
      @(posedge clk);
      @(negedge clk);
      $display("mix %0d: minMisses {%0d,%0d,%0d,%0d} -> {%0d,%0d,%0d,%0d}, power saving %0d, %0d cycles",
               m, min_misses[0], min_misses[1], min_misses[2], min_misses[3],
               quota[0], quota[1], quota[2], quota[3], power_saving, t_run);
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (int'(min_misses[c]) != mm[m][c]) fail($sformatf("mix %0d core %0d: minMisses share %0d", m, c, min_misses[c]));
        checks++;
        if (int'(quota[c]) != want[m][c]) fail($sformatf("mix %0d core %0d gets %0d ways", m, c, quota[c]));
      end
      checks++;
      if (power_saving != (m == 0)) fail("power_saving flag");
      checks++;
      // 13^4 performance candidates, the product of the minMisses shares in
      // the power step, 2 cycles of control and 1 from boundary to start
      if (t_run != longint'(28561 + want_prod(m) + 3)) fail($sformatf("partitioning took %0d cycles", t_run));
    end
    stop = 1;
    repeat (400) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (14000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

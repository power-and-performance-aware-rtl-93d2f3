// tb_recac_workloads: the six two-thread workload classes of the evaluation,
// run on the whole ReCaC L2 at its full default size (2 MB, 16 ways, 1024
// sets, 750,000-cycle intervals, 250-cycle memory).
//
// Each core runs a synthetic thread of one of three kinds, on its own 16
// monitoring sets (low index bits = core number) and 16 normal sets:
//   L  low utility: streams through new lines and never reuses one, so more
//      ways do not help it;
//   S  saturating: reuses 2 lines per set, so 2 ways are all it needs;
//   H  high utility: cycles through 12 lines per set, so under LRU it misses
//      on every access with fewer than 12 ways and hits with 12 or more.
// The mixes L-L, L-S, S-S, L-H, H-S and H-H run one after the other, each on
// fresh addresses. The decision taken on the first interval that a mix fills
// completely is checked against what the profiles imply:
//   L: 1 way (nothing is lost by taking ways away);
//   S: 2 ways;
//   H: at least 12 ways when it is the only H thread; of two H threads only
//      one can have 12 ways and the other keeps at most 4.
// Leaving ways drowsy must be chosen (power_saving) whenever the decision
// uses fewer than 16 ways. Every read is checked against the memory image.
module tb_recac_workloads;
  import recac_pkg::*;
  localparam int MEM_LAT = 250;
  localparam int NSET_USED = 16;           // of each kind per core
  localparam int N_MIX = 6;
  typedef enum int {T_L, T_S, T_H} kind_e;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                rst_n;
  logic                req_valid, req_ready, req_we;
  logic [0:0]          req_core, resp_core;
  logic [ADDR_W-1:0]   req_addr;
  logic [LINE_W-1:0]   req_wdata, resp_rdata;
  logic                resp_valid, resp_hit;
  logic                mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [ADDR_W-1:0]   mem_req_addr;
  logic [LINE_W-1:0]   mem_req_wdata, mem_resp_rdata;
  logic                cfg_we;
  logic [7:0]          cfg_addr;
  logic [31:0]         cfg_wdata, cfg_rdata;
  logic [4:0]          quota [N_CORES];
  logic [4:0]          min_misses [N_CORES];
  logic                flush_busy, interval_end, part_done, power_saving, prof_valid;
  logic                evt_remap, evt_wake, evt_wb;
  logic [14:0]         awake_lines;
  int                  n_reads, n_writes;

  recac_top dut (.*);
  tb_recac_mem_model #(.AW(ADDR_W), .LW(LINE_W), .LATENCY(MEM_LAT)) mem (.*);

  int checks = 0, failures = 0;
  int mix = 0;
  int n_int = 0, n_part = 0;
  bit stop = 0;
  kind_e kinds [N_MIX][2] = '{'{T_L, T_L}, '{T_L, T_S}, '{T_S, T_S},
                              '{T_L, T_H}, '{T_H, T_S}, '{T_H, T_H}};

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  always @(posedge clk) begin
    if (interval_end) n_int++;
  end

  function automatic logic [LINE_W-1:0] mem_default(input logic [ADDR_W-1:0] a);
    logic [LINE_W-1:0] v;
    for (int i = 0; i < LINE_W; i += 32) v[i +: 32] = a[31:0] ^ (32'h9E3779B9 * (i + 1)) ^ a[63:32];
    return v;
  endfunction

  task automatic access(input int core, input logic [ADDR_W-1:0] a);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_core = 1'(core); req_addr = a; req_we = 0;
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
      for (int c = 0; c < 2; c++) access(c, addr_of(c, mix, kinds[mix][c], n));
      n++;
    end
  end

  function automatic bit ok_ways(input kind_e k, input kind_e other, input int w);
    case (k)
      T_L:     return w == 1;
      T_S:     return w == 2;
      default: return (other == T_H) ? (w >= 12 || w <= 4) : (w >= 12);
    endcase
  endfunction

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
      @(negedge clk);
      $display("mix %0d (%s-%s): minMisses {%0d,%0d} -> {%0d,%0d}, power saving %0d", m,
               kinds[m][0].name(), kinds[m][1].name(), min_misses[0], min_misses[1],
               quota[0], quota[1], power_saving);
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (!ok_ways(kinds[m][c], kinds[m][1 - c], int'(quota[c])))
          fail($sformatf("mix %0d core %0d gets %0d ways", m, c, quota[c]));
      end
      checks++;
      if (kinds[m][0] == T_H && kinds[m][1] == T_H && !(quota[0] >= 12 || quota[1] >= 12))
        fail("no H thread got 12 ways");
      checks++;
      if (power_saving != (quota[0] + quota[1] < 16)) fail("power_saving flag");
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

// tb_recac_l2_cache: self-checking test of the L2 cache with its IRL, R-table,
// drowsy bits and quota-enforcing replacement.
//
// A small instance (32 sets, 16 ways, 3-bit patterns, 64-bit lines) is
// programmed with the two-core example mapping: sets 0 and 1 (mod 8) monitor
// cores 0 and 1, foreign accesses to them go to sets 3 and 2 with R = 1.
// A golden copy of memory in the testbench checks the data of every read, so
// any wrong hit, lost write-back or R-bit aliasing shows up. Directed parts:
//   * latency: a hit on an awake line answers in 12 cycles, on a drowsy line
//     in 13 (one wake-up cycle), a clean read miss in 250 + 7;
//   * remapping: core 0 reaching set 1 is remapped, and a line stored through
//     the remapping and a line with the same tag stored directly in set 2 are
//     kept apart by the R bit;
//   * profiling: core 0 in its monitoring set produces hit events at the
//     right LRU stack position, core 1 never reaches that set;
//   * quotas: with two ways per core a core keeps only two lines in a normal
//     set, while its monitoring set holds more;
//   * flush: dirty lines (also remapped ones) are written back to their
//     original addresses and the cache is emptied.
// It finishes with random traffic from both cores under random quotas.
module tb_recac_l2_cache;
  import recac_pkg::*;
  localparam int N = 2, A = 16, NSETS = 32, K = 3, LW = 64, AW = 64, OW = 7;
  localparam int MEM_LAT = 250;
  // The cores run separate programs: their physical pages never overlap
  // (shared data needs the parallel eATD). Core 1's tags start here.
  localparam longint CORE1 = 64'h1_0000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n;
  logic          req_valid, req_ready, req_we;
  logic [0:0]    req_core, resp_core, prof_core;
  logic [AW-1:0] req_addr;
  logic [LW-1:0] req_wdata, resp_rdata;
  logic          resp_valid, resp_hit;
  logic          mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [AW-1:0] mem_req_addr;
  logic [LW-1:0] mem_req_wdata, mem_resp_rdata;
  logic [K-1:0]  mask;
  logic [K-1:0]  cur [N];
  logic [K-1:0]  newp [N][N];
  logic          rreg [N][N];
  logic          flush_req, flush_busy, drowsy_all;
  logic [4:0]    quota [N];
  logic          prof_valid, prof_hit;
  logic [3:0]    prof_pos;
  logic          evt_remap, evt_wake, evt_wb;
  logic [9:0]    awake_lines;
  int            n_reads, n_writes;

  recac_l2_cache #(.N(N), .A(A), .NSETS(NSETS), .AW(AW), .OW(OW), .LW(LW), .K(K)) dut (.*);
  tb_recac_mem_model #(.AW(AW), .LW(LW), .LATENCY(MEM_LAT)) mem (.*);

  int checks = 0, failures = 0;
  int n_prof = 0, n_prof_hit = 0, n_remap = 0, n_wake = 0, n_wb = 0;
  int last_pos;
  logic [LW-1:0] golden [logic [AW-1:0]];

  always @(posedge clk) begin
    if (prof_valid) begin n_prof++; if (prof_hit) n_prof_hit++; last_pos = prof_pos; end
    if (evt_remap) n_remap++;
    if (evt_wake)  n_wake++;
    if (evt_wb)    n_wb++;
  end

  function automatic logic [AW-1:0] mk(input longint tag, input int set);
    return {52'(tag), 5'(set), 7'(0)};
  endfunction

  function automatic logic [LW-1:0] mem_default(input logic [AW-1:0] a);
    logic [LW-1:0] v;
    for (int i = 0; i < LW; i += 32) v[i +: 32] = a[31:0] ^ (32'h9E3779B9 * (i + 1)) ^ a[63:32];
    return v;
  endfunction

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  // one access; returns hit and latency, checks read data against golden
  task automatic access(input int core, input logic [AW-1:0] a, input bit we,
                        output bit hit, output int lat);
    logic [LW-1:0] d;
    d = {$urandom, $urandom};
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_core = 1'(core); req_addr = a; req_we = we; req_wdata = d;
    @(posedge clk);
    #1 req_valid = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!resp_valid);
    hit = resp_hit;
    checks++;
    if (resp_core != 1'(core)) fail("response core");
    if (we) golden[a] = d;
    else begin
      logic [LW-1:0] e;
      e = golden.exists(a) ? golden[a] : mem_default(a);
      checks++;
      if (resp_rdata !== e) begin
        fail($sformatf("data of %h: %h expected %h", a, resp_rdata, e));
      end
    end
  endtask

  task automatic expect_access(input int core, input logic [AW-1:0] a, input bit we,
                               input bit e_hit, input int e_lat, input string what);
    bit h; int l;
    access(core, a, we, h, l);
    checks++;
    if (h !== e_hit) fail($sformatf("%s: hit=%0d expected %0d", what, h, e_hit));
    if (e_lat > 0) begin
      checks++;
      if (l != e_lat) fail($sformatf("%s: latency %0d expected %0d", what, l, e_lat));
    end
  endtask

  task automatic do_flush();
    @(negedge clk) flush_req = 1;
    @(negedge clk) flush_req = 0;
    while (flush_busy) @(negedge clk);
  endtask

  initial begin
    int p0;
    rst_n = 0; req_valid = 0; req_we = 0; req_core = 0; req_addr = 0; req_wdata = 0;
    flush_req = 0; drowsy_all = 0;
    mask = '1;
    cur[0] = 0; cur[1] = 1;
    newp[0][0] = 0; rreg[0][0] = 0;  newp[0][1] = 3; rreg[0][1] = 1;
    newp[1][0] = 2; rreg[1][0] = 1;  newp[1][1] = 1; rreg[1][1] = 0;
    quota[0] = 8; quota[1] = 8;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (flush_busy) @(negedge clk);

    // latency: miss, then hit on the awake line, then a wake-up hit
    expect_access(0, mk(5, 4), 0, 0, MEM_LAT + 7, "cold read miss");
    expect_access(0, mk(5, 4), 0, 1, HIT_LAT, "hit awake");
    @(negedge clk) drowsy_all = 1;
    @(negedge clk) drowsy_all = 0;
    checks++; if (awake_lines != 0) fail("awake count not cleared");
    p0 = n_wake;
    expect_access(0, mk(5, 4), 0, 1, HIT_LAT + WAKE_LAT, "hit drowsy");
    expect_access(0, mk(5, 4), 0, 1, HIT_LAT, "hit woken line stays awake");
    checks++; if (n_wake != p0 + 1 || awake_lines != 1) fail("wake count");

    // remapping and R-bit aliasing: tag 7 through set 1 (core 0 -> set 2, R=1)
    // and tag 7 directly in set 2
    p0 = n_remap;
    expect_access(0, mk(7, 1), 1, 0, 0, "write via remap");
    checks++; if (n_remap != p0 + 1) fail("remap event");
    expect_access(0, mk(7, 2), 1, 0, 0, "write direct same tag");
    expect_access(0, mk(7, 1), 0, 1, 0, "read via remap");
    expect_access(0, mk(7, 2), 0, 1, 0, "read direct");
    // core 1 owns set 1: its access to set 1 is not remapped and misses
    expect_access(1, mk(CORE1 + 7, 1), 0, 0, 0, "owner of set 1 misses");
    // set 9 = set 1 of the next group of 8: core 0 goes to set 10
    expect_access(0, mk(8, 9), 1, 0, 0, "write set 9 via remap");
    expect_access(0, mk(8, 9), 0, 1, 0, "read set 9 via remap");

    // profiling in core 0's monitoring set 8 (low bits 0)
    p0 = n_prof;
    for (int t = 0; t < 4; t++) expect_access(0, mk(100 + t, 8), 0, 0, 0, "mon fill");
    expect_access(0, mk(100, 8), 0, 1, 0, "mon hit");
    checks++; if (last_pos != 3) fail($sformatf("stack position %0d expected 3", last_pos));
    expect_access(0, mk(102, 8), 0, 1, 0, "mon hit 2");
    checks++; if (last_pos != 2) fail($sformatf("stack position %0d expected 2", last_pos));
    expect_access(1, mk(CORE1 + 100, 8), 0, 0, 0, "core 1 remapped away from set 8");
    checks++; if (n_prof != p0 + 6) fail($sformatf("profile events %0d expected 6", n_prof - p0));

    // quotas: 2 ways per core in normal set 12
    quota[0] = 2; quota[1] = 2;
    for (int t = 0; t < 3; t++) expect_access(0, mk(200 + t, 12), 0, 0, 0, "quota fill");
    expect_access(0, mk(201, 12), 0, 1, 0, "quota keeps 201");
    expect_access(0, mk(202, 12), 0, 1, 0, "quota keeps 202");
    expect_access(0, mk(200, 12), 0, 0, 0, "quota evicted 200");
    // monitoring set 16 (low bits 0) ignores the quota
    for (int t = 0; t < 5; t++) expect_access(0, mk(300 + t, 16), 0, 0, 0, "mon fill");
    for (int t = 0; t < 5; t++) expect_access(0, mk(300 + t, 16), 0, 1, 0, "mon keeps all");

    // flush: dirty lines, including the remapped ones, go back to memory
    p0 = n_wb;
    do_flush();
    checks++; if (n_wb - p0 < 3) fail($sformatf("flush wrote back %0d lines", n_wb - p0));
    expect_access(0, mk(7, 1), 0, 0, 0, "after flush, remapped line from memory");
    expect_access(0, mk(7, 2), 0, 0, 0, "after flush, direct line from memory");
    expect_access(0, mk(8, 9), 0, 0, 0, "after flush, set 9 line from memory");

    // random traffic
    for (int n = 0; n < 1500; n++) begin
      bit h; int l; int c;
      if (n % 200 == 0) begin
        quota[0] = 5'($urandom_range(1, 15));
        quota[1] = 5'($urandom_range(1, 16 - quota[0]));
      end
      if (n % 300 == 150) begin @(negedge clk) drowsy_all = 1; @(negedge clk) drowsy_all = 0; end
      if (n == 700) do_flush();
      c = $urandom_range(0, 1);
      access(c, mk(c * CORE1 + $urandom_range(0, 40), $urandom_range(0, NSETS-1)),
             $urandom_range(0, 2) == 0, h, l);
    end
    $display("events: profile %0d (hits %0d), remaps %0d, wake-ups %0d, write-backs %0d, mem reads %0d",
             n_prof, n_prof_hit, n_remap, n_wake, n_wb, n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

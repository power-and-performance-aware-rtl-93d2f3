// tb_recac_l2_parallel: self-checking test of the L2 cache in its parallel
// eATD mode, where two cores share data.
//
// Same small instance and mapping as tb_recac_l2_cache (monitoring sets 0 and
// 1 mod 8 for cores 0 and 1, remapped sets 3 and 2), but both cores now use
// the same physical addresses. Directed checks follow the search table of the
// parallel eATD: a line core 0 stored in its monitoring set is found there by
// core 1 (one lookup, 12 cycles); a line core 1 brought into core 0's
// monitoring set address range lands in the remapped set and is found there
// by core 0 after a second lookup (24 cycles); a line stored directly in the
// remapped set with the same tag stays apart (R bit); core 1's hits in core
// 0's monitoring set produce no profiling event and leave its LRU order
// unchanged. Random shared traffic is checked against a golden memory.
module tb_recac_l2_parallel;
  import recac_pkg::*;
  localparam int N = 2, A = 16, NSETS = 32, K = 3, LW = 64, AW = 64, OW = 7;
  localparam int MEM_LAT = 250;
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

  recac_l2_cache #(.N(N), .A(A), .NSETS(NSETS), .AW(AW), .OW(OW), .LW(LW), .K(K), .PARALLEL(1'b1)) dut (.*);
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

    // core 0 (owner) writes FF0 into its monitoring set; core 1 finds it there
    expect_access(0, mk(255, 0), 1, 0, 0, "owner write FF0");
    p0 = n_prof;
    expect_access(1, mk(255, 0), 0, 1, HIT_LAT, "core 1 hits FF0 in set 0");
    checks++; if (n_prof != p0) fail("foreign hit was profiled");
    // core 1 writes EE0: misses both sets, lands in remapped set 3 with R=1
    expect_access(1, mk(238, 0), 1, 0, 0, "core 1 write EE0");
    p0 = n_remap;
    expect_access(0, mk(238, 0), 0, 1, 2 * HIT_LAT, "owner finds EE0 in set 3");
    checks++; if (n_remap != p0 + 1) fail("second lookup not counted");
    // EE3 is a different line with the same tag, stored directly in set 3
    expect_access(0, mk(238, 3), 1, 0, 0, "write EE3 direct");
    expect_access(1, mk(238, 3), 0, 1, HIT_LAT, "read EE3 direct");
    expect_access(1, mk(238, 0), 0, 1, 2 * HIT_LAT, "read EE0 remapped");
    // profiling of core 0 in set 8: fills, then a hit at stack position 2;
    // core 1's hits in between must not move core 0's lines
    for (int t = 0; t < 3; t++) expect_access(0, mk(40 + t, 8), 0, 0, 0, "mon fill");
    expect_access(1, mk(40, 8), 0, 1, 0, "foreign hit, no LRU update");
    expect_access(0, mk(40, 8), 0, 1, 0, "owner hit");
    checks++; if (last_pos != 2) fail($sformatf("stack position %0d expected 2", last_pos));
    // a flush writes remapped lines back to their own addresses
    do_flush();
    expect_access(1, mk(238, 0), 0, 0, 0, "EE0 from memory");
    expect_access(0, mk(238, 3), 0, 0, 0, "EE3 from memory");

    for (int n = 0; n < 1500; n++) begin
      bit h; int l;
      if (n % 300 == 150) begin @(negedge clk) drowsy_all = 1; @(negedge clk) drowsy_all = 0; end
      if (n == 700) do_flush();
      access($urandom_range(0, 1), mk($urandom_range(0, 30), $urandom_range(0, NSETS-1)),
             $urandom_range(0, 2) == 0, h, l);
    end
    $display("events: profile %0d (hits %0d), second lookups %0d, wake-ups %0d, write-backs %0d",
             n_prof, n_prof_hit, n_remap, n_wake, n_wb);
    checks++; if (n_remap == 0) fail("no second lookup");
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

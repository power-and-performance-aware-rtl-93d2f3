// tb_recac_top: end-to-end test of the ReCaC L2 at its full default size
// (2 cores, 2 MB, 16 ways, 1024 sets, 128-byte lines, 6-bit patterns,
// 750,000-cycle partitioning intervals, 250-cycle memory).
//
// Two cores with disjoint address spaces run two phases of traffic over the
// first 128 sets (which hold both cores' first two monitoring sets and the
// sets their foreign accesses are remapped to):
//   phase A  each core reuses 2 lines per set (a saturating, low-footprint
//            thread); a quarter of the accesses are writes. The partitioning
//            logic must find a power-saving partition that leaves at most 4
//            of the 16 ways in use.
//   phase B  each core cycles through 8 lines in its own monitoring sets and in
//            a few normal sets. Taking any way away now costs far more memory
//            energy than the drowsy ways save, so the logic must fall back to
//            the performance partition {8, 8}.
// In between, the OS port rewrites an APD register and flushes the cache.
// Every read is checked against a golden memory image. Every hit must take
// 12 cycles on a line already awake in this interval and 13 on a line still
// drowsy since the last boundary (lines touched across a boundary excepted).
// Each mechanism (remapping, profiling, drowsy wake-up, write-back, flush,
// interval boundary, partition decision, power-saving decision, fall-back) is
// counted and must occur.
module tb_recac_top;
  import recac_pkg::*;
  localparam int MEM_LAT = 250;
  localparam int USED_SETS = 128;
  localparam longint CORE1 = 64'h100_0000;   // core 1's tags start here

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
  int n_remap = 0, n_prof = 0, n_wake = 0, n_wb = 0, n_int = 0, n_part = 0;
  int n_power = 0, n_fallback = 0, n_flush = 0, n_hit = 0, n_hit_wake = 0, n_miss = 0;
  int phase = 0;
  bit stop = 0;
  logic [LINE_W-1:0] golden [logic [ADDR_W-1:0]];
  // lines known to be awake in the current interval (filled or hit since the
  // last boundary); a hit on any other line must pay the wake-up cycle
  bit awake [logic [ADDR_W-1:0]];
  bit unsure [logic [ADDR_W-1:0]];   // accessed across a boundary
  longint cyc = 0, last_boundary = -100;
  int n_lat_exact = 0;

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  always @(posedge clk) begin
    if (evt_remap)    n_remap++;
    if (prof_valid)   n_prof++;
    if (evt_wake)     n_wake++;
    if (evt_wb)       n_wb++;
    cyc++;
    if (interval_end) begin
      n_int++;
      awake.delete();
      unsure.delete();
      last_boundary = cyc;
    end
  end

  function automatic logic [ADDR_W-1:0] mk(input longint tag, input int set);
    return {TAG_W'(tag), IDX_W'(set), OFF_W'(0)};
  endfunction

  function automatic logic [LINE_W-1:0] mem_default(input logic [ADDR_W-1:0] a);
    logic [LINE_W-1:0] v;
    for (int i = 0; i < LINE_W; i += 32) v[i +: 32] = a[31:0] ^ (32'h9E3779B9 * (i + 1)) ^ a[63:32];
    return v;
  endfunction

  task automatic access(input int core, input logic [ADDR_W-1:0] a, input bit we);
    logic [LINE_W-1:0] d;
    int lat;
    longint t0;
    for (int i = 0; i < LINE_W; i += 32) d[i +: 32] = $urandom;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_core = 1'(core); req_addr = a; req_we = we; req_wdata = d;
    @(posedge clk);
    t0 = cyc;
    #1 req_valid = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!resp_valid);
    if (resp_hit) begin
      n_hit++;
      checks++;
      if (lat == HIT_LAT + WAKE_LAT) n_hit_wake++;
      else if (lat != HIT_LAT) fail($sformatf("hit latency %0d", lat));
      // away from a boundary the latency is exact: 12 on an awake line,
      // 13 on a line still drowsy from the last boundary
      if (last_boundary < t0 - 2 && !unsure.exists(a)) begin
        checks++; n_lat_exact++;
        if (lat != (awake.exists(a) ? HIT_LAT : HIT_LAT + WAKE_LAT))
          fail($sformatf("hit latency %0d on %s line %h", lat, awake.exists(a) ? "awake" : "drowsy", a));
      end
    end else n_miss++;
    if (last_boundary < t0 - 2) begin
      awake[a] = 1'b1;
      unsure.delete(a);
    end else unsure[a] = 1'b1;
    if (we) golden[a] = d;
    else begin
      checks++;
      if (resp_rdata !== (golden.exists(a) ? golden[a] : mem_default(a)))
        fail($sformatf("read data of %h (core %0d)", a, core));
    end
  endtask

  task automatic cfg_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // traffic generator
  initial begin
    int c;
    wait (rst_n);
    while (!stop) begin
      if (phase == 0) begin
        for (int t = 0; t < 2 && !stop; t++)
          for (int s = 0; s < USED_SETS && !stop; s++)
            for (c = 0; c < 2; c++)
              access(c, mk(c * CORE1 + t, s), $urandom_range(0, 3) == 0);
      end else begin
        // monitoring sets of core c are c and 64 + c; normal sets 4..7
        for (int t = 0; t < 8 && !stop; t++)
          for (c = 0; c < 2; c++) begin
            access(c, mk(c * CORE1 + 100 + t, c), 0);
            access(c, mk(c * CORE1 + 100 + t, 64 + c), 0);
            access(c, mk(c * CORE1 + 100 + t, 4 + 2 * c), 0);
          end
      end
    end
  end

  // decisions of the partitioning logic
  always @(posedge clk) begin
    if (part_done) begin
      n_part++;
      if (power_saving) n_power++; else n_fallback++;
      $display("decision %0d at phase %0d: minMisses {%0d,%0d} -> {%0d,%0d}, power saving %0d",
               n_part, phase, min_misses[0], min_misses[1], quota[0], quota[1], power_saving);
    end
  end

  initial begin
    rst_n = 0; req_valid = 0; req_we = 0; req_core = 0; req_addr = 0; req_wdata = 0;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // phase A for two intervals
    wait (n_part == 1);
    // the OS changes an APD register and flushes the L2 (context switch)
    cfg_write(REG_APD + 8'd1, 32'd20);
    cfg_addr = REG_APD + 8'd1; #1;
    checks++; if (cfg_rdata != 20) fail("APD read back");
    cfg_write(REG_CTRL, 32'd1);
    @(negedge clk);
    checks++; if (!flush_busy) fail("flush did not start");
    while (flush_busy) @(negedge clk);
    n_flush++;
    wait (n_part == 2);
    @(negedge clk);
    checks++;
    if (!power_saving || quota[0] + quota[1] > 4)
      fail($sformatf("phase A: partition {%0d,%0d} power_saving %0d", quota[0], quota[1], power_saving));
    checks++;
    if (awake_lines > 2 * 2 * USED_SETS) fail($sformatf("%0d lines awake", awake_lines));
    phase = 1;
    wait (n_part == 3);
    @(negedge clk);
    checks++;
    if (power_saving || quota[0] != 8 || quota[1] != 8)
      fail($sformatf("phase B: partition {%0d,%0d} power_saving %0d", quota[0], quota[1], power_saving));
    stop = 1;
    repeat (400) @(negedge clk);

    $display("hits %0d (with wake-up %0d), misses %0d, remaps %0d, profile events %0d, wake-ups %0d",
             n_hit, n_hit_wake, n_miss, n_remap, n_prof, n_wake);
    $display("write-backs %0d, flushes %0d, intervals %0d, decisions %0d (power %0d, fall-back %0d)",
             n_wb, n_flush, n_int, n_part, n_power, n_fallback);
    checks++; if (n_remap == 0)    fail("no remapped access");
    checks++; if (n_prof == 0)     fail("no profiling event");
    checks++; if (n_wake == 0)     fail("no drowsy wake-up");
    checks++; if (n_hit_wake == 0) fail("no wake-up latency seen");
    checks++; if (n_lat_exact < 1000) fail($sformatf("only %0d exact latency checks", n_lat_exact));
    checks++; if (n_wb == 0)       fail("no write-back");
    checks++; if (n_flush == 0)    fail("no flush");
    checks++; if (n_int < 3)       fail("fewer than three intervals");
    checks++; if (n_power == 0)    fail("no power-saving decision");
    checks++; if (n_fallback == 0) fail("no fall-back to the performance partition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

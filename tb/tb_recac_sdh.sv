// tb_recac_sdh: self-checking test of the stack distance histogram.
//
// Sends random profiling events (core, hit or miss, LRU position) during an
// interval while counting them in the testbench, closes the interval with
// snap, and checks each core's curve: misses with w ways must equal the
// misses plus the hits at positions w..A-1. It then checks that the live
// counters were cleared by the snapshot (a second interval with only misses)
// and that the curve is non-increasing in w.
module tb_recac_sdh;
  localparam int N = 2, A = 16, CW = 20;
  localparam int SW = CW + 4 + 1;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n, evt_valid, evt_hit, snap;
  logic [0:0]    evt_core;
  logic [3:0]    evt_pos;
  logic [SW-1:0] curve [N][A];

  int hits [N][A];
  int miss [N];
  int checks = 0, failures = 0;

  recac_sdh #(.N(N), .A(A), .CW(CW)) dut (.*);

  task automatic check_curves();
    for (int c = 0; c < N; c++)
      for (int w = 1; w <= A; w++) begin
        int e;
        e = miss[c];
        for (int p = w; p < A; p++) e += hits[c][p];
        checks++;
        if (int'(curve[c][w-1]) != e) begin
          failures++;
          $display("FAIL core %0d ways %0d: curve %0d expected %0d", c, w, curve[c][w-1], e);
        end
        if (w > 1) begin
          checks++;
          if (curve[c][w-1] > curve[c][w-2]) begin failures++; $display("FAIL curve rises"); end
        end
      end
  endtask

  initial begin
    rst_n = 0; evt_valid = 0; evt_hit = 0; snap = 0; evt_core = 0; evt_pos = 0;
    hits = '{default: '{default: 0}}; miss = '{default: 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      evt_valid = ($urandom_range(0, 3) != 0);
      evt_core  = 1'($urandom);
      evt_hit   = ($urandom_range(0, 4) != 0);
      // skewed positions, like a saturating thread
      evt_pos   = 4'($urandom_range(0, 3) == 0 ? $urandom_range(0, 15) : $urandom_range(0, 4));
      if (evt_valid) begin
        if (evt_hit) hits[evt_core][evt_pos]++;
        else         miss[evt_core]++;
      end
    end
    @(negedge clk) evt_valid = 0; snap = 1;
    @(negedge clk) snap = 0;
    check_curves();
    // the next interval: live counters restarted from zero
    hits = '{default: '{default: 0}}; miss = '{default: 0};
    for (int n = 0; n < 37; n++) begin
      @(negedge clk); evt_valid = 1; evt_hit = 0; evt_core = 1; miss[1]++;
    end
    @(negedge clk) evt_valid = 0; snap = 1;
    @(negedge clk) snap = 0;
    check_curves();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

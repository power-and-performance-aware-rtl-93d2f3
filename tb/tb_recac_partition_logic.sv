// tb_recac_partition_logic: self-checking test of the two-step partitioning
// algorithm.
//
// Miss curves are generated for two threads (flat "low utility" curves, steep
// "high utility" curves that keep falling up to 16 ways, saturating curves,
// and random non-increasing curves, some with so few misses that the APD
// rather than the energy balance decides), and a reference model written from the
// algorithm's description picks the minMisses partition and then the best
// power partition under the APD, energy-gain and energy-cost tests (the
// sampled misses scaled by 2^SHIFT to the whole cache). The
// design's minMisses registers, chosen partition and power_saving flag must
// match, and each run must take (A-N+1)^2 + m0*m1 + 2 cycles from start to
// done, one partition per cycle. Both outcomes, a power-saving partition and
// the fall-back to the performance partition, must occur.
module tb_recac_partition_logic;
  localparam int N = 2, A = 16, SW = 25, AW = 8;
  localparam int EMEM = 150, EWAY = 20000, SHIFT = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n, start, busy, done, power_saving;
  logic [SW-1:0] curve [N][A];
  logic [AW-1:0] apd [N];
  logic [4:0]    min_misses [N];
  logic [4:0]    part_out [N];

  int checks = 0, failures = 0, n_power = 0, n_perf = 0;

  recac_partition_logic #(.N(N), .A(A), .SW(SW), .AW(AW), .EMEM(EMEM), .EWAY(EWAY), .SHIFT(SHIFT)) dut (.*);

  // misses of thread t with w ways
  function automatic longint m(int t, int w);
    return longint'(curve[t][w-1]);
  endfunction

  task automatic reference(output int mm0, output int mm1, output int b0, output int b1);
    longint lowest, best_gain, gain, cost, extra0, extra1;
    bit ok;
    lowest = -1; mm0 = 0; mm1 = 0;
    for (int p1 = 1; p1 <= A - N + 1; p1++)
      for (int p0 = 1; p0 <= A - N + 1; p0++)
        if (p0 + p1 == A && (lowest < 0 || m(0, p0) + m(1, p1) < lowest)) begin
          lowest = m(0, p0) + m(1, p1); mm0 = p0; mm1 = p1;
        end
    b0 = mm0; b1 = mm1; best_gain = 0;
    for (int p1 = 1; p1 <= mm1; p1++)
      for (int p0 = 1; p0 <= mm0; p0++) begin
        extra0 = m(0, p0) - m(0, mm0);
        extra1 = m(1, p1) - m(1, mm1);
        ok = (extra0 == 0 || extra0 * 1000 < longint'(apd[0]) * m(0, mm0)) &&
             (extra1 == 0 || extra1 * 1000 < longint'(apd[1]) * m(1, mm1));
        gain = longint'(A - p0 - p1) * EWAY;
        cost = (extra0 + extra1) * (1 << SHIFT) * EMEM;
        if (ok && gain > cost && gain - cost > best_gain) begin
          best_gain = gain - cost; b0 = p0; b1 = p1;
        end
      end
  endtask

  task automatic make_curve(input int t, input int kind);
    int v, base;
    base = $urandom_range(20000, 200000);
    v = base;
    for (int w = 1; w <= A; w++) begin
      case (kind)
        0: v = base - w;                                  // low utility: flat
        1: v = base - w * (base / 20);                    // high utility: steep
        2: v = (w < 4) ? base - w * (base / 8) : v - 2;   // saturating at 3-4 ways
        3: v = v - $urandom_range(0, 3000);               // random
        default: v = (w == 1) ? $urandom_range(300, 3000)  // random, few misses:
                              : v - $urandom_range(0, 60); // the APD decides
      endcase
      if (v < 0) v = 0;
      curve[t][w-1] = SW'(v);
    end
  endtask

  task automatic run_case(input int k0, input int k1, input int apd0, input int apd1);
    int mm0, mm1, b0, b1, cycles;
    make_curve(0, k0); make_curve(1, k1);
    apd[0] = AW'(apd0); apd[1] = AW'(apd1);
    reference(mm0, mm1, b0, b1);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (int'(min_misses[0]) != mm0 || int'(min_misses[1]) != mm1) begin
      failures++;
      $display("FAIL minMisses {%0d,%0d} expected {%0d,%0d}", min_misses[0], min_misses[1], mm0, mm1);
    end
    checks++;
    if (int'(part_out[0]) != b0 || int'(part_out[1]) != b1) begin
      failures++;
      $display("FAIL partition {%0d,%0d} expected {%0d,%0d} (kinds %0d %0d)",
               part_out[0], part_out[1], b0, b1, k0, k1);
    end
    checks++;
    if (power_saving !== (b0 != mm0 || b1 != mm1)) begin failures++; $display("FAIL power_saving flag"); end
    checks++;
    if (cycles != (A - N + 1) * (A - N + 1) + mm0 * mm1 + 2) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", cycles, (A-N+1)*(A-N+1) + mm0*mm1 + 2);
    end
    if (b0 != mm0 || b1 != mm1) n_power++; else n_perf++;
  endtask

  initial begin
    rst_n = 0; start = 0;
    apd[0] = 10; apd[1] = 10;
    for (int t = 0; t < N; t++) for (int w = 0; w < A; w++) curve[t][w] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (part_out[0] != 8 || part_out[1] != 8) begin failures++; $display("FAIL reset partition"); end
    run_case(0, 0, 10, 10);   // low-low
    checks++;
    if (part_out[0] != 1 || part_out[1] != 1) begin failures++; $display("FAIL low-low should shrink to {1,1}"); end
    run_case(1, 1, 10, 10);   // high-high
    run_case(2, 2, 10, 10);   // sat-sat
    run_case(0, 1, 10, 10);   // low-high
    run_case(1, 1, 0, 0);     // no APD
    for (int n = 0; n < 60; n++)
      run_case($urandom_range(0, 4), $urandom_range(0, 4), $urandom_range(0, 50), $urandom_range(0, 50));
    $display("power-saving decisions %0d, performance fall-backs %0d", n_power, n_perf);
    checks++;
    if (n_power == 0 || n_perf == 0) begin failures++; $display("FAIL an outcome never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

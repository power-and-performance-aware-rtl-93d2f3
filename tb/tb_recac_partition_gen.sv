// tb_recac_partition_gen: self-checking test of the get_next_partition
// hardware.
//
// Performance step: after load the generator must present every pair
// {p0, p1} with 1 <= p <= A-N+1, p0 fastest, one per cycle, with finish high
// exactly on the last pair; the number of cycles is therefore (A-N+1)^2 = 225
// for a 16-way cache and two threads, and all 15 pairs that sum to 16 must
// appear. Power step: with minMisses registers {5, 11} the generator must
// present every pair up to {5, 11}, i.e. 55 partitions.
module tb_recac_partition_gen;
  localparam int N = 2, A = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, load, step, power_step, finish;
  logic [4:0] min_misses [N];
  logic [4:0] part [N];
  int checks = 0, failures = 0;

  recac_partition_gen #(.N(N), .A(A)) dut (.*);

  task automatic run_step(input int lim0, input int lim1);
    int cycles, valid_sums;
    cycles = 0; valid_sums = 0;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0; step = 1;
    for (int p1 = 1; p1 <= lim1; p1++)
      for (int p0 = 1; p0 <= lim0; p0++) begin
        checks++;
        if (int'(part[0]) != p0 || int'(part[1]) != p1) begin
          failures++;
          $display("FAIL expected {%0d,%0d} got {%0d,%0d}", p0, p1, part[0], part[1]);
        end
        checks++;
        if (finish !== (p0 == lim0 && p1 == lim1)) begin
          failures++; $display("FAIL finish at {%0d,%0d}", p0, p1);
        end
        if (p0 + p1 == A) valid_sums++;
        cycles++;
        @(negedge clk);
      end
    step = 0;
    $display("step with limits {%0d,%0d}: %0d cycles, %0d partitions of %0d ways",
             lim0, lim1, cycles, valid_sums, A);
    checks++;
    if (cycles != lim0 * lim1) failures++;
    if (!power_step) begin
      checks++;
      if (valid_sums != A - 1) begin failures++; $display("FAIL valid partitions %0d", valid_sums); end
    end
  endtask

  initial begin
    rst_n = 0; load = 0; step = 0; power_step = 0;
    min_misses[0] = 5; min_misses[1] = 11;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run_step(A - N + 1, A - N + 1);
    power_step = 1;
    run_step(5, 11);
    min_misses[0] = 1; min_misses[1] = 1;
    run_step(1, 1);
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

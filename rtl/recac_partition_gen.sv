// recac_partition_gen: hardware for get_next_partition() of the partitioning
// algorithm (Figure 8), generalised from two to N threads.
//
// One incrementer per thread holds the number of ways offered to that thread.
// They form an odometer: incrementer 0 steps every cycle; when a counter
// passes its limit (its comparator reports a > b) it returns to 1 and lets the
// next one step. In the performance step (power_step = 0) every limit is the
// constant register A-N+1, so all combinations from {1,...,1} upward are
// produced, and the consumer ignores those whose sum is not A. In the power
// step (power_step = 1) the limit of thread i is its minMisses register, so
// only partitions that give no thread more than the performance step chose are
// produced. finish is high during the last partition of a step; it is the AND
// of all the wrap conditions, as in the figure.
//
// The text gives the per-thread range both as "between 1 and A - N ways" and
// as "from {1,1} partition up to {A,A}"; the first would miss valid partitions
// such as {1,15}, so the limit here is A-N+1, the largest share a thread can
// have when every other thread keeps one way.
//
// Timing: load sets all counters to 1 (that partition is presented in the
// following cycle); each cycle with step high moves to the next partition.
module recac_partition_gen
  import recac_pkg::*;
#(
  parameter int unsigned N = N_CORES,
  parameter int unsigned A = WAYS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic                  step,
  input  logic                  power_step,
  input  logic [$clog2(A):0]    min_misses [N],  // minMisses registers
  output logic [$clog2(A):0]    part [N],        // partition being evaluated
  output logic                  finish
);
  localparam int unsigned PW = $clog2(A) + 1;
  localparam logic [PW-1:0] A_MINUS_N = PW'(A - N + 1);

  logic [PW-1:0] limit [N];
  logic [N-1:0]  at_limit;
  logic [N-1:0]  carry;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      limit[i]    = power_step ? min_misses[i] : A_MINUS_N;
      at_limit[i] = (part[i] >= limit[i]);
    end
    finish = &at_limit;
  end

  always_comb begin
    begin
      logic c;
      c = step;
      for (int i = 0; i < N; i++) begin
        carry[i] = c;
        c = c & at_limit[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) part[i] <= PW'(1);
    end else if (load) begin
      for (int i = 0; i < N; i++) part[i] <= PW'(1);
    end else begin
      for (int i = 0; i < N; i++)
        if (carry[i]) part[i] <= at_limit[i] ? PW'(1) : part[i] + 1'b1;
    end
  end
endmodule

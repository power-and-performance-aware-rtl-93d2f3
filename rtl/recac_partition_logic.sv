// recac_partition_logic: the two-step power and performance aware cache
// partitioning algorithm (Algorithm 1 of the ReCaC scheme).
//
// Performance step: every partition from the generator whose way counts add
// up to A is scored by the total misses the profile predicts for it
// (sum over threads of curve[t][ways_t - 1]); the lowest total wins, as in the
// minMisses policy, and is kept in the minMisses registers.
// Power step: the generator now offers only partitions that give each thread
// at most its minMisses share. A candidate is accepted when
//   1) for every thread, its extra misses stay under its APD register:
//      extra * 1000 < APD * misses_at_minMisses (APD in units of 0.1 %),
//      or it has no extra misses at all;
//   2) the leakage saved by the ways left drowsy, (A - sum of ways) * E_WAY,
//      exceeds the memory energy of the extra misses, extra_total * E_MEM,
//      where the misses counted in a core's monitoring sets are scaled by
//      2^SHIFT (sets per monitoring set) to the whole cache;
//   3) this net gain beats the best so far.
// The best starts as the minMisses partition with zero gain, so when no
// candidate saves energy the cache falls back to the performance partition.
// The text states test 1 as "performance_cost < APD_registers" and also says
// that with no APD set the cache may still shrink when that costs nothing, so
// a zero cost always passes. Energies are in units of one L2 access; E_MEM =
// 150 follows the text, E_WAY is this design's assumed value.
//
// Timing: start (a one-cycle pulse) begins a run; one partition is evaluated
// per cycle, as the text assumes, so a run takes (A-N+1)^N + prod(minMisses)
// + 2 cycles, after which done pulses and part_out holds the result. The
// curve inputs must stay stable during a run.
module recac_partition_logic
  import recac_pkg::*;
#(
  parameter int unsigned N      = N_CORES,
  parameter int unsigned A      = WAYS,
  parameter int unsigned SW     = CNT_W + $clog2(WAYS) + 1,
  parameter int unsigned AW     = APD_W,
  parameter int unsigned EMEM   = E_MEM,
  parameter int unsigned EWAY   = E_WAY,
  parameter int unsigned SHIFT  = PAT_W      // log2(sets / monitoring sets of a core)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [SW-1:0]         curve [N][A],   // predicted misses with w+1 ways
  input  logic [AW-1:0]         apd   [N],      // APD registers
  output logic                  busy,
  output logic                  done,
  output logic                  power_saving,   // chosen partition differs from minMisses
  output logic [$clog2(A):0]    min_misses [N],
  output logic [$clog2(A):0]    part_out   [N]
);
  localparam int unsigned PW = $clog2(A) + 1;
  localparam int unsigned EW = 48;
  localparam int unsigned WW = $clog2(A);

  typedef enum logic [1:0] {S_IDLE, S_PERF, S_POWER, S_DONE} state_e;
  state_e state;

  logic          gen_load, gen_step, gen_finish;
  logic [PW-1:0] part [N];
  logic [PW-1:0] best_part [N];
  logic [EW-1:0] lowest_misses, best_gain;

  recac_partition_gen #(.N(N), .A(A)) u_gen (
    .clk, .rst_n,
    .load(gen_load), .step(gen_step),
    .power_step(state == S_POWER),
    .min_misses(min_misses),
    .part(part), .finish(gen_finish)
  );

  // evaluation of the partition presented this cycle
  logic [EW-1:0] tot_misses, extra_tot, e_gain, e_cost, net;
  logic [PW+1:0] way_sum;
  logic          sum_ok, apd_ok;

  always_comb begin
    tot_misses = '0;
    extra_tot  = '0;
    way_sum    = '0;
    apd_ok     = 1'b1;
    for (int t = 0; t < N; t++) begin
      logic [EW-1:0] m, base, extra;
      m     = EW'(curve[t][WW'(part[t] - 1'b1)]);
      base  = EW'(curve[t][WW'(min_misses[t] - 1'b1)]);
      extra = (m > base) ? m - base : '0;
      tot_misses = tot_misses + m;
      extra_tot  = extra_tot + extra;
      way_sum    = way_sum + (PW+2)'(part[t]);
      if (extra != '0 && !(extra * 1000 < EW'(apd[t]) * base)) apd_ok = 1'b0;
    end
    sum_ok = (way_sum == (PW+2)'(A));
    e_cost = (extra_tot << SHIFT) * EMEM;
    e_gain = (way_sum < (PW+2)'(A)) ? EW'(A - way_sum) * EWAY : '0;
    net    = e_gain - e_cost;
  end

  assign gen_load = (state == S_IDLE && start) || (state == S_PERF && gen_finish);
  assign gen_step = (state == S_PERF || state == S_POWER) && !gen_load;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      done          <= 1'b0;
      power_saving  <= 1'b0;
      lowest_misses <= '1;
      best_gain     <= '0;
      for (int t = 0; t < N; t++) begin
        min_misses[t] <= PW'(A / N);
        best_part[t]  <= PW'(A / N);
        part_out[t]   <= PW'(A / N);
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          lowest_misses <= '1;
          state         <= S_PERF;
        end
        S_PERF: begin
          if (sum_ok && tot_misses < lowest_misses) begin
            lowest_misses <= tot_misses;
            min_misses    <= part;
          end
          if (gen_finish) state <= S_POWER;
        end
        S_POWER: begin
          if (apd_ok && e_gain > e_cost && net > best_gain) begin
            best_gain <= net;
            best_part <= part;
          end
          if (gen_finish) state <= S_DONE;
        end
        S_DONE: begin
          part_out     <= best_part;
          power_saving <= (best_part != min_misses);
          done         <= 1'b1;
          state        <= S_IDLE;
        end
      endcase
      // the power step starts from the minMisses partition
      if (state == S_PERF && gen_finish) begin
        best_gain <= '0;
        if (sum_ok && tot_misses < lowest_misses) best_part <= part;
        else                                      best_part <= min_misses;
      end
    end
  end
endmodule

// recac_sdh: stack distance histogram (SDH) profiler, one per core, fed by
// the accesses a core makes to its own monitoring sets.
//
// Because only the owner reaches a monitoring set, the set behaves like a full
// 16-way cache running that thread alone. Each hit there is counted at its LRU
// stack position, and each miss in a miss counter. With w ways a thread would
// have missed on every access that missed plus every hit at positions w..A-1,
// so the curve misses(w) = miss + sum over p >= w of hit[p] predicts the
// thread's misses for any way count. The text names the SDH and says the
// monitor counts misses and hit positions; the counters and the curve are
// this design's reading of that.
//
// At each interval boundary (snap) the live counters are copied to a snapshot
// and cleared, so the partitioning logic works on the finished interval while
// the next one is profiled. Counters saturate at 2^CW-1. curve[c][w-1] is
// the predicted miss count of core c with w ways, from the snapshot.
// Timing: one event per cycle; the snapshot is valid the cycle after snap.
module recac_sdh
  import recac_pkg::*;
#(
  parameter int unsigned N  = N_CORES,
  parameter int unsigned A  = WAYS,
  parameter int unsigned CW = CNT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  evt_valid,
  input  logic [$clog2(N)-1:0]  evt_core,
  input  logic                  evt_hit,
  input  logic [$clog2(A)-1:0]  evt_pos,
  input  logic                  snap,
  output logic [CW+$clog2(A):0] curve [N][A]
);
  localparam int unsigned SW = CW + $clog2(A) + 1;

  logic [CW-1:0] hit_cnt  [N][A];
  logic [CW-1:0] miss_cnt [N];
  logic [CW-1:0] hit_snap [N][A];
  logic [CW-1:0] miss_snap[N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N; c++) begin
        miss_cnt[c]  <= '0;
        miss_snap[c] <= '0;
        for (int p = 0; p < A; p++) begin
          hit_cnt[c][p]  <= '0;
          hit_snap[c][p] <= '0;
        end
      end
    end else if (snap) begin
      hit_snap  <= hit_cnt;
      miss_snap <= miss_cnt;
      for (int c = 0; c < N; c++) begin
        miss_cnt[c] <= '0;
        for (int p = 0; p < A; p++) hit_cnt[c][p] <= '0;
      end
    end else if (evt_valid) begin
      if (evt_hit) begin
        if (hit_cnt[evt_core][evt_pos] != '1)
          hit_cnt[evt_core][evt_pos] <= hit_cnt[evt_core][evt_pos] + 1'b1;
      end else begin
        if (miss_cnt[evt_core] != '1)
          miss_cnt[evt_core] <= miss_cnt[evt_core] + 1'b1;
      end
    end
  end

  always_comb begin
    for (int c = 0; c < N; c++) begin
      logic [SW-1:0] acc;
      acc = SW'(miss_snap[c]);
      for (int w = A-1; w >= 0; w--) begin
        curve[c][w] = acc;                 // misses with w+1 ways
        acc = acc + SW'(hit_snap[c][w]);
      end
    end
  end
endmodule

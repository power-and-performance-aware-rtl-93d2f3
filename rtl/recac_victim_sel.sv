// recac_victim_sel: picks the line a miss replaces, enforcing the way
// partition chosen by the partitioning logic.
//
// Each core has a quota of ways. Within one set, if the missing core already
// holds at least its quota, it replaces its own least recently used line, so
// a core never grows beyond its share (Figure 17(b): with two ways each, a
// phase change overwrites the old working set instead of waking more lines).
// Otherwise it takes an invalid line if there is one, then the LRU line of a
// core that holds more than its quota, and only then the LRU line of the whole
// set. When quotas add up to fewer ways than the set has (the power step of the
// partitioning), the extra ways are never filled and stay in the drowsy mode.
// A monitoring set is used by one core only, as if it ran alone, so it ignores
// the quotas and replaces by plain LRU (invalid lines first). The text names
// the quota enforcement of its minMisses policy but not its mechanism; this
// owner-count scheme is this design's choice.
//
// Purely combinational. LRU positions are stack positions, 0 = MRU.
module recac_victim_sel
  import recac_pkg::*;
#(
  parameter int unsigned N = N_CORES,
  parameter int unsigned A = WAYS
) (
  input  logic [A-1:0]           valid,
  input  logic [$clog2(N)-1:0]   owner [A],
  input  logic [$clog2(A)-1:0]   lru   [A],
  input  logic [$clog2(N)-1:0]   core,        // missing core
  input  logic [$clog2(A):0]     quota [N],   // ways allotted to each core
  input  logic                   mon_set,     // set is a monitoring set
  output logic [$clog2(A)-1:0]   victim
);
  localparam int unsigned WW = $clog2(A);

  logic [WW:0]   cnt [N];
  logic          own_full;
  logic          have_inv, have_over, have_own;
  logic [WW-1:0] inv_way, over_way, own_way, any_way;
  logic [WW-1:0] over_pos, own_pos, any_pos;

  always_comb begin
    for (int c = 0; c < N; c++) cnt[c] = '0;
    for (int w = 0; w < A; w++)
      if (valid[w]) cnt[owner[w]] = cnt[owner[w]] + 1'b1;

    have_inv = 1'b0; inv_way = '0;
    for (int w = A-1; w >= 0; w--)
      if (!valid[w]) begin have_inv = 1'b1; inv_way = WW'(w); end

    have_own = 1'b0;  own_way = '0;  own_pos = '0;
    have_over = 1'b0; over_way = '0; over_pos = '0;
    any_way = '0; any_pos = '0;
    for (int w = 0; w < A; w++) begin
      if (valid[w]) begin
        if (lru[w] >= any_pos) begin any_pos = lru[w]; any_way = WW'(w); end
        if (owner[w] == core && (!have_own || lru[w] >= own_pos)) begin
          have_own = 1'b1; own_pos = lru[w]; own_way = WW'(w);
        end
        if (owner[w] != core && cnt[owner[w]] > quota[owner[w]] &&
            (!have_over || lru[w] >= over_pos)) begin
          have_over = 1'b1; over_pos = lru[w]; over_way = WW'(w);
        end
      end
    end

    own_full = have_own && (cnt[core] >= quota[core]);

    if (mon_set)        victim = have_inv ? inv_way : any_way;
    else if (own_full)  victim = own_way;
    else if (have_inv)  victim = inv_way;
    else if (have_over) victim = over_way;
    else                victim = any_way;
  end
endmodule

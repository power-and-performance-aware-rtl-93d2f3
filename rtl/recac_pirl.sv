// recac_pirl: parallel Index Remapping Logic (p-IRL), the variant of the IRL
// for threads that share data (parallel eATD).
//
// With plain remapping, a line that one core keeps in its monitoring set is
// invisible to another core, whose accesses to that set go to the remapped
// set instead; shared data would then exist twice. The p-IRL leaves the
// index of every access unchanged and, when the low K bits match any
// current pattern (a monitoring set, whatever core is accessing), produces a
// second access to the remapped set of that group with R = 1. The L2 serves
// the two in order (the p-IRL queue: entry0 first, entry1 only if entry0
// missed), so a line can be found in either set and is stored only once:
// the group's owner fills misses into the monitoring set, every other core
// into the remapped set. Accesses to remapped and normal sets produce one
// access, with R = 0. The remapped pattern of a group is the new pattern of
// the lowest-numbered thread whose R register is set for that group.
//
// Purely combinational. entry0 is always the unmodified index with R = 0.
module recac_pirl
  import recac_pkg::*;
#(
  parameter int unsigned N  = N_CORES,
  parameter int unsigned IW = IDX_W,
  parameter int unsigned K  = PAT_W
) (
  input  logic [IW-1:0]          idx,
  input  logic [$clog2(N)-1:0]   thread,
  input  logic [K-1:0]           mask,
  input  logic [K-1:0]           cur  [N],
  input  logic [K-1:0]           newp [N][N],
  input  logic                   rreg [N][N],
  output logic                   two_entries,  // monitoring set: entry1 is valid
  output logic                   owner,        // the accessing thread owns that set
  output logic [$clog2(N)-1:0]   group,        // monitoring group matched
  output logic [IW-1:0]          entry1_idx    // remapped set, searched with R = 1
);
  logic [K-1:0] low, rmp_pat;
  logic         found;

  always_comb begin
    low         = idx[K-1:0] & mask;
    two_entries = 1'b0;
    group       = '0;
    for (int j = N-1; j >= 0; j--)
      if (low == (cur[j] & mask)) begin
        two_entries = 1'b1;
        group       = j[$clog2(N)-1:0];
      end
    rmp_pat = '0;
    found   = 1'b0;
    for (int t = 0; t < N; t++)
      if (!found && rreg[group][t]) begin
        found   = 1'b1;
        rmp_pat = newp[group][t];
      end
    owner      = two_entries && !rreg[group][thread];
    entry1_idx = {idx[IW-1:K], (idx[K-1:0] & ~mask) | (rmp_pat & mask)};
  end
endmodule

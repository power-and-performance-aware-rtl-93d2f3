// recac_irl: Index Remapping Logic (IRL) of the embedded auxiliary tag
// directories (eATD).
//
// Some L2 sets are reserved as monitoring sets, one group per core, so that
// each core sees them as if it ran alone. The low K index bits of an access
// (its "current pattern", after ANDing with the mask register) are compared
// with the current-pattern register of every monitoring group. On a match the
// K bits are replaced by the new-pattern register chosen by the accessing
// thread, and the R (remapped) bit of that register goes along with the
// access. The owner of a monitoring group has new = current and R = 0; every
// other thread has a remapped pattern and R = 1. The upper S-K index bits pass
// unchanged, so remapping acts like adding a fixed offset to the set number
// and the set decoder needs no change. This follows Figure 3(a): mask,
// comparators against the current patterns, per-thread new-pattern/R muxes
// and a final mux between the original bits and the new pattern.
//
// Beyond the figure, the block also classifies the resulting set: a
// monitoring set (mon_slot names its group), a remapped set (one whose low
// bits equal a new pattern that carries R = 1; rmp_slot names the group whose
// data moved there, used to address the R-table) or a normal set. If several
// current patterns match, the lowest-numbered group wins (this design's
// choice; the OS is expected to program distinct patterns).
//
// Purely combinational; the L2 registers its outputs, which is the one extra
// cycle of every L2 access.
module recac_irl
  import recac_pkg::*;
#(
  parameter int unsigned N     = N_CORES,
  parameter int unsigned IW    = IDX_W,
  parameter int unsigned K     = PAT_W
) (
  input  logic [IW-1:0]          idx,          // set index of the access
  input  logic [$clog2(N)-1:0]   thread,       // accessing core
  input  logic [K-1:0]           mask,         // mask register
  input  logic [K-1:0]           cur  [N],     // current pattern of group j
  input  logic [K-1:0]           newp [N][N],  // new pattern of group j for thread t
  input  logic                   rreg [N][N],  // R register of group j for thread t
  output logic [IW-1:0]          mod_idx,      // modified index
  output logic                   remapped,     // R bit of the access
  output set_kind_e              kind,         // kind of the set finally accessed
  output logic [$clog2(N)-1:0]   mon_slot,     // group of a monitoring set
  output logic [$clog2(N)-1:0]   rmp_slot      // group whose remapped set this is
);
  logic [K-1:0] low, out_low;
  logic         match;
  logic [$clog2(N)-1:0] mslot;

  always_comb begin
    low   = idx[K-1:0] & mask;
    match = 1'b0;
    mslot = '0;
    for (int j = N-1; j >= 0; j--) begin
      if (low == (cur[j] & mask)) begin
        match = 1'b1;
        mslot = j[$clog2(N)-1:0];
      end
    end
    if (match) begin
      out_low  = (idx[K-1:0] & ~mask) | (newp[mslot][thread] & mask);
      remapped = rreg[mslot][thread];
    end else begin
      out_low  = idx[K-1:0];
      remapped = 1'b0;
    end
    mod_idx = {idx[IW-1:K], out_low};
  end

  recac_set_class #(.N(N), .K(K)) u_class (
    .low(out_low), .mask, .cur, .newp, .rreg,
    .kind, .mon_slot, .rmp_slot
  );
endmodule

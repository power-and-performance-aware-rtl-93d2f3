// recac_set_class: tells from the low K bits of a (final) set index whether
// the set is a monitoring set, a remapped set or a normal set under the
// current OS programming, and which monitoring group it belongs to.
//
// A set is a monitoring set of group j when its masked low bits equal the
// current-pattern register of group j. It is a remapped set of group j when
// they equal a new pattern of group j that carries R = 1 (the place foreign
// accesses to group j are sent). Otherwise it is normal. The lowest-numbered
// group wins when patterns overlap; monitoring takes priority over remapped.
// Used by the IRL for the access it remaps and by the L2 for the set it
// flushes. Purely combinational.
module recac_set_class
  import recac_pkg::*;
#(
  parameter int unsigned N = N_CORES,
  parameter int unsigned K = PAT_W
) (
  input  logic [K-1:0]           low,
  input  logic [K-1:0]           mask,
  input  logic [K-1:0]           cur  [N],
  input  logic [K-1:0]           newp [N][N],
  input  logic                   rreg [N][N],
  output set_kind_e              kind,
  output logic [$clog2(N)-1:0]   mon_slot,
  output logic [$clog2(N)-1:0]   rmp_slot
);
  always_comb begin
    kind     = SET_NORMAL;
    mon_slot = '0;
    rmp_slot = '0;
    for (int j = N-1; j >= 0; j--)
      for (int t = 0; t < N; t++)
        if (rreg[j][t] && ((low & mask) == (newp[j][t] & mask))) begin
          kind     = SET_RMP;
          rmp_slot = j[$clog2(N)-1:0];
        end
    for (int j = N-1; j >= 0; j--)
      if ((low & mask) == (cur[j] & mask)) begin
        kind     = SET_MON;
        mon_slot = j[$clog2(N)-1:0];
      end
  end
endmodule

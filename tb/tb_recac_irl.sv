// tb_recac_irl: self-checking test of the index remapping logic.
//
// Programs the two-core mapping of the worked example (group 0 = sets with
// low bits 0, owned by core 0, foreign accesses sent to pattern 3; group 1 =
// low bits 1, owned by core 1, foreign accesses sent to pattern 2) and checks
// random and hand-picked indices against an independent table-driven model:
// the modified index, the R bit and the set kind. It then narrows the mask to
// three bits and checks the "set 9 -> 10" style remapping of a 3-bit pattern.
module tb_recac_irl;
  import recac_pkg::*;
  localparam int N = 2, IW = 10, K = 6;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [IW-1:0] idx, mod_idx;
  logic [0:0]    thread, mon_slot, rmp_slot;
  logic [K-1:0]  mask;
  logic [K-1:0]  cur [N];
  logic [K-1:0]  newp [N][N];
  logic          rreg [N][N];
  logic          remapped;
  set_kind_e     kind;

  int checks = 0, failures = 0;

  recac_irl #(.N(N), .IW(IW), .K(K)) dut (.*);

  task automatic check(input logic [IW-1:0] e_idx, input logic e_r, input set_kind_e e_kind,
                       input string what);
    checks++;
    if (mod_idx !== e_idx || remapped !== e_r || kind !== e_kind) begin
      failures++;
      $display("FAIL %s: idx=%0d thread=%0d -> %0d R=%0d kind=%0d, expected %0d R=%0d kind=%0d",
               what, idx, thread, mod_idx, remapped, kind, e_idx, e_r, e_kind);
    end
  endtask

  // reference: the mapping of the two-core example, K-bit patterns
  task automatic ref_model(input logic [IW-1:0] i, input int t, input int kbits,
                           output logic [IW-1:0] o, output logic r, output set_kind_e k);
    int low, base;
    low  = i % (1 << kbits);
    base = i - low;
    o = i; r = 0; k = SET_NORMAL;
    if (low == 0)      begin if (t == 1) begin o = IW'(base + 3); r = 1; k = SET_RMP; end
                             else k = SET_MON; end
    else if (low == 1) begin if (t == 0) begin o = IW'(base + 2); r = 1; k = SET_RMP; end
                             else k = SET_MON; end
    else if (low == 2 || low == 3) k = SET_RMP;
  endtask

  initial begin
    logic [IW-1:0] e_idx; logic e_r; set_kind_e e_k;
    mask = '1;
    cur[0] = 0; cur[1] = 1;
    newp[0][0] = 0; rreg[0][0] = 0;  newp[0][1] = 3; rreg[0][1] = 1;
    newp[1][0] = 2; rreg[1][0] = 1;  newp[1][1] = 1; rreg[1][1] = 0;

    // hand-picked cases of the example (and their copies every 64 sets)
    idx = 1;  thread = 0; #1 check(2,  1, SET_RMP, "T0 set1->2");
    idx = 0;  thread = 1; #1 check(3,  1, SET_RMP, "T1 set0->3");
    idx = 0;  thread = 0; #1 check(0,  0, SET_MON, "T0 own mon");
    idx = 65; thread = 0; #1 check(66, 1, SET_RMP, "T0 set65->66");
    idx = 64; thread = 1; #1 check(67, 1, SET_RMP, "T1 set64->67");
    idx = 4;  thread = 1; #1 check(4,  0, SET_NORMAL, "normal");
    idx = 2;  thread = 1; #1 check(2,  0, SET_RMP, "direct rmp");
    if (mon_slot !== 0 && kind == SET_MON) failures++;

    for (int n = 0; n < 400; n++) begin
      idx = IW'($urandom); thread = 1'($urandom);
      #1;
      ref_model(idx, thread, K, e_idx, e_r, e_k);
      check(e_idx, e_r, e_k, "random K=6");
      if (kind == SET_RMP) begin
        checks++;
        if (rmp_slot !== ((idx % 64 == 0 || idx % 64 == 3) ? 0 : 1)) begin
          failures++; $display("FAIL rmp_slot idx=%0d", idx);
        end
      end
    end

    // three-bit patterns: set 1 -> 2, 9 -> 10, 17 -> 18; set 0 -> 3, 8 -> 11
    mask = 6'b000111;
    idx = 9;  thread = 0; #1 check(10, 1, SET_RMP, "T0 set9->10");
    idx = 17; thread = 0; #1 check(18, 1, SET_RMP, "T0 set17->18");
    idx = 8;  thread = 1; #1 check(11, 1, SET_RMP, "T1 set8->11");
    for (int n = 0; n < 200; n++) begin
      idx = IW'($urandom); thread = 1'($urandom);
      #1;
      ref_model(idx, thread, 3, e_idx, e_r, e_k);
      check(e_idx, e_r, e_k, "random K=3");
    end

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

// tb_recac_pirl: self-checking test of the parallel index remapping logic.
//
// With the two-core example mapping (monitoring patterns 0 and 1, remapped
// patterns 3 and 2) every index and thread is checked against the search
// table of the parallel eATD: an access to pattern 0 searches its own set and
// the set with pattern 3 (owner: core 0), pattern 1 searches its set and
// pattern 2 (owner: core 1), every other pattern a single set. It also checks
// a reprogrammed mapping with monitoring patterns 5 and 6 sent to 7 and 4.
module tb_recac_pirl;
  localparam int N = 2, IW = 10, K = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [IW-1:0] idx, entry1_idx;
  logic [0:0]    thread, group;
  logic [K-1:0]  mask;
  logic [K-1:0]  cur [N];
  logic [K-1:0]  newp [N][N];
  logic          rreg [N][N];
  logic          two_entries, owner;

  int checks = 0, failures = 0;

  recac_pirl #(.N(N), .IW(IW), .K(K)) dut (.*);

  task automatic set_map(input int m0, input int m1, input int r0, input int r1);
    cur[0] = K'(m0); cur[1] = K'(m1);
    newp[0][0] = K'(m0); rreg[0][0] = 0;  newp[0][1] = K'(r0); rreg[0][1] = 1;
    newp[1][0] = K'(r1); rreg[1][0] = 1;  newp[1][1] = K'(m1); rreg[1][1] = 0;
  endtask

  task automatic sweep(input int m0, input int m1, input int r0, input int r1);
    for (int i = 0; i < (1 << IW); i++)
      for (int t = 0; t < N; t++) begin
        int low, e_idx1, e_own; bit e_two;
        idx = IW'(i); thread = 1'(t);
        #1;
        low = i % 8;
        e_two = (low == m0) || (low == m1);
        e_idx1 = (low == m0) ? i - low + r0 : i - low + r1;
        e_own  = (low == m0) ? (t == 0) : (t == 1);
        checks++;
        if (two_entries !== e_two) begin
          failures++; $display("FAIL two_entries idx=%0d t=%0d", i, t);
        end else if (e_two) begin
          checks++;
          if (int'(entry1_idx) != e_idx1 || int'(owner) != e_own) begin
            failures++;
            $display("FAIL idx=%0d t=%0d: entry1 %0d owner %0d, expected %0d %0d",
                     i, t, entry1_idx, owner, e_idx1, e_own);
          end
        end
      end
  endtask

  initial begin
    mask = '1;
    set_map(0, 1, 3, 2);
    // the worked example: FF0 -> sets 0 and 3, FF1 -> sets 1 and 2
    idx = 0; thread = 1; #1;
    checks++; if (!two_entries || entry1_idx != 3 || owner) begin failures++; $display("FAIL FF0"); end
    idx = 1; thread = 1; #1;
    checks++; if (!two_entries || entry1_idx != 2 || !owner) begin failures++; $display("FAIL FF1"); end
    idx = 2; #1;
    checks++; if (two_entries) begin failures++; $display("FAIL FF2"); end
    sweep(0, 1, 3, 2);
    set_map(5, 6, 7, 4);
    sweep(5, 6, 7, 4);
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

// tb_recac_rtable: self-checking test of the R-table.
//
// Writes random bits into random (slot, row, way) positions of a 2 x 16 x 16
// table while keeping a shadow copy in the testbench, and checks that every
// row read returns exactly the shadow row, including rows of the other slot,
// so a write can never land in the wrong row or way.
module tb_recac_rtable;
  localparam int N = 2, A = 16, UW = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [0:0]    rd_slot, wr_slot;
  logic [UW-1:0] rd_upper, wr_upper;
  logic [A-1:0]  rd_row;
  logic          wr_en, wr_bit;
  logic [3:0]    wr_way;

  logic [A-1:0] shadow [N][1<<UW];
  int checks = 0, failures = 0;

  recac_rtable #(.N(N), .A(A), .UW(UW)) dut (.*);

  task automatic read_check(input int s, input int u);
    rd_slot = 1'(s); rd_upper = UW'(u);
    #1;
    checks++;
    if (rd_row !== shadow[s][u]) begin
      failures++;
      $display("FAIL row slot=%0d upper=%0d got %h expected %h", s, u, rd_row, shadow[s][u]);
    end
  endtask

  initial begin
    wr_en = 0; wr_bit = 0; wr_slot = 0; wr_upper = 0; wr_way = 0;
    rd_slot = 0; rd_upper = 0;
    // fill every row with a known pattern first
    for (int s = 0; s < N; s++)
      for (int u = 0; u < (1<<UW); u++)
        for (int w = 0; w < A; w++) begin
          @(negedge clk);
          wr_en = 1; wr_slot = 1'(s); wr_upper = UW'(u); wr_way = 4'(w);
          wr_bit = ((s * 7 + u * 3 + w) % 3) == 0;
          shadow[s][u][w] = wr_bit;
        end
    @(negedge clk); wr_en = 0;
    for (int s = 0; s < N; s++)
      for (int u = 0; u < (1<<UW); u++) read_check(s, u);
    // random single-bit updates
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wr_en = 1; wr_slot = 1'($urandom); wr_upper = UW'($urandom);
      wr_way = 4'($urandom); wr_bit = 1'($urandom);
      shadow[wr_slot][wr_upper][wr_way] = wr_bit;
      @(negedge clk); wr_en = 0;
      read_check($urandom_range(0, N-1), $urandom_range(0, (1<<UW)-1));
      read_check(wr_slot, wr_upper);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_recac_os_regs: self-checking test of the OS register file.
//
// Checks the reset programming (the two-core example mapping, full mask, APD
// of 1 %), then writes random values to every register through the
// configuration port and checks both the register outputs and the read-back
// word against a shadow copy; finally checks that a flush write produces a
// single-cycle flush pulse.
module tb_recac_os_regs;
  import recac_pkg::*;
  localparam int N = 2, K = 6, AW = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n, cfg_we, flush;
  logic [7:0]    cfg_addr;
  logic [31:0]   cfg_wdata, cfg_rdata;
  logic [K-1:0]  mask;
  logic [K-1:0]  cur [N];
  logic [K-1:0]  newp [N][N];
  logic          rreg [N][N];
  logic [AW-1:0] apd [N];

  int checks = 0, failures = 0;
  logic [31:0] shadow [256];

  recac_os_regs #(.N(N), .K(K), .AW(AW)) dut (.*);

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    int flushes;
    rst_n = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    expect_eq(32'(mask), 32'h3F, "reset mask");
    expect_eq(32'(cur[0]), 0, "reset cur0"); expect_eq(32'(cur[1]), 1, "reset cur1");
    expect_eq(32'({rreg[0][0], newp[0][0]}), 32'h00, "reset new0(T0)");
    expect_eq(32'({rreg[0][1], newp[0][1]}), 32'h43, "reset new0(T1)");
    expect_eq(32'({rreg[1][0], newp[1][0]}), 32'h42, "reset new1(T0)");
    expect_eq(32'({rreg[1][1], newp[1][1]}), 32'h01, "reset new1(T1)");
    expect_eq(32'(apd[0]), 10, "reset apd0"); expect_eq(32'(apd[1]), 10, "reset apd1");

    for (int n = 0; n < 200; n++) begin
      logic [7:0] a; logic [31:0] d;
      case ($urandom_range(0, 3))
        0: a = REG_MASK;
        1: a = REG_CUR + 8'($urandom_range(0, N-1));
        2: a = REG_NEW + 8'($urandom_range(0, N*N-1));
        default: a = REG_APD + 8'($urandom_range(0, N-1));
      endcase
      d = $urandom;
      wr(a, d);
      if (a == REG_NEW || a == REG_NEW+1 || a == REG_NEW+2 || a == REG_NEW+3) shadow[a] = d & 32'h7F;
      else if (a == REG_APD || a == REG_APD+1) shadow[a] = d & 32'hFF;
      else shadow[a] = d & 32'h3F;
      cfg_addr = a; #1;
      expect_eq(cfg_rdata, shadow[a], "read back");
      case (a)
        REG_MASK:  expect_eq(32'(mask), shadow[a], "mask");
        REG_CUR:   expect_eq(32'(cur[0]), shadow[a], "cur0");
        REG_CUR+1: expect_eq(32'(cur[1]), shadow[a], "cur1");
        REG_NEW:   expect_eq(32'({rreg[0][0], newp[0][0]}), shadow[a], "new00");
        REG_NEW+1: expect_eq(32'({rreg[0][1], newp[0][1]}), shadow[a], "new01");
        REG_NEW+2: expect_eq(32'({rreg[1][0], newp[1][0]}), shadow[a], "new10");
        REG_NEW+3: expect_eq(32'({rreg[1][1], newp[1][1]}), shadow[a], "new11");
        REG_APD:   expect_eq(32'(apd[0]), shadow[a], "apd0");
        default:   expect_eq(32'(apd[1]), shadow[a], "apd1");
      endcase
    end

    flushes = 0;
    fork
      repeat (6) @(posedge clk) if (flush) flushes++;
      wr(REG_CTRL, 1);
    join
    expect_eq(flushes, 1, "one flush pulse");
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

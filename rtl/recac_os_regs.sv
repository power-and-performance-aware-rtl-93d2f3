// recac_os_regs: the registers through which the operating system controls
// the ReCaC L2: the IRL mask register, one current-pattern register per
// monitoring group, a new-pattern register and R register per group and
// thread, one APD (allowed performance degradation) register per core, and a
// flush command.
//
// The text exposes these registers to the OS and has it change them on a
// context switch, together with an L2 flush that clears the previous
// remapping. The bus below is this design's own: a single write port and a
// combinational read port on word addresses (see recac_pkg for the map);
// a new-pattern word holds {R, pattern} with R in bit K.
//
// Reset values program the mapping of the text's two-core example: group j
// monitors the sets whose low K bits equal j and belongs to core j; every
// other core is sent to the remapped pattern 2N-1-j (for two cores, set 0's
// foreign accesses go to set 3 and set 1's to set 2) with R = 1. The APD
// registers reset to 10, i.e. 1 %, the value used in the evaluation.
// Timing: a write takes effect at the next clock edge; flush pulses for one
// cycle after a write of 1 to bit 0 of the control word.
module recac_os_regs
  import recac_pkg::*;
#(
  parameter int unsigned N   = N_CORES,
  parameter int unsigned K   = PAT_W,
  parameter int unsigned AW  = APD_W,
  parameter logic [AW-1:0] APD_RESET = AW'(10)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [7:0]      cfg_addr,
  input  logic [31:0]     cfg_wdata,
  output logic [31:0]     cfg_rdata,
  output logic [K-1:0]    mask,
  output logic [K-1:0]    cur  [N],
  output logic [K-1:0]    newp [N][N],
  output logic            rreg [N][N],
  output logic [AW-1:0]   apd  [N],
  output logic            flush
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask  <= '1;
      flush <= 1'b0;
      for (int j = 0; j < N; j++) begin
        cur[j] <= K'(j);
        apd[j] <= APD_RESET;
        for (int t = 0; t < N; t++) begin
          newp[j][t] <= (t == j) ? K'(j) : K'(2*N - 1 - j);
          rreg[j][t] <= (t != j);
        end
      end
    end else begin
      flush <= 1'b0;
      if (cfg_we) begin
        if (cfg_addr == REG_MASK) mask <= cfg_wdata[K-1:0];
        if (cfg_addr == REG_CTRL) flush <= cfg_wdata[0];
        for (int j = 0; j < N; j++) begin
          if (cfg_addr == REG_CUR + 8'(j)) cur[j] <= cfg_wdata[K-1:0];
          if (cfg_addr == REG_APD + 8'(j)) apd[j] <= cfg_wdata[AW-1:0];
          for (int t = 0; t < N; t++)
            if (cfg_addr == REG_NEW + 8'(j*N + t)) begin
              newp[j][t] <= cfg_wdata[K-1:0];
              rreg[j][t] <= cfg_wdata[K];
            end
        end
      end
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr == REG_MASK) cfg_rdata = 32'(mask);
    for (int j = 0; j < N; j++) begin
      if (cfg_addr == REG_CUR + 8'(j)) cfg_rdata = 32'(cur[j]);
      if (cfg_addr == REG_APD + 8'(j)) cfg_rdata = 32'(apd[j]);
      for (int t = 0; t < N; t++)
        if (cfg_addr == REG_NEW + 8'(j*N + t)) cfg_rdata = 32'({rreg[j][t], newp[j][t]});
    end
  end
endmodule

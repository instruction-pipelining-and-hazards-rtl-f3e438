// gpr_file: the general-purpose register file (GPRs).
//
// 32 registers of 32 bits. Two combinational read ports (rs1 -> rd1,
// rs2 -> rd2) and one write port (ws, wd, we) that writes on the rising clock
// edge, as in the datapath figures. Register 0 always reads as zero and
// ignores writes. There is no write-to-read bypass inside the file: a value
// written at the end of a cycle is seen by reads in the following cycle,
// which is why the stall logic of the 5-stage pipeline must also compare
// against the instruction in write-back. Reset clears all registers (a
// choice of this design; the reset state is not specified).
module gpr_file
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  regidx_t rs1,
  input  regidx_t rs2,
  output word_t   rd1,
  output word_t   rd2,
  input  logic    we,
  input  regidx_t ws,
  input  word_t   wd
);
  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && ws != '0) begin
      regs[ws] <= wd;
    end
  end

  assign rd1 = (rs1 == '0) ? '0 : regs[rs1];
  assign rd2 = (rs2 == '0) ? '0 : regs[rs2];
endmodule

// imm_ext: the immediate extender ("Imm Ext" in the datapath).
//
// Widens the 16-bit immediate field of an instruction to 32 bits, either by
// sign extension (sE16, used by ALUi, LW, SW and BEQZ) or by zero extension
// (uE16, used by ALUiu), as chosen by sel. Combinational.
module imm_ext
  import mips_pkg::*;
(
  input  logic [15:0] imm,
  input  ext_sel_e    sel,
  output word_t       y
);
  always_comb begin
    if (sel == EXT_SIGN) y = {{16{imm[15]}}, imm};
    else                 y = {16'h0000, imm};
  end
endmodule

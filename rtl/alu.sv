// alu: the integer ALU of both processors.
//
// Computes y = a OP b for the operation selected by op (see mips_pkg::alu_op_e).
// Add and subtract wrap without overflow traps; SLT/SLTU compare signed and
// unsigned; the shifts take their amount from a[4:0] and shift b (the MIPS
// variable-shift operand order); LUI places b[15:0] in the upper half; EQZ is
// the "0?" operation the control table selects for BEQZ/BNEZ and returns 1
// when a is zero. The operation list beyond add and the zero test is this
// design's choice. Purely combinational, no clock.
module alu
  import mips_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  output word_t   y
);
  always_comb begin
    unique case (op)
      A_ADD:  y = a + b;
      A_SUB:  y = a - b;
      A_AND:  y = a & b;
      A_OR:   y = a | b;
      A_XOR:  y = a ^ b;
      A_NOR:  y = ~(a | b);
      A_SLT:  y = word_t'($signed(a) < $signed(b));
      A_SLTU: y = word_t'(a < b);
      A_SLL:  y = b << a[4:0];
      A_SRL:  y = b >> a[4:0];
      A_SRA:  y = word_t'($signed(b) >>> a[4:0]);
      A_LUI:  y = {b[15:0], 16'h0000};
      A_EQZ:  y = word_t'(a == '0);
      default: y = a + b;
    endcase
  end
endmodule

// reg_use_dec: which registers an instruction reads and writes.
//
// Implements the C_dest and C_re tables used to derive the stall signal:
//   ws  = rd for ALU; rt for ALUi, ALUiu and LW; R31 for JAL and JALR
//   we  = (ws != 0) for ALU, ALUi, ALUiu and LW; on for JAL and JALR;
//         off for everything else (SW, BZ, J, JR, NOP)
//   re1 = on for ALU, ALUi, ALUiu, LW, SW, BZ, JR, JALR; off for J, JAL, NOP
//   re2 = on for ALU and SW only
// rs and rt are the instruction's source fields. The 5-stage pipeline uses one
// copy per stage (decode, execute, memory, write-back). Combinational.
module reg_use_dec
  import mips_pkg::*;
(
  input  word_t   instr,
  output regidx_t rs,
  output regidx_t rt,
  output regidx_t ws,
  output logic    we,
  output logic    re1,
  output logic    re2
);
  iclass_e ic;
  assign ic = classify(instr);
  assign rs = f_rs(instr);
  assign rt = f_rt(instr);

  always_comb begin
    ws  = '0;
    we  = 1'b0;
    re1 = 1'b0;
    re2 = 1'b0;
    unique case (ic)
      IC_ALU:                    begin ws = f_rd(instr); we = (ws != '0); re1 = 1'b1; re2 = 1'b1; end
      IC_ALUI, IC_ALUIU, IC_LW:  begin ws = f_rt(instr); we = (ws != '0); re1 = 1'b1; end
      IC_SW:                     begin re1 = 1'b1; re2 = 1'b1; end
      IC_BZ, IC_JR:              begin re1 = 1'b1; end
      IC_JAL:                    begin ws = 5'd31; we = 1'b1; end
      IC_JALR:                   begin ws = 5'd31; we = 1'b1; re1 = 1'b1; end
      default:                   ;
    endcase
  end
endmodule

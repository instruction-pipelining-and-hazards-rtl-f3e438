// princeton_ctrl: the control table of the pipelined Princeton machine.
//
// Decodes the instruction held in IR into the control points of the execute
// stage (dp) and of the fetch/sequencing logic (seq). seq also depends on z,
// the ALU's zero test of rs, because a BEQZ/BNEZ only stalls fetch when it is
// taken. Rows of the table:
//   ALU/ALUi/ALUiu : no stall; PC <- pc+4; IR <- mem; memory addressed by pc
//   LW/SW          : stall; PC kept; IR <- nop; memory addressed by the ALU
//   BZ taken       : stall; PC <- branch target; IR <- nop
//   BZ not taken   : no stall; PC <- pc+4; IR <- mem
//   J/JAL          : stall; PC <- jabs; IR <- nop   (JAL writes PC to R31)
//   JR/JALR        : stall; PC <- rs;   IR <- nop   (JALR writes PC to R31)
//   NOP            : no stall; PC <- pc+4; IR <- mem
// As in the table, stall and IRSrc are always complementary (stall <=> nop).
// Entries the table leaves open ("*") are given fixed values here. BNEZ
// (taken when z = 0) is an addition of this design beside the table's
// BEQZ. Combinational.
module princeton_ctrl
  import mips_pkg::*;
(
  input  word_t      ir,
  input  logic       z,
  output pdp_ctrl_t  dp,
  output pseq_ctrl_t seq
);
  iclass_e ic;
  assign ic = classify(ir);

  always_comb begin
    dp = '{ext_sel: EXT_SIGN, b_src: BSRC_REG, alu_op: A_ADD, mem_w: 1'b0,
           reg_w: 1'b0, wb_src: WB_ALU, reg_dst: RD_RT, maddr_src: MA_PC};
    dp.alu_op = instr_alu_op(ir);
    unique case (ic)
      IC_ALU:   begin dp.b_src = BSRC_REG; dp.reg_w = 1'b1; dp.reg_dst = RD_RD; end
      IC_ALUI:  begin dp.ext_sel = EXT_SIGN; dp.b_src = BSRC_IMM; dp.reg_w = 1'b1; end
      IC_ALUIU: begin dp.ext_sel = EXT_ZERO; dp.b_src = BSRC_IMM; dp.reg_w = 1'b1; end
      IC_LW:    begin dp.b_src = BSRC_IMM; dp.reg_w = 1'b1; dp.wb_src = WB_MEM;
                      dp.maddr_src = MA_ALU; end
      IC_SW:    begin dp.b_src = BSRC_IMM; dp.mem_w = 1'b1; dp.maddr_src = MA_ALU; end
      IC_JAL, IC_JALR: begin dp.reg_w = 1'b1; dp.wb_src = WB_PC; dp.reg_dst = RD_R31; end
      default:  ;
    endcase
  end

  logic taken;
  assign taken = (f_op(ir) == OP_BEQZ) ? z : !z;

  always_comb begin
    seq = '{stall: 1'b0, pc_src1: PC1_PLUS4, pc_src2: PC2_NPC, ir_src: IR_MEM};
    unique case (ic)
      IC_LW, IC_SW:   seq = '{stall: 1'b1, pc_src1: PC1_PLUS4, pc_src2: PC2_PC, ir_src: IR_NOP};
      IC_BZ:          if (taken)
                        seq = '{stall: 1'b1, pc_src1: PC1_BR, pc_src2: PC2_NPC, ir_src: IR_NOP};
      IC_J, IC_JAL:   seq = '{stall: 1'b1, pc_src1: PC1_JABS, pc_src2: PC2_NPC, ir_src: IR_NOP};
      IC_JR, IC_JALR: seq = '{stall: 1'b1, pc_src1: PC1_RIND, pc_src2: PC2_NPC, ir_src: IR_NOP};
      default:        ;
    endcase
  end
endmodule

// tb_princeton_ctrl: every row of the Princeton control table, with the
// "don't care" entries left unchecked.
module tb_princeton_ctrl;
  import mips_pkg::*;
  import mips_ref_pkg::*;
  word_t ir;
  logic z;
  pdp_ctrl_t dp;
  pseq_ctrl_t seq;
  int checks = 0, failures = 0;

  princeton_ctrl dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(string row, string col, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s %s got=%0d exp=%0d (ir=%h z=%b)", row, col, got, exp, ir, z);
    end
  endtask

  // One row: -1 marks a "*" entry.
  task automatic row(string name, int stall, int ext, int bsrc, int memw, int regw,
                     int wbsrc, int regdst, int pc1, int pc2, int irsrc, int maddr);
    #1;
    ck(name, "Stall", seq.stall, stall);
    if (ext >= 0)    ck(name, "ExtSel", dp.ext_sel, ext);
    if (bsrc >= 0)   ck(name, "BSrc", dp.b_src, bsrc);
    ck(name, "MemW", dp.mem_w, memw);
    ck(name, "RegW", dp.reg_w, regw);
    if (wbsrc >= 0)  ck(name, "WBSrc", dp.wb_src, wbsrc);
    if (regdst >= 0) ck(name, "RegDst", dp.reg_dst, regdst);
    if (pc1 >= 0)    ck(name, "PCSrc1", seq.pc_src1, pc1);
    ck(name, "PCSrc2", seq.pc_src2, pc2);
    ck(name, "IRSrc", seq.ir_src, irsrc);
    if (maddr >= 0)  ck(name, "MAddrSrc", dp.maddr_src, maddr);
  endtask

  localparam int X = -1;
  // encodings: Ext sE=0 uE=1; BSrc Reg=0 Imm=1; WB ALU=0 Mem=1 PC=2;
  // RegDst rt=0 rd=1 R31=2; PC1 pc+4=0 br=1 rind=2 jabs=3; PC2 pc=0 npc=1;
  // IR nop=0 mem=1; MAddr pc=0 ALU=1
  initial begin
    repeat (50) begin
      z = $urandom_range(0, 1);
      ir = enc_r(ADD, 3, 1, 2);          row("ALU",   0, X, 0, 0, 1, 0, 1, 0, 1, 1, 0);
      #1; ck("ALU", "OpSel", dp.alu_op, A_ADD);
      ir = enc_r(SUB, 3, 1, 2);          #1; ck("ALU", "OpSel", dp.alu_op, A_SUB);
      ir = enc_i(ADDI, 3, 1, 16'h8000);  row("ALUi",  0, 0, 1, 0, 1, 0, 0, 0, 1, 1, 0);
      ir = enc_i(SLTI, 3, 1, 5);         #1; ck("ALUi", "OpSel", dp.alu_op, A_SLT);
      ir = enc_i(ORI, 3, 1, 16'h8000);   row("ALUiu", 0, 1, 1, 0, 1, 0, 0, 0, 1, 1, 0);
      #1; ck("ALUiu", "OpSel", dp.alu_op, A_OR);
      ir = enc_i(LW, 3, 1, 8);           row("LW",    1, 0, 1, 0, 1, 1, 0, X, 0, 0, 1);
      #1; ck("LW", "OpSel", dp.alu_op, A_ADD);
      ir = enc_i(SW, 3, 1, 8);           row("SW",    1, 0, 1, 1, 0, X, X, X, 0, 0, 1);
      #1; ck("SW", "OpSel", dp.alu_op, A_ADD);
      ir = enc_i(BEQZ, 0, 1, 4);
      if (z) row("BEQZ z=1", 1, 0, X, 0, 0, X, X, 1, 1, 0, X);
      else   row("BEQZ z=0", 0, 0, X, 0, 0, X, X, 0, 1, 1, 0);
      #1; ck("BEQZ", "OpSel", dp.alu_op, A_EQZ);
      ir = enc_i(BNEZ, 0, 1, 4);
      if (!z) row("BNEZ z=0", 1, 0, X, 0, 0, X, X, 1, 1, 0, X);
      else    row("BNEZ z=1", 0, 0, X, 0, 0, X, X, 0, 1, 1, 0);
      ir = enc_j(J, 32'h40);             row("J",     1, X, X, 0, 0, X, X, 3, 1, 0, X);
      ir = enc_j(JAL, 32'h40);           row("JAL",   1, X, X, 0, 1, 2, 2, 3, 1, 0, X);
      ir = enc_r(JR, 0, 5, 0);           row("JR",    1, X, X, 0, 0, X, X, 2, 1, 0, X);
      ir = enc_r(JALR, 0, 5, 0);         row("JALR",  1, X, X, 0, 1, 2, 2, 2, 1, 0, X);
      ir = '0;                           row("NOP",   0, X, X, 0, 0, X, X, 0, 1, 1, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

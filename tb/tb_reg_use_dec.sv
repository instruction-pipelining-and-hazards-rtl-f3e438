// tb_reg_use_dec: every instruction class against the C_dest / C_re tables,
// with random register fields.
module tb_reg_use_dec;
  import mips_pkg::*;
  import mips_ref_pkg::*;
  word_t instr;
  regidx_t rs, rt, ws;
  logic we, re1, re2;
  int checks = 0, failures = 0;

  reg_use_dec dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_use(string name, int e_ws, bit e_we, bit e_re1, bit e_re2, int e_rs, int e_rt);
    #1;
    checks++;
    if (ws !== 5'(e_ws) || we !== e_we || re1 !== e_re1 || re2 !== e_re2 ||
        rs !== 5'(e_rs) || rt !== 5'(e_rt)) begin
      failures++;
      $display("FAIL %s instr=%h ws=%0d/%0d we=%b/%b re1=%b/%b re2=%b/%b", name, instr,
               ws, e_ws, we, e_we, re1, e_re1, re2, e_re2);
    end
  endtask

  initial begin
    int s, t, d, imm;
    logic [5:0] alu_fns [8] = '{ADD, SUBU, AND_, OR_, NOR_, SLT, SLLV, SRAV};
    logic [5:0] imm_ops [8] = '{ADDI, ADDIU, SLTI, SLTIU, ANDI, ORI, XORI, LUI};
    repeat (200) begin
      s = $urandom_range(0, 31); t = $urandom_range(0, 31); d = $urandom_range(0, 31);
      if ($urandom_range(0, 4) == 0) d = 0;
      if ($urandom_range(0, 4) == 0) t = 0;
      imm = $urandom_range(0, 65535);
      instr = enc_r(alu_fns[$urandom_range(0, 7)], d, s, t);
      expect_use("ALU", d, d != 0, 1, 1, s, t);
      instr = enc_i(imm_ops[$urandom_range(0, 7)], t, s, imm);
      expect_use("ALUi", t, t != 0, 1, 0, s, t);
      instr = enc_i(LW, t, s, imm);
      expect_use("LW", t, t != 0, 1, 0, s, t);
      instr = enc_i(SW, t, s, imm);
      expect_use("SW", 0, 0, 1, 1, s, t);
      instr = enc_i(($urandom_range(0, 1) != 0) ? BEQZ : BNEZ, t, s, imm);
      expect_use("BZ", 0, 0, 1, 0, s, t);
      instr = enc_j(J, $urandom);
      expect_use("J", 0, 0, 0, 0, instr[25:21], instr[20:16]);
      instr = enc_j(JAL, $urandom);
      expect_use("JAL", 31, 1, 0, 0, instr[25:21], instr[20:16]);
      instr = enc_r(JR, 0, s, 0);
      expect_use("JR", 0, 0, 1, 0, s, 0);
      instr = enc_r(JALR, 0, s, 0);
      expect_use("JALR", 31, 1, 1, 0, s, 0);
    end
    instr = '0;
    expect_use("NOP", 0, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

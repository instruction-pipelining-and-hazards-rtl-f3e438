// mips_pkg: types, encodings and decode helpers shared by both processors.
//
// Both machines execute the same small MIPS-style integer subset: register-
// register ALU operations, sign- and zero-extended immediate ALU operations,
// LW, SW, the branch-on-zero BEQZ/BNEZ, and the jumps J, JAL, JR and JALR.
// Instruction classes (ALU, ALUi, ALUiu, LW, SW, BZ, J, JAL, JR, JALR, NOP)
// and the control-table encodings (BSrc, WBSrc, RegDst, PCSrc1, PCSrc2,
// IRSrc, MAddrSrc) follow the Princeton control table; the concrete bit
// encodings are the standard MIPS-I ones (opcode in [31:26], rs [25:21],
// rt [20:16], rd [15:11], funct [5:0]) and are this design's choice.
// The all-zero word is the NOP, and any encoding not listed here decodes to
// NOP as well.
package mips_pkg;

  localparam int XLEN = 32;
  localparam int NREGS = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0] regidx_t;

  localparam word_t NOP_INSTR = '0;

  // Primary opcodes (instr[31:26]).
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQZ  = 6'h04;
  localparam logic [5:0] OP_BNEZ  = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0a;
  localparam logic [5:0] OP_SLTIU = 6'h0b;
  localparam logic [5:0] OP_ANDI  = 6'h0c;
  localparam logic [5:0] OP_ORI   = 6'h0d;
  localparam logic [5:0] OP_XORI  = 6'h0e;
  localparam logic [5:0] OP_LUI   = 6'h0f;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2b;

  // R-type function codes (instr[5:0]).
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_SRAV = 6'h07;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_JALR = 6'h09;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2a;
  localparam logic [5:0] FN_SLTU = 6'h2b;

  // Instruction classes: the rows of the control table.
  typedef enum logic [3:0] {
    IC_NOP, IC_ALU, IC_ALUI, IC_ALUIU, IC_LW, IC_SW,
    IC_BZ, IC_J, IC_JAL, IC_JR, IC_JALR
  } iclass_e;

  // ALU operations. A_EQZ is the "0?" test used by BEQZ/BNEZ.
  typedef enum logic [3:0] {
    A_ADD, A_SUB, A_AND, A_OR, A_XOR, A_NOR, A_SLT, A_SLTU,
    A_SLL, A_SRL, A_SRA, A_LUI, A_EQZ
  } alu_op_e;

  typedef enum logic {EXT_SIGN, EXT_ZERO} ext_sel_e;      // sE16 / uE16
  typedef enum logic {BSRC_REG, BSRC_IMM} bsrc_e;          // Reg / Imm
  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_PC} wbsrc_e; // ALU / Mem / PC
  typedef enum logic [1:0] {RD_RT, RD_RD, RD_R31} regdst_e; // rt / rd / R31
  typedef enum logic [1:0] {PC1_PLUS4, PC1_BR, PC1_RIND, PC1_JABS} pcsrc1_e;
  typedef enum logic {PC2_PC, PC2_NPC} pcsrc2_e;           // pc / nPC
  typedef enum logic {IR_NOP, IR_MEM} irsrc_e;             // nop / mem
  typedef enum logic {MA_PC, MA_ALU} maddr_e;              // pc / ALU

  // Field extraction.
  function automatic logic [5:0] f_op(word_t i);     return i[31:26]; endfunction
  function automatic regidx_t    f_rs(word_t i);     return i[25:21]; endfunction
  function automatic regidx_t    f_rt(word_t i);     return i[20:16]; endfunction
  function automatic regidx_t    f_rd(word_t i);     return i[15:11]; endfunction
  function automatic logic [5:0] f_fn(word_t i);     return i[5:0];   endfunction
  function automatic logic [15:0] f_imm(word_t i);   return i[15:0];  endfunction

  // Map an instruction word to its control-table row.
  function automatic iclass_e classify(word_t i);
    iclass_e c;
    c = IC_NOP;
    if (i != NOP_INSTR) begin
      unique case (f_op(i))
        OP_RTYPE: begin
          unique case (f_fn(i))
            FN_JR:   c = IC_JR;
            FN_JALR: c = IC_JALR;
            FN_ADD, FN_ADDU, FN_SUB, FN_SUBU, FN_AND, FN_OR, FN_XOR, FN_NOR,
            FN_SLT, FN_SLTU, FN_SLLV, FN_SRLV, FN_SRAV: c = IC_ALU;
            default: c = IC_NOP;
          endcase
        end
        OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU: c = IC_ALUI;
        OP_ANDI, OP_ORI, OP_XORI, OP_LUI:     c = IC_ALUIU;
        OP_LW:                                c = IC_LW;
        OP_SW:                                c = IC_SW;
        OP_BEQZ, OP_BNEZ:                     c = IC_BZ;
        OP_J:                                 c = IC_J;
        OP_JAL:                               c = IC_JAL;
        default:                              c = IC_NOP;
      endcase
    end
    return c;
  endfunction

  // ALU operation of an R-type instruction ("Func").
  function automatic alu_op_e func_alu_op(logic [5:0] fn);
    alu_op_e o;
    unique case (fn)
      FN_SUB, FN_SUBU: o = A_SUB;
      FN_AND:          o = A_AND;
      FN_OR:           o = A_OR;
      FN_XOR:          o = A_XOR;
      FN_NOR:          o = A_NOR;
      FN_SLT:          o = A_SLT;
      FN_SLTU:         o = A_SLTU;
      FN_SLLV:         o = A_SLL;
      FN_SRLV:         o = A_SRL;
      FN_SRAV:         o = A_SRA;
      default:         o = A_ADD;
    endcase
    return o;
  endfunction

  // ALU operation of an immediate instruction ("Op").
  function automatic alu_op_e imm_alu_op(logic [5:0] op);
    alu_op_e o;
    unique case (op)
      OP_SLTI:  o = A_SLT;
      OP_SLTIU: o = A_SLTU;
      OP_ANDI:  o = A_AND;
      OP_ORI:   o = A_OR;
      OP_XORI:  o = A_XOR;
      OP_LUI:   o = A_LUI;
      default:  o = A_ADD;
    endcase
    return o;
  endfunction

  // ALU operation for any instruction, as selected by the "Op Sel" column:
  // Func for ALU, Op for ALUi/ALUiu, + for LW/SW, 0? for BZ.
  function automatic alu_op_e instr_alu_op(word_t i);
    alu_op_e o;
    iclass_e c;
    c = classify(i);
    unique case (c)
      IC_ALU:             o = func_alu_op(f_fn(i));
      IC_ALUI, IC_ALUIU:  o = imm_alu_op(f_op(i));
      IC_BZ:              o = A_EQZ;
      default:            o = A_ADD;
    endcase
    return o;
  endfunction

  // Princeton control signals that depend on the instruction only.
  typedef struct packed {
    ext_sel_e ext_sel;
    bsrc_e    b_src;
    alu_op_e  alu_op;
    logic     mem_w;
    logic     reg_w;
    wbsrc_e   wb_src;
    regdst_e  reg_dst;
    maddr_e   maddr_src;
  } pdp_ctrl_t;

  // Princeton control signals that also depend on the zero flag.
  typedef struct packed {
    logic    stall;
    pcsrc1_e pc_src1;
    pcsrc2_e pc_src2;
    irsrc_e  ir_src;
  } pseq_ctrl_t;

endpackage

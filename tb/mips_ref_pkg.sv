// mips_ref_pkg: instruction encoders and an instruction-level reference model
// for the processor testbenches.
//
// The reference model (class mips_iss) executes one instruction per call of
// step() straight from the MIPS-I encodings, with its own decoder, so that
// the testbenches compare the RTL with a description written independently
// of the RTL's decode package. It can model the Princeton machine (one
// unified memory, all instructions) or the 5-stage datapath without jumps
// (separate instruction and data memories; branches and jumps do nothing).
// step() also reports whether the instruction makes the Princeton machine
// stall its fetch (LW, SW, jumps, taken branches).
package mips_ref_pkg;

  typedef logic [31:0] w32;

  // ---------------- encoders ----------------
  function automatic w32 enc_r(logic [5:0] fn, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h00, fn};
  endfunction
  function automatic w32 enc_i(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic w32 enc_j(logic [5:0] op, w32 target_byte_addr);
    return {op, target_byte_addr[27:2]};
  endfunction

  // Opcodes and function codes, written out independently of the RTL.
  localparam logic [5:0] J = 6'h02, JAL = 6'h03, BEQZ = 6'h04, BNEZ = 6'h05,
                         ADDI = 6'h08, ADDIU = 6'h09, SLTI = 6'h0a, SLTIU = 6'h0b,
                         ANDI = 6'h0c, ORI = 6'h0d, XORI = 6'h0e, LUI = 6'h0f,
                         LW = 6'h23, SW = 6'h2b;
  localparam logic [5:0] SLLV = 6'h04, SRLV = 6'h06, SRAV = 6'h07, JR = 6'h08, JALR = 6'h09,
                         ADD = 6'h20, ADDU = 6'h21, SUB = 6'h22, SUBU = 6'h23,
                         AND_ = 6'h24, OR_ = 6'h25, XOR_ = 6'h26, NOR_ = 6'h27,
                         SLT = 6'h2a, SLTU = 6'h2b;

  class mips_iss;
    bit unified;          // 1: Princeton (one memory, control transfer executes)
    w32 imem [int];
    w32 dmem [int];
    w32 r [32];
    w32 pc;

    function new(bit unified_mem);
      unified = unified_mem;
      foreach (r[i]) r[i] = '0;
      pc = '0;
    endfunction

    function w32 rd_i(w32 a);
      if (unified) return dmem.exists(a >> 2) ? dmem[a >> 2] : '0;
      return imem.exists(a >> 2) ? imem[a >> 2] : '0;
    endfunction
    function w32 rd_d(w32 a);
      return dmem.exists(a >> 2) ? dmem[a >> 2] : '0;
    endfunction

    // Execute one instruction. we/ws/wd: register write (ws != 0 only).
    // stalls: the Princeton fetch stall. known: the encoding was recognised.
    function void step(output bit we, output int ws, output w32 wd, output bit stalls);
      w32 i, a, b, imm_s, imm_z, res, npc;
      logic [5:0] op, fn;
      int rs, rt, rd;
      i = rd_i(pc);
      op = i[31:26]; fn = i[5:0];
      rs = i[25:21]; rt = i[20:16]; rd = i[15:11];
      a = r[rs]; b = r[rt];
      imm_s = {{16{i[15]}}, i[15:0]};
      imm_z = {16'h0, i[15:0]};
      we = 0; ws = 0; wd = '0; stalls = 0;
      npc = pc + 4;
      if (i != '0) begin
        case (op)
          6'h00: begin
            we = 1; ws = rd;
            case (fn)
              ADD, ADDU: res = a + b;
              SUB, SUBU: res = a - b;
              AND_: res = a & b;
              OR_:  res = a | b;
              XOR_: res = a ^ b;
              NOR_: res = ~(a | b);
              SLT:  res = ($signed(a) < $signed(b)) ? 1 : 0;
              SLTU: res = (a < b) ? 1 : 0;
              SLLV: res = b << a[4:0];
              SRLV: res = b >> a[4:0];
              SRAV: res = $signed(b) >>> a[4:0];
              JR, JALR: begin
                we = 0; ws = 0;
                if (unified) begin
                  stalls = 1;
                  npc = a;
                  if (fn == JALR) begin we = 1; ws = 31; res = pc + 4; end
                end
              end
              default: begin we = 0; ws = 0; end
            endcase
          end
          ADDI, ADDIU: begin we = 1; ws = rt; res = a + imm_s; end
          SLTI:  begin we = 1; ws = rt; res = ($signed(a) < $signed(imm_s)) ? 1 : 0; end
          SLTIU: begin we = 1; ws = rt; res = (a < imm_s) ? 1 : 0; end
          ANDI:  begin we = 1; ws = rt; res = a & imm_z; end
          ORI:   begin we = 1; ws = rt; res = a | imm_z; end
          XORI:  begin we = 1; ws = rt; res = a ^ imm_z; end
          LUI:   begin we = 1; ws = rt; res = {i[15:0], 16'h0}; end
          LW:    begin we = 1; ws = rt; res = rd_d(a + imm_s); stalls = 1; end
          SW:    begin dmem[(a + imm_s) >> 2] = b; stalls = 1; end
          BEQZ, BNEZ: if (unified && ((op == BEQZ) == (a == 0))) begin
                        stalls = 1; npc = pc + 4 + (imm_s << 2);
                      end
          J, JAL: if (unified) begin
                    stalls = 1; npc = {pc[31:28], i[25:0], 2'b00};
                    if (op == JAL) begin we = 1; ws = 31; res = pc + 4; end
                  end
          default: ;
        endcase
      end
      if (ws == 0) we = 0;
      if (we) begin r[ws] = res; wd = res; end
      pc = npc;
    endfunction
  endclass

  // ---------------- program generators ----------------
  localparam w32 DATA_BASE = 32'h0000_1000;

  function automatic int rnd_dst();   // never r1 (data base) or r9/r10
    int d = $urandom_range(0, 7);
    return (d == 1) ? 0 : d;
  endfunction
  function automatic int rnd_src();
    int s = $urandom_range(0, 8);
    return (s == 8) ? 31 : s;
  endfunction

  function automatic w32 rnd_alu_op();
    logic [5:0] f [11] = '{ADD, ADDU, SUB, SUBU, AND_, OR_, XOR_, NOR_, SLT, SLTU, SLLV};
    return enc_r(f[$urandom_range(0, 10)], rnd_dst(), rnd_src(), rnd_src());
  endfunction
  function automatic w32 rnd_imm_op();
    logic [5:0] o [8] = '{ADDI, ADDIU, SLTI, SLTIU, ANDI, ORI, XORI, LUI};
    return enc_i(o[$urandom_range(0, 7)], rnd_dst(), rnd_src(), $urandom_range(0, 65535));
  endfunction
  function automatic w32 rnd_mem_op();
    int off = 4 * $urandom_range(0, 63);
    if ($urandom_range(0, 1) != 0) return enc_i(LW, rnd_dst(), 1, off);
    return enc_i(SW, rnd_src(), 1, off);
  endfunction

  // Straight-line code for the 5-stage datapath: the two-instruction
  // dependence example first, then random ALU / immediate / load / store
  // instructions over few registers so that dependences are frequent,
  // with an occasional BEQZ (which only takes part in the interlock) and
  // an occasional store immediately followed by a load of the same word.
  function automatic void gen_mips5_prog(ref w32 prog [$], input int n);
    prog.delete();
    prog.push_back(enc_i(ADDI, 1, 0, 10));          // r1 <- r0 + 10
    prog.push_back(enc_i(ADDI, 4, 1, 17));          // r4 <- r1 + 17
    prog.push_back(enc_i(ORI, 1, 0, 32'h100));       // r1 <- data base
    for (int k = 0; k < n; k++) begin
      int c = $urandom_range(0, 20);
      if (c == 20) begin
        int off = 4 * $urandom_range(0, 63);
        prog.push_back(enc_i(SW, rnd_src(), 1, off));
        prog.push_back(enc_i(LW, rnd_dst(), 1, off));
      end
      else if (c < 7)       prog.push_back(rnd_alu_op());
      else if (c < 12) prog.push_back(rnd_imm_op());
      else if (c < 18) prog.push_back(rnd_mem_op());
      else if (c < 19) prog.push_back(enc_i(BEQZ, 0, rnd_src(), 1));
      else             prog.push_back('0);
    end
  endfunction

  // Code for the Princeton machine: random ALU, immediate, load and store
  // instructions mixed with forward BEQZ/BNEZ, J, JAL, JR and JALR, ending in
  // a jump to itself at address halt_addr.
  function automatic void gen_princeton_prog(ref w32 prog [$], input int n, output w32 halt_addr);
    prog.delete();
    prog.push_back(enc_i(ORI, 1, 0, DATA_BASE));
    for (int k = 0; k < n; k++) begin
      int c = $urandom_range(0, 29);
      w32 here = 4 * prog.size();
      if (c < 8)       prog.push_back(rnd_alu_op());
      else if (c < 14) prog.push_back(rnd_imm_op());
      else if (c < 21) prog.push_back(rnd_mem_op());
      else if (c < 25) prog.push_back(enc_i(($urandom_range(0, 1) != 0) ? BEQZ : BNEZ, 0,
                                            rnd_src(), $urandom_range(0, 2)));
      else if (c < 26) prog.push_back(enc_j(J, here + 4 + 4 * $urandom_range(0, 2)));
      else if (c < 27) prog.push_back(enc_j(JAL, here + 4 + 4 * $urandom_range(0, 2)));
      else if (c < 28) begin
        prog.push_back(enc_i(ORI, 9, 0, here + 12));
        prog.push_back(enc_r(JR, 0, 9, 0));
        prog.push_back(rnd_alu_op());                // skipped
      end else if (c < 29) begin
        prog.push_back(enc_i(ORI, 10, 0, here + 12));
        prog.push_back(enc_r(JALR, 0, 10, 0));
        prog.push_back(rnd_imm_op());                // skipped
      end else prog.push_back('0);
    end
    // landing pad for branches near the end, then halt
    repeat (3) prog.push_back(rnd_alu_op());
    halt_addr = 4 * prog.size();
    prog.push_back(enc_j(J, halt_addr));
  endfunction

  // Registers an instruction reads, per the source-register table:
  // rs for everything but J/JAL/NOP, rt for ALU and SW.
  function automatic void sources(w32 i, output int s1, output int s2);
    logic [5:0] op = i[31:26], fn = i[5:0];
    s1 = -1; s2 = -1;
    if (i == '0) return;
    if (op == 6'h00 && fn inside {ADD, ADDU, SUB, SUBU, AND_, OR_, XOR_, NOR_, SLT, SLTU,
                                  SLLV, SRLV, SRAV}) begin
      s1 = i[25:21]; s2 = i[20:16];
    end else if (op == 6'h00 && fn inside {JR, JALR}) s1 = i[25:21];
    else if (op == SW) begin s1 = i[25:21]; s2 = i[20:16]; end
    else if (op inside {ADDI, ADDIU, SLTI, SLTIU, ANDI, ORI, XORI, LUI, LW, BEQZ, BNEZ})
      s1 = i[25:21];
  endfunction

  // Register an instruction writes in the 5-stage datapath (0: none).
  function automatic int dest5(w32 i);
    logic [5:0] op = i[31:26], fn = i[5:0];
    if (i == '0) return 0;
    if (op == 6'h00 && fn inside {ADD, ADDU, SUB, SUBU, AND_, OR_, XOR_, NOR_, SLT, SLTU,
                                  SLLV, SRLV, SRAV}) return i[15:11];
    if (op inside {ADDI, ADDIU, SLTI, SLTIU, ANDI, ORI, XORI, LUI, LW}) return i[20:16];
    return 0;
  endfunction

  // Cycle in which each instruction of straight-line code enters EX in the
  // 5-stage datapath (cycle 0: the first instruction is fetched). With no
  // bypass and the register file written at the end of WB, a consumer can
  // enter EX no earlier than 4 cycles after its producer did.
  function automatic void mips5_schedule(const ref w32 prog [$], ref int ex_cycle [$]);
    int last [32];
    int prev;
    foreach (last[r]) last[r] = -100;
    ex_cycle.delete();
    prev = 1;
    foreach (prog[k]) begin
      int s1, s2, e, d;
      sources(prog[k], s1, s2);
      e = prev + 1;
      if (s1 > 0 && last[s1] + 4 > e) e = last[s1] + 4;
      if (s2 > 0 && last[s2] + 4 > e) e = last[s2] + 4;
      d = dest5(prog[k]);
      if (d != 0) last[d] = e;
      ex_cycle.push_back(e);
      prev = e;
    end
  endfunction

endpackage

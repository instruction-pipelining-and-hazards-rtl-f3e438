// princeton_core: the pipelined Princeton processor.
//
// A two-stage machine with one memory shared by instructions and data.
// Stage 1 fetches: the memory is addressed by PC and the word read goes into
// IR. Stage 2 executes the instruction in IR in one cycle: register read,
// ALU, optional memory access and register write-back. The two stages
// overlap, so most instructions take one cycle. When the instruction in IR
// needs the memory (LW, SW) execute has priority: the fetch is stalled, the
// memory address mux selects the ALU, PC is held and a nop is put into IR.
// When IR holds a jump or a taken branch the fetched word would come from the
// wrong PC, so again a nop goes into IR while PC is loaded with the target.
// Each such instruction costs one extra cycle, giving CPI = (1-f) + 2f for a
// fraction f of stalling instructions. The control points are produced by
// princeton_ctrl from the control table.
//
// Interface: a single combinational-read memory port (mem_addr, mem_rdata,
// mem_we, mem_wdata; writes complete at the clock edge). Observation outputs
// show PC, IR, the stall signal and each register-file write.
// Timing: synchronous active-high reset sets PC to RESET_PC and IR to nop.
// Design choices (not fixed by the control table): MIPS-I encodings; the
// branch target is PC + (sign-extended offset << 2), where PC already holds
// the branch's address plus 4; jabs = {PC[31:28], target, 2'b00}; JAL and
// JALR save the current PC (the link address) in R31.
module princeton_core
  import mips_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic    clk,
  input  logic    rst,
  // unified memory port
  output word_t   mem_addr,
  output logic    mem_we,
  output word_t   mem_wdata,
  input  word_t   mem_rdata,
  // observation
  output word_t   pc_o,
  output word_t   ir_o,
  output logic    stall_o,
  output logic    rf_we_o,
  output regidx_t rf_ws_o,
  output word_t   rf_wd_o
);
  word_t pc, ir;
  pdp_ctrl_t  dp;
  pseq_ctrl_t seq;

  word_t rd1, rd2, imm, b_op, alu_y;
  logic  z;
  regidx_t ws;
  word_t wd;
  word_t npc, pc_plus4, br_target, jabs_target;

  // Control
  princeton_ctrl u_ctrl (.ir(ir), .z(z), .dp(dp), .seq(seq));

  // Register file, immediate and ALU
  always_comb begin
    unique case (dp.reg_dst)
      RD_RD:   ws = f_rd(ir);
      RD_R31:  ws = 5'd31;
      default: ws = f_rt(ir);
    endcase
    unique case (dp.wb_src)
      WB_MEM:  wd = mem_rdata;
      WB_PC:   wd = pc;
      default: wd = alu_y;
    endcase
  end

  gpr_file u_gprs (
    .clk(clk), .rst(rst),
    .rs1(f_rs(ir)), .rs2(f_rt(ir)), .rd1(rd1), .rd2(rd2),
    .we(dp.reg_w), .ws(ws), .wd(wd)
  );

  imm_ext u_ext (.imm(f_imm(ir)), .sel(dp.ext_sel), .y(imm));

  assign b_op = (dp.b_src == BSRC_IMM) ? imm : rd2;

  alu u_alu (.a(rd1), .b(b_op), .op(dp.alu_op), .y(alu_y));

  assign z = alu_y[0];

  // Next PC
  assign pc_plus4    = pc + 32'd4;
  assign br_target   = pc + {imm[29:0], 2'b00};
  assign jabs_target = {pc[31:28], ir[25:0], 2'b00};

  always_comb begin
    unique case (seq.pc_src1)
      PC1_BR:   npc = br_target;
      PC1_RIND: npc = rd1;
      PC1_JABS: npc = jabs_target;
      default:  npc = pc_plus4;
    endcase
  end

  // Memory port
  assign mem_addr  = (dp.maddr_src == MA_ALU) ? alu_y : pc;
  assign mem_we    = dp.mem_w;
  assign mem_wdata = rd2;

  // PC and IR
  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= RESET_PC;
      ir <= NOP_INSTR;
    end else begin
      if (seq.pc_src2 == PC2_NPC) pc <= npc;
      ir <= (seq.ir_src == IR_MEM) ? mem_rdata : NOP_INSTR;
    end
  end

  assign pc_o    = pc;
  assign ir_o    = ir;
  assign stall_o = seq.stall;
  assign rf_we_o = dp.reg_w;
  assign rf_ws_o = ws;
  assign rf_wd_o = wd;

  // The control table pairs every stall with a nop in IR.
  a_stall_nop: assert property (@(posedge clk) disable iff (rst)
                                seq.stall == (seq.ir_src == IR_NOP));
  // A fetch is never made while the memory serves a load or store.
  a_mem_excl: assert property (@(posedge clk) disable iff (rst)
                               (dp.maddr_src == MA_ALU) |-> seq.stall);
endmodule

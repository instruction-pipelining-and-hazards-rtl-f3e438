// mips5_core: the 5-stage pipelined MIPS datapath with a stall interlock.
//
// Stages and pipeline registers (named as in the datapath drawing):
//   IF  PC addresses the instruction memory; the word goes into IR (IR_D).
//   ID  the GPRs are read with rs/rt, the immediate is extended and the B mux
//       picks rd2 or the immediate; A, B, MD1 (store data) and IR_E are
//       loaded.
//   EX  the ALU computes Y from A and B under control of IR_E; MD1 moves to
//       MD2; IR_M follows.
//   MA  the data memory is addressed by Y and written with MD2 for SW; R gets
//       the memory word for LW and Y otherwise; IR_W follows.
//   WB  R is written to the GPR selected by IR_W (rd, rt or R31).
// Each stage carries its own IR, from which that stage's control is decoded.
//
// Data hazards are resolved only by stalling (no bypass paths): stall_ctrl
// compares the source registers of the instruction in ID with the
// destinations of the instructions in EX, MA and WB. While stall is high, PC
// and IR_D hold and a nop (bubble) enters EX; the later stages keep moving.
// The register file is written at the end of WB and read in ID the next
// cycle, so a dependent instruction immediately after its producer waits
// three cycles in ID.
//
// Scope: this is the datapath "without jumps"; control transfer is not part
// of it. BEQZ/BNEZ, J, JAL, JR and JALR therefore do not execute here: they
// still take part in the interlock as decode sees them, but enter EX as nops.
// Interface: combinational-read instruction and data memory ports; data
// memory writes complete at the clock edge. Observation outputs show the
// stall signal, which stage caused it and every register-file write.
// Synchronous active-high reset: PC = RESET_PC, all IRs = nop.
module mips5_core
  import mips_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic       clk,
  input  logic       rst,
  // instruction memory
  output word_t      imem_addr,
  input  word_t      imem_rdata,
  // data memory
  output word_t      dmem_addr,
  output logic       dmem_we,
  output word_t      dmem_wdata,
  input  word_t      dmem_rdata,
  // observation
  output logic       stall_o,
  output logic [2:0] hazard_o,   // bit 0: writer in EX, 1: in MA, 2: in WB
  output logic       rf_we_o,
  output regidx_t    rf_ws_o,
  output word_t      rf_wd_o
);
  // ---------------- pipeline registers ----------------
  word_t pc;
  word_t ir_d;                 // IF/ID
  word_t ir_e, a_e, b_e, md1;  // ID/EX
  word_t ir_m, y_m, md2;       // EX/MA
  word_t ir_w, r_w;            // MA/WB

  logic stall;

  // ---------------- IF ----------------
  assign imem_addr = pc;

  // ---------------- ID ----------------
  regidx_t rs_d, rt_d, ws_e, ws_m, ws_w;
  logic    re1_d, re2_d, we_e, we_m, we_w;
  iclass_e ic_d;
  word_t   rd1, rd2, imm_d, b_d;

  reg_use_dec u_dec_d (.instr(ir_d), .rs(rs_d), .rt(rt_d), .ws(), .we(),
                       .re1(re1_d), .re2(re2_d));
  reg_use_dec u_dec_e (.instr(ir_e), .rs(), .rt(), .ws(ws_e), .we(we_e), .re1(), .re2());
  reg_use_dec u_dec_m (.instr(ir_m), .rs(), .rt(), .ws(ws_m), .we(we_m), .re1(), .re2());
  reg_use_dec u_dec_w (.instr(ir_w), .rs(), .rt(), .ws(ws_w), .we(we_w), .re1(), .re2());

  stall_ctrl u_stall (
    .rs_d(rs_d), .rt_d(rt_d), .re1_d(re1_d), .re2_d(re2_d),
    .ws_e(ws_e), .we_e(we_e), .ws_m(ws_m), .we_m(we_m), .ws_w(ws_w), .we_w(we_w),
    .stall(stall), .hit(hazard_o)
  );

  gpr_file u_gprs (
    .clk(clk), .rst(rst),
    .rs1(rs_d), .rs2(rt_d), .rd1(rd1), .rd2(rd2),
    .we(we_w), .ws(ws_w), .wd(r_w)
  );

  assign ic_d = classify(ir_d);

  imm_ext u_ext (.imm(f_imm(ir_d)),
                 .sel((ic_d == IC_ALUIU) ? EXT_ZERO : EXT_SIGN),
                 .y(imm_d));

  assign b_d = (ic_d == IC_ALU) ? rd2 : imm_d;   // B mux: Reg / Imm

  // Only ALU, ALUi, ALUiu, LW and SW proceed past decode.
  logic exec_d;
  assign exec_d = ic_d inside {IC_ALU, IC_ALUI, IC_ALUIU, IC_LW, IC_SW};

  // ---------------- EX ----------------
  word_t y_e;
  alu u_alu (.a(a_e), .b(b_e), .op(instr_alu_op(ir_e)), .y(y_e));

  // ---------------- MA ----------------
  assign dmem_addr  = y_m;
  assign dmem_we    = (classify(ir_m) == IC_SW);
  assign dmem_wdata = md2;

  word_t r_m;
  assign r_m = (classify(ir_m) == IC_LW) ? dmem_rdata : y_m;

  // ---------------- registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      pc   <= RESET_PC;
      ir_d <= NOP_INSTR;
      ir_e <= NOP_INSTR;
      ir_m <= NOP_INSTR;
      ir_w <= NOP_INSTR;
      a_e  <= '0;
      b_e  <= '0;
      md1  <= '0;
      y_m  <= '0;
      md2  <= '0;
      r_w  <= '0;
    end else begin
      // IF and ID hold while stalled
      if (!stall) begin
        pc   <= pc + 32'd4;
        ir_d <= imem_rdata;
      end
      // ID -> EX: a bubble while stalled
      ir_e <= (stall || !exec_d) ? NOP_INSTR : ir_d;
      a_e  <= rd1;
      b_e  <= b_d;
      md1  <= rd2;
      // EX -> MA
      ir_m <= ir_e;
      y_m  <= y_e;
      md2  <= md1;
      // MA -> WB
      ir_w <= ir_m;
      r_w  <= r_m;
    end
  end

  assign stall_o = stall;
  assign rf_we_o = we_w;
  assign rf_ws_o = ws_w;
  assign rf_wd_o = r_w;

  // The stages behind decode never stall, so a bubble is always a nop.
  a_bubble: assert property (@(posedge clk) disable iff (rst)
                             stall |=> (ir_e == NOP_INSTR));
endmodule

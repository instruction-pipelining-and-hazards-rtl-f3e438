// tb_pipelining_top: end-to-end test of the top level at its default sizes.
// Loads a random straight-line program into the 5-stage machine's
// instruction memory and a random program with branches and jumps into the
// Princeton machine's memory, runs both machines at once and checks, against
// the reference model and the timing models:
//  * every register write of each machine (register, value and cycle);
//  * the stall-cycle count of each machine and the Princeton halt cycle;
//  * the final data memory of both machines.
// It also counts how often each mechanism occurred and fails if one never
// did: 5-stage interlock stalls against a writer in EX, MA and WB, a stall
// through rs and through rt, an r0 destination that does not stall, a load
// of the word stored by the instruction just before it (no stall needed,
// since the store completes in one cycle); and
// Princeton fetch stalls for LW, SW, taken BEQZ/BNEZ, J, JAL, JR and JALR,
// plus an untaken branch that does not stall.
module tb_pipelining_top;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  localparam int IW = 1024, DW = 1024, PW = 2048;
  localparam int NPROG5 = 600, NPROGP = 400;

  logic clk = 0;
  logic f_rst = 1, p_rst = 1;
  word_t f_imem_addr = 0, f_imem_wdata = 0, f_imem_rdata;
  word_t f_dmem_addr = 0, f_dmem_wdata = 0, f_dmem_rdata;
  logic f_imem_we = 0, f_dmem_we = 0;
  logic f_stall, f_rf_we;
  logic [2:0] f_hazard;
  regidx_t f_rf_ws;
  word_t f_rf_wd;
  word_t p_mem_addr = 0, p_mem_wdata = 0, p_mem_rdata, p_pc, p_ir, p_rf_wd;
  logic p_mem_we = 0, p_stall, p_rf_we;
  regidx_t p_rf_ws;

  pipelining_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  typedef struct { int cyc; int ws; w32 wd; } wr_t;

  // mechanism counters
  int n_f_stall, n_hz_e, n_hz_m, n_hz_w, n_rs_stall, n_rt_stall, n_r0_nostall, n_st_ld;
  int n_p_lw, n_p_sw, n_p_br_t, n_p_br_nt, n_p_j, n_p_jal, n_p_jr, n_p_jalr, n_p_stall;

  initial begin
    w32 prog5 [$], progp [$];
    int ex [$];
    wr_t exp5 [$], expp [$];
    mips_iss iss5, issp;
    w32 memp [int], mem5 [int];
    w32 halt_addr, wd;
    int ws, steps, cyc, exp_stalls5, last5, cycp, exp_stallsp;
    bit we, st;

    // ---------------- 5-stage program and expectations ----------------
    iss5 = new(0);
    gen_mips5_prog(prog5, NPROG5);
    mips5_schedule(prog5, ex);
    for (int k = 0; k < IW; k++) iss5.imem[k] = (k < prog5.size()) ? prog5[k] : '0;
    for (int k = 0; k < DW; k++) iss5.dmem[k] = $urandom;
    mem5 = iss5.dmem;
    for (int k = 0; k < prog5.size(); k++) begin
      int s1, s2;
      sources(prog5[k], s1, s2);
      iss5.step(we, ws, wd, st);
      if (we) exp5.push_back('{ex[k] + 2, ws, wd});
      if (k > 0 && ex[k] > ex[k-1] + 1) begin
        // which source caused the wait
        if (s1 > 0) for (int j = k - 1; j >= 0 && j >= k - 3; j--)
          if (dest5(prog5[j]) == s1) begin n_rs_stall++; break; end
        if (s2 > 0) for (int j = k - 1; j >= 0 && j >= k - 3; j--)
          if (dest5(prog5[j]) == s2) begin n_rt_stall++; break; end
      end
      // a reader of r0 right after an instruction whose destination field is r0
      if (k > 0 && (s1 == 0 || s2 == 0) && ex[k] == ex[k-1] + 1 && dest5(prog5[k-1]) == 0 &&
          prog5[k-1] != '0 && prog5[k-1][31:26] != SW && prog5[k-1][31:26] != BEQZ)
        n_r0_nostall++;
      // store then load of the same word, back to back in the pipeline
      if (k > 0 && prog5[k-1][31:26] == SW && prog5[k][31:26] == LW &&
          prog5[k-1][25:21] == prog5[k][25:21] && prog5[k-1][15:0] == prog5[k][15:0] &&
          ex[k] == ex[k-1] + 1)
        n_st_ld++;
    end
    exp_stalls5 = ex[ex.size() - 1] - (ex.size() + 1);
    last5 = ex[ex.size() - 1] + 2;

    // ---------------- Princeton program and expectations ----------------
    do begin
      issp = new(1);
      gen_princeton_prog(progp, NPROGP, halt_addr);
      for (int k = 0; k < PW; k++) issp.dmem[k] = (k < progp.size()) ? progp[k] : $urandom;
      memp = issp.dmem;
      expp.delete();
      cycp = 1; exp_stallsp = 0; steps = 0;
      {n_p_lw, n_p_sw, n_p_br_t, n_p_br_nt, n_p_j, n_p_jal, n_p_jr, n_p_jalr} = '0;
      while (issp.pc != halt_addr && steps < 5000) begin
        w32 i;
        i = issp.dmem[issp.pc / 4];
        issp.step(we, ws, wd, st);
        case (i[31:26])
          LW: n_p_lw++;
          SW: n_p_sw++;
          BEQZ, BNEZ: if (st) n_p_br_t++; else n_p_br_nt++;
          J: n_p_j++;
          JAL: n_p_jal++;
          6'h00: if (i[5:0] == JR) n_p_jr++; else if (i[5:0] == JALR) n_p_jalr++;
          default: ;
        endcase
        if (we) expp.push_back('{cycp, ws, wd});
        cycp += 1 + st;
        exp_stallsp += st;
        steps++;
      end
    end while (issp.pc != halt_addr);

    // ---------------- load all memories ----------------
    for (int k = 0; k < PW; k++) begin
      p_mem_we = 1; p_mem_addr = 4 * k; p_mem_wdata = memp[k];
      f_imem_we = (k < IW); f_imem_addr = 4 * (k % IW); f_imem_wdata = iss5.imem[k % IW];
      f_dmem_we = (k < DW); f_dmem_addr = 4 * (k % DW);
      f_dmem_wdata = (k < DW) ? mem5[k] : '0;
      @(posedge clk); #1;
    end
    p_mem_we = 0; f_imem_we = 0; f_dmem_we = 0;

    // ---------------- run both ----------------
    f_rst = 0; p_rst = 0;
    cyc = 0;
    while (cyc <= last5 + 2 || cyc <= cycp) begin
      @(negedge clk);
      if (cyc <= last5 + 2) begin
        if (f_stall) n_f_stall++;
        if (f_hazard[0]) n_hz_e++;
        if (f_hazard[1]) n_hz_m++;
        if (f_hazard[2]) n_hz_w++;
        if (f_rf_we) begin
          if (exp5.size() == 0) check("5-stage unexpected write", f_rf_ws, 0);
          else begin
            wr_t e;
            e = exp5.pop_front();
            check("5-stage write cycle", cyc, e.cyc);
            check("5-stage write reg", f_rf_ws, e.ws);
            check("5-stage write data", f_rf_wd, e.wd);
          end
        end
      end
      if (cyc <= cycp) begin
        if (cyc == cycp) check("Princeton halt on time", p_ir, memp[halt_addr / 4]);
        else if (p_stall) n_p_stall++;
        if (p_rf_we && p_rf_ws != 0) begin
          if (expp.size() == 0) check("Princeton unexpected write", p_rf_ws, 0);
          else begin
            wr_t e;
            e = expp.pop_front();
            check("Princeton write cycle", cyc, e.cyc);
            check("Princeton write reg", p_rf_ws, e.ws);
            check("Princeton write data", p_rf_wd, e.wd);
          end
        end
      end
      cyc++;
    end
    check("5-stage writes left", exp5.size(), 0);
    check("Princeton writes left", expp.size(), 0);
    check("5-stage stall cycles", n_f_stall, exp_stalls5);
    check("Princeton stall cycles", n_p_stall, exp_stallsp);
    for (int k = 0; k < DW; k++) begin
      f_dmem_addr = 4 * k; #1;
      check("5-stage dmem", f_dmem_rdata, iss5.dmem[k]);
    end
    for (int k = 0; k < PW; k++) begin
      p_mem_addr = 4 * k; #1;
      check("Princeton mem", p_mem_rdata, issp.dmem[k]);
    end

    // ---------------- mechanisms ----------------
    $display("5-stage: %0d instructions, %0d stall cycles; hazard vs EX/MA/WB %0d/%0d/%0d; via rs %0d, via rt %0d; r0 dest without stall %0d; store-load same word %0d",
             prog5.size(), n_f_stall, n_hz_e, n_hz_m, n_hz_w, n_rs_stall, n_rt_stall, n_r0_nostall, n_st_ld);
    $display("Princeton: %0d instructions, %0d stall cycles; LW %0d SW %0d BZ taken %0d untaken %0d J %0d JAL %0d JR %0d JALR %0d",
             steps, n_p_stall, n_p_lw, n_p_sw, n_p_br_t, n_p_br_nt, n_p_j, n_p_jal, n_p_jr, n_p_jalr);
    check("seen: 5-stage stall", n_f_stall > 0, 1);
    check("seen: hazard vs EX", n_hz_e > 0, 1);
    check("seen: hazard vs MA", n_hz_m > 0, 1);
    check("seen: hazard vs WB", n_hz_w > 0, 1);
    check("seen: stall via rs", n_rs_stall > 0, 1);
    check("seen: stall via rt", n_rt_stall > 0, 1);
    check("seen: r0 destination, no stall", n_r0_nostall > 0, 1);
    check("seen: store then load of the same word", n_st_ld > 0, 1);
    check("seen: Princeton LW stall", n_p_lw > 0, 1);
    check("seen: Princeton SW stall", n_p_sw > 0, 1);
    check("seen: Princeton taken branch", n_p_br_t > 0, 1);
    check("seen: Princeton untaken branch", n_p_br_nt > 0, 1);
    check("seen: Princeton J", n_p_j > 0, 1);
    check("seen: Princeton JAL", n_p_jal > 0, 1);
    check("seen: Princeton JR", n_p_jr > 0, 1);
    check("seen: Princeton JALR", n_p_jalr > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

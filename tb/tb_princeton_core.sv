// tb_princeton_core: runs random programs with loads, stores, taken and
// untaken branches and all four jumps through the pipelined Princeton
// machine, checking against the reference model:
//  * every register write (register, value) in program order;
//  * the cycle of every write and of reaching the final jump-to-self:
//    each instruction takes one cycle, plus one for each LW, SW, jump and
//    taken branch (CPI = (1-f) + 2f);
//  * the number of stall cycles and the final memory contents.
module tb_princeton_core;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  localparam int WORDS = 2048;
  localparam int NPROG = 300;
  localparam int ROUNDS = 3;

  logic clk = 0, rst = 1;
  word_t mem_addr, mem_wdata, mem_rdata, pc_o, ir_o, rf_wd_o;
  logic mem_we, stall_o, rf_we_o;
  regidx_t rf_ws_o;
  word_t h_addr, h_wdata, h_rdata;
  logic h_we;

  princeton_core dut (.*);

  word_mem #(.WORDS(WORDS)) u_mem (.clk(clk), .addr(mem_addr), .we(mem_we), .wdata(mem_wdata),
    .rdata(mem_rdata), .h_addr(h_addr), .h_we(h_we), .h_wdata(h_wdata), .h_rdata(h_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    w32 prog [$];
    wr_t exp_wr [$];
    mips_iss iss;
    w32 mem_init [int];
    int cyc, exp_cyc, n_stall, exp_stalls, steps, ws, n_instr;
    w32 halt_addr, wd;
    bit we, st;

    for (int round = 0; round < ROUNDS; round++) begin
      // Generate programs until one halts in the reference model: a branch
      // may skip the set-up of a JR target and send control backwards.
      do begin
        iss = new(1);
        gen_princeton_prog(prog, NPROG, halt_addr);
        for (int k = 0; k < WORDS; k++)
          iss.dmem[k] = (k < prog.size()) ? prog[k] : $urandom;
        mem_init = iss.dmem;
        // reference run: instruction k executes in cycle 1 + sum over j<k of (1 + stall_j)
        exp_wr.delete();
        exp_cyc = 1; exp_stalls = 0; steps = 0;
        while (iss.pc != halt_addr && steps < 5000) begin
          iss.step(we, ws, wd, st);
          if (we) exp_wr.push_back('{exp_cyc, ws, wd});
          exp_cyc += 1 + st;
          exp_stalls += st;
          steps++;
        end
      end while (iss.pc != halt_addr);
      rst = 1; h_we = 0;
      for (int k = 0; k < WORDS; k++) begin
        h_we = 1; h_addr = 4 * k; h_wdata = mem_init[k];
        @(posedge clk); #1;
      end
      h_we = 0;
      n_instr = steps;
      check("reference reached halt", iss.pc, halt_addr);
      rst = 0;
      cyc = 0; n_stall = 0;
      while (cyc <= exp_cyc) begin
        @(negedge clk);
        if (cyc == exp_cyc) check("halt reached on time", ir_o, prog[halt_addr / 4]);
        else if (stall_o) n_stall++;
        if (rf_we_o && rf_ws_o != 0) begin
          if (exp_wr.size() == 0) check("unexpected write", rf_ws_o, 0);
          else begin
            wr_t e;
            e = exp_wr.pop_front();
            check("write cycle", cyc, e.cyc);
            check("write reg", rf_ws_o, e.ws);
            check("write data", rf_wd_o, e.wd);
          end
        end
        cyc++;
      end
      check("writes left", exp_wr.size(), 0);
      check("stall cycles", n_stall, exp_stalls);
      for (int k = 0; k < WORDS; k++) begin
        h_addr = 4 * k; #1;
        check("mem", h_rdata, iss.dmem[k]);
      end
      $display("round %0d: %0d instructions, %0d stalls, %0d cycles", round, n_instr, exp_stalls, exp_cyc - 1);
      rst = 1;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

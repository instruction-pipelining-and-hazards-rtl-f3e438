// tb_mips5_core: runs random straight-line programs through the 5-stage
// pipeline and checks, against the reference model and an independent
// timing model:
//  * every register write (register, value) in program order;
//  * the cycle of every write: an instruction reaches WB two cycles after it
//    enters EX, and it enters EX one cycle after its predecessor or four
//    cycles after the producer of one of its sources, whichever is later
//    (so the r1 -> r4 example at the start loses exactly three cycles);
//  * the number of stall cycles, and that stalls against writers in EX, MA
//    and WB all occurred;
//  * the data memory contents at the end.
module tb_mips5_core;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  localparam int WORDS = 1024;
  localparam int NPROG = 400;
  localparam int ROUNDS = 3;

  logic clk = 0, rst = 1;
  word_t imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic dmem_we, stall_o, rf_we_o;
  logic [2:0] hazard_o;
  regidx_t rf_ws_o;
  word_t rf_wd_o;
  word_t ih_addr, ih_wdata, ih_rdata, dh_addr, dh_wdata, dh_rdata;
  logic ih_we, dh_we;

  mips5_core dut (.*);

  word_mem #(.WORDS(WORDS)) u_imem (.clk(clk), .addr(imem_addr), .we(1'b0), .wdata('0),
    .rdata(imem_rdata), .h_addr(ih_addr), .h_we(ih_we), .h_wdata(ih_wdata), .h_rdata(ih_rdata));
  word_mem #(.WORDS(WORDS)) u_dmem (.clk(clk), .addr(dmem_addr), .we(dmem_we), .wdata(dmem_wdata),
    .rdata(dmem_rdata), .h_addr(dh_addr), .h_we(dh_we), .h_wdata(dh_wdata), .h_rdata(dh_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hz [3] = '{0, 0, 0};
  int n_stall = 0;

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
    int ex [$];
    wr_t exp_wr [$];
    mips_iss iss;
    int cyc, exp_stalls, last_cyc, ws;
    bit we, st;
    w32 wd;

    for (int round = 0; round < ROUNDS; round++) begin
      iss = new(0);
      gen_mips5_prog(prog, NPROG);
      mips5_schedule(prog, ex);
      // load memories while in reset
      rst = 1; ih_we = 0; dh_we = 0;
      for (int k = 0; k < WORDS; k++) begin
        ih_we = 1; ih_addr = 4 * k; ih_wdata = (k < prog.size()) ? prog[k] : '0;
        iss.imem[k] = ih_wdata;
        dh_we = 1; dh_addr = 4 * k; dh_wdata = $urandom;
        iss.dmem[k] = dh_wdata;
        @(posedge clk); #1;
      end
      ih_we = 0; dh_we = 0;
      // expected writes
      exp_wr.delete();
      foreach (prog[k]) begin
        iss.step(we, ws, wd, st);
        if (we) exp_wr.push_back('{ex[k] + 2, ws, wd});
      end
      exp_stalls = ex[ex.size() - 1] - (ex.size() + 1);
      last_cyc = ex[ex.size() - 1] + 2;
      // first two instructions: the dependent one enters EX 3 cycles late
      check("r1->r4 bubbles", ex[1] - ex[0] - 1, 3);
      rst = 0;
      cyc = 0;
      n_stall = 0;
      while (cyc <= last_cyc + 2) begin
        @(negedge clk);
        if (stall_o) n_stall++;
        foreach (hazard_o[b]) if (hazard_o[b]) n_hz[b]++;
        if (rf_we_o) begin
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
        dh_addr = 4 * k; #1;
        check("dmem", dh_rdata, iss.dmem[k]);
      end
      rst = 1;
      @(posedge clk); #1;
    end
    foreach (n_hz[b]) check($sformatf("hazard against stage %0d seen", b), n_hz[b] > 0, 1);
    $display("stall cycles (last round) %0d, hazard cycles E/M/W %0d/%0d/%0d",
             n_stall, n_hz[0], n_hz[1], n_hz[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gpr_file: random writes and reads of the register file against a
// shadow array; checks r0, write timing (visible the cycle after) and reset.
module tb_gpr_file;
  import mips_pkg::*;
  logic clk = 0, rst;
  regidx_t rs1, rs2, ws;
  word_t rd1, rd2, wd;
  logic we;
  word_t shadow [32];
  int checks = 0, failures = 0;

  gpr_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    rst = 1; we = 0; ws = 0; wd = 0; rs1 = 0; rs2 = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      rs1 = 5'(i); rs2 = 5'(31 - i); #1;
      check("reset rd1", rd1, 0);
      check("reset rd2", rd2, 0);
    end
    repeat (2000) begin
      we = $urandom_range(0, 1);
      ws = 5'($urandom);
      wd = $urandom;
      rs1 = 5'($urandom); rs2 = ($urandom_range(0, 3) == 0) ? ws : 5'($urandom);
      #1;
      // the write of this cycle is not yet visible
      check("rd1", rd1, shadow[rs1]);
      check("rd2", rd2, shadow[rs2]);
      @(posedge clk); #1;
      if (we && ws != 0) shadow[ws] = wd;
      rs1 = ws; #1;
      check("rd1 after write", rd1, shadow[rs1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_word_mem: both ports of the memory against a shadow array, including
// same-cycle read-after-write ordering and host-write priority.
module tb_word_mem;
  import mips_pkg::*;
  localparam int WORDS = 64;
  logic clk = 0;
  word_t addr, wdata, rdata, h_addr, h_wdata, h_rdata;
  logic we, h_we;
  word_t shadow [WORDS];
  int checks = 0, failures = 0;

  word_mem #(.WORDS(WORDS)) dut (.*);

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
    we = 0; h_we = 0; addr = 0; wdata = 0; h_addr = 0; h_wdata = 0;
    // fill through the host port
    for (int i = 0; i < WORDS; i++) begin
      h_we = 1; h_addr = i * 4; h_wdata = $urandom; shadow[i] = h_wdata;
      @(posedge clk); #1;
    end
    h_we = 0;
    repeat (1500) begin
      addr = 4 * $urandom_range(0, WORDS - 1);
      h_addr = 4 * $urandom_range(0, WORDS - 1);
      we = $urandom_range(0, 1); wdata = $urandom;
      h_we = ($urandom_range(0, 7) == 0); h_wdata = $urandom;
      if ($urandom_range(0, 3) == 0) h_addr = addr;
      #1;
      check("rdata", rdata, shadow[addr[7:2]]);
      check("h_rdata", h_rdata, shadow[h_addr[7:2]]);
      @(posedge clk); #1;
      if (h_we) shadow[h_addr[7:2]] = h_wdata;
      else if (we) shadow[addr[7:2]] = wdata;
      we = 0; h_we = 0; #1;
      // written value is readable in the very next cycle
      check("rdata next", rdata, shadow[addr[7:2]]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

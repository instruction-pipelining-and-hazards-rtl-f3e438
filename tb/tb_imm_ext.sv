// tb_imm_ext: sign and zero extension of every 16-bit immediate.
module tb_imm_ext;
  import mips_pkg::*;
  logic [15:0] imm;
  ext_sel_e sel;
  word_t y;
  int checks = 0, failures = 0;

  imm_ext dut (.imm(imm), .sel(sel), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v += 7) begin
      imm = 16'(v);
      sel = EXT_SIGN; #1;
      checks++;
      if (int'($signed(y)) != int'($signed(imm))) begin
        failures++; $display("FAIL sE16 %h -> %h", imm, y);
      end
      sel = EXT_ZERO; #1;
      checks++;
      if (y != 32'(v)) begin
        failures++; $display("FAIL uE16 %h -> %h", imm, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_alu: random and corner-case vectors for the ALU, checked against
// expressions written in the testbench.
module tb_alu;
  import mips_pkg::*;
  word_t a, b, y, exp;
  alu_op_e op;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .op(op), .y(y));

  function automatic word_t model(word_t x, word_t z, alu_op_e o);
    case (o)
      A_ADD:  return x + z;
      A_SUB:  return x + ~z + 1;
      A_AND:  return x & z;
      A_OR:   return x | z;
      A_XOR:  return x ^ z;
      A_NOR:  return ~x & ~z;
      A_SLT:  return (x[31] != z[31]) ? {31'b0, x[31]} : {31'b0, x < z};
      A_SLTU: return {31'b0, x < z};
      A_SLL:  begin word_t t = z; repeat (x[4:0]) t = {t[30:0], 1'b0}; return t; end
      A_SRL:  begin word_t t = z; repeat (x[4:0]) t = {1'b0, t[31:1]}; return t; end
      A_SRA:  begin word_t t = z; repeat (x[4:0]) t = {t[31], t[31:1]}; return t; end
      A_LUI:  return {z[15:0], 16'h0};
      A_EQZ:  return {31'b0, x == 0};
      default: return 'x;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corners [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h0000_ffff};
    for (int o = 0; o <= int'(A_EQZ); o++) begin
      op = alu_op_e'(o);
      foreach (corners[i]) foreach (corners[j]) begin
        a = corners[i]; b = corners[j]; #1;
        exp = model(a, b, op);
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp);
        end
      end
      repeat (300) begin
        a = $urandom; b = $urandom;
        if ($urandom_range(0, 3) == 0) a = 0;
        #1;
        exp = model(a, b, op);
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

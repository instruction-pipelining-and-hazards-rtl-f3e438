// tb_stall_ctrl: random and directed inputs against the sum-of-products
// stall equation.
module tb_stall_ctrl;
  import mips_pkg::*;
  regidx_t rs_d, rt_d, ws_e, ws_m, ws_w;
  logic re1_d, re2_d, we_e, we_m, we_w, stall;
  logic [2:0] hit;
  int checks = 0, failures = 0;
  int n_stall = 0;

  stall_ctrl dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    repeat (20000) begin
      // small register range so that matches are frequent
      rs_d = 5'($urandom_range(0, 5)); rt_d = 5'($urandom_range(0, 5));
      ws_e = 5'($urandom_range(0, 5)); ws_m = 5'($urandom_range(0, 5));
      ws_w = 5'($urandom_range(0, 5));
      {re1_d, re2_d, we_e, we_m, we_w} = 5'($urandom);
      #1;
      e = (((rs_d == ws_e) & we_e) | ((rs_d == ws_m) & we_m) | ((rs_d == ws_w) & we_w)) & re1_d
        | (((rt_d == ws_e) & we_e) | ((rt_d == ws_m) & we_m) | ((rt_d == ws_w) & we_w)) & re2_d;
      checks++;
      n_stall += e;
      if (stall !== e) begin
        failures++;
        $display("FAIL rs=%0d rt=%0d re=%b%b E=%0d/%b M=%0d/%b W=%0d/%b stall=%b exp=%b",
                 rs_d, rt_d, re1_d, re2_d, ws_e, we_e, ws_m, we_m, ws_w, we_w, stall, e);
      end
      checks++;
      if (hit[0] !== (we_e & ((re1_d & (rs_d == ws_e)) | (re2_d & (rt_d == ws_e))))) begin
        failures++; $display("FAIL hit[0]");
      end
    end
    // at least a fair share of both outcomes was exercised
    checks++;
    if (n_stall < 1000 || n_stall > 19000) begin failures++; $display("FAIL coverage %0d", n_stall); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

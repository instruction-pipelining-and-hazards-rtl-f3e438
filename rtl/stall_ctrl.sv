// stall_ctrl: the interlock (C_stall) of the 5-stage pipeline.
//
// Raises stall when a source register of the instruction in decode is the
// destination of an uncommitted instruction in execute, memory or
// write-back:
//   stall = ((rs_D==ws_E)&we_E | (rs_D==ws_M)&we_M | (rs_D==ws_W)&we_W) & re1_D
//         | ((rt_D==ws_E)&we_E | (rt_D==ws_M)&we_M | (rt_D==ws_W)&we_W) & re2_D
// hit[2:0] additionally reports which stage (bit 0 execute, bit 1 memory,
// bit 2 write-back) holds a conflicting writer; it is for observation only.
// Combinational.
module stall_ctrl
  import mips_pkg::*;
(
  input  regidx_t  rs_d,
  input  regidx_t  rt_d,
  input  logic     re1_d,
  input  logic     re2_d,
  input  regidx_t  ws_e,
  input  logic     we_e,
  input  regidx_t  ws_m,
  input  logic     we_m,
  input  regidx_t  ws_w,
  input  logic     we_w,
  output logic     stall,
  output logic [2:0] hit
);
  always_comb begin
    hit[0] = we_e && ((re1_d && rs_d == ws_e) || (re2_d && rt_d == ws_e));
    hit[1] = we_m && ((re1_d && rs_d == ws_m) || (re2_d && rt_d == ws_m));
    hit[2] = we_w && ((re1_d && rs_d == ws_w) || (re2_d && rt_d == ws_w));
    stall  = |hit;
  end
endmodule

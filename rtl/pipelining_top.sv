// pipelining_top: the two pipelined processors side by side.
//
// Holds, independently of each other:
//  * the 5-stage pipelined MIPS datapath (mips5_core) with its separate
//    instruction memory and data memory (Harvard organisation), and
//  * the pipelined Princeton machine (princeton_core) with its single shared
//    memory.
// They share only the clock. Each has its own synchronous active-high reset
// and exposes host ports on its memories for loading programs and reading
// results (f_imem_*, f_dmem_* for the 5-stage machine, p_mem_* for the
// Princeton machine), plus observation outputs: stall, the stage that
// caused a 5-stage stall, and each register-file write. Memory sizes are
// parameters; their defaults are this design's choice.
module pipelining_top
  import mips_pkg::*;
#(
  parameter int IMEM_WORDS = 1024,
  parameter int DMEM_WORDS = 1024,
  parameter int PMEM_WORDS = 2048
) (
  input  logic       clk,

  // ---------------- 5-stage pipeline ----------------
  input  logic       f_rst,
  input  word_t      f_imem_addr,
  input  logic       f_imem_we,
  input  word_t      f_imem_wdata,
  output word_t      f_imem_rdata,
  input  word_t      f_dmem_addr,
  input  logic       f_dmem_we,
  input  word_t      f_dmem_wdata,
  output word_t      f_dmem_rdata,
  output logic       f_stall,
  output logic [2:0] f_hazard,
  output logic       f_rf_we,
  output regidx_t    f_rf_ws,
  output word_t      f_rf_wd,

  // ---------------- Princeton pipeline ----------------
  input  logic       p_rst,
  input  word_t      p_mem_addr,
  input  logic       p_mem_we,
  input  word_t      p_mem_wdata,
  output word_t      p_mem_rdata,
  output word_t      p_pc,
  output word_t      p_ir,
  output logic       p_stall,
  output logic       p_rf_we,
  output regidx_t    p_rf_ws,
  output word_t      p_rf_wd
);
  // 5-stage machine
  word_t f_iaddr, f_idata, f_daddr, f_dwdata, f_drdata;
  logic  f_dwe;

  mips5_core u_mips5 (
    .clk(clk), .rst(f_rst),
    .imem_addr(f_iaddr), .imem_rdata(f_idata),
    .dmem_addr(f_daddr), .dmem_we(f_dwe), .dmem_wdata(f_dwdata), .dmem_rdata(f_drdata),
    .stall_o(f_stall), .hazard_o(f_hazard),
    .rf_we_o(f_rf_we), .rf_ws_o(f_rf_ws), .rf_wd_o(f_rf_wd)
  );

  word_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk),
    .addr(f_iaddr), .we(1'b0), .wdata('0), .rdata(f_idata),
    .h_addr(f_imem_addr), .h_we(f_imem_we), .h_wdata(f_imem_wdata), .h_rdata(f_imem_rdata)
  );

  word_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk),
    .addr(f_daddr), .we(f_dwe), .wdata(f_dwdata), .rdata(f_drdata),
    .h_addr(f_dmem_addr), .h_we(f_dmem_we), .h_wdata(f_dmem_wdata), .h_rdata(f_dmem_rdata)
  );

  // Princeton machine
  word_t p_addr, p_wdata, p_rdata;
  logic  p_we;

  princeton_core u_princeton (
    .clk(clk), .rst(p_rst),
    .mem_addr(p_addr), .mem_we(p_we), .mem_wdata(p_wdata), .mem_rdata(p_rdata),
    .pc_o(p_pc), .ir_o(p_ir), .stall_o(p_stall),
    .rf_we_o(p_rf_we), .rf_ws_o(p_rf_ws), .rf_wd_o(p_rf_wd)
  );

  word_mem #(.WORDS(PMEM_WORDS)) u_pmem (
    .clk(clk),
    .addr(p_addr), .we(p_we), .wdata(p_wdata), .rdata(p_rdata),
    .h_addr(p_mem_addr), .h_we(p_mem_we), .h_wdata(p_mem_wdata), .h_rdata(p_mem_rdata)
  );
endmodule

// word_mem: word-organised memory with a combinational read and a one-cycle
// write.
//
// Serves as the instruction memory and the data memory of the 5-stage
// pipeline and as the single shared memory of the Princeton machine. Port A
// belongs to the processor: addr is a byte address whose bits
// [AW+1:2] select a 32-bit word, rdata follows addr in the same cycle, and a
// write (we) takes effect at the rising clock edge, so a load in the next
// cycle already sees it ("writes complete in one cycle"). Port H is a host
// port for loading programs and reading results; it has the same timing and
// its write wins when both ports write the same cycle. Addresses beyond WORDS
// wrap. The memory contents are not reset. The size is this design's choice.
module word_mem
  import mips_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic  clk,
  // processor port
  input  word_t addr,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata,
  // host port
  input  word_t h_addr,
  input  logic  h_we,
  input  word_t h_wdata,
  output word_t h_rdata
);
  localparam int AW = $clog2(WORDS);

  word_t mem [WORDS];

  logic [AW-1:0] a_idx, h_idx;
  assign a_idx = addr[AW+1:2];
  assign h_idx = h_addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (h_we)    mem[h_idx] <= h_wdata;
    else if (we) mem[a_idx] <= wdata;
  end

  assign rdata   = mem[a_idx];
  assign h_rdata = mem[h_idx];
endmodule

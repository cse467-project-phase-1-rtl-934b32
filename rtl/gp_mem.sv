// gp_mem: the general purpose data memory of the GPU.
//
// 32-bit words, addressed by word.  Port A serves the processor's LDGPMEM and
// STGPMEM; port B lets the host preload tables and read results back.  Both
// ports are synchronous: read data appears one clock after en with we low.
// A read returns the word as it was before a write of the same cycle.  If both
// ports write the same word in one cycle, port A (the processor) wins.
// Addresses wrap modulo the memory size: only the low log2(WORDS) bits of an
// address are used.  Size, port count and addressing are this design's
// choices; the description only names the memory and its load/store
// instructions.
module gp_mem
  import gpu_pkg::*;
#(
  parameter int unsigned WORDS = 4096,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  // port A: processor
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  word_t         a_wdata,
  output word_t         a_rdata,
  // port B: host
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  word_t         b_wdata,
  output word_t         b_rdata
);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
    if (b_en && b_we && !(a_en && a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
  end

endmodule

// code_mem: the four instruction memories of the GPU, one program per work
// queue, kept in a single memory array as the description recommends.
//
// Program p occupies words p*PROG_DEPTH .. p*PROG_DEPTH+PROG_DEPTH-1.  The
// processor reads through a synchronous port: the instruction at
// (rd_prog, rd_pc) appears on rd_data one clock after rd_en.  The host loads
// programs through a separate write port (wr_en, wr_prog, wr_pc, wr_data),
// also clocked.  A read and a write of the same word in one cycle returns the
// old word.  The size of each program memory is not published: 256 words per
// program is this design's choice.
module code_mem
  import gpu_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 256,
  localparam int unsigned PC_W = $clog2(PROG_DEPTH)
) (
  input  logic            clk,
  // processor fetch port
  input  logic            rd_en,
  input  logic [1:0]      rd_prog,
  input  logic [PC_W-1:0] rd_pc,
  output word_t           rd_data,
  // host load port
  input  logic            wr_en,
  input  logic [1:0]      wr_prog,
  input  logic [PC_W-1:0] wr_pc,
  input  word_t           wr_data
);

  word_t mem [NUM_QUEUES*PROG_DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[{rd_prog, rd_pc}];
    if (wr_en) mem[{wr_prog, wr_pc}] <= wr_data;
  end

endmodule

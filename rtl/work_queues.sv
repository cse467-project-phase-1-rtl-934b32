// work_queues: the four 256-bit work queues of the GPU in one memory.
//
// Queue q is a circular buffer in words q*DEPTH .. q*DEPTH+DEPTH-1 with its
// own head pointer, tail pointer and item count.  One write (push) and one
// pop are accepted per clock, to any queues, including both on the same
// queue.  A push to a full queue is dropped and reported by a one-cycle
// overflow pulse: the scheduler is meant to make this impossible, and the
// pulse makes a violation visible.  A pop of an empty queue is ignored.
// Popped data is read synchronously and appears on rd_data, with rd_valid,
// one clock after rd_en.  count[q] is the number of items held, 0..DEPTH.
//
// Item width, the four queues and the shared memory follow the description;
// the suggested minimum of 128 entries is the default DEPTH.  Whole items
// move in one cycle (the description allows several); drop-on-full is this
// design's choice.
module work_queues
  import gpu_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned PW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // push
  input  logic          wr_en,
  input  logic [1:0]    wr_q,
  input  item_t         wr_data,
  output logic          overflow,
  // pop
  input  logic          rd_en,
  input  logic [1:0]    rd_q,
  output item_t         rd_data,
  output logic          rd_valid,
  // occupancy
  output logic [CW-1:0] count [NUM_QUEUES]
);

  item_t         mem [NUM_QUEUES*DEPTH];
  logic [PW-1:0] head [NUM_QUEUES];
  logic [PW-1:0] tail [NUM_QUEUES];

  logic do_push, do_pop;
  assign do_push  = wr_en && (count[wr_q] != CW'(DEPTH));
  assign do_pop   = rd_en && (count[rd_q] != '0);
  assign overflow = wr_en && !do_push;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[{wr_q, tail[wr_q]}] <= wr_data;
    if (do_pop)  rd_data <= mem[{rd_q, head[rd_q]}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NUM_QUEUES; q++) begin
        head[q]  <= '0;
        tail[q]  <= '0;
        count[q] <= '0;
      end
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= do_pop;
      if (do_push) tail[wr_q] <= incr(tail[wr_q]);
      if (do_pop)  head[rd_q] <= incr(head[rd_q]);
      for (int q = 0; q < NUM_QUEUES; q++) begin
        if (do_push && wr_q == 2'(q) && !(do_pop && rd_q == 2'(q)))
          count[q] <= count[q] + 1'b1;
        else if (do_pop && rd_q == 2'(q) && !(do_push && wr_q == 2'(q)))
          count[q] <= count[q] - 1'b1;
      end
    end
  end

endmodule

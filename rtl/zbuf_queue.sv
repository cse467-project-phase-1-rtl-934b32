// zbuf_queue: the z-buffer work queue, between the programmable processor and
// the fixed-function z-buffer logic.
//
// A first-in first-out buffer of DEPTH 256-bit items.  The processor pushes
// with push/push_data (STOREQ to queue number 4); a push to a full queue is
// dropped and flagged by a one-cycle overflow pulse.  The z-buffer side takes
// items with a valid/ready handshake: out_data is the oldest item while
// out_valid is high, and it is removed at a clock edge where out_ready is
// high.  count feeds the scheduler, whose first rule keeps the processor idle
// while this queue is nearly full.  The description names the queue and its
// role; its depth (equal to the work queues) and the handshake are this
// design's choices.
module zbuf_queue
  import gpu_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned PW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  item_t         push_data,
  output logic          overflow,
  output item_t         out_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [CW-1:0] count
);

  item_t         mem [DEPTH];
  logic [PW-1:0] head, tail;
  logic          do_push, do_pop;

  assign out_valid = (count != '0);
  assign out_data  = mem[head];
  assign do_pop    = out_valid && out_ready;
  assign do_push   = push && (count != CW'(DEPTH));
  assign overflow  = push && !do_push;

  always_ff @(posedge clk)
    if (do_push) mem[tail] <= push_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_push) tail <= (tail == PW'(DEPTH - 1)) ? '0 : tail + 1'b1;
      if (do_pop)  head <= (head == PW'(DEPTH - 1)) ? '0 : head + 1'b1;
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

endmodule

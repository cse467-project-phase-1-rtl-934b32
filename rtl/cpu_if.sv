// cpu_if: the host CPU's entry point for new work, which goes into queue 0.
//
// The host offers 256-bit work items with a valid/ready handshake.  An
// accepted item is held in a one-item buffer until it can be written into
// queue 0: the interface requests the queue write port (wq_req) while it
// holds an item and queue 0 is not full, and it lets go of the item in a
// cycle where wq_grant is high.  The processor's own queue writes take
// priority over the host, so the host waits rather than overflowing a queue.
// host_ready is high while the buffer is empty, so at most one item per two
// clocks enters; that is ample next to the processor's run time per item.
// The description states only that the CPU interface places work on queue 0;
// the handshake and buffering are this design's choices.
module cpu_if
  import gpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // host side
  input  logic  host_valid,
  input  item_t host_item,
  output logic  host_ready,
  // work queue side
  input  logic  q0_full,
  output logic  wq_req,
  output item_t wq_item,
  input  logic  wq_grant
);

  logic held;

  assign host_ready = !held;
  assign wq_req     = held && !q0_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= 1'b0;
    end else if (held) begin
      if (wq_req && wq_grant) held <= 1'b0;
    end else if (host_valid) begin
      held <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (!held && host_valid) wq_item <= host_item;

  // Host protocol: an offered item stays offered, unchanged, until taken.
  a_host_stable: assert property (@(posedge clk) disable iff (!rst_n)
    host_valid && !host_ready |=> host_valid && $stable(host_item));

endmodule

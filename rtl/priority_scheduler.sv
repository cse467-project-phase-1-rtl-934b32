// priority_scheduler: picks the work queue the processor executes from next.
//
// Combinational; it implements the published priority rules, whose aim is to
// keep the z-buffer queue supplied without letting any queue fill up:
//   1. If the z-buffer queue holds ZQ_DEPTH - RESERVE items or more, idle.
//   2. Else take queue 3 if the z-buffer queue is under half full and queue 3
//      is not empty;
//   3. else queue 2 if queue 3 is under half full and queue 2 is not empty;
//   4. else queue 1 if queue 2 is under half full and queue 1 is not empty;
//   5. else queue 0 if queue 1 is under half full and queue 0 is not empty;
//   6. else idle.
// A queue is drained only while the queue its program feeds has room, and the
// later pipeline stages go first.  The published rule 5 compares queue 1 with
// half the size of queue 0; all work queues have the same DEPTH here, so the
// two readings agree.  The value of RESERVE (the N of rule 1) is not
// published: 8 is this design's choice.
//
// pick_valid/pick_q are meaningful when enable (processor idle) is high;
// zq_hold reports that rule 1 is holding the processor back.
module priority_scheduler
  import gpu_pkg::*;
#(
  parameter int unsigned DEPTH    = 128,
  parameter int unsigned ZQ_DEPTH = 128,
  parameter int unsigned RESERVE  = 8,
  localparam int unsigned CW  = $clog2(DEPTH + 1),
  localparam int unsigned ZCW = $clog2(ZQ_DEPTH + 1)
) (
  input  logic           enable,
  input  logic [CW-1:0]  qcount [NUM_QUEUES],
  input  logic [ZCW-1:0] zcount,
  output logic           pick_valid,
  output logic [1:0]     pick_q,
  output logic           zq_hold
);

  localparam int unsigned HALF   = DEPTH / 2;
  localparam int unsigned ZHALF  = ZQ_DEPTH / 2;

  always_comb begin
    pick_valid = 1'b0;
    pick_q     = 2'd0;
    zq_hold    = 32'(zcount) + RESERVE >= ZQ_DEPTH;
    if (!zq_hold) begin
      if (32'(zcount) < ZHALF && qcount[3] != '0) begin
        pick_valid = 1'b1; pick_q = 2'd3;
      end else if (32'(qcount[3]) < HALF && qcount[2] != '0) begin
        pick_valid = 1'b1; pick_q = 2'd2;
      end else if (32'(qcount[2]) < HALF && qcount[1] != '0) begin
        pick_valid = 1'b1; pick_q = 2'd1;
      end else if (32'(qcount[1]) < HALF && qcount[0] != '0) begin
        pick_valid = 1'b1; pick_q = 2'd0;
      end
    end
    if (!enable) pick_valid = 1'b0;
  end

endmodule

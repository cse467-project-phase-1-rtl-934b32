// gpu_regfile: architectural state of the GPU processor.
//
// Holds the fifteen 32-bit general registers r0..r14, the predicates p1..p3
// (p0 reads as true and cannot be written) and the instruction counter of the
// machine status register.  Register 15 reads as the machine status register
//   {instruction_count[15:0], processor_number[7:0], 2'b00,
//    queue_source[1:0], predicates[3:0]}
// with predicates[0] = p0 = 1.  These follow the published register model.
//
// init (one cycle) starts a work item: r0..r7 take the 256-bit item (r0 from
// bits [31:0]), r8..r14 and the counter are cleared, every predicate is set
// true and queue_source is recorded.  init takes priority over a write in the
// same cycle.  Writes to r15 are ignored (this design's choice).  Two
// combinational read ports serve the operands; item_out presents r0..r7 as a
// work item for STOREQ.  count_inc advances the instruction counter.
// All writes take effect at the rising clock edge; reset clears everything.
module gpu_regfile
  import gpu_pkg::*;
#(
  parameter logic [7:0] PROC_NUM = 8'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  // start of a work item
  input  logic       init,
  input  item_t      init_item,
  input  logic [1:0] init_qsrc,
  // operand reads
  input  reg_idx_t   rs1,
  input  reg_idx_t   rs2,
  output word_t      rs1_data,
  output word_t      rs2_data,
  input  pred_idx_t  pidx,
  output logic       pred_true,
  // write back
  input  logic       we,
  input  reg_idx_t   waddr,
  input  word_t      wdata,
  input  logic       pred_we,
  input  pred_idx_t  pred_waddr,
  input  logic       pred_wdata,
  input  logic       count_inc,
  // views
  output item_t      item_out,
  output msr_t       msr
);

  word_t       regs [15];
  logic [3:1]  preds;
  logic [15:0] icount;
  logic [1:0]  qsrc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 15; i++) regs[i] <= '0;
      preds  <= '1;
      icount <= '0;
      qsrc   <= '0;
    end else if (init) begin
      for (int i = 0; i < 8; i++)  regs[i] <= init_item[32*i +: 32];
      for (int i = 8; i < 15; i++) regs[i] <= '0;
      preds  <= '1;
      icount <= '0;
      qsrc   <= init_qsrc;
    end else begin
      if (we && waddr != 4'd15) regs[waddr] <= wdata;
      if (pred_we && pred_waddr != 2'd0) preds[pred_waddr] <= pred_wdata;
      if (count_inc) icount <= icount + 16'd1;
    end
  end

  assign msr = '{instr_count: icount, proc_num: PROC_NUM, pad: 2'b00,
                 queue_src: qsrc, preds: {preds, 1'b1}};

  assign rs1_data  = (rs1 == 4'd15) ? word_t'(msr) : regs[rs1];
  assign rs2_data  = (rs2 == 4'd15) ? word_t'(msr) : regs[rs2];
  assign pred_true = (pidx == 2'd0) ? 1'b1 : preds[pidx];

  always_comb
    for (int i = 0; i < 8; i++) item_out[32*i +: 32] = regs[i];

endmodule

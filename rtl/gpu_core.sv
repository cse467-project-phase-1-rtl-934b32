// gpu_core: the programmable GPU processor.
//
// The processor runs one work item at a time to completion.  It has no
// branches: a program is a straight run of predicated instructions ending in
// END, and the program is chosen by the queue the item came from.
//
// Sequence for one item:
//   dispatch   the scheduler's pick pops an item; the core leaves IDLE.
//   WAIT_ITEM  when the popped item arrives (item_valid), the register file is
//              initialised (r0..r7 = item, others 0, predicates true) and the
//              fetch of instruction 0 of program dispatch_q is issued.
//   RUN        one instruction per clock: the instruction word from the code
//              memory is decoded, its predicate read, its operands read and,
//              if the predicate is true, executed; the next fetch is issued in
//              the same cycle.  An instruction whose predicate is false does
//              nothing but still counts in the instruction counter.
//   LD_WAIT    LDGPMEM takes a second clock: the data memory read returns and
//              is written to the destination; the load is refetched meanwhile,
//              so its fields are still on the code memory output.
// STGPMEM and STOREQ finish in one clock: the processor owns one data memory
// port, and its queue writes take priority over the host's.  END returns the
// core to IDLE and pulses done.
//
// Queue numbers 0..3 address the work queues and 4 the z-buffer queue; a
// STOREQ to any other number is dropped and pulses bad_queue.  The program
// counter wraps at the end of a program's code memory.  The sequencing, the
// timings and the queue numbering are this design's choices; the instruction
// set and the register initialisation follow the description.
module gpu_core
  import gpu_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned GP_WORDS   = 4096,
  parameter logic [7:0]  PROC_NUM   = 8'd0,
  localparam int unsigned PC_W = $clog2(PROG_DEPTH),
  localparam int unsigned GAW  = $clog2(GP_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // work item dispatch
  input  logic            dispatch,
  input  logic [1:0]      dispatch_q,
  input  logic            item_valid,
  input  item_t           item,
  output logic            idle,
  output logic            done,
  // code memory fetch port
  output logic            imem_en,
  output logic [1:0]      imem_prog,
  output logic [PC_W-1:0] imem_pc,
  input  word_t           imem_data,
  // general purpose memory port
  output logic            dmem_en,
  output logic            dmem_we,
  output logic [GAW-1:0]  dmem_addr,
  output word_t           dmem_wdata,
  input  word_t           dmem_rdata,
  // queue write port
  output logic            wq_en,
  output logic [2:0]      wq_num,
  output item_t           wq_data,
  output logic            bad_queue,
  // status
  output msr_t            msr
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_ITEM, S_RUN, S_LD_WAIT} state_e;

  state_e          state;
  logic [1:0]      prog, dispatch_q_q;
  logic [PC_W-1:0] pc;

  ctrl_t ctrl;
  word_t rs1_data, rs2_data, opb, alu_y, qnum;
  logic  pred_true, go;
  item_t regs_item;

  logic       rf_init, rf_we, rf_pred_we, rf_count;
  reg_idx_t   rf_waddr;
  word_t      rf_wdata;

  gpu_decoder u_dec (.instr(imem_data), .ctrl(ctrl));

  gpu_regfile #(.PROC_NUM(PROC_NUM)) u_rf (
    .clk, .rst_n,
    .init(rf_init), .init_item(item), .init_qsrc(dispatch_q_q),
    .rs1(ctrl.src1), .rs2(ctrl.src2), .rs1_data, .rs2_data,
    .pidx(ctrl.pred), .pred_true,
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .pred_we(rf_pred_we), .pred_waddr(ctrl.dst[1:0]), .pred_wdata(alu_y[0]),
    .count_inc(rf_count),
    .item_out(regs_item), .msr
  );

  assign opb = ctrl.use_imm ? ctrl.imm : rs2_data;

  gpu_alu u_alu (.op(ctrl.alu_op), .a(rs1_data), .b(opb), .y(alu_y));

  // An instruction executes in RUN when its predicate holds.
  assign go   = (state == S_RUN) && pred_true;
  assign qnum = ctrl.use_imm ? ctrl.imm : rs1_data;
  assign idle = (state == S_IDLE);

  always_comb begin
    rf_init    = (state == S_WAIT_ITEM) && item_valid;
    rf_count   = (state == S_RUN);
    rf_we      = 1'b0;
    rf_waddr   = ctrl.dst;
    rf_wdata   = alu_y;
    rf_pred_we = go && ctrl.pred_we;

    dmem_en    = 1'b0;
    dmem_we    = 1'b0;
    dmem_addr  = GAW'(ctrl.use_imm ? ctrl.imm : rs1_data);
    dmem_wdata = rs1_data;

    wq_en      = 1'b0;
    wq_num     = qnum[2:0];
    wq_data    = regs_item;
    bad_queue  = 1'b0;

    imem_en    = 1'b0;
    imem_prog  = prog;
    imem_pc    = pc;
    done       = 1'b0;

    unique case (state)
      S_WAIT_ITEM: begin
        imem_en   = item_valid;
        imem_prog = dispatch_q_q;
        imem_pc   = '0;
      end
      S_RUN: begin
        imem_en = 1'b1;
        imem_pc = pc + 1'b1;
        if (go) begin
          if (ctrl.reg_we && !ctrl.ld) rf_we = 1'b1;
          if (ctrl.ld) begin
            dmem_en = 1'b1;
            imem_pc = pc;          // refetch the load while its data returns
          end
          if (ctrl.st) begin
            dmem_en   = 1'b1;
            dmem_we   = 1'b1;
            dmem_addr = GAW'(opb);
          end
          if (ctrl.storeq) begin
            if (qnum <= word_t'(ZQ_INDEX)) wq_en = 1'b1;
            else bad_queue = 1'b1;
          end
          if (ctrl.end_op) begin
            imem_en = 1'b0;
            done    = 1'b1;
          end
        end
      end
      S_LD_WAIT: begin
        rf_we    = 1'b1;
        rf_wdata = dmem_rdata;
        imem_en  = 1'b1;
        imem_pc  = pc + 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      prog         <= '0;
      pc           <= '0;
      dispatch_q_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (dispatch) begin
          state        <= S_WAIT_ITEM;
          dispatch_q_q <= dispatch_q;
        end
        S_WAIT_ITEM: if (item_valid) begin
          state <= S_RUN;
          prog  <= dispatch_q_q;
          pc    <= '0;
        end
        S_RUN: begin
          pc <= imem_pc;
          if (go && ctrl.end_op) state <= S_IDLE;
          else if (go && ctrl.ld) state <= S_LD_WAIT;
        end
        S_LD_WAIT: begin
          pc    <= imem_pc;
          state <= S_RUN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_item_follows_dispatch: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_IDLE && dispatch |=> item_valid);

endmodule

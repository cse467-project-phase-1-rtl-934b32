// gpu_top: the programmable GPU — work queues, priority scheduler, one
// branch-free predicated processor and its memories.
//
// Work is a stream of 256-bit items.  The host places new items on queue 0
// through the CPU interface.  Each of the four work queues has its own program
// in the code memory; running an item may create new items on queues 0..3 or
// on the z-buffer queue (STOREQ to queue 4), which the fixed-function z-buffer
// logic drains through the zq_* handshake.  Whenever the processor is idle,
// the priority scheduler picks the next queue by the published rules, which
// favour the later stages and keep the z-buffer queue from filling; the item
// is popped and the processor runs that queue's program on it to END.
//
// Memories: the four work queues share one memory (work_queues), the code
// memory holds the four programs, and the general purpose memory is shared by
// the processor (LDGPMEM/STGPMEM) and the host (load and dump port).
//
// Arbitration and flags (this design's choices):
//   * The single work-queue write port goes to the processor first; the host
//     waits.  The host also waits while queue 0 holds DEPTH - RESERVE items
//     or more, so the room that is left stays for the processor's own writes.
//   * overflow_err is set if a push ever met a full queue (the item is lost);
//     bad_queue_err if a STOREQ named a queue number above 4.  Both stay set
//     until reset.
//   * busy is high while any work queue holds work or the processor runs.
// Programs are loaded through code_*; a write takes effect one clock later.
module gpu_top
  import gpu_pkg::*;
#(
  parameter int unsigned QDEPTH     = 128,
  parameter int unsigned ZQDEPTH    = 128,
  parameter int unsigned RESERVE    = 8,
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned GP_WORDS   = 4096,
  localparam int unsigned PC_W = $clog2(PROG_DEPTH),
  localparam int unsigned GAW  = $clog2(GP_WORDS),
  localparam int unsigned CW   = $clog2(QDEPTH + 1),
  localparam int unsigned ZCW  = $clog2(ZQDEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // CPU interface: new work for queue 0
  input  logic            host_valid,
  input  item_t           host_item,
  output logic            host_ready,
  // program load
  input  logic            code_we,
  input  logic [1:0]      code_prog,
  input  logic [PC_W-1:0] code_pc,
  input  word_t           code_data,
  // host port of the general purpose memory
  input  logic            gp_en,
  input  logic            gp_we,
  input  logic [GAW-1:0]  gp_addr,
  input  word_t           gp_wdata,
  output word_t           gp_rdata,
  // z-buffer queue output to the z-buffer logic
  output item_t           zq_data,
  output logic            zq_valid,
  input  logic            zq_ready,
  // status
  output logic            busy,
  output logic            item_done,     // processor finished an item (END)
  output logic            zq_hold,       // scheduler holds back: z-buffer queue nearly full
  output logic            overflow_err,
  output logic            bad_queue_err,
  output logic [CW-1:0]   qcount [NUM_QUEUES],
  output logic [ZCW-1:0]  zcount,
  output msr_t            msr
);

  // scheduler and dispatch
  logic       core_idle, pick_valid;
  logic [1:0] pick_q;
  item_t      pop_item;
  logic       pop_valid;

  // processor ports
  logic            imem_en, dmem_en, dmem_we;
  logic [1:0]      imem_prog;
  logic [PC_W-1:0] imem_pc;
  word_t           imem_data, dmem_wdata, dmem_rdata;
  logic [GAW-1:0]  dmem_addr;
  logic            core_wq_en, core_bad_q;
  logic [2:0]      core_wq_num;
  item_t           core_wq_data;

  // queue write port
  logic       host_req, host_grant, core_to_wq, core_to_zq;
  item_t      host_wq_item;
  logic       wq_en;
  logic [1:0] wq_q;
  item_t      wq_data;
  logic       wq_overflow, zq_overflow;

  priority_scheduler #(.DEPTH(QDEPTH), .ZQ_DEPTH(ZQDEPTH), .RESERVE(RESERVE)) u_sched (
    .enable(core_idle), .qcount, .zcount,
    .pick_valid, .pick_q, .zq_hold
  );

  assign core_to_wq = core_wq_en && (core_wq_num < 3'(ZQ_INDEX));
  assign core_to_zq = core_wq_en && (core_wq_num == 3'(ZQ_INDEX));
  assign host_grant = !core_to_wq;

  always_comb begin
    wq_en   = core_to_wq || (host_req && host_grant);
    wq_q    = core_to_wq ? core_wq_num[1:0] : 2'd0;
    wq_data = core_to_wq ? core_wq_data : host_wq_item;
  end

  work_queues #(.DEPTH(QDEPTH)) u_wq (
    .clk, .rst_n,
    .wr_en(wq_en), .wr_q(wq_q), .wr_data(wq_data), .overflow(wq_overflow),
    .rd_en(pick_valid), .rd_q(pick_q), .rd_data(pop_item), .rd_valid(pop_valid),
    .count(qcount)
  );

  zbuf_queue #(.DEPTH(ZQDEPTH)) u_zq (
    .clk, .rst_n,
    .push(core_to_zq), .push_data(core_wq_data), .overflow(zq_overflow),
    .out_data(zq_data), .out_valid(zq_valid), .out_ready(zq_ready),
    .count(zcount)
  );

  cpu_if u_cpu_if (
    .clk, .rst_n,
    .host_valid, .host_item, .host_ready,
    .q0_full(32'(qcount[0]) + RESERVE >= QDEPTH),
    .wq_req(host_req), .wq_item(host_wq_item), .wq_grant(host_grant)
  );

  gpu_core #(.PROG_DEPTH(PROG_DEPTH), .GP_WORDS(GP_WORDS)) u_core (
    .clk, .rst_n,
    .dispatch(pick_valid), .dispatch_q(pick_q),
    .item_valid(pop_valid), .item(pop_item),
    .idle(core_idle), .done(item_done),
    .imem_en, .imem_prog, .imem_pc, .imem_data,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .wq_en(core_wq_en), .wq_num(core_wq_num), .wq_data(core_wq_data),
    .bad_queue(core_bad_q),
    .msr
  );

  code_mem #(.PROG_DEPTH(PROG_DEPTH)) u_code (
    .clk,
    .rd_en(imem_en), .rd_prog(imem_prog), .rd_pc(imem_pc), .rd_data(imem_data),
    .wr_en(code_we), .wr_prog(code_prog), .wr_pc(code_pc), .wr_data(code_data)
  );

  gp_mem #(.WORDS(GP_WORDS)) u_gp (
    .clk,
    .a_en(dmem_en), .a_we(dmem_we), .a_addr(dmem_addr), .a_wdata(dmem_wdata),
    .a_rdata(dmem_rdata),
    .b_en(gp_en), .b_we(gp_we), .b_addr(gp_addr), .b_wdata(gp_wdata),
    .b_rdata(gp_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      overflow_err  <= 1'b0;
      bad_queue_err <= 1'b0;
    end else begin
      if (wq_overflow || zq_overflow) overflow_err <= 1'b1;
      if (core_bad_q) bad_queue_err <= 1'b1;
    end
  end

  always_comb begin
    busy = !core_idle;
    for (int q = 0; q < NUM_QUEUES; q++)
      if (qcount[q] != '0) busy = 1'b1;
  end

endmodule

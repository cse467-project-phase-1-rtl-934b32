// gpu_pkg: types and constants shared by the programmable GPU.
//
// The GPU runs branch-free, predicated programs on 32-bit integer registers.
// Every instruction is one 32-bit word with the fields, from the top bit down:
//   [31:30] predicate number (p0 is always true)
//   [29]    operand type: 0 = three registers, 1 = two registers and a constant
//   [28:24] opcode
//   [23:20] REG1, [19:16] REG2, [15:12] REG3, [11:0] padding
// In the constant form, bits [15:0] hold a 16-bit constant in place of REG3 and
// the padding.  The field layout is the published one; the numeric opcode
// values and the way each instruction uses REG1..REG3 are this design's own
// choice (the reference encoding lived in a header file that is not part of
// this description).
//
// A work item is 256 bits, the concatenation {r7, ..., r1, r0} with r0 in the
// low 32 bits.  Queue numbers 0..3 are the four work queues, queue number 4
// is the z-buffer queue.
package gpu_pkg;

  localparam int unsigned XLEN       = 32;
  localparam int unsigned ITEM_W     = 256;
  localparam int unsigned NUM_QUEUES = 4;   // work queues / programs
  localparam int unsigned ZQ_INDEX   = 4;   // queue number of the z-buffer queue

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [ITEM_W-1:0] item_t;
  typedef logic [3:0]        reg_idx_t;
  typedef logic [1:0]        pred_idx_t;

  typedef enum logic [4:0] {
    OP_LDGPMEM = 5'd0,
    OP_STGPMEM = 5'd1,
    OP_MUL     = 5'd2,
    OP_ADD     = 5'd3,
    OP_SUB     = 5'd4,
    OP_SRL     = 5'd5,
    OP_SLL     = 5'd6,
    OP_AND     = 5'd7,
    OP_NOT     = 5'd8,
    OP_XOR     = 5'd9,
    OP_OR      = 5'd10,
    OP_NAND    = 5'd11,
    OP_LI      = 5'd12,
    OP_SETLT   = 5'd13,
    OP_STOREQ  = 5'd14,  // STOREQ (register form) and STOREQI (constant form)
    OP_END     = 5'd15
  } opcode_e;

  typedef struct packed {
    pred_idx_t  pred;
    logic       imm_form;
    logic [4:0] opcode;
    reg_idx_t   reg1;
    reg_idx_t   reg2;
    reg_idx_t   reg3;
    logic [11:0] pad;
  } instr_t;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_MUL, ALU_SRL, ALU_SLL, ALU_AND, ALU_NOT,
    ALU_XOR, ALU_OR, ALU_NAND, ALU_PASSB, ALU_LT
  } alu_op_e;

  // Decoded control for one instruction.
  typedef struct packed {
    logic      valid_op;   // opcode is known
    pred_idx_t pred;
    alu_op_e   alu_op;
    reg_idx_t  src1;       // REG1
    reg_idx_t  src2;       // REG2 (register form)
    logic      use_imm;    // second ALU operand is the constant
    word_t     imm;        // constant, sign- or zero-extended
    reg_idx_t  dst;        // destination register
    logic      reg_we;     // writes a general register
    logic      pred_we;    // writes a predicate (SETLT)
    logic      ld;         // LDGPMEM
    logic      st;         // STGPMEM
    logic      storeq;     // STOREQ / STOREQI
    logic      end_op;     // END
  } ctrl_t;

  // Machine status register (r15):
  // [instruction_count 16][processor_number 8][padding 2][queue_source 2][predicates 4]
  typedef struct packed {
    logic [15:0] instr_count;
    logic [7:0]  proc_num;
    logic [1:0]  pad;
    logic [1:0]  queue_src;
    logic [3:0]  preds;
  } msr_t;

endpackage

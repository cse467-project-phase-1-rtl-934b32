// gpu_decoder: turns one 32-bit GPU instruction into the control bundle ctrl_t.
//
// Purely combinational.  The field layout (predicate, operand type, opcode,
// REG1, REG2, REG3/constant) follows the published encoding format.  How each
// instruction uses the fields is this design's own choice:
//   register form  (bit 29 = 0): src1 = REG1, src2 = REG2, destination = REG3
//   constant form  (bit 29 = 1): src1 = REG1, constant = bits [15:0],
//                                destination = REG2
// The constant is sign-extended for ADD, SUB, MUL, LI and SETLT (LI is
// documented as a signed immediate) and zero-extended for the logic and shift
// operations, addresses and queue numbers, so that ANDI with 0xffff masks off
// the upper half of a word as the transformation example expects.
// STGPMEM takes its data from REG1 and its address from REG2 (or the constant);
// LDGPMEM takes its address from REG1 (or the constant).  SETLT writes the
// predicate named by the low two bits of its destination field.  STOREQI is
// the constant form of STOREQ.  An unknown opcode decodes to a no-operation.
module gpu_decoder
  import gpu_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl
);

  instr_t  f;
  opcode_e op;
  logic    sext;

  assign f  = instr_t'(instr);
  assign op = opcode_e'(f.opcode);

  always_comb begin
    sext = (op inside {OP_ADD, OP_SUB, OP_MUL, OP_LI, OP_SETLT});

    ctrl          = '0;
    ctrl.pred     = f.pred;
    ctrl.src1     = f.reg1;
    ctrl.src2     = f.reg2;
    ctrl.use_imm  = f.imm_form;
    ctrl.imm      = sext ? word_t'({{16{f.reg3[3]}}, f.reg3, f.pad})
                         : word_t'({16'h0, f.reg3, f.pad});
    ctrl.dst      = f.imm_form ? f.reg2 : f.reg3;
    ctrl.alu_op   = ALU_ADD;
    ctrl.valid_op = 1'b1;

    unique case (op)
      OP_LDGPMEM: begin ctrl.ld = 1'b1; ctrl.reg_we = 1'b1; end
      OP_STGPMEM: ctrl.st = 1'b1;
      OP_MUL:   begin ctrl.alu_op = ALU_MUL;   ctrl.reg_we = 1'b1; end
      OP_ADD:   begin ctrl.alu_op = ALU_ADD;   ctrl.reg_we = 1'b1; end
      OP_SUB:   begin ctrl.alu_op = ALU_SUB;   ctrl.reg_we = 1'b1; end
      OP_SRL:   begin ctrl.alu_op = ALU_SRL;   ctrl.reg_we = 1'b1; end
      OP_SLL:   begin ctrl.alu_op = ALU_SLL;   ctrl.reg_we = 1'b1; end
      OP_AND:   begin ctrl.alu_op = ALU_AND;   ctrl.reg_we = 1'b1; end
      OP_NOT:   begin ctrl.alu_op = ALU_NOT;   ctrl.reg_we = 1'b1; end
      OP_XOR:   begin ctrl.alu_op = ALU_XOR;   ctrl.reg_we = 1'b1; end
      OP_OR:    begin ctrl.alu_op = ALU_OR;    ctrl.reg_we = 1'b1; end
      OP_NAND:  begin ctrl.alu_op = ALU_NAND;  ctrl.reg_we = 1'b1; end
      OP_LI:    begin ctrl.alu_op = ALU_PASSB; ctrl.reg_we = 1'b1; end
      OP_SETLT: begin ctrl.alu_op = ALU_LT;    ctrl.pred_we = 1'b1; end
      OP_STOREQ: ctrl.storeq = 1'b1;
      OP_END:    ctrl.end_op = 1'b1;
      default:   ctrl.valid_op = 1'b0;
    endcase
  end

endmodule

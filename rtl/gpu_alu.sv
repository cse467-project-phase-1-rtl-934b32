// gpu_alu: the integer datapath of the GPU processor.
//
// Combinational.  Computes the result of the arithmetic and logic
// instructions of the base instruction set on two 32-bit operands:
// add, subtract, multiply (low 32 bits of the product), logical shift right
// and left (by the low five bits of b), and, not (of a), xor, or, nand,
// pass-b (used by LI) and the signed less-than compare used by SETLT
// (result 1 or 0).  The operations are the published ones; signed compare,
// truncation of the product and the five-bit shift amount are this design's
// choices.
module gpu_alu
  import gpu_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_MUL:   y = a * b;
      ALU_SRL:   y = a >> b[4:0];
      ALU_SLL:   y = a << b[4:0];
      ALU_AND:   y = a & b;
      ALU_NOT:   y = ~a;
      ALU_XOR:   y = a ^ b;
      ALU_OR:    y = a | b;
      ALU_NAND:  y = ~(a & b);
      ALU_PASSB: y = b;
      ALU_LT:    y = word_t'($signed(a) < $signed(b));
      default:   y = '0;
    endcase
  end

endmodule

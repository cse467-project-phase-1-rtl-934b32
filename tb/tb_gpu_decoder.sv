// tb_gpu_decoder: encodes every opcode in both operand forms with random
// fields and checks the decoded control bundle against the encoding rules.
module tb_gpu_decoder;
  import gpu_pkg::*;
  import tb_gpu_ref::*;
  int checks = 0, failures = 0;
  word_t instr;
  ctrl_t ctrl;

  gpu_decoder dut (.instr, .ctrl);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s instr=%h", what, instr); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [1:0] p; logic [4:0] op; logic [3:0] r1, r2, r3; logic [15:0] imm; bit ifm;
      logic [31:0] ex_imm; bit sx, alu_w;
      p = 2'($urandom); op = 5'($urandom_range(0, 17)); r1 = 4'($urandom);
      r2 = 4'($urandom); r3 = 4'($urandom); imm = 16'($urandom); ifm = 1'($urandom);
      instr = ifm ? enc_i(p, op, r1, r2, imm) : enc_r(p, op, r1, r2, r3);
      #1;
      sx = op inside {ADD, SUB, MUL, LI, SETLT};
      ex_imm = sx ? {{16{instr[15]}}, instr[15:0]} : {16'h0, instr[15:0]};
      alu_w = op inside {MUL, ADD, SUB, SRL, SLL, AND, NOT, XOR, OR, NAND, LI};
      chk(ctrl.valid_op == (op <= END), "valid_op");
      chk(ctrl.pred == p, "pred");
      chk(ctrl.src1 == r1, "src1");
      chk(ctrl.use_imm == ifm, "use_imm");
      if (ifm) chk(ctrl.imm == ex_imm, "imm");
      chk(ctrl.dst == (ifm ? r2 : r3), "dst");
      chk(ctrl.reg_we == (alu_w || op == LDGPMEM), "reg_we");
      chk(ctrl.pred_we == (op == SETLT), "pred_we");
      chk(ctrl.ld == (op == LDGPMEM), "ld");
      chk(ctrl.st == (op == STGPMEM), "st");
      chk(ctrl.storeq == (op == STOREQ), "storeq");
      chk(ctrl.end_op == (op == END), "end");
      case (op)
        MUL:  chk(ctrl.alu_op == ALU_MUL, "alu mul");
        ADD:  chk(ctrl.alu_op == ALU_ADD, "alu add");
        SUB:  chk(ctrl.alu_op == ALU_SUB, "alu sub");
        SRL:  chk(ctrl.alu_op == ALU_SRL, "alu srl");
        SLL:  chk(ctrl.alu_op == ALU_SLL, "alu sll");
        AND:  chk(ctrl.alu_op == ALU_AND, "alu and");
        NOT:  chk(ctrl.alu_op == ALU_NOT, "alu not");
        XOR:  chk(ctrl.alu_op == ALU_XOR, "alu xor");
        OR:   chk(ctrl.alu_op == ALU_OR, "alu or");
        NAND: chk(ctrl.alu_op == ALU_NAND, "alu nand");
        LI:   chk(ctrl.alu_op == ALU_PASSB, "alu li");
        SETLT: chk(ctrl.alu_op == ALU_LT, "alu lt");
        default: ;
      endcase
    end
    // ANDI r8, 0xffff, r8 must zero-extend; LI r3, -2 must sign-extend
    instr = enc_i(0, AND, 8, 8, 16'hFFFF); #1; chk(ctrl.imm == 32'h0000_FFFF, "andi zext");
    instr = enc_i(0, LI, 0, 3, 16'hFFFE);  #1; chk(ctrl.imm == 32'hFFFF_FFFE && ctrl.dst == 3, "li sext");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

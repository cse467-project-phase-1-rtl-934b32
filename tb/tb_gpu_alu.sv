// tb_gpu_alu: checks every ALU operation on edge values and random operands
// against expressions computed here.
module tb_gpu_alu;
  import gpu_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  word_t   a, b, y;

  gpu_alu dut (.op, .a, .b, .y);

  function automatic word_t expect_y(alu_op_e o, word_t x, word_t z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    case (o)
      ALU_ADD:   return word_t'(64'(x) + 64'(z));
      ALU_SUB:   return word_t'(64'(x) - 64'(z));
      ALU_MUL:   return word_t'(64'(x) * 64'(z));
      ALU_SRL:   return word_t'(64'(x) >> (z % 32));
      ALU_SLL:   return word_t'(64'(x) << (z % 32));
      ALU_AND:   return x & z;
      ALU_NOT:   return x ^ 32'hFFFF_FFFF;
      ALU_XOR:   return (x | z) & ~(x & z);
      ALU_OR:    return ~(~x & ~z);
      ALU_NAND:  return ~x | ~z;
      ALU_PASSB: return z;
      ALU_LT:    return (sx < sz) ? 32'd1 : 32'd0;
      default:   return 32'h0;
    endcase
  endfunction

  task automatic try_(alu_op_e o, word_t x, word_t z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== expect_y(o, x, z)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h expected %h", o.name(), x, z, y, expect_y(o, x, z));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static word_t edges [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_FFFF};
    for (int o = 0; o <= int'(ALU_LT); o++) begin
      foreach (edges[i]) foreach (edges[j]) try_(alu_op_e'(o), edges[i], edges[j]);
      for (int k = 0; k < 200; k++) try_(alu_op_e'(o), $urandom, $urandom);
    end
    // a few hand-worked values
    op = ALU_MUL; a = 32'd1000; b = -32'sd3; #1; checks++; if (y != 32'hFFFF_F448) failures++;
    op = ALU_SRL; a = 32'h8000_0000; b = 32'd31; #1; checks++; if (y != 32'd1) failures++;
    op = ALU_LT;  a = -32'sd5; b = 32'd2; #1; checks++; if (y != 32'd1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_code_mem: fills all four program memories through the load port and
// reads every word back, checking the one-clock read latency and that
// programs do not overlap.
module tb_code_mem;
  import gpu_pkg::*;
  localparam int PD = 256;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [1:0] rd_prog = 0, wr_prog = 0;
  logic [7:0] rd_pc = 0, wr_pc = 0;
  word_t rd_data, wr_data = 0;

  code_mem #(.PROG_DEPTH(PD)) dut (.*);
  always #5 clk = ~clk;

  function automatic word_t pattern(int p, int a);
    return word_t'((p * 32'h9E37_79B9) ^ (a * 32'h0101_0101) ^ 32'h5A5A_0000);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++)
      for (int a = 0; a < PD; a++) begin
        @(negedge clk); wr_en = 1; wr_prog = 2'(p); wr_pc = 8'(a); wr_data = pattern(p, a);
      end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      int p, a;
      p = $urandom_range(0, 3); a = $urandom_range(0, PD - 1);
      @(negedge clk); rd_en = 1; rd_prog = 2'(p); rd_pc = 8'(a);
      @(negedge clk); rd_en = 0; rd_pc = 8'(a + 1);
      checks++;
      if (rd_data != pattern(p, a)) begin failures++; $display("FAIL p%0d a%0d", p, a); end
      // with rd_en low the output holds
      @(negedge clk); checks++;
      if (rd_data != pattern(p, a)) begin failures++; $display("FAIL hold p%0d a%0d", p, a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

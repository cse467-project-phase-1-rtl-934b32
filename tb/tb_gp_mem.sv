// tb_gp_mem: random reads and writes on both ports against a shadow array,
// including same-address collisions (port A wins) and read-before-write.
module tb_gp_mem;
  import gpu_pkg::*;
  localparam int W = 4096;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [11:0] a_addr = 0, b_addr = 0;
  word_t a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;

  gp_mem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  word_t shadow [W];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); b_en = 1; b_we = 1; b_addr = 12'(i); b_wdata = word_t'(i * 7 + 1);
      shadow[i] = word_t'(i * 7 + 1);
    end
    for (int n = 0; n < 20000; n++) begin
      word_t ea, eb; bit ra, rb;
      @(negedge clk);
      a_en = 1'($urandom); a_we = 1'($urandom); b_en = 1'($urandom); b_we = 1'($urandom);
      a_addr = 12'($urandom_range(0, 15)); b_addr = 12'($urandom_range(0, 15));
      if (n % 3 == 0) b_addr = a_addr;
      a_wdata = $urandom; b_wdata = $urandom;
      ra = a_en && !a_we; rb = b_en && !b_we;
      ea = shadow[a_addr]; eb = shadow[b_addr];
      if (b_en && b_we) shadow[b_addr] = b_wdata;
      if (a_en && a_we) shadow[a_addr] = a_wdata;
      @(posedge clk); #1;
      if (ra) begin checks++; if (a_rdata != ea) begin failures++; $display("FAIL A %0d", n); end end
      if (rb) begin checks++; if (b_rdata != eb) begin failures++; $display("FAIL B %0d", n); end end
    end
    a_en = 0; b_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

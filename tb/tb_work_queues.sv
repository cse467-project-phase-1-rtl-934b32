// tb_work_queues: random pushes and pops on the four queues, including a
// push and a pop in the same cycle and pushes into full queues, against four
// reference queues kept here.  Checks popped data, the one-clock read
// latency, item counts and overflow pulses.
module tb_work_queues;
  import gpu_pkg::*;
  localparam int D = 128;
  localparam int CW = $clog2(D + 1);
  int checks = 0, failures = 0, overflows = 0, pops = 0;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [1:0] wr_q = 0, rd_q = 0;
  item_t wr_data = '0, rd_data;
  logic overflow, rd_valid;
  logic [CW-1:0] count [NUM_QUEUES];

  work_queues #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  item_t model [4][$];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40000; n++) begin
      item_t exp_pop; bit exp_ovf, popping;
      int push_bias;
      // phases: fill (mostly pushes), drain (mostly pops), mixed
      push_bias = ((n / 3000) % 3 == 0) ? 90 : ((n / 3000) % 3 == 1) ? 15 : 50;
      @(negedge clk);
      wr_en = ($urandom_range(0, 99) < push_bias);
      rd_en = ($urandom_range(0, 99) < 100 - push_bias);
      wr_q = 2'($urandom); rd_q = 2'($urandom);
      if (n % 7 == 0) rd_q = wr_q;
      for (int i = 0; i < 8; i++) wr_data[32*i +: 32] = $urandom;
      #1;
      exp_ovf = wr_en && model[wr_q].size() == D;
      chk(overflow == exp_ovf, "overflow");
      popping = rd_en && model[rd_q].size() != 0;
      if (popping) exp_pop = model[rd_q].pop_front();
      if (wr_en && !exp_ovf) model[wr_q].push_back(wr_data);
      if (exp_ovf) overflows++;
      @(posedge clk); #1;
      chk(rd_valid == popping, "rd_valid");
      if (popping) begin pops++; chk(rd_data == exp_pop, "rd_data"); end
      for (int q = 0; q < 4; q++) chk(int'(count[q]) == model[q].size(), $sformatf("count q%0d", q));
      wr_en = 0; rd_en = 0;
    end
    chk(overflows > 0 && pops > 1000, "coverage");
    $display("overflows=%0d pops=%0d", overflows, pops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_zbuf_queue: random pushes and a randomly stalling consumer against a
// reference queue; checks output order and data, out_valid, count and the
// overflow pulse when the queue is full.
module tb_zbuf_queue;
  import gpu_pkg::*;
  localparam int D = 128;
  localparam int CW = $clog2(D + 1);
  int checks = 0, failures = 0, overflows = 0, taken = 0;
  logic clk = 0, rst_n = 0;
  logic push = 0, out_ready = 0;
  item_t push_data = '0, out_data;
  logic overflow, out_valid;
  logic [CW-1:0] count;

  zbuf_queue #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  item_t model [$];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int bias;
      bias = ((n / 2000) % 2 == 0) ? 85 : 20;
      @(negedge clk);
      push = ($urandom_range(0, 99) < bias);
      out_ready = ($urandom_range(0, 99) >= bias);
      for (int i = 0; i < 8; i++) push_data[32*i +: 32] = $urandom;
      #1;
      chk(out_valid == (model.size() != 0), "out_valid");
      chk(int'(count) == model.size(), "count");
      if (model.size() != 0) chk(out_data == model[0], "out_data");
      chk(overflow == (push && model.size() == D), "overflow");
      if (push && model.size() == D) overflows++;
      begin
        int pre;
        pre = model.size();
        if (out_valid && out_ready) begin void'(model.pop_front()); taken++; end
        if (push && pre < D) model.push_back(push_data);
      end
      @(posedge clk);
    end
    chk(overflows > 0 && taken > 1000, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

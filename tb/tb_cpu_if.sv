// tb_cpu_if: a host streams numbered items while queue-0 fullness and the
// write grant toggle at random; every item must reach the queue side exactly
// once, in order, and never while queue 0 is reported full.
module tb_cpu_if;
  import gpu_pkg::*;
  int checks = 0, failures = 0, waits_full = 0, waits_grant = 0;
  logic clk = 0, rst_n = 0;
  logic host_valid = 0, host_ready, q0_full = 0, wq_req, wq_grant = 0;
  item_t host_item = '0, wq_item;

  cpu_if dut (.*);
  always #5 clk = ~clk;

  localparam int N = 500;
  int sent = 0, got = 0;

  function automatic item_t mk(int i);
    item_t t;
    for (int w = 0; w < 8; w++) t[32*w +: 32] = word_t'(i * 8 + w) ^ 32'hA5A5_0000;
    return t;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (sent < N) begin
      @(negedge clk);
      if (!host_valid && $urandom_range(0, 3) != 0) begin host_valid = 1; host_item = mk(sent); end
      @(posedge clk);
      if (host_valid && host_ready) begin sent++; #1 host_valid = 0; end
    end
  end

  // queue side
  initial begin
    wait (rst_n);
    while (got < N) begin
      @(negedge clk);
      q0_full  = ($urandom_range(0, 4) == 0);
      wq_grant = ($urandom_range(0, 3) != 0);
      #1;
      if (q0_full) begin
        checks++; if (wq_req) begin failures++; $display("FAIL request while full"); end
        if (dut.held) waits_full++;
      end
      if (wq_req && !wq_grant) waits_grant++;
      @(posedge clk);
      if (wq_req && wq_grant) begin
        checks++;
        if (wq_item != mk(got)) begin failures++; $display("FAIL item %0d", got); end
        got++;
      end
    end
    repeat (5) @(posedge clk);
    checks++; if (wq_req) begin failures++; $display("FAIL extra request"); end
    checks++; if (waits_full == 0 || waits_grant == 0) begin failures++; $display("FAIL no backpressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

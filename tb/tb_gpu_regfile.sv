// tb_gpu_regfile: checks item initialisation, register and predicate writes,
// the read-only r15/p0, the status register layout and the instruction
// counter against a shadow copy kept here.
module tb_gpu_regfile;
  import gpu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic init = 0, we = 0, pred_we = 0, pred_wdata = 0, count_inc = 0;
  item_t init_item = '0;
  logic [1:0] init_qsrc = '0;
  reg_idx_t rs1 = '0, rs2 = '0, waddr = '0;
  pred_idx_t pidx = '0, pred_waddr = '0;
  word_t rs1_data, rs2_data, wdata = '0;
  logic pred_true;
  item_t item_out;
  msr_t msr;

  gpu_regfile #(.PROC_NUM(8'h5A)) dut (.*);

  always #5 clk = ~clk;

  word_t shadow [16];
  bit    sp [4];
  int    cnt;
  logic [1:0] qs;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t exp_msr();
    return {16'(cnt), 8'h5A, 2'b00, qs, sp[3], sp[2], sp[1], 1'b1};
  endfunction

  task automatic check_all();
    for (int i = 0; i < 16; i++) begin
      rs1 = 4'(i); rs2 = 4'(15 - i); #1;
      chk(rs1_data == (i == 15 ? exp_msr() : shadow[i]), $sformatf("r%0d", i));
      chk(rs2_data == (i == 0 ? exp_msr() : shadow[15 - i]), $sformatf("rs2 r%0d", 15 - i));
    end
    for (int p = 0; p < 4; p++) begin
      pidx = 2'(p); #1; chk(pred_true == (p == 0 ? 1'b1 : sp[p]), $sformatf("p%0d", p));
    end
    for (int i = 0; i < 8; i++) chk(item_out[32*i +: 32] == shadow[i], "item_out");
    chk(word_t'(msr) == exp_msr(), "msr");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // start a new item
      @(negedge clk);
      for (int i = 0; i < 8; i++) init_item[32*i +: 32] = $urandom;
      init_qsrc = 2'($urandom); init = 1; we = 1; waddr = 4'd3; wdata = 32'hDEAD; // init wins
      @(negedge clk);
      init = 0; we = 0;
      for (int i = 0; i < 16; i++) shadow[i] = (i < 8) ? init_item[32*i +: 32] : 32'h0;
      for (int p = 0; p < 4; p++) sp[p] = 1;
      cnt = 0; qs = init_qsrc;
      check_all();
      // random writes
      for (int k = 0; k < 30; k++) begin
        @(negedge clk);
        we = 1'($urandom); waddr = 4'($urandom); wdata = $urandom;
        pred_we = 1'($urandom); pred_waddr = 2'($urandom); pred_wdata = 1'($urandom);
        count_inc = 1'($urandom);
        @(posedge clk); #1;
        if (we && waddr != 15) shadow[waddr] = wdata;
        if (pred_we && pred_waddr != 0) sp[pred_waddr] = pred_wdata;
        if (count_inc) cnt++;
        we = 0; pred_we = 0; count_inc = 0;
        check_all();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_transform_workload: the triangle transformation stage, run on the whole
// GPU at its default sizes.
//
// A work item holds one triangle: three points, each four 16-bit fixed-point
// values (x, y, z, a) packed two to a word, r0/r1 for the first point, r2/r3
// for the second and r4/r5 for the third (x and z in the low halves).  The
// queue 0 program unpacks each point with the UNPACK sequence (clear, copy,
// mask / clear, copy, shift), multiplies it by a 4x4 matrix of 8.8
// fixed-point coefficients held in data memory words 0..15 (row-major),
// shifts each sum right by 8, masks it to 16 bits, repacks the point in place
// and finally sends the item to queue 1.  The queue 1 program forwards the
// item to the z-buffer queue, where the testbench collects it.
//
// The expected item is computed here directly from the matrix product with
// the same 32-bit wrap-around arithmetic.  The testbench also checks the
// processing time of each transform run: two clocks of dispatch plus one
// clock per instruction and one extra per load.
module tb_transform_workload;
  import gpu_pkg::*;
  import tb_gpu_ref::*;
  localparam int NT = 100;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic host_valid = 0, host_ready;
  item_t host_item = '0;
  logic code_we = 0;
  logic [1:0] code_prog = 0;
  logic [7:0] code_pc = 0;
  word_t code_data = 0;
  logic gp_en = 0, gp_we = 0;
  logic [11:0] gp_addr = 0;
  word_t gp_wdata = 0, gp_rdata;
  item_t zq_data;
  logic zq_valid, zq_ready = 1;
  logic busy, item_done, zq_hold, overflow_err, bad_queue_err;
  logic [7:0] qcount [NUM_QUEUES];
  logic [7:0] zcount;
  msr_t msr;

  gpu_top dut (.*);
  always #5 clk = ~clk;

  word_t prog0 [$];
  word_t mtx [16];
  item_t z_got [$];
  int n_loads, n_instr;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // UNPACK(src, t1, t2): t1 = low half of src, t2 = high half
  task automatic unpack(int src, int t1, int t2);
    prog0.push_back(enc_r(0, XOR, 4'(t1), 4'(t1), 4'(t1)));
    prog0.push_back(enc_r(0, OR, 4'(src), 4'(src), 4'(t1)));
    prog0.push_back(enc_i(0, AND, 4'(t1), 4'(t1), 16'hFFFF));
    prog0.push_back(enc_r(0, XOR, 4'(t2), 4'(t2), 4'(t2)));
    prog0.push_back(enc_r(0, OR, 4'(src), 4'(src), 4'(t2)));
    prog0.push_back(enc_i(0, SRL, 4'(t2), 4'(t2), 16));
  endtask

  // r14 = ((row j of the matrix) . (r8, r9, r10, r11) >> 8) & 0xffff
  task automatic dot_row(int j);
    prog0.push_back(enc_i(0, LDGPMEM, 0, 12, 16'(4 * j)));
    prog0.push_back(enc_r(0, MUL, 8, 12, 14));
    for (int k = 1; k < 4; k++) begin
      prog0.push_back(enc_i(0, LDGPMEM, 0, 12, 16'(4 * j + k)));
      prog0.push_back(enc_r(0, MUL, 4'(8 + k), 12, 13));
      prog0.push_back(enc_r(0, ADD, 14, 13, 14));
    end
    prog0.push_back(enc_i(0, SRL, 14, 14, 8));
    prog0.push_back(enc_i(0, AND, 14, 14, 16'hFFFF));
  endtask

  task automatic build_transform();
    prog0.delete();
    for (int p = 0; p < 3; p++) begin
      unpack(2 * p, 8, 9);          // x, y
      unpack(2 * p + 1, 10, 11);    // z, a
      dot_row(0); prog0.push_back(enc_r(0, OR, 14, 14, 4'(2 * p)));      // x'
      dot_row(1); prog0.push_back(enc_i(0, SLL, 14, 14, 16));
                  prog0.push_back(enc_r(0, OR, 4'(2 * p), 14, 4'(2 * p)));  // y'
      dot_row(2); prog0.push_back(enc_r(0, OR, 14, 14, 4'(2 * p + 1)));  // z'
      dot_row(3); prog0.push_back(enc_i(0, SLL, 14, 14, 16));
                  prog0.push_back(enc_r(0, OR, 4'(2 * p + 1), 14, 4'(2 * p + 1)));  // a'
    end
    prog0.push_back(enc_i(0, STOREQ, 0, 0, 1));
    prog0.push_back(enc_r(0, END, 0, 0, 0));
    n_instr = prog0.size();
    n_loads = 3 * 16;
  endtask

  function automatic item_t transform(item_t t);
    item_t o;
    o = t;
    for (int p = 0; p < 3; p++) begin
      word_t v [4], r [4];
      v[0] = {16'h0, t[64*p +: 16]};      v[1] = {16'h0, t[64*p + 16 +: 16]};
      v[2] = {16'h0, t[64*p + 32 +: 16]}; v[3] = {16'h0, t[64*p + 48 +: 16]};
      for (int j = 0; j < 4; j++) begin
        word_t s;
        s = 0;
        for (int k = 0; k < 4; k++) s += mtx[4 * j + k] * v[k];
        r[j] = (s >> 8) & 32'hFFFF;
      end
      o[64*p +: 64] = {r[3][15:0], r[2][15:0], r[1][15:0], r[0][15:0]};
    end
    return o;
  endfunction

  always @(posedge clk) if (rst_n && zq_valid && zq_ready) z_got.push_back(zq_data);

  // processing time of every queue 0 item
  int t_start = 0, n_timed = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.pick_valid && dut.pick_q == 2'd0) t_start = int'($time / 10);
    if (item_done && msr.queue_src == 2'd0) begin
      n_timed++;
      chk(int'($time / 10) - t_start + 1 == 2 + n_instr + n_loads,
          $sformatf("transform took %0d clocks", int'($time / 10) - t_start + 1));
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    item_t tris [NT];
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_transform();
    chk(prog0.size() <= 256, "transform program fits in one program memory");
    for (int p = 0; p < 4; p++)
      for (int a = 0; a < 256; a++) begin
        @(negedge clk);
        code_we = 1; code_prog = 2'(p); code_pc = 8'(a);
        if (p == 0 && a < prog0.size()) code_data = prog0[a];
        else if (p == 1 && a == 0)      code_data = enc_i(0, STOREQ, 0, 0, 4);
        else                            code_data = enc_r(0, END, 0, 0, 0);
      end
    @(negedge clk); code_we = 0;
    // a rotation-and-scale style matrix in 8.8 fixed point, with translation
    for (int i = 0; i < 16; i++) begin
      mtx[i] = word_t'($urandom_range(0, 511));
      @(negedge clk); gp_en = 1; gp_we = 1; gp_addr = 12'(i); gp_wdata = mtx[i];
    end
    @(negedge clk); gp_en = 0; gp_we = 0;

    for (int i = 0; i < NT; i++) begin
      for (int w = 0; w < 8; w++) tris[i][32*w +: 32] = $urandom;
      @(negedge clk); host_valid = 1; host_item = tris[i];
      @(posedge clk);
      while (!host_ready) @(posedge clk);
      #1 host_valid = 0;
    end
    while (z_got.size() < NT) @(posedge clk);
    repeat (10) @(posedge clk);
    chk(z_got.size() == NT, "item count");
    chk(!overflow_err && !bad_queue_err && !busy, $sformatf("clean finish ovf=%0d bad=%0d busy=%0d", overflow_err, bad_queue_err, busy));
    // single processor and in-order queues: items come out in order
    for (int i = 0; i < NT; i++)
      chk(z_got[i] == transform(tris[i]), $sformatf("triangle %0d", i));
    chk(n_timed == NT, "every transform run timed");
    $display("transform program: %0d instructions, %0d loads, %0d clocks per triangle",
             n_instr, n_loads, 2 + n_instr + n_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

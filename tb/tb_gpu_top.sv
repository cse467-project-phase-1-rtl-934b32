// tb_gpu_top: end-to-end run of the whole GPU at its default sizes.
//
// Four small programs model the four programmable stages of a graphics
// pipeline:
//   queue 0 "transform"  unpacks x and y from r0 (the unpack sequence of the
//                        transformation example), scales them by factors
//                        loaded from data memory, repacks and passes the item
//                        to queue 1;
//   queue 1 "lighting"   adds a light term loaded from memory to r2 and counts
//                        the items it has seen in data memory word 100
//                        (load, add, store), then passes the item to queue 2;
//   queue 2 "projection" uses SETLT predicates to pick a value for r5 and
//                        passes the item to queue 3;
//   queue 3 "raster"     loops by re-queueing itself: each run emits one item
//                        to the z-buffer queue and, while r6 > 0 after a
//                        decrement, puts the rest of the work back on queue 3.
// The host streams triangles into queue 0 as fast as it is allowed, while the
// z-buffer consumer first refuses everything and later takes items at random,
// so queues fill, the scheduler's hold and half-full rules act and the host
// is pushed back.  The expected z-buffer items are worked out by running the
// same programs on the instruction-level reference model; they are compared
// as a multiset, since the order depends on scheduling.  Every mechanism of
// the design is counted and must happen at least once.  A second phase loads
// a faulty lighting program that floods the z-buffer queue and names a
// non-existent queue, and checks that the error flags rise.
module tb_gpu_top;
  import gpu_pkg::*;
  import tb_gpu_ref::*;
  localparam int PD = 256, GW = 4096, QD = 128, ZD = 128, NT = 200;
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
  logic zq_valid, zq_ready = 0;
  logic busy, item_done, zq_hold, overflow_err, bad_queue_err;
  logic [7:0] qcount [NUM_QUEUES];
  logic [7:0] zcount;
  msr_t msr;

  gpu_top dut (.*);
  always #5 clk = ~clk;

  gpu_ref_model ref_m;
  word_t prog [4][$];
  item_t z_got [$];
  item_t z_exp [$];

  // mechanism counters
  int n_pick [4] = '{0, 0, 0, 0};
  int n_hold = 0, n_half_block = 0, n_host_full = 0, n_host_grant = 0, n_pred_off = 0,
      n_ld_wait = 0, n_requeue = 0, n_items = 0, n_zq_stall = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- program text -------------------------------------------------------
  task automatic build_programs();
    foreach (prog[p]) prog[p].delete();
    // transform
    prog[0] = '{enc_r(0, XOR, 8, 8, 8), enc_r(0, OR, 0, 0, 8), enc_i(0, AND, 8, 8, 16'hFFFF),
                enc_r(0, XOR, 9, 9, 9), enc_r(0, OR, 0, 0, 9), enc_i(0, SRL, 9, 9, 16),
                enc_i(0, LDGPMEM, 0, 12, 0), enc_i(0, LDGPMEM, 0, 13, 1),
                enc_r(0, MUL, 8, 12, 8), enc_r(0, MUL, 9, 13, 9),
                enc_i(0, AND, 8, 8, 16'hFFFF), enc_i(0, AND, 9, 9, 16'hFFFF),
                enc_i(0, SLL, 9, 9, 16), enc_r(0, OR, 8, 9, 0),
                enc_i(0, STOREQ, 0, 0, 1), enc_r(0, END, 0, 0, 0)};
    // lighting
    prog[1] = '{enc_i(0, LDGPMEM, 0, 12, 2), enc_r(0, ADD, 2, 12, 2),
                enc_i(0, LDGPMEM, 0, 13, 100), enc_i(0, ADD, 13, 13, 1),
                enc_i(0, STGPMEM, 13, 0, 100),
                enc_i(0, STOREQ, 0, 0, 2), enc_r(0, END, 0, 0, 0)};
    // projection
    prog[2] = '{enc_r(0, SETLT, 3, 4, 1), enc_i(1, LI, 0, 5, 16'd1),
                enc_r(0, SETLT, 4, 3, 2), enc_i(2, LI, 0, 5, 16'hFFFE),
                enc_r(0, SUB, 3, 4, 11), enc_r(0, ADD, 5, 11, 5),
                enc_i(0, STOREQ, 0, 0, 2'd3), enc_r(0, END, 0, 0, 0)};
    // raster: one z item per run, loop by re-queueing
    prog[3] = '{enc_r(0, OR, 6, 6, 4), enc_i(0, STOREQ, 0, 0, 4),
                enc_i(0, SUB, 6, 6, 1), enc_i(0, LI, 0, 11, 0),
                enc_r(0, SETLT, 11, 6, 3), enc_i(3, STOREQ, 0, 0, 3),
                enc_r(0, END, 0, 0, 0)};
  endtask

  task automatic load_programs();
    for (int p = 0; p < 4; p++)
      for (int a = 0; a < PD; a++) begin
        @(negedge clk);
        code_we = 1; code_prog = 2'(p); code_pc = 8'(a);
        code_data = (a < prog[p].size()) ? prog[p][a] : enc_r(0, END, 0, 0, 0);
        ref_m.code[p][a] = code_data;
      end
    @(negedge clk); code_we = 0;
  endtask

  task automatic gp_write(int a, word_t d);
    @(negedge clk); gp_en = 1; gp_we = 1; gp_addr = 12'(a); gp_wdata = d;
    ref_m.mem[a] = d;
    @(negedge clk); gp_en = 0; gp_we = 0;
  endtask

  task automatic gp_read(int a, output word_t d);
    @(negedge clk); gp_en = 1; gp_we = 0; gp_addr = 12'(a);
    @(negedge clk); gp_en = 0; d = gp_rdata;
  endtask

  function automatic item_t triangle(int i);
    item_t t;
    t = '0;
    t[31:0]    = {16'(i * 5 + 3), 16'(i * 7 + 1)};            // (x, y)
    t[63:32]   = {16'h7FFF, 16'(i)};                          // (z, a)
    t[95:64]   = word_t'(i * 11);                             // r2
    t[127:96]  = word_t'($urandom_range(0, 50)) - 32'd25;     // r3
    t[159:128] = word_t'($urandom_range(0, 50)) - 32'd25;     // r4
    t[223:192] = word_t'($urandom_range(0, 2));               // r6: extra loop runs
    t[255:224] = word_t'(i);                                  // r7: id
    return t;
  endfunction

  // reference: run every item to completion, in any order
  task automatic expected_outputs(item_t tri_items [$]);
    emit_t wl [$];
    foreach (tri_items[i]) wl.push_back('{q: 0, item: tri_items[i]});
    while (wl.size() != 0) begin
      emit_t w;
      w = wl.pop_front();
      ref_m.emits.delete();
      chk(ref_m.run(w.q, w.item), "reference reached END");
      foreach (ref_m.emits[k])
        if (ref_m.emits[k].q == 4) z_exp.push_back(ref_m.emits[k].item);
        else wl.push_back(ref_m.emits[k]);
    end
  endtask

  function automatic bit item_lt(item_t a, item_t b);
    return a < b;
  endfunction

  // ---- monitors -------------------------------------------------------------
  always @(posedge clk) if (rst_n) begin
    if (zq_valid && zq_ready) z_got.push_back(zq_data);
    if (zq_valid && !zq_ready) n_zq_stall++;
    if (dut.u_core.idle && dut.pick_valid) n_pick[dut.pick_q]++;
    if (dut.u_core.idle && zq_hold) n_hold++;
    if (dut.u_core.idle && !zq_hold && !dut.pick_valid && busy) n_half_block++;
    if (dut.u_cpu_if.held && dut.u_cpu_if.q0_full) n_host_full++;
    if (dut.host_req && !dut.host_grant) n_host_grant++;
    if (dut.u_core.state == dut.u_core.S_RUN && !dut.u_core.pred_true) n_pred_off++;
    if (dut.u_core.state == dut.u_core.S_LD_WAIT) n_ld_wait++;
    if (dut.core_to_wq && dut.core_wq_num == 3'd3 && msr.queue_src == 2'd3) n_requeue++;
    if (item_done) n_items++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    item_t tris [$];
    word_t d;
    int cyc;
    ref_m = new(PD, GW);
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_programs();
    load_programs();
    gp_write(0, 32'd3);        // x scale
    gp_write(1, 32'd2);        // y scale
    gp_write(2, 32'h100);      // light term
    gp_write(100, 32'd0);      // item counter of the lighting stage

    for (int i = 0; i < NT; i++) tris.push_back(triangle(i));
    expected_outputs(tris);

    // host and z-buffer consumer run concurrently
    fork
      begin
        foreach (tris[i]) begin
          @(negedge clk); host_valid = 1; host_item = tris[i];
          @(posedge clk);
          while (!host_ready) @(posedge clk);
          #1 host_valid = 0;
        end
      end
      begin
        zq_ready = 0;
        // keep the consumer stalled until the whole pipeline has backed up
        for (int c = 0; c < 40000 && n_half_block < 100; c++) @(posedge clk);
        while (z_got.size() < z_exp.size()) begin
          @(negedge clk); zq_ready = ($urandom_range(0, 1) == 1);
        end
        @(negedge clk); zq_ready = 0;
      end
    join
    cyc = 0;
    while (busy && cyc < 1000) begin @(posedge clk); cyc++; end
    chk(!busy, "drained");
    chk(zcount == 0 && !zq_valid, "z-buffer queue drained");
    chk(!overflow_err && !bad_queue_err, "no error flags");

    // compare outputs as a multiset
    chk(z_got.size() == z_exp.size(), $sformatf("z items %0d expected %0d", z_got.size(), z_exp.size()));
    z_got.sort(); z_exp.sort();
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < z_got.size() && i < z_exp.size(); i++) if (z_got[i] != z_exp[i]) bad++;
      chk(bad == 0, $sformatf("%0d z items differ", bad));
    end
    gp_read(100, d);
    chk(d == word_t'(NT), $sformatf("lighting counter %0d", d));
    chk(d == ref_m.mem[100], "counter matches the reference");

    // ---- phase 2: a faulty lighting program ---------------------------------
    prog[1] = '{enc_i(0, STOREQ, 0, 0, 7)};
    for (int k = 0; k < 13; k++) prog[1].push_back(enc_i(0, STOREQ, 0, 0, 4));
    prog[1].push_back(enc_r(0, END, 0, 0, 0));
    load_programs();
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); host_valid = 1; host_item = tris[i];
      @(posedge clk);
      while (!host_ready) @(posedge clk);
      #1 host_valid = 0;
    end
    cyc = 0;
    while (busy && cyc < 5000) begin @(posedge clk); cyc++; end
    chk(bad_queue_err, "bad queue flagged");
    chk(overflow_err, "overflow flagged");
    chk(int'(zcount) == ZD, "z-buffer queue full");

    $display("picks q0..q3 = %0d %0d %0d %0d, hold=%0d half-block=%0d host-full=%0d host-grant=%0d",
             n_pick[0], n_pick[1], n_pick[2], n_pick[3], n_hold, n_half_block, n_host_full, n_host_grant);
    $display("pred-off=%0d ld-wait=%0d requeue=%0d items=%0d zq-stall=%0d z-items=%0d",
             n_pred_off, n_ld_wait, n_requeue, n_items, n_zq_stall, z_got.size());
    chk(n_pick[0] > 0 && n_pick[1] > 0 && n_pick[2] > 0 && n_pick[3] > 0, "every queue scheduled");
    chk(n_hold > 0, "z-buffer queue hold happened");
    chk(n_half_block > 0, "half-full rule blocked a queue");
    chk(n_host_full > 0, "host waited on a full queue 0");
    chk(n_host_grant > 0, "host lost the write port to the processor");
    chk(n_pred_off > 0, "predicated-off instruction");
    chk(n_ld_wait > 0, "load wait");
    chk(n_requeue > 0, "loop by re-queueing");
    chk(n_zq_stall > 0, "z-buffer consumer stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

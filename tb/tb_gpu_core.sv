// tb_gpu_core: runs random predicated programs on the processor and compares
// everything it does with the instruction-level reference model: the queue
// writes (number and 256-bit item), the final data memory contents, the
// status register, bad queue numbers and the cycle count (one clock per
// instruction issued plus one per load executed).  The code and data memories
// are modelled here with the same one-clock read latency as the RTL ones.
module tb_gpu_core;
  import gpu_pkg::*;
  import tb_gpu_ref::*;
  localparam int PD = 256, GW = 4096;
  int checks = 0, failures = 0;
  int tot_loads = 0, tot_skips = 0, tot_emits = 0, tot_bad = 0;
  logic clk = 0, rst_n = 0;
  logic dispatch = 0, item_valid = 0;
  logic [1:0] dispatch_q = 0;
  item_t item = '0;
  logic idle, done, imem_en, dmem_en, dmem_we, wq_en, bad_queue;
  logic [1:0] imem_prog;
  logic [7:0] imem_pc;
  word_t imem_data, dmem_wdata, dmem_rdata;
  logic [11:0] dmem_addr;
  logic [2:0] wq_num;
  item_t wq_data;
  msr_t msr;

  gpu_core #(.PROG_DEPTH(PD), .GP_WORDS(GW), .PROC_NUM(8'h03)) dut (.*);
  always #5 clk = ~clk;

  gpu_ref_model ref_m;
  word_t code [4][PD];
  word_t mem [GW];

  always_ff @(posedge clk) begin
    if (imem_en) imem_data <= code[imem_prog][imem_pc];
    if (dmem_en && !dmem_we) dmem_rdata <= mem[dmem_addr];
    if (dmem_en && dmem_we) mem[dmem_addr] <= dmem_wdata;
  end

  emit_t got [$];
  int    bad_seen;
  always @(posedge clk) begin
    if (wq_en) got.push_back('{q: int'(wq_num), item: wq_data});
    if (bad_queue) bad_seen++;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t rand_instr();
    logic [4:0] ops [12] = '{ADD, SUB, MUL, SRL, SLL, AND, NOT, XOR, OR, NAND, LI, SETLT};
    int k;
    logic [1:0] p;
    p = ($urandom_range(0, 2) == 0) ? 2'($urandom) : 2'd0;
    k = $urandom_range(0, 19);
    if (k < 12) begin
      if ($urandom_range(0, 1) == 0)
        return enc_r(p, ops[k], 4'($urandom), 4'($urandom), 4'($urandom));
      return enc_i(p, ops[k], 4'($urandom), 4'($urandom), 16'($urandom));
    end
    case (k)
      12, 13: return $urandom_range(0, 1) ? enc_r(p, LDGPMEM, 4'($urandom), 0, 4'($urandom))
                                          : enc_i(p, LDGPMEM, 0, 4'($urandom), 16'($urandom_range(0, 63)));
      14, 15: return $urandom_range(0, 1) ? enc_r(p, STGPMEM, 4'($urandom), 4'($urandom), 0)
                                          : enc_i(p, STGPMEM, 4'($urandom), 0, 16'($urandom_range(0, 63)));
      16, 17: return enc_i(p, STOREQ, 0, 0, 16'($urandom_range(0, 5)));
      18:     return enc_r(p, STOREQ, 4'($urandom), 0, 0);
      default: return enc_r(p == 0 ? 2'd1 : p, END, 0, 0, 0);  // a conditional early end
    endcase
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_m = new(PD, GW);
    ref_m.proc_num = 8'h03;
    for (int i = 0; i < GW; i++) begin mem[i] = word_t'(i * 3 + 1); ref_m.mem[i] = mem[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      // fresh random programs
      for (int p = 0; p < 4; p++) begin
        int len;
        len = $urandom_range(1, 80);
        for (int i = 0; i < PD; i++) begin
          code[p][i] = (i < len) ? rand_instr() : enc_r(0, END, 0, 0, 0);
          ref_m.code[p][i] = code[p][i];
        end
      end
      for (int n = 0; n < 10; n++) begin
        int q, t0, t1, exp_cycles;
        bit ok;
        q = $urandom_range(0, 3);
        for (int i = 0; i < 8; i++) item[32*i +: 32] = (i % 2) ? $urandom : $urandom_range(0, 40);
        ref_m.emits.delete();
        ok = ref_m.run(q, item);
        chk(ok, "model reached END");
        got.delete(); bad_seen = 0;
        @(negedge clk);
        chk(idle, "idle before dispatch");
        dispatch = 1; dispatch_q = 2'(q);
        @(negedge clk);
        dispatch = 0; item_valid = 1;
        t0 = $time / 10;
        @(negedge clk);
        item_valid = 0;
        while (!done) @(negedge clk);
        t1 = $time / 10;
        exp_cycles = ref_m.issued + ref_m.loads;
        chk(t1 - t0 == exp_cycles, $sformatf("cycles %0d expected %0d", t1 - t0, exp_cycles));
        @(negedge clk);
        chk(idle, "idle after END");
        chk(got.size() == ref_m.emits.size(), $sformatf("emit count %0d vs %0d", got.size(), ref_m.emits.size()));
        for (int i = 0; i < got.size() && i < ref_m.emits.size(); i++)
          chk(got[i].q == ref_m.emits[i].q && got[i].item == ref_m.emits[i].item, $sformatf("emitted item %0d q%0d/%0d\n%h\n%h", i, got[i].q, ref_m.emits[i].q, got[i].item, ref_m.emits[i].item));
        chk(bad_seen == int'(ref_m.bad_q), "bad queue count");
        chk(msr.instr_count == 16'(ref_m.issued) && msr.queue_src == 2'(q) && msr.proc_num == 8'h03, "msr");
        tot_loads += ref_m.loads; tot_skips += ref_m.skipped; tot_emits += got.size(); tot_bad += bad_seen;
      end
      begin
        int bad;
        bad = 0;
        for (int i = 0; i < GW; i++) if (mem[i] != ref_m.mem[i]) bad++;
        chk(bad == 0, $sformatf("data memory, %0d words differ", bad));
      end
    end
    $display("loads=%0d skipped=%0d emits=%0d bad=%0d", tot_loads, tot_skips, tot_emits, tot_bad);
    chk(tot_loads > 0 && tot_skips > 0 && tot_emits > 0 && tot_bad > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

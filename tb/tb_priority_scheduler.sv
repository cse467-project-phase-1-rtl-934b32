// tb_priority_scheduler: random and corner-case queue occupancies; the
// expected pick is worked out here from the priority rules, written as a
// table of (condition on downstream queue, source queue) pairs.
module tb_priority_scheduler;
  import gpu_pkg::*;
  localparam int D = 128, ZD = 128, R = 8;
  localparam int CW = $clog2(D + 1), ZCW = $clog2(ZD + 1);
  int checks = 0, failures = 0;
  int hits [6];
  logic enable = 1;
  logic [CW-1:0] qcount [NUM_QUEUES];
  logic [ZCW-1:0] zcount;
  logic pick_valid, zq_hold;
  logic [1:0] pick_q;

  priority_scheduler #(.DEPTH(D), .ZQ_DEPTH(ZD), .RESERVE(R)) dut (.*);

  // expected: -1 for idle
  function automatic int expected(int qc [4], int zc, bit en, output bit hold);
    int down [4];
    hold = (zc >= ZD - R);
    if (hold || !en) return -1;
    // queue k may run if the queue it feeds is under half full
    down[3] = (zc * 2 < ZD) ? 1 : 0;
    down[2] = (qc[3] * 2 < D) ? 1 : 0;
    down[1] = (qc[2] * 2 < D) ? 1 : 0;
    down[0] = (qc[1] * 2 < D) ? 1 : 0;
    for (int k = 3; k >= 0; k--) if (down[k] == 1 && qc[k] > 0) return k;
    return -1;
  endfunction

  function automatic int pick_count(int mode);
    case (mode)
      0: return 0;
      1: return $urandom_range(1, 3);
      2: return $urandom_range(D / 2 - 2, D / 2 + 1);
      default: return $urandom_range(0, D);
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int qc [4]; int zc, e; bit h;
      for (int k = 0; k < 4; k++) begin qc[k] = pick_count($urandom_range(0, 3)); qcount[k] = CW'(qc[k]); end
      case ($urandom_range(0, 3))
        0: zc = $urandom_range(ZD - R - 1, ZD);
        1: zc = $urandom_range(ZD / 2 - 1, ZD / 2);
        default: zc = $urandom_range(0, ZD);
      endcase
      zcount = ZCW'(zc);
      enable = ($urandom_range(0, 9) != 0);
      #1;
      e = expected(qc, zc, enable, h);
      checks++;
      if (zq_hold != h || pick_valid != (e >= 0) || (e >= 0 && int'(pick_q) != e)) begin
        failures++;
        $display("FAIL q=%0d,%0d,%0d,%0d z=%0d en=%0d got v=%0d q=%0d hold=%0d exp %0d",
                 qc[0], qc[1], qc[2], qc[3], zc, enable, pick_valid, pick_q, zq_hold, e);
      end
      hits[e + 1]++;
      if (h) hits[5]++;
    end
    for (int i = 0; i < 6; i++) begin checks++; if (hits[i] == 0) begin failures++; $display("FAIL case %0d never hit", i); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gpu_ref: testbench-side helpers for the GPU.
//
// * enc_r / enc_i build instruction words (register form and constant form)
//   straight from the field layout, without the RTL package.
// * class gpu_ref_model is an instruction-level model of the processor: given
//   the four programs and a data memory image it runs one work item to END and
//   records every STOREQ (queue number and 256-bit item), the number of
//   instructions issued and the number of loads executed.  It is written
//   independently of the RTL and serves as the reference for the core and
//   top-level testbenches.
package tb_gpu_ref;

  // opcode numbers
  localparam logic [4:0] LDGPMEM = 0, STGPMEM = 1, MUL = 2, ADD = 3, SUB = 4,
                         SRL = 5, SLL = 6, AND = 7, NOT = 8, XOR = 9, OR = 10,
                         NAND = 11, LI = 12, SETLT = 13, STOREQ = 14, END = 15;

  function automatic logic [31:0] enc_r(input logic [1:0] p, input logic [4:0] op,
                                        input logic [3:0] r1, input logic [3:0] r2,
                                        input logic [3:0] r3);
    return {p, 1'b0, op, r1, r2, r3, 12'h000};
  endfunction

  function automatic logic [31:0] enc_i(input logic [1:0] p, input logic [4:0] op,
                                        input logic [3:0] r1, input logic [3:0] rd,
                                        input logic [15:0] imm);
    return {p, 1'b1, op, r1, rd, imm};
  endfunction

  typedef struct {
    int unsigned     q;
    logic [255:0]    item;
  } emit_t;

  class gpu_ref_model;
    int unsigned  prog_depth;
    int unsigned  mem_words;
    logic [31:0]  code [4][];
    logic [31:0]  mem [];
    emit_t        emits [$];
    int unsigned  issued;   // instructions issued for the last item
    int unsigned  loads;    // loads executed for the last item
    int unsigned  skipped;  // instructions whose predicate was false
    int unsigned  bad_q;    // STOREQs with a queue number above 4
    logic [7:0]   proc_num = 8'h00;

    function new(int unsigned pd, int unsigned mw);
      prog_depth = pd;
      mem_words  = mw;
      for (int p = 0; p < 4; p++) begin
        code[p] = new[pd];
        foreach (code[p][i]) code[p][i] = 32'h0;
      end
      mem = new[mw];
      foreach (mem[i]) mem[i] = 32'h0;
    endfunction

    // Run one item of queue q; return 0 if END was not reached in max_steps.
    function automatic bit run(int unsigned q, logic [255:0] item, int unsigned max_steps = 10000);
      logic [31:0] r [16];
      bit          pr [4];
      int unsigned pc;
      logic [31:0] ins, a, b, imm_s, imm_z, imm, res;
      logic [1:0]  pn;
      bit          ifm;
      logic [4:0]  op;
      logic [3:0]  f1, f2, f3, dst;
      issued = 0; loads = 0; skipped = 0; bad_q = 0;
      for (int i = 0; i < 16; i++) r[i] = (i < 8) ? item[32*i +: 32] : 32'h0;
      for (int i = 0; i < 4; i++) pr[i] = 1;
      pc = 0;
      for (int step = 0; step < max_steps; step++) begin
        ins = code[q][pc];
        pn  = ins[31:30]; ifm = ins[29]; op = ins[28:24];
        f1  = ins[23:20]; f2 = ins[19:16]; f3 = ins[15:12];
        imm_z = {16'h0, ins[15:0]};
        imm_s = {{16{ins[15]}}, ins[15:0]};
        // r15 is the status register
        r[15] = {16'(issued), proc_num, 2'b00, 2'(q), pr[3], pr[2], pr[1], 1'b1};
        issued++;
        pc = (pc + 1) % prog_depth;
        if (!pr[pn]) begin skipped++; continue; end
        imm = (op inside {ADD, SUB, MUL, LI, SETLT}) ? imm_s : imm_z;
        a   = r[f1];
        b   = ifm ? imm : r[f2];
        dst = ifm ? f2 : f3;
        res = 32'h0;
        case (op)
          MUL: res = a * b;
          ADD: res = a + b;
          SUB: res = a - b;
          SRL: res = a >> b[4:0];
          SLL: res = a << b[4:0];
          AND: res = a & b;
          NOT: res = ~a;
          XOR: res = a ^ b;
          OR:  res = a | b;
          NAND: res = ~(a & b);
          LI:  res = b;
          default: ;
        endcase
        case (op)
          MUL, ADD, SUB, SRL, SLL, AND, NOT, XOR, OR, NAND, LI:
            if (dst != 15) r[dst] = res;
          LDGPMEM: begin
            loads++;
            if (dst != 15) r[dst] = mem[(ifm ? imm : a) % mem_words];
          end
          STGPMEM: mem[b % mem_words] = a;
          SETLT: if (dst[1:0] != 0) pr[dst[1:0]] = ($signed(a) < $signed(b));
          STOREQ: begin
            logic [31:0] qn;
            qn = ifm ? imm : a;
            if (qn <= 4) emits.push_back('{q: qn, item: {r[7], r[6], r[5], r[4], r[3], r[2], r[1], r[0]}});
            else bad_q++;
          end
          END: return 1;
          default: ;
        endcase
      end
      return 0;
    endfunction
  endclass

endpackage

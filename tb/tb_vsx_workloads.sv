// tb_vsx_workloads: the two ML inner loops VSX targets, run on vsx_top with
// a behavioural one-instruction-per-cycle core.
//
//   dot  : acc += a[i] * b[i]          (SVM, fully-connected and convolution
//                                       layers)
//   dist : acc += (a[i] - b[i])^2      (k-nearest-neighbour, GLVQ distances)
//
// The dot-product kernel is swept over the fraction of elements similar to
// the first element of their line (0 % .. 100 %) with two spatial
// distributions: random (each element of each array independently) and
// contiguous (the first elements of every line, in both arrays). Each case
// runs with VSX off and with VSX and all fast-forward routines on; the
// approximate result, the cycle count and the executed loads are compared
// with an algorithm-level reference, and the speedups are printed. At 60 %
// similarity the contiguous distribution must be faster than the random one,
// since it gives longer runs of asserted VSBs.
//
// The distance kernel has a compute (SUB) that depends on both loads and a
// second compute (MUL) that depends on the first: when both loads are
// similar, four regions in a row are skipped, one more than the ISU follows
// in a cycle, so the chain resumes in the next cycle; one run without
// fast-forward routines shows this.
//
// The float dot product (Code-1 style, single-precision data) repeats the
// sweep with the comparator in floating-point mode. Its core model computes
// FMUL and FADD in double precision and rounds to single; the reference does
// the same in the same order, so results are compared bit for bit.
//
// Finally the gain is split by mechanism: skipping loads only (compute
// entries turned into USE entries), then also computes, then also
// iterations. Executed loads, executed computes and fast-forwarded
// iterations are checked against the reference, and skip rates printed.
`timescale 1ns/1ps
module tb_vsx_workloads;
  import vsx_pkg::*;

  logic clk = 0, rst_n = 0, enable = 0, clear = 0;
  logic                        sbst_we = 0, ffr_we = 0;
  logic [ID_W-1:0]             sbst_idx = '0;
  sbst_entry_t                 sbst_entry = '0;
  logic [RL_W-1:0]             ffr_len = '0;
  logic [ADDR_W-1:0]           ffr_pc = '0;
  logic                        if_valid = 0;
  logic [ADDR_W-1:0]           if_pc = '0;
  logic                        if_fetch_valid;
  logic [ADDR_W-1:0]           if_fetch_pc;
  vsx_tag_t                    if_tag;
  logic [2:0]                  if_skip_cnt;
  logic                        if_ff;
  logic [RL_W-1:0]             if_ff_len;
  vsx_tag_t                    id_tag = '0;
  logic [XLEN-1:0]             id_rs_rf = '0, id_rt_rf = '0, id_rs, id_rt;
  logic                        mem_valid = 0, mem_is_load = 0, mem_iter_end = 0;
  vsx_tag_t                    mem_tag = '0;
  logic [ADDR_W-1:0]           mem_addr = '0;
  logic [N_ELEM-1:0][XLEN-1:0] mem_line = '0;
  logic [XLEN-1:0]             mem_result = '0;
  logic                        wb_valid = 0;
  logic [REG_W-1:0]            wb_reg = '0;
  logic [ADDR_W-1:0]           wb_value = '0;
  logic [NREGS-1:0]            srf;
  logic [RL_W-1:0]             rl_min;
  logic [NUM_SBST-1:0]         sst;
  logic                        vsb_gen;
  logic [N_ELEM-1:0]           vsb_gen_bits;
  logic                        rb_save, save_iter;

  vsx_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- IEEE-754 single helpers ----------------
  // Normal numbers and zero only; conversion from double rounds to nearest
  // even. A product or sum of two singles computed in double and rounded
  // here is what a single-precision FPU returns for the values used.
  function automatic real f2r(input logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(input real x);
    logic [63:0] d;
    logic [23:0] m;
    int          e;
    if (x == 0.0) return 32'd0;
    d = $realtobits(x);
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, d[51:29]};
    if (d[28:0] > 29'h1000_0000 || (d[28:0] == 29'h1000_0000 && m[0])) m = m + 24'd1;
    if (m[23]) begin m = '0; e = e + 1; end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic int fmul(int x, int y);
    return int'(r2f(f2r(x) * f2r(y)));
  endfunction

  function automatic int fadd(int x, int y);
    return int'(r2f(f2r(x) + f2r(y)));
  endfunction

  // ---------------- programs ----------------
  typedef enum logic [3:0] {OP_LD, OP_MUL, OP_ADD, OP_SUB, OP_ADDI, OP_SLLI, OP_BLT, OP_J,
                            OP_FMUL, OP_FADD, OP_FCVT} op_e;
  typedef struct {
    op_e  op;
    logic halt;
    int   rd, rs1, rs2;
    int   imm;
  } ins_t;

  localparam int unsigned LOOP = 32'h000, DONE = 32'h040, FFR = 32'h100, TAIL = 32'h200;
  localparam int unsigned A_BASE = 32'h1000, B_BASE = 32'h2000;
  localparam int NLINES = 16, N = NLINES * 8;
  localparam int TH = 3;
  localparam real TH_F = 0.05;         // threshold of the float kernel

  int cur_kern;                         // kernel being run

  ins_t prog [256];

  function automatic ins_t mk(op_e op, int rd, int rs1, int rs2, int imm);
    ins_t i;
    i.op = op; i.halt = 0; i.rd = rd; i.rs1 = rs1; i.rs2 = rs2; i.imm = imm;
    return i;
  endfunction

  // kernel 0: dot product, 8 instructions per iteration, result in x8
  // kernel 1: squared distance, 9 instructions per iteration, result in x8
  // kernel 2: dot product on single-precision data (FMUL, FADD); its
  //           fast-forward routines convert the run length with FCVT
  task automatic load_program(int kern);
    int p;
    for (int i = 0; i < 256; i++) begin prog[i] = mk(OP_ADD, 0, 0, 0, 0); prog[i].halt = 1; end
    p = LOOP >> 2;
    prog[p++] = mk(OP_LD, 5, 10, 0, 0);
    prog[p++] = mk(OP_LD, 6, 11, 0, 0);
    if (kern == 0) begin
      prog[p++] = mk(OP_MUL, 16, 5, 6, 0);
    end else if (kern == 2) begin
      prog[p++] = mk(OP_FMUL, 16, 5, 6, 0);
    end else begin
      prog[p++] = mk(OP_SUB, 7, 5, 6, 0);
      prog[p++] = mk(OP_MUL, 16, 7, 7, 0);
    end
    prog[p++] = mk((kern == 2) ? OP_FADD : OP_ADD, 8, 8, 16, 0);
    prog[p++] = mk(OP_ADDI, 10, 10, 0, 4);
    prog[p++] = mk(OP_ADDI, 11, 11, 0, 4);
    prog[p++] = mk(OP_ADDI, 12, 12, 0, 1);
    prog[p++] = mk(OP_BLT,  0, 12, 13, LOOP);
    prog[p]   = mk(OP_J, 0, 0, 0, DONE);
    for (int r = 1; r < 8; r++) begin
      p = (FFR >> 2) + 4 * r;
      prog[p++] = mk(OP_ADDI, 9, 0, 0, r);
      if (kern == 2) prog[p++] = mk(OP_FCVT, 17, 9, 0, 0);
      prog[p]   = mk(OP_J, 0, 0, 0, TAIL);
    end
    p = TAIL >> 2;
    if (kern == 2) begin
      prog[p++] = mk(OP_FMUL, 14, 16, 17, 0); // r * saved result
      prog[p++] = mk(OP_FADD, 8, 8, 14, 0);
    end else begin
      prog[p++] = mk(OP_MUL,  14, 16, 9, 0);
      prog[p++] = mk(OP_ADD,  8, 8, 14, 0);
    end
    prog[p++] = mk(OP_SLLI, 15, 9, 0, 2);
    prog[p++] = mk(OP_ADD,  10, 10, 15, 0);
    prog[p++] = mk(OP_ADD,  11, 11, 15, 0);
    prog[p++] = mk(OP_ADD,  12, 12, 9, 0);
    prog[p++] = mk(OP_BLT,  0, 12, 13, LOOP);
    prog[p]   = mk(OP_J,    0, 0, 0, DONE);
  endtask

  task automatic cfg_entry(int idx, sbst_entry_t e);
    sbst_we = 1; sbst_idx = ID_W'(idx); sbst_entry = e;
    @(posedge clk); #1;
    sbst_we = 0;
  endtask

  // SBST: 0 LD1, 1 LD2, 2 first compute, [3 MUL of dist], ACC (USE),
  // FF on the loop head, tail MUL (USE) reading the last compute's RB slot.
  task automatic configure(int kern, logic ff_en, logic cp_en);
    sbst_entry_t e;
    int last, n;
    clear = 1; @(posedge clk); #1; clear = 0;
    e = '0; e.valid = 1; e.next_pc = LOOP; e.typ = SB_LD; e.nskip = 1; e.ptr_reg = 10;
    e.cond_srf = 1; e.th_fp = (kern == 2);
    e.threshold = (kern == 2) ? r2f(TH_F) : TH;                cfg_entry(0, e);
    e.next_pc = LOOP + 4; e.ptr_reg = 11;                      cfg_entry(1, e);
    e = '0; e.valid = 1; e.next_pc = LOOP + 8; e.typ = cp_en ? SB_CP : SB_USE; e.nskip = 1;
    e.rs_valid = 1; e.rs_id = 0; e.rt_valid = 1; e.rt_id = 1; e.cond_rs = 1; e.cond_rt = 1;
                                                               cfg_entry(2, e);
    last = 2; n = 3;
    if (kern == 1) begin
      e = '0; e.valid = 1; e.next_pc = LOOP + 12; e.typ = cp_en ? SB_CP : SB_USE; e.nskip = 1;
      e.rs_valid = 1; e.rs_id = 2; e.rt_valid = 1; e.rt_id = 2; e.cond_rs = 1;
                                                               cfg_entry(3, e);
      last = 3; n = 4;
    end
    e = '0; e.valid = 1; e.next_pc = LOOP + 32'(4 * n); e.typ = SB_USE;
    e.rt_valid = 1; e.rt_id = ID_W'(last);                     cfg_entry(n, e);
    e = '0; e.valid = 1; e.next_pc = LOOP; e.typ = SB_FF;      cfg_entry(n + 1, e);
    e = '0; e.valid = 1; e.next_pc = TAIL; e.typ = SB_USE;
    e.rs_valid = 1; e.rs_id = ID_W'(last);                     cfg_entry(n + 2, e);
    for (int q = 1; q < 8 && ff_en; q++) begin
      ffr_we = 1; ffr_len = RL_W'(q); ffr_pc = FFR + 32'(16 * q);
      @(posedge clk); #1;
      ffr_we = 0;
    end
  endtask

  // ---------------- data ----------------
  int a [N];
  int b [N];

  function automatic int far_from(int v0);
    return v0 + (($urandom_range(0, 1) == 1) ? 1 : -1) * $urandom_range(TH + 1, 60);
  endfunction

  // float data: element 0 in [1, 4); similar elements within 0.8 TH_F of
  // it, the others at least 1.6 TH_F away, so that no value lies near the
  // threshold where the comparator's truncation could decide differently
  function automatic int f_near(int v0);
    return int'(r2f(f2r(v0) + real'(int'($urandom_range(0, 80)) - 40) / 1000.0));
  endfunction

  function automatic int f_far(int v0);
    return int'(r2f(f2r(v0) + (($urandom_range(0, 1) == 1) ? 1.0 : -1.0)
                              * real'($urandom_range(80, 600)) / 1000.0));
  endfunction

  // pct: share of elements 1..7 similar to element 0; contig: layout
  task automatic make_data(int pct, logic contig);
    for (int l = 0; l < NLINES; l++) begin
      int a0, b0, m;
      a0 = $urandom_range(100, 400);
      b0 = $urandom_range(100, 400);
      if (cur_kern == 2) begin
        a0 = int'(r2f(1.0 + real'($urandom_range(0, 3000)) / 1000.0));
        b0 = int'(r2f(1.0 + real'($urandom_range(0, 3000)) / 1000.0));
      end
      m  = (pct * 7 + 50) / 100;
      a[l * 8] = a0; b[l * 8] = b0;
      for (int k = 1; k < 8; k++) begin
        logic sa, sb;
        if (contig) begin sa = (k <= m); sb = (k <= m); end
        else begin
          sa = ($urandom_range(0, 99) < pct);
          sb = ($urandom_range(0, 99) < pct);
        end
        if (cur_kern == 2) begin
          a[l * 8 + k] = sa ? f_near(a0) : f_far(a0);
          b[l * 8 + k] = sb ? f_near(b0) : f_far(b0);
        end else begin
          a[l * 8 + k] = sa ? a0 + $urandom_range(0, 2 * TH) - TH : far_from(a0);
          b[l * 8 + k] = sb ? b0 + $urandom_range(0, 2 * TH) - TH : far_from(b0);
        end
      end
    end
  endtask

  function automatic logic similar(int v, int v0);
    real d;
    if (cur_kern == 2) begin
      d = f2r(v) - f2r(v0);
      return ((d < 0.0) ? -d : d) <= TH_F;
    end
    return ((v > v0) ? v - v0 : v0 - v) <= TH;
  endfunction

  function automatic int f(int kern, int va, int vb);
    return (kern == 2) ? fmul(va, vb) : (kern == 0) ? va * vb : (va - vb) * (va - vb);
  endfunction

  // accumulator step of each kernel
  function automatic longint acc_add(int kern, longint acc, int v);
    return (kern == 2) ? longint'(fadd(int'(acc), v)) : acc + longint'(v);
  endfunction

  // value of the accumulator for printing
  function automatic real acc_val(int kern, longint acc);
    return (kern == 2) ? f2r(int'(acc)) : real'(acc);
  endfunction

  // ---------------- reference ----------------
  typedef struct {
    longint acc;
    int cycles, ld_exec;
    int cp_exec;                       // computes executed in the loop body
    int ff_iters;                      // iterations replaced by routines
  } result_t;

  function automatic result_t reference(int kern, logic vsx, logic ff_en, logic cp_en);
    result_t r;
    int body;
    int ffc, ncp;
    body = (kern == 1) ? 9 : 8;
    ncp  = (kern == 1) ? 2 : 1;       // computes per iteration
    ffc  = (kern == 2) ? 10 : 9;      // routine and tail instructions
    r = '{default: 0};
    for (int l = 0; l < NLINES; l++) begin
      int k, saved;
      k = 0;
      while (k < 8) begin
        int i;
        i = l * 8 + k;
        if (!vsx || k == 0) begin
          r.acc = acc_add(kern, r.acc, f(kern, a[i], b[i]));
          r.cycles += body; r.ld_exec += 2; r.cp_exec += ncp;
          saved = f(kern, a[i], b[i]);
          k++;
        end else begin
          int ra, rb, rl, sk;
          logic sa, sb;
          ra = 0; while (k + ra < 8 && similar(a[i + ra], a[l * 8])) ra++;
          rb = 0; while (k + rb < 8 && similar(b[i + rb], b[l * 8])) rb++;
          rl = (ra < rb) ? ra : rb;
          if (ff_en && rl > 0) begin
            r.acc = acc_add(kern, r.acc, (kern == 2) ? fmul(int'(r2f(real'(rl))), saved)
                                                     : rl * saved);
            r.cycles += ffc;
            r.ff_iters += rl;
            k += rl;
          end else begin
            sa = similar(a[i], a[l * 8]);
            sb = similar(b[i], b[l * 8]);
            r.acc = acc_add(kern, r.acc, (sa && sb) ? saved
                            : f(kern, sa ? a[l * 8] : a[i], sb ? b[l * 8] : b[i]));
            sk = int'(sa) + int'(sb) + ((cp_en && sa && sb) ? ncp : 0);
            r.cp_exec += (cp_en && sa && sb) ? 0 : ncp;
            r.cycles += body - sk + ((sk > 3) ? 1 : 0);
            r.ld_exec += 2 - int'(sa) - int'(sb);
            k++;
          end
        end
      end
    end
    r.cycles += 2;                     // exit jump and HALT fetch
    return r;
  endfunction

  // ---------------- core model ----------------
  int          regs [32];
  logic [31:0] pc;
  int          n_resume;

  function automatic int rd_mem(logic [31:0] addr);
    if (addr >= A_BASE && addr < A_BASE + 4 * N) return a[(addr - A_BASE) >> 2];
    if (addr >= B_BASE && addr < B_BASE + 4 * N) return b[(addr - B_BASE) >> 2];
    return 0;
  endfunction

  task automatic run(input int kern, input logic vsx, input logic ff_en, input logic cp_en,
                     output result_t res);
    int guard;
    logic halted;
    res = '{default: 0};
    enable = vsx;
    configure(kern, ff_en, cp_en);
    for (int r = 0; r < 32; r++) regs[r] = 0;
    regs[10] = A_BASE; regs[11] = B_BASE; regs[13] = N;
    for (int r = 10; r <= 13; r++) begin
      wb_valid = 1; wb_reg = REG_W'(r); wb_value = regs[r];
      @(posedge clk); #1;
    end
    wb_valid = 0;
    pc = LOOP;
    halted = 0;
    guard = 0;
    while (!halted && guard < 50000) begin
      ins_t in;
      vsx_tag_t t;
      int op1, op2, result;
      logic [31:0] nxt, addr;
      logic wr;
      guard++;
      if_valid = 1; if_pc = pc;
      mem_valid = 0; mem_is_load = 0; mem_iter_end = 0; wb_valid = 0; id_tag = '0;
      #1;
      res.cycles++;
      if (if_ff) res.ff_iters += int'(if_ff_len);
      if (!if_fetch_valid) begin
        n_resume++;
        @(posedge clk); #1;
        pc = if_fetch_pc;
        continue;
      end
      in = prog[if_fetch_pc[9:2]];
      t  = if_tag;
      if (in.halt) begin halted = 1; break; end
      if (if_fetch_pc < DONE && in.op inside {OP_MUL, OP_FMUL, OP_SUB}) res.cp_exec++;
      id_tag = t; id_rs_rf = regs[in.rs1]; id_rt_rf = regs[in.rs2];
      #1;
      op1 = id_rs; op2 = id_rt;
      nxt = if_fetch_pc + 4; wr = 0; result = 0; addr = '0;
      case (in.op)
        OP_LD:   begin addr = op1; result = rd_mem(addr); wr = 1; res.ld_exec++; end
        OP_MUL:  begin result = op1 * op2; wr = 1; end
        OP_ADD:  begin result = op1 + op2; wr = 1; end
        OP_SUB:  begin result = op1 - op2; wr = 1; end
        OP_ADDI: begin result = op1 + in.imm; wr = 1; end
        OP_SLLI: begin result = op1 << in.imm; wr = 1; end
        OP_FMUL: begin result = fmul(op1, op2); wr = 1; end
        OP_FADD: begin result = fadd(op1, op2); wr = 1; end
        OP_FCVT: begin result = int'(r2f(real'(op1))); wr = 1; end
        OP_BLT:  if (op1 < op2) nxt = in.imm;
        OP_J:    nxt = in.imm;
        default: ;
      endcase
      mem_valid = 1; mem_is_load = (in.op == OP_LD); mem_tag = t; mem_addr = addr;
      for (int e = 0; e < 8; e++) mem_line[e] = rd_mem({addr[31:5], 5'b0} + 32'(4 * e));
      mem_result = result; mem_iter_end = (in.op == OP_BLT);
      wb_valid = wr && in.rd != 0; wb_reg = REG_W'(in.rd); wb_value = result;
      @(posedge clk); #1;
      if (wr && in.rd != 0) regs[in.rd] = result;
      pc = nxt;
    end
    if_valid = 0; mem_valid = 0; wb_valid = 0;
    check("program halted", halted);
    res.acc = longint'(regs[8]);
  endtask

  task automatic one_case(int kern, int pct, logic contig, logic ff_en, output real speedup);
    result_t off, on, e_off, e_on;
    cur_kern = kern;
    make_data(pct, contig);
    run(kern, 0, ff_en, 1'b1, off);
    run(kern, 1, ff_en, 1'b1, on);
    e_off = reference(kern, 0, ff_en, 1'b1);
    e_on  = reference(kern, 1, ff_en, 1'b1);
    check("exact result with VSX off", int'(off.acc) == int'(e_off.acc) && off.cycles == e_off.cycles);
    check("approximate result", int'(on.acc) == int'(e_on.acc));
    check($sformatf("cycles with VSX (%0d, reference %0d)", on.cycles, e_on.cycles),
          on.cycles == e_on.cycles);
    check("executed loads", on.ld_exec == e_on.ld_exec);
    check("executed computes", on.cp_exec == e_on.cp_exec);
    check("fast-forwarded iterations", on.ff_iters == e_on.ff_iters);
    speedup = real'(off.cycles) / real'(on.cycles);
    $display("%s%s %-10s similarity %3d%%: cycles %5d -> %5d, speedup %4.2f, loads %3d of %3d, rel. error %7.4f%%",
             kern == 0 ? "dot " : kern == 1 ? "dist" : "fdot", ff_en ? "    " : " (no FF)", contig ? "contiguous" : "random", pct,
             off.cycles, on.cycles, speedup, on.ld_exec, 2 * N,
             100.0 * (acc_val(kern, on.acc) - acc_val(kern, off.acc)) / acc_val(kern, off.acc));
  endtask

  // Speedup and skip rates with skipping limited to loads, then loads and
  // computes, then also iterations, each against the reference.
  task automatic breakdown(int kern, int pct, logic contig);
    result_t off, r [3], e;
    real sp [3];
    string nm [3];
    nm = '{"loads", "+computes", "+iterations"};
    cur_kern = kern;
    make_data(pct, contig);
    run(kern, 0, 1'b0, 1'b1, off);
    for (int m = 0; m < 3; m++) begin
      run(kern, 1, m == 2, m != 0, r[m]);
      e = reference(kern, 1, m == 2, m != 0);
      check($sformatf("breakdown %s: result, cycles, loads, computes, FF iterations", nm[m]),
            int'(r[m].acc) == int'(e.acc) && r[m].cycles == e.cycles && r[m].ld_exec == e.ld_exec
            && r[m].cp_exec == e.cp_exec && r[m].ff_iters == e.ff_iters);
      sp[m] = real'(off.cycles) / real'(r[m].cycles);
      $display("%s %-10s %3d%% skip %-11s: speedup %4.2f, loads skipped %5.1f%%, computes skipped %5.1f%%, iterations fast-forwarded %5.1f%%",
               kern == 0 ? "dot " : kern == 1 ? "dist" : "fdot", contig ? "contiguous" : "random", pct, nm[m], sp[m],
               100.0 * real'(off.ld_exec - r[m].ld_exec) / real'(off.ld_exec),
               100.0 * real'(off.cp_exec - r[m].cp_exec) / real'(off.cp_exec),
               100.0 * real'(r[m].ff_iters) / real'(N));
    end
    check("skipping computes adds to skipping loads", sp[1] >= sp[0]);
    if (contig && pct >= 80) check("fast-forwarding adds to skipping computes", sp[2] > sp[1]);
  endtask

  initial begin
    real s, s_rand60, s_cont60;
    n_resume = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    load_program(0);
    for (int c = 0; c < 2; c++)
      for (int pct = 0; pct <= 100; pct += 20) begin
        one_case(0, pct, c == 1, 1'b1, s);
        if (pct == 60 && c == 0) s_rand60 = s;
        if (pct == 60 && c == 1) s_cont60 = s;
      end
    check("contiguous similarity beats random at 60%", s_cont60 > s_rand60);
    load_program(1);
    for (int pct = 0; pct <= 100; pct += 50) one_case(1, pct, 1'b0, 1'b1, s);
    one_case(1, 60, 1'b1, 1'b1, s);
    one_case(1, 80, 1'b0, 1'b0, s);
    load_program(2);
    for (int c = 0; c < 2; c++)
      for (int pct = 0; pct <= 100; pct += 20) begin
        one_case(2, pct, c == 1, 1'b1, s);
        if (pct == 60 && c == 0) s_rand60 = s;
        if (pct == 60 && c == 1) s_cont60 = s;
      end
    check("float kernel: contiguous similarity beats random at 60%", s_cont60 > s_rand60);
    breakdown(2, 80, 1'b1);
    breakdown(2, 60, 1'b0);
    load_program(1);
    breakdown(1, 80, 1'b1);
    $display("fetch cycles resumed after a full skip chain: %0d", n_resume);
    check("skip chain longer than one cycle happened", n_resume > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vsx_top: end-to-end test of the VSX unit on a dot-product kernel.
//
// The testbench contains a small behavioural core that executes one
// instruction per cycle (IF, ID, MEM and WB of the same instruction in one
// cycle) and uses vsx_top at every stage: the fetch PC goes through the
// Instruction Skip Unit, operands through the Result Reuse Controller, loads
// present their cache line to the VSB Generator, and every register write
// reaches the VSB Selector. The kernel is
//
//   loop: LD   x5, 0(x10)      SBST 0: LD, REG x10, skip if SRF[x10]
//         LD   x6, 0(x11)      SBST 1: LD, REG x11, skip if SRF[x11]
//         MUL  x7, x5, x6      SBST 2: CP, RS=0 RT=1, skip if both skipped
//         ADD  x8, x8, x7      SBST 3: USE, RT=2 (Buf_MUL when MUL skipped)
//         ADDI x10, x10, 4 ; ADDI x11, x11, 4 ; ADDI x12, x12, 1
//         BLT  x12, x13, loop  (loop-closing branch)
//         HALT
//   SBST 4: FF entry on `loop`. Fast-forward routine r: x9 = r, then a
//   shared tail adds r * Buf_MUL (SBST 5: USE, RS=2) to x8 and advances the
//   pointers and the counter by r.
//
// Eight lines of each array hold different similarity patterns. The kernel
// runs four times: VSX off, skipping without fast-forward routines, all
// routines 1..7, and routines 1, 2, 4 only. An algorithm-level reference
// gives the approximate dot product, the cycle count and the number of
// executed loads, VSB generations and fast-forwards for each run. The test
// also counts how often each mechanism (load skip, compute skip, operand
// reuse, chained skips, fast-forward, a whole similar line replaced by the
// 7-iteration routine, shorter-routine fallback, SRF set,
// pointer leaving its line, SaveResultIter cleared) happened and fails if
// any never did. The top has no parameters, so this runs at full size.
`timescale 1ns/1ps
module tb_vsx_top;
  import vsx_pkg::*;

  // ---------------- DUT ----------------
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
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- program ----------------
  typedef enum logic [2:0] {OP_LD, OP_MUL, OP_ADD, OP_ADDI, OP_SLLI, OP_BLT, OP_J, OP_HALT} op_e;
  typedef struct {
    op_e op;
    int  rd, rs1, rs2;
    int  imm;            // immediate or absolute branch target
  } ins_t;

  localparam int unsigned LOOP = 32'h000, DONE = 32'h020, FFR = 32'h100, TAIL = 32'h200;
  localparam int unsigned A_BASE = 32'h1000, B_BASE = 32'h2000;
  localparam int NLINES = 8, N = NLINES * 8;
  localparam int TH = 5;

  ins_t prog [256];

  function automatic ins_t mk(op_e op, int rd, int rs1, int rs2, int imm);
    ins_t i;
    i.op = op; i.rd = rd; i.rs1 = rs1; i.rs2 = rs2; i.imm = imm;
    return i;
  endfunction

  task automatic load_program();
    for (int i = 0; i < 256; i++) prog[i] = mk(OP_HALT, 0, 0, 0, 0);
    prog[(LOOP >> 2) + 0] = mk(OP_LD,   5, 10, 0, 0);
    prog[(LOOP >> 2) + 1] = mk(OP_LD,   6, 11, 0, 0);
    prog[(LOOP >> 2) + 2] = mk(OP_MUL,  7, 5, 6, 0);
    prog[(LOOP >> 2) + 3] = mk(OP_ADD,  8, 8, 7, 0);
    prog[(LOOP >> 2) + 4] = mk(OP_ADDI, 10, 10, 0, 4);
    prog[(LOOP >> 2) + 5] = mk(OP_ADDI, 11, 11, 0, 4);
    prog[(LOOP >> 2) + 6] = mk(OP_ADDI, 12, 12, 0, 1);
    prog[(LOOP >> 2) + 7] = mk(OP_BLT,  0, 12, 13, LOOP);
    prog[DONE >> 2]       = mk(OP_HALT, 0, 0, 0, 0);
    for (int r = 1; r < 8; r++) begin
      prog[(FFR >> 2) + 2 * r]     = mk(OP_ADDI, 9, 0, 0, r);
      prog[(FFR >> 2) + 2 * r + 1] = mk(OP_J,    0, 0, 0, TAIL);
    end
    prog[(TAIL >> 2) + 0] = mk(OP_MUL,  14, 7, 9, 0);
    prog[(TAIL >> 2) + 1] = mk(OP_ADD,  8, 8, 14, 0);
    prog[(TAIL >> 2) + 2] = mk(OP_SLLI, 15, 9, 0, 2);
    prog[(TAIL >> 2) + 3] = mk(OP_ADD,  10, 10, 15, 0);
    prog[(TAIL >> 2) + 4] = mk(OP_ADD,  11, 11, 15, 0);
    prog[(TAIL >> 2) + 5] = mk(OP_ADD,  12, 12, 9, 0);
    prog[(TAIL >> 2) + 6] = mk(OP_BLT,  0, 12, 13, LOOP);
    prog[(TAIL >> 2) + 7] = mk(OP_J,    0, 0, 0, DONE);
  endtask

  // ---------------- data ----------------
  int a [N];
  int b [N];

  function automatic int near(int v);
    return v + $urandom_range(0, 2 * TH) - TH;
  endfunction

  task automatic make_data();
    for (int l = 0; l < NLINES; l++) begin
      int a0, b0;
      a0 = $urandom_range(100, 1000);
      b0 = $urandom_range(100, 1000);
      for (int k = 0; k < 8; k++) begin
        int i;
        logic sa, sb;
        i = l * 8 + k;
        case (l)
          0: begin sa = 0; sb = 0; end                         // nothing similar
          1: begin sa = 1; sb = 0; end                         // only a similar
          2: begin sa = 1; sb = 1; end                         // whole line: FF7
          3: begin sa = (k <= 4); sb = 1; end                  // run 4
          4: begin sa = (k <= 5); sb = (k <= 2); end           // run 2
          5: begin sa = (k % 2 == 1); sb = 1; end              // alternating
          6: begin sa = (k != 6); sb = (k != 6); end           // run 5, then run 1
          default: begin sa = ($urandom_range(0, 1) == 1); sb = ($urandom_range(0, 2) != 0); end
        endcase
        if (k == 0) begin a[i] = a0; b[i] = b0; end
        else begin
          a[i] = sa ? near(a0) : a0 + (($urandom_range(0, 1) == 1) ? 1 : -1) * $urandom_range(TH + 1, 90);
          b[i] = sb ? near(b0) : b0 + (($urandom_range(0, 1) == 1) ? 1 : -1) * $urandom_range(TH + 1, 90);
        end
      end
    end
  endtask

  function automatic logic similar(int v, int v0);
    return ((v > v0) ? v - v0 : v0 - v) <= TH;
  endfunction

  // ---------------- reference ----------------
  typedef struct {
    longint acc;
    int cycles, ld_exec, gens, ffs, saves;
  } result_t;

  function automatic result_t reference(logic vsx, logic [7:0] ffmask);
    result_t r;
    r = '{acc: 0, cycles: 0, ld_exec: 0, gens: 0, ffs: 0, saves: 0};
    for (int l = 0; l < NLINES; l++) begin
      int k, bufmul;
      k = 0;
      while (k < 8) begin
        int i;
        i = l * 8 + k;
        if (!vsx || k == 0) begin
          r.acc += longint'(a[i] * b[i]);
          r.cycles += 8; r.ld_exec += 2;
          if (vsx) begin bufmul = a[i] * b[i]; r.gens += 2; r.saves += 3; end
          k++;
        end else begin
          int ra, rb, rl, best;
          logic sa, sb;
          ra = 0; while (k + ra < 8 && similar(a[i + ra], a[l * 8])) ra++;
          rb = 0; while (k + rb < 8 && similar(b[i + rb], b[l * 8])) rb++;
          rl = (ra < rb) ? ra : rb;
          best = 0;
          for (int q = 1; q < 8; q++) if (ffmask[q] && q <= rl) best = q;
          if (best > 0) begin
            r.acc += longint'(best) * longint'(bufmul);
            r.cycles += 9; r.ffs++;
            k += best;
          end else begin
            int va, vb, skipped;
            sa = similar(a[i], a[l * 8]);
            sb = similar(b[i], b[l * 8]);
            va = sa ? a[l * 8] : a[i];
            vb = sb ? b[l * 8] : b[i];
            r.acc += (sa && sb) ? longint'(bufmul) : longint'(va * vb);
            skipped = int'(sa) + int'(sb) + int'(sa && sb);
            r.cycles += 8 - skipped;
            r.ld_exec += 2 - int'(sa) - int'(sb);
            k++;
          end
        end
      end
    end
    // the last iteration ends in the FF tail needs its extra jump to DONE
    r.cycles += 1;                                         // HALT fetch
    return r;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_ff7;
  int n_ld_skip, n_cp_skip, n_reuse, n_chain3, n_ff, n_ff_short, n_srf, n_leave,
      n_sri_clear, n_gen, n_save;

  // ---------------- core model ----------------
  int          regs [32];
  logic [31:0] pc;

  function automatic int rd_mem(logic [31:0] addr);
    if (addr >= A_BASE && addr < A_BASE + 4 * N) return a[(addr - A_BASE) >> 2];
    if (addr >= B_BASE && addr < B_BASE + 4 * N) return b[(addr - B_BASE) >> 2];
    return 0;
  endfunction

  task automatic cfg_entry(int idx, sbst_entry_t e);
    sbst_we = 1; sbst_idx = ID_W'(idx); sbst_entry = e;
    @(posedge clk); #1;
    sbst_we = 0;
  endtask

  task automatic configure(logic [7:0] ffmask);
    sbst_entry_t e;
    clear = 1; @(posedge clk); #1; clear = 0;
    e = '0; e.valid = 1; e.next_pc = LOOP;      e.typ = SB_LD; e.nskip = 1; e.ptr_reg = 10;
    e.cond_srf = 1; e.threshold = TH;                                cfg_entry(0, e);
    e.next_pc = LOOP + 4; e.ptr_reg = 11;                            cfg_entry(1, e);
    e = '0; e.valid = 1; e.next_pc = LOOP + 8;  e.typ = SB_CP; e.nskip = 1;
    e.rs_valid = 1; e.rs_id = 0; e.rt_valid = 1; e.rt_id = 1; e.cond_rs = 1; e.cond_rt = 1;
                                                                     cfg_entry(2, e);
    e = '0; e.valid = 1; e.next_pc = LOOP + 12; e.typ = SB_USE; e.rt_valid = 1; e.rt_id = 2;
                                                                     cfg_entry(3, e);
    e = '0; e.valid = 1; e.next_pc = LOOP;      e.typ = SB_FF;       cfg_entry(4, e);
    e = '0; e.valid = 1; e.next_pc = TAIL;      e.typ = SB_USE; e.rs_valid = 1; e.rs_id = 2;
                                                                     cfg_entry(5, e);
    for (int q = 1; q < 8; q++)
      if (ffmask[q]) begin
        ffr_we = 1; ffr_len = RL_W'(q); ffr_pc = FFR + 32'(8 * q);
        @(posedge clk); #1;
        ffr_we = 0;
      end
  endtask

  task automatic run(input logic vsx, input logic [7:0] ffmask, output result_t res);
    int guard;
    logic halted;
    logic prev_sri;
    res = '{acc: 0, cycles: 0, ld_exec: 0, gens: 0, ffs: 0, saves: 0};
    enable = vsx;
    configure(ffmask);
    for (int r = 0; r < 32; r++) regs[r] = 0;
    regs[10] = A_BASE; regs[11] = B_BASE; regs[13] = N;
    // the initial pointer values reach the selector like any register write
    for (int r = 10; r <= 13; r++) begin
      wb_valid = 1; wb_reg = REG_W'(r); wb_value = regs[r];
      @(posedge clk); #1;
    end
    wb_valid = 0;
    pc = LOOP;
    halted = 0;
    guard = 0;
    prev_sri = save_iter;
    while (!halted && guard < 20000) begin
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
      if (if_ff) begin
        res.ffs++; n_ff++;
        if (if_ff_len < rl_min) n_ff_short++;
        if (if_ff_len == 3'd7) n_ff7++;
      end
      if (if_skip_cnt == 3) n_chain3++;
      if (!if_fetch_valid) begin
        @(posedge clk); #1;
        pc = if_fetch_pc;
        continue;
      end
      in = prog[if_fetch_pc[9:2]];
      t  = if_tag;
      if (in.op == OP_HALT) begin halted = 1; if_valid = 0; break; end
      if (t.rs_reuse || t.rt_reuse) n_reuse++;
      // ID
      id_tag = t; id_rs_rf = regs[in.rs1]; id_rt_rf = regs[in.rs2];
      #1;
      op1 = id_rs; op2 = id_rt;
      // EX / MEM
      nxt = if_fetch_pc + 4; wr = 0; result = 0; addr = '0;
      case (in.op)
        OP_LD:   begin addr = op1; result = rd_mem(addr); wr = 1; res.ld_exec++; end
        OP_MUL:  begin result = op1 * op2; wr = 1; end
        OP_ADD:  begin result = op1 + op2; wr = 1; end
        OP_ADDI: begin result = op1 + in.imm; wr = 1; end
        OP_SLLI: begin result = op1 << in.imm; wr = 1; end
        OP_BLT:  if (op1 < op2) nxt = in.imm;
        OP_J:    nxt = in.imm;
        default: ;
      endcase
      mem_valid = 1; mem_is_load = (in.op == OP_LD); mem_tag = t; mem_addr = addr;
      for (int e = 0; e < 8; e++) mem_line[e] = rd_mem({addr[31:5], 5'b0} + 32'(4 * e));
      mem_result = result; mem_iter_end = (in.op == OP_BLT);
      wb_valid = wr && in.rd != 0; wb_reg = REG_W'(in.rd); wb_value = result;
      #1;
      if (vsb_gen) begin res.gens++; n_gen++; end
      if (rb_save) begin res.saves++; n_save++; end
      @(posedge clk); #1;
      if (wr && in.rd != 0) regs[in.rd] = result;
      if (wb_valid && (in.rd == 10 || in.rd == 11)) begin
        if (srf[in.rd]) n_srf++;
        if (vsx && wb_value[4:0] == 5'd0 && !srf[in.rd]) n_leave++;   // entered a new line
      end
      if (prev_sri && !save_iter) n_sri_clear++;
      prev_sri = save_iter;
      pc = nxt;
    end
    if_valid = 0; mem_valid = 0; wb_valid = 0;
    check("program halted", halted);
    res.acc = longint'(regs[8]);
  endtask

  // ---------------- test ----------------
  initial begin
    result_t got, exp;
    int cyc_off, cyc_skip, cyc_ff;
    n_ld_skip = 0; n_cp_skip = 0; n_reuse = 0; n_chain3 = 0; n_ff = 0; n_ff_short = 0; n_ff7 = 0;
    n_srf = 0; n_leave = 0; n_sri_clear = 0; n_gen = 0; n_save = 0;
    load_program();
    make_data();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int m = 0; m < 4; m++) begin
      logic vsx;
      logic [7:0] mask;
      vsx  = (m != 0);
      mask = (m == 2) ? 8'hFE : (m == 3) ? 8'b0001_0110 : 8'h00;
      run(vsx, mask, got);
      exp = reference(vsx, mask);
      $display("run %0d: acc=%0d (ref %0d) cycles=%0d (ref %0d) loads=%0d (ref %0d) ff=%0d (ref %0d)",
               m, got.acc, exp.acc, got.cycles, exp.cycles, got.ld_exec, exp.ld_exec,
               got.ffs, exp.ffs);
      check($sformatf("run %0d dot product", m), int'(got.acc) == int'(exp.acc));
      check($sformatf("run %0d cycles", m), got.cycles == exp.cycles + ((m >= 2) ? n_tail_exit(mask) : 0));
      check($sformatf("run %0d executed loads", m), got.ld_exec == exp.ld_exec);
      check($sformatf("run %0d VSB generations", m), got.gens == exp.gens);
      check($sformatf("run %0d RB saves", m), got.saves == exp.saves);
      check($sformatf("run %0d fast-forwards", m), got.ffs == exp.ffs);
      if (m == 0) begin
        longint exact;
        exact = 0;
        for (int i = 0; i < N; i++) exact += longint'(a[i] * b[i]);
        check("VSX off is exact", int'(got.acc) == int'(exact));
        cyc_off = got.cycles;
      end
      if (m == 1) begin
        cyc_skip = got.cycles;
        n_ld_skip = 2 * N - got.ld_exec;
      end
      if (m == 2) cyc_ff = got.cycles;
    end
    n_cp_skip = n_chain3;
    $display("cycles: off %0d, skipping %0d, with fast-forward %0d", cyc_off, cyc_skip, cyc_ff);
    check("skipping is faster", cyc_skip < cyc_off);
    check("fast-forward is faster", cyc_ff < cyc_skip);
    $display("mechanisms: load skips %0d, compute skips %0d, operand reuse %0d, 3-region chains %0d,",
             n_ld_skip, n_cp_skip, n_reuse, n_chain3);
    $display("  fast-forwards %0d (shorter routine %0d), SRF set %0d, pointer left line %0d,",
             n_ff, n_ff_short, n_srf, n_leave);
    $display("  SaveResultIter cleared %0d, VSB generations %0d, RB saves %0d",
             n_sri_clear, n_gen, n_save);
    check("load skip happened", n_ld_skip > 0);
    check("compute skip happened", n_cp_skip > 0);
    check("operand reuse happened", n_reuse > 0);
    check("fast-forward happened", n_ff > 0);
    check("a whole similar line fast-forwarded by the 7-iteration routine", n_ff7 > 0);
    check("shorter-routine fallback happened", n_ff_short > 0);
    check("SRF set happened", n_srf > 0);
    check("pointer leaving its line happened", n_leave > 0);
    check("SaveResultIter clear happened", n_sri_clear > 0);
    check("VSB generation happened", n_gen > 0);
    check("RB save happened", n_save > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A run whose last iterations are fast-forwarded leaves the loop through the
  // tail's final jump, one cycle more than leaving through the loop branch.
  function automatic int n_tail_exit(logic [7:0] mask);
    int k, l, rl, ra, rb, best;
    l = NLINES - 1;
    k = 0;
    while (k < 8) begin
      if (k == 0) begin k++; continue; end
      ra = 0; while (k + ra < 8 && similar(a[l * 8 + k + ra], a[l * 8])) ra++;
      rb = 0; while (k + rb < 8 && similar(b[l * 8 + k + rb], b[l * 8])) rb++;
      rl = (ra < rb) ? ra : rb;
      best = 0;
      for (int q = 1; q < 8; q++) if (mask[q] && q <= rl) best = q;
      if (best > 0 && k + best == 8) return 1;
      k += (best > 0) ? best : 1;
    end
    return 0;
  endfunction
endmodule

// tb_isu: self-checking test of the Instruction Skip Unit.
//
// The SBST is loaded through the configuration port with the dot-product
// example (LD1, LD2 skippable on their SRF bit, MUL skippable when both loads
// were skipped, ACC reading MUL through the Result Buffer, an FF entry on the
// loop head) and FFR routines for run lengths 1, 2, 4 and 7. Directed
// iterations check load skipping, compute skipping, a chain of three skipped
// regions in one cycle, operand-reuse tags, the fast-forward jump with the longest routine not
// above the run length, and the SST update on a fast-forward. A random phase
// then drives random SRF, run lengths and PCs against a reference model of
// the table, the SST and the skip conditions.
`timescale 1ns/1ps
module tb_isu;
  import vsx_pkg::*;

  logic clk = 0, rst_n = 0, enable = 1, clear = 0;
  logic               cfg_we = 0, ffr_we = 0;
  logic [ID_W-1:0]    cfg_idx = '0;
  sbst_entry_t        cfg_entry = '0;
  logic [RL_W-1:0]    ffr_len = '0, rl_min = '0;
  logic [ADDR_W-1:0]  ffr_pc = '0, lookup_pc = '0;
  logic               lookup_valid = 0;
  logic [NREGS-1:0]   srf = '0;
  logic               fetch_valid, ff;
  logic [ADDR_W-1:0]  fetch_pc;
  logic [2:0]         skip_cnt;
  logic [RL_W-1:0]    ff_len;
  vsx_tag_t           tag;
  logic [NUM_SBST-1:0] sst;

  int checks = 0, failures = 0;

  isu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sbst_entry_t       m_tab [NUM_SBST];
  logic              m_ffv [N_ELEM];
  logic [31:0]       m_ffpc[N_ELEM];
  logic [NUM_SBST-1:0] m_sst;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr_entry(input int i, input sbst_entry_t e);
    cfg_we = 1; cfg_idx = ID_W'(i); cfg_entry = e;
    @(posedge clk); #1;
    cfg_we = 0;
    m_tab[i] = e;
  endtask

  task automatic wr_ffr(input int len, input logic [31:0] pc);
    ffr_we = 1; ffr_len = RL_W'(len); ffr_pc = pc;
    @(posedge clk); #1;
    ffr_we = 0;
    m_ffv[len] = 1; m_ffpc[len] = pc;
  endtask

  function automatic sbst_entry_t ent(input logic [31:0] pc, input sb_type_e typ,
                                      input int nskip, input int preg,
                                      input logic rsv, input int rsi,
                                      input logic rtv, input int rti,
                                      input logic cs, input logic cr, input logic ct);
    sbst_entry_t e;
    e = '0;
    e.valid = 1; e.next_pc = pc; e.typ = typ; e.nskip = NSKIP_W'(nskip);
    e.ptr_reg = REG_W'(preg); e.rs_valid = rsv; e.rs_id = ID_W'(rsi);
    e.rt_valid = rtv; e.rt_id = ID_W'(rti);
    e.cond_srf = cs; e.cond_rs = cr; e.cond_rt = ct;
    e.threshold = 32'(preg * 3 + 1);
    return e;
  endfunction

  // Reference for one fetch cycle: follows the chain of up to CHAIN searches,
  // checks the outputs, clocks, and updates m_sst.
  localparam int CHAIN = 4;
  task automatic lookup(input logic [31:0] pc);
    int hi, fi, best, cnt;
    logic done, ffd, cond;
    logic [31:0] cur;
    logic [NUM_SBST-1:0] sstw;
    vsx_tag_t et;
    sbst_entry_t e;
    cur = pc; done = 0; ffd = 0; cnt = 0; sstw = m_sst; et = '0;
    best = 0;
    for (int r = 1; r < N_ELEM; r++) if (m_ffv[r] && r <= int'(rl_min)) best = r;
    for (int step = 0; step < CHAIN && !done; step++) begin
      hi = -1; fi = -1;
      for (int i = NUM_SBST - 1; i >= 0; i--)
        if (m_tab[i].valid && m_tab[i].next_pc == cur) begin
          if (m_tab[i].typ == SB_FF) fi = i; else hi = i;
        end
      if (!enable) begin
        done = 1;
      end else if (fi >= 0 && !ffd && best > 0) begin
        ffd = 1;
        for (int i = 0; i < NUM_SBST; i++)
          if (m_tab[i].valid && (m_tab[i].typ == SB_LD || m_tab[i].typ == SB_CP)) sstw[i] = 1;
        cur = m_ffpc[best];
      end else begin
        cond = 0;
        if (hi >= 0) begin
          e = m_tab[hi];
          cond = (e.typ == SB_LD || e.typ == SB_CP) &&
                 (e.cond_srf || e.cond_rs || e.cond_rt) && e.nskip != 0;
          if (e.cond_srf && !srf[e.ptr_reg]) cond = 0;
          if (e.cond_rs && !sstw[e.rs_id]) cond = 0;
          if (e.cond_rt && !sstw[e.rt_id]) cond = 0;
        end
        if (cond) begin
          cnt++;
          if (e.typ == SB_LD || e.typ == SB_CP) sstw[hi] = 1;
          cur = cur + 32'(e.nskip) * 4;
        end else begin
          done = 1;
          if (hi >= 0) begin
            et.vsx = 1; et.id = ID_W'(hi); et.typ = e.typ; et.ptr_reg = e.ptr_reg;
            et.th_fp = e.th_fp; et.threshold = e.threshold;
            et.rs_reuse = e.rs_valid && sstw[e.rs_id]; et.rs_id = e.rs_id;
            et.rt_reuse = e.rt_valid && sstw[e.rt_id]; et.rt_id = e.rt_id;
            if (e.typ == SB_LD || e.typ == SB_CP) sstw[hi] = 0;
          end
        end
      end
    end
    lookup_pc = pc; lookup_valid = 1;
    #1;
    check($sformatf("fetch_valid pc=%h", pc), fetch_valid == done);
    check($sformatf("fetch_pc pc=%h", pc), fetch_pc == cur);
    check($sformatf("skip_cnt pc=%h", pc), int'(skip_cnt) == cnt);
    check($sformatf("ff pc=%h", pc), ff == ffd);
    if (ffd) check("ff_len", int'(ff_len) == best);
    check($sformatf("tag pc=%h", pc), tag == et);
    @(posedge clk); #1;
    lookup_valid = 0;
    m_sst = sstw;
    check("sst", sst == m_sst);
  endtask

  localparam logic [31:0] LOOP = 32'h100;
  initial begin
    for (int i = 0; i < NUM_SBST; i++) m_tab[i] = '0;
    for (int r = 0; r < N_ELEM; r++) begin m_ffv[r] = 0; m_ffpc[r] = '0; end
    m_sst = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // dot product: 0x100 LD1 (a in x10), 0x104 LD2 (b in x11), 0x108 MUL,
    // 0x10c ACC, then pointer updates and branch.
    wr_entry(0, ent(LOOP + 0, SB_LD, 1, 10, 0, 0, 0, 0, 1, 0, 0));
    wr_entry(1, ent(LOOP + 4, SB_LD, 1, 11, 0, 0, 0, 0, 1, 0, 0));
    wr_entry(2, ent(LOOP + 8, SB_CP, 1, 0, 1, 0, 1, 1, 0, 1, 1));
    wr_entry(3, ent(LOOP + 12, SB_USE, 0, 0, 0, 0, 1, 2, 0, 0, 0));
    wr_entry(4, ent(LOOP + 0, SB_FF, 0, 0, 0, 0, 0, 0, 0, 0, 0));
    wr_ffr(1, 32'h400); wr_ffr(2, 32'h440); wr_ffr(4, 32'h480); wr_ffr(7, 32'h4c0);
    // iteration 0: nothing similar, every instruction fetched
    srf = '0; rl_min = 0;
    lookup(LOOP + 0); check("it0 LD1 fetched", fetch_pc == LOOP && skip_cnt == 0);
    lookup(LOOP + 4); lookup(LOOP + 8); lookup(LOOP + 12);
    // iteration 1: only a similar -> LD1 skipped, LD2 fetched in the same cycle
    srf[10] = 1;
    lookup(LOOP + 0); check("it1 LD1 skipped", fetch_pc == LOOP + 4 && skip_cnt == 1);
    lookup(LOOP + 8); check("it1 MUL fetched, rs from RB", tag.rs_reuse && !tag.rt_reuse);
    lookup(LOOP + 12); check("it1 ACC reg operand", !tag.rt_reuse);
    // iteration 2: both similar -> LD1, LD2, MUL skipped; ACC fetched, reuses
    srf[11] = 1;
    lookup(LOOP + 0);
    check("it2 three regions skipped", fetch_pc == LOOP + 12 && skip_cnt == 3);
    check("it2 ACC reuses Buf_MUL", tag.rt_reuse && tag.rt_id == 2);
    // fast-forward with runs 7, 5, 3, 1 -> routines 7, 4, 2, 1
    rl_min = 7; lookup(LOOP); check("ff7", ff && fetch_pc == 32'h4c0);
    check("ff marks loads and MUL skipped", sst[2:0] == 3'b111);
    rl_min = 5; lookup(LOOP); check("ff5 -> routine 4", ff && ff_len == 4);
    rl_min = 3; lookup(LOOP); check("ff3 -> routine 2", ff && fetch_pc == 32'h440);
    rl_min = 1; lookup(LOOP); check("ff1", ff && fetch_pc == 32'h400);
    rl_min = 0; srf = '0; lookup(LOOP); check("no ff at run 0", !ff && skip_cnt == 0);
    // disabled unit is transparent
    enable = 0; srf = '1; rl_min = 7;
    lookup(LOOP); check("disabled", !ff && skip_cnt == 0 && !tag.vsx && fetch_pc == LOOP);
    enable = 1;
    // random phase
    for (int t = 0; t < 3000; t++) begin
      if (t % 200 == 0) begin
        for (int i = 0; i < NUM_SBST; i++) begin
          sb_type_e ty;
          ty = sb_type_e'($urandom_range(0, 3));
          wr_entry(i, ent(LOOP + 32'($urandom_range(0, 11)) * 4, ty, $urandom_range(0, 3),
                          $urandom_range(0, 31), $urandom_range(0, 1) == 1, $urandom_range(0, 7),
                          $urandom_range(0, 1) == 1, $urandom_range(0, 7),
                          $urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1,
                          $urandom_range(0, 1) == 1));
        end
      end
      if (t % 200 == 100) wr_ffr($urandom_range(1, 7), LOOP + 32'($urandom_range(0, 11)) * 4);
      srf = $urandom;
      rl_min = RL_W'($urandom_range(0, 7));
      enable = ($urandom_range(0, 15) != 0);
      lookup(LOOP + 32'($urandom_range(0, 11)) * 4);
    end
    enable = 1;
    clear = 1; @(posedge clk); #1; clear = 0;
    m_sst = '0;
    for (int i = 0; i < NUM_SBST; i++) m_tab[i].valid = 1'b0;
    for (int r = 0; r < N_ELEM; r++) m_ffv[r] = 1'b0;
    check("clear sst", sst == '0);
    lookup(LOOP); check("cleared table misses", !tag.vsx && !ff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

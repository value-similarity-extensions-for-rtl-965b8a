// isu: Instruction Skip Unit (SBST, Skip Status Table, Instruction Skip
// Controller, FFR table).
//
// Each cycle the fetch unit presents the PC it intends to fetch. The
// Instruction Skip Controller (ISC) searches the SBST with it and, on a hit,
// evaluates the entry's SkipCond:
//   * cond_srf : the SRF bit of the entry's pointer register (REG) is set,
//                i.e. the load's element is similar to an already loaded one;
//   * cond_rs/cond_rt : the Skip Status Table (SST) records the producer of
//                operand rs/rt (SBST.RS/RT) as skipped.
// All selected conditions must hold (an entry with none selected is never
// skipped). Only LD and CP entries are skippable; a USE entry (a consumer
// that reads saved results) and an FF entry (a loop head) never are. A skipped region is not fetched: the PC advances by 4*#Skip and
// the search continues at the new PC in the same cycle, up to CHAIN searches,
// so that a run of skippable regions (LD1, LD2, MUL in a dot product) costs
// no fetch cycle. Each LD or CP region met records its outcome in SST[ID],
// visible to the later searches of the same cycle.
//
// Iteration fast-forwarding: when a searched PC also matches an FF entry and
// the run-length detector reports r >= 1 coming iterations in which every
// tracked load is similar, and the FFR table has a routine of length <= r,
// the PC jumps to that routine (at most once per cycle) and the chain
// continues there. The iterations replaced would have skipped every tracked
// load and every compute depending on them, so all LD and CP entries are
// marked skipped in the SST; the routine reads their saved results through
// RS/RT.
//
// Outputs: `fetch_valid`/`fetch_pc` name the instruction actually fetched
// this cycle, with its `tag` (SBST.ID, type, pointer register, threshold, and
// whether each operand comes from the Result Buffer). If CHAIN searches all
// skip, nothing is fetched and the fetch unit resumes at `fetch_pc`.
// `skip_cnt` counts regions skipped this cycle, `ff`/`ff_len` report a
// fast-forward.
//
// Timing: combinational from `lookup_pc` and registered state; the SST
// updates at the clock edge when `lookup_valid` is high (fetch accepted).
// `enable` low makes the unit transparent. The SBST/SST/ISC structure, the
// SkipCond sources, the #Skip advance and the FFR jump follow the design;
// the chained search, the AND of conditions and the SST update on a
// fast-forward are this design's choices.
module isu
  import vsx_pkg::*;
#(
  parameter int unsigned CHAIN = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               clear,
  // SBST-LD configuration
  input  logic               cfg_we,
  input  logic [ID_W-1:0]    cfg_idx,
  input  sbst_entry_t        cfg_entry,
  input  logic               ffr_we,
  input  logic [RL_W-1:0]    ffr_len,
  input  logic [ADDR_W-1:0]  ffr_pc,
  // fetch
  input  logic               lookup_valid,
  input  logic [ADDR_W-1:0]  lookup_pc,
  input  logic [NREGS-1:0]   srf,
  input  logic [RL_W-1:0]    rl_min,
  output logic               fetch_valid,
  output logic [ADDR_W-1:0]  fetch_pc,
  output vsx_tag_t           tag,
  output logic [2:0]         skip_cnt,
  output logic               ff,
  output logic [RL_W-1:0]    ff_len,
  output logic [NUM_SBST-1:0] sst
);

  sbst_entry_t [NUM_SBST-1:0]   tab;
  sbst_hit_t                    res0;
  logic [NUM_SBST-1:0]          ld_cp_mask;
  logic                         ffr_valid;
  logic [RL_W-1:0]              ffr_sel_len;
  logic [ADDR_W-1:0]            ffr_sel_pc;
  logic [NUM_SBST-1:0]          sst_q;

  sbst u_sbst (
    .clk, .rst_n, .clear,
    .cfg_we, .cfg_idx, .cfg_entry,
    .search_pc  (lookup_pc),
    .search_res (res0),
    .tab,
    .ld_cp_mask
  );

  ffr_table u_ffr (
    .clk, .rst_n, .clear,
    .cfg_we   (ffr_we),
    .cfg_len  (ffr_len),
    .cfg_pc   (ffr_pc),
    .rl       (rl_min),
    .sel_valid(ffr_valid),
    .sel_len  (ffr_sel_len),
    .sel_pc   (ffr_sel_pc)
  );

  // Instruction Skip Controller: a chain of CHAIN search stages. Stage i
  // takes the PC, SST and progress left by stage i-1.
  typedef struct packed {
    logic                done;      // an instruction has been chosen
    logic [ADDR_W-1:0]   pc;        // PC to search next / chosen PC
    logic [NUM_SBST-1:0] sst;       // SST including this cycle's outcomes
    vsx_tag_t            tag;
    logic [2:0]          cnt;
    logic                ff;
    logic [RL_W-1:0]     ff_len;
  } chain_t;

  chain_t st0;

  assign st0 = '{done: 1'b0, pc: lookup_pc, sst: sst_q, tag: '0,
                 cnt: '0, ff: 1'b0, ff_len: '0};

  for (genvar i = 0; i < CHAIN; i++) begin : g_stage
    sbst_hit_t r;
    logic      any_cond, cond_ok, skip_i;
    chain_t    s;      // state entering this stage
    chain_t    o;      // state leaving it

    if (i == 0) begin : g_p0
      assign s = st0;
      assign r = res0;
    end else begin : g_pn
      assign s = g_stage[i-1].o;
      assign r = sbst_search(tab, s.pc);
    end

    always_comb begin
      any_cond = r.entry.cond_srf || r.entry.cond_rs || r.entry.cond_rt;
      cond_ok  = (!r.entry.cond_srf || srf[r.entry.ptr_reg]) &&
                 (!r.entry.cond_rs  || s.sst[r.entry.rs_id]) &&
                 (!r.entry.cond_rt  || s.sst[r.entry.rt_id]);
      skip_i   = r.hit && (r.entry.typ == SB_LD || r.entry.typ == SB_CP) &&
                 any_cond && cond_ok && (r.entry.nskip != '0);
      o        = s;
      if (s.done) begin
        // keep what an earlier stage chose
      end else if (!enable) begin
        o.done = 1'b1;
      end else if (r.ff_hit && !s.ff && ffr_valid && rl_min != '0) begin
        o.ff     = 1'b1;
        o.ff_len = ffr_sel_len;
        o.sst    = s.sst | ld_cp_mask;
        o.pc     = ffr_sel_pc;
      end else if (skip_i) begin
        o.cnt = s.cnt + 1'b1;
        o.sst[r.id] = 1'b1;
        o.pc  = s.pc + ADDR_W'({r.entry.nskip, 2'b00});
      end else begin
        o.done = 1'b1;
        if (r.hit) begin
          o.tag.vsx       = 1'b1;
          o.tag.id        = r.id;
          o.tag.typ       = r.entry.typ;
          o.tag.ptr_reg   = r.entry.ptr_reg;
          o.tag.th_fp     = r.entry.th_fp;
          o.tag.threshold = r.entry.threshold;
          o.tag.rs_reuse  = r.entry.rs_valid && s.sst[r.entry.rs_id];
          o.tag.rs_id     = r.entry.rs_id;
          o.tag.rt_reuse  = r.entry.rt_valid && s.sst[r.entry.rt_id];
          o.tag.rt_id     = r.entry.rt_id;
          if (r.entry.typ == SB_LD || r.entry.typ == SB_CP) o.sst[r.id] = 1'b0;
        end
      end
    end
  end

  assign fetch_valid = g_stage[CHAIN-1].o.done;
  assign fetch_pc    = g_stage[CHAIN-1].o.pc;
  assign tag         = g_stage[CHAIN-1].o.tag;
  assign skip_cnt    = g_stage[CHAIN-1].o.cnt;
  assign ff          = g_stage[CHAIN-1].o.ff;
  assign ff_len      = g_stage[CHAIN-1].o.ff_len;

  // Skip Status Table
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            sst_q <= '0;
    else if (clear)        sst_q <= '0;
    else if (lookup_valid) sst_q <= g_stage[CHAIN-1].o.sst;
  end

  assign sst = sst_q;

endmodule

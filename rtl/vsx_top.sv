// vsx_top: Value Similarity eXtensions (VSX) for an in-order core.
//
// VSX lets a general-purpose core skip loads whose value is close to one it
// already loaded, skip the computes fed only by such loads, and substitute the
// results saved earlier; with iteration fast-forwarding it replaces a whole
// run of similar loop iterations by a short routine. This module joins the
// VSX units and presents them to a host pipeline stage by stage:
//
//   IF   if_pc -> Instruction Skip Unit (isu): the PC actually fetched after
//        skipping regions and fast-forwarding (if_fetch_pc), and a
//        per-instruction tag (vsx_tag_t) that the core carries with the
//        instruction. The fetch unit continues from if_fetch_pc.
//   ID   Result Reuse Controller (rsru): rs/rt from the register file or from
//        the Result Buffer, as the tag says.
//   MEM  load address and the hit cache line -> VSB Generator
//        (vsb_generator); the result -> Result Save Controller (rsru);
//        `mem_iter_end` marks the loop-closing branch.
//   WB   every register write -> VSB Selector (vsb_save_feed), which keeps
//        the Similarity Register File (SRF) in step with the pointers.
//   The VSB Run-Length Detector (vsb_run_length) feeds the ISU's FFR choice.
//
// Configuration (the SBST-LD custom instruction) writes SBST entries and FFR
// routine addresses; `clear` empties all tables, `enable` low makes VSX
// transparent. All state updates on the rising clock edge; the IF and ID
// outputs are combinational from their inputs and the registered state.
// The host core and its caches are not part of this module. Assertions at
// the end state the rules the core must keep: mem_iter_end marks a branch,
// a load entry tags only loads, and no routine is written for length 0.
module vsx_top
  import vsx_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         enable,
  input  logic                         clear,
  // SBST-LD configuration
  input  logic                         sbst_we,
  input  logic [ID_W-1:0]              sbst_idx,
  input  sbst_entry_t                  sbst_entry,
  input  logic                         ffr_we,
  input  logic [RL_W-1:0]              ffr_len,
  input  logic [ADDR_W-1:0]            ffr_pc,
  // IF stage
  input  logic                         if_valid,
  input  logic [ADDR_W-1:0]            if_pc,
  output logic                         if_fetch_valid,
  output logic [ADDR_W-1:0]            if_fetch_pc,
  output vsx_tag_t                     if_tag,
  output logic [2:0]                   if_skip_cnt,
  output logic                         if_ff,
  output logic [RL_W-1:0]              if_ff_len,
  // ID stage
  input  vsx_tag_t                     id_tag,
  input  logic [XLEN-1:0]              id_rs_rf,
  input  logic [XLEN-1:0]              id_rt_rf,
  output logic [XLEN-1:0]              id_rs,
  output logic [XLEN-1:0]              id_rt,
  // MEM stage
  input  logic                         mem_valid,
  input  logic                         mem_is_load,
  input  vsx_tag_t                     mem_tag,
  input  logic [ADDR_W-1:0]            mem_addr,
  input  logic [N_ELEM-1:0][XLEN-1:0]  mem_line,
  input  logic [XLEN-1:0]              mem_result,
  input  logic                         mem_iter_end,
  // WB stage
  input  logic                         wb_valid,
  input  logic [REG_W-1:0]             wb_reg,
  input  logic [ADDR_W-1:0]            wb_value,
  // status
  output logic [NREGS-1:0]             srf,
  output logic [RL_W-1:0]              rl_min,
  output logic [NUM_SBST-1:0]          sst,
  output logic                         vsb_gen,
  output logic [N_ELEM-1:0]            vsb_gen_bits,
  output logic                         rb_save,
  output logic                         save_iter
);

  logic               gen_valid;
  logic [REG_W-1:0]   gen_reg;
  logic [BASE_W-1:0]  gen_base;
  logic [N_ELEM-1:0]  gen_vsb;
  vsbt_view_t [NREGS-1:0]          view;
  logic [NREGS-1:0][RL_W-1:0]      rl_each;
  logic [ID_W-1:0]                 save_id;

  vsb_generator u_gen (
    .ld_valid  (mem_valid && mem_is_load),
    .ld_vsx    (enable && mem_tag.vsx && mem_tag.typ == SB_LD),
    .ld_addr   (mem_addr),
    .ld_reg    (mem_tag.ptr_reg),
    .line      (mem_line),
    .threshold (mem_tag.threshold),
    .th_fp     (mem_tag.th_fp),
    .gen_valid,
    .gen_reg,
    .gen_base,
    .gen_vsb
  );

  vsb_save_feed u_vsf (
    .clk, .rst_n, .clear,
    .gen_valid, .gen_reg, .gen_base, .gen_vsb,
    .wb_valid, .wb_reg, .wb_value,
    .srf, .view
  );

  vsb_run_length #(.NENT(NREGS)) u_rld (
    .view,
    .rl    (rl_each),
    .rl_min
  );

  isu u_isu (
    .clk, .rst_n, .enable, .clear,
    .cfg_we   (sbst_we),
    .cfg_idx  (sbst_idx),
    .cfg_entry(sbst_entry),
    .ffr_we, .ffr_len, .ffr_pc,
    .lookup_valid(if_valid),
    .lookup_pc   (if_pc),
    .srf, .rl_min,
    .fetch_valid(if_fetch_valid),
    .fetch_pc   (if_fetch_pc),
    .tag        (if_tag),
    .skip_cnt   (if_skip_cnt),
    .ff         (if_ff),
    .ff_len     (if_ff_len),
    .sst
  );

  rsru u_rsru (
    .clk, .rst_n, .clear,
    .mem_valid   (mem_valid && enable),
    .mem_tag, .mem_addr, .mem_result, .mem_iter_end,
    .id_tag, .id_rs_rf, .id_rt_rf, .id_rs, .id_rt,
    .save_iter,
    .save_we     (rb_save),
    .save_id
  );

  assign vsb_gen      = gen_valid;
  assign vsb_gen_bits = gen_vsb;

  // Rules the host core and the configuration must keep, and one property
  // of the fast-forward choice.
  a_iter_end_is_branch: assert property (@(posedge clk) disable iff (!rst_n)
      !(mem_valid && mem_is_load && mem_iter_end))
    else $error("mem_iter_end on a load: it must mark the loop-closing branch");
  a_ld_tag_is_load: assert property (@(posedge clk) disable iff (!rst_n)
      (enable && mem_valid && mem_tag.vsx && mem_tag.typ == SB_LD) |-> mem_is_load)
    else $error("an SBST LD entry tags an instruction that is not a load");
  a_ffr_len_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
      ffr_we |-> ffr_len != '0)
    else $error("FFR routine written for run length 0");
  a_ff_within_run: assert property (@(posedge clk) disable iff (!rst_n)
      if_ff |-> (if_ff_len != '0 && if_ff_len <= rl_min))
    else $error("fast-forward longer than the VSB run");

endmodule

// sbst: Similarity Based Skip Table.
//
// A small register table of code-region descriptors, written one entry at a
// time by the SBST-LD custom instruction before a kernel starts. The table is
// searched associatively by PC: `search` returns, for one PC, the
// lowest-numbered matching entry that is not a fast-forward entry (its index
// is the entry's SBST.ID) and whether an FF entry matches too, since a loop
// head can carry both. The contents are brought out (`tab`) so that the
// Instruction Skip Unit can search several PCs in one cycle; `search_pc`
// is one such search port for direct use.
//
// Timing: writes take effect at the next clock edge; searches are
// combinational. `clear` invalidates every entry. The fields follow the
// design's NextPC, #Skip, TYPE, REG, ID, RS, RT and SkipCond; their widths,
// the priority rule and the separate FF match are this design's choices.
module sbst
  import vsx_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        cfg_we,
  input  logic [ID_W-1:0]             cfg_idx,
  input  sbst_entry_t                 cfg_entry,
  input  logic [ADDR_W-1:0]           search_pc,
  output sbst_hit_t                   search_res,
  output sbst_entry_t [NUM_SBST-1:0]  tab,
  output logic [NUM_SBST-1:0]         ld_cp_mask   // valid LD or CP entries
);

  sbst_entry_t [NUM_SBST-1:0] tab_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tab_q <= '0;
    end else if (clear) begin
      for (int i = 0; i < NUM_SBST; i++) tab_q[i].valid <= 1'b0;
    end else if (cfg_we) begin
      tab_q[cfg_idx] <= cfg_entry;
    end
  end

  assign tab        = tab_q;
  assign search_res = sbst_search(tab_q, search_pc);

  always_comb begin
    for (int i = 0; i < NUM_SBST; i++)
      ld_cp_mask[i] = tab_q[i].valid && (tab_q[i].typ == SB_LD || tab_q[i].typ == SB_CP);
  end

endmodule

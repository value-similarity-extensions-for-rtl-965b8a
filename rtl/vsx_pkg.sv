// vsx_pkg: shared constants and types of the value-similarity extensions (VSX).
//
// VSX lets an in-order core skip loads (and the computes fed by them) whose
// operand is numerically close to the first element of the same cache line.
// This package fixes the sizes that several units agree on: a 32-byte line of
// eight 32-bit elements (seven VSBs per line), 32-bit addresses and data, a
// 32-entry integer register file, and an eight-entry Similarity Based Skip
// Table (SBST). The line size and element count follow the design's 32B lines
// and its "cache-line size of 8" example; the table depth and the encoding of
// an SBST entry are this design's own choices.
package vsx_pkg;

  localparam int unsigned XLEN       = 32;               // data word
  localparam int unsigned ADDR_W     = 32;               // byte address
  localparam int unsigned LINE_BYTES = 32;               // L1D line
  localparam int unsigned ELEM_BYTES = 4;                // one array element
  localparam int unsigned N_ELEM     = LINE_BYTES / ELEM_BYTES;  // 8
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);       // 5
  localparam int unsigned IDX_W      = $clog2(N_ELEM);           // 3
  localparam int unsigned BASE_W     = ADDR_W - OFF_W;           // line address
  localparam int unsigned NREGS      = 32;               // pointer registers
  localparam int unsigned REG_W      = $clog2(NREGS);
  localparam int unsigned NUM_SBST   = 8;                // SBST entries = RB/SST slots
  localparam int unsigned ID_W       = $clog2(NUM_SBST);
  localparam int unsigned NSKIP_W    = 4;                // #Skip field
  localparam int unsigned RL_W       = IDX_W;            // run length 0..N_ELEM-1

  // SBST.TYPE
  //   SB_USE : consumer only, never skipped, may take operands from the RB
  //   SB_LD  : potentially skippable load
  //   SB_CP  : potentially skippable compute
  //   SB_FF  : loop head where iteration fast-forwarding is tried
  typedef enum logic [1:0] {
    SB_USE = 2'd0,
    SB_LD  = 2'd1,
    SB_CP  = 2'd2,
    SB_FF  = 2'd3
  } sb_type_e;

  // One SBST entry, written by the SBST-LD custom instruction.
  typedef struct packed {
    logic               valid;
    logic [ADDR_W-1:0]  next_pc;    // PC of the first instruction of the region
    sb_type_e           typ;
    logic [NSKIP_W-1:0] nskip;      // #Skip: instructions in the region
    logic [REG_W-1:0]   ptr_reg;    // REG: pointer register of a load
    logic               rs_valid;   // RS: SBST.ID producing operand rs
    logic [ID_W-1:0]    rs_id;
    logic               rt_valid;   // RT: SBST.ID producing operand rt
    logic [ID_W-1:0]    rt_id;
    logic               cond_srf;   // SkipCond: SRF[REG] must be set
    logic               cond_rs;    // SkipCond: SST[RS] must be set
    logic               cond_rt;    // SkipCond: SST[RT] must be set
    logic               th_fp;      // threshold and data are IEEE-754 single
    logic [XLEN-1:0]    threshold;  // similarity threshold of a load
  } sbst_entry_t;

  // Per-instruction information produced by the ISU at fetch and carried
  // down the pipeline with the instruction.
  typedef struct packed {
    logic              vsx;         // instruction has an SBST entry
    logic [ID_W-1:0]   id;          // its SBST.ID
    sb_type_e          typ;
    logic [REG_W-1:0]  ptr_reg;
    logic              th_fp;
    logic [XLEN-1:0]   threshold;
    logic              rs_reuse;    // take rs from RB[rs_id]
    logic [ID_W-1:0]   rs_id;
    logic              rt_reuse;    // take rt from RB[rt_id]
    logic [ID_W-1:0]   rt_id;
  } vsx_tag_t;

  // One VSBT entry as seen by the run-length detector.
  typedef struct packed {
    logic               valid;      // VSBs were generated for this register
    logic               in_line;    // pointer still inside BaseAddr's line
    logic [IDX_W-1:0]   idx;        // element the pointer addresses
    logic [N_ELEM-1:0]  vsb;        // bit 0 unused (element 0 is the reference)
  } vsbt_view_t;

  // Result of one SBST search.
  typedef struct packed {
    logic              hit;         // a non-FF entry matches
    logic [ID_W-1:0]   id;          // lowest matching non-FF entry
    sbst_entry_t       entry;
    logic              ff_hit;      // an FF entry matches
  } sbst_hit_t;

  // Associative SBST search by PC (lowest index wins).
  function automatic sbst_hit_t sbst_search(input sbst_entry_t [NUM_SBST-1:0] tab,
                                            input logic [ADDR_W-1:0] pc);
    sbst_hit_t r;
    r = '0;
    for (int i = NUM_SBST - 1; i >= 0; i--) begin
      if (tab[i].valid && tab[i].next_pc == pc) begin
        if (tab[i].typ == SB_FF) begin
          r.ff_hit = 1'b1;
        end else begin
          r.hit = 1'b1;
          r.id  = ID_W'(i);
        end
      end
    end
    r.entry = tab[r.id];
    return r;
  endfunction

endpackage

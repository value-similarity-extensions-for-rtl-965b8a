// ffr_table: Fast-Forward Routine table of the Instruction Skip Unit.
//
// Holds the start PC of the specialised routine (FFR) that replaces r loop
// iterations, for r = 1 .. N_ELEM-1. Given the run length reported by the VSB
// Run-Length Detector it returns the routine for the longest programmed
// length not above that run, so a loop with only some routines still
// fast-forwards as far as it safely can. `sel_len` is the number of
// iterations that routine replaces; `sel_valid` is 0 when no routine fits.
//
// Timing: writes at the clock edge, selection combinational. `clear` drops
// all routines. The table of start PCs per run length follows the design;
// falling back to a shorter routine is this design's choice.
module ffr_table
  import vsx_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               cfg_we,
  input  logic [RL_W-1:0]    cfg_len,
  input  logic [ADDR_W-1:0]  cfg_pc,
  input  logic [RL_W-1:0]    rl,
  output logic               sel_valid,
  output logic [RL_W-1:0]    sel_len,
  output logic [ADDR_W-1:0]  sel_pc
);

  logic [N_ELEM-1:0]             v_q;
  logic [N_ELEM-1:0][ADDR_W-1:0] pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q  <= '0;
      pc_q <= '0;
    end else if (clear) begin
      v_q <= '0;
    end else if (cfg_we && cfg_len != '0) begin
      v_q[cfg_len]  <= 1'b1;
      pc_q[cfg_len] <= cfg_pc;
    end
  end

  always_comb begin
    sel_valid = 1'b0;
    sel_len   = '0;
    sel_pc    = '0;
    for (int r = 1; r < N_ELEM; r++) begin
      if (v_q[r] && RL_W'(r) <= rl) begin
        sel_valid = 1'b1;
        sel_len   = RL_W'(r);
        sel_pc    = pc_q[r];
      end
    end
  end

endmodule

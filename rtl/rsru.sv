// rsru: Result Save & Reuse Unit (Result Buffer, Result Save Controller,
// Result Reuse Controller, SaveResultIter bit).
//
// The Result Buffer (RB) has one word per SBST entry, addressed by SBST.ID.
// The Result Save Controller sits in the MEM stage and decides which results
// are written:
//   * a load with an SBST LD entry writes its result when it reads the first
//     element of a cache line (the element its VSBs are relative to), and
//     sets the SaveResultIter bit;
//   * a compute with an SBST CP entry writes its result only while
//     SaveResultIter is set, i.e. in an iteration whose loads produced fresh
//     reference values;
//   * the loop-closing branch (`mem_iter_end`) clears SaveResultIter.
// The Result Reuse Controller sits in the ID stage: when the instruction's
// tag says an operand's producer was skipped, the operand is read from
// RB[id] instead of the register file. A save to the same slot in the same
// cycle is forwarded.
//
// Timing: RB and SaveResultIter update at the clock edge; operand selection
// is combinational. The save rules, the ID indexing and the ID-stage
// substitution follow the design; the same-cycle forwarding and clearing on
// `clear` are this design's choices.
module rsru
  import vsx_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  // MEM stage: Result Save Controller
  input  logic               mem_valid,
  input  vsx_tag_t           mem_tag,
  input  logic [ADDR_W-1:0]  mem_addr,      // load address (loads only)
  input  logic [XLEN-1:0]    mem_result,
  input  logic               mem_iter_end,  // loop-closing branch
  // ID stage: Result Reuse Controller
  input  vsx_tag_t           id_tag,
  input  logic [XLEN-1:0]    id_rs_rf,
  input  logic [XLEN-1:0]    id_rt_rf,
  output logic [XLEN-1:0]    id_rs,
  output logic [XLEN-1:0]    id_rt,
  // status
  output logic               save_iter,
  output logic               save_we,
  output logic [ID_W-1:0]    save_id
);

  logic [NUM_SBST-1:0][XLEN-1:0] rb_q;
  logic                          sri_q;
  logic                          ld_save, cp_save;

  always_comb begin
    ld_save = mem_valid && mem_tag.vsx && mem_tag.typ == SB_LD &&
              mem_addr[OFF_W-1:0] == '0;
    cp_save = mem_valid && mem_tag.vsx && mem_tag.typ == SB_CP && sri_q;
    save_we = ld_save || cp_save;
    save_id = mem_tag.id;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb_q  <= '0;
      sri_q <= 1'b0;
    end else if (clear) begin
      sri_q <= 1'b0;
    end else begin
      if (save_we) rb_q[save_id] <= mem_result;
      if (ld_save)                        sri_q <= 1'b1;
      else if (mem_valid && mem_iter_end) sri_q <= 1'b0;
    end
  end

  function automatic logic [XLEN-1:0] rb_read(input logic [ID_W-1:0] id);
    if (save_we && save_id == id) return mem_result;
    return rb_q[id];
  endfunction

  always_comb begin
    id_rs = id_tag.rs_reuse ? rb_read(id_tag.rs_id) : id_rs_rf;
    id_rt = id_tag.rt_reuse ? rb_read(id_tag.rt_id) : id_rt_rf;
  end

  assign save_iter = sri_q;

endmodule

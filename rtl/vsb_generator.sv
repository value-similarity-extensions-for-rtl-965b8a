// vsb_generator: VSB Generator, placed beside the L1 data cache.
//
// When a potentially skippable load (one the Instruction Skip Unit tagged
// with an SBST entry) reads the first element of a cache line, the whole line
// is compared element by element with element 0. Bit i of `gen_vsb` (i = 1 ..
// N_ELEM-1) is the Value Similarity Bit of element i: set when |d[i] - d[0]|
// is within the load's threshold. Bit 0 is always 0, since element 0 is the
// value that is loaded. The result leaves with the pointer register of the
// load and the line address (BaseAddr) so that the VSB Save & Feed Unit can
// file it.
//
// Timing: combinational from the load's MEM-stage inputs; the line is the
// data array output of a hit. The comparison against element 0 only, the
// trigger on the first element and the software threshold follow the design;
// the integer/float formats are this implementation's choices (see
// vsx_similar).
module vsb_generator
  import vsx_pkg::*;
(
  input  logic                           ld_valid,   // load in MEM, line valid
  input  logic                           ld_vsx,     // load is an SBST LD entry
  input  logic [ADDR_W-1:0]              ld_addr,
  input  logic [REG_W-1:0]               ld_reg,     // SBST.REG of the load
  input  logic [N_ELEM-1:0][XLEN-1:0]    line,       // line[0] is the lowest address
  input  logic [XLEN-1:0]                threshold,
  input  logic                           th_fp,
  output logic                           gen_valid,
  output logic [REG_W-1:0]               gen_reg,
  output logic [BASE_W-1:0]              gen_base,
  output logic [N_ELEM-1:0]              gen_vsb
);

  logic [N_ELEM-1:0] sim;

  for (genvar i = 1; i < N_ELEM; i++) begin : g_cmp
    vsx_similar u_sim (
      .a      (line[i]),
      .b      (line[0]),
      .th     (threshold),
      .fp     (th_fp),
      .similar(sim[i])
    );
  end
  assign sim[0] = 1'b0;

  assign gen_valid = ld_valid && ld_vsx && (ld_addr[OFF_W-1:0] == '0);
  assign gen_reg   = ld_reg;
  assign gen_base  = ld_addr[ADDR_W-1:OFF_W];
  assign gen_vsb   = sim;

endmodule

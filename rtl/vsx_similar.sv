// vsx_similar: one similarity comparator of the VSB Generator.
//
// Decides whether |a - b| <= th. Two number formats are supported, selected by
// `fp`:
//   fp = 0  a and b are signed 32-bit integers, th an unsigned 32-bit
//           magnitude; the difference is formed exactly in 33 bits.
//   fp = 1  a, b and th are IEEE-754 single values. The three significands
//           are aligned to the largest of the three exponents, keeping eight
//           guard bits, and the difference (or sum, for unlike signs) of the
//           aligned significands is compared with the aligned threshold.
//           Bits shifted out past the guard bits are dropped, so a difference
//           within a few units of the last place of the threshold may be
//           decided either way. Zero and subnormal inputs count as zero; an
//           Inf or NaN operand is never similar.
// The comparison "difference against a user-defined threshold" follows the
// design; the use of <= and the aligned, truncated floating-point datapath are
// this implementation's choices. Purely combinational.
module vsx_similar (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] th,
  input  logic        fp,
  output logic        similar
);

  localparam int unsigned G = 8;          // guard bits below the significand
  localparam int unsigned W = 24 + G;     // aligned significand width

  // ---------------- integer path ----------------
  logic signed [32:0] idiff;
  logic        [32:0] iabs;
  logic               int_sim;

  always_comb begin
    idiff   = $signed({a[31], a}) - $signed({b[31], b});
    iabs    = idiff[32] ? 33'(-idiff) : 33'(idiff);
    int_sim = (iabs <= {1'b0, th});
  end

  // ---------------- floating-point path ----------------
  logic [7:0]   ea, eb, et, emax;
  logic [23:0]  ma, mb, mt;
  logic [W-1:0] aa, ab, at;
  logic [W:0]   fdiff;
  logic         special;
  logic         fp_sim;

  function automatic logic [W-1:0] align(input logic [23:0] m, input logic [7:0] e,
                                         input logic [7:0] emx);
    logic [7:0] sh;
    sh = emx - e;
    if (sh >= 8'(W)) return '0;
    return {m, {G{1'b0}}} >> sh;
  endfunction

  always_comb begin
    ea = a[30:23];
    eb = b[30:23];
    et = th[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    mt = (et == 8'd0) ? 24'd0 : {1'b1, th[22:0]};
    special = (ea == 8'hFF) || (eb == 8'hFF);
    emax = ea;
    if (eb > emax) emax = eb;
    if (et > emax) emax = et;
    aa = align(ma, ea, emax);
    ab = align(mb, eb, emax);
    at = align(mt, et, emax);
    if (a[31] == b[31] || ma == 24'd0 || mb == 24'd0)
      fdiff = (aa >= ab) ? {1'b0, aa - ab} : {1'b0, ab - aa};
    else
      fdiff = {1'b0, aa} + {1'b0, ab};
    // The threshold exponent is all ones: every finite difference passes.
    if (et == 8'hFF) fp_sim = !special;
    else             fp_sim = !special && (fdiff <= {1'b0, at});
  end

  assign similar = fp ? fp_sim : int_sim;

endmodule

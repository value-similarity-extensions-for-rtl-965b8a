// tb_vsb_generator: self-checking test of the VSB Generator.
//
// Random cache lines are compared against an independent reference: in
// integer mode the exact |d[i]-d[0]| <= th on 64-bit integers; in float mode
// the same test in double precision on the decoded IEEE-754 values, skipping
// the rare elements whose difference lies within the hardware's alignment
// error of the threshold. The trigger rule (SBST load, first element of the
// line) and the BaseAddr/REG outputs are checked as well. Combinational block:
// each vector is applied and checked after a 1 ns settle.
`timescale 1ns/1ps
module tb_vsb_generator;
  import vsx_pkg::*;

  logic                        ld_valid, ld_vsx, th_fp;
  logic [ADDR_W-1:0]           ld_addr;
  logic [REG_W-1:0]            ld_reg;
  logic [N_ELEM-1:0][XLEN-1:0] line;
  logic [XLEN-1:0]             threshold;
  logic                        gen_valid;
  logic [REG_W-1:0]            gen_reg;
  logic [BASE_W-1:0]           gen_base;
  logic [N_ELEM-1:0]           gen_vsb;

  int checks = 0, failures = 0, skipped = 0;

  vsb_generator dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real f2r(input logic [31:0] f);
    real m;
    int  e;
    e = int'(f[30:23]);
    if (e == 0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * pow2(e - 127);
    return f[31] ? -m : m;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    ld_valid = 0; ld_vsx = 0; th_fp = 0; ld_addr = '0; ld_reg = '0;
    line = '0; threshold = '0;
    #1;
    // ---------------- integer mode ----------------
    for (int t = 0; t < 400; t++) begin
      longint d0, di, diff;
      int spread;
      spread = (t % 4 == 0) ? 32'h7fffffff : (1 << (t % 20));
      th_fp     = 1'b0;
      threshold = $urandom_range(0, 1 << (t % 20));
      if (t % 50 == 7) threshold = 32'hFFFF_FFFF;
      line[0] = $urandom;
      for (int i = 1; i < N_ELEM; i++)
        line[i] = (t % 4 == 0) ? $urandom : line[0] + $urandom_range(0, 2*spread) - spread;
      ld_valid = 1; ld_vsx = 1;
      ld_addr  = {27'($urandom), 5'b0};
      ld_reg   = 5'($urandom);
      #1;
      check("int gen_valid", gen_valid == 1'b1);
      check("int base", gen_base == ld_addr[ADDR_W-1:OFF_W] && gen_reg == ld_reg);
      check("int vsb0", gen_vsb[0] == 1'b0);
      for (int i = 1; i < N_ELEM; i++) begin
        logic exp;
        d0   = longint'($signed(line[0]));
        di   = longint'($signed(line[i]));
        diff = (di > d0) ? di - d0 : d0 - di;
        exp  = diff <= longint'({32'd0, threshold});
        check($sformatf("int vsb t=%0d i=%0d", t, i), gen_vsb[i] == exp);
      end
    end
    // ---------------- float mode ----------------
    for (int t = 0; t < 400; t++) begin
      logic [7:0] e0;
      real r0, ri, rt, margin;
      th_fp = 1'b1;
      e0 = 8'(120 + (t % 15));
      line[0] = {1'($urandom), e0, 23'($urandom)};
      threshold = {1'b0, 8'(int'(e0) - 1 - (t % 6)), 23'($urandom)};
      for (int i = 1; i < N_ELEM; i++) begin
        case ($urandom_range(0, 4))
          0: line[i] = line[0];
          1: line[i] = {line[0][31:23], 23'($urandom)};               // same binade
          2: line[i] = {~line[0][31], line[0][30:0]};                  // opposite sign
          3: line[i] = line[0] + 32'($urandom_range(0, 1 << (t % 23))); // nearby
          default: line[i] = {1'($urandom), 8'(int'(e0) - 3 + int'($urandom_range(0, 5))), 23'($urandom)};
        endcase
      end
      ld_valid = 1; ld_vsx = 1;
      ld_addr  = {27'($urandom), 5'b0};
      #1;
      r0 = f2r(line[0]);
      rt = f2r(threshold);
      margin = pow2(int'(e0) + 2 - 127 - 28);
      for (int i = 1; i < N_ELEM; i++) begin
        real d;
        ri = f2r(line[i]);
        d  = (ri > r0) ? ri - r0 : r0 - ri;
        if ((d - rt) < margin && (rt - d) < margin) skipped++;
        else check($sformatf("fp vsb t=%0d i=%0d", t, i), gen_vsb[i] == (d <= rt));
      end
    end
    // special values never similar
    line[0] = 32'h7f80_0000; line[1] = 32'h7f80_0000; threshold = 32'h7f7f_ffff; #1;
    check("inf not similar", gen_vsb[1] == 1'b0);
    line[0] = 32'h3f80_0000; line[1] = 32'h0000_0000; threshold = 32'h3f80_0000; #1;
    check("1.0 vs 0.0 within 1.0", gen_vsb[1] == 1'b1);
    threshold = 32'h3f7f_ffff; #1;
    check("1.0 vs 0.0 beyond 0.99", gen_vsb[1] == 1'b0);
    // ---------------- trigger ----------------
    th_fp = 0; ld_addr = 32'h1000_0004; #1;
    check("no gen off line start", gen_valid == 1'b0);
    ld_addr = 32'h1000_0020; ld_vsx = 0; #1;
    check("no gen without SBST entry", gen_valid == 1'b0);
    ld_vsx = 1; ld_valid = 0; #1;
    check("no gen without load", gen_valid == 1'b0);
    ld_valid = 1; #1;
    check("gen at line start", gen_valid == 1'b1);
    $display("fp comparisons too close to the threshold to judge: %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

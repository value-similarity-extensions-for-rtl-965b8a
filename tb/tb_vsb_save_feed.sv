// tb_vsb_save_feed: self-checking test of the VSB Save & Feed Unit.
//
// A directed pass walks a pointer through a line whose VSBs are 1011101
// (elements 1..7, element 1 first) and checks the SRF bit at every step,
// then leaves the line. A random pass mixes VSB generations and register
// write-backs on a few registers and a few lines and compares SRF and the
// VSBT view each cycle with a reference that keeps, per register, the last
// (line, VSBs) pair and recomputes the selected bit from the written address.
`timescale 1ns/1ps
module tb_vsb_save_feed;
  import vsx_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic                   gen_valid = 0, wb_valid = 0;
  logic [REG_W-1:0]       gen_reg = '0, wb_reg = '0;
  logic [BASE_W-1:0]      gen_base = '0;
  logic [N_ELEM-1:0]      gen_vsb = '0;
  logic [ADDR_W-1:0]      wb_value = '0;
  logic [NREGS-1:0]       srf;
  vsbt_view_t [NREGS-1:0] view;

  int checks = 0, failures = 0;

  vsb_save_feed dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic              m_v   [NREGS];
  logic [BASE_W-1:0] m_base[NREGS];
  logic [N_ELEM-1:0] m_vsb [NREGS];
  logic [ADDR_W-1:0] m_ptr [NREGS];   // last address seen for the register
  logic              m_ptr_ok[NREGS]; // m_ptr written after the VSBs

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic exp_srf(input int r);
    int k;
    if (!m_v[r] || !m_ptr_ok[r]) return 1'b0;
    if (m_ptr[r][31:5] != m_base[r]) return 1'b0;
    k = int'(m_ptr[r][4:2]);
    return (k != 0) && m_vsb[r][k];
  endfunction

  task automatic step(input logic g, input int gr, input logic [31:0] gaddr,
                      input logic [7:0] gv, input logic w, input int wr,
                      input logic [31:0] wv);
    gen_valid = g; gen_reg = REG_W'(gr); gen_base = gaddr[31:5]; gen_vsb = gv;
    wb_valid  = w; wb_reg  = REG_W'(wr); wb_value = wv;
    @(posedge clk); #1;
    if (g) begin
      m_v[gr] = 1'b1; m_base[gr] = gaddr[31:5]; m_vsb[gr] = gv;
      m_ptr[gr] = gaddr; m_ptr_ok[gr] = 1'b1;
    end
    if (w) begin m_ptr[wr] = wv; m_ptr_ok[wr] = 1'b1; end
    gen_valid = 0; wb_valid = 0;
    for (int r = 0; r < NREGS; r++) begin
      check($sformatf("srf r%0d", r), srf[r] == exp_srf(r));
      check($sformatf("valid r%0d", r), view[r].valid == m_v[r]);
      if (m_v[r] && m_ptr[r][31:5] == m_base[r])
        check($sformatf("idx r%0d", r), view[r].in_line && view[r].idx == m_ptr[r][4:2]);
      else if (m_v[r])
        check($sformatf("out of line r%0d", r), !view[r].in_line);
    end
  endtask

  initial begin
    for (int r = 0; r < NREGS; r++) begin
      m_v[r] = 0; m_base[r] = '0; m_vsb[r] = '0; m_ptr[r] = '0; m_ptr_ok[r] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check("reset srf", srf == '0);
    // directed: line at 0x100, VSBs for elements 7..1 = 1011101 (bit 0 unused)
    step(1, 10, 32'h100, 8'b1011_1010, 0, 0, 0);
    check("srf after gen", srf[10] == 1'b0);
    for (int k = 1; k < 8; k++) begin
      step(0, 0, 0, 0, 1, 10, 32'h100 + 32'(4 * k));
      check($sformatf("directed k=%0d", k), srf[10] == 1'(32'b1011_1010 >> k));
    end
    step(0, 0, 0, 0, 1, 10, 32'h120);
    check("next line clears srf", srf[10] == 1'b0);
    // same-cycle generation and write-back on one register
    step(1, 3, 32'h200, 8'b1111_1110, 1, 3, 32'h204);
    check("gen+wb same cycle", srf[3] == 1'b1);
    // random
    for (int t = 0; t < 2000; t++) begin
      int gr, wr;
      logic [31:0] ga, wa;
      gr = $urandom_range(0, 5);
      wr = $urandom_range(0, 5);
      ga = {25'($urandom_range(8, 11)), 7'b0} + 32'($urandom_range(0, 3)) * 32;
      wa = {25'($urandom_range(8, 11)), 7'b0} + 32'($urandom_range(0, 31)) * 4;
      step($urandom_range(0, 3) == 0, gr, {ga[31:5], 5'b0}, {7'($urandom), 1'b0},
           $urandom_range(0, 1) == 1, wr, wa);
    end
    // clear
    clear = 1; @(posedge clk); #1; clear = 0;
    check("clear srf", srf == '0);
    check("clear valid", view[3].valid == 1'b0 && view[10].valid == 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rsru: self-checking test of the Result Save & Reuse Unit.
//
// Random MEM-stage traffic (SBST loads at and off the first element of a
// line, SBST computes, untagged instructions, loop-closing branches) is
// applied together with random ID-stage reuse requests. A reference keeps the
// Result Buffer and the SaveResultIter bit by the save rules (first-element
// load saves and sets the bit, compute saves only while it is set, branch
// clears it) and predicts each operand, including same-cycle forwarding.
// A directed prologue replays the dot-product example: LD1, LD2, MUL saved in
// iteration 0, MUL not saved in iteration 1, Buf_MUL reused in iteration 2.
`timescale 1ns/1ps
module tb_rsru;
  import vsx_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic              mem_valid = 0, mem_iter_end = 0;
  vsx_tag_t          mem_tag = '0, id_tag = '0;
  logic [ADDR_W-1:0] mem_addr = '0;
  logic [XLEN-1:0]   mem_result = '0, id_rs_rf = '0, id_rt_rf = '0;
  logic [XLEN-1:0]   id_rs, id_rt;
  logic              save_iter, save_we;
  logic [ID_W-1:0]   save_id;

  int checks = 0, failures = 0;

  rsru dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [XLEN-1:0] m_rb [NUM_SBST];
  logic            m_sri;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic vsx_tag_t mk(input sb_type_e typ, input int id);
    vsx_tag_t t;
    t = '0;
    t.vsx = 1'b1; t.typ = typ; t.id = ID_W'(id);
    return t;
  endfunction

  // Apply one cycle: MEM op and ID request, check ID operands, clock.
  task automatic cyc(input logic mv, input vsx_tag_t mt, input logic [31:0] ma,
                     input logic [31:0] mr, input logic br,
                     input logic rsu, input int rsi, input logic rtu, input int rti);
    logic ld_s, cp_s;
    logic [31:0] ers, ert;
    mem_valid = mv; mem_tag = mt; mem_addr = ma; mem_result = mr; mem_iter_end = br;
    id_tag = '0;
    id_tag.rs_reuse = rsu; id_tag.rs_id = ID_W'(rsi);
    id_tag.rt_reuse = rtu; id_tag.rt_id = ID_W'(rti);
    id_rs_rf = $urandom; id_rt_rf = $urandom;
    ld_s = mv && mt.vsx && mt.typ == SB_LD && ma[4:0] == 0;
    cp_s = mv && mt.vsx && mt.typ == SB_CP && m_sri;
    #1;
    ers = rsu ? (((ld_s || cp_s) && int'(mt.id) == rsi) ? mr : m_rb[rsi]) : id_rs_rf;
    ert = rtu ? (((ld_s || cp_s) && int'(mt.id) == rti) ? mr : m_rb[rti]) : id_rt_rf;
    check("rs operand", id_rs == ers);
    check("rt operand", id_rt == ert);
    check("save_we", save_we == (ld_s || cp_s));
    @(posedge clk); #1;
    if (ld_s || cp_s) m_rb[mt.id] = mr;
    if (ld_s) m_sri = 1'b1;
    else if (mv && br) m_sri = 1'b0;
    check("SaveResultIter", save_iter == m_sri);
    mem_valid = 0;
  endtask

  initial begin
    m_sri = 0;
    for (int i = 0; i < NUM_SBST; i++) m_rb[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // iteration 0: LD1 (id 0) a[0]=11, LD2 (id 1) b[0]=3, MUL (id 2) 33, branch
    cyc(1, mk(SB_LD, 0), 32'h1000, 32'd11, 0, 0, 0, 0, 0);
    cyc(1, mk(SB_LD, 1), 32'h2000, 32'd3, 0, 0, 0, 0, 0);
    cyc(1, mk(SB_CP, 2), 32'h0, 32'd33, 0, 0, 0, 0, 0);
    check("iteration 0 saved", save_iter == 1'b1);
    cyc(1, '0, 32'h0, 32'd0, 1, 0, 0, 0, 0);
    check("branch clears SaveResultIter", save_iter == 1'b0);
    // iteration 1: LD1 skipped, LD2 loads b[1]=4 off line start, MUL uses Buf_LD1
    cyc(1, mk(SB_LD, 1), 32'h2004, 32'd4, 0, 0, 0, 0, 0);
    cyc(1, mk(SB_CP, 2), 32'h0, 32'd44, 0, 1, 0, 0, 0);
    check("Buf_LD1 reused", m_rb[0] == 32'd11);
    check("MUL not saved in iteration 1", m_rb[2] == 32'd33);
    cyc(1, '0, 32'h0, 32'd0, 1, 0, 0, 1, 2);
    // iteration 2: ACC takes Buf_MUL
    cyc(0, '0, 32'h0, 32'd0, 0, 0, 0, 1, 2);
    // random
    for (int t = 0; t < 5000; t++) begin
      vsx_tag_t mt;
      int k;
      k = $urandom_range(0, 9);
      mt = mk((k < 4) ? SB_LD : (k < 8) ? SB_CP : SB_USE, $urandom_range(0, NUM_SBST - 1));
      if (k == 9) mt.vsx = 1'b0;
      cyc($urandom_range(0, 4) != 0, mt,
          {27'($urandom_range(0, 255)), 3'($urandom_range(0, 7)) == 0 ? 5'd0 : 5'($urandom & 32'h1c)},
          $urandom, $urandom_range(0, 5) == 0,
          $urandom_range(0, 1) == 1, $urandom_range(0, NUM_SBST - 1),
          $urandom_range(0, 1) == 1, $urandom_range(0, NUM_SBST - 1));
    end
    clear = 1; @(posedge clk); #1; clear = 0;
    check("clear drops SaveResultIter", save_iter == 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

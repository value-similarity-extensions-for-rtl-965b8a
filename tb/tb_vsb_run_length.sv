// tb_vsb_run_length: self-checking test of the VSB Run-Length Detector.
//
// Random VSBT views (some entries invalid, some pointers outside their line
// or on element 0) are applied; each entry's run is recomputed by walking
// forward from the pointer's element until the first clear VSB, and the
// minimum over the valid entries is compared with `rl_min`. Directed cases
// cover the 1111111 example (run 7 from element 1) and an empty table.
`timescale 1ns/1ps
module tb_vsb_run_length;
  import vsx_pkg::*;

  localparam int unsigned NENT = 8;

  vsbt_view_t [NENT-1:0]      view;
  logic [NENT-1:0][RL_W-1:0]  rl;
  logic [RL_W-1:0]            rl_min;

  int checks = 0, failures = 0;

  vsb_run_length #(.NENT(NENT)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ref_run(input vsbt_view_t v);
    int k, n;
    if (!v.in_line || v.idx == 0) return 0;
    k = int'(v.idx);
    n = 0;
    while (k + n < N_ELEM && v.vsb[k + n]) n++;
    return n;
  endfunction

  initial begin
    view = '0;
    #1;
    check("empty table", rl_min == 0);
    view[2] = '{valid: 1'b1, in_line: 1'b1, idx: 3'd1, vsb: 8'b1111_1110};
    #1;
    check("run 7", rl[2] == 7 && rl_min == 7);
    view[5] = '{valid: 1'b1, in_line: 1'b1, idx: 3'd1, vsb: 8'b1110_0110};
    #1;
    check("run 2 limits min", rl[5] == 2 && rl_min == 2);
    for (int t = 0; t < 3000; t++) begin
      int m;
      logic any;
      for (int e = 0; e < NENT; e++) begin
        view[e].valid   = ($urandom_range(0, 3) != 0);
        view[e].in_line = ($urandom_range(0, 5) != 0);
        view[e].idx     = 3'($urandom);
        view[e].vsb     = (t % 3 == 0) ? 8'hFE : {7'($urandom | $urandom), 1'b0};
      end
      #1;
      m = N_ELEM - 1;
      any = 0;
      for (int e = 0; e < NENT; e++) begin
        check($sformatf("rl t=%0d e=%0d", t, e), int'(rl[e]) == ref_run(view[e]));
        if (view[e].valid) begin
          any = 1;
          if (ref_run(view[e]) < m) m = ref_run(view[e]);
        end
      end
      if (!any) m = 0;
      check($sformatf("rl_min t=%0d", t), int'(rl_min) == m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

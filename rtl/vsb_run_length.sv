// vsb_run_length: VSB Run-Length Detector for iteration fast-forwarding.
//
// For every VSBT entry it counts the asserted VSBs that follow, without a
// gap, from the element the entry's pointer register now addresses: with
// VSBs 1111111 and the pointer on element 1 the run is 7, meaning the next
// seven iterations load values similar to element 0. An entry whose pointer
// has left its line, or still addresses element 0, has run 0. `rl_min` is the
// smallest run over all valid entries, i.e. the number of coming iterations in
// which every tracked load is similar; it is 0 when no entry is valid.
//
// Purely combinational. That the detector watches all VSBT entries follows
// the design; counting from the pointer's current element and combining the
// entries by a minimum are this implementation's reading of it.
module vsb_run_length
  import vsx_pkg::*;
#(
  parameter int unsigned NENT = NREGS
) (
  input  vsbt_view_t [NENT-1:0]       view,
  output logic [NENT-1:0][RL_W-1:0]   rl,
  output logic [RL_W-1:0]             rl_min
);

  always_comb begin
    for (int e = 0; e < NENT; e++) begin
      logic run;
      rl[e] = '0;
      run   = view[e].in_line && (view[e].idx != '0);
      for (int i = 1; i < N_ELEM; i++) begin
        if (run && IDX_W'(i) >= view[e].idx) begin
          if (view[e].vsb[i]) rl[e] = rl[e] + 1'b1;
          else                run   = 1'b0;
        end
      end
    end
  end

  always_comb begin
    logic any;
    any    = 1'b0;
    rl_min = RL_W'(N_ELEM - 1);
    for (int e = 0; e < NENT; e++) begin
      if (view[e].valid) begin
        any = 1'b1;
        if (rl[e] < rl_min) rl_min = rl[e];
      end
    end
    if (!any) rl_min = '0;
  end

endmodule

// vsb_save_feed: VSB Save & Feed Unit (VSB Table, VSB Selector, Similarity
// Register File).
//
// The VSB Table (VSBT) holds, per pointer register, the line address
// (BaseAddr) and the VSBs last generated for a load through that register.
// Whenever the core writes a register back, the VSB Selector compares the new
// value, taken as the address of that register's next load, with the entry's
// BaseAddr. Inside the same line it picks the VSB of the addressed element
// and stores it in the Similarity Register File (SRF); outside it the SRF bit
// is cleared, so the next load through that register is executed. The
// Instruction Skip Unit reads `srf` to decide whether a load can be skipped.
//
// A new VSB set (gen_*) also points its register at element 0 of the new
// line with its SRF bit clear. If a generation and a write-back hit the same
// register in one cycle, the write-back is judged against the new BaseAddr.
// `clear` empties the table (used when a new code region is configured).
//
// Timing: both updates take effect at the next rising clock edge; `srf` and
// `view` are register outputs. The VSBT/Selector/SRF split and the
// register-indexed table follow the design; one entry per architectural
// register, and taking the written value itself as the next address, are this
// implementation's choices.
module vsb_save_feed
  import vsx_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  // from the VSB Generator
  input  logic                     gen_valid,
  input  logic [REG_W-1:0]         gen_reg,
  input  logic [BASE_W-1:0]        gen_base,
  input  logic [N_ELEM-1:0]        gen_vsb,
  // register write-back (pointer update)
  input  logic                     wb_valid,
  input  logic [REG_W-1:0]         wb_reg,
  input  logic [ADDR_W-1:0]        wb_value,
  // to the Instruction Skip Unit and the run-length detector
  output logic [NREGS-1:0]         srf,
  output vsbt_view_t [NREGS-1:0]   view
);

  logic [NREGS-1:0]              v_q;       // entry holds VSBs
  logic [NREGS-1:0][BASE_W-1:0]  base_q;    // BaseAddr
  logic [NREGS-1:0][N_ELEM-1:0]  vsb_q;
  logic [NREGS-1:0]              inl_q;     // pointer inside BaseAddr's line
  logic [NREGS-1:0][IDX_W-1:0]   idx_q;     // element addressed by the pointer
  logic [NREGS-1:0]              srf_q;
  logic [IDX_W-1:0]              wb_k;      // element the written address selects

  assign wb_k = wb_value[OFF_W-1:$clog2(ELEM_BYTES)];

  logic [NREGS-1:0]              v_d;
  logic [NREGS-1:0][BASE_W-1:0]  base_d;
  logic [NREGS-1:0][N_ELEM-1:0]  vsb_d;
  logic [NREGS-1:0]              inl_d;
  logic [NREGS-1:0][IDX_W-1:0]   idx_d;
  logic [NREGS-1:0]              srf_d;

  always_comb begin
    v_d    = v_q;
    base_d = base_q;
    vsb_d  = vsb_q;
    inl_d  = inl_q;
    idx_d  = idx_q;
    srf_d  = srf_q;
    for (int r = 0; r < NREGS; r++) begin
      // VSBT write from the generator
      if (gen_valid && gen_reg == REG_W'(r)) begin
        v_d[r]    = 1'b1;
        base_d[r] = gen_base;
        vsb_d[r]  = gen_vsb;
        inl_d[r]  = 1'b1;
        idx_d[r]  = '0;
        srf_d[r]  = 1'b0;
      end
      // VSB Selector on a pointer update
      if (wb_valid && wb_reg == REG_W'(r)) begin
        if (v_d[r] && wb_value[ADDR_W-1:OFF_W] == base_d[r]) begin
          inl_d[r] = 1'b1;
          idx_d[r] = wb_k;
          srf_d[r] = (wb_k != '0) && vsb_d[r][wb_k];
        end else begin
          inl_d[r] = 1'b0;
          idx_d[r] = '0;
          srf_d[r] = 1'b0;
        end
      end
    end
    if (clear) begin
      v_d   = '0;
      inl_d = '0;
      srf_d = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q    <= '0;
      base_q <= '0;
      vsb_q  <= '0;
      inl_q  <= '0;
      idx_q  <= '0;
      srf_q  <= '0;
    end else begin
      v_q    <= v_d;
      base_q <= base_d;
      vsb_q  <= vsb_d;
      inl_q  <= inl_d;
      idx_q  <= idx_d;
      srf_q  <= srf_d;
    end
  end

  assign srf = srf_q;

  always_comb begin
    for (int r = 0; r < NREGS; r++) begin
      view[r].valid   = v_q[r];
      view[r].in_line = inl_q[r];
      view[r].idx     = idx_q[r];
      view[r].vsb     = vsb_q[r];
    end
  end

endmodule

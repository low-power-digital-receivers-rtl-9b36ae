// tbk_rx16: 16 Gb/s quadrate sequence detector and equalizer with 1-bit data
// trace-back.
//
// Builds on the 10 Gb/s sequence DFE. The edge-comparator prediction is
// replaced by two fixed data comparators, and two check comparators per path
// test whether the sample might belong to the bank just outside the two
// covered ones. The DFE decision carries B-1, a guess of the next bit; when the
// next bit is strong (its main cursor decided without the DFE), a wrong B-1
// exposes an error and the trace-back replaces the decision by an alternative
// with B-1 (and, for an outside-bank miss, B0) flipped. This stops DFE error
// propagation at little cost: two more comparators per path.
//
// Four paths at a quarter of the bit rate (4 GHz for 16 Gb/s). Timing: samples
// presented in cycle n give dfe_bits/dfe_seq after the next rising edge and
// tb_bits/tb_seq two cycles after that. The check and strong flags are
// registered with the DFE so they stay aligned. tb_en = 0 bypasses the
// trace-back (low-loss channels, lower power). Monitoring outputs: per-path
// position-correction (ovr), trace-back applied and changed flags.
//
// The architecture follows the document. Registering the side information with
// the DFE decisions and keeping trace-back outside the DFE loop are this
// design's choices.
module tbk_rx16
  import seqrx_pkg::*;
#(
  parameter int REF_W = 12,
  parameter int NPATH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tb_en,
  input  logic signed [REF_W-1:0] data_s      [NPATH],
  input  logic signed [REF_W-1:0] fix_ref     [2],
  input  logic signed [REF_W-1:0] bank_ref    [4][2],
  input  logic signed [REF_W-1:0] chk_ref_tbl [4],
  output logic [NPATH-1:0]        dfe_bits,
  output seq_t                    dfe_seq [NPATH],
  output logic [NPATH-1:0]        tb_bits,
  output seq_t                    tb_seq  [NPATH],
  output logic [NPATH-1:0]        ovr,
  output logic [NPATH-1:0]        tb_applied,
  output logic [NPATH-1:0]        tb_changed
);

  seq_t             cand [NPATH][4];
  logic [NPATH-1:0] chk_hi, chk_lo, strg, val;
  logic [NPATH-1:0] chk_hi_r, chk_lo_r, strg_r, val_r, ovr_r;
  seq_t             alt [NPATH];

  for (genvar k = 0; k < NPATH; k++) begin : g_path
    pos_e pos_unused;
    tbk_rx_path #(.REF_W(REF_W)) u_path (
      .clk, .rst_n, .data_s(data_s[k]), .fix_ref, .bank_ref, .chk_ref_tbl,
      .cand(cand[k]), .pos(pos_unused), .ovr(ovr[k]), .chk_hi(chk_hi[k]), .chk_lo(chk_lo[k]),
      .is_strong(strg[k]), .value(val[k]));
  end

  seq_dfe_quad #(.NPATH(NPATH)) u_dfe (.clk, .rst_n, .cand, .seq(dfe_seq), .bits(dfe_bits));

  // Side information registered in step with the DFE decisions.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chk_hi_r <= '0;
      chk_lo_r <= '0;
      strg_r   <= '0;
      val_r    <= '0;
      ovr_r    <= '0;
    end else begin
      chk_hi_r <= chk_hi;
      chk_lo_r <= chk_lo;
      strg_r   <= strg;
      val_r    <= val;
      ovr_r    <= ovr;
    end
  end

  for (genvar k = 0; k < NPATH; k++) begin : g_alt
    logic outside_unused;
    tbk_alt_gen u_alt (.seq(dfe_seq[k]), .chk_hi(chk_hi_r[k]), .chk_lo(chk_lo_r[k]), .alt(alt[k]), .outside(outside_unused));
  end

  tbk_select_quad #(.NPATH(NPATH)) u_sel (
    .clk, .rst_n, .tb_en, .seq(dfe_seq), .alt, .is_strong(strg_r), .value(val_r), .ovr(ovr_r),
    .tb_seq, .tb_bits, .applied(tb_applied), .changed(tb_changed));

endmodule

// digital_rx_top: the three receivers side by side, each with its own clock,
// reset and ports.
//
//  * rx10_*: 10 Gb/s quadrate sequence detector and 2-tap sequence DFE
//    (sd_rx10), edge-comparator prediction, 2.5 GHz quarter-rate clock.
//  * rx16_*: 16 Gb/s quadrate sequence detector with sequence DFE and 1-bit
//    data trace-back (tbk_rx16), fixed data comparators, 4 GHz clock.
//  * bm_*:   digital controller of the 7-10 Gb/s burst-mode optical receiver
//    (bmrx_ctrl): SAR DC-offset recovery and phase-rotator skew adaptation,
//    on the C8 clock.
//
// The analog parts (passive equalizer, sample-and-holds, reference current
// DACs, TIA and amplifiers, offset DAC, injection-locked oscillator, phase
// rotator) are outside: the sampled voltages come in as signed mV codes, the
// references as programmable codes, and the DAC and phase-rotator codes go out.
// Timing of each receiver is that of the instantiated module.
//
// The document describes the three receivers as separate chips; placing them
// side by side in one top, with nothing shared, is this design's choice.
module digital_rx_top
  import seqrx_pkg::*;
#(
  parameter int REF_W = 12,
  parameter int NPATH = 4,
  parameter int DAC_W = 5,
  parameter int PR_W  = 5
) (
  // 10 Gb/s sequence DFE receiver
  input  logic                    rx10_clk,
  input  logic                    rx10_rst_n,
  input  logic signed [REF_W-1:0] rx10_edge_s   [NPATH],
  input  logic signed [REF_W-1:0] rx10_data_s   [NPATH],
  input  logic signed [REF_W-1:0] rx10_edge_ref [2],
  input  logic signed [REF_W-1:0] rx10_bank_ref [4][2],
  output logic [NPATH-1:0]        rx10_bits,
  output seq_t                    rx10_seq [NPATH],
  output pos_e                    rx10_pos [NPATH],
  output logic [NPATH-1:0]        rx10_ovr,
  // 16 Gb/s sequence DFE receiver with trace-back
  input  logic                    rx16_clk,
  input  logic                    rx16_rst_n,
  input  logic                    rx16_tb_en,
  input  logic signed [REF_W-1:0] rx16_data_s      [NPATH],
  input  logic signed [REF_W-1:0] rx16_fix_ref     [2],
  input  logic signed [REF_W-1:0] rx16_bank_ref    [4][2],
  input  logic signed [REF_W-1:0] rx16_chk_ref_tbl [4],
  output logic [NPATH-1:0]        rx16_dfe_bits,
  output seq_t                    rx16_dfe_seq [NPATH],
  output logic [NPATH-1:0]        rx16_tb_bits,
  output seq_t                    rx16_tb_seq  [NPATH],
  output logic [NPATH-1:0]        rx16_ovr,
  output logic [NPATH-1:0]        rx16_tb_applied,
  output logic [NPATH-1:0]        rx16_tb_changed,
  // burst-mode optical receiver controller
  input  logic                    bm_clk_c8,
  input  logic                    bm_rst_n,
  input  logic                    bm_burst_start,
  input  logic                    bm_preamble_end,
  input  logic                    bm_cmp_out,
  input  logic [3:0]              bm_bits,
  input  logic                    bm_bits_valid,
  output logic                    bm_cmp_mode,
  output logic [DAC_W-1:0]        bm_dac_code,
  output logic [PR_W-1:0]         bm_pr_code,
  output logic                    bm_dc_busy,
  output logic                    bm_dc_done,
  output logic                    bm_skew_done,
  output logic                    bm_locked
);

  sd_rx10 #(.REF_W(REF_W), .NPATH(NPATH)) u_rx10 (
    .clk(rx10_clk), .rst_n(rx10_rst_n), .edge_s(rx10_edge_s), .data_s(rx10_data_s),
    .edge_ref(rx10_edge_ref), .bank_ref(rx10_bank_ref),
    .bits(rx10_bits), .seq(rx10_seq), .pos(rx10_pos), .ovr(rx10_ovr));

  tbk_rx16 #(.REF_W(REF_W), .NPATH(NPATH)) u_rx16 (
    .clk(rx16_clk), .rst_n(rx16_rst_n), .tb_en(rx16_tb_en), .data_s(rx16_data_s),
    .fix_ref(rx16_fix_ref), .bank_ref(rx16_bank_ref), .chk_ref_tbl(rx16_chk_ref_tbl),
    .dfe_bits(rx16_dfe_bits), .dfe_seq(rx16_dfe_seq), .tb_bits(rx16_tb_bits), .tb_seq(rx16_tb_seq),
    .ovr(rx16_ovr), .tb_applied(rx16_tb_applied), .tb_changed(rx16_tb_changed));

  bmrx_ctrl #(.DAC_W(DAC_W), .PR_W(PR_W)) u_bm (
    .clk_c8(bm_clk_c8), .rst_n(bm_rst_n), .burst_start(bm_burst_start), .preamble_end(bm_preamble_end),
    .cmp_out(bm_cmp_out), .bits(bm_bits), .bits_valid(bm_bits_valid),
    .cmp_mode(bm_cmp_mode), .dac_code(bm_dac_code), .pr_code(bm_pr_code),
    .dc_busy(bm_dc_busy), .dc_done(bm_dc_done), .skew_done(bm_skew_done), .locked(bm_locked));

endmodule

// sd_rx10: 10 Gb/s quadrate direct digital sequence detector and equalizer
// without ADC or DSP.
//
// The channel is partially equalised by a passive network so that four taps
// remain (h0 > h+1 > h-1 > h+2). Instead of digitising the sample and
// subtracting ISI, the receiver compares each sample against reference levels
// built from those taps and reads the 4-bit time sequence {B0,B+1,B-1,B+2}
// directly. Per path: 2 edge comparators predict which two of the four banks
// are needed, 4 floating comparators resolve the level inside them, and a
// 2-tap sequence DFE uses the two previous decisions to pick one of four
// candidates. Four paths run at a quarter of the bit rate (2.5 GHz for
// 10 Gb/s); path 0 carries the oldest bit of each group of four.
//
// Interface: per cycle the four held edge samples and data samples (signed mV
// codes from the sample-and-holds), the two edge references and the eight
// in-bank references. Outputs are registered on the rising edge: bits/seq are
// the decisions for the samples presented in the previous cycle. pos/ovr
// expose the per-path position and prediction-correction flags of the current
// cycle for monitoring.
//
// The four quarter-rate paths, the clock phases of the edge and data
// comparators and the 2-tap sequence DFE follow the document. Signed millivolt
// sample codes and the single register stage are this design's choices.
module sd_rx10
  import seqrx_pkg::*;
#(
  parameter int REF_W = 12,
  parameter int NPATH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [REF_W-1:0] edge_s   [NPATH],
  input  logic signed [REF_W-1:0] data_s   [NPATH],
  input  logic signed [REF_W-1:0] edge_ref [2],
  input  logic signed [REF_W-1:0] bank_ref [4][2],
  output logic [NPATH-1:0]        bits,
  output seq_t                    seq [NPATH],
  output pos_e                    pos [NPATH],
  output logic [NPATH-1:0]        ovr
);

  seq_t cand [NPATH][4];

  for (genvar k = 0; k < NPATH; k++) begin : g_path
    sd_rx_path #(.REF_W(REF_W)) u_path (
      .clk, .rst_n, .edge_s(edge_s[k]), .data_s(data_s[k]), .edge_ref, .bank_ref,
      .cand(cand[k]), .pos(pos[k]), .ovr(ovr[k]));
  end

  seq_dfe_quad #(.NPATH(NPATH)) u_dfe (.clk, .rst_n, .cand, .seq, .bits);

endmodule

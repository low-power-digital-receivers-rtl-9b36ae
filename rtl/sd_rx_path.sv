// sd_rx_path: one of the four time-interleaved paths of the 10 Gb/s ADC-less
// sequence detector.
//
// Two edge comparators look at the edge sample taken half a UI before the data
// sample and predict where the data sample will fall: Cedge1 moves one pair of
// floating comparators between banks 11 and 01, Cedge0 the other pair between
// banks 10 and 00 (seq_ref_mux). Four floating data comparators then compare
// the held data sample against the selected in-bank references, and seq_gen
// verifies the prediction and produces four candidate sequences for the DFE.
//
// Timing: edge comparators fire on the rising edge of clk (phi0); the data
// comparators fire on the falling edge (phi180, 2 UI later at quarter rate),
// leaving half a cycle for the references to settle. edge_s and data_s must be
// held from the rising edge through the falling edge, as the sample-and-hold
// does for 3 UI. cand/pos/ovr are valid after the falling edge and until the
// next rising edge, where the sequence DFE registers them.
//
// The comparator count per path (two edge, four floating) and their clock
// phases follow the document. The third edge comparator, used only for clock
// recovery, is left out here.
module sd_rx_path
  import seqrx_pkg::*;
#(
  parameter int REF_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [REF_W-1:0] edge_s,
  input  logic signed [REF_W-1:0] data_s,
  input  logic signed [REF_W-1:0] edge_ref [2],   // [1]: Cedge1, [0]: Cedge0
  input  logic signed [REF_W-1:0] bank_ref [4][2],
  output seq_t                    cand [4],
  output pos_e                    pos,
  output logic                    ovr
);

  logic                    clk_n;
  logic                    ce1, ce0;
  logic [3:0]              cf;
  logic signed [REF_W-1:0] cf_ref [4];

  assign clk_n = ~clk;

  strongarm_cmp #(.REF_W(REF_W)) u_edge1 (.clk, .rst_n, .en(1'b1), .vin(edge_s), .vref(edge_ref[1]), .q(ce1));
  strongarm_cmp #(.REF_W(REF_W)) u_edge0 (.clk, .rst_n, .en(1'b1), .vin(edge_s), .vref(edge_ref[0]), .q(ce0));

  seq_ref_mux #(.REF_W(REF_W)) u_mux (.pos_c1(ce1), .pos_c0(ce0), .bank_ref, .cf_ref);

  for (genvar i = 0; i < 4; i++) begin : g_cf
    strongarm_cmp #(.REF_W(REF_W)) u_cf (.clk(clk_n), .rst_n, .en(1'b1), .vin(data_s), .vref(cf_ref[i]), .q(cf[i]));
  end

  seq_gen u_gen (.pos_c1(ce1), .pos_c0(ce0), .cf, .cand, .pos, .ovr);

endmodule

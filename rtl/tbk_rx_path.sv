// tbk_rx_path: one of the four time-interleaved paths of the 16 Gb/s sequence
// detector with data trace-back.
//
// Unlike the 10 Gb/s path, the floating comparators are placed from the data
// sample itself (sub-ranging): two fixed data comparators CFIX1/CFIX0 with
// references between banks 01 and 11 and between banks 00 and 10 pick the
// position, steer the four floating comparators (seq_ref_mux) and the two check
// comparators (chk_ref_mux). seq_gen produces the DFE candidates, as in the
// 10 Gb/s path, including the top/mid/bottom verification; strong_detect flags
// samples whose main bit is certain.
//
// Timing: coarse (fixed) comparators fire on the rising edge of clk (phi0);
// fine and check comparators on the falling edge (phi180). data_s must be held
// through both edges. All outputs are valid after the falling edge until the
// next rising edge.
//
// The comparators per path and their clock phases follow the document. That an
// unclocked check comparator keeps its last decision is this design's choice;
// the logic never reads it then.
module tbk_rx_path
  import seqrx_pkg::*;
#(
  parameter int REF_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [REF_W-1:0] data_s,
  input  logic signed [REF_W-1:0] fix_ref  [2],   // [1]: CFIX1, [0]: CFIX0
  input  logic signed [REF_W-1:0] bank_ref [4][2],
  input  logic signed [REF_W-1:0] chk_ref_tbl [4],
  output seq_t                    cand [4],
  output pos_e                    pos,
  output logic                    ovr,
  output logic                    chk_hi,
  output logic                    chk_lo,
  output logic                    is_strong,
  output logic                    value
);

  logic                    clk_n;
  logic                    cfix1, cfix0;
  logic [3:0]              cf;
  logic signed [REF_W-1:0] cf_ref [4];
  logic signed [REF_W-1:0] hi_ref, lo_ref;
  logic                    hi_en, lo_en;

  assign clk_n = ~clk;

  strongarm_cmp #(.REF_W(REF_W)) u_fix1 (.clk, .rst_n, .en(1'b1), .vin(data_s), .vref(fix_ref[1]), .q(cfix1));
  strongarm_cmp #(.REF_W(REF_W)) u_fix0 (.clk, .rst_n, .en(1'b1), .vin(data_s), .vref(fix_ref[0]), .q(cfix0));

  seq_ref_mux #(.REF_W(REF_W)) u_mux (.pos_c1(cfix1), .pos_c0(cfix0), .bank_ref, .cf_ref);
  chk_ref_mux #(.REF_W(REF_W)) u_chk_mux (.pos_c1(cfix1), .pos_c0(cfix0), .chk_ref_tbl, .hi_ref, .lo_ref, .hi_en, .lo_en);

  for (genvar i = 0; i < 4; i++) begin : g_cf
    strongarm_cmp #(.REF_W(REF_W)) u_cf (.clk(clk_n), .rst_n, .en(1'b1), .vin(data_s), .vref(cf_ref[i]), .q(cf[i]));
  end

  strongarm_cmp #(.REF_W(REF_W)) u_chk_hi (.clk(clk_n), .rst_n, .en(hi_en), .vin(data_s), .vref(hi_ref), .q(chk_hi));
  strongarm_cmp #(.REF_W(REF_W)) u_chk_lo (.clk(clk_n), .rst_n, .en(lo_en), .vin(data_s), .vref(lo_ref), .q(chk_lo));

  seq_gen u_gen (.pos_c1(cfix1), .pos_c0(cfix0), .cf, .cand, .pos, .ovr);

  strong_detect u_strong (.pos_c1(cfix1), .pos_c0(cfix0), .chk_hi, .chk_lo, .is_strong, .value);

endmodule

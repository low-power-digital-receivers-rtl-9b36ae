// seq_ref_mux: reference multiplexer of the four floating data comparators.
//
// The two position comparators steer the references directly: C1 switches one
// comparator pair between the references of bank 11 and bank 01, C0 switches
// the other pair between bank 10 and bank 00. This leaves the pairs covering
// banks 11/10 (top), 10/01 (mid) or 01/00 (bottom). The outputs are returned in
// the logical order CF3..CF0 (CF3 the highest reference), which is how the
// sequence generator names them: at mid the C0 pair is the upper pair, at top
// and bottom the C1 pair is.
//
// bank_ref[b][1] is the reference on level B-1B+2 = 10 of bank b = {B0,B+1},
// bank_ref[b][0] the one on level 01. The comparators for levels 00 and 11 of a
// bank are not needed because the B+2 feedback resolves them. The references are
// programmable codes (the reference generator is tuned per channel). A
// position-comparator bubble (C1=1, C0=0) is treated as mid; this is a choice of
// this implementation. Purely combinational; the references must settle
// between the position comparators' clock (phi0) and the data comparators'
// clock (phi180).
module seq_ref_mux
  import seqrx_pkg::*;
#(
  parameter int REF_W = 12
) (
  input  logic                    pos_c1,
  input  logic                    pos_c0,
  input  logic signed [REF_W-1:0] bank_ref [4][2],
  output logic signed [REF_W-1:0] cf_ref   [4]
);

  pos_e       pos;
  logic [1:0] ub, lb;

  always_comb begin
    pos = decode_pos(pos_c1, pos_c0);
    ub  = upper_bank(pos);
    lb  = lower_bank(pos);
    cf_ref[3] = bank_ref[ub][1];
    cf_ref[2] = bank_ref[ub][0];
    cf_ref[1] = bank_ref[lb][1];
    cf_ref[0] = bank_ref[lb][0];
  end

endmodule

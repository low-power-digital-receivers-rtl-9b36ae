// seq_gen: sequence generator of one interleaved path.
//
// Inputs are the two position comparators and the four floating data
// comparators CF3..CF0 (CF3/CF2 on the upper bank, CF1/CF0 on the lower bank).
// The position is first verified. If all four floating comparators read 1, the
// signal lies above the covered banks and the position is moved up one step
// (bottom->mid, mid->top); CF3/CF2 then become CF1/CF0 and the new upper pair
// reads 0, its most probable value. If all four read 0 the position is moved
// down (top->mid, mid->bottom); CF1/CF0 become CF3/CF2 and the new lower pair
// reads 1. Other patterns are left alone; all-ones at top and all-zeros at
// bottom cannot move further and are also left alone.
//
// Each bank then yields two candidate sequences {bank, k} and {bank, k+1},
// where k is the number of its in-bank comparators reading 1. cand[3:2] are
// the upper bank's candidates (cand[3] the larger), cand[1:0] the lower bank's.
// The two candidates of a bank differ in B+2, the two banks differ in B+1, so
// the sequence DFE needs only the B+2 and B+1 feedback to pick one.
// Combinational.
//
// The verification and correction rules follow the document. Which candidate
// order the outputs use is this design's choice; a mid-to-top or mid-to-bottom
// move can recover only the near half of bank 11 or 00, a consequence of the
// rule as written.
module seq_gen
  import seqrx_pkg::*;
(
  input  logic       pos_c1,
  input  logic       pos_c0,
  input  logic [3:0] cf,
  output seq_t       cand [4],
  output pos_e       pos,
  output logic       ovr
);

  pos_e       pos_pred;
  logic [3:0] cfc;
  logic [1:0] ub, lb, ku, kl;

  always_comb begin
    pos_pred = decode_pos(pos_c1, pos_c0);
    pos      = pos_pred;
    cfc      = cf;
    ovr      = 1'b0;
    if (cf == 4'b1111 && pos_pred != POS_TOP) begin
      pos = (pos_pred == POS_BOT) ? POS_MID : POS_TOP;
      cfc = {2'b00, cf[3:2]};
      ovr = 1'b1;
    end else if (cf == 4'b0000 && pos_pred != POS_BOT) begin
      pos = (pos_pred == POS_TOP) ? POS_MID : POS_BOT;
      cfc = {cf[1:0], 2'b11};
      ovr = 1'b1;
    end
    ub = upper_bank(pos);
    lb = lower_bank(pos);
    ku = inbank_low(cfc[3], cfc[2]);
    kl = inbank_low(cfc[1], cfc[0]);
    cand[3] = {ub, ku + 2'd1};
    cand[2] = {ub, ku};
    cand[1] = {lb, kl + 2'd1};
    cand[0] = {lb, kl};
  end

endmodule

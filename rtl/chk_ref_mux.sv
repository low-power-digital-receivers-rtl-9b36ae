// chk_ref_mux: reference and clock-enable selection for the two check
// comparators of the 16 Gb/s trace-back receiver.
//
// A check comparator watches for the most probable sequence that lies just
// outside the two banks covered by the floating comparators. Its reference
// sits half-way between that outside sequence and the nearest in-bank sequence
// with the same B+1 and B+2 (chk_ref_tbl, programmable):
//   [0] top:    lower check, between 1101 and 0111 (missing bank 01)
//   [1] mid:    upper check, between 1100 and 0110 (missing bank 11)
//   [2] mid:    lower check, between 1001 and 0011 (missing bank 00)
//   [3] bottom: upper check, between 1000 and 0010 (missing bank 10)
// At top only the lower check is needed and at bottom only the upper one; the
// idle comparator is not clocked (en low) and is given the common-mode
// reference, code 0. The position comes from the fixed data comparators with
// the same bubble rule as the floating comparators. Combinational.
//
// The check comparator placements and the common-mode reference of the
// unclocked comparator follow the document's table; reading the
// fixed-comparator bubble as mid is this design's choice.
module chk_ref_mux
  import seqrx_pkg::*;
#(
  parameter int REF_W = 12
) (
  input  logic                    pos_c1,
  input  logic                    pos_c0,
  input  logic signed [REF_W-1:0] chk_ref_tbl [4],
  output logic signed [REF_W-1:0] hi_ref,
  output logic signed [REF_W-1:0] lo_ref,
  output logic                    hi_en,
  output logic                    lo_en
);

  always_comb begin
    unique case (decode_pos(pos_c1, pos_c0))
      POS_TOP: begin
        hi_ref = '0;             hi_en = 1'b0;
        lo_ref = chk_ref_tbl[0]; lo_en = 1'b1;
      end
      POS_MID: begin
        hi_ref = chk_ref_tbl[1]; hi_en = 1'b1;
        lo_ref = chk_ref_tbl[2]; lo_en = 1'b1;
      end
      default: begin
        hi_ref = chk_ref_tbl[3]; hi_en = 1'b1;
        lo_ref = '0;             lo_en = 1'b0;
      end
    endcase
  end

endmodule

// strong_detect: strong 1 / strong 0 detection of the trace-back receiver.
//
// A bit is "strong" when its main-cursor decision does not depend on DFE
// feedback: both fixed data comparators put the sample at the top and the
// lower check comparator (reference between 1101 and 0111) confirms it lies
// above every sequence of bank 01 -> strong 1; or both put it at the bottom
// and the upper check comparator (between 1000 and 0010) reads 0 -> strong 0.
// Any other combination is not strong. value is the strong bit's value and is
// meaningful only with strong high. Combinational.
//
// The strong 1/0 table follows the document; reading its check column as the
// comparator active at that position is this design's interpretation.
module strong_detect (
  input  logic pos_c1,
  input  logic pos_c0,
  input  logic chk_hi,
  input  logic chk_lo,
  output logic is_strong,
  output logic value
);

  always_comb begin
    value  = pos_c1 & pos_c0;
    is_strong = (pos_c1 & pos_c0 & chk_lo) | (~pos_c1 & ~pos_c0 & ~chk_hi);
  end

endmodule

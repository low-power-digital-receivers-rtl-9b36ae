// tbk_alt_gen: trace-back sequence generator.
//
// From the DFE's decided sequence {B0,B+1,B-1,B+2} it forms the one alternative
// offered to the trace-back. For banks 11 and 10 (B0 = 1) the lower check
// comparator decides: 0 means the sample may come from the bank below, so the
// alternative is "outside bank" with B0 and B-1 flipped (e.g. 1101 -> 0111);
// 1 means only B-1 is in doubt, so the alternative is "within bank" with B-1
// flipped. For banks 01 and 00 (B0 = 0) the upper check comparator decides the
// other way round: 1 -> outside, 0 -> within. Either way the alternative has
// the opposite B-1, so the next strong bit selects exactly one of the two.
// B+1 and B+2 are never in doubt and are copied unchanged, so those two output
// bits are plain wires from the input. Combinational.
//
// The outside/within choice table follows the document.
module tbk_alt_gen
  import seqrx_pkg::*;
(
  input  seq_t seq,
  input  logic chk_hi,
  input  logic chk_lo,
  output seq_t alt,
  output logic outside
);

  always_comb begin
    outside = seq[B0] ? ~chk_lo : chk_hi;
    alt     = seq;
    alt[BM1] = ~seq[BM1];
    if (outside) alt[B0] = ~seq[B0];
  end

endmodule

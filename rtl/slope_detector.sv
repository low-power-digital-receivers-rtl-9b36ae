// slope_detector: early/late detection for the timing-skew correction of the
// burst-mode receiver.
//
// The injection-locked oscillator aligns the clock to the data transitions,
// but the path from the oscillator to the samplers adds a corner-dependent
// delay, so the data may not be sampled mid-eye. Between two equal bits the
// signal should be flat at mid-eye; a slope between the two samples shows the
// sampling phase is off:
//   011x with rising slope  : sampled too early, move right (later)
//   100x with falling slope : sampled too early, move right
//   x110 with falling slope : sampled too late,  move left  (earlier)
//   x001 with rising slope  : sampled too late,  move left
// bits = {d(n-2), d(n-1), d(n), d(n+1)}; slope_pos is the comparator's sign of
// S(n) - S(n-T), the two samples being those of d(n-1) and d(n). The first two
// rules are stated in the source; the two move-left rules are their mirror
// image, which is this design's reading. A 0110 pattern may vote both ways.
// Combinational; outputs are qualified by valid.
//
// The move-right rules are stated in the document; the move-left rules are
// their mirror cases, which the document names only by their patterns.
module slope_detector (
  input  logic [3:0] bits,
  input  logic       slope_pos,
  input  logic       valid,
  output logic       vote_right,
  output logic       vote_left
);

  logic p011, p100, p110, p001;

  always_comb begin
    p011 = (bits[3:1] == 3'b011);
    p100 = (bits[3:1] == 3'b100);
    p110 = (bits[2:0] == 3'b110);
    p001 = (bits[2:0] == 3'b001);
    vote_right = valid & ((p011 & slope_pos) | (p100 & ~slope_pos));
    vote_left  = valid & ((p110 & ~slope_pos) | (p001 & slope_pos));
  end

endmodule

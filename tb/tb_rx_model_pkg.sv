// tb_rx_model_pkg: channel and reference model shared by the testbenches of the
// sequence detector receivers.
//
// The partially equalised channel keeps four taps, in mV of differential
// signal: h0 = 260, h+1 = 160, h-1 = 120, h+2 = 80. A transmitted 1 counts +h,
// a 0 counts -h, so the noise-free sample of sequence {B0,B+1,B-1,B+2} is
//   level = h0*s(B0) + h+1*s(B+1) + h-1*s(B-1) + h+2*s(B+2),  s(b) = 2b-1.
// From these levels the model derives every reference the receivers need:
// in-bank references on the levels B-1B+2 = 01 and 10 of each bank, fixed data
// comparator references half-way between banks 01/11 and 00/10, and check
// references half-way between the pairs of sequences listed for the check
// comparators.
//
// The tap values follow the example channel in the document (h0=0.26,
// h+1=0.16, h-1=0.12, h+2=0.08, scaled to millivolt codes); the
// recoverable-position rule is derived from this design's correction logic.
package tb_rx_model_pkg;

  localparam int H0  = 260;
  localparam int HP1 = 160;
  localparam int HM1 = 120;
  localparam int HP2 = 80;

  function automatic int sgn(input logic b);
    return b ? 1 : -1;
  endfunction

  function automatic int level(input logic [3:0] s);
    return H0 * sgn(s[3]) + HP1 * sgn(s[2]) + HM1 * sgn(s[1]) + HP2 * sgn(s[0]);
  endfunction

  // In-bank reference j (0: level 01, 1: level 10) of bank b.
  function automatic int bank_ref_val(input logic [1:0] b, input int j);
    return level({b, (j != 0) ? 2'b10 : 2'b01});
  endfunction

  function automatic int mid2(input logic [3:0] a, input logic [3:0] b);
    return (level(a) + level(b)) / 2;
  endfunction

  // Fixed data comparators: between 0111 and 1100, between 0011 and 1000.
  function automatic int fix_ref_val(input int j);
    return (j != 0) ? mid2(4'b0111, 4'b1100) : mid2(4'b0011, 4'b1000);
  endfunction

  // Check comparator references, in the order top / mid-upper / mid-lower / bottom.
  function automatic int chk_ref_val(input int j);
    case (j)
      0:       return mid2(4'b1101, 4'b0111);
      1:       return mid2(4'b1100, 4'b0110);
      2:       return mid2(4'b1001, 4'b0011);
      default: return mid2(4'b1000, 4'b0010);
    endcase
  endfunction

  // Positions (0 bottom, 1 mid, 2 top) from which sequence s can still be
  // decoded: its own position, or mid when the prediction is one step off.
  // A mid prediction is recoverable for banks 11 and 00 only when the sample
  // is on the near half of the bank, because the position correction assumes
  // the most probable comparator outputs for the bank it moves to.
  function automatic int allowed_pos(input logic [3:0] s, input bit second);
    case (s[3:2])
      2'b11:   return (second && !s[1]) ? 1 : 2;
      2'b10:   return second ? 1 : 2;
      2'b01:   return second ? 1 : 0;
      default: return (second && s[1]) ? 1 : 0;
    endcase
  endfunction

endpackage

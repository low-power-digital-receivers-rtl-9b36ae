// seqrx_pkg: types and helper functions shared by the two ADC-less sequence
// detector receivers (10 Gb/s sequence DFE and 16 Gb/s sequence DFE with data
// trace-back).
//
// A decoded sequence is four bits {B0, B+1, B-1, B+2}: the current bit, the
// previous bit, the next bit and the bit before the previous one. The order is
// the order of the channel taps by weight (h0 > h+1 > h-1 > h+2), so the two
// MSBs name a "bank" of four reference levels and the two LSBs the level inside
// the bank. Within a bank the levels do not overlap; between banks they do.
//
// Four floating data comparators always cover two adjacent banks. Which two is
// the "position": bottom (banks 01/00), mid (10/01) or top (11/10). It is set
// by two position comparators (edge comparators in the 10 Gb/s receiver, fixed
// data comparators in the 16 Gb/s receiver); a thermometer bubble (C1=1, C0=0)
// is read as mid, which is a choice of this implementation.
//
// Each bank keeps two in-bank comparators, placed on the levels B-1B+2 = 01 and
// 10. If k of them read 1, the level is one of the two adjacent candidates
// {k, k+1}; the B+2 decision feedback then picks one of them.
//
// Modules that import the package but do not index sequence bits draw an
// unused-parameter lint note for B0..BP2; that is expected.
package seqrx_pkg;

  // {B0, B+1, B-1, B+2}
  typedef logic [3:0] seq_t;

  typedef enum logic [1:0] {
    POS_BOT = 2'd0,
    POS_MID = 2'd1,
    POS_TOP = 2'd2
  } pos_e;

  // Bit positions inside seq_t.
  localparam int B0  = 3;
  localparam int BP1 = 2;
  localparam int BM1 = 1;
  localparam int BP2 = 0;

  // Position from the two thermometric position comparators.
  function automatic pos_e decode_pos(input logic c1, input logic c0);
    if (c1 && c0)       return POS_TOP;
    else if (!c1 && !c0) return POS_BOT;
    else                 return POS_MID;
  endfunction

  // Bank {B0,B+1} covered by the upper and by the lower comparator pair.
  function automatic logic [1:0] upper_bank(input pos_e p);
    case (p)
      POS_TOP: return 2'b11;
      POS_MID: return 2'b10;
      default: return 2'b01;
    endcase
  endfunction

  function automatic logic [1:0] lower_bank(input pos_e p);
    case (p)
      POS_TOP: return 2'b10;
      POS_MID: return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  // Lower of the two B-1B+2 candidates from the two in-bank comparators
  // (hi on level 10, lo on level 01): the candidates are k and k+1.
  function automatic logic [1:0] inbank_low(input logic hi, input logic lo);
    return 2'(hi) + 2'(lo);
  endfunction

endpackage

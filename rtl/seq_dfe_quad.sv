// seq_dfe_quad: two-tap sequence DFE of the quad-rate (four-way interleaved)
// receiver.
//
// Every quarter-rate cycle each path k delivers four candidate sequences: two
// from the upper bank (cand[k][3:2]) and two from the lower bank
// (cand[k][1:0]). B+2, the decision two bits back, picks one candidate per
// bank by comparing with the candidates' LSB. B+1, the decision one bit back,
// then picks the bank by comparing with bit B+1 (MSB-1). Path 0 is the oldest
// bit of the cycle: its B+1 and B+2 are the registered decisions of paths
// NPATH-1 and NPATH-2 of the previous cycle; path k>0 uses the decisions of
// paths k-1 and k-2 of the same cycle.
//
// The first tap is loop-unrolled: both B+1 outcomes are resolved ahead, so
// when the previous path's decision arrives only one 2:1 mux per path remains
// on the feedback chain. All NPATH decisions are registered on the rising clock
// edge: seq/bits show the candidates presented in the previous cycle. Reset
// clears the feedback history to 0 (not specified in the source; a choice).
module seq_dfe_quad
  import seqrx_pkg::*;
#(
  parameter int NPATH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  seq_t             cand [NPATH][4],
  output seq_t             seq  [NPATH],
  output logic [NPATH-1:0] bits
);

  // B+2 selection inside one bank: the candidate whose B+2 matches.
  function automatic seq_t pick_b2(input seq_t hi, input seq_t lo, input logic b2);
    return (hi[BP2] == b2) ? hi : lo;
  endfunction

  seq_t             dec [NPATH];
  logic [NPATH-1:0] b0;
  logic             hist1, hist2;          // B0 of paths NPATH-1 and NPATH-2, last cycle

  for (genvar k = 0; k < NPATH; k++) begin : g_path
    logic b1, b2;
    seq_t up, lo;
    seq_t pre0, pre1;                      // decision if B+1 = 0 / 1
    if (k == 0) begin : g_fb0
      assign b1 = hist1;
      assign b2 = hist2;
    end else if (k == 1) begin : g_fb1
      assign b1 = b0[0];
      assign b2 = hist1;
    end else begin : g_fbn
      assign b1 = b0[k-1];
      assign b2 = b0[k-2];
    end
    assign up   = pick_b2(cand[k][3], cand[k][2], b2);
    assign lo   = pick_b2(cand[k][1], cand[k][0], b2);
    // Loop unrolling of the first tap: the bank for either B+1 value.
    assign pre1 = up[BP1] ? up : lo;
    assign pre0 = up[BP1] ? lo : up;
    assign dec[k] = b1 ? pre1 : pre0;
    assign b0[k]  = dec[k][B0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist1 <= 1'b0;
      hist2 <= 1'b0;
      for (int k = 0; k < NPATH; k++) seq[k] <= '0;
    end else begin
      hist1 <= b0[NPATH-1];
      hist2 <= b0[NPATH-2];
      for (int k = 0; k < NPATH; k++) seq[k] <= dec[k];
    end
  end

  always_comb
    for (int k = 0; k < NPATH; k++) bits[k] = seq[k][B0];

endmodule

// majority_voter: majority vote over the slope detector's early/late votes.
//
// Counts right votes minus left votes (saturating, CNT_W-bit signed). The
// strobe (C16) marks the last cycle of a voting window: in that cycle the
// outputs give the majority of all votes of the window including the current
// one, and the count restarts from zero at the next clock edge. dec_valid and
// dec_right are combinational and valid only while strobe is high, so a
// search stepping on them changes its code at the same edge the new window
// opens and every window sees a single trial code. A tie gives no decision
// (dec_valid stays low). The document gives the voter and its C16 rate; the
// window alignment and the tie rule are this design's choices.
//
// Interface: vote_right/vote_left at most one per cycle; strobe one cycle.
module majority_voter #(
  parameter int CNT_W = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic vote_right,
  input  logic vote_left,
  input  logic strobe,
  output logic dec_valid,
  output logic dec_right
);

  localparam logic signed [CNT_W-1:0] CMAX = {1'b0, {(CNT_W-1){1'b1}}};
  localparam logic signed [CNT_W-1:0] CMIN = {1'b1, {(CNT_W-1){1'b0}}};

  logic signed [CNT_W-1:0] cnt, delta, sum;

  always_comb begin
    delta = CNT_W'(vote_right) - CNT_W'(vote_left);
    if (delta > 0 && cnt == CMAX)      sum = cnt;
    else if (delta < 0 && cnt == CMIN) sum = cnt;
    else                               sum = cnt + delta;
    dec_valid = strobe && (sum != '0);
    dec_right = sum > 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cnt <= '0;
    else if (strobe) cnt <= '0;
    else             cnt <= sum;
  end

endmodule

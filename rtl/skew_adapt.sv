// skew_adapt: timing-skew adaptation of the burst-mode receiver.
//
// After the preamble, during normal data, the slope detector turns each pair
// of equal bits into an early/late vote, the majority voter condenses the votes
// of each C16 window into one decision, and a successive-approximation search
// sets the 5-bit phase-rotator code, MSB first, one decision per window. It runs
// once per burst: start loads mid-scale, PR_W decisions later done rises and
// the code is held. A window without a majority (tie) takes no step. A right
// decision (sample later) keeps the trial bit, so a larger code means a later
// sampling phase; that polarity is this design's choice.
//
// Interface: one slope observation per clock (valid, bits, slope_pos), strobe
// marks the end of each voting window.
module skew_adapt #(
  parameter int PR_W  = 5,
  parameter int CNT_W = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            strobe,
  input  logic [3:0]      bits,
  input  logic            slope_pos,
  input  logic            valid,
  output logic [PR_W-1:0] pr_code,
  output logic            busy,
  output logic            done,
  output logic            vote_right,
  output logic            vote_left
);

  logic run, dec_valid, dec_right, sar_done;

  slope_detector u_slope (.bits, .slope_pos, .valid(valid & run), .vote_right, .vote_left);

  majority_voter #(.CNT_W(CNT_W)) u_vote (
    .clk, .rst_n, .vote_right, .vote_left, .strobe, .dec_valid, .dec_right);

  sar_search #(.W(PR_W)) u_sar (
    .clk, .rst_n, .start, .step(run & dec_valid), .up(dec_right), .code(pr_code), .done(sar_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        run <= 1'b0;
    else if (start)    run <= 1'b1;
    else if (sar_done) run <= 1'b0;
  end

  assign busy = run & ~sar_done;
  assign done = sar_done;

endmodule

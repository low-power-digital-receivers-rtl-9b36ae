// bmrx_ctrl: digital controller of the 7-10 Gb/s burst-mode DC-coupled optical
// receiver.
//
// Each burst starts with a 1010... preamble. DC-offset recovery and clock
// recovery run at the same time: the injection-locked oscillator (analog, not
// part of this module) locks on rising-edge pulses from the first toggling
// samples, while this controller searches the offset DAC code with
// dc_recovery_ctrl (6 C8 cycles). When the preamble is over (preamble_end) and
// the DC code is known, skew_adapt trims the phase rotator on ordinary data.
// Both loops share one sample-and-hold and comparator pair: cmp_mode = 0 asks
// the analog side for the sign of S(n)+S(n-T) (DC offset), cmp_mode = 1 for the
// sign of S(n)-S(n-T) (slope). cmp_out is that sign.
//
// Clocking: everything runs on the C8 clock (1/8 of the data rate); the C16
// voting strobe is every second C8 cycle. burst_start restarts the sequence at
// any time. locked rises when both searches are finished; codes then hold until
// the next burst.
//
// The sequence (DC recovery in the preamble, then skew adaptation on regular
// data), the shared comparator and the C16 strobe follow the document. The
// preamble-end input, the lock flag and the restart on every burst_start are
// this design's choices.
//
// The assertion at the end is disabled during reset, so the reset net is
// also sampled synchronously; lint reports that as a mixed sync/async use.
module bmrx_ctrl #(
  parameter int DAC_W = 5,
  parameter int PR_W  = 5
) (
  input  logic             clk_c8,
  input  logic             rst_n,
  input  logic             burst_start,
  input  logic             preamble_end,
  input  logic             cmp_out,
  input  logic [3:0]       bits,
  input  logic             bits_valid,
  output logic             cmp_mode,
  output logic [DAC_W-1:0] dac_code,
  output logic [PR_W-1:0]  pr_code,
  output logic             dc_busy,
  output logic             dc_done,
  output logic             skew_done,
  output logic             locked
);

  typedef enum logic [1:0] {B_IDLE, B_DC, B_SKEW, B_LOCK} bstate_e;

  bstate_e state;
  logic    c16, sk_busy, sk_start, vr_unused, vl_unused;
  logic    preamble_seen;

  dc_recovery_ctrl #(.DAC_W(DAC_W)) u_dc (
    .clk_c8, .rst_n, .start(burst_start), .sum_pos(cmp_out & ~cmp_mode),
    .dac_code, .busy(dc_busy), .done(dc_done));

  assign sk_start = (state == B_DC) && dc_done && (preamble_seen || preamble_end);

  skew_adapt #(.PR_W(PR_W)) u_skew (
    .clk(clk_c8), .rst_n, .start(sk_start), .strobe(c16), .bits, .slope_pos(cmp_out),
    .valid(bits_valid & cmp_mode), .pr_code, .busy(sk_busy), .done(skew_done),
    .vote_right(vr_unused), .vote_left(vl_unused));

  assign cmp_mode = (state == B_SKEW) || (state == B_LOCK);
  assign locked   = (state == B_LOCK);

  always_ff @(posedge clk_c8 or negedge rst_n) begin
    if (!rst_n) begin
      state         <= B_IDLE;
      c16           <= 1'b0;
      preamble_seen <= 1'b0;
    end else begin
      c16 <= ~c16;
      if (burst_start) begin
        state         <= B_DC;
        preamble_seen <= 1'b0;
      end else begin
        if (preamble_end) preamble_seen <= 1'b1;
        unique case (state)
          B_DC:    if (sk_start) state <= B_SKEW;
          B_SKEW:  if (skew_done && !sk_busy) state <= B_LOCK;
          default: state <= state;
        endcase
      end
    end
  end

  // The shared comparator is never in slope mode while DC recovery runs.
  a_mode: assert property (@(posedge clk_c8) disable iff (!rst_n) !(cmp_mode && dc_busy));

endmodule

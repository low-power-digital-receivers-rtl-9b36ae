// dc_recovery_ctrl: DC-offset recovery of the burst-mode optical receiver.
//
// The receiver is DC coupled; every new burst may arrive with a different DC
// level. During the 1010... preamble two consecutive samples S(n) and S(n-T),
// taken by neighbouring interleaved paths, are added in the analog domain: one
// sample is a 1 and the other a 0, so their sum is the DC offset. Only its sign
// (sum_pos) is used, and a successive-approximation search sets the offset DAC
// that cancels the offset. No low-pass filter is involved, so the loop settles
// in a handful of cycles, and the result is stored digitally, so long runs of
// identical bits later cannot make the baseline wander.
//
// Timing, on the C8 clock (1/8 of the data rate): start (one cycle) begins a
// recovery. Cycle 1 resets the SAR to mid-scale; cycles 2..6 each take one
// decision, MSB first, so the DAC code is final after 6 cycles, when done
// rises. The code then holds until the next start. A positive sum means the
// input sits too high and the DAC code must grow (polarity chosen here).
// busy is high while the recovery runs.
//
// The six C8 cycles (one SAR reset, five DAC updates) and the use of only the
// sign of S(n)+S(n-T) follow the document. The sign convention (a positive sum
// raises the code) and the busy/done flags are this design's choices.
//
// The assertion at the end is disabled during reset, so the reset net is
// also sampled synchronously; lint reports that as a mixed sync/async use.
module dc_recovery_ctrl #(
  parameter int DAC_W = 5
) (
  input  logic             clk_c8,
  input  logic             rst_n,
  input  logic             start,
  input  logic             sum_pos,
  output logic [DAC_W-1:0] dac_code,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {S_IDLE, S_RESET, S_UPDATE, S_DONE} state_e;

  state_e state;
  logic   sar_start, sar_step, sar_done;

  assign sar_start = (state == S_RESET);
  assign sar_step  = (state == S_UPDATE);
  assign busy      = (state == S_RESET) || (state == S_UPDATE && !sar_done);
  assign done      = (state == S_DONE) || (state == S_UPDATE && sar_done);

  sar_search #(.W(DAC_W)) u_sar (
    .clk(clk_c8), .rst_n, .start(sar_start), .step(sar_step), .up(sum_pos),
    .code(dac_code), .done(sar_done));

  always_ff @(posedge clk_c8 or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
    end else if (start) begin
      state <= S_RESET;
    end else begin
      unique case (state)
        S_RESET:  state <= S_UPDATE;
        S_UPDATE: if (sar_done) state <= S_DONE;
        default:  state <= state;
      endcase
    end
  end

  // The search is either running or finished, never both.
  a_busy_done: assert property (@(posedge clk_c8) disable iff (!rst_n) !(busy && done));

endmodule

// sar_search: W-bit successive-approximation register.
//
// The binary search used twice in the burst-mode receiver: for the DC-offset
// DAC and for the phase-rotator code. start loads the mid-scale trial value
// (MSB set, rest clear). Each step applies one comparator decision to the bit
// under trial: up = 1 keeps it (the value must be at least this large),
// up = 0 clears it; the next lower bit is then set for trial. After W steps
// done rises and code holds its final value until the next start. start has
// priority over step. The search starts on the cycle after start; code changes
// on the clock edge that takes a step.
//
// The document asks only for a successive-approximation (binary) search; this
// MSB-first register with a start/step interface is this design's choice.
//
// The assertion at the end is disabled during reset, so the reset net is
// also sampled synchronously; lint reports that as a mixed sync/async use.
module sar_search #(
  parameter int W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         step,
  input  logic         up,
  output logic [W-1:0] code,
  output logic         done
);

  localparam int IW = (W > 1) ? $clog2(W) : 1;

  logic [IW-1:0] idx;   // bit under trial

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code <= '0;
      idx  <= '0;
      done <= 1'b0;
    end else if (start) begin
      code        <= '0;
      code[W-1]   <= 1'b1;
      idx         <= IW'(W-1);
      done        <= 1'b0;
    end else if (step && !done) begin
      if (!up) code[idx] <= 1'b0;
      if (idx == '0) begin
        done <= 1'b1;
      end else begin
        code[idx - 1'b1] <= 1'b1;
        idx              <= idx - 1'b1;
      end
    end
  end

  // A finished search holds its code until the next start.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n) (done && !start) |=> $stable(code));

endmodule

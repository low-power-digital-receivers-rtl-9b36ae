// strongarm_cmp: behavioural model (not synthesizable circuit design) of the
// sample-and-hold, strong-arm latch comparator and NAND SR latch that make up
// one comparator slice of the sequence detector receivers.
//
// The real circuit: a PMOS sample-and-hold tracks the input for 1 UI and holds
// it for 3 UI; the strong-arm latch samples on the rising clock edge,
// regenerates, and resets both outputs to VDD while the clock is low; the SR
// latch keeps the last decision while both latch outputs are high. Together they
// act as a flip-flop whose D input is the sign of (held sample - reference).
//
// The model works on signed integer voltage codes (1 LSB = 1 mV differential).
// On each rising edge of clk with en high, q takes (vin > vref); a tie gives 0.
// With en low the comparator is not clocked and q holds, which is how an
// unused check comparator is parked. rst_n clears q; the real latch has no
// reset, so this is a modelling convenience.
//
// The document's comparator is an analog strong-arm stage with an SR latch;
// the ideal compare-and-hold, the tie rule and the reset value are this
// model's choices.
module strongarm_cmp #(
  parameter int REF_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [REF_W-1:0] vin,
  input  logic signed [REF_W-1:0] vref,
  output logic                    q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= (vin > vref);
  end

endmodule

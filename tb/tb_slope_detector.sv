// tb_slope_detector: exhaustive check of the four slope rules over all bit
// patterns, slope signs and valid: 011x with positive slope and 100x with
// negative slope vote right; x110 with negative slope and x001 with positive
// slope vote left. Patterns that match one rule from each side (0110, 1001)
// must give one consistent vote; nothing votes while valid is low.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_slope_detector;
  logic [3:0] bits;
  logic slope_pos, valid, vote_right, vote_left;
  int checks = 0, failures = 0;
  logic er, el;

  slope_detector dut (.bits, .slope_pos, .valid, .vote_right, .vote_left);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {valid, slope_pos, bits} = 6'(v);
      #1;
      er = valid && ((bits[3:1] == 3'b011 && slope_pos) || (bits[3:1] == 3'b100 && !slope_pos));
      el = valid && ((bits[2:0] == 3'b110 && !slope_pos) || (bits[2:0] == 3'b001 && slope_pos));
      checks++;
      if (vote_right !== er || vote_left !== el || (vote_right && vote_left)) begin
        failures++;
        $display("bits %b slope %b valid %b: right %b left %b", bits, slope_pos, valid, vote_right, vote_left);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

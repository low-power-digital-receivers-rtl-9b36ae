// tb_strong_detect: exhaustive check of the strong 1/0 table. Strong 1: both
// fixed comparators 1 and the top-position check 1. Strong 0: both fixed
// comparators 0 and the bottom-position check 0. Everything else not strong.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_strong_detect;
  logic pos_c1, pos_c0, chk_hi, chk_lo, is_strong, value;
  int checks = 0, failures = 0;
  logic es;

  strong_detect dut (.pos_c1, .pos_c0, .chk_hi, .chk_lo, .is_strong, .value);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {pos_c1, pos_c0, chk_hi, chk_lo} = 4'(v);
      #1;
      es = 0;
      if (v == 4'b1101 || v == 4'b1111) es = 1;   // top, lower check 1
      if (v == 4'b0000 || v == 4'b0001) es = 1;   // bottom, upper check 0
      checks++;
      if (is_strong !== es || (es && value !== pos_c1)) begin
        failures++;
        $display("input %b: strong=%b value=%b", 4'(v), is_strong, value);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

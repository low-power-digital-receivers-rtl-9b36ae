// tb_dc_recovery_ctrl: DC-offset recovery against an analog model. Each burst
// has a random input offset (0 to 31.9 DAC steps of 10 mV). The summing
// comparator sees 2 x (offset - DAC output), clamped at +/-400 mV like a
// limiting amplifier, and reports its sign each C8 cycle. Checks: busy
// for the 6 C8 cycles after the edge that samples start (1 reset + 5 updates),
// done from the 7th cycle on, the residual offset between 0 and 1 LSB, and the
// code held after done. A restart in the middle of a search must begin anew.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_dc_recovery_ctrl;
  localparam int DAC_W = 5;
  localparam int LSB   = 10;
  logic clk_c8 = 0, rst_n = 0, start = 0, sum_pos;
  logic [DAC_W-1:0] dac_code;
  logic busy, done;
  int checks = 0, failures = 0;
  int off_x10;   // offset in units of 0.1 mV

  dc_recovery_ctrl #(.DAC_W(DAC_W)) dut (.clk_c8, .rst_n, .start, .sum_pos, .dac_code, .busy, .done);

  always #5 clk_c8 = ~clk_c8;

  function automatic logic cmp(int off, int code);
    int s;
    s = 2 * (off - code * LSB * 10);
    if (s > 4000) s = 4000;
    if (s < -4000) s = -4000;
    return s > 0;
  endfunction
  assign sum_pos = cmp(off_x10, int'(dac_code));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    off_x10 = 0;
    repeat (2) @(negedge clk_c8);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int cyc, res;
      off_x10 = $urandom_range(1, 32 * LSB * 10 - 1);
      if (off_x10 % (LSB * 10) == 0) off_x10++;
      @(negedge clk_c8); start = 1;
      if (t % 10 == 5) begin           // restart in the middle of a search
        @(negedge clk_c8); start = 0;
        repeat (3) @(negedge clk_c8);
        start = 1;
      end
      @(negedge clk_c8); start = 0;
      cyc = 1;
      while (!done && cyc < 20) begin
        checks++;
        if (!busy) failures++;
        @(negedge clk_c8);
        cyc++;
      end
      res = off_x10 - int'(dac_code) * LSB * 10;
      checks++;
      if (cyc != 7 || busy || res <= 0 || res >= LSB * 10) begin
        failures++;
        $display("burst %0d: offset %0d code %0d cycles %0d", t, off_x10, dac_code, cyc);
      end
      repeat (4) @(negedge clk_c8);
      checks++;
      if (!done || off_x10 - int'(dac_code) * LSB * 10 != res) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_skew_adapt: skew adaptation against a sampling-phase model. Each run has
// a hidden optimum phase code P. Random data bits give one observation per
// clock; when the pattern matches a slope rule, the slope sign is set so the
// detector votes "right" when the present phase code is below P and "left"
// when above, and random when equal (the eye centre gives no slope
// information); 30% of clocks carry no observation. The strobe comes every second clock as the C16 strobe. Checks: busy
// until done, done within a bounded time, the final code within 1 of P, and
// the code held after done while the votes keep coming.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_skew_adapt;
  localparam int PR_W = 5;
  logic clk = 0, rst_n = 0, start = 0, strobe = 0, slope_pos = 0, valid = 0;
  logic [3:0] bits;
  logic [PR_W-1:0] pr_code;
  logic busy, done, vote_right, vote_left;
  int checks = 0, failures = 0, n_votes = 0;
  int popt;

  skew_adapt #(.PR_W(PR_W)) dut (.clk, .rst_n, .start, .strobe, .bits, .slope_pos, .valid,
                                 .pr_code, .busy, .done, .vote_right, .vote_left);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Slope sign that makes the matching rule vote in direction want_right.
  function automatic logic slope_for(logic [3:0] b, logic want_right);
    logic rising_set;
    rising_set = (b[3:1] == 3'b011) || (b[2:0] == 3'b110);
    return want_right ? rising_set : ~rising_set;
  endfunction

  task automatic observe();
    logic wr;
    bits  = 4'($urandom);
    valid = $urandom_range(0, 9) >= 3;
    if (int'(pr_code) < popt) wr = 1;
    else if (int'(pr_code) > popt) wr = 0;
    else wr = 1'($urandom);
    slope_pos = slope_for(bits, wr);
  endtask

  initial begin
    bits = '0; popt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int cyc;
      popt = (t < 32) ? t : $urandom_range(0, (1 << PR_W) - 1);
      @(negedge clk); start = 1; valid = 0; strobe = 0;
      @(negedge clk); start = 0;
      cyc = 0;
      while (!done && cyc < 2000) begin
        checks++;
        if (!busy) failures++;
        strobe = cyc % 2 == 1;
        observe();
        #1;
        n_votes += int'(vote_right) + int'(vote_left);
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (!done || (int'(pr_code) - popt) > 1 || (popt - int'(pr_code)) > 1) begin
        failures++;
        $display("run %0d: optimum %0d code %0d cycles %0d", t, popt, pr_code, cyc);
      end
      begin
        logic [PR_W-1:0] held;
        held = pr_code;
        for (int c = 0; c < 20; c++) begin
          strobe = c % 2 == 1;
          observe();
          @(negedge clk);
        end
        checks++;
        if (pr_code !== held || busy) failures++;
      end
    end
    $display("votes=%0d", n_votes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

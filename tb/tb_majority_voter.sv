// tb_majority_voter: random votes and strobes (every second cycle, plus a
// section with random window lengths) against a reference count. While the
// strobe is high the outputs must give the majority of the window's votes
// including the current cycle, no decision on a tie, and the next window
// must start from zero. A long run of right votes checks saturation.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_majority_voter;
  localparam int CNT_W = 6;
  logic clk = 0, rst_n = 0, vote_right = 0, vote_left = 0, strobe = 0;
  logic dec_valid, dec_right;
  int checks = 0, failures = 0, n_r = 0, n_l = 0, n_tie = 0;
  int acc;

  majority_voter #(.CNT_W(CNT_W)) dut (.clk, .rst_n, .vote_right, .vote_left, .strobe, .dec_valid, .dec_right);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int s;
      @(negedge clk);
      if (n < 3000) strobe = n % 2 == 1;
      else if (n < 5000) strobe = $urandom_range(0, 4) == 0;
      else strobe = n % 100 == 99;
      if (n < 5000) begin
        case ($urandom_range(0, 2))
          0: begin vote_right = 1; vote_left = 0; end
          1: begin vote_right = 0; vote_left = 1; end
          default: begin vote_right = 0; vote_left = 0; end
        endcase
      end else begin
        vote_right = 1; vote_left = 0;
      end
      s = acc + int'(vote_right) - int'(vote_left);
      if (s > 31) s = 31;
      if (s < -32) s = -32;
      #1;
      if (strobe) begin
        checks++;
        if (dec_valid !== (s != 0) || (s != 0 && dec_right !== (s > 0))) begin
          failures++;
          if (failures < 10) $display("cycle %0d: sum %0d valid %b right %b", n, s, dec_valid, dec_right);
        end
        if (s > 0) n_r++; else if (s < 0) n_l++; else n_tie++;
        acc = 0;
      end else begin
        checks++;
        if (dec_valid) failures++;
        acc = s;
      end
    end
    $display("decisions right=%0d left=%0d ties=%0d", n_r, n_l, n_tie);
    checks++;
    if (n_r == 0 || n_l == 0 || n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

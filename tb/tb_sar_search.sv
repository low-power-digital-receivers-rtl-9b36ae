// tb_sar_search: the 5-bit successive-approximation search against a hidden
// target. After start the code is mid-scale; each step is answered "up" when
// the trial code is not above the target. Steps come with random gaps. After
// exactly W steps done must rise and the code must equal the target; further
// steps must not change it. Also checks mid-scale right after start.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_sar_search;
  localparam int W = 5;
  logic clk = 0, rst_n = 0, start = 0, step = 0, up;
  logic [W-1:0] code;
  logic done;
  int checks = 0, failures = 0;
  int target;

  sar_search #(.W(W)) dut (.clk, .rst_n, .start, .step, .up, .code, .done);

  always #5 clk = ~clk;
  assign up = int'(code) <= target;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    target = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      target = (t < 32) ? t : $urandom_range(0, (1 << W) - 1);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (code !== W'(1 << (W - 1)) || done) failures++;
      for (int s = 0; s < W; s++) begin
        checks++;
        if (done) failures++;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        step = 1;
        @(negedge clk); step = 0;
      end
      checks++;
      if (!done || int'(code) != target) begin
        failures++;
        $display("target %0d: code %0d done %b", target, code, done);
      end
      step = 1; repeat (2) @(negedge clk); step = 0;
      checks++;
      if (!done || int'(code) != target) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

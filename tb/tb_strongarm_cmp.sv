// tb_strongarm_cmp: checks the comparator model against a direct comparison.
// Random samples and references; with en high q must equal vin > vref after
// the rising edge, with en low it must hold. Ties are exercised explicitly.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_strongarm_cmp;
  localparam int REF_W = 12;
  logic clk = 0, rst_n = 0, en = 0, q;
  logic signed [REF_W-1:0] vin = '0, vref = '0;
  int checks = 0, failures = 0;
  logic prev;

  strongarm_cmp #(.REF_W(REF_W)) dut (.clk, .rst_n, .en, .vin, .vref, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (q !== 1'b0) failures++;
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      prev = q;
      en   = ($urandom_range(0, 3) != 0);
      vin  = REF_W'($signed($urandom_range(0, 1600)) - 800);
      vref = (i % 10 == 0) ? vin : REF_W'($signed($urandom_range(0, 1600)) - 800);
      @(posedge clk); #1;
      checks++;
      if (en ? (q !== (vin > vref)) : (q !== prev)) begin
        failures++;
        $display("mismatch vin=%0d vref=%0d en=%0b q=%0b", vin, vref, en, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bmrx_ctrl: burst-mode controller over a sequence of bursts. Each burst
// has its own random input offset and optimum phase code. The testbench
// models the single shared comparator: in DC mode (cmp_mode 0) it returns the
// sign of the clamped sum 2 x (offset - DAC); in slope mode (cmp_mode 1) it
// returns the slope sign of the phase model used in tb_skew_adapt. The
// preamble ends either before or after DC recovery finishes. Checks per
// burst: cmp_mode stays 0 until DC recovery is done and the preamble is over,
// DC recovery ends with a residual below 1 LSB, locked comes within a bounded
// time with the phase code within 1 of the optimum, and the mode stays 1
// while locked. Counts bursts with early and late preamble ends.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_bmrx_ctrl;
  localparam int DAC_W = 5;
  localparam int PR_W  = 5;
  localparam int LSB   = 100;   // 10 mV in units of 0.1 mV
  logic clk_c8 = 0, rst_n = 0, burst_start = 0, preamble_end = 0, cmp_out, bits_valid = 0;
  logic [3:0] bits = '0;
  logic cmp_mode, dc_busy, dc_done, skew_done, locked;
  logic [DAC_W-1:0] dac_code;
  logic [PR_W-1:0] pr_code;
  int checks = 0, failures = 0, n_early = 0, n_late = 0;
  int off, popt;
  logic slope_bit;

  bmrx_ctrl #(.DAC_W(DAC_W), .PR_W(PR_W)) dut (
    .clk_c8, .rst_n, .burst_start, .preamble_end, .cmp_out, .bits, .bits_valid,
    .cmp_mode, .dac_code, .pr_code, .dc_busy, .dc_done, .skew_done, .locked);

  always #5 clk_c8 = ~clk_c8;

  function automatic logic dc_sign(int o, int code);
    int s;
    s = 2 * (o - code * LSB);
    if (s > 4000) s = 4000;
    if (s < -4000) s = -4000;
    return s > 0;
  endfunction
  assign cmp_out = cmp_mode ? slope_bit : dc_sign(off, int'(dac_code));

  task automatic observe();
    logic wr, rising_set;
    bits       = 4'($urandom);
    bits_valid = $urandom_range(0, 9) >= 3;
    if (int'(pr_code) < popt) wr = 1;
    else if (int'(pr_code) > popt) wr = 0;
    else wr = 1'($urandom);
    rising_set = (bits[3:1] == 3'b011) || (bits[2:0] == 3'b110);
    slope_bit  = wr ? rising_set : ~rising_set;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    off = 0; popt = 0; slope_bit = 0;
    repeat (2) @(negedge clk_c8);
    rst_n = 1;
    for (int b = 0; b < 60; b++) begin
      int cyc, pre_at, res;
      bit dc_checked;
      off    = $urandom_range(1, 32 * LSB - 1);
      if (off % LSB == 0) off++;
      popt   = $urandom_range(0, (1 << PR_W) - 1);
      pre_at = (b % 2 == 0) ? 3 : $urandom_range(8, 20);
      if (pre_at < 7) n_early++; else n_late++;
      @(negedge clk_c8); burst_start = 1;
      @(negedge clk_c8); burst_start = 0;
      cyc = 1;
      dc_checked = 0;
      while (!locked && cyc < 400) begin
        preamble_end = cyc == pre_at;
        observe();
        #1;
        if (!dc_checked && dc_done && !dc_busy) begin
          dc_checked = 1;
          res = off - int'(dac_code) * LSB;
          checks++;
          if (res <= 0 || res >= LSB) begin
            failures++;
            $display("burst %0d: offset %0d code %0d", b, off, dac_code);
          end
        end
        checks++;
        if (cmp_mode && (!dc_checked || cyc <= pre_at)) begin
          failures++;
          $display("burst %0d: slope mode too early at cycle %0d", b, cyc);
        end
        @(negedge clk_c8);
        cyc++;
      end
      preamble_end = 0;
      checks++;
      if (!locked || !skew_done || !cmp_mode || (int'(pr_code) - popt) > 1 || (popt - int'(pr_code)) > 1) begin
        failures++;
        $display("burst %0d: locked %b optimum %0d code %0d", b, locked, popt, pr_code);
      end
      repeat ($urandom_range(5, 30)) begin
        observe();
        @(negedge clk_c8);
        checks++;
        if (!locked || !cmp_mode) failures++;
      end
    end
    $display("bursts with early preamble end=%0d late=%0d", n_early, n_late);
    checks++;
    if (n_early == 0 || n_late == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

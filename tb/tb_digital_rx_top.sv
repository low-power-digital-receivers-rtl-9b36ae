// tb_digital_rx_top: end-to-end test of digital_rx_top at its default
// parameters (REF_W 12, four paths, 5-bit DAC and phase codes). The three
// receivers run at the same time on their own clocks (10, 8 and 12 ns
// periods; only their ratios matter here), each driven by its own process.
//  * 10 Gb/s receiver: random bits through the 4-tap channel model; the edge
//    samples put each sequence at its own position or one step off where it
//    can still be decoded. Every decision must equal the sent sequence.
//  * 16 Gb/s receiver: random bits with +/-20 noise, plus the two repair
//    cases of tb_tbk_rx16 (a B0 error and a B-1 error next to a strong 1).
//    Trace-back is off for the first quarter (output must equal the DFE
//    output two cycles earlier) and on for the rest (every output bit must
//    equal the sent bit).
//  * burst-mode controller: eight bursts, each with its own offset and
//    optimum phase, preamble ending before or after DC recovery; the DAC
//    code must cancel the offset to within 1 LSB and the phase code must end
//    within 1 of the optimum before locked.
// Mechanism counters, each of which must be nonzero: position predictions
// bottom/mid/top, position corrections up/down, trace-back repairs of both
// kinds, trace-back changes, trace-back bypass checks, DC recoveries, skew
// adaptations, comparator mode switches, early and late preamble ends.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_digital_rx_top;
  import seqrx_pkg::*;
  import tb_rx_model_pkg::*;
  localparam int REF_W = 12;
  localparam int NPATH = 4;
  localparam int DAC_W = 5;
  localparam int PR_W  = 5;
  localparam int NC10  = 2000;
  localparam int NC16  = 2000;
  localparam int NB16  = NPATH * (NC16 + 4) + 8;
  localparam int NBURST = 8;
  localparam int LSB   = 100;

  logic rx10_clk = 0, rx10_rst_n = 0;
  logic signed [REF_W-1:0] rx10_edge_s [NPATH], rx10_data_s [NPATH], rx10_edge_ref [2], rx10_bank_ref [4][2];
  logic [NPATH-1:0] rx10_bits, rx10_ovr;
  seq_t rx10_seq [NPATH];
  pos_e rx10_pos [NPATH];

  logic rx16_clk = 0, rx16_rst_n = 0, rx16_tb_en = 0;
  logic signed [REF_W-1:0] rx16_data_s [NPATH], rx16_fix_ref [2], rx16_bank_ref [4][2], rx16_chk_ref_tbl [4];
  logic [NPATH-1:0] rx16_dfe_bits, rx16_tb_bits, rx16_ovr, rx16_tb_applied, rx16_tb_changed;
  seq_t rx16_dfe_seq [NPATH], rx16_tb_seq [NPATH];

  logic bm_clk_c8 = 0, bm_rst_n = 0, bm_burst_start = 0, bm_preamble_end = 0, bm_cmp_out, bm_bits_valid = 0;
  logic [3:0] bm_bits = '0;
  logic bm_cmp_mode, bm_dc_busy, bm_dc_done, bm_skew_done, bm_locked;
  logic [DAC_W-1:0] bm_dac_code;
  logic [PR_W-1:0] bm_pr_code;

  int checks = 0, failures = 0;
  int n_pos [3];
  int n_up = 0, n_down = 0;
  int n_case1 = 0, n_case2 = 0, n_tb_changed = 0, n_bypass = 0;
  int n_dc = 0, n_skew = 0, n_mode_sw = 0, n_early = 0, n_late = 0;

  digital_rx_top dut (.*);

  always #5 rx10_clk  = ~rx10_clk;
  always #4 rx16_clk  = ~rx16_clk;
  always #6 bm_clk_c8 = ~bm_clk_c8;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 10 Gb/s receiver ----------------
  logic s10 [0:NPATH*NC10+8];
  seq_t t10 [NPATH], t10_q [NPATH];
  int   p10 [NPATH];

  task automatic run_rx10();
    rx10_edge_ref[1] = 200; rx10_edge_ref[0] = -200;
    for (int b = 0; b < 4; b++) for (int j = 0; j < 2; j++) rx10_bank_ref[b][j] = REF_W'(bank_ref_val(2'(b), j));
    foreach (s10[i]) s10[i] = 1'($urandom_range(0, 1));
    s10[0] = 0; s10[1] = 0;
    for (int k = 0; k < NPATH; k++) begin rx10_edge_s[k] = '0; rx10_data_s[k] = '0; t10[k] = '0; p10[k] = 0; end
    repeat (2) @(negedge rx10_clk);
    rx10_rst_n = 1;
    for (int n = 0; n <= NC10 + 1; n++) begin
      @(negedge rx10_clk); #1;
      if (n > 0)
        for (int k = 0; k < NPATH; k++) begin
          n_pos[p10[k]]++;
          if (rx10_ovr[k] && rx10_pos[k] > pos_e'(p10[k])) n_up++;
          if (rx10_ovr[k] && rx10_pos[k] < pos_e'(p10[k])) n_down++;
        end
      t10_q = t10;
      for (int k = 0; k < NPATH; k++) begin
        int i;
        i = 2 + n * NPATH + k;
        t10[k] = {s10[i], s10[i-1], s10[i+1], s10[i-2]};
        p10[k] = allowed_pos(t10[k], $urandom_range(0, 1) != 0);
        rx10_edge_s[k] = (p10[k] == 2) ? 300 : (p10[k] == 1) ? 0 : -300;
        rx10_data_s[k] = REF_W'(level(t10[k]));
      end
      @(posedge rx10_clk); #1;
      if (n > 1)
        for (int k = 0; k < NPATH; k++) begin
          checks++;
          if (rx10_seq[k] !== t10_q[k] || rx10_bits[k] !== t10_q[k][B0]) begin
            failures++;
            if (failures < 10) $display("rx10 cycle %0d path %0d: got %b want %b", n, k, rx10_seq[k], t10_q[k]);
          end
        end
    end
  endtask

  // ---------------- 16 Gb/s receiver ----------------
  logic s16 [0:NB16];
  int   inj [0:NB16];
  seq_t t16 [0:NC16+4][NPATH];
  seq_t dfe_h [0:NC16+4][NPATH];

  task automatic run_rx16();
    int i;
    for (int j = 0; j < 2; j++) rx16_fix_ref[j] = REF_W'(fix_ref_val(j));
    for (int j = 0; j < 4; j++) rx16_chk_ref_tbl[j] = REF_W'(chk_ref_val(j));
    for (int b = 0; b < 4; b++) for (int j = 0; j < 2; j++) rx16_bank_ref[b][j] = REF_W'(bank_ref_val(2'(b), j));
    foreach (s16[j]) s16[j] = 1'($urandom_range(0, 1));
    foreach (inj[j]) inj[j] = 0;
    s16[0] = 0; s16[1] = 0;
    i = 40;
    while (i < NB16 - 8) begin
      s16[i-2] = 1; s16[i-1] = 1; s16[i] = 0; s16[i+1] = 1; s16[i+2] = 1;
      inj[i] = ($urandom_range(0, 1) != 0) ? 1 : 2;
      i += $urandom_range(10, 24);
    end
    for (int k = 0; k < NPATH; k++) rx16_data_s[k] = '0;
    repeat (2) @(negedge rx16_clk);
    rx16_rst_n = 1;
    for (int n = 0; n <= NC16 + 3; n++) begin
      @(negedge rx16_clk); #1;
      rx16_tb_en = n >= NC16 / 4;
      for (int k = 0; k < NPATH; k++) begin
        int lv, j;
        j = 2 + n * NPATH + k;
        t16[n][k] = {s16[j], s16[j-1], s16[j+1], s16[j-2]};
        lv = level(t16[n][k]) + $urandom_range(0, 40) - 20;
        if (inj[j] == 1) lv = level(t16[n][k]) + 130;
        if (inj[j] == 2) lv = level(t16[n][k]) - 200;
        rx16_data_s[k] = REF_W'(lv);
      end
      @(posedge rx16_clk); #1;
      if (n >= 1)
        for (int k = 0; k < NPATH; k++) dfe_h[n-1][k] = rx16_dfe_seq[k];
      if (n >= 4)
        for (int k = 0; k < NPATH; k++) begin
          int j, m;
          m = n - 3;
          j = 2 + m * NPATH + k;
          if (n + 1 < NC16 / 4) begin
            checks++;
            n_bypass++;
            if (rx16_tb_seq[k] !== dfe_h[m][k]) failures++;
          end else if (n - 1 >= NC16 / 4 && m > NC16 / 4 + 2) begin
            checks++;
            if (rx16_tb_bits[k] !== t16[m][k][B0] ||
                (inj[j-1] != 1 && inj[j-2] != 1 && rx16_tb_seq[k] !== t16[m][k])) begin
              failures++;
              if (failures < 10) $display("rx16 samples %0d path %0d: got %b want %b", m, k, rx16_tb_seq[k], t16[m][k]);
            end
            if (inj[j] == 1 && rx16_tb_changed[k] && dfe_h[m][k][B0] !== t16[m][k][B0]) n_case1++;
            if (inj[j] == 2 && rx16_tb_changed[k] && dfe_h[m][k] !== t16[m][k]) n_case2++;
            if (rx16_tb_changed[k]) n_tb_changed++;
          end
        end
    end
  endtask

  // ---------------- burst-mode controller ----------------
  int off, popt;
  logic slope_bit;

  function automatic logic dc_sign(int o, int code);
    int s;
    s = 2 * (o - code * LSB);
    if (s > 4000) s = 4000;
    if (s < -4000) s = -4000;
    return s > 0;
  endfunction
  assign bm_cmp_out = bm_cmp_mode ? slope_bit : dc_sign(off, int'(bm_dac_code));

  task automatic observe();
    logic wr, rising_set;
    bm_bits       = 4'($urandom);
    bm_bits_valid = $urandom_range(0, 9) >= 3;
    if (int'(bm_pr_code) < popt) wr = 1;
    else if (int'(bm_pr_code) > popt) wr = 0;
    else wr = 1'($urandom);
    rising_set = (bm_bits[3:1] == 3'b011) || (bm_bits[2:0] == 3'b110);
    slope_bit  = wr ? rising_set : ~rising_set;
  endtask

  task automatic run_bm();
    off = 0; popt = 0; slope_bit = 0;
    repeat (2) @(negedge bm_clk_c8);
    bm_rst_n = 1;
    for (int b = 0; b < NBURST; b++) begin
      int cyc, pre_at, res;
      bit dc_checked, mode_q;
      off    = $urandom_range(1, 32 * LSB - 1);
      if (off % LSB == 0) off++;
      popt   = $urandom_range(0, (1 << PR_W) - 1);
      pre_at = (b % 2 == 0) ? 3 : $urandom_range(8, 20);
      if (pre_at < 7) n_early++; else n_late++;
      @(negedge bm_clk_c8); bm_burst_start = 1;
      @(negedge bm_clk_c8); bm_burst_start = 0;
      cyc = 1; dc_checked = 0; mode_q = bm_cmp_mode;
      while (!bm_locked && cyc < 400) begin
        bm_preamble_end = cyc == pre_at;
        observe();
        #1;
        if (!dc_checked && bm_dc_done && !bm_dc_busy) begin
          dc_checked = 1;
          res = off - int'(bm_dac_code) * LSB;
          checks++;
          if (res <= 0 || res >= LSB) failures++;
          else n_dc++;
        end
        if (bm_cmp_mode && !mode_q) n_mode_sw++;
        mode_q = bm_cmp_mode;
        checks++;
        if (bm_cmp_mode && (!dc_checked || cyc <= pre_at)) failures++;
        @(negedge bm_clk_c8);
        cyc++;
      end
      bm_preamble_end = 0;
      checks++;
      if (!bm_locked || (int'(bm_pr_code) - popt) > 1 || (popt - int'(bm_pr_code)) > 1) begin
        failures++;
        $display("burst %0d: locked %b optimum %0d code %0d", b, bm_locked, popt, bm_pr_code);
      end else n_skew++;
      repeat ($urandom_range(5, 30)) begin
        observe();
        @(negedge bm_clk_c8);
      end
    end
  endtask

  initial begin
    n_pos[0] = 0; n_pos[1] = 0; n_pos[2] = 0;
    fork
      run_rx10();
      run_rx16();
      run_bm();
    join
    $display("rx10: predictions bottom=%0d mid=%0d top=%0d, corrections up=%0d down=%0d",
             n_pos[0], n_pos[1], n_pos[2], n_up, n_down);
    $display("rx16: repairs case I=%0d case II=%0d, trace-back changes=%0d, bypass checks=%0d",
             n_case1, n_case2, n_tb_changed, n_bypass);
    $display("burst: DC recoveries=%0d skew adaptations=%0d mode switches=%0d preamble early=%0d late=%0d",
             n_dc, n_skew, n_mode_sw, n_early, n_late);
    checks++;
    if (n_pos[0] == 0 || n_pos[1] == 0 || n_pos[2] == 0 || n_up == 0 || n_down == 0 ||
        n_case1 == 0 || n_case2 == 0 || n_tb_changed == 0 || n_bypass == 0 ||
        n_dc < NBURST || n_skew < NBURST || n_mode_sw < NBURST || n_early == 0 || n_late == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_channel_sweep: both wireline receivers of digital_rx_top, at the default
// parameters, over three partially equalised channels. Only the references
// change between channels, the way a chip's tunable reference generator is
// set from the measured taps. For each tap set {h0, h+1, h-1, h+2} the
// testbench computes the 16 sequence levels and from them the in-bank, fixed
// and check references, then sends random bits:
//   * 10 Gb/s receiver: edge samples predict each sequence's position, or a
//     recoverable one-step-off position; data samples carry +/-10 mV noise,
//     which flips the floating comparator whose reference a sample sits on
//     (the in-bank comparator errors the DFE must absorb); every decision must
//     be exact;
//   * 16 Gb/s receiver with trace-back on: samples carry +/-10 mV noise, and
//     every DFE and trace-back decision must be exact (no trace-back change
//     may alter a correct decision).
// The first set is the example channel of the document; the other two (a
// lower-loss set with a more dominant main cursor and a higher-loss set with a
// smaller main cursor) are this testbench's choices. All keep h0 > h+1 > h-1 >
// h+2 and h0 > h-1 + h+2, which the fixed-comparator placement needs, and
// h+1 < h-1 + h+2, so neighbouring banks overlap the way the three-position
// scheme of the 10 Gb/s receiver assumes (with h+1 = 180, h-1 + h+2 = 170 the
// banks separate and the edge prediction no longer describes the channel). The 10 and
// 16 Gb/s receivers run one after the other on 10 ns and 8 ns clocks.
module tb_channel_sweep;
  import seqrx_pkg::*;
  import tb_rx_model_pkg::allowed_pos;
  localparam int REF_W = 12;
  localparam int NPATH = 4;
  localparam int DAC_W = 5;
  localparam int PR_W  = 5;
  localparam int NCYC  = 800;
  localparam int NSET  = 3;
  localparam int TAPS [NSET][4] = '{'{260, 160, 120, 80}, '{300, 120, 90, 40}, '{220, 150, 110, 60}};

  logic rx10_clk = 0, rx10_rst_n = 0;
  logic signed [REF_W-1:0] rx10_edge_s [NPATH], rx10_data_s [NPATH], rx10_edge_ref [2], rx10_bank_ref [4][2];
  logic [NPATH-1:0] rx10_bits, rx10_ovr;
  seq_t rx10_seq [NPATH];
  pos_e rx10_pos [NPATH];
  logic rx16_clk = 0, rx16_rst_n = 0, rx16_tb_en = 1;
  logic signed [REF_W-1:0] rx16_data_s [NPATH], rx16_fix_ref [2], rx16_bank_ref [4][2], rx16_chk_ref_tbl [4];
  logic [NPATH-1:0] rx16_dfe_bits, rx16_tb_bits, rx16_ovr, rx16_tb_applied, rx16_tb_changed;
  seq_t rx16_dfe_seq [NPATH], rx16_tb_seq [NPATH];
  logic bm_clk_c8 = 0, bm_rst_n = 0, bm_burst_start = 0, bm_preamble_end = 0, bm_cmp_out = 0, bm_bits_valid = 0;
  logic [3:0] bm_bits = '0;
  logic bm_cmp_mode, bm_dc_busy, bm_dc_done, bm_skew_done, bm_locked;
  logic [DAC_W-1:0] bm_dac_code;
  logic [PR_W-1:0] bm_pr_code;

  int checks = 0, failures = 0;
  int h [4];
  int n_applied = 0, n_ovr10 = 0, n_inbank = 0;

  digital_rx_top dut (.*);

  always #5 rx10_clk = ~rx10_clk;
  always #4 rx16_clk = ~rx16_clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl(logic [3:0] s);
    return h[0] * (s[3] ? 1 : -1) + h[1] * (s[2] ? 1 : -1) + h[2] * (s[1] ? 1 : -1) + h[3] * (s[0] ? 1 : -1);
  endfunction
  function automatic int mid(logic [3:0] a, logic [3:0] b);
    return (lvl(a) + lvl(b)) / 2;
  endfunction

  task automatic set_refs();
    for (int b = 0; b < 4; b++) begin
      rx10_bank_ref[b][1] = REF_W'(lvl({2'(b), 2'b10}));
      rx10_bank_ref[b][0] = REF_W'(lvl({2'(b), 2'b01}));
      rx16_bank_ref[b]    = rx10_bank_ref[b];
    end
    // Edge references: the edge sample is modelled as +/-300 or 0, see below.
    rx10_edge_ref[1] = 200; rx10_edge_ref[0] = -200;
    rx16_fix_ref[1] = REF_W'(mid(4'b0111, 4'b1100));
    rx16_fix_ref[0] = REF_W'(mid(4'b0011, 4'b1000));
    rx16_chk_ref_tbl[0] = REF_W'(mid(4'b1101, 4'b0111));
    rx16_chk_ref_tbl[1] = REF_W'(mid(4'b1100, 4'b0110));
    rx16_chk_ref_tbl[2] = REF_W'(mid(4'b1001, 4'b0011));
    rx16_chk_ref_tbl[3] = REF_W'(mid(4'b1000, 4'b0010));
  endtask

  logic s [0:NPATH*(NCYC+4)+8];
  seq_t tr [0:NCYC+4][NPATH];

  task automatic run_rx10(int set);
    int p [NPATH];
    int nz;
    foreach (s[i]) s[i] = 1'($urandom_range(0, 1));
    s[0] = 0; s[1] = 0;
    rx10_rst_n = 0;
    for (int k = 0; k < NPATH; k++) begin rx10_edge_s[k] = '0; rx10_data_s[k] = '0; p[k] = 0; end
    repeat (2) @(negedge rx10_clk);
    rx10_rst_n = 1;
    for (int n = 0; n <= NCYC + 1; n++) begin
      @(negedge rx10_clk); #1;
      for (int k = 0; k < NPATH; k++) n_ovr10 += int'(rx10_ovr[k]);
      for (int k = 0; k < NPATH; k++) begin
        int i;
        i = 2 + n * NPATH + k;
        tr[n][k] = {s[i], s[i-1], s[i+1], s[i-2]};
        p[k] = allowed_pos(tr[n][k], $urandom_range(0, 1) != 0);
        rx10_edge_s[k] = (p[k] == 2) ? 300 : (p[k] == 1) ? 0 : -300;
        nz = $urandom_range(0, 20) - 10;
        // A sequence with B-1B+2 = 01 or 10 sits on an in-bank reference:
        // positive noise flips that floating comparator (Figure 2.29 case).
        if (nz > 0 && (tr[n][k][1] ^ tr[n][k][0])) n_inbank++;
        rx10_data_s[k] = REF_W'(lvl(tr[n][k]) + nz);
      end
      @(posedge rx10_clk); #1;
      if (n > 1)
        for (int k = 0; k < NPATH; k++) begin
          checks++;
          if (rx10_seq[k] !== tr[n-1][k]) begin
            failures++;
            if (failures < 10) $display("set %0d rx10 cycle %0d path %0d: got %b want %b", set, n, k, rx10_seq[k], tr[n-1][k]);
          end
        end
    end
  endtask

  task automatic run_rx16(int set);
    seq_t dfe_q [0:NCYC+4][NPATH];
    foreach (s[i]) s[i] = 1'($urandom_range(0, 1));
    s[0] = 0; s[1] = 0;
    rx16_rst_n = 0;
    for (int k = 0; k < NPATH; k++) rx16_data_s[k] = '0;
    repeat (2) @(negedge rx16_clk);
    rx16_rst_n = 1;
    for (int n = 0; n <= NCYC + 3; n++) begin
      @(negedge rx16_clk); #1;
      for (int k = 0; k < NPATH; k++) begin
        int i;
        i = 2 + n * NPATH + k;
        tr[n][k] = {s[i], s[i-1], s[i+1], s[i-2]};
        rx16_data_s[k] = REF_W'(lvl(tr[n][k]) + $urandom_range(0, 20) - 10);
      end
      @(posedge rx16_clk); #1;
      if (n >= 2)
        for (int k = 0; k < NPATH; k++) begin
          checks++;
          if (rx16_dfe_seq[k] !== tr[n-1][k]) begin
            failures++;
            if (failures < 10) $display("set %0d rx16 DFE cycle %0d path %0d: got %b want %b", set, n, k, rx16_dfe_seq[k], tr[n-1][k]);
          end
        end
      if (n >= 5)
        for (int k = 0; k < NPATH; k++) begin
          checks++;
          n_applied += int'(rx16_tb_applied[k]);
          if (rx16_tb_seq[k] !== tr[n-3][k]) begin
            failures++;
            if (failures < 10) $display("set %0d rx16 trace-back cycle %0d path %0d: got %b want %b", set, n, k, rx16_tb_seq[k], tr[n-3][k]);
          end
        end
    end
  endtask

  initial begin
    for (int k = 0; k < NPATH; k++) begin
      rx10_edge_s[k] = '0; rx10_data_s[k] = '0; rx16_data_s[k] = '0;
    end
    for (int set = 0; set < NSET; set++) begin
      int f0;
      for (int j = 0; j < 4; j++) h[j] = TAPS[set][j];
      set_refs();
      f0 = failures;
      run_rx10(set);
      run_rx16(set);
      $display("channel %0d (h0=%0d h+1=%0d h-1=%0d h+2=%0d): fixed refs %0d/%0d, failures %0d",
               set, h[0], h[1], h[2], h[3], rx16_fix_ref[1], rx16_fix_ref[0], failures - f0);
    end
    $display("trace-back checks applied=%0d, 10 Gb/s position corrections=%0d, in-bank comparator flips=%0d",
             n_applied, n_ovr10, n_inbank);
    checks++;
    if (n_applied == 0 || n_ovr10 == 0 || n_inbank == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

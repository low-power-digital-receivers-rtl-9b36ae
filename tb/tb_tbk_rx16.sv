// tb_tbk_rx16: end-to-end test of the 16 Gb/s receiver with 1-bit trace-back.
// A random bit stream passes through the 4-tap channel model and is cut into
// four interleaved paths. Every sample gets up to +/-20 of noise. At random,
// isolated positions the stream is forced to the pattern 1 1 0 1 1 (time
// order), so the sample is sequence 0111 and the next one is a strong 1. Then
// a large noise step is added to the 0111 sample:
//   case I  (+130, level 230): the DFE decides 1101 (a bit error); the lower
//           check comparator says "outside", so the trace-back picks 0111;
//   case II (-200, level -100): the DFE decides 0101 (B-1 wrong); the upper
//           check comparator says "within", so the trace-back picks 0111.
// Checks: with trace-back on, every trace-back bit equals the sent bit, and
// every trace-back sequence equals the sent one except in the two samples after a case I
// event (their B+1, B-1 or B+2 come from the wrong DFE history; B0 is
// still right). The DFE must have erred at every case I event. With
// trace-back off (first part of the run), the trace-back output equals the
// DFE output two cycles earlier. Counts both cases and the trace-back
// changes, and fails if any never happens.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_tbk_rx16;
  import seqrx_pkg::*;
  import tb_rx_model_pkg::*;
  localparam int REF_W = 12;
  localparam int NPATH = 4;
  localparam int NCYC  = 3000;
  localparam int NB    = NPATH * (NCYC + 4) + 8;
  logic clk = 0, rst_n = 0, tb_en = 0;
  logic signed [REF_W-1:0] data_s [NPATH];
  logic signed [REF_W-1:0] fix_ref [2];
  logic signed [REF_W-1:0] bank_ref [4][2];
  logic signed [REF_W-1:0] chk_ref_tbl [4];
  logic [NPATH-1:0] dfe_bits, tb_bits, ovr, tb_applied, tb_changed;
  seq_t dfe_seq [NPATH], tb_seq [NPATH];
  int checks = 0, failures = 0;
  int n_case1 = 0, n_case2 = 0, n_changed = 0, n_dfe_err = 0;
  logic stream [0:NB];
  int   inj    [0:NB];          // 0 none, 1 case I, 2 case II
  seq_t tr  [0:NCYC+4][NPATH];
  seq_t dfe_hist [0:NCYC+4][NPATH];

  tbk_rx16 #(.REF_W(REF_W), .NPATH(NPATH)) dut (
    .clk, .rst_n, .tb_en, .data_s, .fix_ref, .bank_ref, .chk_ref_tbl,
    .dfe_bits, .dfe_seq, .tb_bits, .tb_seq, .ovr, .tb_applied, .tb_changed);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(int n, int k);
    return 2 + n * NPATH + k;
  endfunction

  initial begin
    int i;
    for (int j = 0; j < 2; j++) fix_ref[j] = REF_W'(fix_ref_val(j));
    for (int j = 0; j < 4; j++) chk_ref_tbl[j] = REF_W'(chk_ref_val(j));
    for (int b = 0; b < 4; b++) for (int j = 0; j < 2; j++) bank_ref[b][j] = REF_W'(bank_ref_val(2'(b), j));
    foreach (stream[j]) stream[j] = 1'($urandom_range(0, 1));
    foreach (inj[j]) inj[j] = 0;
    stream[0] = 0; stream[1] = 0;
    i = 40;
    while (i < NB - 8) begin
      stream[i-2] = 1; stream[i-1] = 1; stream[i] = 0; stream[i+1] = 1; stream[i+2] = 1;
      inj[i] = ($urandom_range(0, 1) != 0) ? 1 : 2;
      i += $urandom_range(10, 24);
    end
    for (int k = 0; k < NPATH; k++) data_s[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n <= NCYC + 3; n++) begin
      @(negedge clk); #1;
      tb_en = n >= NCYC / 4;
      for (int k = 0; k < NPATH; k++) begin
        int lv, j;
        j = idx(n, k);
        tr[n][k] = {stream[j], stream[j-1], stream[j+1], stream[j-2]};
        lv = level(tr[n][k]) + $urandom_range(0, 40) - 20;
        if (inj[j] == 1) lv = level(tr[n][k]) + 130;
        if (inj[j] == 2) lv = level(tr[n][k]) - 200;
        data_s[k] = REF_W'(lv);
      end
      @(posedge clk); #1;
      if (n >= 1)
        for (int k = 0; k < NPATH; k++) dfe_hist[n-1][k] = dfe_seq[k];
      // DFE output of samples n-1: count the errors at case I events
      if (n >= 2)
        for (int k = 0; k < NPATH; k++) begin
          int j;
          j = idx(n - 1, k);
          if (inj[j] == 1) begin
            checks++;
            if (dfe_bits[k] === tr[n-1][k][B0]) begin
              failures++;
              $display("case I at %0d: DFE did not err", j);
            end
          end
          if (dfe_bits[k] !== tr[n-1][k][B0]) n_dfe_err++;
        end
      // trace-back output of samples n-3
      if (n >= 4)
        for (int k = 0; k < NPATH; k++) begin
          int j, m;
          logic en_at;
          m = n - 3;
          j = idx(m, k);
          en_at = (n - 1) >= NCYC / 4;   // enable seen when the selection was made
          if (!en_at && n + 1 < NCYC / 4) begin
            checks++;
            if (tb_seq[k] !== dfe_hist[m][k]) begin
              failures++;
              if (failures < 10) $display("tb off, samples %0d path %0d: %b vs DFE %b", m, k, tb_seq[k], dfe_hist[m][k]);
            end
          end else if (en_at && m > NCYC / 4 + 2) begin
            checks++;
            if (tb_bits[k] !== tr[m][k][B0] || (inj[j-1] != 1 && inj[j-2] != 1 && tb_seq[k] !== tr[m][k])) begin
              failures++;
              if (failures < 10) $display("samples %0d path %0d (inj %0d): got %b want %b", m, k, inj[j], tb_seq[k], tr[m][k]);
            end
            if (inj[j] == 1) n_case1++;
            if (inj[j] == 2) n_case2++;
            if (tb_changed[k]) n_changed++;
          end
        end
    end
    $display("case I=%0d case II=%0d trace-back changes=%0d DFE bit errors=%0d", n_case1, n_case2, n_changed, n_dfe_err);
    checks++;
    if (n_case1 == 0 || n_case2 == 0 || n_changed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

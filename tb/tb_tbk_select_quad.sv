// tb_tbk_select_quad: random stimulus against a reference model of the
// 1-bit trace-back selection. Each cycle presents DFE sequences, alternatives,
// strong flags, strong values and overwrite flags for four paths. One cycle
// later the output must hold, per path, the alternative when trace-back is
// enabled, the next-in-time path is strong, this path is neither strong nor
// overwritten, and this path's B-1 disagrees with the strong value; otherwise
// the DFE sequence. The next path of the last path is path 0 of the following
// cycle. The enable acts on the selection being made, one cycle after
// the DFE inputs arrive. Counts applied and changed events and requires both to occur, and
// checks that nothing changes while trace-back is disabled.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_tbk_select_quad;
  import seqrx_pkg::*;
  localparam int NPATH = 4;
  localparam int NCYC  = 4000;
  logic clk = 0, rst_n = 0, tb_en = 0;
  seq_t seq [NPATH], alt [NPATH], tb_seq [NPATH];
  logic [NPATH-1:0] is_strong, value, ovr, tb_bits, applied, changed;
  int checks = 0, failures = 0, n_app = 0, n_chg = 0;
  seq_t p_seq [NPATH], p_alt [NPATH];
  logic [NPATH-1:0] p_str, p_val, p_ovr;


  tbk_select_quad #(.NPATH(NPATH)) dut (.clk, .rst_n, .tb_en, .seq, .alt, .is_strong, .value, .ovr,
                                        .tb_seq, .tb_bits, .applied, .changed);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NPATH; k++) begin seq[k] = '0; alt[k] = '0; p_seq[k] = '0; p_alt[k] = '0; end
    is_strong = '0; value = '0; ovr = '0;
    p_str = '0; p_val = '0; p_ovr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      p_seq = seq; p_alt = alt; p_str = is_strong; p_val = value; p_ovr = ovr;
      tb_en = (n % 1000) >= 100;
      for (int k = 0; k < NPATH; k++) begin
        seq[k] = 4'($urandom);
        alt[k] = seq[k] ^ ((($urandom & 1) != 0) ? 4'b1010 : 4'b0010);
      end
      is_strong = NPATH'($urandom);
      value     = NPATH'($urandom);
      ovr       = NPATH'($urandom) & NPATH'($urandom);
      @(posedge clk); #1;
      if (n > 0)
        for (int k = 0; k < NPATH; k++) begin
          logic ns, nv, app, chg;
          seq_t exp;
          ns  = (k == NPATH-1) ? is_strong[0] : p_str[(k + 1) % NPATH];
          nv  = (k == NPATH-1) ? value[0]  : p_val[(k + 1) % NPATH];
          app = tb_en & ns & ~p_str[k] & ~p_ovr[k];
          chg = app & (p_seq[k][BM1] != nv);
          exp = chg ? p_alt[k] : p_seq[k];
          checks++;
          if (tb_seq[k] !== exp || tb_bits[k] !== exp[B0] || applied[k] !== app || changed[k] !== chg) begin
            failures++;
            if (failures < 10) $display("cycle %0d path %0d: got %b want %b", n, k, tb_seq[k], exp);
          end
          if (!tb_en && changed[k]) failures++;
          n_app += int'(applied[k]);
          n_chg += int'(changed[k]);
        end
    end
    $display("applied=%0d changed=%0d", n_app, n_chg);
    checks++;
    if (n_app == 0 || n_chg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

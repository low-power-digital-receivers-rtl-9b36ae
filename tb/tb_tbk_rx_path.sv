// tb_tbk_rx_path: one 16 Gb/s comparator path driven with channel levels of
// random sequences plus up to +/-30 of noise. Each sample is held from just
// after a falling edge through the next rising edge (fixed comparators) and
// the following falling edge (in-bank and check comparators). Then checks:
// the position equals the fixed-comparator model unless a correction moved it; each check comparator
// matches the model reference when it is clocked (an unclocked
// comparator keeps its last decision, which the logic ignores); the strong
// flag and value follow the table and a strong decision always equals the
// true B0; the candidates contain the true sequence for most samples (the
// rest are the decisions that the trace-back is there to repair).
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_tbk_rx_path;
  import seqrx_pkg::*;
  import tb_rx_model_pkg::*;
  localparam int REF_W = 12;
  localparam int NS = 2000;
  logic clk = 0, rst_n = 0;
  logic signed [REF_W-1:0] data_s;
  logic signed [REF_W-1:0] fix_ref [2];
  logic signed [REF_W-1:0] bank_ref [4][2];
  logic signed [REF_W-1:0] chk_ref_tbl [4];
  seq_t cand [4];
  pos_e pos;
  logic ovr, chk_hi, chk_lo, is_strong, value;
  int checks = 0, failures = 0, hits = 0, n_strong = 0;
  seq_t truth;
  int lv;

  tbk_rx_path #(.REF_W(REF_W)) dut (.clk, .rst_n, .data_s, .fix_ref, .bank_ref, .chk_ref_tbl,
                                    .cand, .pos, .ovr, .chk_hi, .chk_lo, .is_strong, .value);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 2; j++) fix_ref[j] = REF_W'(fix_ref_val(j));
    for (int j = 0; j < 4; j++) chk_ref_tbl[j] = REF_W'(chk_ref_val(j));
    for (int b = 0; b < 4; b++) for (int j = 0; j < 2; j++) bank_ref[b][j] = REF_W'(bank_ref_val(2'(b), j));
    data_s = '0;
    truth = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      logic f1, f0, ehi, elo, es;
      truth  = 4'($urandom);
      lv     = level(truth) + $urandom_range(0, 60) - 30;
      #1 data_s = REF_W'(lv);
      @(posedge clk);
      @(negedge clk); #1;
      f1 = lv > fix_ref_val(1);
      f0 = lv > fix_ref_val(0);
      case ({f1, f0})
        2'b11:   begin ehi = 0;                     elo = lv > chk_ref_val(0); end
        2'b00:   begin ehi = lv > chk_ref_val(3);   elo = 0;                   end
        default: begin ehi = lv > chk_ref_val(1);   elo = lv > chk_ref_val(2); end
      endcase
      es = ({f1, f0} == 2'b11 && elo) || ({f1, f0} == 2'b00 && !ehi);
      checks++;
      if ((!ovr && pos !== decode_pos(f1, f0)) || ({f1, f0} != 2'b11 && chk_hi !== ehi) ||
          ({f1, f0} != 2'b00 && chk_lo !== elo) || is_strong !== es ||
          (es && value !== truth[B0])) begin
        failures++;
        if (failures < 10) $display("sample %0d level %0d: pos %0d hi %b lo %b strong %b", n, lv, pos, chk_hi, chk_lo, is_strong);
      end
      n_strong += int'(is_strong);
      for (int c = 0; c < 4; c++) if (cand[c] == truth) begin hits++; break; end
    end
    $display("candidates hold the truth for %0d of %0d samples, strong %0d", hits, NS, n_strong);
    checks++;
    if (hits < NS * 3 / 4 || n_strong == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_seq_gen: sequence generator checks.
//  1. The worked examples of the design description: top with CF=0011 gives
//     1101/1100/1011/1010; top with CF=0001 gives 1101/1100/1010/1001; mid with
//     CF=0011 gives 1001/1000/0111/0110; bottom with CF=1111 is moved to mid.
//  2. Exhaustive truth test with the channel model: for each of the 16 true
//     sequences and each position from which it must be decodable, the
//     floating comparator outputs are computed from the model levels and the
//     true sequence must be the only candidate with its own B+1 and B+2.
//  Position corrections are counted per kind and each must occur.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_seq_gen;
  import seqrx_pkg::*;
  import tb_rx_model_pkg::*;
  logic pos_c1, pos_c0;
  logic [3:0] cf;
  seq_t cand [4];
  pos_e pos;
  logic ovr;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0;

  seq_gen dut (.pos_c1, .pos_c0, .cf, .cand, .pos, .ovr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect4(input logic [1:0] c, input logic [3:0] f, input seq_t e3, e2, e1, e0, input string what);
    {pos_c1, pos_c0} = c; cf = f; #1;
    checks++;
    if (cand[3] !== e3 || cand[2] !== e2 || cand[1] !== e1 || cand[0] !== e0) begin
      failures++;
      $display("%s: got %b %b %b %b", what, cand[3], cand[2], cand[1], cand[0]);
    end
  endtask

  initial begin
    expect4(2'b11, 4'b0011, 4'b1101, 4'b1100, 4'b1011, 4'b1010, "top 0011");
    expect4(2'b11, 4'b0001, 4'b1101, 4'b1100, 4'b1010, 4'b1001, "top 0001");
    expect4(2'b01, 4'b0011, 4'b1001, 4'b1000, 4'b0111, 4'b0110, "mid 0011");
    expect4(2'b00, 4'b1111, 4'b1001, 4'b1000, 4'b0111, 4'b0110, "bottom all ones");
    checks++; if (!ovr || pos != POS_MID) failures++;
    expect4(2'b11, 4'b0000, 4'b1001, 4'b1000, 4'b0111, 4'b0110, "top all zeros");
    checks++; if (!ovr || pos != POS_MID) failures++;

    for (int s = 0; s < 16; s++) begin
      for (int second = 0; second < 2; second++) begin
        int p, lv, nmatch;
        logic [1:0] ubk, lbk;
        p  = allowed_pos(4'(s), second != 0);
        lv = level(4'(s));
        ubk = (p == 2) ? 2'b11 : (p == 1) ? 2'b10 : 2'b01;
        lbk = (p == 2) ? 2'b10 : (p == 1) ? 2'b01 : 2'b00;
        pos_c1 = (p == 2);
        pos_c0 = (p >= 1);
        cf[3] = lv > bank_ref_val(ubk, 1);
        cf[2] = lv > bank_ref_val(ubk, 0);
        cf[1] = lv > bank_ref_val(lbk, 1);
        cf[0] = lv > bank_ref_val(lbk, 0);
        #1;
        if (ovr && pos > pos_e'(p)) n_up++;
        if (ovr && pos < pos_e'(p)) n_down++;
        nmatch = 0;
        for (int i = 0; i < 4; i++)
          if (cand[i][2] == s[2] && cand[i][0] == s[0]) begin
            nmatch++;
            checks++;
            if (cand[i] !== 4'(s)) begin
              failures++;
              $display("seq %b pos %0d: candidate %b instead", 4'(s), p, cand[i]);
            end
          end
        checks++;
        if (nmatch != 1) begin
          failures++;
          $display("seq %b pos %0d: %0d candidates match the feedback", 4'(s), p, nmatch);
        end
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0) begin
      failures++;
      $display("position corrections up=%0d down=%0d", n_up, n_down);
    end
    $display("corrections up=%0d down=%0d", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sd_rx_path: one interleaved path of the 10 Gb/s receiver with its
// comparator models. For every true sequence and each position it must be
// decodable from, the edge sample is set to force that prediction (edge
// references +/-200 mV) and the data sample to the model level. After the
// phi180 (falling) edge the true sequence must be the only candidate with its
// own B+1 and B+2. Position corrections must occur.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_sd_rx_path;
  import seqrx_pkg::*;
  import tb_rx_model_pkg::*;
  localparam int REF_W = 12;
  logic clk = 0, rst_n = 0;
  logic signed [REF_W-1:0] edge_s = '0, data_s = '0;
  logic signed [REF_W-1:0] edge_ref [2];
  logic signed [REF_W-1:0] bank_ref [4][2];
  seq_t cand [4];
  pos_e pos;
  logic ovr;
  int checks = 0, failures = 0, n_ovr = 0;

  sd_rx_path #(.REF_W(REF_W)) dut (.clk, .rst_n, .edge_s, .data_s, .edge_ref, .bank_ref, .cand, .pos, .ovr);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edge_ref[1] = 200; edge_ref[0] = -200;
    for (int b = 0; b < 4; b++) for (int j = 0; j < 2; j++) bank_ref[b][j] = REF_W'(bank_ref_val(2'(b), j));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++)
    for (int s = 0; s < 16; s++) begin
      for (int second = 0; second < 2; second++) begin
        int p, nmatch;
        p = allowed_pos(4'(s), second != 0);
        @(negedge clk);
        edge_s = (p == 2) ? 300 : (p == 1) ? 0 : -300;
        data_s = REF_W'(level(4'(s)));
        @(posedge clk); #1;
        @(negedge clk); #1;
        if (ovr) n_ovr++;
        nmatch = 0;
        for (int i = 0; i < 4; i++)
          if (cand[i][2] == s[2] && cand[i][0] == s[0]) begin
            nmatch++;
            checks++;
            if (cand[i] !== 4'(s)) failures++;
          end
        checks++;
        if (nmatch != 1) begin
          failures++;
          $display("seq %b pos %0d: %0d matching candidates", 4'(s), p, nmatch);
        end
      end
    end
    checks++;
    if (n_ovr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sd_rx10: end-to-end test of the 10 Gb/s quadrate sequence detector.
// A random bit stream passes through the four-tap channel model; each group of
// four data samples and the matching edge samples is presented for one
// quarter-rate cycle. The edge sample of each bit is chosen so that the edge
// comparators predict either the right position or the recoverable neighbour,
// at random. The decoded bits and full sequences must equal the transmitted
// ones one cycle later. Every prediction kind (bottom, mid, top) and every
// correction direction must occur.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_sd_rx10;
  import seqrx_pkg::*;
  import tb_rx_model_pkg::*;
  localparam int REF_W = 12;
  localparam int NPATH = 4;
  localparam int NCYC  = 3000;
  logic clk = 0, rst_n = 0;
  logic signed [REF_W-1:0] edge_s [NPATH];
  logic signed [REF_W-1:0] data_s [NPATH];
  logic signed [REF_W-1:0] edge_ref [2];
  logic signed [REF_W-1:0] bank_ref [4][2];
  logic [NPATH-1:0] bits;
  seq_t seq [NPATH];
  pos_e pos [NPATH];
  logic [NPATH-1:0] ovr;
  int checks = 0, failures = 0;
  int n_pos [3];
  int n_up = 0, n_down = 0;
  logic stream [0:NPATH*NCYC+8];
  seq_t truth [NPATH], truth_q [NPATH];
  int   pred [NPATH];

  sd_rx10 #(.REF_W(REF_W), .NPATH(NPATH)) dut (.clk, .rst_n, .edge_s, .data_s, .edge_ref, .bank_ref, .bits, .seq, .pos, .ovr);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edge_ref[1] = 200; edge_ref[0] = -200;
    for (int b = 0; b < 4; b++) for (int j = 0; j < 2; j++) bank_ref[b][j] = REF_W'(bank_ref_val(2'(b), j));
    foreach (stream[i]) stream[i] = 1'($urandom_range(0, 1));
    stream[0] = 0; stream[1] = 0;
    n_pos[0] = 0; n_pos[1] = 0; n_pos[2] = 0;
    for (int k = 0; k < NPATH; k++) begin edge_s[k] = '0; data_s[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n <= NCYC + 1; n++) begin
      @(negedge clk); #1;
      // prediction flags of the samples presented last cycle
      if (n > 0)
        for (int k = 0; k < NPATH; k++) begin
          n_pos[pred[k]]++;
          if (ovr[k] && pos[k] > pos_e'(pred[k])) n_up++;
          if (ovr[k] && pos[k] < pos_e'(pred[k])) n_down++;
        end
      truth_q = truth;
      for (int k = 0; k < NPATH; k++) begin
        int i;
        i = 2 + n * NPATH + k;
        truth[k]  = {stream[i], stream[i-1], stream[i+1], stream[i-2]};
        pred[k]   = allowed_pos(truth[k], $urandom_range(0, 1) != 0);
        edge_s[k] = (pred[k] == 2) ? 300 : (pred[k] == 1) ? 0 : -300;
        data_s[k] = REF_W'(level(truth[k]));
      end
      @(posedge clk); #1;
      // the DFE has just registered the samples presented last cycle
      if (n > 1)   // the first result still uses the history of the idle samples
        for (int k = 0; k < NPATH; k++) begin
          checks++;
          if (seq[k] !== truth_q[k] || bits[k] !== truth_q[k][3]) begin
            failures++;
            if (failures < 10) $display("cycle %0d path %0d: got %b want %b", n, k, seq[k], truth_q[k]);
          end
        end
    end
    $display("predictions bottom=%0d mid=%0d top=%0d, corrections up=%0d down=%0d", n_pos[0], n_pos[1], n_pos[2], n_up, n_down);
    checks++;
    if (n_pos[0] == 0 || n_pos[1] == 0 || n_pos[2] == 0 || n_up == 0 || n_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

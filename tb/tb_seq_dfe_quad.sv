// tb_seq_dfe_quad: quad-rate sequence DFE check.
// A random bit stream is cut into groups of four (path 0 oldest). For each
// path the true sequence {B0,B+1,B-1,B+2} is hidden among four candidates
// arranged as the sequence generator delivers them: a bank pair (11/10, 10/01
// or 01/00) containing the true bank, two in-bank candidates per bank, the true
// one at a random slot. Only the true sequence matches both feedback bits, so
// the DFE, running on its own past decisions, must output exactly the
// transmitted sequence one clock after the candidates are presented.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_seq_dfe_quad;
  import seqrx_pkg::*;
  localparam int NPATH = 4;
  localparam int NCYC  = 2000;
  logic clk = 0, rst_n = 0;
  seq_t cand [NPATH][4];
  seq_t seq  [NPATH];
  logic [NPATH-1:0] bits;
  int checks = 0, failures = 0;
  logic stream [0:NPATH*NCYC+8];
  seq_t truth  [NPATH];
  seq_t truth_q [NPATH];

  seq_dfe_quad #(.NPATH(NPATH)) dut (.clk, .rst_n, .cand, .seq, .bits);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_cands(input seq_t s, output seq_t c [4]);
    logic [1:0] tb_, ob, ub, lb;
    int kt, ko, inb;
    tb_ = s[3:2];
    case (tb_)
      2'b11: ob = 2'b10;
      2'b00: ob = 2'b01;
      2'b10: ob = $urandom_range(0, 1) ? 2'b11 : 2'b01;
      default: ob = $urandom_range(0, 1) ? 2'b10 : 2'b00;
    endcase
    inb = int'(s[1:0]);
    if (inb == 0)      kt = 0;
    else if (inb == 3) kt = 2;
    else               kt = inb - int'($urandom_range(0, 1));
    ko = $urandom_range(0, 2);
    ub = (tb_ > ob) ? tb_ : ob;
    lb = (tb_ > ob) ? ob : tb_;
    if (ub == tb_) begin
      c[3] = {ub, 2'(kt + 1)}; c[2] = {ub, 2'(kt)};
      c[1] = {lb, 2'(ko + 1)}; c[0] = {lb, 2'(ko)};
    end else begin
      c[3] = {ub, 2'(ko + 1)}; c[2] = {ub, 2'(ko)};
      c[1] = {lb, 2'(kt + 1)}; c[0] = {lb, 2'(kt)};
    end
  endfunction

  initial begin
    foreach (stream[i]) stream[i] = 1'($urandom_range(0, 1));
    stream[0] = 0; stream[1] = 0;   // matches the reset history
    for (int k = 0; k < NPATH; k++) for (int i = 0; i < 4; i++) cand[k][i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      for (int k = 0; k < NPATH; k++) begin
        int i;
        i = 2 + n * NPATH + k;
        truth[k] = {stream[i], stream[i-1], stream[i+1], stream[i-2]};
        make_cands(truth[k], cand[k]);
      end
      @(posedge clk); #1;
      for (int k = 0; k < NPATH; k++) begin
        checks++;
        if (seq[k] !== truth[k] || bits[k] !== truth[k][3]) begin
          failures++;
          if (failures < 10) $display("cycle %0d path %0d: got %b want %b", n, k, seq[k], truth[k]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

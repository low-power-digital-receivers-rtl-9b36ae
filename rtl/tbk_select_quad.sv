// tbk_select_quad: 1-bit data trace-back over the four interleaved paths.
//
// Each decided sequence also carries B-1, a guess of the next bit. When the
// next bit turns out to be strong (decided without help from the DFE) while
// the current one is not, the current decision is checked against it: of the
// DFE sequence and its alternative (which differs in B-1), the one whose B-1
// equals the strong next bit is taken. Trace-back is skipped when the current
// path's position was already corrected by the top/mid/bottom verification,
// and when tb_en is low (low-loss channels, to save power), in which case the
// output is the DFE output delayed.
//
// Path k's next bit is path k+1 of the same group; path NPATH-1 needs path 0 of
// the following group, so inputs are held one cycle and the result is
// registered: tb_seq/tb_bits appear two cycles after the matching seq input.
// applied flags the paths whose decision was taken from the trace-back check,
// changed those where that altered the sequence.
//
// The trace-back rule follows the document; the two-cycle pipeline and the
// point at which tb_en acts are this design's choices.
//
// The assertion at the end is disabled during reset, so the reset net is
// also sampled synchronously; lint reports that as a mixed sync/async use.
module tbk_select_quad
  import seqrx_pkg::*;
#(
  parameter int NPATH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tb_en,
  input  seq_t             seq    [NPATH],
  input  seq_t             alt    [NPATH],
  input  logic [NPATH-1:0] is_strong,
  input  logic [NPATH-1:0] value,
  input  logic [NPATH-1:0] ovr,
  output seq_t             tb_seq [NPATH],
  output logic [NPATH-1:0] tb_bits,
  output logic [NPATH-1:0] applied,
  output logic [NPATH-1:0] changed
);

  seq_t             seq_d [NPATH];
  seq_t             alt_d [NPATH];
  logic [NPATH-1:0] is_strong_d, value_d, ovr_d;
  seq_t             nxt   [NPATH];
  logic [NPATH-1:0] app_c, chg_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_strong_d <= '0;
      value_d  <= '0;
      ovr_d    <= '0;
      for (int k = 0; k < NPATH; k++) begin
        seq_d[k] <= '0;
        alt_d[k] <= '0;
      end
    end else begin
      is_strong_d <= is_strong;
      value_d  <= value;
      ovr_d    <= ovr;
      for (int k = 0; k < NPATH; k++) begin
        seq_d[k] <= seq[k];
        alt_d[k] <= alt[k];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < NPATH; k++) begin
      logic nstrong, nvalue;
      nstrong  = (k == NPATH-1) ? is_strong[0] : is_strong_d[(k == NPATH-1) ? 0 : k+1];
      nvalue   = (k == NPATH-1) ? value[0]  : value_d[(k == NPATH-1) ? 0 : k+1];
      app_c[k] = tb_en & nstrong & ~is_strong_d[k] & ~ovr_d[k];
      if (app_c[k] && seq_d[k][BM1] != nvalue) nxt[k] = alt_d[k];
      else                                      nxt[k] = seq_d[k];
      chg_c[k] = app_c[k] && (seq_d[k][BM1] != nvalue);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      applied <= '0;
      changed <= '0;
      for (int k = 0; k < NPATH; k++) tb_seq[k] <= '0;
    end else begin
      applied <= app_c;
      changed <= chg_c;
      for (int k = 0; k < NPATH; k++) tb_seq[k] <= nxt[k];
    end
  end

  always_comb
    for (int k = 0; k < NPATH; k++) tb_bits[k] = tb_seq[k][B0];

  // A sequence is only changed where the trace-back condition holds.
  a_changed: assert property (@(posedge clk) disable iff (!rst_n) (changed & ~applied) == '0);

endmodule

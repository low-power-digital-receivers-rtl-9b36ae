// tb_tbk_alt_gen: exhaustive check of the trace-back choice table.
// Bank 11/10: lower check 0 -> outside (flip B0 and B-1), 1 -> within (flip
// B-1). Bank 01/00: upper check 1 -> outside, 0 -> within. Includes the worked
// example 1101 -> 0111 (outside) and 0101 -> 0111 (within).
module tb_tbk_alt_gen;
  import seqrx_pkg::*;
  seq_t seq, alt;
  logic chk_hi, chk_lo, outside;
  int checks = 0, failures = 0;
  logic eo;
  seq_t ea;

  tbk_alt_gen dut (.seq, .chk_hi, .chk_lo, .alt, .outside);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq = 4'b1101; chk_hi = 1'b1; chk_lo = 1'b0; #1;
    checks++; if (alt !== 4'b0111 || !outside) failures++;
    seq = 4'b0101; chk_hi = 1'b0; chk_lo = 1'b1; #1;
    checks++; if (alt !== 4'b0111 || outside) failures++;
    for (int v = 0; v < 64; v++) begin
      {seq, chk_hi, chk_lo} = 6'(v);
      #1;
      case (seq[3:2])
        2'b11, 2'b10: eo = ~chk_lo;
        default:      eo = chk_hi;
      endcase
      ea = eo ? (seq ^ 4'b1010) : (seq ^ 4'b0010);
      checks++;
      if (outside !== eo || alt !== ea) begin
        failures++;
        $display("seq %b hi %b lo %b: alt %b outside %b", seq, chk_hi, chk_lo, alt, outside);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

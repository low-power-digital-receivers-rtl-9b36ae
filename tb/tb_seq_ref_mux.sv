// tb_seq_ref_mux: for every position-comparator combination and random
// reference tables, checks that CF3..CF0 receive the references of the
// expected banks: 11 -> banks 11/10, 01 -> 10/01, 00 -> 01/00, and the bubble
// 10 read as mid (10/01).
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_seq_ref_mux;
  localparam int REF_W = 12;
  logic pos_c1, pos_c0;
  logic signed [REF_W-1:0] bank_ref [4][2];
  logic signed [REF_W-1:0] cf_ref [4];
  int checks = 0, failures = 0;
  int ub, lb;

  seq_ref_mux #(.REF_W(REF_W)) dut (.pos_c1, .pos_c0, .bank_ref, .cf_ref);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int b = 0; b < 4; b++)
        for (int j = 0; j < 2; j++) bank_ref[b][j] = REF_W'($urandom_range(0, 4095));
      for (int c = 0; c < 4; c++) begin
        {pos_c1, pos_c0} = 2'(c);
        case (c)
          3:       begin ub = 3; lb = 2; end
          0:       begin ub = 1; lb = 0; end
          default: begin ub = 2; lb = 1; end
        endcase
        #1;
        checks++;
        if (cf_ref[3] !== bank_ref[ub][1] || cf_ref[2] !== bank_ref[ub][0] ||
            cf_ref[1] !== bank_ref[lb][1] || cf_ref[0] !== bank_ref[lb][0]) begin
          failures++;
          $display("position %0d: wrong references", c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

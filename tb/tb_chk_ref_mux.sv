// tb_chk_ref_mux: for every fixed-comparator combination and random reference
// tables, checks which check comparator is clocked and which reference each
// one gets: top -> lower only, with table entry 0; mid -> both, entries 1
// (upper) and 2 (lower); bottom -> upper only, entry 3; bubble read as mid;
// an unclocked comparator gets the common-mode code 0.
//
// Expected values come from an independent model in the testbench, written
// from the document's description of the block; the stimulus sizes, noise
// amplitudes and channel taps are this testbench's choices.
module tb_chk_ref_mux;
  localparam int REF_W = 12;
  logic pos_c1, pos_c0;
  logic signed [REF_W-1:0] chk_ref_tbl [4];
  logic signed [REF_W-1:0] hi_ref, lo_ref;
  logic hi_en, lo_en;
  int checks = 0, failures = 0;
  logic signed [REF_W-1:0] ehi, elo;
  logic ehe, ele;

  chk_ref_mux #(.REF_W(REF_W)) dut (.pos_c1, .pos_c0, .chk_ref_tbl, .hi_ref, .lo_ref, .hi_en, .lo_en);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int j = 0; j < 4; j++) chk_ref_tbl[j] = REF_W'($urandom_range(1, 4095));
      for (int c = 0; c < 4; c++) begin
        {pos_c1, pos_c0} = 2'(c);
        case (c)
          3:       begin ehe = 0; ehi = 0;              ele = 1; elo = chk_ref_tbl[0]; end
          0:       begin ehe = 1; ehi = chk_ref_tbl[3]; ele = 0; elo = 0;              end
          default: begin ehe = 1; ehi = chk_ref_tbl[1]; ele = 1; elo = chk_ref_tbl[2]; end
        endcase
        #1;
        checks++;
        if (hi_en !== ehe || lo_en !== ele || hi_ref !== ehi || lo_ref !== elo) begin
          failures++;
          $display("position %0d wrong", c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

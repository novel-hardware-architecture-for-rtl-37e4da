// tb_mask_gen: every bit position 0..127 must give a mask with exactly the
// bits up to and including that position set.
module tb_mask_gen;
  import flu_pkg::*;

  logic [COL_W-1:0] pos;
  logic [ROW_W-1:0] mask;

  mask_gen u_dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ROW_W-1:0] expect_mask;
    for (int p = 0; p < ROW_W; p++) begin
      pos = COL_W'(p);
      #1;
      expect_mask = '0;
      for (int j = 0; j <= p; j++) expect_mask[j] = 1'b1;
      checks++;
      if (mask !== expect_mask) begin
        failures++;
        $display("FAIL: pos %0d mask %h", p, mask);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bit_extract: checks the level-i OFFSET for the published example address
// (0x703020f8 -> 7, 0, 3, 0, 2, 0, 15, 8) and for random addresses on every
// level, against a shift-and-mask reference.
module tb_bit_extract;
  import flu_pkg::*;

  logic [ADDR_W-1:0] addr;
  logic [LVL_W-1:0]  level;
  logic [STRIDE-1:0] offset;

  bit_extract u_dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_ex[8] = '{7, 0, 3, 0, 2, 0, 15, 8};
    addr = 32'h7030_20f8;
    for (int l = 0; l < 8; l++) begin
      level = LVL_W'(l);
      #1;
      checks++;
      if (offset != STRIDE'(exp_ex[l])) begin
        failures++;
        $display("FAIL: example level %0d offset %0d", l, offset);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      automatic int unsigned a = $urandom;
      automatic int unsigned l = $urandom % 8;
      addr = a;
      level = LVL_W'(l);
      #1;
      checks++;
      if (offset != STRIDE'((a >> (28 - 4 * l)) & 15)) begin
        failures++;
        $display("FAIL: addr %h level %0d offset %0d", a, l, offset);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

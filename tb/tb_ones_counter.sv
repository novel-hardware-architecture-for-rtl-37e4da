// tb_ones_counter: counts of all-zero, all-one, single-bit and random rows
// (including ones in the two bits outside the compressors) against $countones.
module tb_ones_counter;
  import flu_pkg::*;

  logic [ROW_W-1:0] bits;
  logic [POP_W-1:0] count;

  ones_counter u_dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [ROW_W-1:0] v);
    bits = v;
    #1;
    checks++;
    if (int'(count) != $countones(v)) begin
      failures++;
      $display("FAIL: %h counted %0d", v, count);
    end
  endtask

  initial begin
    try('0);
    try('1);
    for (int j = 0; j < ROW_W; j++) try(ROW_W'(1) << j);
    for (int i = 0; i < 3000; i++) begin
      automatic logic [ROW_W-1:0] v = {$urandom, $urandom, $urandom, $urandom};
      if (i % 3 == 0) v = v & {$urandom, $urandom, $urandom, $urandom};
      if (i % 3 == 1) v = v | {$urandom, $urandom, $urandom, $urandom};
      try(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_level_table: reset clears both arrays; each host write lands in its
// entry only, visible from the next cycle; all entries are read in parallel.
module tb_level_table;
  import flu_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              we;
  logic [LVL_W-1:0]  widx;
  logic [BA_W-1:0]   wstart;
  logic [RANK_W-1:0] wtotal;
  logic [BA_W-1:0]   level_start [LEVELS];
  logic [RANK_W-1:0] level_total [LEVELS];

  always #5 clk = ~clk;

  level_table u_dut (.*);

  int checks = 0, failures = 0;
  int ms[LEVELS], mt[LEVELS];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < LEVELS; i++) begin
      checks++;
      if (int'(level_start[i]) != ms[i] || int'(level_total[i]) != mt[i]) begin
        failures++;
        $display("FAIL: %s entry %0d: %0d/%0d expected %0d/%0d", what, i,
                 level_start[i], level_total[i], ms[i], mt[i]);
      end
    end
  endtask

  initial begin
    we = 0; widx = 0; wstart = 0; wtotal = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (ms[i]) begin ms[i] = 0; mt[i] = 0; end
    @(negedge clk);
    compare("after reset");
    for (int k = 0; k < 200; k++) begin
      automatic int i = $urandom % LEVELS;
      ms[i] = int'($urandom % (1 << BA_W));
      mt[i] = int'($urandom % (1 << RANK_W));
      we = 1; widx = LVL_W'(i); wstart = BA_W'(ms[i]); wtotal = RANK_W'(mt[i]);
      @(negedge clk);
      we = 0;
      compare("after write");
    end
    rst_n = 0;
    foreach (ms[i]) begin ms[i] = 0; mt[i] = 0; end
    @(negedge clk);
    compare("after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

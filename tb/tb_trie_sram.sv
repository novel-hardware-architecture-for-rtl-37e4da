// tb_trie_sram: writes random rows (Sum field and bitmap) through the host
// port and reads them back through the search port, checking the one-cycle
// read latency, that a read with re low keeps the previous data, and that
// rows past the end read as zero.
module tb_trie_sram;
  import flu_pkg::*;

  localparam int ROWS = 64;

  logic            clk = 1'b0;
  logic            re, we;
  logic [RA_W-1:0] raddr, waddr;
  sram_row_t       rdata, wdata;

  always #5 clk = ~clk;

  trie_sram #(.ROWS(ROWS)) u_dut (.*);

  int checks = 0, failures = 0;
  sram_row_t model [ROWS];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_row(sram_row_t e, string what);
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL: %s: read %h expected %h", what, rdata, e);
    end
  endtask

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = '0;
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      model[r].sum  = SUM_W'($urandom);
      model[r].bits = {$urandom, $urandom, $urandom, $urandom};
      we = 1; waddr = RA_W'(r); wdata = model[r];
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 500; i++) begin
      automatic int r = $urandom % ROWS;
      re = 1; raddr = RA_W'(r);
      @(negedge clk);
      expect_row(model[r], $sformatf("row %0d", r));
      // re low: output holds
      re = 0; raddr = RA_W'(($urandom % ROWS));
      @(negedge clk);
      expect_row(model[r], "hold with re low");
    end
    re = 1; raddr = RA_W'(ROWS + 3);
    @(negedge clk);
    expect_row('0, "row past the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

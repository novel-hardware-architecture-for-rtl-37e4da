// tb_dram_req_gen: finished search contexts become DRAM indices P1*16+OFFSET
// (published example: P1 = 7, OFFSET = 0 -> 112); a request waits while the
// DRAM is not ready and the generator refuses new contexts meanwhile; DRAM
// data comes out as the result one cycle later.
module tb_dram_req_gen;
  import flu_pkg::*;

  localparam int NH_W = 8;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               in_valid, in_ready;
  ctx_t               in_ctx;
  logic               dram_req_valid, dram_req_ready;
  logic [DRAM_AW-1:0] dram_req_addr;
  logic               dram_rvalid;
  logic [NH_W-1:0]    dram_rdata;
  logic               result_valid;
  logic [NH_W-1:0]    result_next_hop;

  always #5 clk = ~clk;

  dram_req_gen #(.NH_W(NH_W)) u_dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Offer a context; hold the DRAM busy for `wait_cycles` cycles.
  task automatic one(int rank, int off, int wait_cycles);
    int exp_addr = rank * 16 + off;
    @(negedge clk);
    in_valid = 1;
    in_ctx = '0;
    in_ctx.done = 1;
    in_ctx.prev_rank = RANK_W'(rank);
    in_ctx.offset = STRIDE'(off);
    in_ctx.addr = $urandom;
    dram_req_ready = (wait_cycles == 0);
    check(in_ready == 1'b1, "ready when empty");
    @(negedge clk);
    in_valid = 0;
    check(dram_req_valid && int'(dram_req_addr) == exp_addr,
          $sformatf("index %0d expected %0d", dram_req_addr, exp_addr));
    for (int w = 0; w < wait_cycles; w++) begin
      in_valid = 1;
      check(!in_ready, "not ready while request waits");
      check(dram_req_valid && int'(dram_req_addr) == exp_addr, "request held");
      @(negedge clk);
      in_valid = 0;
      if (w == wait_cycles - 1) dram_req_ready = 1;
    end
    @(negedge clk);
    check(!dram_req_valid, "request retired");
    dram_req_ready = 0;
  endtask

  initial begin
    in_valid = 0; in_ctx = '0; dram_req_ready = 0; dram_rvalid = 0; dram_rdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(7, 0, 0);                    // published example: entry 112
    one(0, 5, 3);
    for (int i = 0; i < 300; i++)
      one(int'($urandom % (1 << 20)), int'($urandom % 16), int'($urandom % 3));
    // DRAM data -> result, one cycle later
    for (int i = 0; i < 50; i++) begin
      automatic logic [NH_W-1:0] d = NH_W'($urandom);
      @(negedge clk);
      dram_rvalid = 1; dram_rdata = d;
      @(negedge clk);
      dram_rvalid = 0; dram_rdata = ~d;
      check(result_valid && result_next_hop == d, "result follows DRAM data");
      @(negedge clk);
      check(!result_valid && result_next_hop == d, "result held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lookup_fsm: one level FSM walking all 8 trie levels (the loop not
// unrolled), reading a trie SRAM loaded from the published example table
// and from a random table. For each lookup the finished context must name
// the DRAM entry the trie walk reaches (P1*16 + OFFSET; 112 for the published
// example address 0x703020f8), must arrive exactly 16 cycles (two states per
// level) after acceptance when the output is free, and must survive being
// held in the FSM while the next stage is not ready.
module tb_lookup_fsm;
  import flu_pkg::*;
  import trie_model_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              phase;
  logic              in_valid, in_ready, out_valid, out_ready;
  ctx_t              in_ctx, out_ctx;
  logic              sram_re, we;
  logic [RA_W-1:0]   sram_raddr, waddr;
  sram_row_t         sram_rdata, wdata;
  logic [BA_W-1:0]   level_start [LEVELS];
  logic [RANK_W-1:0] level_total [LEVELS];

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 1'b0;
    else        phase <= ~phase;

  lookup_fsm #(.FIRST_LEVEL(0), .NLEV(8), .READ_PHASE(1'b0)) u_dut (
    .clk, .rst_n, .phase, .in_valid, .in_ready, .in_ctx,
    .out_valid, .out_ready, .out_ctx,
    .sram_re, .sram_raddr, .sram_rdata, .level_start, .level_total
  );

  trie_sram #(.ROWS(1024)) u_sram (
    .clk, .re(sram_re), .raddr(sram_raddr), .rdata(sram_rdata),
    .we, .waddr, .wdata
  );

  int checks = 0, failures = 0, holds = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (int'(u_dut.state) == 3) holds++;   // S_HOLD

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(trie_db db);
    @(negedge clk);
    for (int r = 0; r < db.nrows; r++) begin
      we = 1; waddr = RA_W'(r);
      wdata.sum = db.row_sum[r]; wdata.bits = db.row_bits[r];
      @(negedge clk);
    end
    we = 0;
    for (int l = 0; l < LEVELS; l++) begin
      level_start[l] = BA_W'(db.level_start[l]);
      level_total[l] = RANK_W'(db.level_total[l]);
    end
  endtask

  task automatic lookup(trie_db db, int unsigned a, int stall);
    int lvl, idx;
    longint t0;
    db.walk(a, lvl, idx);
    @(negedge clk);
    in_valid = 1;
    in_ctx = '0;
    in_ctx.addr = a;
    in_ctx.start = level_start[0];
    out_ready = (stall == 0);
    while (!in_ready) begin
      check(phase != 1'b0 || int'(u_dut.state) != 0, "ready in read phase when idle");
      @(negedge clk);
    end
    t0 = cycle;
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    if (stall == 0)
      check(cycle - t0 == 16, $sformatf("traversal took %0d cycles", cycle - t0));
    repeat (stall) @(negedge clk);
    check(out_ctx.done, "search finished");
    check(int'(out_ctx.prev_rank) * 16 + int'(out_ctx.offset) == idx,
          $sformatf("addr %h: index %0d expected %0d", a,
                    int'(out_ctx.prev_rank) * 16 + int'(out_ctx.offset), idx));
    out_ready = 1;
    @(negedge clk);
    check(!out_valid, "context taken");
  endtask

  // Two lookups with the output left full: the second must wait in HOLD
  // and come out intact, after the first, once the output is taken.
  task automatic pair(trie_db db, int unsigned a1, int unsigned a2);
    int i1 = db.index_of(a1);
    int i2 = db.index_of(a2);
    out_ready = 0;
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      in_valid = 1;
      in_ctx = '0;
      in_ctx.start = level_start[0];
      in_ctx.addr = (k == 0) ? a1 : a2;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (20) @(negedge clk);
    check(out_valid && int'(out_ctx.prev_rank) * 16 + int'(out_ctx.offset) == i1, "first of pair");
    out_ready = 1;
    @(negedge clk);
    while (!out_valid) @(negedge clk);
    check(int'(out_ctx.prev_rank) * 16 + int'(out_ctx.offset) == i2, "second of pair after hold");
    @(negedge clk);
  endtask

  initial begin
    trie_db ex, rnd;
    in_valid = 0; in_ctx = '0; out_ready = 1; we = 0; waddr = 0; wdata = '0;
    foreach (level_start[i]) begin level_start[i] = '0; level_total[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    ex = new(0);
    ex.load_example();
    ex.build();
    load(ex);
    lookup(ex, 32'h7030_20f8, 0);
    check(int'(out_ctx.prev_rank) == 7 && int'(out_ctx.offset) == 0, "published example: row 7, column 0");
    for (int i = 0; i < 200; i++) lookup(ex, ex.pick_addr(), 0);
    rnd = new(0);
    rnd.load_random(400);
    rnd.build();
    load(rnd);
    for (int i = 0; i < 600; i++) lookup(rnd, rnd.pick_addr(), (i % 5 == 0) ? 1 + i % 7 : 0);
    for (int i = 0; i < 50; i++) pair(rnd, rnd.pick_addr(), rnd.pick_addr());
    check(holds > 0, "output held while the next stage is busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

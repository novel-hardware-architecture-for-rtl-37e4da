// tb_fast_lookup_engine: end-to-end test of the lookup engine at its default
// size (4096-row SRAM, 8-bit next hops).
//
// A host task loads the SRAM, the level table and the DRAM model from a
// routing table built by trie_model_pkg, then streams destination addresses
// into the engine. Every result is compared with a longest-prefix match
// computed directly from the prefix list, and every DRAM index with the trie
// walk. Checked as well: the published worked example (0x703020f8 -> DRAM
// entry 112 -> output port 5), one accepted lookup every 8 cycles (64 ns) when
// the DRAM keeps up, and the same 27-cycle latency for every lookup.
// Mechanisms that must each occur at least once: a search ending on each of
// the 8 levels, a level read through a row other than its first (Sum field
// used), two lookups in the level pipeline at once, DRAM back-pressure, a
// stall that reaches back to the lookup input, a default-route result, and a
// route update (new next hop for 112.48/14) made by rewriting DRAM entries
// only, the SRAM left as it was.
// All of this is observed at the engine's ports.
module tb_fast_lookup_engine;
  import flu_pkg::*;
  import trie_model_pkg::*;

  localparam int NH_W    = 8;
  localparam int LATENCY = 27;   // cycles from acceptance to result

  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;          // 8 ns per FSM state

  logic               lookup_valid, lookup_ready;
  logic [ADDR_W-1:0]  lookup_addr;
  logic               result_valid;
  logic [NH_W-1:0]    result_next_hop;
  logic               dram_req_valid, dram_req_ready, dram_rvalid;
  logic [DRAM_AW-1:0] dram_req_addr;
  logic [NH_W-1:0]    dram_rdata;
  logic               sram_we;
  logic [RA_W-1:0]    sram_waddr;
  sram_row_t          sram_wdata;
  logic               lvl_we;
  logic [LVL_W-1:0]   lvl_widx;
  logic [BA_W-1:0]    lvl_wstart;
  logic [RANK_W-1:0]  lvl_wtotal;
  logic               dram_hold;

  fast_lookup_engine u_dut (.*);

  dram_model #(.AW(DRAM_AW), .NH_W(NH_W)) u_dram (
    .clk, .rst_n, .hold(dram_hold),
    .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req_addr(dram_req_addr),
    .rvalid(dram_rvalid), .rdata(dram_rdata)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ scoreboard
  int          exp_nh[$];
  int          exp_idx[$];
  longint      acc_cycle[$];
  longint      last_accept = -1;
  int          intervals_checked = 0;
  bit          spacing_check_on = 0;
  int          results = 0;

  // mechanism counters
  int end_level_seen[8];
  int route_updates = 0;
  int wait_run = 0, n_accepted = 0, n_requested = 0;
  int sum_field_used = 0, both_busy = 0, dram_stall = 0, pipe_stall = 0, default_hits = 0;

  always @(posedge clk) if (rst_n) begin
    if (lookup_valid && lookup_ready) begin
      if (spacing_check_on && last_accept >= 0) begin
        check(cycle - last_accept == 8, $sformatf("accept spacing %0d cycles", cycle - last_accept));
        intervals_checked++;
      end
      last_accept = cycle;
      acc_cycle.push_back(cycle);
    end
    if (dram_req_valid && dram_req_ready) begin
      check(exp_idx.size() > 0 && int'(dram_req_addr) == exp_idx[0],
            $sformatf("DRAM index %0d, expected %0d", dram_req_addr, (exp_idx.size() > 0) ? exp_idx[0] : -1));
      if (exp_idx.size() > 0) void'(exp_idx.pop_front());
    end
    if (dram_req_valid && !dram_req_ready) dram_stall++;
    // a lookup kept waiting longer than the 8-cycle issue interval: the
    // DRAM stall has reached back through both level FSMs to the input
    if (lookup_valid && !lookup_ready) wait_run++;
    else wait_run = 0;
    if (wait_run > 8) pipe_stall++;
    // two lookups between acceptance and their DRAM request: both level
    // FSMs hold one
    if (n_accepted - n_requested >= 2) both_busy++;
    if (lookup_valid && lookup_ready) n_accepted++;
    if (dram_req_valid && dram_req_ready) n_requested++;
    if (result_valid) begin
      longint a;
      a = (acc_cycle.size() > 0) ? acc_cycle.pop_front() : 0;
      check(exp_nh.size() > 0 && int'(result_next_hop) == exp_nh[0],
            $sformatf("next hop %0d, expected %0d", result_next_hop, (exp_nh.size() > 0) ? exp_nh[0] : -1));
      if (!dram_hold && spacing_check_on)
        check(cycle - a == longint'(LATENCY), $sformatf("latency %0d cycles", cycle - a));
      if (exp_nh.size() > 0) void'(exp_nh.pop_front());
      results++;
    end
  end

  // ------------------------------------------------------------------ host
  task automatic load(trie_db db);
    @(negedge clk);
    for (int r = 0; r < db.nrows; r++) begin
      sram_we = 1'b1;
      sram_waddr = RA_W'(r);
      sram_wdata.sum  = db.row_sum[r];
      sram_wdata.bits = db.row_bits[r];
      @(negedge clk);
    end
    sram_we = 1'b0;
    for (int l = 0; l < LEVELS; l++) begin
      lvl_we = 1'b1;
      lvl_widx = LVL_W'(l);
      lvl_wstart = BA_W'(db.level_start[l]);
      lvl_wtotal = RANK_W'(db.level_total[l]);
      @(negedge clk);
    end
    lvl_we = 1'b0;
    u_dram.mem.delete();
    foreach (db.dram[i]) u_dram.mem[i] = NH_W'(db.dram[i]);
  endtask

  // Offer one lookup (held until accepted) and record what it must return.
  task automatic send(trie_db db, int unsigned a);
    int lvl, idx;
    db.walk(a, lvl, idx);
    end_level_seen[lvl]++;
    for (int l = 0; l <= lvl; l++)
      if (db.row_in_level(a, l) > 0) begin
        sum_field_used++;
        break;
      end
    exp_nh.push_back(db.lpm(a));
    exp_idx.push_back(idx);
    if (db.lpm(a) == db.default_nh) default_hits++;
    @(negedge clk);
    lookup_valid = 1'b1;
    lookup_addr  = a;
    while (!lookup_ready) @(negedge clk);
    @(negedge clk);
    lookup_valid = 1'b0;
  endtask

  task automatic drain();
    int guard = 0;
    while ((exp_nh.size() > 0) && guard < 2000) begin
      @(posedge clk);
      guard++;
    end
    check(exp_nh.size() == 0, "all results returned");
    repeat (4) @(posedge clk);
  endtask

  // --------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trie_db ex, rnd;
    lookup_valid = 0; lookup_addr = 0; sram_we = 0; sram_waddr = 0; sram_wdata = '0;
    lvl_we = 0; lvl_widx = 0; lvl_wstart = 0; lvl_wtotal = 0; dram_hold = 0;
    foreach (end_level_seen[i]) end_level_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // --- the published 16-way example --------------------------------
    ex = new(0);
    ex.load_example();
    ex.build();
    // bitmap of level 0 is 0010 1001 1000 0000 (children 2, 4, 7, 8 internal)
    check(ex.row_bits[0][15:0] == 16'b0000_0001_1001_0100, "example level 0 bitmap");
    check(ex.row_bits[1] == (128'(1) << 32 | 128'(1) << 60), "example level 1 bitmap");
    check(ex.row_bits[2] == (128'(1) << 3 | 128'(1) << 16), "example level 2 bitmap");
    check(ex.row_bits[3] == '0, "example level 3 bitmap");
    begin
      int row0[16] = '{0, 0, 0, 0, 7, 2, 7, 9, 6, 3, 3, 3, 0, 0, 0, 0};
      int row7[16] = '{5, 5, 5, 5, 9, 9, 9, 9, 9, 9, 9, 9, 9, 9, 9, 9};
      int row8[16] = '{3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 2, 3, 3, 3};
      for (int c = 0; c < 16; c++)
        check(ex.dram[c] == row0[c] && ex.dram[7*16 + c] == row7[c] && ex.dram[8*16 + c] == row8[c],
              $sformatf("example DRAM rows 0, 7, 8 column %0d", c));
    end
    load(ex);
    send(ex, 32'h7030_20f8);
    drain();
    check(results == 1, "example lookup returned");
    // every example prefix, its neighbours, and the default route
    last_accept = -1;
    spacing_check_on = 1;
    foreach (ex.pfx_val[k]) begin
      send(ex, ex.pfx_val[k]);
      send(ex, ex.pfx_val[k] | ~trie_db::pmask(ex.pfx_len[k]));
    end
    for (int i = 0; i < 200; i++) send(ex, ex.pick_addr());
    drain();
    spacing_check_on = 0;

    // --- route update: a new next hop changes only DRAM entries --------
    begin
      bit [127:0] old_bits[$];
      bit [19:0]  old_sum[$];
      int         changed = 0;
      old_bits = ex.row_bits;
      old_sum  = ex.row_sum;
      foreach (ex.pfx_val[k])
        if (ex.pfx_val[k] == 32'h7030_0000 && ex.pfx_len[k] == 14) ex.pfx_nh[k] = 11;
      ex.build();
      check(ex.row_bits == old_bits && ex.row_sum == old_sum, "route update leaves the SRAM unchanged");
      foreach (ex.dram[i])
        if (u_dram.mem[i] != NH_W'(ex.dram[i])) begin
          u_dram.mem[i] = NH_W'(ex.dram[i]);
          changed++;
        end
      check(changed == 4, $sformatf("route update rewrote %0d DRAM entries", changed));
      route_updates++;
      send(ex, 32'h7030_20f8);
      foreach (ex.pfx_val[k]) send(ex, ex.pfx_val[k]);
      drain();
    end

    // --- a larger random table, streamed back to back -----------------
    rnd = new(0);
    rnd.load_random(600);
    rnd.build();
    $display("random table: %0d prefixes, %0d SRAM rows, %0d internal nodes",
             rnd.pfx_val.size(), rnd.nrows, rnd.bfs.size());
    check(rnd.nrows <= 4096, "random table fits the SRAM");
    load(rnd);
    last_accept = -1;
    @(negedge clk);
    spacing_check_on = 1;
    for (int i = 0; i < 3000; i++) send(rnd, rnd.pick_addr());
    drain();
    spacing_check_on = 0;

    // --- same table with DRAM back-pressure ---------------------------
    fork
      begin
        for (int i = 0; i < 600; i++) send(rnd, rnd.pick_addr());
      end
      begin
        repeat (1500) begin
          @(negedge clk);
          dram_hold = ($urandom % 4 == 0);
        end
        dram_hold = 0;
      end
    join
    dram_hold = 0;
    drain();

    // --- mechanisms ---------------------------------------------------
    for (int l = 0; l < 8; l++) begin
      $display("searches ending on level %0d: %0d", l, end_level_seen[l]);
      check(end_level_seen[l] > 0, $sformatf("search ending on level %0d", l));
    end
    $display("Sum field used: %0d, two or more lookups in the level pipeline: %0d cycles, DRAM stall: %0d cycles, input held back by a stall: %0d cycles, default route: %0d, spacing checks: %0d",
             sum_field_used, both_busy, dram_stall, pipe_stall, default_hits, intervals_checked);
    check(sum_field_used > 0, "Sum field used");
    check(both_busy > 0, "two lookups in the level pipeline at once");
    check(dram_stall > 0, "DRAM back-pressure");
    check(pipe_stall > 0, "stall reaching back to the lookup input");
    check(default_hits > 0, "default route");
    check(route_updates > 0, "route update through the DRAM only");
    check(intervals_checked > 1000, "lookup spacing measured");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_backbone_tables: the engine at its default size on routing tables of
// backbone size. The five tables have the route counts of five public
// backbone tables (17,641 to 35,752 routes); their contents are synthetic
// (mostly /24 and /16../23 routes clustered in a few hundred /16 blocks),
// since only their sizes are known. For each table the testbench reports the
// bitmap size it needs, checks that it fits the 4096-row SRAM, loads it, and
// runs 1000 back-to-back lookups, comparing every next hop with a direct
// longest-prefix scan and checking one accepted lookup every 8 cycles.
module tb_backbone_tables;
  import flu_pkg::*;
  import trie_model_pkg::*;

  localparam int NH_W = 8;
  localparam int NLOOK = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;

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

  fast_lookup_engine u_dut (.*);

  dram_model #(.AW(DRAM_AW), .NH_W(NH_W)) u_dram (
    .clk, .rst_n, .hold(1'b0),
    .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req_addr(dram_req_addr),
    .rvalid(dram_rvalid), .rdata(dram_rdata)
  );

  int checks = 0, failures = 0;
  longint cycle = 0, last_accept = -1;
  bit spacing_on = 0;
  int exp_nh[$];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (lookup_valid && lookup_ready) begin
      if (spacing_on && last_accept >= 0)
        check(cycle - last_accept == 8, $sformatf("accept spacing %0d", cycle - last_accept));
      last_accept = cycle;
    end
    if (result_valid) begin
      check(exp_nh.size() > 0 && int'(result_next_hop) == exp_nh[0],
            $sformatf("next hop %0d expected %0d", result_next_hop, (exp_nh.size() > 0) ? exp_nh[0] : -1));
      if (exp_nh.size() > 0) void'(exp_nh.pop_front());
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string site[5] = '{"MaeEast", "MaeWest", "PacBell", "Paix", "AADS"};
    int    n[5]    = '{23113, 35752, 27491, 17641, 31958};
    trie_db db;
    lookup_valid = 0; lookup_addr = 0; sram_we = 0; sram_waddr = 0; sram_wdata = '0;
    lvl_we = 0; lvl_widx = 0; lvl_wstart = 0; lvl_wtotal = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      db = new(0);
      db.load_backbone(n[s], 600);
      db.build();
      $display("%s-sized table: %0d routes, %0d internal nodes, %0d SRAM rows (%0d bitmap bytes, %.2f bytes/route)",
               site[s], db.pfx_val.size(), db.bfs.size(), db.nrows, db.nrows * 16,
               real'(db.nrows * 16) / real'(db.pfx_val.size()));
      check(db.nrows <= 4096, "table fits the SRAM");
      // host load
      @(negedge clk);
      for (int r = 0; r < db.nrows && r < 4096; r++) begin
        sram_we = 1; sram_waddr = RA_W'(r);
        sram_wdata.sum = db.row_sum[r]; sram_wdata.bits = db.row_bits[r];
        @(negedge clk);
      end
      sram_we = 0;
      for (int l = 0; l < LEVELS; l++) begin
        lvl_we = 1; lvl_widx = LVL_W'(l);
        lvl_wstart = BA_W'(db.level_start[l]); lvl_wtotal = RANK_W'(db.level_total[l]);
        @(negedge clk);
      end
      lvl_we = 0;
      u_dram.mem.delete();
      foreach (db.dram[i]) u_dram.mem[i] = NH_W'(db.dram[i]);
      // lookups, back to back
      last_accept = -1;
      spacing_on = 1;
      for (int i = 0; i < NLOOK; i++) begin
        int unsigned a;
        a = db.pick_addr();
        exp_nh.push_back(db.lpm(a));
        @(negedge clk);
        lookup_valid = 1; lookup_addr = a;
        while (!lookup_ready) @(negedge clk);
        @(negedge clk);
        lookup_valid = 0;
      end
      spacing_on = 0;
      repeat (60) @(negedge clk);
      check(exp_nh.size() == 0, "all results returned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fast_lookup_engine: longest-prefix-match forwarding engine for IPv4.
//
// The routing table is a 16-way trie. Its topology is stored as a bitmap in
// an on-chip SRAM (one bit per trie node, 1 = internal, 0 = leaf, in
// breadth-first order, the root implied) and its leaves' next hops in an
// off-chip DRAM, 16 entries per DRAM row. A lookup walks the 8 trie levels
// with one SRAM access per level, then reads the DRAM once.
//
// Blocks: two lookup_fsm instances (levels 0-3 and 4-7, the level loop
// unrolled once and pipelined), each with its own bit extraction, mask
// generator and sum-of-1s adder tree; the trie SRAM shared by both; the level
// table (Level[i] and the number of 1s on each level); the DRAM request
// generator. The DRAM and the host CPU that builds the tables are external:
// their signals are ports.
//
// Timing (clock period = one FSM state, 8 ns in the published design):
//   * a lookup is accepted when lookup_ready is high, at most once every
//     8 cycles (64 ns, one DRAM random access);
//   * SRAM traversal takes 17 cycles (8 levels x 2 states, plus one cycle
//     where the context waits for the second FSM's read phase);
//   * the DRAM request leaves one cycle later, and the next hop appears on
//     result_valid one cycle after the DRAM returns it.
// Results come out in lookup order; the latency does not depend on where the
// search ends. The 8-cycle spacing, the two-state level step and the widths
// follow the published design; the handshakes, the phase split of the SRAM
// port and the host write ports are this implementation's choices.
module fast_lookup_engine
  import flu_pkg::*;
#(
  parameter int unsigned SRAM_ROWS = 4096,   // trie SRAM depth (128-bit rows)
  parameter int unsigned NH_W      = 8       // next-hop (output port) width
)(
  input  logic               clk,
  input  logic               rst_n,
  // lookup requests
  input  logic               lookup_valid,
  output logic               lookup_ready,
  input  logic [ADDR_W-1:0]  lookup_addr,
  // lookup results, in request order
  output logic               result_valid,
  output logic [NH_W-1:0]    result_next_hop,
  // off-chip DRAM
  output logic               dram_req_valid,
  input  logic               dram_req_ready,
  output logic [DRAM_AW-1:0] dram_req_addr,
  input  logic               dram_rvalid,
  input  logic [NH_W-1:0]    dram_rdata,
  // host writes: SRAM rows
  input  logic               sram_we,
  input  logic [RA_W-1:0]    sram_waddr,
  input  sram_row_t          sram_wdata,
  // host writes: level table
  input  logic               lvl_we,
  input  logic [LVL_W-1:0]   lvl_widx,
  input  logic [BA_W-1:0]    lvl_wstart,
  input  logic [RANK_W-1:0]  lvl_wtotal
);

  localparam int unsigned HALF = LEVELS / 2;

  logic phase;   // 0: first FSM may read the SRAM, 1: second FSM

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else        phase <= ~phase;
  end

  logic [BA_W-1:0]   level_start [LEVELS];
  logic [RANK_W-1:0] level_total [LEVELS];

  level_table u_levels (
    .clk, .rst_n,
    .we(lvl_we), .widx(lvl_widx), .wstart(lvl_wstart), .wtotal(lvl_wtotal),
    .level_start, .level_total
  );

  // Shared SRAM read port, given to each FSM in its own phase.
  logic            re_a, re_b;
  logic [RA_W-1:0] raddr_a, raddr_b;
  sram_row_t       rdata;

  trie_sram #(.ROWS(SRAM_ROWS)) u_sram (
    .clk,
    .re(phase ? re_b : re_a), .raddr(phase ? raddr_b : raddr_a), .rdata,
    .we(sram_we), .waddr(sram_waddr), .wdata(sram_wdata)
  );

  // Search step 1: START = Level[0], P1 = 0, nothing counted yet.
  ctx_t init_ctx;
  always_comb begin
    init_ctx       = '0;
    init_ctx.addr  = lookup_addr;
    init_ctx.start = level_start[0];
  end

  logic a_valid, a_ready, b_valid, b_ready;
  ctx_t a_ctx, b_ctx;

  lookup_fsm #(.FIRST_LEVEL(0), .NLEV(HALF), .READ_PHASE(1'b0)) u_fsm_lo (
    .clk, .rst_n, .phase,
    .in_valid(lookup_valid), .in_ready(lookup_ready), .in_ctx(init_ctx),
    .out_valid(a_valid), .out_ready(a_ready), .out_ctx(a_ctx),
    .sram_re(re_a), .sram_raddr(raddr_a), .sram_rdata(rdata),
    .level_start, .level_total
  );

  lookup_fsm #(.FIRST_LEVEL(HALF), .NLEV(LEVELS - HALF), .READ_PHASE(1'b1)) u_fsm_hi (
    .clk, .rst_n, .phase,
    .in_valid(a_valid), .in_ready(a_ready), .in_ctx(a_ctx),
    .out_valid(b_valid), .out_ready(b_ready), .out_ctx(b_ctx),
    .sram_re(re_b), .sram_raddr(raddr_b), .sram_rdata(rdata),
    .level_start, .level_total
  );

  dram_req_gen #(.NH_W(NH_W)) u_dram_req (
    .clk, .rst_n,
    .in_valid(b_valid), .in_ready(b_ready), .in_ctx(b_ctx),
    .dram_req_valid, .dram_req_ready, .dram_req_addr,
    .dram_rvalid, .dram_rdata,
    .result_valid, .result_next_hop
  );

endmodule

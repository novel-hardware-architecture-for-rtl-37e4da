// lookup_fsm: walks a fixed group of trie levels for one lookup at a time.
//
// Each trie level takes two states of 8 ns each, as in the published engine:
//   READ - the SRAM row holding bit START+OFFSET is addressed (the row is
//          available from the SRAM one cycle later);
//   SUM  - the bit is examined, a mask keeps the row bits up to and
//          including it, the 1s under the mask are counted and added to the
//          row's Sum field. When the bit is 1 this gives ONES + 1, ONES being
//          the number of 1s on this level before the bit.
// If the bit is 1 the node is internal: PREV's rank P1 becomes
// (1s on earlier levels) + ONES + 1, START moves to Level[i+1] + ONES*16 and
// the next level follows. If it is 0 (or the level is the last one, whose
// nodes are always leaves) the search has ended and the context keeps OFFSET
// and P1 for the DRAM index P1*16 + OFFSET. A finished search still steps
// through its remaining levels without reading the SRAM, so every lookup takes
// the same time.
//
// The engine unrolls the level loop once: two instances handle levels 0-3 and
// 4-7 and run as a two-stage pipeline. The instances read the shared
// single-port SRAM in opposite clock phases (READ_PHASE), so one instance's
// READ overlaps the other's SUM; the published text pipelines two FSMs but
// does not say how they share the SRAM, so the phase split is this
// implementation's choice, as are the valid/ready handshakes and the HOLD
// state that waits when the next stage is still full.
//
// Timing: a context accepted in cycle t (an IDLE cycle of phase READ_PHASE,
// which doubles as the first READ) leaves through out_* registered at the
// end of cycle t + 2*NLEV - 1; a new context can be taken in cycle t + 2*NLEV.
//
// Lint notes: only the address, START and done fields of `src` are needed to
// address the SRAM, so the other fields show as unused; rst_n also appears in
// the assertion's disable clause, which lint reports as a synchronous use of
// an asynchronous reset. Neither affects the logic.
module lookup_fsm
  import flu_pkg::*;
#(
  parameter int unsigned FIRST_LEVEL = 0,   // first trie level handled here
  parameter int unsigned NLEV        = 4,   // number of levels handled here
  parameter bit          READ_PHASE  = 1'b0 // phase in which this FSM reads
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              phase,           // toggles every cycle
  // incoming search context
  input  logic              in_valid,
  output logic              in_ready,
  input  ctx_t              in_ctx,
  // outgoing search context
  output logic              out_valid,
  input  logic              out_ready,
  output ctx_t              out_ctx,
  // SRAM read port
  output logic              sram_re,
  output logic [RA_W-1:0]   sram_raddr,
  input  sram_row_t         sram_rdata,
  // level arrays
  input  logic [BA_W-1:0]   level_start [LEVELS],
  input  logic [RANK_W-1:0] level_total [LEVELS]
);

  localparam int unsigned LCNT_W = (NLEV > 1) ? $clog2(NLEV) : 1;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_SUM, S_HOLD} state_t;

  state_t            state;
  logic [LCNT_W-1:0] lcnt;        // level inside this FSM's group
  ctx_t              ctx;

  // ---------------------------------------------------------------- datapath
  ctx_t              src;         // context whose SRAM bit is addressed
  logic [LVL_W-1:0]  cur_level;   // trie level i
  logic [STRIDE-1:0] offset;      // OFFSET
  logic [BA_W-1:0]   bit_addr;    // START + OFFSET
  logic [COL_W-1:0]  pos;
  logic [ROW_W-1:0]  mask;
  logic [POP_W-1:0]  row_ones;
  logic [RANK_W-1:0] upto;        // 1s on this level up to the bit, inclusive
  logic [RANK_W-1:0] ones;        // ONES = upto - 1 when the bit is 1
  logic              node_bit;
  logic              last_level;
  logic              accept;
  ctx_t              ctx_next;

  assign accept    = (state == S_IDLE) && in_valid && (phase == READ_PHASE);
  assign in_ready  = (state == S_IDLE) && (phase == READ_PHASE);
  assign src       = (state == S_IDLE) ? in_ctx : ctx;
  assign cur_level = LVL_W'(FIRST_LEVEL) + LVL_W'(lcnt);
  assign last_level = (cur_level == LVL_W'(LEVELS - 1));

  bit_extract u_bits (.addr(src.addr), .level((state == S_IDLE) ? LVL_W'(FIRST_LEVEL) : cur_level),
                      .offset(offset));

  assign bit_addr   = src.start + BA_W'(offset);
  assign pos        = bit_addr[COL_W-1:0];
  assign sram_re    = (accept || state == S_READ) && !src.done;
  assign sram_raddr = bit_addr[BA_W-1:COL_W];

  mask_gen     u_mask (.pos(pos), .mask(mask));
  ones_counter u_ones (.bits(sram_rdata.bits & mask), .count(row_ones));

  assign node_bit = sram_rdata.bits[pos];
  assign upto     = RANK_W'(sram_rdata.sum) + RANK_W'(row_ones);
  assign ones     = upto - RANK_W'(1);

  always_comb begin
    ctx_next = ctx;
    if (!ctx.done) begin
      if (node_bit && !last_level) begin
        ctx_next.prev_rank   = ctx.ones_before + upto;
        ctx_next.ones_before = ctx.ones_before + level_total[cur_level];
        ctx_next.start       = level_start[cur_level + LVL_W'(1)] + BA_W'(ones * DEGREE);
      end else begin
        ctx_next.done   = 1'b1;
        ctx_next.offset = offset;
      end
    end
  end

  // --------------------------------------------------------------- control
  logic out_free;
  assign out_free = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      lcnt      <= '0;
      ctx       <= '0;
      out_valid <= 1'b0;
      out_ctx   <= '0;
    end else begin
      if (out_valid && out_ready)
        out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          ctx   <= in_ctx;
          lcnt  <= '0;
          state <= S_SUM;
        end
        S_READ: state <= S_SUM;
        S_SUM: begin
          ctx <= ctx_next;
          if (lcnt == LCNT_W'(NLEV - 1)) begin
            if (out_free) begin
              out_ctx   <= ctx_next;
              out_valid <= 1'b1;
              state     <= S_IDLE;
            end else begin
              state     <= S_HOLD;
            end
          end else begin
            lcnt  <= lcnt + LCNT_W'(1);
            state <= S_READ;
          end
        end
        S_HOLD: if (out_free) begin
          out_ctx   <= ctx;
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The shared SRAM port is only used in this FSM's own phase.
  a_read_phase: assert property (@(posedge clk) disable iff (!rst_n)
    sram_re |-> (phase == READ_PHASE));

endmodule

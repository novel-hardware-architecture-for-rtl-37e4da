// dram_req_gen: turns a finished SRAM search into the single DRAM read.
//
// The next hop of the longest matching prefix sits at DRAM entry
// P1*X + OFFSET, where P1 is the rank of the last internal node passed
// (row of the DRAM, 16 entries per row) and OFFSET the child position where
// the search stopped (column). With X = 16 the index is P1 followed by the
// four OFFSET bits. The index formula is the published one; the request
// register with a valid/ready handshake towards the DRAM controller, and the
// registered response, are this implementation's choices.
//
// Timing: a context taken in cycle t is offered to the DRAM from cycle t+1
// until dram_req_ready; the DRAM's response (dram_rvalid) appears one cycle
// later on result_valid / result_next_hop. Responses are expected in request
// order.
//
// Lint notes: only P1, OFFSET and done of the context are used here, so its
// other fields show as unused; rst_n also appears in the assertion's disable
// clause. Neither affects the logic.
module dram_req_gen
  import flu_pkg::*;
#(
  parameter int unsigned NH_W = 8              // next-hop width
)(
  input  logic               clk,
  input  logic               rst_n,
  // finished search
  input  logic               in_valid,
  output logic               in_ready,
  input  ctx_t               in_ctx,
  // DRAM read request / response
  output logic               dram_req_valid,
  input  logic               dram_req_ready,
  output logic [DRAM_AW-1:0] dram_req_addr,
  input  logic               dram_rvalid,
  input  logic [NH_W-1:0]    dram_rdata,
  // lookup result
  output logic               result_valid,
  output logic [NH_W-1:0]    result_next_hop
);

  assign in_ready = !dram_req_valid || dram_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dram_req_valid  <= 1'b0;
      dram_req_addr   <= '0;
      result_valid    <= 1'b0;
      result_next_hop <= '0;
    end else begin
      if (in_valid && in_ready) begin
        dram_req_valid <= 1'b1;
        dram_req_addr  <= (DRAM_AW'(in_ctx.prev_rank) << STRIDE) + DRAM_AW'(in_ctx.offset);
      end else if (dram_req_ready) begin
        dram_req_valid <= 1'b0;
      end
      result_valid <= dram_rvalid;
      if (dram_rvalid)
        result_next_hop <= dram_rdata;
    end
  end

  a_done: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_ctx.done);

endmodule

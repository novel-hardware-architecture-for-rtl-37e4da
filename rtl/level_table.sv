// level_table: the per-level arrays that go with the SRAM bitmap.
//
// Entry i holds Level[i], the SRAM bit address where trie level i starts, and
// the total number of 1s stored on level i. Both arrays are described by the
// published design; keeping them in flip-flops (all entries visible at once,
// so both level FSMs can use them in the same cycle) and the host write port
// (one entry per cycle) are this implementation's choices. Reset clears both
// arrays. Writes take effect at the next clock edge.
module level_table
  import flu_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic [LVL_W-1:0]    widx,
  input  logic [BA_W-1:0]     wstart,    // Level[widx]
  input  logic [RANK_W-1:0]   wtotal,    // number of 1s on level widx
  output logic [BA_W-1:0]     level_start [LEVELS],
  output logic [RANK_W-1:0]   level_total [LEVELS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEVELS; i++) begin
        level_start[i] <= '0;
        level_total[i] <= '0;
      end
    end else if (we) begin
      level_start[widx] <= wstart;
      level_total[widx] <= wtotal;
    end
  end

endmodule

// trie_sram: on-chip SRAM holding the compacted trie bitmap.
//
// Each row is one single-access word: a 20-bit Sum field (number of 1s on
// the row's trie level in earlier rows) and 128 bitmap bits; bit j of row r is
// SRAM bit r*128 + j. The row width and Sum width follow the published design.
// Port choices are this implementation's: one synchronous read port (address
// in one cycle, row valid the next, matching the engine's "read" FSM state)
// shared by the two level FSMs, and one independent write port for the host
// that loads the table. The contents are not reset; the host writes every row
// a search can reach before lookups start.
module trie_sram
  import flu_pkg::*;
#(
  parameter int unsigned ROWS = 4096               // SRAM depth in rows
)(
  input  logic             clk,
  // read port (search)
  input  logic             re,
  input  logic [RA_W-1:0]  raddr,
  output sram_row_t        rdata,
  // write port (host)
  input  logic             we,
  input  logic [RA_W-1:0]  waddr,
  input  sram_row_t        wdata
);

  localparam int unsigned IDX_W = (ROWS > 1) ? $clog2(ROWS) : 1;

  // Row addresses are RA_W bits wide (SRAM bit addresses of BA_W bits).
  if (ROWS > (1 << RA_W)) begin : g_too_deep
    $error("trie_sram: ROWS exceeds the %0d rows a %0d-bit row address reaches", 1 << RA_W, RA_W);
  end

  sram_row_t mem [ROWS];

  always_ff @(posedge clk) begin
    if (we && (waddr < RA_W'(ROWS)))
      mem[waddr[IDX_W-1:0]] <= wdata;
    if (re)
      rdata <= (raddr < RA_W'(ROWS)) ? mem[raddr[IDX_W-1:0]] : '0;
  end

endmodule

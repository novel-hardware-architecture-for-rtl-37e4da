// flu_pkg: constants and the search-context type shared by the address
// lookup engine.
//
// The engine looks up 32-bit IPv4 destination addresses in a 16-way trie
// (4 address bits per level, 8 levels). The trie topology is stored as a
// bitmap in an on-chip SRAM whose rows hold 128 bitmap bits plus a 20-bit
// "Sum" field; the next hops sit in an off-chip DRAM. These numbers follow the
// published design. The search context (ctx_t) is this implementation's own
// way of carrying one lookup from one level FSM to the next.
package flu_pkg;

  localparam int unsigned ADDR_W   = 32;                 // IPv4 destination address
  localparam int unsigned STRIDE   = 4;                  // log2 of the trie degree
  localparam int unsigned DEGREE   = 1 << STRIDE;        // X = 16
  localparam int unsigned LEVELS   = ADDR_W / STRIDE;    // 8 trie levels
  localparam int unsigned LVL_W    = $clog2(LEVELS);     // level index width
  localparam int unsigned ROW_W    = 128;                // bitmap bits per SRAM row
  localparam int unsigned COL_W    = $clog2(ROW_W);      // bit position inside a row
  localparam int unsigned SUM_W    = 20;                 // Sum field per SRAM row
  localparam int unsigned POP_W    = COL_W + 1;          // popcount of one row (0..128)

  // SRAM bit addresses are BA_W wide, so an SRAM holds at most 2^BA_W bitmap
  // bits (8192 rows); the 20-bit Sum field can count every 1 before a row.
  localparam int unsigned BA_W     = SUM_W;
  localparam int unsigned RA_W     = BA_W - COL_W;       // SRAM row address (13)
  localparam int unsigned RANK_W   = BA_W + 1;           // number of 1s up to a bit
  localparam int unsigned DRAM_AW  = RANK_W + STRIDE;    // DRAM entry index P1*X+OFFSET

  // One SRAM row as read in a single access.
  typedef struct packed {
    logic [SUM_W-1:0] sum;    // 1s on this row's trie level in earlier rows
    logic [ROW_W-1:0] bits;   // bitmap, bit j = SRAM bit (row*128 + j)
  } sram_row_t;

  // Search context of one lookup in flight.
  typedef struct packed {
    logic [ADDR_W-1:0]  addr;        // destination address
    logic               done;        // a 0 bit was found: search has ended
    logic [BA_W-1:0]    start;       // START: first bit of the node's child group
    logic [RANK_W-1:0]  prev_rank;   // P1: number of 1s up to PREV, inclusive
    logic [RANK_W-1:0]  ones_before; // total 1s on all levels already passed
    logic [STRIDE-1:0]  offset;      // OFFSET at the level where the search ended
  } ctx_t;

endpackage

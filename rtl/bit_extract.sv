// bit_extract: picks the address bits that select a child at one trie level.
//
// At level i the search reads log2(X) = 4 bits of the destination address,
// starting at bit i*4 counted from the most significant end (level 0 uses
// address bits 31..28). The result is the OFFSET of the search algorithm.
// Purely combinational. The bit order follows the published search example
// (0x703020f8 gives OFFSET 7, 0, 3, 0 on levels 0..3).
module bit_extract
  import flu_pkg::*;
(
  input  logic [ADDR_W-1:0] addr,    // destination address
  input  logic [LVL_W-1:0]  level,   // trie level i, 0..LEVELS-1
  output logic [STRIDE-1:0] offset   // OFFSET for this level
);

  always_comb begin
    offset = '0;
    for (int unsigned i = 0; i < LEVELS; i++) begin
      if (level == LVL_W'(i))
        offset = addr[ADDR_W-1-i*STRIDE -: STRIDE];
    end
  end

endmodule

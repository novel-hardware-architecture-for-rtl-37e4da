// mask_gen: builds the mask that keeps the SRAM row bits up to a position.
//
// The 7-bit bit position is first decoded into a one-hot 128-bit word. The
// mask generator then sets mask bit j whenever the decoded line is at j or
// above, i.e. mask[j] = 1 for every j <= pos, so decoder line 127 drives all
// 128 mask bits (the longest path of the published circuit, whose worst case
// is line 127 with a fanout of 128). ANDing the mask with the SRAM row leaves
// the bits whose 1s the search counts: the 1s before the bit plus the bit
// itself. The decoder-plus-OR-grid structure follows the published circuit;
// the ripple form of the OR grid is this implementation's way of writing it
// (a synthesis tool is free to flatten it). mask[0] is always 1 by
// construction. Purely combinational.
module mask_gen
  import flu_pkg::*;
(
  input  logic [COL_W-1:0] pos,    // bit position inside the row, 0..127
  output logic [ROW_W-1:0] mask    // mask[j] = (j <= pos)
);

  logic [ROW_W-1:0] dec;   // decoder output, one line high

  always_comb begin
    dec = '0;
    dec[pos] = 1'b1;
  end

  // Mask generator: line j is driven by decoder output j and every one above.
  always_comb begin
    mask[ROW_W-1] = dec[ROW_W-1];
    for (int j = ROW_W - 2; j >= 0; j--)
      mask[j] = mask[j+1] | dec[j];
  end

endmodule

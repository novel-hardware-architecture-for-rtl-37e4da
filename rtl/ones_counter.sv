// ones_counter: number of 1s in a 128-bit (masked) SRAM row.
//
// Structure, as in the published adder bank for a 128-bit row:
//   row 1: 18 7:3 compressors take bits 0..125, each giving a 3-bit count;
//   row 2:  9 3-bit adders pair the compressor outputs (4-bit sums);
//   row 3:  5 4-bit adders: four pair the nine sums, the fifth adds the
//           ninth sum to the two row bits the compressors left (126, 127);
//   row 4:  2 5-bit adders pair four of those five sums;
//   row 5:  1 6-bit adder joins the two 6-bit sums;
//   row 6:  1 7-bit adder adds the fifth 4-bit-adder result, giving 0..128.
// How the two leftover bits and the odd sums are folded in is this
// implementation's choice; the adder counts and widths are the published
// ones. Purely combinational.
module ones_counter
  import flu_pkg::*;
(
  input  logic [ROW_W-1:0] bits,    // masked SRAM row
  output logic [POP_W-1:0] count    // number of 1s, 0..128
);

  localparam int unsigned NCOMP = 18;

  logic [2:0] c3 [NCOMP];   // compressor outputs
  logic [3:0] s4 [9];       // 3-bit adder sums
  logic [4:0] s5 [5];       // 4-bit adder sums
  logic [5:0] s6 [2];       // 5-bit adder sums
  logic [6:0] s7;           // 6-bit adder sum

  for (genvar k = 0; k < NCOMP; k++) begin : g_comp
    compressor_7to3 u_comp (.in(bits[7*k +: 7]), .count(c3[k]));
  end

  always_comb begin
    for (int k = 0; k < 9; k++)
      s4[k] = {1'b0, c3[2*k]} + {1'b0, c3[2*k+1]};
    for (int k = 0; k < 4; k++)
      s5[k] = {1'b0, s4[2*k]} + {1'b0, s4[2*k+1]};
    s5[4] = {1'b0, s4[8]} + {4'b0, bits[ROW_W-2]} + {4'b0, bits[ROW_W-1]};
    s6[0] = {1'b0, s5[0]} + {1'b0, s5[1]};
    s6[1] = {1'b0, s5[2]} + {1'b0, s5[3]};
    s7    = {1'b0, s6[0]} + {1'b0, s6[1]};
    count = {1'b0, s7} + {3'b0, s5[4]};
  end

endmodule

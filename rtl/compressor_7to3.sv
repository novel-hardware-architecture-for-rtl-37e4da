// compressor_7to3: counts the 1s among seven input bits (0..7) as a 3-bit
// number. Built from four full adders: two reduce six inputs, a third adds
// the seventh bit to their sum bits (weight 1), the fourth adds the three
// carries (weight 2). Combinational. Used as the first row of the sum-of-1s
// adder tree.
module compressor_7to3 (
  input  logic [6:0] in,
  output logic [2:0] count
);

  logic s1, c1, s2, c2, s3, c3, s4, c4;

  always_comb begin
    {c1, s1} = in[0] + in[1] + in[2];
    {c2, s2} = in[3] + in[4] + in[5];
    {c3, s3} = s1 + s2 + in[6];
    {c4, s4} = c1 + c2 + c3;
    count = {c4, s4, s3};
  end

endmodule

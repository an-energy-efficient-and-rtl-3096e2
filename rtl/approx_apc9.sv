// approx_apc9: approximate parallel counter for 9 input streams.
//
// Eight inputs are first reduced in pairs by four two-input gates, each gate
// output standing for two input bits (weight 2). Two half adders add the
// gate outputs pairwise; a third half adder adds their sum bits (weight 2 ->
// output bit 2^1); a full adder adds the two carries and the carry of the
// third half adder (weight 4 -> outputs 2^2 and 2^3). The ninth input is the
// 2^0 bit. The adder structure and output weights follow the source's
// figure. The pairing gates are this design's choice: AND for in[1:0] and
// in[5:4], OR for in[3:2] and in[7:6]. For independent streams with equal
// probability P, AND + OR of two disjoint pairs has the expected value 2P of
// the exact two-input sums, so 2*(g0+g1+g2+g3) approximates in[0]+...+in[7].
// Result range 0..9; combinational.
// count[0] is in[8] passed straight through (the ninth input has weight 1).
module approx_apc9 (
  input  logic [8:0] in,
  output logic [3:0] count
);

  logic [3:0] g;
  logic s1, c1, s2, c2, s3, c3;

  assign g[0] = in[0] & in[1];
  assign g[1] = in[2] | in[3];
  assign g[2] = in[4] & in[5];
  assign g[3] = in[6] | in[7];

  // half adders
  assign {c1, s1} = {g[0] & g[1], g[0] ^ g[1]};
  assign {c2, s2} = {g[2] & g[3], g[2] ^ g[3]};
  assign {c3, s3} = {s1 & s2,     s1 ^ s2};

  // full adder on the weight-4 carries
  assign count[3] = (c1 & c2) | (c3 & (c1 ^ c2));
  assign count[2] = c1 ^ c2 ^ c3;
  assign count[1] = s3;
  assign count[0] = in[8];

endmodule

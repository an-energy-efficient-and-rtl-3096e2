// sc_mult: bipolar stochastic multiplier.
//
// In the bipolar representation a stream with probability P of '1' encodes
// 2P - 1, and the XNOR of two independent streams encodes the product of
// their values. One XNOR gate per lane; purely combinational. This is the
// multiplier the source uses for every product in the memory block.
module sc_mult #(
  parameter int LANES = 1
) (
  input  logic [LANES-1:0] a,
  input  logic [LANES-1:0] b,
  output logic [LANES-1:0] y
);

  assign y = ~(a ^ b);

endmodule

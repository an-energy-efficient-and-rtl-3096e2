// btanh: Btanh activation, the stochastic tanh of a sum of streams.
//
// Implements the cell input activation: the output stream encodes about
// tanh(net/2), half of g(net) = 2*tanh(net/2); a memory cell uses two
// independently generated copies to form g. A parallel counter per lane
// counts the '1's of that lane's D input bits and one saturating up-down
// counter (btanh_fsm) with STATES states walks through the lane counts,
// producing one output bit per lane. Counter plus state machine is the
// structure the source gives for Btanh; the number of states is this
// design's choice: about D/2 states (2*ceil(D/4)) gives a curve within about
// 0.05 of tanh(x/2) for inputs of similar value, found by simulating the
// state machine for D = 6 and D = 12.
//
// Input bit k[l*D + i] is lane l of input stream i. clr restarts the state
// machine at the start of a stream. out[0] is registered (one cycle behind).
module btanh #(
  parameter int D      = 12,
  parameter int LANES  = 1,
  parameter int STATES = 2 * ((D + 3) / 4),
  parameter bit APPROX = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               clr,
  input  logic [D*LANES-1:0] k,
  output logic [LANES-1:0]   y
);

  localparam int CW = $clog2(D + 1);

  logic [LANES*CW-1:0] counts;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    apc #(.N_IN(D), .APPROX(APPROX)) u_apc (.in(k[l*D +: D]), .count(counts[l*CW +: CW]));
  end

  btanh_fsm #(.K(D), .LANES(LANES), .STATES(STATES)) u_fsm (
    .clk, .rst_n, .en, .clr, .count(counts), .out(y)
  );

endmodule

// btanh_fsm: saturating up-down counter of the Btanh stochastic tanh.
//
// Generalizes the linear state machine of the stochastic tanh (states S0 to
// S(N-1), one step up for a '1' input and one step down for a '0', output '1'
// in the upper half of the states) to counted inputs: for a count c of '1's
// among K input bits the state moves by 2*c - K and saturates at 0 and
// STATES-1. The output bit is '1' while the state is at least STATES/2.
// The chain of states and the output split follow the source's state
// diagram; an up-down counter is how the source says the state machine is
// built. This design's choices: with LANES parallel lanes, the lane counts
// are applied one after the other within the cycle (lane 0 first), so the
// machine behaves exactly like the unparallelized one run LANES times
// faster, and output bit l is taken from the state before lane l's step.
// clr puts the state at STATES/2 (used at the start of every stream).
//
// Timing: out[0] is a registered (Moore) output; out[l > 0] also depends on
// the counts of lanes below l in the same cycle.
module btanh_fsm #(
  parameter int K      = 3,
  parameter int LANES  = 1,
  parameter int STATES = 2,
  localparam int CW    = $clog2(K + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                clr,
  input  logic [LANES*CW-1:0] count,
  output logic [LANES-1:0]    out
);

  localparam int SW = (STATES > 2) ? $clog2(STATES) : 1;

  logic [SW-1:0] state;
  int            s [LANES+1];

  always_comb begin
    s[0] = int'(state);
    for (int l = 0; l < LANES; l++) begin
      out[l]   = (s[l] >= STATES / 2);
      s[l + 1] = s[l] + 2 * int'(count[l*CW +: CW]) - K;
      if (s[l + 1] < 0)          s[l + 1] = 0;
      if (s[l + 1] > STATES - 1) s[l + 1] = STATES - 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   state <= SW'(STATES / 2);
    else if (clr) state <= SW'(STATES / 2);
    else if (en)  state <= SW'(s[LANES]);
  end

  initial assert (STATES >= 2 && STATES % 2 == 0) else $error("btanh_fsm: STATES must be even and >= 2");

endmodule

// lfsr_rng: random number generator of one stochastic number generator.
//
// A 16-bit maximal-length Galois LFSR (polynomial x^16 + x^14 + x^13 + x^11
// + 1, period 65535) advances by one step on every cycle with en high. The
// top W_OUT bits of the register are the random number. The source names an
// RNG inside every SNG without fixing its kind; an LFSR is this design's
// choice. Reset loads SEED, which must be non-zero.
//
// Timing: rnd is the registered state, valid from the cycle after reset.
module lfsr_rng #(
  parameter int          W_OUT = 8,
  parameter logic [15:0] SEED  = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [W_OUT-1:0] rnd
);

  logic [15:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= (state >> 1) ^ (state[0] ? 16'hB400 : 16'h0000);
  end

  assign rnd = state[15 -: W_OUT];

  initial assert (SEED != 16'h0 && W_OUT <= 16) else $error("lfsr_rng: bad SEED or W_OUT");

endmodule

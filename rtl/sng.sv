// sng: stochastic number generator (random number generator + comparator).
//
// Converts an M-bit binary code x into LANES synchronized bit streams. Each
// lane has its own LFSR random number generator; lane j outputs '1' when its
// random number is below x, so each bit is '1' with probability x / 2^M.
// Several lanes give the "alpha-fold parallelized" form of one signal, where
// the alpha streams carry the same probability but use independent RNGs.
// SEED_IDX selects the seeds (lane j uses scrnn_pkg::seed_of(SEED_IDX*LANES+j)),
// so each instance in a design should get a different SEED_IDX.
//
// Timing: bits is combinational from x and the registered RNG state; the RNGs
// advance on each cycle with en high.
module sng #(
  parameter int          M        = scrnn_pkg::CODE_W,
  parameter int          LANES    = 1,
  parameter int unsigned SEED_IDX = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [M-1:0]     x,
  output logic [LANES-1:0] bits
);

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    logic [M-1:0] rnd;
    lfsr_rng #(.W_OUT(M), .SEED(scrnn_pkg::seed_of(SEED_IDX * LANES + j))) u_rng (
      .clk, .rst_n, .en, .rnd
    );
    assign bits[j] = (rnd < x);
  end

endmodule

// ascau: approximate stochastic computing activation unit (gate unit).
//
// Implements one LSTM gate: y = psi(sum_i K_i), with psi the configurable
// clamp-linear function of the linear approximation unit (sigmoid by default
// in the memory block). Structure as in the source: a parallel counter adds
// the '1's of the D input streams K_i (each already a weight-times-input
// product), the linear approximation unit maps the count to a probability,
// and a comparator against a random number turns that probability back into
// a stream. With LANES-fold parallelization the counter sees all D*LANES
// bits of a cycle and LANES comparators with independent RNGs produce LANES
// output bits. The output is a bipolar stream of the gate value.
//
// Input bit k[l*D + i] is lane l of input stream i. Output valid in the same
// cycle (combinational through the counter, registered RNGs advance with en).
module ascau
  import scrnn_pkg::*;
#(
  parameter int          D        = 12,
  parameter int          LANES    = 1,
  parameter int          M        = CODE_W,
  parameter int unsigned SEED_IDX = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  lau_cfg_t           cfg,
  input  logic [D*LANES-1:0] k,
  output logic [LANES-1:0]   y
);

  localparam int CW = $clog2(D * LANES + 1);

  logic [CW-1:0] count;
  logic [M-1:0]  prob;

  apc #(.N_IN(D * LANES)) u_apc (.in(k), .count(count));

  lau #(.N_BITS(D * LANES), .LANES(LANES), .M(M)) u_lau (.count, .cfg, .code(prob));

  sng #(.M(M), .LANES(LANES), .SEED_IDX(SEED_IDX)) u_cmp (
    .clk, .rst_n, .en, .x(prob), .bits(y)
  );

endmodule

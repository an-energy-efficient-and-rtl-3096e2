// sc_product_bank: weighted input streams of one gate or cell input.
//
// For N_U binary inputs u_i and weights w_i (M-bit bipolar codes) it
// generates the streams of the products w_i * u_i: each input and each
// weight has its own stochastic number generator with LANES parallel lanes,
// and an XNOR multiplier per lane forms the product. The source generates
// the streams of every gate and cell separately to keep them uncorrelated;
// this bank is one such separate set. Output bit k[l*N_U + i] is lane l of
// product i; SNG seeds use indices SEED_IDX .. SEED_IDX + 2*N_U - 1.
//
// Timing: combinational from the codes and the RNG state; RNGs advance on en.
module sc_product_bank #(
  parameter int          N_U      = 12,
  parameter int          LANES    = 1,
  parameter int          M        = scrnn_pkg::CODE_W,
  parameter int unsigned SEED_IDX = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [M-1:0]         u [N_U],
  input  logic [M-1:0]         w [N_U],
  output logic [N_U*LANES-1:0] k
);

  for (genvar i = 0; i < N_U; i++) begin : g_in
    logic [LANES-1:0] su, sw, prod;
    sng #(.M(M), .LANES(LANES), .SEED_IDX(SEED_IDX + 2 * i)) u_sng_u (
      .clk, .rst_n, .en, .x(u[i]), .bits(su)
    );
    sng #(.M(M), .LANES(LANES), .SEED_IDX(SEED_IDX + 2 * i + 1)) u_sng_w (
      .clk, .rst_n, .en, .x(w[i]), .bits(sw)
    );
    sc_mult #(.LANES(LANES)) u_mul (.a(su), .b(sw), .y(prod));
    for (genvar l = 0; l < LANES; l++) begin : g_lane
      assign k[l*N_U + i] = prod[l];
    end
  end

endmodule

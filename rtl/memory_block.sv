// memory_block: one multi-cell LSTM memory block in stochastic computing.
//
// A block of N_CELLS cells sharing an input gate and a forget gate. For a
// time step with inputs u (external inputs, outputs of all blocks at t-1 and
// a bias, each an M-bit bipolar code) it computes
//   y_in, y_forget = sigmoid(sum w * u)                  (ascau gates)
//   S_v(t) = y_forget*S_v(t-1) + y_in*g(sum w_cell,v * u), g = 2*tanh(x/2)
//   q      = sum_v h(S_v(t)),  h = tanh(x/2)              (binary adder)
//   O(t)   = y_out * q,  y_out = sigmoid(sum w_out * u)
// Gate units are approximate SC activation units, g is formed by two
// independently generated Btanh streams times y_in (z and z2), the cell
// kernel updates the state and streams h(S), a probability estimator turns
// h(S) into binary, a binary adder forms q, and q is turned back into a
// stream and multiplied by the output gate stream. This is the source's
// block structure.
//
// This design's choices: a time step takes two stream windows. Window A
// (en_a, closed by done_a) runs the input and forget gates and the cells,
// and latches the states and q. Window B (en_b, closed by done_b) runs the
// output gate and the output multiplier, and a probability estimator stores
// O(t) as a binary code, which the layer feeds back as an input at t+1.
// q is clamped to [-1, +1]. Gate inputs are u only (no peephole inputs).
// st_clr returns states and O to 0 at the start of a new input sequence.
//
// Seeds: the block uses SNG seed indices SEED_IDX up to
// SEED_IDX + (3 + 2*N_CELLS)*2*N_U + 4 + N_CELLS - 1.
module memory_block
  import scrnn_pkg::*;
#(
  parameter int          N_U       = 12,
  parameter int          N_CELLS   = 1,
  parameter int          ALPHA     = 1,
  parameter int          SEQ_LEN   = 128,
  parameter int          M         = CODE_W,
  parameter int          BT_STATES = 2 * ((N_U + 3) / 4),
  parameter int          CK_STATES = 2,
  parameter bit          APPROX    = 1'b0,
  parameter int unsigned SEED_IDX  = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  lau_cfg_t     gate_cfg,
  input  logic         en_a,
  input  logic         done_a,
  input  logic         en_b,
  input  logic         done_b,
  input  logic         st_clr,
  input  logic [M-1:0] u      [N_U],
  input  logic [M-1:0] w_in   [N_U],
  input  logic [M-1:0] w_fg   [N_U],
  input  logic [M-1:0] w_out  [N_U],
  input  logic [M-1:0] w_cell [N_CELLS][N_U],
  output logic [M-1:0] o_code,
  output logic [M-1:0] q_code,
  output logic [M-1:0] s_code [N_CELLS],
  output logic [M-1:0] h_code [N_CELLS],
  output logic [N_CELLS-1:0] clamp_lo,
  output logic [N_CELLS-1:0] clamp_hi
);

  localparam int L    = SEQ_LEN / ALPHA;   // cycles per window
  localparam int BANK = 2 * N_U;           // seed indices per product bank
  localparam int XTRA = SEED_IDX + (3 + 2 * N_CELLS) * BANK;

  // ---------------- gates ----------------
  logic [N_U*ALPHA-1:0] k_in, k_fg, k_out;
  logic [ALPHA-1:0]     y_in, y_fg, y_out;

  sc_product_bank #(.N_U(N_U), .LANES(ALPHA), .M(M), .SEED_IDX(SEED_IDX + 0 * BANK)) u_pb_in (
    .clk, .rst_n, .en(en_a), .u, .w(w_in), .k(k_in));
  sc_product_bank #(.N_U(N_U), .LANES(ALPHA), .M(M), .SEED_IDX(SEED_IDX + 1 * BANK)) u_pb_fg (
    .clk, .rst_n, .en(en_a), .u, .w(w_fg), .k(k_fg));
  sc_product_bank #(.N_U(N_U), .LANES(ALPHA), .M(M), .SEED_IDX(SEED_IDX + 2 * BANK)) u_pb_out (
    .clk, .rst_n, .en(en_b), .u, .w(w_out), .k(k_out));

  ascau #(.D(N_U), .LANES(ALPHA), .M(M), .SEED_IDX(XTRA + 0)) u_gate_in (
    .clk, .rst_n, .en(en_a), .cfg(gate_cfg), .k(k_in), .y(y_in));
  ascau #(.D(N_U), .LANES(ALPHA), .M(M), .SEED_IDX(XTRA + 1)) u_gate_fg (
    .clk, .rst_n, .en(en_a), .cfg(gate_cfg), .k(k_fg), .y(y_fg));
  ascau #(.D(N_U), .LANES(ALPHA), .M(M), .SEED_IDX(XTRA + 2)) u_gate_out (
    .clk, .rst_n, .en(en_b), .cfg(gate_cfg), .k(k_out), .y(y_out));

  // ---------------- cells ----------------
  for (genvar c = 0; c < N_CELLS; c++) begin : g_cell
    logic [N_U*ALPHA-1:0] k_a, k_b;
    logic [ALPHA-1:0]     g_a, g_b, z, z2, c_out;

    sc_product_bank #(.N_U(N_U), .LANES(ALPHA), .M(M), .SEED_IDX(SEED_IDX + (3 + 2 * c) * BANK)) u_pb_a (
      .clk, .rst_n, .en(en_a), .u, .w(w_cell[c]), .k(k_a));
    sc_product_bank #(.N_U(N_U), .LANES(ALPHA), .M(M), .SEED_IDX(SEED_IDX + (4 + 2 * c) * BANK)) u_pb_b (
      .clk, .rst_n, .en(en_a), .u, .w(w_cell[c]), .k(k_b));

    btanh #(.D(N_U), .LANES(ALPHA), .STATES(BT_STATES), .APPROX(APPROX)) u_bt_a (
      .clk, .rst_n, .en(en_a), .clr(done_a), .k(k_a), .y(g_a));
    btanh #(.D(N_U), .LANES(ALPHA), .STATES(BT_STATES), .APPROX(APPROX)) u_bt_b (
      .clk, .rst_n, .en(en_a), .clr(done_a), .k(k_b), .y(g_b));

    sc_mult #(.LANES(ALPHA)) u_mz  (.a(g_a), .b(y_in), .y(z));
    sc_mult #(.LANES(ALPHA)) u_mz2 (.a(g_b), .b(y_in), .y(z2));

    cell_kernel #(.ALPHA(ALPHA), .SEQ_LEN(SEQ_LEN), .M(M), .STATES(CK_STATES),
                  .APPROX(APPROX), .SEED_IDX(XTRA + 4 + c)) u_ck (
      .clk, .rst_n, .en(en_a), .done(done_a), .st_clr,
      .y(y_fg), .z, .z2, .c_out, .s_code(s_code[c]),
      .clamp_lo(clamp_lo[c]), .clamp_hi(clamp_hi[c]));

    pe #(.LANES(ALPHA), .LEN(L), .M(M)) u_pe (
      .clk, .rst_n, .en(en_a), .clr(done_a), .bits(c_out), .code(h_code[c]));
  end

  // ---------------- q = sum of cell outputs (binary) ----------------
  int q_sum;
  always_comb begin
    q_sum = -(N_CELLS - 1) * (1 << (M - 1));
    for (int c = 0; c < N_CELLS; c++) q_sum += int'(h_code[c]);
    if (q_sum < 0)            q_sum = 0;
    if (q_sum > (1 << M) - 1) q_sum = (1 << M) - 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q_code <= M'(1 << (M - 1));
    else if (st_clr) q_code <= M'(1 << (M - 1));
    else if (done_a) q_code <= M'(q_sum);
  end

  // ---------------- output: O = y_out * q ----------------
  logic [ALPHA-1:0] q_bits, o_bits;
  logic [M-1:0]     o_pe;

  sng #(.M(M), .LANES(ALPHA), .SEED_IDX(XTRA + 3)) u_sng_q (
    .clk, .rst_n, .en(en_b), .x(q_code), .bits(q_bits));

  sc_mult #(.LANES(ALPHA)) u_mo (.a(y_out), .b(q_bits), .y(o_bits));

  pe #(.LANES(ALPHA), .LEN(L), .M(M)) u_pe_o (
    .clk, .rst_n, .en(en_b), .clr(done_b), .bits(o_bits), .code(o_pe));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      o_code <= M'(1 << (M - 1));
    else if (st_clr) o_code <= M'(1 << (M - 1));
    else if (done_b) o_code <= o_pe;
  end

endmodule

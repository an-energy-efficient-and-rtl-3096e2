// lstm_layer: hidden LSTM layer of the stochastic-computing recurrent network.
//
// N_BLOCKS memory blocks of N_CELLS cells each. At every time step each
// block sees the same input vector u = [x(t) (N_IN codes), outputs of all
// blocks at t-1 (N_BLOCKS codes), bias]; its gates and cells weight u with
// their own weights and the block produces one output O_b(t) (see
// memory_block). Block outputs are stored in binary and fed back, which is
// the recurrence. The defaults are the smaller Reder grammar network the
// source evaluates: 4 blocks of 1 cell, 128-bit streams, no parallelization;
// 7 inputs are the 7 symbols of that grammar, one per input.
//
// Number format: every value is an M-bit bipolar code, code = (v+1)/2 * 2^M
// (see scrnn_pkg). Weights and inputs come from outside (the source keeps
// them in an external memory); they must stay stable while busy.
//
// Operation: pulse seq_start while idle to zero the cell states and block
// outputs (new input sequence); pulse start while idle to run one time step
// with input x. busy stays high for 2*SEQ_LEN/ALPHA + 2 cycles, step_done
// pulses in the last one, after which o_code, q_code and s_code hold the
// results of the step. gate_cfg configures the gate activation (normally
// scrnn_pkg::LAU_SIGMOID). clamp_lo / clamp_hi show, in the cycle done_a is
// high, which cell states were clamped to -1 / +1.
// rst_n resets all registers asynchronously; its only other use is the
// reset disable of the step_ctrl assertion (simulation only).
module lstm_layer
  import scrnn_pkg::*;
#(
  parameter int N_IN      = 7,
  parameter int N_BLOCKS  = 4,
  parameter int N_CELLS   = 1,
  parameter int ALPHA     = 1,
  parameter int SEQ_LEN   = 128,
  parameter int M         = CODE_W,
  parameter bit APPROX    = 1'b0,
  localparam int N_U      = N_IN + N_BLOCKS + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  lau_cfg_t     gate_cfg,
  input  logic         seq_start,
  input  logic         start,
  input  logic [M-1:0] x      [N_IN],
  input  logic [M-1:0] w_in   [N_BLOCKS][N_U],
  input  logic [M-1:0] w_fg   [N_BLOCKS][N_U],
  input  logic [M-1:0] w_out  [N_BLOCKS][N_U],
  input  logic [M-1:0] w_cell [N_BLOCKS][N_CELLS][N_U],
  output logic         busy,
  output logic         step_done,
  output logic         phase_a,
  output logic         latch_a,
  output logic [M-1:0] o_code [N_BLOCKS],
  output logic [M-1:0] q_code [N_BLOCKS],
  output logic [M-1:0] s_code [N_BLOCKS][N_CELLS],
  output logic [N_CELLS-1:0] clamp_lo [N_BLOCKS],
  output logic [N_CELLS-1:0] clamp_hi [N_BLOCKS]
);

  localparam int L = SEQ_LEN / ALPHA;

  logic         en_a, done_a, en_b, done_b;
  logic         st_clr;
  logic [M-1:0] u [N_U];

  step_ctrl #(.L(L)) u_ctrl (
    .clk, .rst_n, .start, .en_a, .done_a, .en_b, .done_b, .busy
  );

  assign st_clr    = seq_start && !busy;
  assign step_done = done_b;
  assign phase_a   = en_a;
  assign latch_a   = done_a;

  always_comb begin
    for (int i = 0; i < N_IN; i++)     u[i]        = x[i];
    for (int b = 0; b < N_BLOCKS; b++) u[N_IN + b] = o_code[b];
    u[N_U - 1] = '1;   // bias input, value +1
  end

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_blk
    localparam int SPAN = (3 + 2 * N_CELLS) * 2 * N_U + 4 + N_CELLS;
    logic [M-1:0] h_unused [N_CELLS];
    memory_block #(
      .N_U(N_U), .N_CELLS(N_CELLS), .ALPHA(ALPHA), .SEQ_LEN(SEQ_LEN), .M(M),
      .APPROX(APPROX), .SEED_IDX(b * SPAN)
    ) u_blk (
      .clk, .rst_n, .gate_cfg, .en_a, .done_a, .en_b, .done_b, .st_clr,
      .u, .w_in(w_in[b]), .w_fg(w_fg[b]), .w_out(w_out[b]), .w_cell(w_cell[b]),
      .o_code(o_code[b]), .q_code(q_code[b]), .s_code(s_code[b]), .h_code(h_unused),
      .clamp_lo(clamp_lo[b]), .clamp_hi(clamp_hi[b])
    );
  end

endmodule

// spu: state processing unit of the cell kernel.
//
// Turns the per-cycle counts of the parallel counter over one stream window
// into the new internal cell state as an M-bit bipolar code. An accumulator
// sums the counts (sum of Q_ij over D signals and ALPHA lanes). With
// NA = n*alpha = SEQ_LEN bits per signal:
//   T  = 2*sum + NA,   T' = T - NA*D
//   S_B = 0                         if T' <= 0        (state <= -1)
//       = 2^M - 1                   if T' >= 2*NA     (state >= +1)
//       = floor(2^(M-1) * T' / NA)  otherwise,
// which is the state (sum of the D bipolar values) clamped to [-1, +1] and
// scaled to M bits. All multiplications and divisions are shifts because NA
// is a power of two. Equations, flow and structure (accumulator, shifts,
// subtractor, comparator, output multiplexer) follow the source.
//
// Interface: acc_en adds count to the accumulator; clr empties it (the
// owner latches s_b in the same cycle). s_b, lo and hi are combinational
// from the accumulator; lo/hi flag the two clamping cases.
// Only the low M bits of the shifted value are used: in the linear case
// 0 < T' < 2*NA, so the scaled value is below 2^M by construction.
module spu #(
  parameter int SEQ_LEN = 128,  // n * alpha, power of two
  parameter int D       = 3,
  parameter int CW      = 2,    // width of the per-cycle count
  parameter int M       = scrnn_pkg::CODE_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          acc_en,
  input  logic          clr,
  input  logic [CW-1:0] count,
  output logic [M-1:0]  s_b,
  output logic          lo,
  output logic          hi
);

  localparam int LG   = scrnn_pkg::log2_floor(SEQ_LEN);
  localparam int AW   = $clog2(D * SEQ_LEN + 1);
  localparam int SH   = M - 1 - LG;          // left shift; negative = right
  localparam int TW   = AW + 4;

  logic [AW-1:0]        acc;
  logic signed [TW-1:0] t, t_p, lin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (clr)    acc <= '0;
    else if (acc_en) acc <= acc + AW'(count);
  end

  always_comb begin
    t   = (TW'(acc) <<< 1) + TW'(SEQ_LEN);
    t_p = t - TW'(SEQ_LEN * D);
    if (SH >= 0) lin = t_p <<< SH;
    else         lin = t_p >>> (-SH);
    lo = (t_p <= 0);
    hi = (t_p >= TW'(2 * SEQ_LEN));
    if (lo)      s_b = '0;
    else if (hi) s_b = '1;
    else         s_b = M'(lin);
  end

  initial assert ((1 << LG) == SEQ_LEN) else $error("spu: SEQ_LEN must be a power of two");

endmodule

// lau: linear approximation unit of the approximate SC activation unit.
//
// Evaluates psi(x) = min(1, max(p, x/r + s)) on the value x carried by the
// parallel counter in the current cycle and returns the result as the M-bit
// bipolar code of a stream: code = (psi + 1) / 2 * 2^M, saturated at 2^M - 1.
// The count covers N_BITS input bits (D signals times LANES parallel copies);
// the bipolar sum over the D signals is x = (2*count - N_BITS) / LANES.
// The formula and the sigmoid / ReLU settings of p, r, s follow the source.
// This design's choices: the function is applied per cycle to the count, r
// is a power of two (a shift), p and s are fixed point with
// scrnn_pkg::CFG_FRAC fraction bits, and the result is expressed as a
// bipolar stream probability so that it can be multiplied by XNOR gates.
// LANES must be a power of two. Combinational.
module lau
  import scrnn_pkg::*;
#(
  parameter int N_BITS = 3,
  parameter int LANES  = 1,
  parameter int M      = CODE_W,
  localparam int CW    = $clog2(N_BITS + 1)
) (
  input  logic [CW-1:0] count,
  input  lau_cfg_t      cfg,
  output logic [M-1:0]  code
);

  localparam int ONE     = 1 << CFG_FRAC;
  localparam int LANE_SH = log2_floor(LANES);
  localparam int CODE_MAX = (1 << M) - 1;

  int diff, x, psi, bip, scaled;

  always_comb begin
    diff = 2 * int'(count) - N_BITS;
    x    = (diff <<< CFG_FRAC) >>> (LANE_SH + int'(cfg.r_log2));
    psi  = x + int'(cfg.s);
    if (psi < int'(cfg.p)) psi = int'(cfg.p);
    if (psi > ONE)         psi = ONE;
    bip  = (psi + ONE) >>> 1;
    if (bip < 0) bip = 0;
    if (M >= CFG_FRAC) scaled = bip <<< (M - CFG_FRAC);
    else               scaled = bip >>> (CFG_FRAC - M);
    if (scaled > CODE_MAX) scaled = CODE_MAX;
    code = M'(scaled);
  end

  initial assert ((1 << LANE_SH) == LANES) else $error("lau: LANES must be a power of two");

endmodule

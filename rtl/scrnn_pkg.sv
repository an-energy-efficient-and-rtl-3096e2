// scrnn_pkg: types, constants and helper functions shared by the stochastic
// computing (SC) LSTM datapath.
//
// Number format used between blocks: every binary value v in [-1, +1] is an
// unsigned M-bit "bipolar code" c = floor((v + 1) / 2 * 2^M), saturated at
// 2^M - 1. A stochastic number generator fed with c produces a bit stream
// whose probability of a '1' is c / 2^M, i.e. the bipolar stream of v. The
// width M is this design's choice (the source leaves the binary width m of
// the state register open); 8 bits is the default.
//
// The activation unit of the gates is configured by lau_cfg_t, holding the
// three constants p, r, s of psi(x) = min(1, max(p, x/r + s)). p and s are
// signed fixed point with CFG_FRAC fractional bits; r is restricted to a
// power of two and is given by its base-2 logarithm.
package scrnn_pkg;

  localparam int CODE_W   = 8;   // default binary code width (m)
  localparam int CFG_FRAC = 8;   // fractional bits of p and s

  typedef struct packed {
    logic signed [15:0] p;       // lower clamp of psi, CFG_FRAC fraction bits
    logic signed [15:0] s;       // offset of psi, CFG_FRAC fraction bits
    logic        [3:0]  r_log2;  // psi slope is 1 / 2^r_log2
  } lau_cfg_t;

  // Sigmoid approximation {p = 0, r = 4, s = 1/2} and ReLU {p = 0, r = 1, s = 0}.
  localparam lau_cfg_t LAU_SIGMOID = '{p: 16'sd0, s: 16'sd128, r_log2: 4'd2};
  localparam lau_cfg_t LAU_RELU    = '{p: 16'sd0, s: 16'sd0,   r_log2: 4'd0};

  // Distinct non-zero seed for the idx-th random number generator. Multiplying
  // by an odd constant and xor-ing a constant are both bijective modulo 2^16,
  // so different indices (mod 2^16) give different seeds.
  function automatic logic [15:0] seed_of(input int unsigned idx);
    logic [15:0] v;
    v = 16'((idx + 1) * 32'h0000_6F4B) ^ 16'h3C5A;
    return (v == 16'h0) ? 16'h0001 : v;
  endfunction

  // Exact base-2 logarithm of a power of two (floor otherwise).
  function automatic int log2_floor(input int unsigned v);
    int r;
    r = 0;
    while ((v >> (r + 1)) != 0) r++;
    return r;
  endfunction

endpackage

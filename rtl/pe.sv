// pe: probability estimator, converting a stream back to a binary code.
//
// Counts the '1's of a LANES-bit-wide stream over one window of LEN cycles
// (LANES*LEN bits, a power of two) and gives the M-bit code
// count * 2^M / (LANES*LEN), saturated at 2^M - 1, which is the bipolar code
// of the value the stream carries. The source names the unit and its job;
// a counter and a shift is this design's simplest form of it.
//
// Interface: en adds the current bits; clr empties the counter (the owner
// latches code in the same cycle). code is combinational from the counter.
module pe #(
  parameter int LANES = 1,
  parameter int LEN   = 128,
  parameter int M     = scrnn_pkg::CODE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  logic [LANES-1:0] bits,
  output logic [M-1:0]     code
);

  localparam int NB = LANES * LEN;
  localparam int LG = scrnn_pkg::log2_floor(NB);
  localparam int PW = $clog2(NB + 1);
  localparam int SH = M - LG;

  logic [PW-1:0] cnt;
  logic [PW-1:0] inc;
  int            scaled;

  always_comb begin
    inc = '0;
    for (int l = 0; l < LANES; l++) inc = inc + PW'(bits[l]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cnt <= '0;
    else if (clr) cnt <= '0;
    else if (en)  cnt <= cnt + inc;
  end

  always_comb begin
    if (SH >= 0) scaled = int'(cnt) <<< SH;
    else         scaled = int'(cnt) >>> (-SH);
    if (scaled > (1 << M) - 1) scaled = (1 << M) - 1;
    code = M'(scaled);
  end

  initial assert ((1 << LG) == NB) else $error("pe: LANES*LEN must be a power of two");

endmodule

// cell_kernel: internal state update and output of one LSTM memory cell.
//
// Computes, over one stream window of SEQ_LEN/ALPHA cycles,
//   S(t) = y_forget * S(t-1) + y_in*tanh(net/2) + y_in*tanh(net/2)
// where the last two terms arrive as two independently generated streams z
// and z2, and streams C_out = h(S(t)) = tanh(S(t)/2). Structure as in the
// source: the stored binary state S(t-1) is turned into ALPHA streams by a
// stochastic number generator, multiplied (XNOR) by the forget gate stream y
// to give x; a parallel counter counts the '1's of x, z, z2 each cycle; the
// state processing unit (spu) accumulates the counts into the new clamped
// state, and a Btanh up-down counter driven by the counts produces C_out.
//
// This design's choices: the state register holds the M-bit bipolar code
// and is loaded from the spu in the 'done' cycle that ends a window; st_clr
// sets it to the code of 0 (S(0) = 0). The Btanh machine has STATES = 2 by
// default, chosen by simulating the state machine against tanh(S/2) for
// D = 3 inputs; it walks the ALPHA lane counts in sequence (see btanh_fsm).
// APPROX selects the approximate parallel counter for the spu count.
// The source reuses one counter for the spu and the Btanh; this is done
// for ALPHA = 1. For ALPHA > 1 the Btanh takes per-lane counts of the same
// bits (one 3-input counter per lane) so that it can emit ALPHA output bits
// per cycle.
//
// Timing: en marks stream cycles; done (with en low) latches S(t) and clears
// the accumulator and the Btanh state. s_code is S(t-1) during a window.
module cell_kernel #(
  parameter int          ALPHA    = 1,
  parameter int          SEQ_LEN  = 128,
  parameter int          M        = scrnn_pkg::CODE_W,
  parameter int          STATES   = 2,
  parameter bit          APPROX   = 1'b0,
  parameter int unsigned SEED_IDX = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             done,
  input  logic             st_clr,
  input  logic [ALPHA-1:0] y,
  input  logic [ALPHA-1:0] z,
  input  logic [ALPHA-1:0] z2,
  output logic [ALPHA-1:0] c_out,
  output logic [M-1:0]     s_code,
  output logic             clamp_lo,
  output logic             clamp_hi
);

  localparam int D   = 3;
  localparam int CW  = $clog2(D * ALPHA + 1);
  localparam int LCW = $clog2(D + 1);

  logic [ALPHA-1:0]     s_prev, x;
  logic [D*ALPHA-1:0]   apc_in;
  logic [CW-1:0]        apc_out;
  logic [ALPHA*LCW-1:0] lane_cnt;
  logic [M-1:0]         s_b;

  sng #(.M(M), .LANES(ALPHA), .SEED_IDX(SEED_IDX)) u_sng (
    .clk, .rst_n, .en, .x(s_code), .bits(s_prev)
  );

  sc_mult #(.LANES(ALPHA)) u_mul (.a(y), .b(s_prev), .y(x));

  assign apc_in = {z2, z, x};

  apc #(.N_IN(D * ALPHA), .APPROX(APPROX)) u_apc (.in(apc_in), .count(apc_out));

  // With one lane the Btanh reuses the spu's counter; with ALPHA lanes it
  // needs each lane's own count, so a small 3-input counter per lane.
  if (ALPHA == 1) begin : g_shared
    assign lane_cnt = apc_out;
  end else begin : g_lanes
    for (genvar l = 0; l < ALPHA; l++) begin : g_lane
      apc #(.N_IN(D)) u_lane_apc (
        .in({z2[l], z[l], x[l]}), .count(lane_cnt[l*LCW +: LCW])
      );
    end
  end

  spu #(.SEQ_LEN(SEQ_LEN), .D(D), .CW(CW), .M(M)) u_spu (
    .clk, .rst_n, .acc_en(en), .clr(done), .count(apc_out),
    .s_b, .lo(clamp_lo), .hi(clamp_hi)
  );

  btanh_fsm #(.K(D), .LANES(ALPHA), .STATES(STATES)) u_fsm (
    .clk, .rst_n, .en, .clr(done), .count(lane_cnt), .out(c_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      s_code <= M'(1 << (M - 1));
    else if (st_clr) s_code <= M'(1 << (M - 1));
    else if (done)   s_code <= s_b;
  end

endmodule

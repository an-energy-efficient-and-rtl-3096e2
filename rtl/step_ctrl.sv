// step_ctrl: time-step controller of the stochastic LSTM layer.
//
// One start pulse runs one time step as two stream windows of L cycles each
// (window A: gates and cells; window B: output gate and block output), each
// window followed by one 'done' cycle in which the binary registers latch
// and the counters clear. Sequence: IDLE -> RUN_A (L cycles, en_a) ->
// DONE_A (done_a) -> RUN_B (L cycles, en_b) -> DONE_B (done_b, step_done)
// -> IDLE. A step therefore takes 2*L + 2 cycles after start. The source
// lists a control unit in the cell kernel area without describing it; this
// sequencing is this design's own.
// The assertion a_no_restart flags a start pulse while busy; it is disabled
// during reset, so rst_n also appears in a non-clocked condition. That is a
// simulation-only use; the flip-flops themselves reset asynchronously only.
module step_ctrl #(
  parameter int L = 128
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic en_a,
  output logic done_a,
  output logic en_b,
  output logic done_b,
  output logic busy
);

  typedef enum logic [2:0] {IDLE, RUN_A, DONE_A, RUN_B, DONE_B} state_t;

  localparam int CW = $clog2(L + 1);

  state_t        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        IDLE:   if (start) begin state <= RUN_A; cnt <= CW'(L - 1); end
        RUN_A:  if (cnt == 0) state <= DONE_A; else cnt <= cnt - 1'b1;
        DONE_A: begin state <= RUN_B; cnt <= CW'(L - 1); end
        RUN_B:  if (cnt == 0) state <= DONE_B; else cnt <= cnt - 1'b1;
        DONE_B: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign en_a   = (state == RUN_A);
  assign done_a = (state == DONE_A);
  assign en_b   = (state == RUN_B);
  assign done_b = (state == DONE_B);
  assign busy   = (state != IDLE);

  // A time step is never restarted while one is running.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("step_ctrl: start while busy");

endmodule

// tb_workloads: runs the layer at the network sizes it is evaluated at,
// other than the default (4 blocks of 1 cell), which the full-size test
// covers.
//  * u_grammar32: the symbol-prediction network with 3 memory blocks of 2
//    cells and 128-bit streams, on three Reber grammar strings.
//  * u_speech: a slice of the speech-feature network: 12 inputs per frame,
//    256-bit streams split into 4 lanes of 64 bits, approximate parallel
//    counters, 8 memory blocks of 1 cell (the full hidden layer has 120
//    units; 8 keep the simulation short), two sequences of 6 random feature
//    frames.
// Each harness (lstm_seq_run) checks latency, states and outputs of every
// step against the expected values of the stochastic datapath, and the mean
// errors over the run; this module sums their results. Measured mean
// absolute state errors are about 0.14 (128 bits) and 0.15 (256 bits, 4
// approximate lanes; 0.12 with exact counters), which sets the limits: per
// value 0.7 / 0.55 for states, 0.45 / 0.4 for outputs, 0.2 for the means.
// Watchdog: 60 ms of simulated time.
module tb_workloads;
  logic clk = 0;
  logic fin_g, fin_s;
  int   chk_g, chk_s, fail_g, fail_s;

  always #5 clk = ~clk;

  lstm_seq_run #(.NI(7), .NB(3), .NC(2), .ALPHA(1), .SEQ_LEN(128), .GRAMMAR(1'b1),
                 .N_SEQ(3), .S_TOL(0.7), .O_TOL(0.45), .MEAN_TOL(0.2)) u_grammar32 (
    .clk, .fin(fin_g), .checks(chk_g), .failures(fail_g));

  lstm_seq_run #(.NI(12), .NB(8), .NC(1), .ALPHA(4), .SEQ_LEN(256), .APPROX(1'b1),
                 .GRAMMAR(1'b0), .N_SEQ(2), .STEPS(6), .S_TOL(0.55), .O_TOL(0.4), .MEAN_TOL(0.2)) u_speech (
    .clk, .fin(fin_s), .checks(chk_s), .failures(fail_s));

  initial begin
    #60000000;
    $display("TB_RESULT checks=%0d failures=%0d", chk_g + chk_s, fail_g + fail_s + 1);
    $finish;
  end

  initial begin
    #1 wait (fin_g && fin_s);
    $display("TB_RESULT checks=%0d failures=%0d", chk_g + chk_s, fail_g + fail_s);
    $finish;
  end
endmodule

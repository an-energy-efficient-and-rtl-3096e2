// tb_ascau: gate unit with 4 inputs and 2 lanes. Drives random input
// streams; from the bits of every cycle it computes the probability the
// linear approximation unit should give (psi in real arithmetic) and sums
// it. The number of output '1's must match that sum within 5 standard
// deviations, for sigmoid and ReLU settings and several input levels; the
// same holds separately for the cycles of each input count (at least 50 of
// them), which checks the whole transfer curve psi(count). For
// small inputs (no clamping) the output value must be about the ideal
// sigmoid approximation x/4 + 1/2 of the mean input sum x (the output
// stream carries the gate value in bipolar form).
module tb_ascau;
  import scrnn_pkg::*;
  localparam int D = 4, LANES = 2, N = 20000;
  logic clk = 0, rst_n = 0, en = 0;
  lau_cfg_t cfg;
  logic [D*LANES-1:0] k;
  logic [LANES-1:0]   y;
  int checks = 0, failures = 0;

  ascau #(.D(D), .LANES(LANES), .M(8), .SEED_IDX(3)) dut (.clk, .rst_n, .en, .cfg, .k, .y);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real psi_prob(int c, real r, real s);
    real x, psi, v;
    x = real'(2 * c - D * LANES) / LANES;
    psi = x / r + s;
    if (psi < 0.0) psi = 0.0;
    if (psi > 1.0) psi = 1.0;
    v = $floor((psi + 1.0) / 2.0 * 256.0);
    if (v > 255) v = 255;
    return v / 256.0;
  endfunction

  initial begin
    static real vals [4] = '{-0.8, -0.1, 0.15, 0.9};
    real r, s, expect_ones, var_ones, pr, got, ideal;
    int ones, c;
    int   b_cyc [D*LANES+1], b_ones [D*LANES+1];
    real  b_pr;
    k = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      cfg = (mode == 0) ? LAU_SIGMOID : LAU_RELU;
      r   = (mode == 0) ? 4.0 : 1.0;
      s   = (mode == 0) ? 0.5 : 0.0;
      foreach (vals[vi]) begin
        expect_ones = 0; var_ones = 0; ones = 0;
        foreach (b_cyc[i]) begin b_cyc[i] = 0; b_ones[i] = 0; end
        for (int n = 0; n < N; n++) begin
          @(negedge clk);
          en = 1;
          for (int i = 0; i < D * LANES; i++) k[i] = ($urandom % 10000) < (vals[vi] + 1.0) / 2.0 * 10000;
          #1;
          c = 0;
          for (int i = 0; i < D * LANES; i++) c += k[i];
          pr = psi_prob(c, r, s);
          expect_ones += LANES * pr;
          var_ones += LANES * pr * (1.0 - pr);
          for (int l = 0; l < LANES; l++) ones += y[l];
          b_cyc[c]++;
          for (int l = 0; l < LANES; l++) b_ones[c] += y[l];
        end
        // per input count: output ones of the cycles with that count
        foreach (b_cyc[ci]) if (b_cyc[ci] >= 50) begin
          b_pr = psi_prob(ci, r, s);
          checks++;
          if (b_ones[ci] < LANES * b_cyc[ci] * b_pr - 5.0 * $sqrt(LANES * b_cyc[ci] * b_pr * (1.0 - b_pr)) - 2 ||
              b_ones[ci] > LANES * b_cyc[ci] * b_pr + 5.0 * $sqrt(LANES * b_cyc[ci] * b_pr * (1.0 - b_pr)) + 2) begin
            failures++;
            $display("FAIL mode %0d v=%f count %0d: ones=%0d of %0d, expected p=%f", mode, vals[vi], ci,
                     b_ones[ci], LANES * b_cyc[ci], b_pr);
          end
        end
        checks++;
        if (ones < expect_ones - 5.0 * $sqrt(var_ones) - 2 || ones > expect_ones + 5.0 * $sqrt(var_ones) + 2) begin
          failures++;
          $display("FAIL mode %0d v=%f ones=%0d expected %f", mode, vals[vi], ones, expect_ones);
        end
        got = 2.0 * ones / (N * LANES) - 1.0;
        if (mode == 0 && vals[vi] > -0.2 && vals[vi] < 0.2) begin
          ideal = D * vals[vi] / 4.0 + 0.5;
          checks++;
          if (got < ideal - 0.06 || got > ideal + 0.06) begin
            failures++;
            $display("FAIL sigmoid value %f ideal %f", got, ideal);
          end
        end
        $display("mode %0d input %f -> output %f", mode, vals[vi], got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

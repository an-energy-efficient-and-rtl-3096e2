// tb_btanh: Btanh with 6 inputs and 2 lanes. Drives independent random
// streams of chosen bipolar values. Every cycle, each output bit is checked
// against a model (count each lane's '1's, walk a saturating
// counter, 4 states). Over long runs the output value is checked against tanh(x/2)
// of the bipolar input sum x, within 0.1, and for monotonic growth.
module tb_btanh;
  localparam int D = 6, LANES = 2, STATES = 4;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [D*LANES-1:0] k;
  logic [LANES-1:0]   y;
  int checks = 0, failures = 0;

  btanh #(.D(D), .LANES(LANES), .STATES(STATES)) dut (.clk, .rst_n, .en, .clr, .k, .y);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static real sums [6] = '{-3.0, -1.5, -0.5, 0.5, 1.5, 3.0};
    real v, got, prev;
    int st, ones, c;
    k = 0;
    prev = -2.0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (sums[s]) begin
      v = sums[s] / D;     // each input carries the same value
      @(negedge clk); clr = 1; en = 0;
      @(negedge clk); clr = 0;
      st = STATES / 2; ones = 0;
      for (int n = 0; n < 8000; n++) begin
        en = 1;
        for (int i = 0; i < D * LANES; i++) k[i] = ($urandom % 10000) < (v + 1.0) / 2.0 * 10000;
        #1;
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (y[l] !== (st >= STATES / 2)) begin failures++; $display("FAIL model mismatch"); end
          ones += y[l];
          c = 0;
          for (int i = 0; i < D; i++) c += k[l*D + i];
          st = st + 2 * c - D;
          if (st < 0) st = 0;
          if (st > STATES - 1) st = STATES - 1;
        end
        @(negedge clk);
      end
      got = 2.0 * ones / (8000.0 * LANES) - 1.0;
      $display("sum %f -> %f (tanh(x/2) = %f)", sums[s], got, $tanh(sums[s] / 2));
      checks += 2;
      if (got < $tanh(sums[s] / 2) - 0.1 || got > $tanh(sums[s] / 2) + 0.1) begin
        failures++; $display("FAIL value");
      end
      if (got < prev) begin failures++; $display("FAIL not monotonic"); end
      prev = got;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sc_mult: checks the bipolar XNOR multiplier bit by bit on random words
// and checks that two independent streams multiply in the bipolar domain.
module tb_sc_mult;
  localparam int LANES = 4;
  logic [LANES-1:0] a, b, y;
  int checks = 0, failures = 0;

  sc_mult #(.LANES(LANES)) dut (.a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    real pa, pb, va, vb, vy;
    for (int n = 0; n < 256; n++) begin
      a = LANES'($urandom); b = LANES'($urandom);
      #1;
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (y[i] !== (a[i] == b[i])) begin
          failures++;
          $display("FAIL a=%b b=%b y=%b", a, b, y);
        end
      end
    end
    // statistical: bipolar 0.6 * -0.6 = -0.36
    pa = 0.8; pb = 0.2; ones = 0;
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < LANES; i++) begin
        a[i] = ($urandom % 10000) < pa * 10000;
        b[i] = ($urandom % 10000) < pb * 10000;
      end
      #1;
      for (int i = 0; i < LANES; i++) ones += y[i];
    end
    va = 2 * pa - 1; vb = 2 * pb - 1;
    vy = 2.0 * ones / (20000.0 * LANES) - 1;
    checks++;
    if (vy < va * vb - 0.03 || vy > va * vb + 0.03) begin
      failures++;
      $display("FAIL product %f expected %f", vy, va * vb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

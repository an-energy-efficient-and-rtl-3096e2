// tb_pe: probability estimator with 2 lanes over 64 cycles (128 bits) and
// 8-bit codes; the code must be min(255, ones * 256 / 128) after each window.
module tb_pe;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [1:0] bits;
  logic [7:0] code;
  int checks = 0, failures = 0;

  pe #(.LANES(2), .LEN(64), .M(8)) dut (.clk, .rst_n, .en, .clr, .bits, .code);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, p, exp_c;
    bits = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 40; w++) begin
      p = (w == 0) ? 0 : (w == 1) ? 100 : $urandom % 101;
      ones = 0;
      for (int n = 0; n < 64; n++) begin
        @(negedge clk);
        en = 1;
        bits[0] = ($urandom % 100) < p;
        bits[1] = ($urandom % 100) < p;
        ones += bits[0] + bits[1];
      end
      @(negedge clk);
      en = 0;
      exp_c = ones * 2;
      if (exp_c > 255) exp_c = 255;
      checks++;
      if (code != exp_c) begin failures++; $display("FAIL ones=%0d code=%0d exp=%0d", ones, code, exp_c); end
      clr = 1;
      @(negedge clk);
      clr = 0;
      checks++;
      if (code != 0) begin failures++; $display("FAIL clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sng: runs each of two lanes through one full LFSR period (65535 cycles)
// for several codes x. Over a full period every non-zero 16-bit state occurs
// once, so the number of '1's must be exactly 256*x - 1 (x >= 1) or 0.
module tb_sng;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] x;
  logic [1:0] bits;
  int checks = 0, failures = 0;

  sng #(.M(8), .LANES(2), .SEED_IDX(5)) dut (.clk, .rst_n, .en, .x, .bits);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones [2];
    int exp_c;
    static logic [7:0] xs [5] = '{8'd0, 8'd1, 8'd128, 8'd200, 8'd255};
    x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (xs[k]) begin
      x = xs[k];
      ones = '{0, 0};
      en = 1;
      for (int n = 0; n < 65535; n++) begin
        @(negedge clk);
        ones[0] += bits[0]; ones[1] += bits[1];
      end
      exp_c = (x == 0) ? 0 : 256 * x - 1;
      for (int l = 0; l < 2; l++) begin
        checks++;
        if (ones[l] != exp_c) begin
          failures++;
          $display("FAIL x=%0d lane %0d ones=%0d exp=%0d", x, l, ones[l], exp_c);
        end
      end
    end
    // lanes must differ (independent seeds)
    begin
      int diff;
      diff = 0;
      x = 128;
      for (int n = 0; n < 1000; n++) begin @(negedge clk); diff += (bits[0] != bits[1]); end
      checks++;
      if (diff < 300) begin failures++; $display("FAIL lanes look correlated: %0d", diff); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

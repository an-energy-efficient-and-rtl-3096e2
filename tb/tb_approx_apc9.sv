// tb_approx_apc9: exhaustive check of the approximate 9-input counter
// against 2*(AND + OR + AND + OR of the four input pairs) + in[8], and a
// check that its mean tracks the exact count for independent streams.
module tb_approx_apc9;
  logic [8:0] in;
  logic [3:0] count;
  int checks = 0, failures = 0;

  approx_apc9 dut (.in, .count);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_c;
    longint se, sa;
    for (int v = 0; v < 512; v++) begin
      in = 9'(v);
      #1;
      exp_c = 2 * ((in[0] & in[1]) + (in[2] | in[3]) + (in[4] & in[5]) + (in[6] | in[7])) + in[8];
      checks++;
      if (count != exp_c) begin failures++; $display("FAIL in=%b count=%0d exp=%0d", in, count, exp_c); end
    end
    for (int p = 10; p <= 90; p += 40) begin
      se = 0; sa = 0;
      for (int n = 0; n < 20000; n++) begin
        for (int i = 0; i < 9; i++) in[i] = ($urandom % 100) < p;
        #1;
        sa += count;
        for (int i = 0; i < 9; i++) se += in[i];
      end
      checks++;
      if ((sa - se) > se / 12 + 200 || (se - sa) > se / 12 + 200) begin
        failures++;
        $display("FAIL p=%0d mean approx %0d exact %0d", p, sa, se);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_apc: checks the exact parallel counter (12 inputs) against a bit count,
// and the approximate variant (APPROX=1, 12 inputs = one 9-input group plus
// 3 exact inputs) against its gate-level definition and against the exact
// count on average for independent random streams.
module tb_apc;
  logic [11:0] in;
  logic [3:0]  cnt_exact, cnt_apx;
  int checks = 0, failures = 0;

  apc #(.N_IN(12))               dut_e (.in, .count(cnt_exact));
  apc #(.N_IN(12), .APPROX(1'b1)) dut_a (.in, .count(cnt_apx));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_e, ref_a;
    longint sum_e, sum_a;
    for (int v = 0; v < 4096; v++) begin
      in = 12'(v);
      #1;
      ref_e = 0;
      for (int i = 0; i < 12; i++) ref_e += in[i];
      ref_a = 2 * ((in[0] & in[1]) + (in[2] | in[3]) + (in[4] & in[5]) + (in[6] | in[7]))
              + in[8] + in[9] + in[10] + in[11];
      if (ref_a > 12) ref_a = 12;
      checks += 2;
      if (cnt_exact != ref_e) begin failures++; $display("FAIL exact %h -> %0d", v, cnt_exact); end
      if (cnt_apx   != ref_a) begin failures++; $display("FAIL approx %h -> %0d exp %0d", v, cnt_apx, ref_a); end
    end
    sum_e = 0; sum_a = 0;
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < 12; i++) in[i] = ($urandom % 100) < 30;
      #1;
      sum_e += cnt_exact; sum_a += cnt_apx;
    end
    checks++;
    if ((sum_a - sum_e) > sum_e / 20 || (sum_e - sum_a) > sum_e / 20) begin
      failures++;
      $display("FAIL approximate mean %0d vs exact %0d", sum_a, sum_e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spu: drives random per-cycle counts (0..3) for one window and checks
// the state code against the clamp-and-scale definition computed with
// integer division: S = (2*sum - NA*D) / NA clamped to [-1, 1] and
// floor(2^(M-1) * T' / NA). Three configurations: default size (NA = 128,
// M = 8), a short window with a left shift (NA = 16, M = 8) and one with a
// right shift (NA = 128, M = 4). Counts all three output cases.
module tb_spu;
  logic clk = 0, rst_n = 0, acc_en = 0, clr = 0;
  logic [1:0] count;
  logic [7:0] sb0, sb1;
  logic [3:0] sb2;
  logic lo0, hi0, lo1, hi1, lo2, hi2;
  int checks = 0, failures = 0;
  int n_lo = 0, n_hi = 0, n_lin = 0;

  spu #(.SEQ_LEN(128), .D(3), .CW(2), .M(8)) dut0 (.clk, .rst_n, .acc_en, .clr, .count, .s_b(sb0), .lo(lo0), .hi(hi0));
  spu #(.SEQ_LEN(16),  .D(3), .CW(2), .M(8)) dut1 (.clk, .rst_n, .acc_en, .clr, .count, .s_b(sb1), .lo(lo1), .hi(hi1));
  spu #(.SEQ_LEN(128), .D(3), .CW(2), .M(4)) dut2 (.clk, .rst_n, .acc_en, .clr, .count, .s_b(sb2), .lo(lo2), .hi(hi2));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sb(int sum, int na, int m);
    int tp;
    tp = 2 * sum + na - na * 3;
    if (tp <= 0) return 0;
    if (tp >= 2 * na) return (1 << m) - 1;
    return ((1 << (m - 1)) * tp) / na;
  endfunction

  task automatic check(string nm, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s got %0d want %0d", nm, got, want); end
  endtask

  initial begin
    int sum128, sum16, p;
    count = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 60; w++) begin
      p = $urandom % 101;    // probability of each of the 3 bits
      sum128 = 0; sum16 = 0;
      for (int n = 0; n < 128; n++) begin
        @(negedge clk);
        acc_en = 1;
        count = 2'((($urandom % 100) < p) + (($urandom % 100) < p) + (($urandom % 100) < p));
        sum128 += count;
        if (n < 16) sum16 += count;
        if (n == 15) begin
          @(negedge clk);   // dut1 window ends here: hold its accumulator
          acc_en = 0;
          #1 check("na16", int'(sb1), ref_sb(sum16, 16, 8));
        end
      end
      @(negedge clk);
      acc_en = 0;
      #1;
      check("na128", int'(sb0), ref_sb(sum128, 128, 8));
      check("m4", int'(sb2), ref_sb(sum128, 128, 4));
      if (lo0) n_lo++; else if (hi0) n_hi++; else n_lin++;
      clr = 1;
      @(negedge clk);
      clr = 0;
      #1 check("cleared", int'(sb0), ref_sb(0, 128, 8));
    end
    $display("cases: lo=%0d hi=%0d linear=%0d", n_lo, n_hi, n_lin);
    checks += 3;
    if (n_lo == 0) failures++;
    if (n_hi == 0) failures++;
    if (n_lin == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

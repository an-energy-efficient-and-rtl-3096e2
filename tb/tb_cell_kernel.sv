// tb_cell_kernel: two cell kernels, (a) no parallelization, 256-bit streams,
// exact counter; (b) 4 lanes, 256 bits (64 cycles), approximate counter.
// Each window drives the forget gate stream y and the two input-term
// streams z, z2 with chosen bipolar values. Checks per window:
//  - exact: for (a) the new state code equals the clamp-and-scale of the
//    number of '1's the testbench counts on the counter inputs;
//  - value: the new state is within 0.25 of
//    clamp(y * S(t-1) + z + z2, -1, 1) for both kernels;
//  - output: the C_out stream value is within 0.45 of tanh(sum/2) (the
//    2-state Btanh is a 3-input majority, whose error against tanh grows
//    when the forget term and the input terms have opposite signs);
//  - st_clr returns the state to the code of 0; both clamp cases occur.
module tb_cell_kernel;
  logic clk = 0, rst_n = 0;
  logic en1 = 0, done1 = 0, en2 = 0, done2 = 0, st_clr = 0;
  logic [0:0] y1, z1, zz1, c1;
  logic [3:0] y2, z2, zz2, c2;
  logic [7:0] s1, s2;
  logic lo1, hi1, lo2, hi2;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;

  cell_kernel #(.ALPHA(1), .SEQ_LEN(256), .M(8), .SEED_IDX(11)) dut1 (
    .clk, .rst_n, .en(en1), .done(done1), .st_clr, .y(y1), .z(z1), .z2(zz1),
    .c_out(c1), .s_code(s1), .clamp_lo(lo1), .clamp_hi(hi1));
  cell_kernel #(.ALPHA(4), .SEQ_LEN(256), .M(8), .APPROX(1'b1), .SEED_IDX(12)) dut2 (
    .clk, .rst_n, .en(en2), .done(done2), .st_clr, .y(y2), .z(z2), .z2(zz2),
    .c_out(c2), .s_code(s2), .clamp_lo(lo2), .clamp_hi(hi2));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic bit_of(real v);
    return ($urandom % 10000) < (v + 1.0) / 2.0 * 10000;
  endfunction

  function automatic real clamp1(real v);
    return v > 1.0 ? 1.0 : v < -1.0 ? -1.0 : v;
  endfunction

  function automatic int ref_sb(int sum, int na);
    int tp;
    tp = 2 * sum + na - 3 * na;
    if (tp <= 0) return 0;
    if (tp >= 2 * na) return 255;
    return (128 * tp) / na;
  endfunction

  task automatic check_val(string nm, real got, real want, real tol);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("FAIL %s got %f want %f", nm, got, want);
    end
  endtask

  initial begin
    real vy, vz, sprev1, sprev2, want1, want2, sum1, sum2;
    int q1, ones1, ones2;
    y1 = 0; z1 = 0; zz1 = 0; y2 = 0; z2 = 0; zz2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); st_clr = 1;
    @(negedge clk); st_clr = 0;
    checks += 2;
    if (s1 != 8'd128) failures++;
    if (s2 != 8'd128) failures++;
    for (int w = 0; w < 16; w++) begin
      vy = (w % 4 == 3) ? 0.9 : real'($urandom % 200) / 100.0 - 1.0;
      vz = (w % 8 == 3) ? 0.9 : (w % 8 == 7) ? -0.9 : real'($urandom % 100) / 100.0 - 0.5;
      sprev1 = real'(s1) / 128.0 - 1.0;
      sprev2 = real'(s2) / 128.0 - 1.0;
      q1 = 0; ones1 = 0; ones2 = 0;
      // kernel (a): 256 cycles
      for (int n = 0; n < 256; n++) begin
        @(negedge clk);
        en1 = 1;
        y1 = bit_of(vy); z1 = bit_of(vz); zz1 = bit_of(vz);
        #1;
        q1 += dut1.apc_in[0] + dut1.apc_in[1] + dut1.apc_in[2];
        ones1 += c1;
      end
      // kernel (b): 64 cycles of 4 lanes
      for (int n = 0; n < 64; n++) begin
        @(negedge clk);
        en1 = 0; en2 = 1;
        for (int l = 0; l < 4; l++) begin
          y2[l] = bit_of(vy); z2[l] = bit_of(vz); zz2[l] = bit_of(vz);
        end
        #1;
        for (int l = 0; l < 4; l++) ones2 += c2[l];
      end
      @(negedge clk);
      en1 = 0; en2 = 0; done1 = 1; done2 = 1;
      #1;
      if (lo1) n_lo++;
      if (hi1) n_hi++;
      @(negedge clk);
      done1 = 0; done2 = 0;
      checks++;
      if (int'(s1) != ref_sb(q1, 256)) begin
        failures++;
        $display("FAIL exact state: code %0d, from %0d ones expected %0d", s1, q1, ref_sb(q1, 256));
      end
      sum1 = vy * sprev1 + 2.0 * vz;
      sum2 = vy * sprev2 + 2.0 * vz;
      want1 = clamp1(sum1);
      want2 = clamp1(sum2);
      check_val("state a", real'(s1) / 128.0 - 1.0, want1, 0.25);
      check_val("state b", real'(s2) / 128.0 - 1.0, want2, 0.3);
      check_val("h a", 2.0 * ones1 / 256.0 - 1.0, $tanh(sum1 / 2.0), 0.45);
      check_val("h b", 2.0 * ones2 / 256.0 - 1.0, $tanh(sum2 / 2.0), 0.45);
      $display("w%0d y=%f z=%f S_a=%f S_b=%f want %f / %f", w, vy, vz,
               real'(s1) / 128.0 - 1.0, real'(s2) / 128.0 - 1.0, want1, want2);
    end
    checks += 2;
    if (n_lo == 0) begin failures++; $display("FAIL no low clamp"); end
    if (n_hi == 0) begin failures++; $display("FAIL no high clamp"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_memory_block: one memory block with 2 cells, 4 inputs per gate/cell
// (3 data inputs and a bias), 256-bit streams, no parallelization. Runs
// eight time steps of random inputs with random weights, sequencing the two
// windows itself. Checks per step:
//  - q equals the clamped sum of the cells' h codes (exact, binary adder);
//  - the cell states are within 0.3 of the LSTM state equation evaluated
//    in real arithmetic (gates by the sigmoid approximation x/4 + 1/2,
//    g = 2*tanh(x/2)), starting each step from the block's own state;
//  - the block output is within 0.3 of y_out * clamp(sum_v tanh(S_v/2));
//  - st_clr zeroes the states and the output.
module tb_memory_block;
  import scrnn_pkg::*;
  localparam int N_U = 4, NC = 2, L = 256;
  logic clk = 0, rst_n = 0;
  logic en_a = 0, done_a = 0, en_b = 0, done_b = 0, st_clr = 0;
  logic [7:0] u [N_U], w_in [N_U], w_fg [N_U], w_out [N_U], w_cell [NC][N_U];
  logic [7:0] o_code, q_code, s_code [NC], h_code [NC];
  logic [NC-1:0] clamp_lo, clamp_hi;
  int checks = 0, failures = 0;

  memory_block #(.N_U(N_U), .N_CELLS(NC), .ALPHA(1), .SEQ_LEN(L), .M(8), .SEED_IDX(100)) dut (
    .clk, .rst_n, .gate_cfg(LAU_SIGMOID), .en_a, .done_a, .en_b, .done_b, .st_clr,
    .u, .w_in, .w_fg, .w_out, .w_cell, .o_code, .q_code, .s_code, .h_code,
    .clamp_lo, .clamp_hi);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real val(logic [7:0] c);
    return real'(c) / 128.0 - 1.0;
  endfunction
  function automatic logic [7:0] code_of(real v);
    int c;
    c = int'($floor((v + 1.0) * 128.0));
    return 8'(c > 255 ? 255 : c < 0 ? 0 : c);
  endfunction
  function automatic real clamp(real v, real lo, real hi);
    return v > hi ? hi : v < lo ? lo : v;
  endfunction
  function automatic real rnd(real a);
    return (real'($urandom % 2001) / 1000.0 - 1.0) * a;
  endfunction
  task automatic check_val(string nm, real got, real want, real tol);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("FAIL %s got %f want %f", nm, got, want);
    end
  endtask

  function automatic real dot(logic [7:0] w [N_U]);
    real s = 0;
    for (int i = 0; i < N_U; i++) s += val(w[i]) * val(u[i]);
    return s;
  endfunction

  initial begin
    real y_in, y_fg, y_out, s_new [NC], qv, ov;
    int qsum;
    for (int i = 0; i < N_U; i++) begin
      w_in[i] = code_of(rnd(0.6)); w_fg[i] = code_of(rnd(0.6) + 0.3); w_out[i] = code_of(rnd(0.6) + 0.3);
      for (int c = 0; c < NC; c++) w_cell[c][i] = code_of(rnd(0.7));
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); st_clr = 1;
    @(negedge clk); st_clr = 0;
    checks += 2;
    if (s_code[0] != 128 || o_code != 128) failures++;
    if (s_code[1] != 128) failures++;
    for (int t = 0; t < 8; t++) begin
      for (int i = 0; i < N_U - 1; i++) u[i] = code_of(rnd(1.0));
      u[N_U - 1] = 8'hFF;
      // reference for this step
      y_in  = clamp(dot(w_in) / 4.0 + 0.5, 0.0, 1.0);
      y_fg  = clamp(dot(w_fg) / 4.0 + 0.5, 0.0, 1.0);
      y_out = clamp(dot(w_out) / 4.0 + 0.5, 0.0, 1.0);
      qv = 0;
      for (int c = 0; c < NC; c++) begin
        s_new[c] = clamp(y_fg * val(s_code[c]) + 2.0 * y_in * $tanh(dot(w_cell[c]) / 2.0), -1.0, 1.0);
        qv += $tanh(s_new[c] / 2.0);
      end
      ov = y_out * clamp(qv, -1.0, 1.0);
      // window A
      for (int n = 0; n < L; n++) begin @(negedge clk); en_a = 1; end
      @(negedge clk); en_a = 0; done_a = 1;
      #1 qsum = int'(h_code[0]) + int'(h_code[1]) - 128;
      qsum = qsum < 0 ? 0 : qsum > 255 ? 255 : qsum;
      @(negedge clk); done_a = 0;
      checks++;
      if (int'(q_code) != qsum) begin failures++; $display("FAIL q %0d exp %0d", q_code, qsum); end
      // window B
      for (int n = 0; n < L; n++) begin @(negedge clk); en_b = 1; end
      @(negedge clk); en_b = 0; done_b = 1;
      @(negedge clk); done_b = 0;
      for (int c = 0; c < NC; c++) check_val($sformatf("S%0d", c), val(s_code[c]), s_new[c], 0.3);
      check_val("O", val(o_code), ov, 0.3);
      $display("t%0d y_in %f y_fg %f y_out %f | S %f %f (ref %f %f) | O %f (ref %f)", t, y_in, y_fg, y_out,
               val(s_code[0]), val(s_code[1]), s_new[0], s_new[1], val(o_code), ov);
    end
    @(negedge clk); st_clr = 1;
    @(negedge clk); st_clr = 0;
    checks++;
    if (s_code[0] != 128 || s_code[1] != 128 || o_code != 128 || q_code != 128) begin
      failures++; $display("FAIL st_clr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

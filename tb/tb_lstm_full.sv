// tb_lstm_full: the layer at its default size (7 inputs, 4 memory blocks of
// 1 cell, 128-bit streams, no parallelization), running the symbol
// prediction workload: strings of the Reber grammar (B, then a walk through
// the grammar's graph choosing each branch with probability 1/2, ending in
// E) fed one symbol per time step as a one-hot input (active symbol +1,
// others 0). Trained weights are not available, so the weights are random;
// each step is checked against the LSTM equations in real arithmetic (state
// within 0.6, output within 0.4: with 128-bit streams the state, a sum of
// three stream estimates, has a standard deviation near 0.15), the step
// latency must be 258 cycles, and each string starts with seq_start.
module tb_lstm_full;
  import scrnn_pkg::*;
  localparam int NI = 7, NB = 4, NC = 1, NU = NI + NB + 1;
  localparam int B = 0, T = 1, P = 2, S = 3, X = 4, V = 5, E = 6;
  logic clk = 0, rst_n = 0;
  logic seq_start = 0, start = 0;
  logic [7:0] x [NI];
  logic [7:0] w_in [NB][NU], w_fg [NB][NU], w_out [NB][NU], w_cell [NB][NC][NU];
  logic busy, step_done, phase_a, latch_a;
  logic [7:0] o_code [NB], q_code [NB], s_code [NB][NC];
  logic [NC-1:0] clamp_lo [NB], clamp_hi [NB];
  int checks = 0, failures = 0, n_steps = 0, n_lo = 0, n_hi = 0;

  lstm_layer dut (
    .clk, .rst_n, .gate_cfg(LAU_SIGMOID), .seq_start, .start, .x, .w_in, .w_fg, .w_out, .w_cell,
    .busy, .step_done, .phase_a, .latch_a, .o_code, .q_code, .s_code, .clamp_lo, .clamp_hi);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && latch_a)
    for (int b = 0; b < NB; b++) begin
      if (clamp_lo[b][0]) n_lo++;
      if (clamp_hi[b][0]) n_hi++;
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

  // Reber grammar: next symbol from the current graph node, both branches 1/2
  task automatic next_symbol(inout int node, output int sym);
    logic coin = 1'($urandom);
    case (node)
      0: begin sym = B; node = 1; end
      1: if (coin) begin sym = T; node = 2; end else begin sym = P; node = 3; end
      2: if (coin) begin sym = S; node = 2; end else begin sym = X; node = 4; end
      3: if (coin) begin sym = T; node = 3; end else begin sym = V; node = 5; end
      4: if (coin) begin sym = X; node = 3; end else begin sym = S; node = 6; end
      5: if (coin) begin sym = P; node = 4; end else begin sym = V; node = 6; end
      default: begin sym = E; node = 7; end
    endcase
  endtask

  initial begin
    real uv [NU];
    real ni, nf, no, nc, yi, yf, yo, s_ref [NB], o_ref [NB];
    logic [7:0] op [NB], sp [NB][NC];
    int node, sym, cyc, len;
    string str;
    string names;
    names = "BTPSXVE";
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < NU; i++) begin
        w_in[b][i] = code_of(rnd(0.7)); w_fg[b][i] = code_of(rnd(0.6) + 0.3); w_out[b][i] = code_of(rnd(0.6) + 0.3);
        w_cell[b][0][i] = code_of(rnd(0.9));
      end
    foreach (x[i]) x[i] = 8'd128;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int sq = 0; sq < 3; sq++) begin
      @(negedge clk); seq_start = 1;
      @(negedge clk); seq_start = 0;
      node = 0; str = ""; len = 0;
      while (node != 7 && len < 40) begin
        next_symbol(node, sym);
        str = {str, names.substr(sym, sym)};
        len++;
        foreach (x[i]) x[i] = (i == sym) ? 8'd255 : 8'd128;
        op = o_code; sp = s_code;
        for (int i = 0; i < NI; i++) uv[i] = val(x[i]);
        for (int b = 0; b < NB; b++) uv[NI + b] = val(op[b]);
        uv[NU - 1] = val(8'hFF);
        for (int b = 0; b < NB; b++) begin
          ni = 0; nf = 0; no = 0; nc = 0;
          for (int i = 0; i < NU; i++) begin
            ni += val(w_in[b][i]) * uv[i]; nf += val(w_fg[b][i]) * uv[i];
            no += val(w_out[b][i]) * uv[i]; nc += val(w_cell[b][0][i]) * uv[i];
          end
          yi = clamp(ni / 4.0 + 0.5, 0, 1); yf = clamp(nf / 4.0 + 0.5, 0, 1); yo = clamp(no / 4.0 + 0.5, 0, 1);
          s_ref[b] = clamp(yf * val(sp[b][0]) + 2.0 * yi * $tanh(nc / 2.0), -1, 1);
          o_ref[b] = yo * $tanh(s_ref[b] / 2.0);
        end
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        cyc = 1;
        while (busy) begin @(negedge clk); if (busy) cyc++; end
        n_steps++;
        checks++;
        if (cyc != 258) begin failures++; $display("FAIL step latency %0d", cyc); end
        for (int b = 0; b < NB; b++) begin
          check_val($sformatf("S[%0d]", b), val(s_code[b][0]), s_ref[b], 0.6);
          check_val($sformatf("O[%0d]", b), val(o_code[b]), o_ref[b], 0.4);
        end
      end
      $display("string %0d: %s (%0d steps)", sq, str, len);
    end
    $display("steps=%0d clamp_lo=%0d clamp_hi=%0d", n_steps, n_lo, n_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lstm_layer: end-to-end test of the stochastic LSTM layer at reduced
// size (3 inputs, 2 blocks of 2 cells, 256-bit streams), built twice:
// (1) no parallelization, exact counters; (2) 4-fold parallelization with
// approximate parallel counters. Two input sequences of 6 steps are run,
// each started with seq_start. For every step it checks
//  - the step takes 2*L + 2 busy cycles (L = 256 / lanes) and ends with
//    exactly one step_done;
//  - every cell state (block output) is within 0.45 (0.4) of the LSTM
//    equations evaluated in real arithmetic from the layer's own previous
//    outputs and states (gates: x/4 + 1/2 clamped; g = 2*tanh(x/2);
//    h = tanh(S/2); O = y_out * clamp(sum h));
//  - seq_start returns states and outputs to zero.
// Mechanisms counted (each must occur): window A, window B, sequence
// restart, state clamped low, state clamped high, state not clamped,
// parallel lanes with the approximate counter.
module tb_lstm_layer;
  import scrnn_pkg::*;
  localparam int NI = 3, NB = 2, NC = 2, NU = NI + NB + 1;
  logic clk = 0, rst_n = 0;
  logic seq_start = 0, start = 0;
  logic [7:0] x [NI];
  logic [7:0] w_in [NB][NU], w_fg [NB][NU], w_out [NB][NU], w_cell [NB][NC][NU];
  int checks = 0, failures = 0;
  int n_phase_a1 = 0, n_win_a = 0, n_win_b = 0, n_restart = 0, n_lo = 0, n_hi = 0, n_lin = 0, n_par = 0;

  logic         busy1, done1, pa1, la1, busy2, done2, pa2, la2;
  logic [7:0]   o1 [NB], q1 [NB], s1 [NB][NC], o2 [NB], q2 [NB], s2 [NB][NC];
  logic [NC-1:0] lo1 [NB], hi1 [NB], lo2 [NB], hi2 [NB];

  lstm_layer #(.N_IN(NI), .N_BLOCKS(NB), .N_CELLS(NC), .ALPHA(1), .SEQ_LEN(256)) dut1 (
    .clk, .rst_n, .gate_cfg(LAU_SIGMOID), .seq_start, .start, .x, .w_in, .w_fg, .w_out, .w_cell,
    .busy(busy1), .step_done(done1), .phase_a(pa1), .latch_a(la1),
    .o_code(o1), .q_code(q1), .s_code(s1), .clamp_lo(lo1), .clamp_hi(hi1));
  lstm_layer #(.N_IN(NI), .N_BLOCKS(NB), .N_CELLS(NC), .ALPHA(4), .SEQ_LEN(256), .APPROX(1'b1)) dut2 (
    .clk, .rst_n, .gate_cfg(LAU_SIGMOID), .seq_start, .start, .x, .w_in, .w_fg, .w_out, .w_cell,
    .busy(busy2), .step_done(done2), .phase_a(pa2), .latch_a(la2),
    .o_code(o2), .q_code(q2), .s_code(s2), .clamp_lo(lo2), .clamp_hi(hi2));

  always #5 clk = ~clk;

  initial begin
    #20000000;
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

  // reference step for one layer, from its previous outputs and states
  task automatic ref_step(input logic [7:0] o_prev [NB], input logic [7:0] s_prev [NB][NC],
                          output real s_ref [NB][NC], output real o_ref [NB]);
    real uv [NU];
    real ni, nf, no, nc, yi, yf, yo, qv;
    for (int i = 0; i < NI; i++) uv[i] = val(x[i]);
    for (int b = 0; b < NB; b++) uv[NI + b] = val(o_prev[b]);
    uv[NU - 1] = val(8'hFF);
    for (int b = 0; b < NB; b++) begin
      ni = 0; nf = 0; no = 0;
      for (int i = 0; i < NU; i++) begin
        ni += val(w_in[b][i]) * uv[i]; nf += val(w_fg[b][i]) * uv[i]; no += val(w_out[b][i]) * uv[i];
      end
      yi = clamp(ni / 4.0 + 0.5, 0, 1); yf = clamp(nf / 4.0 + 0.5, 0, 1); yo = clamp(no / 4.0 + 0.5, 0, 1);
      qv = 0;
      for (int c = 0; c < NC; c++) begin
        nc = 0;
        for (int i = 0; i < NU; i++) nc += val(w_cell[b][c][i]) * uv[i];
        s_ref[b][c] = clamp(yf * val(s_prev[b][c]) + 2.0 * yi * $tanh(nc / 2.0), -1, 1);
        qv += $tanh(s_ref[b][c] / 2.0);
      end
      o_ref[b] = yo * clamp(qv, -1, 1);
    end
  endtask

  // count windows and clamp events of layer 1 and parallel windows of layer 2
  always @(posedge clk) if (rst_n) begin
    if (la1) begin
      n_win_a++;
      for (int b = 0; b < NB; b++)
        for (int c = 0; c < NC; c++)
          if (lo1[b][c]) n_lo++; else if (hi1[b][c]) n_hi++; else n_lin++;
    end
    if (done1) n_win_b++;
    if (la2) n_par++;
    if (pa1) n_phase_a1++;
  end

  initial begin
    real s_ref1 [NB][NC], o_ref1 [NB], s_ref2 [NB][NC], o_ref2 [NB];
    logic [7:0] op1 [NB], sp1 [NB][NC], op2 [NB], sp2 [NB][NC];
    int cyc1, cyc2, dn1, dn2;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < NU; i++) begin
        w_in[b][i] = code_of(rnd(0.7)); w_fg[b][i] = code_of(rnd(0.6) + 0.3); w_out[b][i] = code_of(rnd(0.6) + 0.3);
        for (int c = 0; c < NC; c++) w_cell[b][c][i] = code_of(rnd(0.5) + (b == 0 ? 0.45 : -0.45));
      end
    // strong bias weights drive block 0 towards +1 and block 1 towards -1
    for (int b = 0; b < NB; b++) begin
      w_in[b][NU - 1] = code_of(0.9);
      w_fg[b][NU - 1] = code_of(0.9);
      for (int c = 0; c < NC; c++) w_cell[b][c][NU - 1] = code_of(b == 0 ? 0.95 : -0.95);
    end
    foreach (x[i]) x[i] = 8'd128;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int sq = 0; sq < 2; sq++) begin
      @(negedge clk); seq_start = 1;
      @(negedge clk); seq_start = 0;
      n_restart++;
      checks++;
      if (o1[0] != 128 || s1[1][1] != 128 || o2[1] != 128 || s2[0][0] != 128) begin
        failures++; $display("FAIL seq_start did not clear");
      end
      for (int t = 0; t < 6; t++) begin
        for (int i = 0; i < NI; i++) x[i] = code_of(rnd(1.0));
        op1 = o1; sp1 = s1; op2 = o2; sp2 = s2;
        ref_step(op1, sp1, s_ref1, o_ref1);
        ref_step(op2, sp2, s_ref2, o_ref2);
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        cyc1 = 1; cyc2 = 1; dn1 = 0; dn2 = 0;   // busy since the last edge
        while (busy1 || busy2) begin
          if (done1) dn1++;
          if (done2) dn2++;
          @(negedge clk);
          if (busy1) cyc1++;
          if (busy2) cyc2++;
        end
        checks += 4;
        if (cyc1 != 2 * 256 + 2) begin failures++; $display("FAIL step cycles %0d", cyc1); end
        if (cyc2 != 2 * 64 + 2)  begin failures++; $display("FAIL step cycles (4 lanes) %0d", cyc2); end
        if (dn1 != 1 || dn2 != 1) begin failures++; $display("FAIL step_done count %0d %0d", dn1, dn2); end
        checks--;
        for (int b = 0; b < NB; b++) begin
          for (int c = 0; c < NC; c++) begin
            check_val($sformatf("L1 S[%0d][%0d]", b, c), val(s1[b][c]), s_ref1[b][c], 0.45);
            check_val($sformatf("L2 S[%0d][%0d]", b, c), val(s2[b][c]), s_ref2[b][c], 0.45);
          end
          check_val($sformatf("L1 O[%0d]", b), val(o1[b]), o_ref1[b], 0.4);
          check_val($sformatf("L2 O[%0d]", b), val(o2[b]), o_ref2[b], 0.4);
        end
        $display("seq %0d t %0d: O1 %f %f (ref %f %f)  O2 %f %f (ref %f %f)", sq, t,
                 val(o1[0]), val(o1[1]), o_ref1[0], o_ref1[1], val(o2[0]), val(o2[1]), o_ref2[0], o_ref2[1]);
      end
    end
    $display("mechanisms: windowA=%0d windowB=%0d restart=%0d clamp_lo=%0d clamp_hi=%0d linear=%0d parallel_approx=%0d",
             n_win_a, n_win_b, n_restart, n_lo, n_hi, n_lin, n_par);
    checks += 8;
    if (n_phase_a1 != 12 * 256) begin failures++; $display("FAIL window A cycles %0d", n_phase_a1); end
    if (n_win_a == 0) failures++;
    if (n_win_b == 0) failures++;
    if (n_restart == 0) failures++;
    if (n_lo == 0) begin failures++; $display("FAIL no low clamp"); end
    if (n_hi == 0) begin failures++; $display("FAIL no high clamp"); end
    if (n_lin == 0) failures++;
    if (n_par == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

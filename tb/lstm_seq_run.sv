// lstm_seq_run: test harness that runs one lstm_layer configuration over
// input sequences and checks every time step against the LSTM equations in
// real arithmetic. Used by tb_workloads for the network sizes the layer is
// evaluated at; it is not a testbench on its own.
//
// GRAMMAR = 1 feeds strings of the Reber grammar (B, a walk through the
// grammar graph with each branch taken with probability 1/2, E), one symbol
// per step as a one-hot input (+1 active, 0 otherwise; NI must be 7).
// GRAMMAR = 0 feeds N_SEQ sequences of STEPS random feature vectors in
// [-1, 1], as a stand-in for speech feature frames. Weights are random
// (no trained weights are available). Per step it checks the latency
// (2*SEQ_LEN/ALPHA + 2 cycles), every cell state within S_TOL and every
// block output within O_TOL of the reference computed from the layer's own
// previous outputs and states, and the mean absolute errors against
// MEAN_TOL. The reference is the expected value of the stochastic datapath
// for independent streams: the input and forget gates are E[psi(x)] with
// psi = min(1, max(0, x/4 + 1/2)) applied to each cycle's count (computed
// from the exact count distribution), the cell input is the expected output
// of the Btanh counter walked through the window, and the block output is
// y_out * clamp(sum_v tanh(S_v/2), -1, 1). The largest state error against
// the ideal LSTM equations is printed for information.
//
// Interface: runs from time 0 on clk; raises fin when done, with the number
// of checks and failures in checks / failures.
module lstm_seq_run #(
  parameter int  NI      = 7,
  parameter int  NB      = 4,
  parameter int  NC      = 1,
  parameter int  ALPHA   = 1,
  parameter int  SEQ_LEN = 128,
  parameter bit  APPROX  = 1'b0,
  parameter bit  GRAMMAR = 1'b1,
  parameter int  N_SEQ   = 3,
  parameter int  STEPS   = 8,
  parameter real S_TOL   = 0.6,
  parameter real O_TOL   = 0.45,
  parameter real MEAN_TOL = 0.15
) (
  input  logic clk,
  output logic fin,
  output int   checks,
  output int   failures
);
  import scrnn_pkg::*;
  localparam int NU  = NI + NB + 1;
  localparam int LAT = 2 * (SEQ_LEN / ALPHA) + 2;
  localparam int B = 0, T = 1, P = 2, S = 3, X = 4, V = 5, E = 6;

  logic rst_n = 0, seq_start = 0, start = 0;
  logic [7:0] x [NI];
  logic [7:0] w_in [NB][NU], w_fg [NB][NU], w_out [NB][NU], w_cell [NB][NC][NU];
  logic busy, step_done, phase_a, latch_a;
  logic [7:0] o_code [NB], q_code [NB], s_code [NB][NC];
  logic [NC-1:0] clamp_lo [NB], clamp_hi [NB];
  int n_lo = 0, n_hi = 0;
  real max_se = 0.0, max_oe = 0.0, max_ie = 0.0, sum_se = 0.0, sum_oe = 0.0;
  int  n_se = 0, n_oe = 0;
  real scratch = 0.0;

  lstm_layer #(.N_IN(NI), .N_BLOCKS(NB), .N_CELLS(NC), .ALPHA(ALPHA), .SEQ_LEN(SEQ_LEN),
               .APPROX(APPROX)) dut (
    .clk, .rst_n, .gate_cfg(LAU_SIGMOID), .seq_start, .start, .x, .w_in, .w_fg, .w_out, .w_cell,
    .busy, .step_done, .phase_a, .latch_a, .o_code, .q_code, .s_code, .clamp_lo, .clamp_hi);

  always @(posedge clk) if (rst_n && latch_a)
    for (int b = 0; b < NB; b++) begin
      n_lo += $countones(clamp_lo[b]);
      n_hi += $countones(clamp_hi[b]);
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
  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction
  task automatic check_val(string nm, real got, real want, real tol, inout real mx);
    checks++;
    if (absr(got - want) > mx) mx = absr(got - want);
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("FAIL %m %s got %f want %f", nm, got, want);
    end
  endtask

  // Distribution of the number of '1's among n independent bits with
  // P('1') = pr[i]: ppdist[c] = P(count = c).
  function automatic void count_dist(input real pr [], output real pdist []);
    pdist = new [pr.size() + 1];
    foreach (pdist[c]) pdist[c] = 0.0;
    pdist[0] = 1.0;
    for (int i = 0; i < pr.size(); i++)
      for (int c = i + 1; c >= 0; c--)
        pdist[c] = pdist[c] * (1.0 - pr[i]) + (c > 0 ? pdist[c-1] * pr[i] : 0.0);
  endfunction

  // Expected gate value: the gate unit applies psi = clamp(x/4 + 1/2, 0, 1)
  // to each cycle's bipolar sum x = (2*count - NU*ALPHA) / ALPHA of the
  // NU*ALPHA product bits, so its output is E[psi(x)], not psi(E[x]).
  function automatic real gate_ref(input real wu [NU]);
    real pr [], pdist [];
    real e;
    pr = new [NU * ALPHA];
    foreach (pr[i]) pr[i] = (1.0 + wu[i % NU]) / 2.0;
    count_dist(pr, pdist);
    e = 0.0;
    foreach (pdist[c])
      e += pdist[c] * clamp((real'(2 * c - NU * ALPHA) / ALPHA) / 4.0 + 0.5, 0.0, 1.0);
    return e;
  endfunction

  // Expected bipolar value of the cell-input Btanh over one window: walks
  // the distribution of the saturating counter (STATES = 2*ceil(NU/4), start
  // at STATES/2, step 2*count - NU per lane) through SEQ_LEN lane steps and
  // averages P(state >= STATES/2) before each step.
  function automatic real btanh_ref(input real wu [NU]);
    localparam int NS = 2 * ((NU + 3) / 4);
    real pr [], pdist [];
    real st [NS], nx [NS];
    real ones;
    int  t;
    pr = new [NU];
    foreach (pr[i]) pr[i] = (1.0 + wu[i]) / 2.0;
    count_dist(pr, pdist);
    foreach (st[i]) st[i] = 0.0;
    st[NS / 2] = 1.0;
    ones = 0.0;
    for (int k = 0; k < SEQ_LEN; k++) begin
      for (int i = NS / 2; i < NS; i++) ones += st[i];
      foreach (nx[i]) nx[i] = 0.0;
      foreach (st[i])
        foreach (pdist[c]) begin
          t = i + 2 * c - NU;
          t = t < 0 ? 0 : t > NS - 1 ? NS - 1 : t;
          nx[t] += st[i] * pdist[c];
        end
      st = nx;
    end
    return 2.0 * ones / SEQ_LEN - 1.0;
  endfunction

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

  // one time step with the current x: reference, run, compare
  task automatic run_step();
    real uv [NU];
    real ni, nf, no, q, yi, yf, yo, s_ref [NB][NC], o_ref [NB];
    real nc [NC], wi [NU], wf [NU], wc [NU], s_id [NB][NC];
    logic [7:0] op [NB], sp [NB][NC];
    int cyc;
    op = o_code; sp = s_code;
    for (int i = 0; i < NI; i++) uv[i] = val(x[i]);
    for (int b = 0; b < NB; b++) uv[NI + b] = val(op[b]);
    uv[NU - 1] = val(8'hFF);
    for (int b = 0; b < NB; b++) begin
      ni = 0; nf = 0; no = 0;
      for (int v = 0; v < NC; v++) nc[v] = 0;
      for (int i = 0; i < NU; i++) begin
        ni += val(w_in[b][i]) * uv[i]; nf += val(w_fg[b][i]) * uv[i];
        no += val(w_out[b][i]) * uv[i];
        for (int v = 0; v < NC; v++) nc[v] += val(w_cell[b][v][i]) * uv[i];
      end
      for (int i = 0; i < NU; i++) begin
        wi[i] = val(w_in[b][i]) * uv[i]; wf[i] = val(w_fg[b][i]) * uv[i];
      end
      yi = gate_ref(wi); yf = gate_ref(wf);
      yo = clamp(no / 4.0 + 0.5, 0, 1);
      q = 0;
      for (int v = 0; v < NC; v++) begin
        for (int i = 0; i < NU; i++) wc[i] = val(w_cell[b][v][i]) * uv[i];
        s_ref[b][v] = clamp(yf * val(sp[b][v]) + 2.0 * yi * btanh_ref(wc), -1, 1);
        s_id[b][v]  = clamp(clamp(nf / 4.0 + 0.5, 0, 1) * val(sp[b][v])
                            + 2.0 * clamp(ni / 4.0 + 0.5, 0, 1) * $tanh(nc[v] / 2.0), -1, 1);
        q += $tanh(s_ref[b][v] / 2.0);
      end
      o_ref[b] = yo * clamp(q, -1, 1);
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); if (busy) cyc++; end
    checks++;
    if (cyc != LAT) begin failures++; $display("FAIL %m step latency %0d", cyc); end
    for (int b = 0; b < NB; b++) begin
      for (int v = 0; v < NC; v++)
      begin
        check_val($sformatf("S[%0d][%0d]", b, v), val(s_code[b][v]), s_ref[b][v], S_TOL, max_se);
        sum_se += absr(val(s_code[b][v]) - s_ref[b][v]); n_se++;
        if (absr(val(s_code[b][v]) - s_id[b][v]) > max_ie) max_ie = absr(val(s_code[b][v]) - s_id[b][v]);
      end
      check_val($sformatf("O[%0d]", b), val(o_code[b]), o_ref[b], O_TOL, max_oe);
      sum_oe += absr(val(o_code[b]) - o_ref[b]); n_oe++;
    end
  endtask

  initial begin
    int node, sym, len;
    string str;
    string names;
    names = "BTPSXVE";
    fin = 0; checks = 0; failures = 0;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < NU; i++) begin
        w_in[b][i]  = code_of(rnd(0.7));
        w_fg[b][i]  = code_of(rnd(0.6) + 0.3);
        w_out[b][i] = code_of(rnd(0.6) + 0.3);
        for (int v = 0; v < NC; v++) w_cell[b][v][i] = code_of(rnd(0.9));
      end
    foreach (x[i]) x[i] = 8'd128;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int sq = 0; sq < N_SEQ; sq++) begin
      @(negedge clk); seq_start = 1;
      @(negedge clk); seq_start = 0;
      if (GRAMMAR) begin
        node = 0; str = ""; len = 0;
        while (node != 7 && len < 40) begin
          next_symbol(node, sym);
          str = {str, names.substr(sym, sym)};
          len++;
          foreach (x[i]) x[i] = (i == sym) ? 8'd255 : 8'd128;
          run_step();
        end
        $display("%m string %0d: %s", sq, str);
      end else begin
        for (int st = 0; st < STEPS; st++) begin
          foreach (x[i]) x[i] = code_of(rnd(1.0));
          run_step();
        end
      end
    end
    // mean absolute errors: a bias in the datapath shows here long before
    // single values leave their noise band
    check_val("mean |S err|", sum_se / n_se, 0.0, MEAN_TOL, scratch);
    check_val("mean |O err|", sum_oe / n_oe, 0.0, MEAN_TOL, scratch);
    $display("%m: mean |S err|=%f mean |O err|=%f", sum_se / n_se, sum_oe / n_oe);
    $display("%m: checks=%0d failures=%0d max |S err|=%f (vs ideal LSTM %f) max |O err|=%f clamp_lo=%0d clamp_hi=%0d",
             checks, failures, max_se, max_ie, max_oe, n_lo, n_hi);
    fin = 1;
  end
endmodule

// tb_btanh_fsm: random lane counts against a behavioural model of the
// saturating up-down counter (3 inputs, 2 lanes walked in order, 6 states);
// checks every output bit every cycle, the clear, and that both saturation
// ends are reached.
module tb_btanh_fsm;
  localparam int K = 3, LANES = 2, STATES = 6;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [LANES*2-1:0] count;
  logic [LANES-1:0]   out;
  int checks = 0, failures = 0;

  btanh_fsm #(.K(K), .LANES(LANES), .STATES(STATES)) dut (.clk, .rst_n, .en, .clr, .count, .out);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st, hit_lo, hit_hi, bias;
    count = 0;
    st = STATES / 2; hit_lo = 0; hit_hi = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 500 == 499) begin
        clr = 1; en = 0;
        st = STATES / 2;
      end else begin
        clr = 0; en = 1;
        bias = (n / 250) % 3;       // drift down, up or random
        for (int l = 0; l < LANES; l++)
          count[l*2 +: 2] = 2'(bias == 0 ? $urandom % 2 : bias == 1 ? 2 + $urandom % 2 : $urandom % 4);
      end
      #1;
      if (en) begin
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (out[l] !== (st >= STATES / 2)) begin
            failures++;
            $display("FAIL n=%0d lane %0d out=%b model state %0d", n, l, out[l], st);
          end
          st = st + 2 * int'(count[l*2 +: 2]) - K;
          if (st < 0) begin st = 0; hit_lo++; end
          if (st > STATES - 1) begin st = STATES - 1; hit_hi++; end
        end
      end
    end
    checks += 2;
    if (hit_lo == 0) begin failures++; $display("FAIL lower end never reached"); end
    if (hit_hi == 0) begin failures++; $display("FAIL upper end never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_step_ctrl: one time step must be L cycles of en_a, one done_a cycle,
// L cycles of en_b, one done_b cycle (2L+2 busy cycles), in that order, with
// no overlap; start while idle only.
module tb_step_ctrl;
  localparam int L = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic en_a, done_a, en_b, done_b, busy;
  int checks = 0, failures = 0;

  step_ctrl #(.L(L)) dut (.clk, .rst_n, .start, .en_a, .done_a, .en_b, .done_b, .busy);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sig(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s = %b at %0t", what, got, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int step = 0; step < 3; step++) begin
      @(negedge clk);
      expect_sig("busy idle", busy, 0);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int c = 0; c < 2 * L + 2; c++) begin
        expect_sig("busy", busy, 1);
        expect_sig("en_a",   en_a,   c < L);
        expect_sig("done_a", done_a, c == L);
        expect_sig("en_b",   en_b,   c > L && c < 2 * L + 1);
        expect_sig("done_b", done_b, c == 2 * L + 1);
        @(negedge clk);
      end
      expect_sig("busy after", busy, 0);
      repeat (step) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

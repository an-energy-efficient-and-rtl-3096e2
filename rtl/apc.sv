// apc: parallel counter of the stochastic datapath.
//
// Counts the '1' bits among N_IN input bits of the current cycle. The count
// is the per-cycle increment consumed by the accumulator of the state
// processing unit, by the linear approximation unit of a gate and by the
// Btanh up-down counter (the source's accumulative parallel counter; its
// accumulating register sits in those consumers here).
//
// APPROX = 0: exact count (adder tree).
// APPROX = 1: the source's cheaper alternative. Every full group of nine
// inputs is counted by an approximate 9-input counter (approx_apc9); the
// remaining N_IN mod 9 inputs are counted exactly; the result saturates at
// N_IN. How groups are formed for widths other than nine is this design's
// choice. Combinational.
module apc #(
  parameter int N_IN   = 3,
  parameter bit APPROX = 1'b0,
  localparam int CW    = $clog2(N_IN + 1)
) (
  input  logic [N_IN-1:0] in,
  output logic [CW-1:0]   count
);

  localparam int NG   = APPROX ? N_IN / 9 : 0;   // approximate groups
  localparam int NREM = N_IN - 9 * NG;           // exactly counted inputs

  logic [3:0] gcount [NG+1];   // one spare entry keeps the array non-empty

  for (genvar g = 0; g < NG; g++) begin : g_approx
    approx_apc9 u_a9 (.in(in[9*g +: 9]), .count(gcount[g]));
  end
  assign gcount[NG] = '0;

  int sum;
  always_comb begin
    sum = 0;
    for (int g = 0; g < NG; g++)   sum += int'(gcount[g]);
    for (int i = 0; i < NREM; i++) sum += int'(in[9*NG + i]);
    if (sum > N_IN) sum = N_IN;
    count = CW'(sum);
  end

endmodule

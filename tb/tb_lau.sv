// tb_lau: exhaustive counts for two unit sizes (12 bits / 1 lane and
// 24 bits / 2 lanes) under the sigmoid {p=0,r=4,s=1/2}, ReLU {p=0,r=1,s=0}
// and a negative-floor setting, against psi computed in real arithmetic:
// code = min(255, floor((psi + 1) / 2 * 256)).
module tb_lau;
  import scrnn_pkg::*;
  logic [3:0] c1;
  logic [4:0] c2;
  logic [7:0] code1, code2;
  lau_cfg_t   cfg;
  int checks = 0, failures = 0;

  lau #(.N_BITS(12), .LANES(1), .M(8)) dut1 (.count(c1), .cfg, .code(code1));
  lau #(.N_BITS(24), .LANES(2), .M(8)) dut2 (.count(c2), .cfg, .code(code2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_code(int c, int nbits, int lanes, real p, real r, real s);
    real x, psi, v;
    x = real'(2 * c - nbits) / lanes;
    psi = x / r + s;
    if (psi < p) psi = p;
    if (psi > 1.0) psi = 1.0;
    v = $floor((psi + 1.0) / 2.0 * 256.0);
    if (v > 255) v = 255;
    if (v < 0) v = 0;
    return int'(v);
  endfunction

  initial begin
    lau_cfg_t cfgs [3];
    static real ps [3] = '{0.0, 0.0, -0.5};
    static real rs [3] = '{4.0, 1.0, 2.0};
    static real ss [3] = '{0.5, 0.0, 0.25};
    cfgs[0] = LAU_SIGMOID;
    cfgs[1] = LAU_RELU;
    cfgs[2] = '{p: -16'sd128, s: 16'sd64, r_log2: 4'd1};
    for (int k = 0; k < 3; k++) begin
      cfg = cfgs[k];
      for (int c = 0; c <= 24; c++) begin
        c1 = 4'(c > 12 ? 12 : c);
        c2 = 5'(c);
        #1;
        checks += 2;
        if (code1 != ref_code(int'(c1), 12, 1, ps[k], rs[k], ss[k])) begin
          failures++;
          $display("FAIL cfg%0d c=%0d code=%0d exp=%0d", k, c1, code1, ref_code(int'(c1), 12, 1, ps[k], rs[k], ss[k]));
        end
        if (code2 != ref_code(c, 24, 2, ps[k], rs[k], ss[k])) begin
          failures++;
          $display("FAIL2 cfg%0d c=%0d code=%0d exp=%0d", k, c, code2, ref_code(c, 24, 2, ps[k], rs[k], ss[k]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

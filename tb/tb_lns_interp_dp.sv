// tb_lns_interp_dp: feeds the interpolation data path with triples of stored
// function values taken from random ROM segments (and their per-segment
// multiplier shifts) plus random u, and compares the correction with
// u * (a1 + u * a2) evaluated in double precision, where
// a1 = (gp - gm) / 2 and a2 = (gp - 2 g0 + gm) / 2. The allowed deviation is the
// truncation budget of the two shifted multiplier operands:
//   2^(sh2 - 27) + 2^(sh1 - 30) + 2 * 2^-30.
// A second group uses synthetic values with the shifts forced to 0, where the
// result must be within 2 * 2^-30.
module tb_lns_interp_dp;
  import lns_pkg::*;
  logic [G_W-1:0]         gm, g0, gp;
  logic [U_W-1:0]         u;
  logic [SH_W-1:0]        sh1, sh2;
  logic signed [DP_W-1:0] corr;
  int checks = 0, failures = 0;
  real worst = 0;

  lns_interp_dp dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    real a1, a2, uu, expv, got, tol, err;
    #1;
    a1 = (real'(gp) - real'(gm)) / 2.0 / (2.0 ** 26);
    a2 = (real'(gp) - 2.0 * real'(g0) + real'(gm)) / 2.0 / (2.0 ** 26);
    uu = real'(u) / 65536.0;
    expv = uu * (a1 + uu * a2);
    got = real'(corr) / (2.0 ** 30);
    tol = (real'(longint'(1) << (int'(sh2) + 3)) + real'(longint'(1) << sh1) + 2.0) / (2.0 ** 30);
    err = got - expv; if (err < 0) err = -err;
    if (err / tol > worst) worst = err / tol;
    checks++;
    if (err > tol) begin
      failures++;
      $display("gm=%0d g0=%0d gp=%0d u=%0d sh1=%0d sh2=%0d got %e exp %e", gm, g0, gp, u, sh1, sh2, got, expv);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int s, j;
      s = $urandom % NSEG;
      j = $urandom % (1 << SEG_LOG2W[s]);
      gm = seg_value(s, j - 1); g0 = seg_value(s, j); gp = seg_value(s, j + 1);
      sh1 = SH_W'(SEG_SH1[s]); sh2 = SH_W'(SEG_SH2[s]);
      u = U_W'($urandom);
      run_one();
    end
    for (int n = 0; n < 5000; n++) begin
      g0 = G_W'(30'($urandom));
      gm = g0 + G_W'($urandom % 1024) - G_W'(512);
      gp = g0 + G_W'($urandom % 1024) - G_W'(512);
      sh1 = '0; sh2 = '0;
      u = U_W'($urandom);
      run_one();
    end
    $display("worst error / allowance = %0.3f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

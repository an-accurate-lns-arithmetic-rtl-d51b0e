// tb_lns_addsub: accuracy sweep of the LNS adder/subtractor over the r axis.
//
// For addition and for subtraction it walks r = e_b - e_a from -2^-23 down to
// -25 with a stride of STRIDE result LSBs (STRIDE = 249 visits 1/249 of all
// distinct r values), with a random larger operand each time. Each result is
// compared with a double-precision reference and the error is accumulated per
// region like an error table: minimum, maximum, mean and mean absolute value,
// in units of 2^-23.
//   f_a, f_s (r < -1) : relative error 2^(e_c - e_exact) - 1
//   f_s, r >= -1      : weak error (c - c_exact) / a, relative to the larger operand
// Every error must lie within +/-0.5 * 2^-23 (the single-precision floating
// point worst case). The near-zero region is also walked densely for its
// smallest intervals.
module tb_lns_addsub #(
  parameter int STRIDE = 249
);
  import lns_pkg::*;
  localparam real ULP = 1.0 / 8388608.0;

  logic [WORD_W-1:0] x, y, z;
  logic              sub, zero, ovf, unf;
  int checks = 0, failures = 0;
  real emin [3], emax [3], esum [3], eabs [3];
  int  ecnt [3];

  lns_addsub dut (.*);

  initial begin : watchdog
    #(longint'(60) * 8388608 / STRIDE + 1000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real log2r(real v);
    return $ln(v) / $ln(2.0);
  endfunction

  task automatic one_case(logic do_sub, int unsigned d);
    logic [E_W-1:0] ea;
    real r, exact, got, err;
    int reg_i;
    ea = E_W'($signed($urandom) >>> 6);
    x = {1'b0, ea};
    y = {1'b0, E_W'($signed(ea) - $signed(E_W'(d)))};
    sub = do_sub;
    if ($urandom % 2) begin x[WORD_W-1] = 1'b1; y[WORD_W-1] = 1'b1; end
    #1;
    r = -real'(d) * ULP;
    if (!do_sub) begin
      exact = log2r(1.0 + 2.0 ** r);
      reg_i = 0;
    end else begin
      real y2, t;
      y2 = r * $ln(2.0);
      if (y2 > -0.01) t = -(y2 + y2*y2/2.0 + y2*y2*y2/6.0 + y2*y2*y2*y2/24.0);
      else t = 1.0 - 2.0 ** r;
      exact = log2r(t);
      reg_i = (r < -1.0) ? 1 : 2;
    end
    got = real'($signed(z[E_W-1:0]) - $signed(ea)) * ULP;
    if (reg_i == 2) err = (2.0 ** got - 2.0 ** exact) / ULP;
    else            err = (2.0 ** (got - exact) - 1.0) / ULP;
    checks++;
    if (err < emin[reg_i]) emin[reg_i] = err;
    if (err > emax[reg_i]) emax[reg_i] = err;
    esum[reg_i] += err;
    eabs[reg_i] += (err < 0) ? -err : err;
    ecnt[reg_i]++;
    if (err > 0.5 || err < -0.5 || z[WORD_W-1] !== x[WORD_W-1] || zero || ovf || unf) begin
      failures++;
      if (failures < 20) $display("r=%0.9f sub=%0d error %0.4f", r, do_sub, err);
    end
  endtask

  initial begin
    string name [3];
    name = '{"f_a", "f_s", "f_ss"};
    for (int g = 0; g < 3; g++) begin emin[g] = 0; emax[g] = 0; esum[g] = 0; eabs[g] = 0; ecnt[g] = 0; end
    for (int s = 0; s < 2; s++)
      for (int unsigned d = 1; d <= 25 * 8388608; d += STRIDE) one_case(s[0], d);
    for (int unsigned d = 1; d <= 65536; d++) one_case(1'b1, d);
    for (int g = 0; g < 3; g++)
      $display("%-5s cases %8d  min %7.4f  max %7.4f  mean %8.5f  mean|e| %7.4f", name[g], ecnt[g],
               emin[g], emax[g], esum[g] / ecnt[g], eabs[g] / ecnt[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

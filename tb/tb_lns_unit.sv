// tb_lns_unit: end-to-end test of the LNS arithmetic unit at its default sizes.
//
// Issues one operation per clock (back to back) and checks each result one
// clock later against a double-precision reference:
//   multiply / divide : exact exponent sum / difference and sign
//   add / subtract    : relative error |2^(e_c - e_exact) - 1| in units of 2^-23
//                       for the f_a and f_s regions; for subtraction of operands
//                       within a factor of two (r >= -1) the "weak" error
//                       |2^(e_c - e_a) - 2^(e_exact - e_a)|, i.e. the error
//                       relative to the larger operand, in units of 2^-23.
// Both error measures must stay within 0.5 * 2^-23, the worst-case relative
// error of single-precision floating point. Counts how often
// each mechanism occurred (f_a, f_s, near-zero f_s, far r, r = 0 add, exact
// cancellation, operand swap, multiply, divide, overflow, underflow, idle
// cycle) and fails if any never happened. Also checks the one-cycle latency.
module tb_lns_unit;
  import lns_pkg::*;

  localparam int  N_RANDOM  = 20000;
  localparam real ERR_LIMIT = 0.5;    // units of 2^-23: the single-precision FP worst case
  localparam real ULP = 1.0 / 8388608.0;

  logic              clk = 0, rst_n = 0, in_valid = 0;
  op_e               op = OP_ADD;
  logic [WORD_W-1:0] a = '0, b = '0;
  logic              out_valid;
  logic [WORD_W-1:0] z;
  logic              zero, ovf, unf;

  int checks = 0, failures = 0;
  int n_fa = 0, n_fs = 0, n_fss = 0, n_far = 0, n_one = 0, n_zero = 0, n_swap = 0;
  int n_mul = 0, n_div = 0, n_ovf = 0, n_unf = 0, n_idle = 0;
  real max_err_a = 0, max_err_s = 0, max_err_ss = 0;

  lns_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N_RANDOM * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real exp_of(logic [E_W-1:0] e);
    return real'($signed(e)) * ULP;
  endfunction

  function automatic real log2r(real v);
    return $ln(v) / $ln(2.0);
  endfunction

  // 2^r - 1 for e_sml |r| without cancellation
  function automatic real pow2m1(real r);
    real y;
    y = r * $ln(2.0);
    if (y > -0.03 && y < 0.03) return y + y*y/2.0 + y*y*y/6.0 + y*y*y*y/24.0 + y*y*y*y*y/120.0;
    return 2.0 ** r - 1.0;
  endfunction

  // expected outcome of the operation being issued
  typedef struct {
    logic valid, is_addsub, exp_zero, exp_ovf, exp_unf, weak_cmp, effsub;
    logic sgn;
    real  e_big, e_exact, r;
    logic [E_W-1:0] e_int;   // exact exponent for mul/div
  } exp_t;

  exp_t pend;

  function automatic exp_t reference(op_e o, logic [WORD_W-1:0] x, logic [WORD_W-1:0] y);
    exp_t t;
    real ex, ey, big, e_sml, r;
    logic sy, esub;
    longint s;
    t = '{default: 0};
    t.valid = 1;
    ex = exp_of(x[E_W-1:0]); ey = exp_of(y[E_W-1:0]);
    if (o == OP_MUL || o == OP_DIV) begin
      s = (o == OP_MUL) ? longint'($signed(x[E_W-1:0])) + longint'($signed(y[E_W-1:0]))
                        : longint'($signed(x[E_W-1:0])) - longint'($signed(y[E_W-1:0]));
      t.sgn = x[WORD_W-1] ^ y[WORD_W-1];
      t.exp_ovf = s > longint'(2**30 - 1);
      t.exp_unf = s < -longint'(2**30);
      t.e_int = E_W'(s);
      return t;
    end
    t.is_addsub = 1;
    sy = y[WORD_W-1] ^ (o == OP_SUB);
    esub = x[WORD_W-1] ^ sy;
    t.effsub = esub;
    big = (ey > ex) ? ey : ex;
    e_sml = (ey > ex) ? ex : ey;
    t.sgn = (ey > ex) ? sy : x[WORD_W-1];
    r = e_sml - big;
    t.r = r; t.e_big = big;
    if (r == 0.0 && esub) begin t.exp_zero = 1; return t; end
    if (!esub) t.e_exact = big + log2r(1.0 + 2.0 ** r);
    else       t.e_exact = big + log2r(-pow2m1(r));
    t.weak_cmp = esub && r >= -1.0;
    t.exp_ovf = t.e_exact > (2.0**30 - 0.5) * ULP;
    t.exp_unf = t.e_exact < (-(2.0**30) - 0.5) * ULP;
    return t;
  endfunction

  task automatic check_result(exp_t t);
    real got, err;
    if (!t.valid) return;
    checks++;
    if (!out_valid) begin failures++; $display("out_valid missing one cycle after issue"); end
    if (t.exp_ovf) n_ovf++;
    if (t.exp_unf) n_unf++;
    if (!t.is_addsub) begin
      checks++;
      if (t.exp_ovf || t.exp_unf) begin
        if (ovf !== t.exp_ovf || unf !== t.exp_unf) begin failures++; $display("mul/div range flag mismatch"); end
      end else if (z !== {t.sgn, t.e_int} || ovf || unf || zero) begin
        failures++; $display("mul/div mismatch got %h exp %h", z, {t.sgn, t.e_int});
      end
      return;
    end
    if (t.exp_zero) begin
      checks++;
      if (!zero) begin failures++; $display("x - x not flagged as zero"); end
      return;
    end
    if (t.exp_ovf || t.exp_unf) begin
      checks++;
      if (ovf !== t.exp_ovf || unf !== t.exp_unf) begin failures++; $display("add/sub range flag mismatch r=%f", t.r); end
      return;
    end
    got = exp_of(z[E_W-1:0]);
    if (t.weak_cmp) err = (2.0 ** (got - t.e_big) - 2.0 ** (t.e_exact - t.e_big)) / ULP;
    else        err = (2.0 ** (got - t.e_exact) - 1.0) / ULP;
    if (err < 0) err = -err;
    if (t.weak_cmp) begin if (err > max_err_ss) max_err_ss = err; end
    else if (t.effsub) begin if (err > max_err_s) max_err_s = err; end
    else if (err > max_err_a) max_err_a = err;
    checks += 2;
    if (err > ERR_LIMIT || zero || ovf || unf) begin
      failures++;
      $display("add/sub error %f LSB at r=%0.9f effsub=%0d (e_big=%f got %f exact %f)", err, t.r, t.effsub, t.e_big, got, t.e_exact);
    end
    if (z[WORD_W-1] !== t.sgn) begin failures++; $display("sign mismatch r=%f", t.r); end
  endtask

  // issue at the falling edge; the result registered at the next rising edge is
  // checked at the falling edge after it
  task automatic issue(op_e o, logic [WORD_W-1:0] x, logic [WORD_W-1:0] y);
    @(negedge clk);
    check_result(pend);
    in_valid = 1; op = o; a = x; b = y;
    pend = reference(o, x, y);
    begin
      real ex, ey, r;
      ex = exp_of(x[E_W-1:0]); ey = exp_of(y[E_W-1:0]);
      r = (ex > ey) ? ey - ex : ex - ey;
      if (o == OP_MUL) n_mul++;
      else if (o == OP_DIV) n_div++;
      else begin
        if (ey > ex) n_swap++;
        if (r == 0.0 && !pend.effsub) n_one++;
        else if (r == 0.0) n_zero++;
        else if (r < -25.0) n_far++;
        else if (!pend.effsub) n_fa++;
        else if (r < -1.0) n_fs++;
        else n_fss++;
      end
    end
  endtask

  task automatic idle();
    @(negedge clk);
    check_result(pend);
    pend = '{default: 0};
    in_valid = 0;
    n_idle++;
  endtask

  function automatic logic [E_W-1:0] rand_e(int range_bits);
    int v;
    v = $signed($urandom) >>> (32 - range_bits);
    return E_W'(v);
  endfunction

  // operand pair with a chosen r: y = x + delta (delta in 2^-23 units)
  task automatic issue_r(op_e o, longint delta);
    logic [E_W-1:0] ex;
    logic sx, sy;
    ex = rand_e(26);
    sx = 1'($urandom); sy = 1'($urandom);
    if ($urandom % 2 == 0) issue(o, {sx, ex}, {sy, E_W'(longint'($signed(ex)) + delta)});
    else                   issue(o, {sy, E_W'(longint'($signed(ex)) + delta)}, {sx, ex});
  endtask

  initial begin
    pend = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // directed cases
    issue(OP_ADD, {1'b0, E_W'(0)}, {1'b0, E_W'(0)});                    // 1 + 1 = 2
    issue(OP_SUB, {1'b0, E_W'(100)}, {1'b0, E_W'(100)});                // exact cancellation
    issue(OP_ADD, {1'b0, E_W'(5 << 23)}, {1'b1, E_W'(5 << 23)});        // x + (-x)
    issue(OP_SUB, {1'b0, E_W'(0)}, {1'b0, E_W'(-1)});                   // r = -2^-23
    issue(OP_SUB, {1'b0, E_W'(0)}, {1'b0, E_W'(-(1 << 23))});           // r = -1
    issue(OP_ADD, {1'b0, E_W'(0)}, {1'b0, E_W'(-(25 << 23))});          // r = -25
    issue(OP_ADD, {1'b0, E_W'(0)}, {1'b0, E_W'(-(25 << 23) - 1)});      // just past the tables
    issue(OP_MUL, {1'b0, E_W'(2**30 - 5)}, {1'b0, E_W'(100)});          // overflow
    issue(OP_DIV, {1'b1, E_W'(-(2**30) + 5)}, {1'b0, E_W'(100)});       // underflow
    issue(OP_ADD, {1'b0, E_W'(2**30 - 5)}, {1'b0, E_W'(2**30 - 9)});    // add overflow
    idle();
    issue(OP_MUL, {1'b1, E_W'(12345)}, {1'b1, E_W'(-999)});
    issue(OP_DIV, {1'b0, E_W'(12345)}, {1'b1, E_W'(-999)});
    for (int n = 0; n < N_RANDOM; n++) begin
      int kind;
      kind = $urandom % 8;
      case (kind)
        0: issue_r(OP_ADD, -longint'($urandom % (26 * 8388608)));
        1: issue_r(OP_SUB, -longint'($urandom % (26 * 8388608)));
        2: issue_r(($urandom % 2) ? OP_ADD : OP_SUB, -longint'($urandom % 8388608) - 1);
        3: issue_r(($urandom % 2) ? OP_ADD : OP_SUB, -longint'(($urandom % 8388608) >> ($urandom % 23)) - 1);
        4: issue_r(($urandom % 2) ? OP_ADD : OP_SUB, -longint'($urandom % (300 * 8388608)));
        5: issue(($urandom % 2) ? OP_MUL : OP_DIV, {1'($urandom), rand_e(31)}, {1'($urandom), rand_e(31)});
        6: issue(($urandom % 2) ? OP_ADD : OP_SUB, {1'($urandom), rand_e(31)}, {1'($urandom), rand_e(31)});
        default: if ($urandom % 4 == 0) idle(); else issue_r(OP_SUB, -longint'($urandom % 16));
      endcase
    end
    idle();
    idle();
    $display("max relative error (2^-23): f_a %0.3f  f_s %0.3f  near-zero f_s (weak) %0.3f",
             max_err_a, max_err_s, max_err_ss);
    $display("events: fa=%0d fs=%0d fss=%0d far=%0d one=%0d zero=%0d swap=%0d mul=%0d div=%0d ovf=%0d unf=%0d idle=%0d",
             n_fa, n_fs, n_fss, n_far, n_one, n_zero, n_swap, n_mul, n_div, n_ovf, n_unf, n_idle);
    if (n_fa == 0 || n_fs == 0 || n_fss == 0 || n_far == 0 || n_one == 0 || n_zero == 0 ||
        n_swap == 0 || n_mul == 0 || n_div == 0 || n_ovf == 0 || n_unf == 0 || n_idle == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

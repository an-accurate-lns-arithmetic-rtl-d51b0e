// lns_addsub: combinational LNS adder/subtractor (the full datapath).
//
// Operands are 32-bit LNS words {s, e} (value (-1)^s * 2^e, e two's complement
// with 23 fraction bits). For an addition, or a subtraction with the sign of y
// flipped, the signs decide between effective addition and effective
// subtraction of magnitudes. With a the larger-magnitude operand and
// r = e_b - e_a <= 0 the result is
//     e_c = e_a + log2(1 + 2^r)   (effective addition)
//     e_c = e_a + log2(1 - 2^r)   (effective subtraction)
// and the sign of the result is the sign of a.
//
// Data flow: lns_partition (order operands, find segment, address, i mod P, u)
// -> lns_fn_rom (one word of P + K stored values) -> interleave_rotator (pick
// g(x[i-1]), g(x[i]), g(x[i+1])) -> lns_interp_dp (u*(a1 + u*a2)) -> final
// three-input add/subtract e_a +/- (g(x[i]) + correction) at 30 fraction bits,
// rounded to nearest (ties up) at 23 fraction bits.
//
// Flags (this design's own choices; the number format has no zero or
// infinity): zero = exact cancellation x - x; ovf / unf = the exact exponent
// left the 31-bit range, in which case e saturates to the largest / smallest
// exponent. Purely combinational.
module lns_addsub
  import lns_pkg::*;
(
  input  logic [WORD_W-1:0] x,
  input  logic [WORD_W-1:0] y,
  input  logic              sub,   // 0: x + y, 1: x - y
  output logic [WORD_W-1:0] z,
  output logic              zero,
  output logic              ovf,
  output logic              unf
);

  localparam int RES_W = E_W + (F_DP - F) + 4;   // 38-bit exponent at 2^-30, plus headroom

  logic                   sx, sy_eff, eff_sub, swap;
  logic [E_W-1:0]         e_a;
  fn_e                    fn;
  logic [SEG_W-1:0]       seg;
  logic [ADDR_W-1:0]      rom_addr;
  logic [LOG2P-1:0]       rot;
  logic [U_W-1:0]         u;
  logic [SH_W-1:0]        sh1, sh2;
  logic                   one, zero_r, beyond;
  logic [NE-1:0][G_W-1:0] word;
  logic [K:0][G_W-1:0]    pts;
  logic signed [DP_W-1:0] corr;
  logic signed [RES_W-1:0] g_hat, ea_x, res, res_rnd;

  assign sx      = x[WORD_W-1];
  assign sy_eff  = y[WORD_W-1] ^ sub;
  assign eff_sub = sx ^ sy_eff;

  lns_partition u_part (
    .e_x(x[E_W-1:0]), .e_y(y[E_W-1:0]), .eff_sub,
    .swap, .e_a, .fn, .seg, .rom_addr, .rot, .u, .sh1, .sh2,
    .one, .zero(zero_r), .beyond
  );

  lns_fn_rom u_rom (.addr(rom_addr), .word);

  interleave_rotator #(.P(P), .K(K), .W(G_W)) u_rot (.word, .rot, .out(pts));

  lns_interp_dp u_dp (.gm(pts[0]), .g0(pts[1]), .gp(pts[2]), .u, .sh1, .sh2, .corr);

  always_comb begin
    ea_x = RES_W'($signed(e_a)) <<< (F_DP - F);
    if (one)      g_hat = RES_W'(1) <<< F_DP;
    else if (beyond) g_hat = '0;
    else          g_hat = (RES_W'(pts[1]) <<< (F_DP - F_ROM)) + RES_W'(corr);
    res     = (fn == FN_A) ? ea_x + g_hat : ea_x - g_hat;
    res_rnd = (res + (RES_W'(1) <<< (F_DP - F - 1))) >>> (F_DP - F);

    zero = zero_r;
    ovf  = res_rnd >  RES_W'(signed'({1'b0, {(E_W-1){1'b1}}}));
    unf  = res_rnd <  RES_W'(signed'({1'b1, {(E_W-1){1'b0}}}));
    z[WORD_W-1] = swap ? sy_eff : sx;
    if (ovf)      z[E_W-1:0] = {1'b0, {(E_W-1){1'b1}}};
    else if (unf || zero_r) z[E_W-1:0] = {1'b1, {(E_W-1){1'b0}}};
    else          z[E_W-1:0] = res_rnd[E_W-1:0];
    if (zero_r) z[WORD_W-1] = 1'b0;
  end

endmodule

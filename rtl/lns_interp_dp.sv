// lns_interp_dp: second-order interpolation data path with stored function values.
//
// From three consecutive stored values gm = g(x[i-1]), g0 = g(x[i]), gp = g(x[i+1])
// (unsigned, F_ROM = 26 fraction bits) and the position u in [0, 1) inside the
// step, it computes the correction
//     corr = u * (a1 + u * a2),   a1 = (gp - gm) / 2,   a2 = (gp - 2*g0 + gm) / 2
// so that g(x) ~ g0 + corr (Lagrange interpolation through the three points,
// with the centre point as origin). corr is a signed number with F_DP = 30
// fraction bits; the caller adds g0 itself.
//
// Structure, in data-flow order:
//   sum/diff unit    : diff = gp - gm, sum = gp + gm
//   adder            : c = sum - 2*g0 (c equals a2 in units of 2^-27)
//   shift + m2       : a2 keeps M2W = 12 bits after an arithmetic right shift by
//                      sh2; m2 multiplies them by the 16-bit u
//   shift            : product aligned to 2^-30, truncated
//   adder            : t = a1 + u*a2 (a1 = diff in units of 2^-27)
//   shift + m1       : t keeps M1W = 19 bits after a right shift by sh1; m1
//                      multiplies them by u; product aligned to 2^-30, truncated
// All truncations round toward minus infinity. sh1 and sh2 are per-segment
// constants chosen so the operands fit the multiplier widths. Purely
// combinational. The operation order, the multiplier sizes and the precisions
// follow the published datapath; the exact placement of the shifts is this
// design's own reading.
module lns_interp_dp
  import lns_pkg::*;
(
  input  logic [G_W-1:0]          gm,
  input  logic [G_W-1:0]          g0,
  input  logic [G_W-1:0]          gp,
  input  logic [U_W-1:0]          u,
  input  logic [SH_W-1:0]         sh1,
  input  logic [SH_W-1:0]         sh2,
  output logic signed [DP_W-1:0]  corr
);

  localparam int A_FRAC = F_ROM + 1;               // a1, a2 are kept in units of 2^-27
  localparam int P2_ALIGN = A_FRAC + U_W - F_DP;   // 13: m2 product to 2^-30
  localparam int P1_ALIGN = U_W;                   // 16: m1 product to 2^-30

  logic signed [G_W+1:0]          diff;
  logic        [G_W:0]            sum;
  logic signed [G_W+2:0]          c;
  logic signed [M2W-1:0]          m2_a;
  logic signed [M2W+U_W:0]        m2_p;
  logic signed [DP_W-1:0]         a2u;
  logic signed [DP_W-1:0]         t;
  logic signed [M1W-1:0]          m1_a;
  logic signed [M1W+U_W:0]        m1_p;
  logic signed [U_W:0]            u_s;

  always_comb begin
    u_s  = $signed({1'b0, u});
    diff = $signed({2'b00, gp}) - $signed({2'b00, gm});
    sum  = {1'b0, gp} + {1'b0, gm};
    c    = $signed({2'b00, sum}) - $signed({2'b00, g0, 1'b0});

    m2_a = M2W'(c >>> sh2);
    m2_p = m2_a * u_s;
    a2u  = (DP_W'(m2_p) <<< sh2) >>> P2_ALIGN;

    t    = (DP_W'(diff) <<< (F_DP - A_FRAC)) + a2u;

    m1_a = M1W'(t >>> sh1);
    m1_p = m1_a * u_s;
    corr = (DP_W'(m1_p) <<< sh1) >>> P1_ALIGN;
  end

endmodule

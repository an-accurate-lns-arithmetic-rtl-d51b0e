// lns_unit: 32-bit logarithmic number system (LNS) arithmetic unit.
//
// Operands and result are LNS words {s, e}: value (-1)^s * 2^e, e a 31-bit two's
// complement exponent with 23 fraction bits (worst-case representation error
// smaller than single-precision floating point).
//   OP_MUL : e = e_a + e_b, s = s_a ^ s_b (exact)
//   OP_DIV : e = e_a - e_b, s = s_a ^ s_b (exact)
//   OP_ADD, OP_SUB : lns_addsub, i.e. e_c = e_big + log2(1 +/- 2^r) evaluated by a
//            second-order interpolator over an interleaved ROM of stored function
//            values (about 97 kbit), two small multipliers (19x16 and 12x16).
// Timing: the whole datapath is combinational between an operand handshake and
// one output register stage: a result appears one clock after in_valid with
// out_valid set; a new operation can be issued every cycle. Reset (active low,
// synchronous) clears out_valid only.
// Flags: zero = exact cancellation (x - x), ovf / unf = exponent out of range
// (saturated). The register stage, the flags and the operation encoding are this
// design's own choices; the add/subtract datapath follows the published one.
module lns_unit
  import lns_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  op_e               op,
  input  logic [WORD_W-1:0] a,
  input  logic [WORD_W-1:0] b,
  output logic              out_valid,
  output logic [WORD_W-1:0] z,
  output logic              zero,
  output logic              ovf,
  output logic              unf
);

  logic [WORD_W-1:0]       as_z;
  logic                    as_zero, as_ovf, as_unf;
  logic signed [E_W+1:0]   md;          // exponent sum / difference, two bits wider
  logic [WORD_W-1:0]       c_z;
  logic                    c_zero, c_ovf, c_unf;

  lns_addsub u_addsub (
    .x(a), .y(b), .sub(op == OP_SUB),
    .z(as_z), .zero(as_zero), .ovf(as_ovf), .unf(as_unf)
  );

  always_comb begin
    md = (op == OP_DIV) ? $signed({{2{a[E_W-1]}}, a[E_W-1:0]}) - $signed({{2{b[E_W-1]}}, b[E_W-1:0]})
                        : $signed({{2{a[E_W-1]}}, a[E_W-1:0]}) + $signed({{2{b[E_W-1]}}, b[E_W-1:0]});
    if (op == OP_ADD || op == OP_SUB) begin
      c_z = as_z; c_zero = as_zero; c_ovf = as_ovf; c_unf = as_unf;
    end else begin
      c_zero = 1'b0;
      c_ovf  = md > (E_W+2)'(signed'({1'b0, {(E_W-1){1'b1}}}));
      c_unf  = md < (E_W+2)'(signed'({1'b1, {(E_W-1){1'b0}}}));
      c_z[WORD_W-1] = a[WORD_W-1] ^ b[WORD_W-1];
      if (c_ovf)      c_z[E_W-1:0] = {1'b0, {(E_W-1){1'b1}}};
      else if (c_unf) c_z[E_W-1:0] = {1'b1, {(E_W-1){1'b0}}};
      else            c_z[E_W-1:0] = md[E_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    if (in_valid) begin
      z    <= c_z;
      zero <= c_zero;
      ovf  <= c_ovf;
      unf  <= c_unf;
    end
  end

endmodule

// interleave_rotator: selects K + 1 consecutive entries out of a word of P + K
// entries read from an interleaved memory.
//
// out[m] = word[rot + m] for m = 0 .. K, with rot = (interval index) mod P.
// With K = 2 this yields f(x[i-1]), f(x[i]), f(x[i+1]) for the second-order
// interpolator. Implemented as one (P)-input multiplexer per output; purely
// combinational. Parameters are the interleaving factor P, the polynomial
// order K and the entry width W.
module interleave_rotator #(
  parameter int P = 8,
  parameter int K = 2,
  parameter int W = 31
) (
  input  logic [P+K-1:0][W-1:0] word,
  input  logic [$clog2(P)-1:0]  rot,
  output logic [K:0][W-1:0]     out
);

  always_comb begin
    for (int m = 0; m <= K; m++) out[m] = word[int'(rot) + m];
  end

endmodule

// lns_partition: the "compute r, partition" stage of the LNS adder/subtractor.
//
// Given the two exponents e_x, e_y and whether the operation is an effective
// subtraction, it orders the operands so that e_a >= e_b, forms
// r = e_b - e_a <= 0 and locates r on the segmented r axis (see lns_pkg):
//   - effective addition            : FN_A  segment i = -floor(r) - 1
//   - effective subtraction, r < -1 : FN_S  segment i = -floor(r) - 1
//   - effective subtraction, r >= -1: FN_SS segment i = number of leading ones
//                                     of the 23 fraction bits of r (two's complement)
// Inside the segment the offset of r from the interval start is split into the
// word index j = floor(offset / h) and u = offset / h - j (U_W = 16 bits kept,
// lower bits truncated). The interleaved ROM is addressed with
// rom_addr = SEG_BASE[seg] + j / P, and the rotator with rot = j mod P.
// It also looks up the two multiplier shift amounts of the segment.
//
// Special cases, flagged rather than interpolated:
//   r = 0, addition      -> one  (f_a(0) = 1 exactly)
//   r = 0, subtraction   -> zero (exact cancellation; zero has no LNS encoding)
//   r < -25              -> beyond  (the correction rounds to 0; e_c = e_a)
// Purely combinational. The segment split and the address/rotate scheme follow
// the published datapath; the flag names and the handling of r = 0 are this
// design's own choices.
module lns_partition
  import lns_pkg::*;
(
  input  logic [E_W-1:0]    e_x,      // exponent of the first operand (two's complement)
  input  logic [E_W-1:0]    e_y,      // exponent of the second operand
  input  logic              eff_sub,  // 1: |x| - |y| style subtraction
  output logic              swap,     // 1: e_y > e_x, so the second operand is the larger
  output logic [E_W-1:0]    e_a,      // larger exponent
  output fn_e               fn,       // which function table
  output logic [SEG_W-1:0]  seg,      // segment number 0..NSEG-1
  output logic [ADDR_W-1:0] rom_addr, // ROM word address
  output logic [LOG2P-1:0]  rot,      // i mod P for the rotator
  output logic [U_W-1:0]    u,        // position inside the step, 0.16 fixed point
  output logic [SH_W-1:0]   sh1,      // m1 input shift
  output logic [SH_W-1:0]   sh2,      // m2 input shift
  output logic              one,      // r = 0 and addition: correction is exactly 1
  output logic              zero,     // r = 0 and subtraction: result is zero
  output logic              beyond       // r < -25: correction is 0
);

  logic signed [E_W:0] d;        // e_x - e_y, one bit wider
  logic        [E_W:0] nr;       // |r|
  logic        [E_W:0] r_tc;     // r = -|r|, two's complement
  logic        [F-1:0] r_frac;   // r - floor(r)
  logic          [4:0] i_int;    // -floor(r) - 1 (low bits; only used for r >= -25)
  int                  lead1;    // leading ones of r_frac
  int                  s;        // segment number
  int                  pb;       // point bits of the segment
  logic        [F-1:0] offset;
  logic [U_W+J_W-1:0]  pos;      // offset * W / 2^pb, 16 fraction bits (below 2^24)

  always_comb begin
    d      = $signed({e_x[E_W-1], e_x}) - $signed({e_y[E_W-1], e_y});
    swap   = d[E_W];
    e_a    = swap ? e_y : e_x;
    nr     = swap ? -d : d;
    r_tc   = -nr;
    r_frac = r_tc[F-1:0];
    i_int  = ~r_tc[F +: 5];

    lead1 = 0;
    for (int b = F - 1; b >= 0; b--) begin
      if (r_frac[b] && lead1 == F - 1 - b) lead1 = F - b;
    end

    one  = (nr == '0) && !eff_sub;
    zero = (nr == '0) &&  eff_sub;
    beyond  = nr > (E_W+1)'(FAR_LIMIT << F);

    if (!eff_sub) begin
      fn = FN_A;
      s  = int'(i_int);
    end else if (nr > (E_W+1)'(1 << F)) begin
      fn = FN_S;
      s  = N_FA + int'(i_int) - 1;
    end else begin
      fn = FN_SS;
      s  = N_FA + N_FS + lead1;
    end
    // out-of-table cases (one, zero, beyond) still produce an in-range segment
    if (one || zero || beyond || s < 0 || s >= NSEG) s = 0;
    seg = SEG_W'(s);

    pb     = seg_pointbits(s);
    offset = r_frac & F'((64'd1 << pb) - 1);
    pos    = (U_W+J_W)'({offset, 24'b0} >> (pb - SEG_LOG2W[s] + 8));
    u      = pos[U_W-1:0];
    rot    = pos[U_W +: LOG2P];
    rom_addr = ADDR_W'(SEG_BASE[s]) + ADDR_W'(pos[U_W+LOG2P +: J_W-LOG2P]);
    sh1    = SH_W'(SEG_SH1[s]);
    sh2    = SH_W'(SEG_SH2[s]);
  end

endmodule

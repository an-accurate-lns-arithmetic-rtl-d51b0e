// lns_fn_rom: the single-ROM interleaved function memory.
//
// Each of the ROM_WORDS words holds NE = P + K = 10 stored function values of
// G_W = 31 bits (5 integer, 26 fraction bits, unsigned |f|). Word q of a segment
// holds the points x_{Pq-1} .. x_{Pq+P}, so any K + 1 = 3 consecutive points
// x_{j-1}, x_j, x_{j+1} needed for the interval starting at x_j are found in one
// word; the rotator after this ROM picks them by j mod P. Storing the K extra
// points in every word costs (P + K) / P = 1.25 times the plain table but lets
// one ROM serve all interleaved banks.
//
// The contents are computed at elaboration from
//   f_a(x) = log2(1 + 2^x)  and  -f_s(x) = -log2(1 - 2^x),
// rounded to nearest at 2^-26 (see lns_pkg for the segment layout). Slots past
// the last point of a short segment hold 0 and are never selected.
// Read is combinational (asynchronous ROM); timing is up to the instantiating
// logic.
module lns_fn_rom
  import lns_pkg::*;
(
  input  logic [ADDR_W-1:0]        addr,
  output logic [NE-1:0][G_W-1:0]   word
);

  logic [NE-1:0][G_W-1:0] rom [ROM_WORDS];

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    for (genvar q = 0; q < seg_rom_words(s); q++) begin : g_word
      localparam int ADDR = SEG_BASE[s] + q;
      for (genvar e = 0; e < NE; e++) begin : g_entry
        localparam logic [G_W-1:0] VALUE = seg_value(s, q * P + e - 1);
        assign rom[ADDR][e] = VALUE;
      end
    end
  end

  assign word = (int'(addr) < ROM_WORDS) ? rom[addr] : '0;

endmodule

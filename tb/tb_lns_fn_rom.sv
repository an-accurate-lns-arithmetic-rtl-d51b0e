// tb_lns_fn_rom: reads every word of the interleaved function ROM and compares
// each used entry with |log2(1 + 2^x)| or |log2(1 - 2^x)| evaluated in double
// precision at the point the entry stands for (word q of a segment holds the
// points j = 8q - 1 .. 8q + 8). Stored values must be within one 2^-26 LSB of
// the exact function. The segment geometry (function, interval, words per
// interval) is rebuilt here from the interval rules.
module tb_lns_fn_rom;
  import lns_pkg::*;
  logic [ADDR_W-1:0]      addr;
  logic [NE-1:0][G_W-1:0] word;
  int checks = 0, failures = 0;

  lns_fn_rom dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_g(int s, real x);
    real y, t;
    if (s < 25) return $ln(1.0 + 2.0 ** x) / $ln(2.0);
    y = x * $ln(2.0);
    if (y > -0.01) t = -(y + y*y/2.0 + y*y*y/6.0 + y*y*y*y/24.0);
    else t = 1.0 - 2.0 ** x;
    return -$ln(t) / $ln(2.0);
  endfunction

  initial begin
    int w = 0;
    for (int s = 0; s < 73; s++) begin
      int nw, words;
      real x0, h;
      nw = 1 << SEG_LOG2W[s];
      words = (nw + 7) / 8;
      if (s < 25)      begin x0 = -real'(s + 1);  h = 1.0 / nw; end
      else if (s < 49) begin x0 = -real'(s - 23); h = 1.0 / nw; end
      else             begin x0 = -(2.0 ** (-(s - 49))); h = (2.0 ** (-(s - 49) - 1)) / nw; end
      for (int q = 0; q < words; q++) begin
        addr = ADDR_W'(w);
        #1;
        for (int e = 0; e < 10; e++) begin
          int j;
          real expv, got;
          j = 8 * q + e - 1;
          if (j > nw) continue;
          expv = ref_g(s, x0 + j * h) * (2.0 ** 26);
          got = real'(word[e]);
          checks++;
          if (got - expv > 1.0 || expv - got > 1.0) begin
            failures++;
            $display("seg %0d word %0d entry %0d: got %0.1f exp %0.1f", s, w, e, got, expv);
          end
        end
        w++;
      end
    end
    checks++;
    if (w != ROM_WORDS) begin failures++; $display("word count %0d vs %0d", w, ROM_WORDS); end
    $display("ROM words %0d x %0d bits", w, 10 * G_W);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

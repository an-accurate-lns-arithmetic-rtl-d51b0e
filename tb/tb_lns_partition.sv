// tb_lns_partition: drives random exponent pairs (with the distance r spread
// over all function regions) and checks operand ordering, region, segment,
// ROM word address, rotation, the 16-bit u and the special-case flags against
// values computed in double precision from the interval definitions:
//   f_a      : -i-1 <= r < -i, i = 0..24
//   f_s      : -i-1 <= r < -i, i = 1..24
//   f_s near : -2^-i <= r < -2^-(i+1), i = 0..23
// with j = floor((r - x0) / h), u = frac((r - x0) / h) truncated to 16 bits.
module tb_lns_partition;
  import lns_pkg::*;
  logic [E_W-1:0]    e_x, e_y;
  logic              eff_sub;
  logic              swap;
  logic [E_W-1:0]    e_a;
  fn_e               fn;
  logic [SEG_W-1:0]  seg;
  logic [ADDR_W-1:0] rom_addr;
  logic [LOG2P-1:0]  rot;
  logic [U_W-1:0]    u;
  logic [SH_W-1:0]   sh1, sh2;
  logic              one, zero, beyond;
  int checks = 0, failures = 0;

  lns_partition dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what, real r);
    checks++;
    if (!cond) begin failures++; $display("%s mismatch at r=%0.10f sub=%0d", what, r, eff_sub); end
  endtask

  initial begin
    int base [74];
    base[0] = 0;
    for (int s = 0; s < 73; s++) base[s + 1] = base[s] + ((1 << SEG_LOG2W[s]) + 7) / 8;
    for (int n = 0; n < 30000; n++) begin
      longint rdist;
      int kind, s;
      real r, x0, h, pos;
      int j, uu;
      kind = $urandom % 4;
      case (kind)
        0: rdist = longint'($urandom % (26 * 8388608));
        1: rdist = longint'($urandom % 8388608);
        2: rdist = longint'(($urandom % 8388608) >> ($urandom % 23));
        default: rdist = longint'($urandom % 8);
      endcase
      e_x = E_W'($signed($urandom) >>> 8);
      if ($urandom % 2) begin e_y = E_W'(longint'($signed(e_x)) - rdist); end
      else begin e_y = e_x; e_x = E_W'(longint'($signed(e_y)) - rdist); end
      eff_sub = 1'($urandom);
      #1;
      r = -real'(rdist) / 8388608.0;
      chk(swap == ($signed(e_y) > $signed(e_x)), "swap", r);
      chk(e_a == (swap ? e_y : e_x), "e_a", r);
      chk(one == (rdist == 0 && !eff_sub), "one", r);
      chk(zero == (rdist == 0 && eff_sub), "zero", r);
      chk(beyond == (r < -25.0), "beyond", r);
      if (rdist == 0 || r < -25.0) continue;
      if (!eff_sub) begin
        s = int'(-$floor(r)) - 1;
        x0 = $floor(r); h = 1.0 / (1 << SEG_LOG2W[s]);
        chk(fn == FN_A, "fn", r);
      end else if (r < -1.0) begin
        s = 25 + int'(-$floor(r)) - 2;
        x0 = $floor(r); h = 1.0 / (1 << SEG_LOG2W[s]);
        chk(fn == FN_S, "fn", r);
      end else begin
        int i;
        i = 0;
        while (!(r >= -(2.0 ** (-i)) && r < -(2.0 ** (-i - 1)))) i++;
        s = 49 + i;
        x0 = -(2.0 ** (-i)); h = (2.0 ** (-i - 1)) / (1 << SEG_LOG2W[s]);
        chk(fn == FN_SS, "fn", r);
      end
      pos = (r - x0) / h;
      j = int'($floor(pos));
      uu = int'($floor((pos - j) * 65536.0));
      chk(int'(seg) == s, "segment", r);
      chk(int'(rom_addr) == base[s] + j / 8, "rom_addr", r);
      chk(int'(rot) == j % 8, "rot", r);
      chk(int'(u) == uu, "u", r);
      chk(int'(sh1) == SEG_SH1[s] && int'(sh2) == SEG_SH2[s], "shift", r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

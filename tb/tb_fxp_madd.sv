// tb_fxp_madd: checks the fixed-point multiply-add against an integer model.
//
// Random 16-bit and 32-bit operands, both input halves, every rounding mode
// and shifts 0..W-1. The expected value is computed with 64-bit integers:
// product of the signed halves, floor division by 2^shift, the rounding
// correction from the remainder, addition of Z and clamping to W bits.
module tb_fxp_madd;
  import viram_pkg::*;

  logic [15:0] x16, y16, z16, w16;
  logic [31:0] x32, y32, z32, w32;
  logic        hi, s16, s32;
  logic [5:0]  sh16, sh32;
  rnd_e        rnd;
  int checks = 0, failures = 0;

  fxp_madd #(.W(16)) u16 (.x(x16), .y(y16), .z(z16), .hi(hi), .shamt(sh16), .rnd(rnd), .w(w16), .sat(s16));
  fxp_madd #(.W(32)) u32 (.x(x32), .y(y32), .z(z32), .hi(hi), .shamt(sh32), .rnd(rnd), .w(w32), .sat(s32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint signed ref_madd(longint unsigned x, longint unsigned y, longint unsigned z,
                                             int w, bit h, int sh, rnd_e m);
    longint signed xa, ya, p, q, r, one, res, mx;
    int hw;
    hw = w / 2;
    xa = h ? (x >> hw) : x;
    ya = h ? (y >> hw) : y;
    xa = (xa << (64 - hw)) >>> (64 - hw);
    ya = (ya << (64 - hw)) >>> (64 - hw);
    p  = xa * ya;
    one = 64'sd1 <<< sh;
    q  = p >>> sh;
    r  = p - q * one;                 // 0 <= r < 2^sh
    case (m)
      RND_HALFUP: if (sh > 0 && 2*r >= one) q++;
      RND_EVEN:   if (sh > 0 && (2*r > one || (2*r == one && q[0]))) q++;
      RND_ODD:    if (r != 0 && !q[0]) q++;
      default: ;
    endcase
    res = q + ((longint'(z) << (64 - w)) >>> (64 - w));
    mx  = (64'sd1 <<< (w - 1)) - 1;
    if (res > mx) res = mx;
    if (res < -mx - 1) res = -mx - 1;
    return res;
  endfunction

  initial begin
    int nsat;
    nsat = 0;
    for (int n = 0; n < 4000; n++) begin
      x16 = 16'($urandom()); y16 = 16'($urandom()); z16 = 16'($urandom());
      x32 = $urandom(); y32 = $urandom(); z32 = $urandom();
      if (n % 7 == 0) z16 = 16'h7FF0;
      hi = n[0];
      rnd = rnd_e'(n[2:1]);
      sh16 = 6'($urandom_range(15));
      sh32 = 6'($urandom_range(31));
      #1;
      checks += 2;
      if (longint'($signed(w16)) != ref_madd(x16, y16, z16, 16, hi, sh16, rnd)) begin
        failures++;
        if (failures < 10) $display("W16 x=%h y=%h z=%h hi=%0d sh=%0d rnd=%0d: %h", x16, y16, z16, hi, sh16, rnd, w16);
      end
      if (longint'($signed(w32)) != ref_madd(x32, y32, z32, 32, hi, sh32, rnd)) begin
        failures++;
        if (failures < 10) $display("W32 x=%h y=%h z=%h: %h", x32, y32, z32, w32);
      end
      if (s16) nsat++;
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

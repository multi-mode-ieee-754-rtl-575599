// fp_ref_pkg: reference model for the floating point testbenches.
//
// The model works on exact integers rather than on the hardware's
// structure. Every finite operand is turned into an integer multiple of the
// format's smallest subnormal, 2^(emin-MAN_W); sums and products are then
// formed exactly in a vector wide enough for any operand pair, and the exact
// value is truncated (rounded toward zero) into the format. The rules it
// checks against: truncation; overflow gives the largest finite number with
// the overflow flag; a non-zero exact result below the smallest normal sets
// underflow and is delivered as a subnormal or zero; the zero flag marks a
// zero result; the infinity flag marks an infinite operand; NaN operands,
// inf-inf and 0*inf give the quiet NaN 0 11..1 10..0, the last two with
// invalid; an exact zero sum is -0 only when both addends are -0.
// It also provides operand generators that favour the corner cases.
package fp_ref_pkg;
  import fpu_pkg::*;

  class fp_ref #(int EW = 8, int MW = 23);
    localparam int FW   = EW + MW + 1;             // packed width
    localparam int W    = (1 << (EW + 1)) + 2 * MW + 8;
    localparam int BIAS = (1 << (EW - 1)) - 1;
    typedef logic [FW-1:0] fp_t;
    typedef logic [W-1:0]  big_t;
    typedef logic signed [W+1:0] sbig_t;

    static function fp_t qnan();
      fp_t r;
      r = '0;
      r[FW-2 -: EW] = '1;
      r[MW-1] = 1'b1;
      return r;
    endfunction

    static function bit is_nan(fp_t x);
      return (x[FW-2 -: EW] == '1) && (x[MW-1:0] != '0);
    endfunction

    static function bit is_inf(fp_t x);
      return (x[FW-2 -: EW] == '1) && (x[MW-1:0] == '0);
    endfunction

    static function bit is_zero(fp_t x);
      return x[FW-2:0] == '0;
    endfunction

    // Magnitude of a finite operand in units of the smallest subnormal.
    static function big_t to_int(fp_t x);
      int   e;
      big_t m;
      e = int'(x[FW-2 -: EW]);
      m = '0;
      m[MW-1:0] = x[MW-1:0];
      if (e != 0) begin
        m[MW] = 1'b1;
        m = m << (e - 1);
      end
      return m;
    endfunction

    static function int msb(big_t n);
      for (int i = W - 1; i >= 0; i--) if (n[i]) return i;
      return -1;
    endfunction

    // Truncate an exact magnitude n (smallest-subnormal units) into the format.
    static function void pack(bit s, big_t n, bit exact_nonzero,
                              output fp_t r, output fp_flags_t f);
      int p, e;
      big_t t;
      f = '0;
      r = '0;
      r[FW-1] = s;
      p = msb(n);
      if (p < 0) begin
        f.zero = 1'b1;
        f.underflow = exact_nonzero;
      end else if (p < MW) begin
        r[MW-1:0] = n[MW-1:0];
        f.underflow = 1'b1;
      end else begin
        e = p - MW + 1;
        if (e >= (1 << EW) - 1) begin
          r[FW-2 -: EW] = EW'((1 << EW) - 2);
          r[MW-1:0] = '1;
          f.overflow = 1'b1;
        end else begin
          t = n >> (p - MW);
          r[FW-2 -: EW] = EW'(e);
          r[MW-1:0] = t[MW-1:0];
        end
      end
    endfunction

    static function void add(fp_t a, fp_t b, bit sub, output fp_t r, output fp_flags_t f);
      bit    sa, sb;
      sbig_t va, vb, sum;
      big_t  mag;
      sa = a[FW-1];
      sb = b[FW-1] ^ sub;
      f = '0;
      f.infinity = is_inf(a) || is_inf(b);
      if (is_nan(a) || is_nan(b)) begin
        r = qnan();
      end else if (is_inf(a) && is_inf(b) && (sa != sb)) begin
        r = qnan();
        f.invalid = 1'b1;
      end else if (is_inf(a)) begin
        r = a;
      end else if (is_inf(b)) begin
        r = {sb, b[FW-2:0]};
      end else begin
        va  = sbig_t'(to_int(a));
        vb  = sbig_t'(to_int(b));
        if (sa) va = -va;
        if (sb) vb = -vb;
        sum = va + vb;
        if (sum < 0) mag = big_t'(-sum);
        else         mag = big_t'(sum);
        pack((sum == 0) ? (sa & sb) : (sum < 0), mag, sum != 0, r, f);
        f.infinity = 1'b0;
      end
    endfunction

    static function void mul(fp_t a, fp_t b, output fp_t r, output fp_flags_t f);
      bit   s;
      big_t p, n;
      int   ea, eb, k;
      s = a[FW-1] ^ b[FW-1];
      f = '0;
      f.infinity = is_inf(a) || is_inf(b);
      if (is_nan(a) || is_nan(b)) begin
        r = qnan();
      end else if ((is_inf(a) && is_zero(b)) || (is_inf(b) && is_zero(a))) begin
        r = qnan();
        f.invalid = 1'b1;
      end else if (is_inf(a) || is_inf(b)) begin
        r = '0;
        r[FW-1] = s;
        r[FW-2 -: EW] = '1;
      end else begin
        ea = (a[FW-2 -: EW] == '0) ? 1 : int'(a[FW-2 -: EW]);
        eb = (b[FW-2 -: EW] == '0) ? 1 : int'(b[FW-2 -: EW]);
        p  = big_t'(a[MW-1:0]) | (big_t'(a[FW-2 -: EW] != '0) << MW);
        p  = p * (big_t'(b[MW-1:0]) | (big_t'(b[FW-2 -: EW] != '0) << MW));
        // product LSB weighs 2^(ea+eb-2*BIAS-2*MW); the unit 2^(1-BIAS-MW)
        k  = ea + eb - BIAS - MW - 1;
        if (k >= 0) n = p << k;
        else        n = (-k >= W) ? '0 : (p >> (-k));
        pack(s, n, p != 0, r, f);
      end
    endfunction

    // Random operand: mixes full-range values, values near exp_hint,
    // subnormals, zeros, infinities, NaNs and extreme fractions.
    static function fp_t rand_op(int exp_hint);
      fp_t x;
      int  sel, e;
      x = '0;
      x[FW-1] = 1'($urandom_range(1, 0));
      for (int i = 0; i < MW; i += 16) x[i +: 16] = 16'($urandom);
      x[MW-1:0] = x[MW-1:0];
      sel = $urandom_range(99, 0);
      if (sel < 30)      e = $urandom_range((1 << EW) - 2, 1);
      else if (sel < 60) e = exp_hint + $urandom_range(4, 0) - 2;
      else if (sel < 70) e = exp_hint + $urandom_range(2 * MW + 8, 0) - MW - 4;
      else if (sel < 78) e = 0;
      else if (sel < 84) e = $urandom_range(3, 1);
      else if (sel < 90) e = (1 << EW) - 2 - $urandom_range(2, 0);
      else if (sel < 93) begin e = 0; x[MW-1:0] = '0; end
      else if (sel < 96) begin e = (1 << EW) - 1; x[MW-1:0] = '0; end
      else if (sel < 98) e = (1 << EW) - 1;
      else begin
        e = $urandom_range((1 << EW) - 2, 1);
        x[MW-1:0] = ($urandom_range(1, 0) != 0) ? '1 : '0;
      end
      if (e < 0) e = 0;
      if (e > (1 << EW) - 1) e = (1 << EW) - 1;
      if (e == (1 << EW) - 1 && sel >= 96 && sel < 98 && x[MW-1:0] == '0) x[0] = 1'b1;
      x[FW-2 -: EW] = EW'(e);
      return x;
    endfunction
  endclass

endpackage

// fp_ref_pkg: independent reference model of IEEE 754 add, subtract and multiply
// for the testbenches.
//
// It works on exact integers instead of a fixed-width datapath: each finite operand
// becomes (-1)^s * N * 2^X with integer N. A product is exact (N = N1*N2). A sum is
// formed exactly after shifting the operand with the larger exponent left; when the
// exponents are further apart than 2P+6 bits the smaller operand is replaced by a
// single unit far below the result's last place, which changes nothing but the
// sticky information. The exact value is then rounded by locating its leading 1,
// choosing the result exponent (clamped at the subnormal minimum), and comparing the
// dropped remainder with half a unit in the last place.
// Tininess is judged before rounding; NaN results are the canonical quiet NaN.
package fp_ref_pkg;

  localparam int RW = 512;  // enough for 4P+8 bits at quadruple precision
  typedef logic [RW-1:0] big_t;

  typedef struct packed {
    logic [127:0] bits;
    logic         overflow;
    logic         underflow;
    logic         inexact;
    logic         invalid;
  } ref_result_t;

  class fp_ref #(int EXP_W = 8, int MAN_W = 23);
    localparam int W    = 1 + EXP_W + MAN_W;
    localparam int P    = MAN_W + 1;
    localparam int BIAS = (1 << (EXP_W - 1)) - 1;
    localparam int EMAX = (1 << EXP_W) - 1;

    static function logic [127:0] qnan();
      logic [127:0] r = '0;
      for (int i = 0; i < EXP_W; i++) r[MAN_W + i] = 1'b1;
      r[MAN_W-1] = 1'b1;
      return r;
    endfunction

    static function logic [127:0] inf(input logic s);
      logic [127:0] r = '0;
      for (int i = 0; i < EXP_W; i++) r[MAN_W + i] = 1'b1;
      r[W-1] = s;
      return r;
    endfunction

    static function int expf(input logic [127:0] x);
      return int'((x >> MAN_W) & ((128'd1 << EXP_W) - 1));
    endfunction

    static function big_t manf(input logic [127:0] x);
      return big_t'(x & ((128'd1 << MAN_W) - 1));
    endfunction

    static function bit is_nan(input logic [127:0] x);
      return expf(x) == EMAX && manf(x) != 0;
    endfunction
    static function bit is_inf(input logic [127:0] x);
      return expf(x) == EMAX && manf(x) == 0;
    endfunction
    static function bit is_zero(input logic [127:0] x);
      return expf(x) == 0 && manf(x) == 0;
    endfunction
    static function bit is_snan(input logic [127:0] x);
      return is_nan(x) && !x[MAN_W-1];
    endfunction

    // Integer significand and the scale X of its last bit.
    static function void decode(input logic [127:0] x, output big_t n, output int xs);
      int e = expf(x);
      if (e == 0) begin
        n  = manf(x);
        xs = 1 - BIAS - MAN_W;
      end else begin
        n  = manf(x) | (big_t'(1) << MAN_W);
        xs = e - BIAS - MAN_W;
      end
    endfunction

    // Round (-1)^s * n * 2^xs (n > 0) to the format.
    static function ref_result_t round_exact(input logic s, input big_t n, input int xs,
                                             input int rmode);
      ref_result_t r;
      int   msb, eu, et, sh, be;
      big_t q, rem, half;
      bit   up, inexact, tiny;
      r = '{default: '0};
      msb = 0;
      for (int i = 0; i < RW; i++) if (n[i]) msb = i;
      eu   = msb + xs;                 // unbiased exponent of the exact value
      tiny = eu < 1 - BIAS;
      et   = tiny ? 1 - BIAS : eu;
      sh   = (et - MAN_W) - xs;        // bits below the result's last place
      if (sh <= 0) begin
        q = n << (-sh);
        rem = 0; half = 0; inexact = 0;
      end else begin
        if (sh >= RW) begin
          // n < 2^(RW-1), so the whole value lies below half a unit.
          q    = 0;
          rem  = n;
          half = big_t'(1) << (RW - 1);
        end else begin
          q    = n >> sh;
          rem  = n & ((big_t'(1) << sh) - 1);
          half = big_t'(1) << (sh - 1);
        end
        inexact = rem != 0;
      end
      case (rmode)
        0: up = (rem > half) || (rem == half && inexact && q[0]);
        1: up = inexact && !s;
        2: up = inexact && s;
        default: up = 0;
      endcase
      if (up) q = q + 1;
      if (q >= (big_t'(1) << P)) begin
        q  = q >> 1;
        et = et + 1;
      end
      be = (q >= (big_t'(1) << MAN_W)) ? et + BIAS : 0;
      if (be >= EMAX) begin
        bit to_inf = (rmode == 0) || (rmode == 1 && !s) || (rmode == 2 && s);
        r.overflow = 1;
        r.inexact  = 1;
        if (to_inf) r.bits = inf(s);
        else r.bits = (128'(s) << (W - 1)) | (128'(EMAX - 1) << MAN_W)
                      | ((128'd1 << MAN_W) - 1);
        return r;
      end
      r.bits = (128'(s) << (W - 1)) | (128'(be) << MAN_W)
             | 128'(q & ((big_t'(1) << MAN_W) - 1));
      r.inexact   = inexact;
      r.underflow = tiny && inexact;
      return r;
    endfunction


    // Random finite operand, weighted toward the corners of the format:
    // subnormals, the smallest and largest exponents, and exponents near 'near_exp'.
    static function logic [127:0] rand_finite(input int near_exp);
      logic [127:0] m;
      int e, k;
      m = {$urandom, $urandom, $urandom, $urandom};
      k = int'($urandom % 10);
      case (k)
        0: m = m >> ($urandom % MAN_W);                  // few significant bits
        1: m = ~(m >> ($urandom % MAN_W));               // long runs of ones
        default: ;
      endcase
      m = m & ((128'd1 << MAN_W) - 1);
      k = int'($urandom % 10);
      case (k)
        0: e = 0;
        1: e = 1 + int'($urandom % 3);
        2: e = EMAX - 1 - int'($urandom % 3);
        3: e = 1 + int'($urandom % (EMAX - 1));
        default: begin
          e = near_exp + int'($urandom % 7) - 3;
          if (e < 0) e = 0;
          if (e > EMAX - 1) e = EMAX - 1;
        end
      endcase
      return (128'($urandom % 2) << (W - 1)) | (128'(e) << MAN_W) | m;
    endfunction

    // Random operand of any class: mostly finite, sometimes zero, infinity or NaN.
    static function logic [127:0] rand_any(input int near_exp);
      int k = int'($urandom % 16);
      logic s = 1'($urandom);
      case (k)
        0: return 128'(s) << (W - 1);
        1: return inf(s);
        2: return qnan() | (128'(s) << (W - 1)) | 128'($urandom % 4);
        3: return inf(s) | 128'(1 + $urandom % 4);      // signalling NaN
        default: return rand_finite(near_exp);
      endcase
    endfunction

    // Checks an intermediate result (value (-1)^s * sig * 2^(e - BIAS - MAN_W - 3),
    // sig with guard/round/sticky at the bottom) against the exact operation in all
    // four rounding modes. Returns the number of modes that disagree.
    static function int check_intermediate(input logic s, input int e, input big_t sig,
                                           input logic [127:0] a, input logic [127:0] b,
                                           input int op);
      ref_result_t want, got;
      int bad = 0;
      for (int rm = 0; rm < 4; rm++) begin
        want = compute(a, b, op, rm);
        if (sig == 0) begin
          if (!is_zero(want.bits)) bad++;
          continue;
        end
        got = round_exact(s, sig, e - BIAS - MAN_W - 3, rm);
        if (got != want) bad++;
      end
      return bad;
    endfunction

    // op: 0 add, 1 subtract, 2 multiply. rmode as in fpu_pkg.
    static function ref_result_t compute(input logic [127:0] a, input logic [127:0] b,
                                         input int op, input int rmode);
      ref_result_t r;
      logic sa, sb;
      big_t na, nb, n;
      int   xa, xb, x;
      r  = '{default: '0};
      sa = a[W-1];
      sb = b[W-1] ^ (op == 1);
      if (is_nan(a) || is_nan(b)) begin
        r.bits = qnan();
        r.invalid = is_snan(a) || is_snan(b);
        return r;
      end
      if (op == 2) begin
        if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) begin
          r.bits = qnan(); r.invalid = 1; return r;
        end
        if (is_inf(a) || is_inf(b)) begin r.bits = inf(sa ^ sb); return r; end
        decode(a, na, xa);
        decode(b, nb, xb);
        n = na * nb;
        if (n == 0) begin r.bits = 128'(sa ^ sb) << (W - 1); return r; end
        return round_exact(sa ^ sb, n, xa + xb, rmode);
      end
      if (is_inf(a) && is_inf(b)) begin
        if (sa != sb) begin r.bits = qnan(); r.invalid = 1; end
        else r.bits = inf(sa);
        return r;
      end
      if (is_inf(a)) begin r.bits = inf(sa); return r; end
      if (is_inf(b)) begin r.bits = inf(sb); return r; end
      decode(a, na, xa);
      decode(b, nb, xb);
      // Bring both to the smaller scale, limiting the shift (see header).
      if (xa - xb > 2 * P + 6) begin
        na = na << (2 * P + 6); nb = (nb != 0) ? big_t'(1) : big_t'(0); x = xa - (2 * P + 6);
      end else if (xb - xa > 2 * P + 6) begin
        nb = nb << (2 * P + 6); na = (na != 0) ? big_t'(1) : big_t'(0); x = xb - (2 * P + 6);
      end else if (xa >= xb) begin
        na = na << (xa - xb); x = xb;
      end else begin
        nb = nb << (xb - xa); x = xa;
      end
      if (sa == sb) begin
        n = na + nb;
        if (n == 0) begin r.bits = 128'(sa) << (W - 1); return r; end
        return round_exact(sa, n, x, rmode);
      end
      if (na == nb) begin
        r.bits = 128'(rmode == 2) << (W - 1);
        return r;
      end
      if (na > nb) return round_exact(sa, na - nb, x, rmode);
      return round_exact(sb, nb - na, x, rmode);
    endfunction
  endclass

endpackage

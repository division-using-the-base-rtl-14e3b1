// fpdiv_ref_pkg: reference model of the floating-point divider for testbenches.
//
// Computes c = a / b for one of the five formats with plain integer
// arithmetic: the significands are divided by the `/` operator on wide
// integers, so the model shares no algorithm with the radix-16 hardware.
// It follows the same conventions as the design: denormal operands are zero,
// tiny results flush to a signed zero (underflow + inexact), overflow follows
// the rounding direction, NaN results are the default quiet NaN.
// It also reports which mechanisms an operation exercises.
package fpdiv_ref_pkg;
  import fpdiv_pkg::*;

  typedef struct {
    logic [127:0] res;
    flags_t       fl;
    bit           bypass;
    bit           norm;     // quotient < 1, left normalization
    bit           carry;    // rounding carried to 2
  } ref_t;

  function automatic ref_t ref_div(fmt_e fmt, rm_e rm, logic [127:0] a, logic [127:0] b);
    ref_t r;
    int E, F, J, bias, emax;
    logic [255:0] fa, fb_, ma, mb, num, q, rem, sig, one;
    int ea, eb, e;
    bit sa, sb, s, za, zb, ia, ib, na, nb, sna, snb, rbit, sbit, inc;
    E = fmt_ebits(fmt); F = fmt_fbits(fmt); J = (fmt == FMT_EXT) ? 1 : 0;
    bias = (1 << (E - 1)) - 1; emax = (1 << E) - 1;
    one = 256'd1;
    fa = 256'(a) & ((one << F) - 1);
    fb_ = 256'(b) & ((one << F) - 1);
    ea = int'((256'(a) >> (F + J)) & ((one << E) - 1));
    eb = int'((256'(b) >> (F + J)) & ((one << E) - 1));
    sa = a[E + F + J]; sb = b[E + F + J];
    za = (ea == 0); zb = (eb == 0);
    ia = (ea == emax) && (fa == 0); ib = (eb == emax) && (fb_ == 0);
    na = (ea == emax) && (fa != 0); nb = (eb == emax) && (fb_ != 0);
    sna = na && !fa[F-1]; snb = nb && !fb_[F-1];
    s = sa ^ sb;
    r.fl = '0; r.bypass = 1; r.norm = 0; r.carry = 0;
    if (na || nb || (za && zb) || (ia && ib)) begin
      r.fl.nv = (na || nb) ? (sna || snb) : 1'b1;
      r.res = 128'((256'(emax) << (F + J)) | (256'(J) << F) | (one << (F - 1)));
      return r;
    end
    if (ia || zb) begin
      r.fl.dz = !ia;
      r.res = 128'((256'(s) << (E + F + J)) | (256'(emax) << (F + J)) | (256'(J) << F));
      return r;
    end
    if (za || ib) begin
      r.res = 128'(256'(s) << (E + F + J));
      return r;
    end
    r.bypass = 0;
    ma = fa | (one << F);
    mb = fb_ | (one << F);
    e = ea - eb + bias;
    num = ma << (F + 2);
    q = num / mb;
    rem = num % mb;
    if (q >= (one << (F + 2))) begin
      sig = q >> 2; rbit = q[1]; sbit = q[0] || (rem != 0);
    end else begin
      sig = q >> 1; rbit = q[0]; sbit = (rem != 0);
      e = e - 1; r.norm = 1;
    end
    case (rm)
      RM_RNE: inc = rbit && (sbit || sig[0]);
      RM_RTZ: inc = 0;
      RM_RUP: inc = !s && (rbit || sbit);
      default: inc = s && (rbit || sbit);
    endcase
    sig = sig + 256'(inc);
    if (sig == (one << (F + 1))) begin
      sig = sig >> 1; e = e + 1; r.carry = 1;
    end
    r.fl.nx = rbit || sbit;
    if (e >= emax) begin
      r.fl.of = 1; r.fl.nx = 1;
      if (rm == RM_RTZ || (rm == RM_RUP && s) || (rm == RM_RDN && !s))
        r.res = 128'((256'(s) << (E + F + J)) | (256'(emax - 1) << (F + J)) | (256'(J) << F) | ((one << F) - 1));
      else
        r.res = 128'((256'(s) << (E + F + J)) | (256'(emax) << (F + J)) | (256'(J) << F));
    end else if (e <= 0) begin
      r.fl.uf = 1; r.fl.nx = 1;
      r.res = 128'(256'(s) << (E + F + J));
    end else begin
      r.res = 128'((256'(s) << (E + F + J)) | (256'(e) << (F + J)) | (256'(J) << F) | (sig & ((one << F) - 1)));
    end
    return r;
  endfunction

  // Random operand of a format: mostly normal numbers with exponents near the
  // bias, some with any exponent, some special values.
  function automatic logic [127:0] rand_operand(fmt_e fmt);
    int E, F, J, bias, emax, sel, e;
    logic [255:0] one, f;
    bit s;
    E = fmt_ebits(fmt); F = fmt_fbits(fmt); J = (fmt == FMT_EXT) ? 1 : 0;
    bias = (1 << (E - 1)) - 1; emax = (1 << E) - 1;
    one = 256'd1;
    for (int i = 0; i < 256; i += 32) f[i +: 32] = $urandom;
    f = f & ((one << F) - 1);
    s = 1'($urandom_range(0, 1));
    sel = $urandom_range(0, 99);
    if (sel < 70)      e = bias - 4 + $urandom_range(0, 8);
    else if (sel < 88) e = $urandom_range(1, emax - 1);
    else if (sel < 91) begin e = 0; f = 0; end                 // zero
    else if (sel < 93) e = 0;                                  // denormal
    else if (sel < 95) begin e = emax; f = 0; end              // infinity
    else if (sel < 97) begin e = emax; f[F-1] = 1; end         // quiet NaN
    else if (sel < 98) begin e = emax; f[F-1] = 0; f[0] = 1; end // signalling NaN
    else               begin e = $urandom_range(1, emax - 1); f = (one << F) - 1; end
    return 128'((256'(s) << (E + F + J)) | (256'(e) << (F + J)) |
                (256'(J != 0 && e != 0) << F) | f);
  endfunction

endpackage

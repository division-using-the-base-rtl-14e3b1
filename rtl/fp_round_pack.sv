// fp_round_pack: normalization, rounding and packing of the quotient.
//
// Input is the scaled quotient x/(4d) from the mantissa divider (binary point
// above bit QW-1) and the sticky bit of its remainder. Since x/d lies in
// (1/2, 2), the leading one is at bit QW-2 (x/d >= 1) or QW-3; in the second
// case the significand is shifted one place left and the exponent decremented.
// The p-bit significand of the selected format is then rounded with its round
// bit and sticky bit according to the rounding mode. A rounding carry out of
// the significand (value exactly 2) is renormalized by a right shift and an
// exponent increment. Following the document, the three possible exponents
// ec-1, ec, ec+1 come in precomputed and are only selected here.
//
// Out-of-range exponents: overflow gives infinity or the largest finite
// number depending on the rounding direction (IEEE 754). Denormalized results
// are not produced, as the document allows: a result whose exponent after
// rounding is below the normal range is flushed to a signed zero and raises
// underflow and inexact (this design's choice).
//
// When `bypass` is set, the special result class `kind` (zero, infinity,
// quiet NaN) is packed instead; NaN results are the default quiet NaN.
//
// The result is right-aligned in a 128-bit container. Combinational.
module fp_round_pack
  import fpdiv_pkg::*;
(
  input  fmt_e                  fmt,
  input  rm_e                   rm,
  input  logic                  bypass,
  input  spec_e                 kind,
  input  logic                  sign,
  input  logic signed [XW-1:0]  ec_m1,
  input  logic signed [XW-1:0]  ec,
  input  logic signed [XW-1:0]  ec_p1,
  input  logic [QW-1:0]         q,
  input  logic                  sticky_in,
  output logic [127:0]          result,
  output logic                  of,
  output logic                  uf,
  output logic                  nx,
  output logic                  norm_shift,   // left normalization was needed
  output logic                  round_carry   // rounding carried to 2.0
);

  localparam int MB = QW - 1;   // normalized significand: 1 integer + MB-1 fraction bits

  int unsigned           fb;     // stored fraction bits
  logic [14:0]           emax;   // all-ones exponent
  logic [MB-1:0]         m;      // normalized significand, integer bit at MB-1
  logic [MB-1:0]         sig;    // p-bit significand, right-aligned
  logic [MB-1:0]         sig_r;  // after rounding increment
  logic [MB-1:0]         lowmask;
  logic                  rbit, sbit, inc;
  logic signed [XW-1:0]  e;
  logic [14:0]           e_out;
  logic [111:0]          f_out;  // fraction field, right-aligned

  always_comb begin
    fb   = fmt_fbits(fmt);
    emax = 15'((1 << fmt_ebits(fmt)) - 1);

    // normalization
    norm_shift = !q[QW-2];
    m = norm_shift ? {q[QW-3:0], 1'b0} : q[QW-2:0];

    // round bit and sticky bit
    sig     = m >> (MB - 1 - fb);
    rbit    = m[MB - 2 - fb];
    lowmask = (MB'(1) << (MB - 2 - fb)) - MB'(1);
    sbit    = ((m & lowmask) != '0) || sticky_in;

    unique case (rm)
      RM_RNE:  inc = rbit && (sbit || sig[0]);
      RM_RTZ:  inc = 1'b0;
      RM_RUP:  inc = !sign && (rbit || sbit);
      default: inc = sign && (rbit || sbit);
    endcase
    sig_r = sig + MB'(inc);
    round_carry = sig_r[fb + 1];
    if (round_carry) sig_r = sig_r >> 1;

    // exponent selection from the precomputed candidates
    unique case ({norm_shift, round_carry})
      2'b10:   e = ec_m1;
      2'b01:   e = ec_p1;
      default: e = ec;
    endcase

    of = 1'b0;
    uf = 1'b0;
    nx = rbit || sbit;
    e_out = e[14:0];
    f_out = 112'(sig_r) & ((112'(1) << fb) - 112'(1));

    if (bypass) begin
      nx = 1'b0;
      unique case (kind)
        SP_INF:  begin e_out = emax; f_out = '0; end
        SP_NAN:  begin e_out = emax; f_out = 112'(1) << (fb - 1); end
        default: begin e_out = '0;   f_out = '0; end
      endcase
    end else if (e >= $signed({3'd0, emax})) begin
      of = 1'b1;
      nx = 1'b1;
      if (rm == RM_RTZ || (rm == RM_RUP && sign) || (rm == RM_RDN && !sign)) begin
        e_out = emax - 15'd1;                           // largest finite
        f_out = (112'(1) << fb) - 112'(1);
      end else begin
        e_out = emax;                                   // infinity
        f_out = '0;
      end
    end else if (e <= 0) begin
      uf = 1'b1;
      nx = 1'b1;
      e_out = '0;
      f_out = '0;
    end

    // packing; the 80-bit format stores its integer bit explicitly
    unique case (fmt)
      FMT_HALF:   result = 128'({sign, e_out[4:0],  f_out[9:0]});
      FMT_SINGLE: result = 128'({sign, e_out[7:0],  f_out[22:0]});
      FMT_DOUBLE: result = 128'({sign, e_out[10:0], f_out[51:0]});
      FMT_EXT:    result = 128'({sign, e_out[14:0], (e_out != '0), f_out[62:0]});
      default:    result = {sign, e_out[14:0], f_out[111:0]};
    endcase
  end

endmodule

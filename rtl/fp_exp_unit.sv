// fp_exp_unit: order (exponent) processing of the divider.
//
// Forms the preliminary biased exponent of the quotient,
//   ec = (ea + bias) - (eb + bias) + bias,
// and, in parallel, its neighbours ec-1 and ec+1. The normalization/rounding
// stage later only selects one of the three: ec-1 when the quotient needs the
// one-bit left normalization shift, ec+1 when rounding carries the significand
// up to 2, and ec otherwise (or when both happen). Precomputing the
// neighbours while the significands are being divided follows the document;
// the three-way split is this design's reading of it.
//
// Exponents are XW-bit signed, so under- and overflowing values stay visible.
// Combinational.
module fp_exp_unit
  import fpdiv_pkg::*;
(
  input  fmt_e                  fmt,
  input  logic [14:0]           ea,     // biased exponent field of a
  input  logic [14:0]           eb,     // biased exponent field of b
  output logic signed [XW-1:0]  ec,
  output logic signed [XW-1:0]  ec_m1,
  output logic signed [XW-1:0]  ec_p1
);

  logic signed [XW-1:0] bias;

  always_comb begin
    bias  = XW'(fmt_bias(fmt));
    ec    = $signed({3'd0, ea}) - $signed({3'd0, eb}) + bias;
    ec_m1 = ec - XW'(1);
    ec_p1 = ec + XW'(1);
  end

endmodule

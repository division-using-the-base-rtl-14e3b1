// fp_special: exception handling for c = a / b.
//
// Looks at the operand classes delivered by the unpackers and decides whether
// the result can be formed without dividing significands. If so, `bypass` is
// set and `kind` says which result goes straight to the packer: a quiet NaN,
// a signed infinity or a signed zero. The rules are those of IEEE 754 for
// division:
//   NaN operand              -> NaN (invalid if either NaN is signalling)
//   0/0, inf/inf             -> NaN, invalid
//   x/0 (x finite, nonzero)  -> inf, division by zero
//   inf/finite               -> inf
//   0/finite, finite/inf     -> zero
// The sign of an infinite or zero result is sign(a) xor sign(b).
//
// Combinational.
module fp_special
  import fpdiv_pkg::*;
(
  input  unpacked_t ua,
  input  unpacked_t ub,
  output logic      bypass,
  output spec_e     kind,
  output logic      sign,
  output logic      nv,     // invalid operation
  output logic      dz      // division by zero
);

  always_comb begin
    bypass = 1'b1;
    kind   = SP_ZERO;
    sign   = ua.sign ^ ub.sign;
    nv     = 1'b0;
    dz     = 1'b0;
    if (ua.nan || ub.nan) begin
      kind = SP_NAN;
      sign = 1'b0;
      nv   = ua.snan || ub.snan;
    end else if ((ua.zero && ub.zero) || (ua.inf && ub.inf)) begin
      kind = SP_NAN;
      sign = 1'b0;
      nv   = 1'b1;
    end else if (ua.inf) begin
      kind = SP_INF;
    end else if (ub.zero) begin
      kind = SP_INF;
      dz   = 1'b1;
    end else if (ua.zero || ub.inf) begin
      kind = SP_ZERO;
    end else begin
      bypass = 1'b0;
    end
  end

endmodule

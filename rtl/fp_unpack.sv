// fp_unpack: operand unpacking for the floating-point divider.
//
// Cuts the sign, the biased exponent and the stored fraction out of a 128-bit
// operand container according to the selected format (the operand sits in the
// low bits), restores the hidden integer bit and left-aligns the significand
// in the internal MW = 113-bit field, so that every format looks like a quad
// significand to the rest of the datapath. It also classifies the operand as
// zero, infinity or NaN (quiet or signalling).
//
// Following the document, denormalized operands are not supported: an operand
// with a zero exponent field is treated as a signed zero (flush to zero), a
// design choice. For the 80-bit format the explicit integer bit is not
// checked: it is assumed to agree with the exponent field (this design's
// choice; "unnormal" encodings are read as normal numbers).
//
// Purely combinational, no clock.
module fp_unpack
  import fpdiv_pkg::*;
(
  input  fmt_e        fmt,
  input  logic [127:0] op,
  output unpacked_t   u
);

  logic [14:0]  e;      // biased exponent field, zero-extended
  logic [14:0]  emax;   // all-ones exponent of the format
  logic [111:0] frac;   // fraction, left-aligned to 112 bits
  logic         s;

  always_comb begin
    unique case (fmt)
      FMT_HALF: begin
        s = op[15];  e = {10'd0, op[14:10]};  emax = 15'h001F;
        frac = {op[9:0], 102'd0};
      end
      FMT_SINGLE: begin
        s = op[31];  e = {7'd0, op[30:23]};   emax = 15'h00FF;
        frac = {op[22:0], 89'd0};
      end
      FMT_DOUBLE: begin
        s = op[63];  e = {4'd0, op[62:52]};   emax = 15'h07FF;
        frac = {op[51:0], 60'd0};
      end
      FMT_EXT: begin
        s = op[79];  e = op[78:64];           emax = 15'h7FFF;
        frac = {op[62:0], 49'd0};
      end
      default: begin
        s = op[127]; e = op[126:112];         emax = 15'h7FFF;
        frac = op[111:0];
      end
    endcase
  end

  always_comb begin
    u.sign = s;
    u.exp  = e;
    u.zero = (e == 15'd0);
    u.inf  = (e == emax) && (frac == '0);
    u.nan  = (e == emax) && (frac != '0);
    u.snan = u.nan && !frac[111];
    u.man  = u.zero ? '0 : {1'b1, frac};
  end

endmodule

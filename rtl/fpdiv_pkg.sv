// fpdiv_pkg: types and constants shared by the radix-16 floating-point divider.
//
// The divider handles the five IEEE 754 binary interchange/extended formats
// (half, single, double, x87 double-extended and quad). Internally every
// significand is left-aligned in a quad-width field of MW = 113 bits with the
// integer ("hidden") bit at position MW-1, so one datapath serves all formats;
// the format only changes where fields are cut out and how many radix-16
// quotient digits are produced.
//
// The per-format numbers (field widths, bias) are the IEEE 754 ones. The digit
// count per format, ceil((p+3)/4) for a p-bit significand, is this design's
// choice: it gives p quotient bits, a round bit and one bit of normalization
// slack from the scaled quotient x/(4d).
package fpdiv_pkg;

  // Operand format selector.
  typedef enum logic [2:0] {
    FMT_HALF   = 3'd0,   // binary16
    FMT_SINGLE = 3'd1,   // binary32
    FMT_DOUBLE = 3'd2,   // binary64
    FMT_EXT    = 3'd3,   // 80-bit double extended, explicit integer bit
    FMT_QUAD   = 3'd4    // binary128
  } fmt_e;

  // IEEE 754 rounding-direction attributes.
  typedef enum logic [1:0] {
    RM_RNE = 2'd0,       // to nearest, ties to even
    RM_RTZ = 2'd1,       // toward zero
    RM_RUP = 2'd2,       // toward +infinity
    RM_RDN = 2'd3        // toward -infinity
  } rm_e;

  // Class of a result that bypasses the mantissa divider.
  typedef enum logic [1:0] {
    SP_ZERO = 2'd0,
    SP_INF  = 2'd1,
    SP_NAN  = 2'd2
  } spec_e;

  localparam int MW       = 113;          // internal significand width (quad p)
  localparam int XW       = 18;           // signed internal exponent width
  localparam int NDIG_MAX = 29;           // radix-16 digits for quad
  localparam int QW       = 4 * NDIG_MAX; // quotient bits delivered by the divider

  // IEEE exception flags.
  typedef struct packed {
    logic nv;   // invalid operation
    logic dz;   // division by zero
    logic of;   // overflow
    logic uf;   // underflow
    logic nx;   // inexact
  } flags_t;

  // Unpacked operand.
  typedef struct packed {
    logic          sign;
    logic [14:0]   exp;    // biased exponent field
    logic [MW-1:0] man;    // significand, integer bit at MW-1, left-aligned
    logic          zero;   // +-0 (also denormals, which are flushed)
    logic          inf;
    logic          nan;
    logic          snan;   // signalling NaN
  } unpacked_t;

  // Exponent field width.
  function automatic int unsigned fmt_ebits(fmt_e f);
    case (f)
      FMT_HALF:   return 5;
      FMT_SINGLE: return 8;
      FMT_DOUBLE: return 11;
      default:    return 15;
    endcase
  endfunction

  // Stored fraction width (explicit integer bit of FMT_EXT not counted).
  function automatic int unsigned fmt_fbits(fmt_e f);
    case (f)
      FMT_HALF:   return 10;
      FMT_SINGLE: return 23;
      FMT_DOUBLE: return 52;
      FMT_EXT:    return 63;
      default:    return 112;
    endcase
  endfunction

  // Exponent bias, 2^(E-1)-1.
  function automatic int unsigned fmt_bias(fmt_e f);
    return (1 << (fmt_ebits(f) - 1)) - 1;
  endfunction

  // Radix-16 iterations: ceil((p+3)/4) with p = fbits+1.
  function automatic int unsigned fmt_ndig(fmt_e f);
    case (f)
      FMT_HALF:   return 4;
      FMT_SINGLE: return 7;
      FMT_DOUBLE: return 14;
      FMT_EXT:    return 17;
      default:    return 29;
    endcase
  endfunction

endpackage

// r16_qsel: quotient-digit prediction logic of the radix-16 divider.
//
// The partial remainder is kept in carry-save form (sum + carry vectors).
// This block receives the top 9 bits (7 integer incl. sign, 2 fraction) of
// both vectors of the shifted remainder y = 16*w[j] and adds them with a short
// carry-propagate adder (CPA). Its carry-in of one unit (1/4) centres the
// truncation error of the two vectors, so the estimate y_hat is within 1/4 of
// y. The divisor enters as d_hat, its two leading hexadecimal digits
// (1 integer + 7 fraction bits).
//
// The digit is q = q_h + q_l with q_h in {0,+-4,+-8} and q_l in
// {0,+-1,+-2,+-4}: every multiple of d is then a plain shift, and two
// carry-save adders suffice. The sum covers {-12,-10..10,12}; +-11 is missing.
// Two combinational circuits work side by side, as in the document:
//   CS_h looks only at the five most significant bits of y_hat (a bucket of
//        width 4) and picks q_h from the bucket's midpoint m:
//        |m| >= 6 d_hat -> 8, |m| >= 2 d_hat -> 4, else 0, with the sign of m;
//   CS_l uses the whole estimate: for each of the five possible q_h it forms
//        y_hat - q_h*d_hat in parallel and picks the nearest q_l (ties to the
//        smaller magnitude); the q_h of CS_h then selects one of the five.
// Correction: when |y_hat| >= 12.5 d_hat the remainder is out of range, which
// happens after a digit that was one step off (no 11, or a coarse q_h). The
// same logic that predicts digit j thus detects the error of step j-1. The
// cycle then subtracts sign(y)*d from the unshifted remainder and adds sign(y)
// to the last quotient digit, reported as q_h = 0, q_l = +-1, `corr` = 1.
//
// Bounds (this design's analysis, checked exhaustively over all estimates and
// divisor intervals): after a digit |w| < 1.29 d, so |16 w| < 42 fits the 7
// integer bits; a correction is requested only for |w| > 0.76 d and leaves
// |w| < 0.29 d; without a request |w| < 0.8 d. On random operands about one
// correction occurs per 29-digit division. The split into CS_h and CS_l, the
// five-bit input of CS_h and the correction follow the document; the widths,
// thresholds and tie rules are this design's own. Combinational.
module r16_qsel (
  input  logic [8:0]         ys_top,  // top bits of 16*ws (two's complement)
  input  logic [8:0]         yc_top,  // top bits of 16*wc
  input  logic [7:0]         d_hat,   // 1.xxxxxxx, leading digits of d
  output logic signed [4:0]  qh,      // high component: 0, +-4, +-8
  output logic signed [4:0]  ql,      // low component: 0, +-1, +-2, +-4
  output logic               corr     // correction step requested
);

  logic signed [8:0]  y_hat;   // CPA result, 7.2 fixed point
  logic [8:0]         mag;
  logic [15:0]        dh;

  // Short CPA over the leading bits, carry-in 1 (= +1/4).
  assign y_hat = $signed(ys_top + yc_top + 9'd1);
  assign mag   = y_hat[8] ? 9'(-y_hat) : 9'(y_hat);
  assign dh    = {8'd0, d_hat};

  // Range check on the whole estimate: |y_hat| >= 12.5 d_hat.
  assign corr = ({1'b0, mag, 6'd0} >= 16'd25 * dh);

  // CS_h: five most significant bits of the estimate, bucket midpoint 4T+2.
  logic signed [4:0]  t5;
  logic signed [7:0]  mid;
  logic [7:0]         mid_mag;
  logic [15:0]        mid_abs;
  logic signed [4:0]  qh_sel;
  always_comb begin
    t5      = y_hat[8:4];
    mid     = 8'(4 * t5 + 2);
    mid_mag = mid[7] ? 8'(-mid) : 8'(mid);
    mid_abs = {1'b0, mid_mag, 7'd0};                 // |mid| in units of 2^-7
    if (mid_abs >= 16'd6 * dh)      qh_sel = 5'sd8;
    else if (mid_abs >= 16'd2 * dh) qh_sel = 5'sd4;
    else                            qh_sel = 5'sd0;
    if (mid < 0) qh_sel = -qh_sel;
  end

  // CS_l: nearest low component for each candidate q_h, in parallel.
  logic signed [4:0] ql_cand [5];
  always_comb begin
    for (int i = 0; i < 5; i++) begin
      logic signed [16:0] diff;
      logic [16:0]        a2;
      logic signed [4:0]  m;
      diff = 17'(32 * int'(y_hat)) - 17'((4 * i - 8) * int'(d_hat));   // (y_hat - q_h d_hat) * 2^7
      a2   = 17'((diff < 0 ? -diff : diff)) << 1;
      if (a2 > 17'(6 * int'(d_hat)))      m = 5'sd4;
      else if (a2 > 17'(3 * int'(d_hat))) m = 5'sd2;
      else if (a2 > 17'(int'(d_hat)))     m = 5'sd1;
      else                                m = 5'sd0;
      ql_cand[i] = (diff < 0) ? -m : m;
    end
  end

  logic signed [4:0] ql_sel;
  always_comb begin
    unique case (qh_sel)
      -5'sd8:  ql_sel = ql_cand[0];
      -5'sd4:  ql_sel = ql_cand[1];
      5'sd4:   ql_sel = ql_cand[3];
      5'sd8:   ql_sel = ql_cand[4];
      default: ql_sel = ql_cand[2];
    endcase
  end

  assign qh = corr ? 5'sd0 : qh_sel;
  assign ql = corr ? (y_hat[8] ? -5'sd1 : 5'sd1) : ql_sel;

endmodule

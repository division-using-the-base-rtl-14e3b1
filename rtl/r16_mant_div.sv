// r16_mant_div: mantissa division block, radix 16, carry-save remainder.
//
// Computes q = x / d for significands x, d in [1, 2) (integer bit at MW-1,
// formats narrower than quad are left-aligned and padded with zeros). The
// recurrence is the SRT one of radix r = 16,
//   w[0] = x/4,   w[j+1] = 16*w[j] - q_{j+1}*d,
// with the partial remainder w held as a sum and a carry vector, so that one
// iteration is a 4-bit shift and two rows of carry-save adders (one for the
// q_h*d multiple, one for q_l*d). Each iteration yields one radix-16 digit,
// i.e. four quotient bits. The digits come from r16_qsel; when it asks for a
// correction (the previous digit was one off: no 11, or a coarse q_h) it instead
// subtracts +-d from the unshifted remainder and adds +-1 to the quotient, so
// a division takes a few cycles more than the ideal digit count. qconv turns
// the digits into binary on the fly.
//
// After `ndig` digits one more look at the remainder either corrects it or
// finishes: a full-width add gives the exact sign and zero test of the final
// remainder; a negative remainder decrements the quotient by one unit and
// `sticky` tells whether the division was exact.
//
// Fixed point: w has 7 integer bits (incl. sign) and 114 fraction bits
// (W = 121), enough for |16*w| < 40. The 1/4 pre-scaling of x keeps the first
// remainder in range; the result q_out is x/(4d) with its binary point above
// bit QW-1, so bit QW-2 set means x/d >= 1.
//
// Interface and timing: `start` is taken in the idle state and loads x, d and
// ndig; then one cycle per digit plus one per correction, then one finishing
// cycle, after which `done` pulses for one cycle and q_out/sticky are valid
// until the next start: `done` rises ndig + 1 + (correction cycles) clock
// edges after the edge that takes `start`. `corr_step` marks the correction
// cycles. A `start` while busy is ignored.
// The radix, digit set, carry-save form and correction follow the document;
// the pre-scaling, widths, thresholds and finishing cycle are this design's.
module r16_mant_div
  import fpdiv_pkg::*;
#(
  parameter int MWD  = MW,          // significand width
  parameter int NMAX = NDIG_MAX     // largest digit count
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [4:0]          ndig,       // digits to produce, 1..NMAX
  input  logic [MWD-1:0]      x,          // dividend significand
  input  logic [MWD-1:0]      d,          // divisor significand
  output logic                busy,
  output logic                done,
  output logic [4*NMAX-1:0]   q_out,
  output logic                sticky,
  output logic                corr_step
);

  localparam int FB = MWD + 1;      // fraction bits of w: x/4
  localparam int W  = FB + 7;       // 7 integer bits incl. sign
  localparam int QB = 4 * NMAX;

  typedef enum logic {S_IDLE, S_ITER} state_e;
  state_e state;

  logic [W-1:0]   ws, wc;
  logic [MWD-1:0] d_r;
  logic [4:0]     cnt, nd_r;

  // Divisor and its shifted multiples in the fixed-point format of w.
  logic [W-1:0] dw;
  assign dw = W'({d_r, 2'b00});

  // Digit prediction on 16*w.
  logic [W-1:0]      ws16, wc16;
  logic signed [4:0] qh, ql;
  logic              corr;
  assign ws16 = {ws[W-5:0], 4'd0};
  assign wc16 = {wc[W-5:0], 4'd0};

  r16_qsel u_qsel (
    .ys_top (ws16[W-1 -: 9]),
    .yc_top (wc16[W-1 -: 9]),
    .d_hat  (d_r[MWD-1 -: 8]),
    .qh     (qh),
    .ql     (ql),
    .corr   (corr)
  );

  // Addends -q_h*d and -q_l*d (two's complement, +1 through the CSA cin).
  logic [W-1:0] mh, ml, addh, addl;
  logic         cinh, cinl;
  always_comb begin
    unique case (qh)
      5'sd4, -5'sd4: mh = dw << 2;
      5'sd8, -5'sd8: mh = dw << 3;
      default:       mh = '0;
    endcase
    unique case (ql)
      5'sd1, -5'sd1: ml = dw;
      5'sd2, -5'sd2: ml = dw << 1;
      5'sd4, -5'sd4: ml = dw << 2;
      default:       ml = '0;
    endcase
    addh = (qh > 0) ? ~mh : mh;
    cinh = (qh > 0);
    addl = (ql > 0) ? ~ml : ml;
    cinl = (ql > 0);
  end

  // Shift by one hex digit, except in a correction cycle.
  logic [W-1:0] ys, yc, s1, c1, s2, c2;
  assign ys = corr ? ws : ws16;
  assign yc = corr ? wc : wc16;

  csa #(.W(W)) u_csa_h (.a(ys), .b(yc), .c(addh), .cin(cinh), .s(s1), .cy(c1));
  csa #(.W(W)) u_csa_l (.a(s1), .b(c1), .c(addl), .cin(cinl), .s(s2), .cy(c2));

  // Quotient conversion.
  logic [QB-1:0] qacc;
  logic          q_en;
  logic          q_clear;
  qconv #(.W(QB)) u_qconv (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (q_clear),
    .en    (q_en),
    .shift (!corr),
    .digit (corr ? ql : (qh + ql)),
    .q     (qacc)
  );

  // Exact sign / zero of the final remainder.
  logic [W-1:0]  rem;
  logic          rem_neg;
  logic [QB-1:0] qfix;
  assign rem     = ws + wc;
  assign rem_neg = rem[W-1];
  assign qfix    = qacc - QB'(rem_neg);

  logic finishing;
  assign finishing = (state == S_ITER) && !corr && (cnt == 5'd0);
  assign q_clear   = (state == S_IDLE) && start;
  assign q_en      = (state == S_ITER) && (corr || cnt != 5'd0);
  assign corr_step = (state == S_ITER) && corr;
  assign busy      = (state == S_ITER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ws     <= '0;
      wc     <= '0;
      d_r    <= '0;
      cnt    <= '0;
      nd_r   <= '0;
      done   <= 1'b0;
      q_out  <= '0;
      sticky <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ws    <= W'(x);             // x/4 with FB fraction bits
          wc    <= '0;
          d_r   <= d;
          cnt   <= ndig;
          nd_r  <= ndig;
          state <= S_ITER;
        end
        S_ITER: begin
          if (corr || cnt != 5'd0) begin
            ws <= s2;
            wc <= c2;
            if (!corr) cnt <= cnt - 5'd1;
          end
          if (finishing) begin
            q_out  <= qfix << (4 * (NMAX - int'(nd_r)));
            sticky <= (rem != '0);
            done   <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The remainder estimate must stay inside the range the selection was
  // designed for: |16 w| < 44, far from the 7-bit integer limit of 64.
  logic [8:0] est;
  assign est = ws16[W-1 -: 9] + wc16[W-1 -: 9] + 9'd1;
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_ITER) |-> ($signed(est) < 9'sd176 && $signed(est) > -9'sd176));

  // The divisor must be normalized and the digit count in range.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_IDLE && start) |-> (d[MWD-1] && ndig != 0 && int'(ndig) <= NMAX));

endmodule

// fpdiv_top: reconfigurable IEEE 754 floating-point divider, c = a / b.
//
// One datapath divides operands of any of the five IEEE 754 binary formats
// (half, single, double, 80-bit double extended, quad), chosen per operation
// by `fmt`. The structure is the classic one:
//   unpack (two fp_unpack)  ->  exception check (fp_special)
//     -> exponent processing (fp_exp_unit, ec and ec+-1 in parallel)
//     -> significand division, radix 16, carry-save (r16_mant_div)
//     -> normalization, rounding, packing (fp_round_pack)
// Exceptional operands (zero, infinity, NaN) bypass the significand divider
// and go straight to the packer.
//
// Interface: operands are right-aligned in 128-bit containers; the result is
// returned the same way. `start` is accepted when `busy` is low. `done`
// pulses for one cycle with `result` and `flags` valid; they hold until the
// next operation ends. Denormalized operands are read as zero and tiny
// results are flushed to zero, as the document permits; all four IEEE
// rounding directions are supported (`rm`).
//
// Timing: `done` rises L clock edges after the edge that accepts `start`,
// L = 2 for bypassed operations and L = N + 3 + (correction cycles) for
// divisions, N being the radix-16 digit count of the format: 4, 7, 14, 17,
// 29 for half, single, double, extended, quad. The operand register stage,
// the state machine and the exact cycle counts are this design's own.
// Bypassed results pass through the packer in state S_PACK; divided results
// are rounded and packed as soon as the divider is done, without a separate
// rounding cycle, as the document suggests.
// A `start` pulse while `busy` is high is ignored. The status outputs of the
// submodules (divider busy and correction strobe, normalization and rounding
// carry indications) are not used at this level; lint reports them as unused.
// The reset is asynchronous; the divider's assertions also use it to
// disable themselves, which lint notes as a mixed use.
module fpdiv_top
  import fpdiv_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  fmt_e          fmt,
  input  rm_e           rm,
  input  logic [127:0]  a,
  input  logic [127:0]  b,
  output logic          busy,
  output logic          done,
  output logic [127:0]  result,
  output flags_t        flags
);

  typedef enum logic [1:0] {S_IDLE, S_DECODE, S_DIV, S_PACK} state_e;
  state_e state;

  // operand registers
  fmt_e         fmt_r;
  rm_e          rm_r;
  logic [127:0] a_r, b_r;

  // unpacking and exception check
  unpacked_t ua, ub;
  logic      sp_bypass, sp_sign, sp_nv, sp_dz;
  spec_e     sp_kind;

  fp_unpack u_unpack_a (.fmt(fmt_r), .op(a_r), .u(ua));
  fp_unpack u_unpack_b (.fmt(fmt_r), .op(b_r), .u(ub));

  fp_special u_special (
    .ua(ua), .ub(ub), .bypass(sp_bypass), .kind(sp_kind),
    .sign(sp_sign), .nv(sp_nv), .dz(sp_dz)
  );

  // exponent processing
  logic signed [XW-1:0] ec, ec_m1, ec_p1;
  logic signed [XW-1:0] ec_r, ec_m1_r, ec_p1_r;

  fp_exp_unit u_exp (
    .fmt(fmt_r), .ea(ua.exp), .eb(ub.exp), .ec(ec), .ec_m1(ec_m1), .ec_p1(ec_p1)
  );

  // significand division
  logic          md_start, md_busy, md_done, md_sticky, md_corr;
  logic [QW-1:0] md_q;

  assign md_start = (state == S_DECODE) && !sp_bypass;

  r16_mant_div u_mdiv (
    .clk(clk), .rst_n(rst_n), .start(md_start), .ndig(5'(fmt_ndig(fmt_r))),
    .x(ua.man), .d(ub.man), .busy(md_busy), .done(md_done),
    .q_out(md_q), .sticky(md_sticky), .corr_step(md_corr)
  );

  // normalization, rounding, packing
  logic   byp_r, sign_r, nv_r, dz_r;
  spec_e  kind_r;
  logic [127:0] rp_result;
  logic   rp_of, rp_uf, rp_nx, rp_norm, rp_carry;

  fp_round_pack u_rpack (
    .fmt(fmt_r), .rm(rm_r), .bypass(byp_r), .kind(kind_r), .sign(sign_r),
    .ec_m1(ec_m1_r), .ec(ec_r), .ec_p1(ec_p1_r), .q(md_q), .sticky_in(md_sticky),
    .result(rp_result), .of(rp_of), .uf(rp_uf), .nx(rp_nx),
    .norm_shift(rp_norm), .round_carry(rp_carry)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      fmt_r   <= FMT_SINGLE;
      rm_r    <= RM_RNE;
      a_r     <= '0;
      b_r     <= '0;
      ec_r    <= '0;
      ec_m1_r <= '0;
      ec_p1_r <= '0;
      byp_r   <= 1'b0;
      kind_r  <= SP_ZERO;
      sign_r  <= 1'b0;
      nv_r    <= 1'b0;
      dz_r    <= 1'b0;
      done    <= 1'b0;
      result  <= '0;
      flags   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          fmt_r <= fmt;
          rm_r  <= rm;
          a_r   <= a;
          b_r   <= b;
          state <= S_DECODE;
        end
        S_DECODE: begin
          ec_r    <= ec;
          ec_m1_r <= ec_m1;
          ec_p1_r <= ec_p1;
          byp_r   <= sp_bypass;
          kind_r  <= sp_kind;
          sign_r  <= sp_sign;
          nv_r    <= sp_nv;
          dz_r    <= sp_dz;
          state   <= sp_bypass ? S_PACK : S_DIV;
        end
        // rounding and packing take place in the cycle in which the
        // significand divider reports its result
        S_DIV, S_PACK: if (state == S_PACK || md_done) begin
          result <= rp_result;
          flags  <= '{nv: nv_r, dz: dz_r, of: rp_of, uf: rp_uf, nx: rp_nx};
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

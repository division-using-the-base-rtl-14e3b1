// tb_fp_round_pack: checks normalization, rounding and packing.
//
// Random quotients (leading one at either of its two possible positions),
// sticky bits, exponents around and beyond the normal range, formats, signs
// and rounding modes are applied; the expected packed result and flags are
// computed with wide-integer arithmetic in the testbench. Quotients made of
// all ones force the rounding carry to 2.0, which must occur. Bypassed
// special results (zero, infinity, NaN) are checked as well.
module tb_fp_round_pack;
  import fpdiv_pkg::*;

  fmt_e  fmt = FMT_HALF;
  rm_e   rm = RM_RNE;
  logic  bypass = 1'b0, sign = 1'b0, sticky_in = 1'b0;
  spec_e kind = SP_ZERO;
  logic signed [XW-1:0] ec_m1, ec, ec_p1;
  logic [QW-1:0] q = '0;
  logic [127:0] result;
  logic of, uf, nx, norm_shift, round_carry;
  int checks = 0, failures = 0, n_carry = 0, n_norm = 0, n_of = 0, n_uf = 0;

  fp_round_pack dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int E, F, J, emax, lead, drop, e, ecv;
    logic [255:0] one, qq, sig, res;
    bit rbit, sbit, inc, eof, euf, enx, carry;
    one = 256'd1;
    for (int i = 0; i < 20000; i++) begin
      fmt = fmt_e'($urandom_range(0, 4));
      rm  = rm_e'($urandom_range(0, 3));
      sign = 1'($urandom);
      sticky_in = 1'($urandom);
      E = fmt_ebits(fmt); F = fmt_fbits(fmt); J = (fmt == FMT_EXT) ? 1 : 0;
      emax = (1 << E) - 1;
      lead = ($urandom_range(0, 1) != 0) ? QW - 2 : QW - 3;
      for (int k = 0; k < QW; k += 32) q[k +: 32] = $urandom;
      if (i % 10 == 0) q = '1;                  // all ones: rounding carry
      q = q & ((QW'(1) << lead) - QW'(1));
      q[lead] = 1'b1;
      case ($urandom_range(0, 9))
        0:       ecv = $urandom_range(0, 3) - 1;
        1:       ecv = emax - 2 + $urandom_range(0, 3);
        default: ecv = $urandom_range(1, emax - 1);
      endcase
      ec = XW'(ecv); ec_m1 = XW'(ecv - 1); ec_p1 = XW'(ecv + 1);
      bypass = ($urandom_range(0, 19) == 0);
      kind = spec_e'($urandom_range(0, 2));
      #1;
      // reference
      qq = 256'(q);
      drop = lead - F;
      sig = qq >> drop;
      rbit = qq[drop - 1];
      sbit = ((qq & ((one << (drop - 1)) - 1)) != 0) || sticky_in;
      e = (lead == QW - 2) ? ecv : ecv - 1;
      case (rm)
        RM_RNE: inc = rbit && (sbit || sig[0]);
        RM_RTZ: inc = 0;
        RM_RUP: inc = !sign && (rbit || sbit);
        default: inc = sign && (rbit || sbit);
      endcase
      sig = sig + 256'(inc);
      carry = (sig == (one << (F + 1)));
      if (carry) begin sig = sig >> 1; e = e + 1; end
      eof = 0; euf = 0; enx = rbit || sbit;
      if (bypass) begin
        enx = 0;
        case (kind)
          SP_INF:  res = (256'(sign) << (E+F+J)) | (256'(emax) << (F+J)) | (256'(J) << F);
          SP_NAN:  res = (256'(sign) << (E+F+J)) | (256'(emax) << (F+J)) | (256'(J) << F) | (one << (F-1));
          default: res = (256'(sign) << (E+F+J));
        endcase
      end else if (e >= emax) begin
        eof = 1; enx = 1;
        if (rm == RM_RTZ || (rm == RM_RUP && sign) || (rm == RM_RDN && !sign))
          res = (256'(sign) << (E+F+J)) | (256'(emax-1) << (F+J)) | (256'(J) << F) | ((one << F) - 1);
        else
          res = (256'(sign) << (E+F+J)) | (256'(emax) << (F+J)) | (256'(J) << F);
      end else if (e <= 0) begin
        euf = 1; enx = 1;
        res = 256'(sign) << (E+F+J);
      end else
        res = (256'(sign) << (E+F+J)) | (256'(e) << (F+J)) | (256'(J) << F) | (sig & ((one << F) - 1));
      checks++;
      if (result != 128'(res) || of != eof || uf != euf || nx != enx ||
          (!bypass && (round_carry != carry || norm_shift != (lead == QW - 3)))) begin
        failures++;
        if (failures < 10) $display("MISMATCH fmt=%0d rm=%0d byp=%b q=%h ec=%0d got=%h %b%b%b exp=%h %b%b%b",
                                    fmt, rm, bypass, q, ecv, result, of, uf, nx, 128'(res), eof, euf, enx);
      end
      if (!bypass) begin
        n_carry += carry; n_norm += (lead == QW - 3); n_of += eof; n_uf += euf;
      end
    end
    checks++;
    if (n_carry == 0 || n_norm == 0 || n_of == 0 || n_uf == 0) begin
      failures++;
      $display("mechanism missing: carry=%0d norm=%0d of=%0d uf=%0d", n_carry, n_norm, n_of, n_uf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fp_unpack: checks operand unpacking for all five formats.
//
// Random operands (normal, zero, denormal, infinity, quiet and signalling
// NaN) are built from their fields; the expected sign, exponent, left-aligned
// significand and class are derived from those fields directly.
module tb_fp_unpack;
  import fpdiv_pkg::*;
  import fpdiv_ref_pkg::*;

  fmt_e         fmt = FMT_HALF;
  logic [127:0] op = '0;
  unpacked_t    u;
  int checks = 0, failures = 0;

  fp_unpack dut (.fmt(fmt), .op(op), .u(u));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int E, F, J, e, emax;
    logic [255:0] f;
    bit s, zero, inf, nan, snan;
    logic [MW-1:0] man;
    for (int fi = 0; fi < 5; fi++) begin
      for (int i = 0; i < 3000; i++) begin
        fmt = fmt_e'(fi);
        op  = rand_operand(fmt);
        E = fmt_ebits(fmt); F = fmt_fbits(fmt); J = (fmt == FMT_EXT) ? 1 : 0;
        emax = (1 << E) - 1;
        f = 256'(op) & ((256'(1) << F) - 1);
        e = int'((256'(op) >> (F + J)) & ((256'(1) << E) - 1));
        s = op[E + F + J];
        zero = (e == 0);
        inf  = (e == emax) && (f == 0);
        nan  = (e == emax) && (f != 0);
        snan = nan && !f[F-1];
        man  = zero ? '0 : MW'((256'(1) << (MW - 1)) | (f << (MW - 1 - F)));
        #1;
        checks++;
        if (u.sign != s || int'(u.exp) != e || u.man != man || u.zero != zero ||
            u.inf != inf || u.nan != nan || u.snan != snan) begin
          failures++;
          if (failures < 10) $display("MISMATCH fmt=%0d op=%h", fi, op);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

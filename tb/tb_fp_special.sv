// tb_fp_special: checks the exception decision for every pair of operand
// classes (normal, zero, infinity, quiet NaN, signalling NaN) and both signs
// against the IEEE 754 division rules written out as a table.
module tb_fp_special;
  import fpdiv_pkg::*;

  unpacked_t ua, ub;
  logic  bypass, sign, nv, dz;
  spec_e kind;
  int checks = 0, failures = 0;

  fp_special dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // class: 0 normal, 1 zero, 2 inf, 3 qnan, 4 snan
  function automatic unpacked_t mk(int c, bit s);
    unpacked_t u;
    u = '0;
    u.sign = s;
    u.exp  = 15'd100;
    u.man  = {1'b1, 112'd0};
    u.zero = (c == 1);
    u.inf  = (c == 2);
    u.nan  = (c >= 3);
    u.snan = (c == 4);
    return u;
  endfunction

  initial begin
    // expected: bypass, kind, nv, dz indexed [ca][cb]
    static bit    eb[5][5] = '{'{0,1,1,1,1}, '{1,1,1,1,1}, '{1,1,1,1,1}, '{1,1,1,1,1}, '{1,1,1,1,1}};
    static spec_e ek[5][5] = '{'{SP_ZERO, SP_INF, SP_ZERO, SP_NAN, SP_NAN},
                        '{SP_ZERO, SP_NAN, SP_ZERO, SP_NAN, SP_NAN},
                        '{SP_INF,  SP_INF, SP_NAN,  SP_NAN, SP_NAN},
                        '{SP_NAN,  SP_NAN, SP_NAN,  SP_NAN, SP_NAN},
                        '{SP_NAN,  SP_NAN, SP_NAN,  SP_NAN, SP_NAN}};
    static bit    env[5][5] = '{'{0,0,0,0,1}, '{0,1,0,0,1}, '{0,0,1,0,1}, '{0,0,0,0,1}, '{1,1,1,1,1}};
    static bit    edz[5][5] = '{'{0,1,0,0,0}, '{0,0,0,0,0}, '{0,0,0,0,0}, '{0,0,0,0,0}, '{0,0,0,0,0}};
    for (int ca = 0; ca < 5; ca++)
      for (int cb = 0; cb < 5; cb++)
        for (int s = 0; s < 4; s++) begin
          ua = mk(ca, s[0]);
          ub = mk(cb, s[1]);
          #1;
          checks++;
          if (bypass != eb[ca][cb] || nv != env[ca][cb] || dz != edz[ca][cb] ||
              (eb[ca][cb] && kind != ek[ca][cb]) ||
              (eb[ca][cb] && ek[ca][cb] != SP_NAN && sign != (s[0] ^ s[1]))) begin
            failures++;
            $display("MISMATCH ca=%0d cb=%0d s=%0d: %b %0d %b %b", ca, cb, s, bypass, kind, nv, dz);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fp_exp_unit: checks the quotient exponent ea - eb + bias and its two
// neighbours for random exponent fields of every format.
module tb_fp_exp_unit;
  import fpdiv_pkg::*;

  fmt_e fmt = FMT_HALF;
  logic [14:0] ea = '0, eb = '0;
  logic signed [XW-1:0] ec, ec_m1, ec_p1;
  int checks = 0, failures = 0;
  int biases[5] = '{15, 127, 1023, 16383, 16383};
  int emaxs[5]  = '{31, 255, 2047, 32767, 32767};

  fp_exp_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x;
    for (int fi = 0; fi < 5; fi++)
      for (int i = 0; i < 2000; i++) begin
        fmt = fmt_e'(fi);
        ea = 15'($urandom_range(0, emaxs[fi]));
        eb = 15'($urandom_range(0, emaxs[fi]));
        #1;
        x = int'(ea) - int'(eb) + biases[fi];
        checks++;
        if (int'(ec) != x || int'(ec_m1) != x - 1 || int'(ec_p1) != x + 1) begin
          failures++;
          if (failures < 10) $display("MISMATCH fmt=%0d ea=%0d eb=%0d ec=%0d exp=%0d", fi, ea, eb, ec, x);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

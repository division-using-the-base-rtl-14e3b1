// tb_fpdiv_top: end-to-end test of the floating-point divider.
//
// Runs random and directed divisions in all five formats and all four
// rounding directions through fpdiv_top at its default parameters and
// compares result and flags with the integer reference model of
// fpdiv_ref_pkg. Double-precision round-to-nearest results are also checked
// against the simulator's own `real` division. The latency of every operation
// is checked (2 edges when bypassed, N + 3 + corrections otherwise), and the
// test counts how often each mechanism occurred: exception bypass,
// correction cycle, left normalization, overflow, underflow flush, a start
// pulse with other operands while busy (must be ignored), and each format. A mechanism that never occurred counts as a failure.
module tb_fpdiv_top;
  import fpdiv_pkg::*;
  import fpdiv_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  fmt_e         fmt = FMT_SINGLE;
  rm_e          rm = RM_RNE;
  logic [127:0] a = '0, b = '0;
  logic         busy, done;
  logic [127:0] result;
  flags_t       flags;

  int checks = 0, failures = 0;
  int n_ignored = 0, n_bypass = 0, n_corr = 0, n_norm = 0, n_of = 0, n_uf = 0, n_realchk = 0;
  int n_fmt[5] = '{0, 0, 0, 0, 0};

  fpdiv_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fmt_e f, input rm_e m, input logic [127:0] av, input logic [127:0] bv);
    ref_t exp;
    int cyc, nc, lat;
    fmt = f; rm = m; a = av; b = bv;
    @(negedge clk); start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    cyc = 0; nc = 0;
    while (!done && cyc < 200) begin
      // now and then a start pulse with other operands while busy: ignored
      if (busy && $urandom_range(0, 15) == 0) begin
        start = 1'b1; a = rand_operand(f); b = rand_operand(f);
        n_ignored++;
      end else start = 1'b0;
      @(posedge clk); #1;
      cyc++;
      if (dut.u_mdiv.corr_step) nc++;
    end
    start = 1'b0;
    exp = ref_div(f, m, av, bv);
    checks++;
    if (result !== exp.res || flags !== exp.fl) begin
      failures++;
      if (failures < 12)
        $display("MISMATCH fmt=%0d rm=%0d a=%h b=%h got=%h/%b exp=%h/%b",
                 f, m, av, bv, result, flags, exp.res, exp.fl);
    end
    lat = exp.bypass ? 2 : int'(fmt_ndig(f)) + 3 + nc;
    checks++;
    if (cyc != lat) begin
      failures++;
      if (failures < 12) $display("LATENCY fmt=%0d got=%0d exp=%0d", f, cyc, lat);
    end
    // independent check of binary64 round-to-nearest results
    if (f == FMT_DOUBLE && m == RM_RNE && !exp.bypass && !exp.fl.uf && !exp.fl.of) begin
      real ra, rb;
      logic [63:0] rr;
      ra = $bitstoreal(av[63:0]);
      rb = $bitstoreal(bv[63:0]);
      rr = $realtobits(ra / rb);
      checks++;
      n_realchk++;
      if (rr != result[63:0]) begin
        failures++;
        if (failures < 12) $display("REAL MISMATCH a=%h b=%h got=%h real=%h", av, bv, result, rr);
      end
    end
    n_bypass += exp.bypass;
    n_corr   += nc;
    n_norm   += exp.norm;
    n_of     += exp.fl.of;
    n_uf     += exp.fl.uf;
    n_fmt[int'(f)]++;
  endtask

  function automatic int need(string what, int n);
    $display("%-24s %0d", what, n);
    return (n == 0) ? 1 : 0;
  endfunction

  initial begin
    fmt_e f;
    rm_e  m;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int fi = 0; fi < 5; fi++) begin
      f = fmt_e'(fi);
      for (int mi = 0; mi < 4; mi++) begin
        m = rm_e'(mi);
        for (int i = 0; i < 1500; i++) run(f, m, rand_operand(f), rand_operand(f));
        // directed overflow and underflow: largest / smallest normal and back
        run(f, m, 128'((128'((1 << fmt_ebits(f)) - 2) << (fmt_fbits(f) + (f == FMT_EXT)))) |
                  (f == FMT_EXT ? (128'(1) << 63) : '0),
                  128'(128'(1) << (fmt_fbits(f) + (f == FMT_EXT))) | (f == FMT_EXT ? (128'(1) << 63) : '0) | 128'(5));
        run(f, m, 128'(128'(1) << (fmt_fbits(f) + (f == FMT_EXT))) | (f == FMT_EXT ? (128'(1) << 63) : '0) | 128'(3),
                  128'((128'((1 << fmt_ebits(f)) - 2) << (fmt_fbits(f) + (f == FMT_EXT)))) |
                  (f == FMT_EXT ? (128'(1) << 63) : '0));
      end
    end
    checks++;
    failures += need("starts ignored while busy", n_ignored);
    failures += need("bypassed operations", n_bypass);
    failures += need("correction cycles", n_corr);
    failures += need("left normalizations", n_norm);
    failures += need("overflows", n_of);
    failures += need("underflow flushes", n_uf);
    failures += need("real-division checks", n_realchk);
    for (int fi = 0; fi < 5; fi++) failures += need($sformatf("operations in format %0d", fi), n_fmt[fi]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

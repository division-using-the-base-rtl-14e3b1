// tb_r16_mant_div: self-checking test of the radix-16 mantissa divider.
//
// Divides random and corner-case significands for every digit count used by
// the five formats and compares the quotient and the sticky bit with an exact
// reference formed by wide integer division:
//   Q = floor(x * 16^N / (4 d)),  sticky = (remainder != 0).
// It also checks the latency, ndig + 2 + (number of correction cycles), and
// requires that correction cycles occurred.
module tb_r16_mant_div;
  import fpdiv_pkg::*;

  localparam int M = MW;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [4:0]    ndig = 5'd1;
  logic [M-1:0]  x = '0, d = '0;
  logic          busy, done, sticky, corr_step;
  logic [QW-1:0] q_out;

  int checks = 0, failures = 0, ncorr_total = 0;

  r16_mant_div dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [M-1:0] xv, input logic [M-1:0] dv, input int n);
    logic [255:0] num, den, qr, rr;
    logic [QW-1:0] got;
    int cyc, nc;
    x = xv; d = dv; ndig = 5'(n);
    @(negedge clk); start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    cyc = 0; nc = 0;
    while (!done) begin
      if (corr_step) nc++;
      @(posedge clk); #1;
      cyc++;
      if (cyc > 100) break;
    end
    num = 256'(xv) << (4 * n);
    den = 256'(dv) << 2;
    qr  = num / den;
    rr  = num % den;
    got = q_out >> (4 * (NDIG_MAX - n));
    checks++;
    if (256'(got) != qr || sticky != (rr != 0)) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH n=%0d x=%h d=%h got=%h exp=%h st=%b/%b", n, xv, dv, got, qr, sticky, rr != 0);
    end
    checks++;
    if (cyc != n + 1 + nc) begin
      failures++;
      if (failures < 10) $display("LATENCY n=%0d cyc=%0d corr=%0d", n, cyc, nc);
    end
    ncorr_total += nc;
  endtask

  function automatic logic [M-1:0] rnd_sig(input int p);
    logic [M-1:0] v;
    for (int i = 0; i < M; i += 32) v[i +: 32] = $urandom;
    v[M-1] = 1'b1;
    // keep only p significant bits, as for a p-bit format
    v = v & ~((M'(1) << (M - p)) - M'(1));
    return v;
  endfunction

  int ps[5] = '{11, 24, 53, 64, 113};
  int ns[5] = '{4, 7, 14, 17, 29};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int f = 0; f < 5; f++) begin
      // corner cases
      run({1'b1, {(M-1){1'b0}}}, {1'b1, {(M-1){1'b0}}}, ns[f]);
      run({M{1'b1}} & rnd_sig(ps[f]) | ~((M'(1) << (M - ps[f])) - 1'b1), {1'b1, {(M-1){1'b0}}}, ns[f]);
      run({1'b1, {(M-1){1'b0}}}, ~((M'(1) << (M - ps[f])) - 1'b1), ns[f]);
      for (int i = 0; i < 1500; i++) run(rnd_sig(ps[f]), rnd_sig(ps[f]), ns[f]);
      // quotients near 11/16-ths of a digit: d = 16/11-ish
      for (int i = 0; i < 300; i++) begin
        logic [M-1:0] dv;
        dv = rnd_sig(ps[f]);
        run(rnd_sig(ps[f]), dv, ns[f]);
      end
    end
    checks++;
    if (ncorr_total == 0) begin
      failures++;
      $display("no correction cycle was exercised");
    end
    $display("correction cycles: %0d", ncorr_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_r16_qsel: checks the radix-16 digit prediction exhaustively.
//
// For every 9-bit estimate sum and every divisor estimate 1.0000000 ..
// 1.1111111 (with the sum split randomly between the two carry-save inputs)
// the outputs are compared with the selection rule evaluated in real numbers:
//   y = (ys + yc + 1)/4, d = d_hat/128;
//   |y| >= 12.5 d            -> correction, q_h = 0, q_l = sign(y);
//   else m = 4*floor(y/4) + 2 (midpoint of the five-bit bucket),
//        q_h = sign(m) * (8 if |m| >= 6d, 4 if |m| >= 2d, else 0),
//        q_l = the member of {0,+-1,+-2,+-4} nearest to y/d - q_h, ties to
//        the smaller magnitude.
// It also counts how often each digit value and the correction occur: every
// digit of {-12,-10..10,12} must appear and +-11 never.
module tb_r16_qsel;

  logic [8:0] ys_top = '0, yc_top = '0;
  logic [7:0] d_hat = 8'h80;
  logic signed [4:0] qh, ql;
  logic corr;
  int checks = 0, failures = 0;
  int seen[25];
  int ncorr = 0;

  r16_qsel dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real y, d, m, t, best, dd;
    int eqh, eql, q, cand[7];
    bit ce;
    logic [8:0] sum, part;
    cand = '{0, 1, -1, 2, -2, 4, -4};
    foreach (seen[i]) seen[i] = 0;
    for (int dh = 128; dh < 256; dh++)
      for (int s = 0; s < 512; s++) begin
        sum = 9'(s);
        part = 9'($urandom);
        ys_top = part;
        yc_top = sum - part;
        d_hat = 8'(dh);
        #1;
        y = real'($signed(sum + 9'd1)) / 4.0;
        d = real'(dh) / 128.0;
        ce = (rabs(y) >= 12.5 * d);
        if (ce) begin
          eqh = 0;
          eql = (y < 0.0) ? -1 : 1;
        end else begin
          m = 4.0 * $floor(y / 4.0) + 2.0;
          eqh = (rabs(m) >= 6.0 * d) ? 8 : (rabs(m) >= 2.0 * d) ? 4 : 0;
          if (m < 0.0) eqh = -eqh;
          t = y / d - real'(eqh);
          best = 1.0e9;
          eql = 0;
          foreach (cand[i]) begin   // ordered by magnitude: first of equals wins
            dd = rabs(real'(cand[i]) - t);
            if (dd < best) begin best = dd; eql = cand[i]; end
          end
        end
        checks++;
        if (corr != ce || int'(qh) != eqh || int'(ql) != eql) begin
          failures++;
          if (failures < 10) $display("MISMATCH sum=%0d dh=%0d y=%f q=%0d+%0d corr=%b exp=%0d+%0d/%b",
                                      $signed(sum), dh, y, qh, ql, corr, eqh, eql, ce);
        end
        q = int'(qh) + int'(ql);
        if (corr) ncorr++;
        else seen[q + 12]++;
      end
    for (int v = -12; v <= 12; v++) begin
      checks++;
      if ((v == 11 || v == -11) ? (seen[v + 12] != 0) : (seen[v + 12] == 0)) begin
        failures++;
        $display("digit %0d seen %0d times", v, seen[v + 12]);
      end
    end
    checks++;
    if (ncorr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

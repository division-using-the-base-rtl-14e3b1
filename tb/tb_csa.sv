// tb_csa: checks that the carry-save adder row keeps the sum,
// a + b + c + cin == s + cy (mod 2^W), for random vectors at W = 121.
module tb_csa;
  localparam int W = 121;
  logic [W-1:0] a = '0, b = '0, c = '0, s, cy;
  logic cin = 1'b0;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      for (int k = 0; k < W; k += 32) begin
        a[k +: 32] = $urandom; b[k +: 32] = $urandom; c[k +: 32] = $urandom;
      end
      cin = 1'($urandom);
      #1;
      checks++;
      if (W'(a + b + c + W'(cin)) != W'(s + cy) || (s != (a ^ b ^ c))) begin
        failures++;
        if (failures < 10) $display("MISMATCH a=%h b=%h c=%h", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

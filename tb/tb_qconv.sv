// tb_qconv: checks the quotient accumulator. Random sequences of digits
// from {-12,-10..10,12}, interleaved with +-1 corrections, are applied and the
// register is compared after each step with sum(q_j 16^(n-j)) computed with
// wide integers.
module tb_qconv;
  localparam int W = 116;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, shift = 1'b0;
  logic signed [4:0] digit = '0;
  logic [W-1:0] q;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  qconv #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dv;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 200; run++) begin
      @(negedge clk); clear = 1'b1; en = 1'b0;
      @(negedge clk); clear = 1'b0;
      model = '0;
      checks++;
      if (q != '0) failures++;
      for (int j = 0; j < 29; j++) begin
        if ($urandom_range(0, 7) == 0) begin
          dv = ($urandom_range(0, 1) != 0) ? 1 : -1;
          shift = 1'b0;
          model = model + W'(dv);
        end else begin
          do dv = $urandom_range(0, 24) - 12; while (dv == 11 || dv == -11);
          shift = 1'b1;
          model = (model << 4) + W'(dv);
        end
        digit = 5'(dv);
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        checks++;
        if (q != model) begin
          failures++;
          if (failures < 10) $display("MISMATCH run=%0d j=%0d q=%h exp=%h", run, j, q, model);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

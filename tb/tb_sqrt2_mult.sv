// tb_sqrt2_mult -- checks the shift-and-add sqrt(2)/2 multiplier on every
// 17-bit input: the result must be within 1.5 LSB of a*0.7071068 (half an LSB of
// rounding plus the Q2.14 quantisation of the constant, 1.5e-5 relative).
module tb_sqrt2_mult;
  localparam int W = 17;
  logic signed [W-1:0] a = '0, y;
  sqrt2_mult #(.W(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int v = -(2**(W-1)); v < 2**(W-1); v++) begin
      real d;
      a = W'(v);
      #1;
      d = real'(y) - real'(v) * 0.70710678118654752;
      checks++;
      if (d > 1.5 || d < -1.5) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d y=%0d", v, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cmult -- checks the pipelined complex multiplier with random operands
// and random enable gaps. Each product must appear two enabled cycles after
// its operands and match round((a+jb)(c+jd)/2^14) within one LSB, saturated to 16 bits
// (random coefficients of magnitude up to sqrt(2) make saturation happen).
module tb_cmult;
  import fft_pkg::*;
  localparam int NV = 3000;

  logic clk = 0, rst_n = 0, en = 0;
  cplx_t x = '0, y;
  tw_t   w = '0;
  cmult dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t xs [NV];
  tw_t   ws [NV];

  initial begin
    int sent = 0;
    for (int i = 0; i < NV; i++) begin
      xs[i] = '{re: sample_t'($signed($urandom_range(40000)) - 20000),
                im: sample_t'($signed($urandom_range(40000)) - 20000)};
      ws[i] = '{re: coef_t'($signed($urandom_range(32768)) - 16384),
                im: coef_t'($signed($urandom_range(32768)) - 16384)};
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (sent < NV) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      x  = xs[sent];
      w  = ws[sent];
      @(posedge clk);
      if (en) begin
        sent++;
        #1;
        if (sent >= 2) begin
          int p;
          real er, ei;
          p  = sent - 2;
          er = (real'(xs[p].re) * ws[p].re - real'(xs[p].im) * ws[p].im) / 16384.0;
          ei = (real'(xs[p].im) * ws[p].re + real'(xs[p].re) * ws[p].im) / 16384.0;
          if (er > 32767.0) er = 32767.0;
          if (er < -32768.0) er = -32768.0;
          if (ei > 32767.0) ei = 32767.0;
          if (ei < -32768.0) ei = -32768.0;
          checks++;
          if (real'(y.re) - er > 1.0 || real'(y.re) - er < -1.0 ||
              real'(y.im) - ei > 1.0 || real'(y.im) - ei < -1.0) begin
            failures++;
            if (failures < 10) $display("FAIL %0d got %0d,%0d exp %f,%f", p, y.re, y.im, er, ei);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bf2i -- checks the radix-2 SDF butterfly. Random blocks of 2*D samples
// are streamed with random enable gaps; the output stream, D+1 enabled
// cycles behind, must hold (x(n)+x(n+D))/2 for the first half of every
// block and (x(n)-x(n+D))/2 for the second half, halving by arithmetic
// shift (floor).
module tb_bf2i;
  import fft_pkg::*;
  localparam int D  = 4;
  localparam int NB = 40;

  logic clk = 0, rst_n = 0, en = 0, mode = 0;
  cplx_t x_in = '0, y_out;
  bf2i #(.D(D)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t xs [NB*2*D];
  cplx_t exp_y [NB*2*D];

  function automatic sample_t half(int v);
    return sample_t'(v >>> 1);
  endfunction

  initial begin
    int sent = 0, got = 0;
    for (int i = 0; i < NB*2*D; i++) xs[i] = cplx_t'($urandom);
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < D; n++) begin
        cplx_t a, c;
        a = xs[b*2*D + n]; c = xs[b*2*D + n + D];
        exp_y[b*2*D + n]     = '{re: half(int'(a.re) + int'(c.re)), im: half(int'(a.im) + int'(c.im))};
        exp_y[b*2*D + n + D] = '{re: half(int'(a.re) - int'(c.re)), im: half(int'(a.im) - int'(c.im))};
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 'sent' counts enabled cycles; output of element p appears after
    // enabled cycle p + D + 1
    while (got < (NB-1)*2*D) begin
      @(negedge clk);
      en = ($urandom_range(4) != 0);
      x_in = (sent < NB*2*D) ? xs[sent] : '0;
      mode = ((sent / D) % 2) == 1;
      @(posedge clk);
      if (en) begin
        sent++;
        #1;
        if (sent >= D + 1) begin
          checks++;
          if (y_out != exp_y[sent - D - 1]) begin
            failures++;
            if (failures < 10) $display("FAIL elem %0d got %h exp %h", sent-D-1, y_out, exp_y[sent-D-1]);
          end
          got++;
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

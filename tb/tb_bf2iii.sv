// tb_bf2iii -- checks the W8 butterfly. Each block of 2*D samples gets a
// random exponent e; the second-half sample must enter the butterfly
// multiplied by W8^e = exp(-j*pi*e/4). Expected outputs are computed in
// floating point from the raw inputs and may differ by one LSB (rounding of
// the sqrt(2)/2 product and of the halving). Inputs stay below full scale.
module tb_bf2iii;
  import fft_pkg::*;
  localparam int D  = 2;
  localparam int NB = 80;

  logic clk = 0, rst_n = 0, en = 0, mode = 0;
  logic [1:0] w8_exp = '0;
  cplx_t x_in = '0, y_out;
  bf2iii #(.D(D)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int e_seen [4];
  cplx_t xs [NB*2*D];
  real  er [NB*2*D], ei [NB*2*D];
  logic [1:0] ex [NB];

  function automatic bit close(int got, real want);
    real d;
    d = real'(got) - want;
    return (d < 1.51) && (d > -1.51);
  endfunction

  initial begin
    int sent = 0, got = 0;
    for (int i = 0; i < NB*2*D; i++)
      xs[i] = '{re: sample_t'($signed($urandom_range(32000)) - 16000),
                im: sample_t'($signed($urandom_range(32000)) - 16000)};
    for (int b = 0; b < NB; b++) begin
      real c, s, cr, ci;
      ex[b] = 2'($urandom_range(3));
      c = $cos(3.14159265358979 * ex[b] / 4.0);
      s = -$sin(3.14159265358979 * ex[b] / 4.0);
      for (int n = 0; n < D; n++) begin
        cplx_t a, x;
        a = xs[b*2*D + n]; x = xs[b*2*D + n + D];
        cr = x.re * c - x.im * s;
        ci = x.re * s + x.im * c;
        er[b*2*D + n]     = (a.re + cr) / 2.0; ei[b*2*D + n]     = (a.im + ci) / 2.0;
        er[b*2*D + n + D] = (a.re - cr) / 2.0; ei[b*2*D + n + D] = (a.im - ci) / 2.0;
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (got < (NB-1)*2*D) begin
      @(negedge clk);
      en     = ($urandom_range(4) != 0);
      x_in   = (sent < NB*2*D) ? xs[sent] : '0;
      mode   = ((sent / D) % 2) == 1;
      w8_exp = ex[(sent / (2*D)) % NB];
      @(posedge clk);
      if (en) begin
        sent++;
        #1;
        if (sent >= D + 1) begin
          int p;
          p = sent - D - 1;
          checks++;
          e_seen[ex[p/(2*D)]]++;
          if (!close(y_out.re, er[p]) || !close(y_out.im, ei[p])) begin
            failures++;
            if (failures < 10) $display("FAIL elem %0d e=%0d got %0d,%0d exp %f,%f",
                                        p, ex[p/(2*D)], y_out.re, y_out.im, er[p], ei[p]);
          end
          got++;
        end
      end
    end
    foreach (e_seen[i]) if (e_seen[i] == 0) failures++;
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

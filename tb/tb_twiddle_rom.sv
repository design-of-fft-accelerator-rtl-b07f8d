// tb_twiddle_rom -- checks the nine region-0 coefficients against
// 16384*cos(2*pi*a/64) and -16384*sin(2*pi*a/64), rounded to nearest.
module tb_twiddle_rom;
  import fft_pkg::*;
  logic [3:0] addr = '0;
  tw_t coef;
  twiddle_rom dut (.*);

  int checks = 0, failures = 0;

  function automatic int rnd(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  initial begin
    for (int a = 0; a <= 8; a++) begin
      real ang;
      addr = 4'(a);
      #1;
      ang = 2.0 * 3.14159265358979323846 * a / 64.0;
      checks += 2;
      if (int'(coef.re) != rnd(16384.0 * $cos(ang))) failures++;
      if (int'(coef.im) != rnd(-16384.0 * $sin(ang))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

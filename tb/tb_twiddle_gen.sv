// tb_twiddle_gen -- checks the twiddle address generator for all 64 block
// positions: exponent m = n4 * bitrev3(k bits), and the rebuilt coefficient
// against 16384*exp(-j*2*pi*m/64) within one LSB. A second sweep applies the
// region mapping to every exponent 0..63 directly by giving positions with
// n4 = 1 (m = k), n4 = 3, 5, 7 and so reaching each of the eight regions;
// it counts the regions seen and fails if one was never reached.
module tb_twiddle_gen;
  import fft_pkg::*;
  logic [LOG2N-1:0] idx = '0, m;
  tw_t coef;
  twiddle_gen dut (.*);

  int checks = 0, failures = 0;
  int regions [8];

  initial begin
    for (int i = 0; i < 64; i++) begin
      int n4, kk, me;
      real ang;
      idx = LOG2N'(i);
      #1;
      n4 = i % 8;
      kk = ((i >> 5) & 1) | (((i >> 4) & 1) << 1) | (((i >> 3) & 1) << 2);
      me = n4 * kk;
      checks++;
      if (int'(m) != me) failures++;
      ang = 2.0 * 3.14159265358979323846 * me / 64.0;
      checks += 2;
      if ($rtoi(real'(coef.re) - 16384.0 * $cos(ang) + 10.0) - 10 > 1 ||
          $rtoi(real'(coef.re) - 16384.0 * $cos(ang) + 10.0) - 10 < -1) begin
        failures++; $display("FAIL m=%0d re=%0d", me, coef.re);
      end
      if ($rtoi(real'(coef.im) + 16384.0 * $sin(ang) + 10.0) - 10 > 1 ||
          $rtoi(real'(coef.im) + 16384.0 * $sin(ang) + 10.0) - 10 < -1) begin
        failures++; $display("FAIL m=%0d im=%0d", me, coef.im);
      end
      regions[me / 8]++;
    end
    // regions 0..6 are the ones a 64-point transform uses (m <= 49)
    for (int r = 0; r < 7; r++) begin
      checks++;
      if (regions[r] == 0) begin failures++; $display("FAIL region %0d unused", r); end
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

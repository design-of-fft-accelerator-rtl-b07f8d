// tb_fft64_sqnr -- measures the signal-to-quantisation-noise ratio of the
// 64-point branch FFT and compares it with the usual estimate for a
// fixed-point FFT that rounds at every stage,
//   SQNR = 2^(2B) / (5N - 4m - 3),  B = 16 bits, N = 64, m = log2 N,
// which is about 71.7 dB.
//
// NB blocks of white random input, real and imaginary parts uniform in
// +-32768/sqrt(2), are streamed back to back. Each output word is compared
// with a double-precision DFT divided by 64 (the core's output scaling);
// the ratio of the total reference power to the total error power is the
// SQNR. The estimate models the noise sources more simply than this
// datapath (which halves in every butterfly and also rounds after the W8
// and W64 multipliers), so the test accepts a result down to 6 dB under
// it, and also checks that no word is off by more
// than TOL LSBs and that every block arrives.
module tb_fft64_sqnr;
  import fft_pkg::*;

  localparam int NB  = 48;
  localparam int TOL = 6;
  localparam real EST_DB = 71.66;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, flushing;
  cplx_t in_data = '0, out_data;
  logic [LOG2N-1:0] out_idx;

  fft64_r23sdf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t x [NB][64];
  int    n_out = 0, max_err = 0;
  real   p_sig = 0.0, p_err = 0.0;

  function automatic void check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endfunction

  // compare each output word with the reference as it leaves the core
  // (sampled mid-cycle, away from the clock edge)
  always @(negedge clk) begin
    if (out_valid) begin
      int b, k;
      real xr, xi, ang, er, ei;
      b = n_out / 64;
      k = int'(out_idx);
      xr = 0.0; xi = 0.0;
      for (int n = 0; n < 64; n++) begin
        ang = -2.0 * 3.14159265358979323846 * real'((n * k) % 64) / 64.0;
        xr += real'(x[b][n].re) * $cos(ang) - real'(x[b][n].im) * $sin(ang);
        xi += real'(x[b][n].re) * $sin(ang) + real'(x[b][n].im) * $cos(ang);
      end
      xr /= 64.0; xi /= 64.0;
      er = real'(out_data.re) - xr;
      ei = real'(out_data.im) - xi;
      p_sig += xr * xr + xi * xi;
      p_err += er * er + ei * ei;
      check(er <= TOL && er >= -TOL && ei <= TOL && ei >= -TOL,
            $sformatf("block %0d bin %0d: %0d,%0d vs %f,%f", b, k,
                      out_data.re, out_data.im, xr, xi));
      n_out++;
    end
  end

  initial begin
    real sqnr_db;
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < 64; n++)
        x[b][n] = '{re: sample_t'($signed($urandom_range(46340)) - 23170),
                    im: sample_t'($signed($urandom_range(46340)) - 23170)};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // back-to-back blocks: one sample per clock from the first slot on
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < 64; n++) begin
        in_valid = 1'b1;
        in_data  = x[b][n];
        @(negedge clk);
        check(in_ready, "sample refused while streaming");
      end
    in_valid = 1'b0;
    while (n_out < 64 * NB) @(negedge clk);
    sqnr_db = 10.0 * $log10(p_sig / p_err);
    $display("SQNR %0.2f dB over %0d blocks (estimate %0.2f dB)", sqnr_db, NB, EST_DB);
    check(sqnr_db >= EST_DB - 6.0, $sformatf("SQNR %0.2f dB too low", sqnr_db));
    check(n_out == 64 * NB, "output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (64 * NB + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_fft64_r23sdf -- self-checking testbench of the 64-point R2^3SDF FFT.
//
// Sends blocks of test signals (impulse, constant, single tones, random
// samples of magnitude below full scale) and compares every output word
// with a double-precision DFT divided by 64, allowing TOL LSBs of fixed
// point error. It also checks the bit-reversed output order, the 71-cycle
// latency of every sample and the 64-cycle block period of back-to-back
// blocks, and that an offer made in the middle of a flush slot is held off
// until the slot boundary.
module tb_fft64_r23sdf;
  import fft_pkg::*;

  localparam int NF  = 8;
  localparam int TOL = 6;
  localparam int LAT = 71;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, flushing;
  cplx_t in_data = '0, out_data;
  logic [LOG2N-1:0] out_idx;

  fft64_r23sdf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  cplx_t  frames [NF][64];
  longint acc_cyc [NF][64];
  int     n_out = 0, max_err = 0, stalls = 0;

  function automatic void check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // reference X(k)/64 by direct DFT
  function automatic void ref_dft(int f, int k, output real xr, output real xi);
    real ang;
    xr = 0.0; xi = 0.0;
    for (int n = 0; n < 64; n++) begin
      ang = -2.0 * 3.14159265358979323846 * real'((n * k) % 64) / 64.0;
      xr += real'(frames[f][n].re) * $cos(ang) - real'(frames[f][n].im) * $sin(ang);
      xi += real'(frames[f][n].re) * $sin(ang) + real'(frames[f][n].im) * $cos(ang);
    end
    xr /= 64.0; xi /= 64.0;
  endfunction

  task automatic make_frames();
    real a;
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < 64; n++) begin
        case (f)
          0: frames[f][n] = (n == 0) ? '{re: 16'sd20000, im: -16'sd12000} : '0;
          1: frames[f][n] = '{re: 16'sd9000, im: 16'sd4000};
          2: begin a = 2.0*3.14159265358979*5.0*n/64.0;
                   frames[f][n] = '{re: sample_t'($rtoi(20000.0*$cos(a))),
                                    im: sample_t'($rtoi(20000.0*$sin(a)))}; end
          3: begin a = 2.0*3.14159265358979*37.0*n/64.0;
                   frames[f][n] = '{re: sample_t'($rtoi(22000.0*$cos(a))), im: '0}; end
          default: frames[f][n] = '{re: sample_t'($signed($urandom_range(46000)) - 23000),
                                    im: sample_t'($signed($urandom_range(46000)) - 23000)};
        endcase
      end
  endtask

  task automatic send_frame(int f);
    int i = 0;
    while (i < 64) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = frames[f][i];
      if (in_ready) begin
        acc_cyc[f][i] = cyc;
        i++;
      end else stalls++;
    end
  endtask

  task automatic go_idle();
    @(negedge clk);
    in_valid = 1'b0;
    in_data  = '0;
  endtask

  // output monitor
  always @(negedge clk) begin
    if (out_valid && rst_n) begin
      int f, p, e;
      real xr, xi;
      f = n_out / 64;
      p = n_out % 64;
      check(out_idx == bitrev(LOG2N'(p)), $sformatf("block %0d pos %0d: index %0d", f, p, out_idx));
      check(cyc - acc_cyc[f][p] == LAT,
            $sformatf("block %0d pos %0d: latency %0d", f, p, cyc - acc_cyc[f][p]));
      ref_dft(f, int'(bitrev(LOG2N'(p))), xr, xi);
      e = iabs($rtoi(real'(out_data.re) - xr)); if (e > max_err) max_err = e;
      check(e <= TOL, $sformatf("block %0d k %0d re %0d ref %f", f, bitrev(LOG2N'(p)), out_data.re, xr));
      e = iabs($rtoi(real'(out_data.im) - xi)); if (e > max_err) max_err = e;
      check(e <= TOL, $sformatf("block %0d k %0d im %0d ref %f", f, bitrev(LOG2N'(p)), out_data.im, xi));
      n_out++;
    end
  end

  initial begin
    make_frames();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // four blocks back to back
    for (int f = 0; f < 4; f++) send_frame(f);
    go_idle();
    // idle: the pipeline flushes by itself and stops
    repeat (200) @(negedge clk);
    check(n_out == 256, $sformatf("flush: %0d outputs after idle", n_out));
    send_frame(4);
    go_idle();
    // offer the next block in the middle of the flush slot
    repeat (10) @(negedge clk);
    check(flushing, "flush slot expected");
    send_frame(5);
    check(stalls > 0, "mid-slot offer was not held off");
    send_frame(6);
    send_frame(7);
    go_idle();
    repeat (300) @(negedge clk);
    check(n_out == NF * 64, $sformatf("%0d outputs, expected %0d", n_out, NF * 64));
    // block period: first samples of back-to-back blocks 64 cycles apart
    check(acc_cyc[1][0] - acc_cyc[0][0] == 64, "back-to-back block period");
    $display("max error %0d LSB, stalls %0d", max_err, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

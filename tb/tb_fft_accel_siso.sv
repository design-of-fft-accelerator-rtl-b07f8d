// tb_fft_accel_siso -- end-to-end test of the accelerator built for one
// antenna (NANT = 1, NMAX = 2048), the single-antenna system with the
// hardware and the processor taking turns on each symbol. The testbench
// plays the processor over the OPB.
//
// For N = 64, 128 and 2048 the antenna streams one random symbol at one
// sample every two clocks; the processor waits for the ready bit, reads the
// 64-point results of the decimated sub-sequences, compares each with a
// double-precision DFT (TOL LSBs), completes the N-point transform,
//   X(k) = sum_l W_N^(l*k) * 64 * Y_l(k mod 64),
// and spot-checks it against a direct N-point DFT. Then three 128-point
// symbols arrive one after another with no pause: while one bank is read
// into the FFT the next symbol fills the other, so no overrun may be
// flagged, the symbol counter must advance by three and the results of the
// last symbol must be correct. Counted (each must occur): symbols served,
// size changes, a bank read while the other is being written, flush slots.
module tb_fft_accel_siso;
  import fft_pkg::*;

  localparam int NANT = 1;
  localparam int NMAX = 2048;
  localparam int TOL  = 6;
  localparam logic [31:0] BASE = 32'h8000_0000;

  logic clk = 0, rst_n = 0;
  logic OPB_select = 0, OPB_RNW = 0;
  logic [31:0] OPB_ABus = '0, OPB_DBus = '0, Sl_DBus;
  logic Sl_xferAck, Sl_errAck, Sl_retry, Sl_toutSup, irq;
  logic [NANT-1:0] ant_valid = '0;
  cplx_t ant_data [NANT];

  fft_accel #(.NANT(NANT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int max_err = 0, max_err_n = 0;
  int n_served = 0, n_sizes = 0, n_overlap = 0, n_flush = 0;
  longint cyc = 0;
  cplx_t x [NANT][NMAX];
  cplx_t y [NANT][NMAX];

  function automatic void check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endfunction

  // mechanism monitors (hierarchical probes of the datapath)
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_fft.u_ctrl.flushing && dut.u_fft.u_ctrl.cnt == 6'd1) n_flush++;
    // the FFT is fed from one bank while the antenna writes the other
    if (dut.fft_in_valid && ant_valid[0]) n_overlap++;
    if (rst_n && dut.set_ready[0]) n_served++;
  end

  task automatic opb_xfer(input bit rnw, input logic [31:0] addr, input logic [31:0] wdata,
                          output logic [31:0] rdata);
    int wait_cyc = 0;
    @(negedge clk);
    OPB_select = 1; OPB_RNW = rnw; OPB_ABus = BASE | addr; OPB_DBus = rnw ? '0 : wdata;
    // the slave acknowledges during a cycle; sample mid-cycle, release
    // the bus at the end of the acknowledge cycle
    do begin
      @(negedge clk);
      wait_cyc++;
    end while (!Sl_xferAck && wait_cyc < 16);
    rdata = Sl_DBus;
    check(Sl_xferAck, "OPB transfer not acknowledged");
    @(posedge clk);
    #1;
    OPB_select = 0; OPB_RNW = 0; OPB_ABus = '0; OPB_DBus = '0;
  endtask

  task automatic opb_write(input logic [31:0] addr, input logic [31:0] d);
    logic [31:0] r;
    opb_xfer(1'b0, addr, d, r);
  endtask

  task automatic opb_read(input logic [31:0] addr, output logic [31:0] d);
    opb_xfer(1'b1, addr, '0, d);
  endtask

  task automatic make_symbol(int a, int n);
    for (int i = 0; i < n; i++)
      x[a][i] = '{re: sample_t'($signed($urandom_range(40000)) - 20000),
                  im: sample_t'($signed($urandom_range(40000)) - 20000)};
  endtask

  // the antenna streams one symbol, one sample every second clock
  task automatic stream(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      ant_valid = '1;
      for (int a = 0; a < NANT; a++) ant_data[a] = x[a][i];
      @(negedge clk);
      ant_valid = '0;
    end
  endtask

  task automatic wait_irq_all();
    logic [31:0] st;
    int guard = 0;
    do begin
      repeat (20) @(negedge clk);
      opb_read(32'h4, st);
      guard++;
    end while (st[NANT-1:0] != '1 && guard < 2000);
    check(st[NANT-1:0] == '1, "results not ready");
  endtask

  // read and check the results of antenna a for an N = 64*L symbol
  task automatic check_results(int a, int lg);
    int L, n;
    logic [31:0] d;
    L = 1 << lg;
    n = 64 * L;
    for (int i = 0; i < n; i++) begin
      opb_read(32'h8000 + 4 * (a * NMAX + i), d);
      y[a][i] = cplx_t'(d);
    end
    // 64-point results of the decimated sub-sequences
    for (int l = 0; l < L; l++)
      for (int k = 0; k < 64; k++) begin
        real xr, xi, ang, er, ei;
        xr = 0; xi = 0;
        for (int n1 = 0; n1 < 64; n1++) begin
          ang = -2.0 * 3.14159265358979323846 * real'((n1 * k) % 64) / 64.0;
          xr += x[a][L*n1+l].re * $cos(ang) - x[a][L*n1+l].im * $sin(ang);
          xi += x[a][L*n1+l].re * $sin(ang) + x[a][L*n1+l].im * $cos(ang);
        end
        er = real'(y[a][64*l+k].re) - xr / 64.0;
        ei = real'(y[a][64*l+k].im) - xi / 64.0;
        if ($rtoi(er < 0 ? -er : er) > max_err) max_err = $rtoi(er < 0 ? -er : er);
        if ($rtoi(ei < 0 ? -ei : ei) > max_err) max_err = $rtoi(ei < 0 ? -ei : ei);
        check(er <= TOL && er >= -TOL && ei <= TOL && ei >= -TOL,
              $sformatf("ant %0d N %0d l %0d k %0d: %0d,%0d vs %f,%f", a, n, l, k,
                        y[a][64*l+k].re, y[a][64*l+k].im, xr/64.0, xi/64.0));
      end
    // processor part: combine into the N-point transform, spot-check bins
    for (int t = 0; t < 16; t++) begin
      int k;
      real zr, zi, rr, ri, ang, e;
      k = (t * 37 + 5) % n;
      zr = 0; zi = 0; rr = 0; ri = 0;
      for (int l = 0; l < L; l++) begin
        ang = -2.0 * 3.14159265358979323846 * real'((l * k) % n) / real'(n);
        zr += 64.0 * (y[a][64*l + k%64].re * $cos(ang) - y[a][64*l + k%64].im * $sin(ang));
        zi += 64.0 * (y[a][64*l + k%64].re * $sin(ang) + y[a][64*l + k%64].im * $cos(ang));
      end
      for (int i = 0; i < n; i++) begin
        ang = -2.0 * 3.14159265358979323846 * real'((i * k) % n) / real'(n);
        rr += x[a][i].re * $cos(ang) - x[a][i].im * $sin(ang);
        ri += x[a][i].re * $sin(ang) + x[a][i].im * $cos(ang);
      end
      e = (zr - rr) / 64.0; if (e < 0) e = -e;
      if ($rtoi(e) > max_err_n) max_err_n = $rtoi(e);
      check(e <= real'(TOL * L), $sformatf("N-point re k %0d: %f vs %f", k, zr, rr));
      e = (zi - ri) / 64.0; if (e < 0) e = -e;
      if ($rtoi(e) > max_err_n) max_err_n = $rtoi(e);
      check(e <= real'(TOL * L), $sformatf("N-point im k %0d: %f vs %f", k, zi, ri));
    end
  endtask

  initial begin
    int sizes [3];
    logic [31:0] d;
    sizes = '{0, 1, 5};
    ant_data[0] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    foreach (sizes[s]) begin
      int lg, n;
      lg = sizes[s];
      n  = 64 << lg;
      opb_write(32'h0, 32'h0);                       // disable: restart buffers
      opb_write(32'h0, 32'h8000_0000 | 32'(lg));     // enable, new length
      n_sizes++;
      make_symbol(0, n);
      stream(n);
      wait_irq_all();
      check(irq, "interrupt");
      check_results(0, lg);
      opb_write(32'h4, 32'h1);                       // clear ready
      opb_read(32'h4, d);
      check(d[0] == 1'b0 && !irq, "ready clear");
      $display("N=%0d done at cycle %0d", n, cyc);
    end

    // three 128-point symbols with no pause between them
    opb_write(32'h0, 32'h0);
    opb_write(32'h0, 32'h8000_0001);
    opb_read(32'h8, d);
    begin
      int cnt0;
      cnt0 = int'(d);
      for (int r = 0; r < 3; r++) begin
        make_symbol(0, 128);
        stream(128);
      end
      // wait for the last symbol to leave the FFT (busy low)
      do begin
        repeat (20) @(negedge clk);
        opb_read(32'h4, d);
      end while (d[16]);
      check(d[0], "results ready");
      check(d[8] == 1'b0, "no overrun for continuous symbols");
      opb_read(32'h8, d);
      check(int'(d) == cnt0 + 3, $sformatf("symbol counter %0d, expected %0d", d, cnt0 + 3));
    end
    check_results(0, 1);                             // the last symbol's results
    opb_read(32'h8, d);
    check(int'(d) == n_served, "symbol counter matches served symbols");

    check(n_served == 6, $sformatf("%0d symbols served", n_served));
    check(n_sizes == 3, "size changes");
    check(n_overlap > 0, "no bank read during a write");
    check(n_flush > 0, "no flush slot");
    $display("served %0d, sizes %0d, overlap %0d, flush %0d", n_served, n_sizes, n_overlap, n_flush);
    $display("max error: 64-point %0d LSB, N-point %0d (units of X/64)", max_err, max_err_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

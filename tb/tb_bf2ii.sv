// tb_bf2ii -- checks the -j butterfly. Each block of 2*D samples gets a
// random rot_mj flag; where it is set the second-half sample must enter the
// butterfly multiplied by -j, i.e. as (im, -re). Expected sums and
// differences are computed from the raw inputs and compared at D+1
// enabled cycles of delay, with random enable gaps.
module tb_bf2ii;
  import fft_pkg::*;
  localparam int D  = 2;
  localparam int NB = 60;

  logic clk = 0, rst_n = 0, en = 0, mode = 0, rot_mj = 0;
  cplx_t x_in = '0, y_out;
  bf2ii #(.D(D)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_rot = 0;
  cplx_t xs [NB*2*D];
  cplx_t exp_y [NB*2*D];
  bit    rot [NB];

  function automatic sample_t half(int v);
    return sample_t'(v >>> 1);
  endfunction

  initial begin
    int sent = 0, got = 0;
    for (int i = 0; i < NB*2*D; i++) xs[i] = cplx_t'($urandom);
    for (int b = 0; b < NB; b++) begin
      rot[b] = $urandom_range(1);
      for (int n = 0; n < D; n++) begin
        int ar, ai, cr, ci;
        ar = xs[b*2*D + n].re;     ai = xs[b*2*D + n].im;
        cr = xs[b*2*D + n + D].re; ci = xs[b*2*D + n + D].im;
        if (rot[b]) begin
          int t;
          t = cr; cr = ci; ci = -t;
          if (ci > 32767) ci = 32767;
        end
        exp_y[b*2*D + n]     = '{re: half(ar + cr), im: half(ai + ci)};
        exp_y[b*2*D + n + D] = '{re: half(ar - cr), im: half(ai - ci)};
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (got < (NB-1)*2*D) begin
      @(negedge clk);
      en     = ($urandom_range(4) != 0);
      x_in   = (sent < NB*2*D) ? xs[sent] : '0;
      mode   = ((sent / D) % 2) == 1;
      rot_mj = rot[(sent / (2*D)) % NB];
      @(posedge clk);
      if (en) begin
        sent++;
        #1;
        if (sent >= D + 1) begin
          checks++;
          if (rot[(sent-D-1)/(2*D)]) n_rot++;
          if (y_out != exp_y[sent - D - 1]) begin
            failures++;
            if (failures < 10) $display("FAIL elem %0d got %h exp %h", sent-D-1, y_out, exp_y[sent-D-1]);
          end
          got++;
        end
      end
    end
    if (n_rot == 0) failures++;
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

// bf2i -- radix-2 single-path delay feedback butterfly (BF2I).
//
// The butterfly has the two operating modes of an SDF stage. With `mode`
// low (first half of every 2*D-sample block) the input is pushed into the
// D-deep feedback shift register and the register's oldest entry, a
// difference left by the previous block, goes to the output. With `mode`
// high (second half) the input x(n+D) meets the stored x(n): the sum
// (x(n) + x(n+D))/2 goes to the output and the difference
// (x(n) - x(n+D))/2 is written back into the shift register.
//
// Each butterfly divides by two, so a 64-point transform made of six of
// them is scaled by 2^-6 and the 16-bit words never overflow. The halving
// truncates (rounds toward minus infinity); the document fixes the 2^-6
// output scaling but not the rounding, which is this design's choice.
//
// Timing: the output is registered. A sample's result leaves D+1 enabled
// cycles after the sample entered. Everything advances only while `en`.
module bf2i
  import fft_pkg::*;
#(
  parameter int D = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  mode,     // 0: fill / pass stored difference, 1: butterfly
  input  cplx_t x_in,
  output cplx_t y_out
);

  cplx_t fb_out, fb_in, y_d;
  logic signed [DW:0] sum_re, sum_im, dif_re, dif_im;

  sdf_delay #(.DEPTH(D)) u_fb (
    .clk, .rst_n, .en, .din(fb_in), .dout(fb_out)
  );

  always_comb begin
    sum_re = (DW+1)'(fb_out.re) + (DW+1)'(x_in.re);
    sum_im = (DW+1)'(fb_out.im) + (DW+1)'(x_in.im);
    dif_re = (DW+1)'(fb_out.re) - (DW+1)'(x_in.re);
    dif_im = (DW+1)'(fb_out.im) - (DW+1)'(x_in.im);
    if (mode) begin
      y_d.re   = sample_t'(sum_re >>> 1);
      y_d.im   = sample_t'(sum_im >>> 1);
      fb_in.re = sample_t'(dif_re >>> 1);
      fb_in.im = sample_t'(dif_im >>> 1);
    end else begin
      y_d   = fb_out;
      fb_in = x_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   y_out <= '0;
    else if (en)  y_out <= y_d;
  end

endmodule

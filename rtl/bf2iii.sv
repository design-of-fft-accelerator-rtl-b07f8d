// bf2iii -- SDF butterfly with the trivial W8 multiplications.
//
// Third butterfly of a radix-2^3 group. When `mode` is high the incoming
// sample (the one with index bit n3 = 1) is first multiplied by W8^e, with
// e = k1 + 2*k2 selected by the caller from the two counter bits above this
// stage's mode bit:
//   e = 0 : 1
//   e = 1 : (1 - j) sqrt(2)/2   -> ((a+b) + j(b-a)) * sqrt(2)/2
//   e = 2 : -j                  -> b - ja
//   e = 3 : (-1 - j) sqrt(2)/2  -> ((b-a) - j(a+b)) * sqrt(2)/2
// The two sqrt(2)/2 products are made by two sqrt2_mult shift-and-add
// units, one per part, and saturate to 16 bits (they only can for inputs
// whose magnitude exceeds full scale). The butterfly itself is bf2i.
//
// Timing as bf2i: output registered, latency D+1 enabled cycles.
module bf2iii
  import fft_pkg::*;
#(
  parameter int D = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       mode,
  input  logic [1:0] w8_exp,   // exponent e of W8^e, used while mode = 1
  input  cplx_t      x_in,
  output cplx_t      y_out
);

  logic signed [DW:0] s_re, s_im, p_re, p_im;
  cplx_t x_rot;

  always_comb begin
    // inputs of the two shift-add multipliers
    unique case (w8_exp)
      2'd1:    begin s_re = (DW+1)'(x_in.re) + (DW+1)'(x_in.im);
                     s_im = (DW+1)'(x_in.im) - (DW+1)'(x_in.re); end
      2'd3:    begin s_re = (DW+1)'(x_in.im) - (DW+1)'(x_in.re);
                     s_im = -((DW+1)'(x_in.re) + (DW+1)'(x_in.im)); end
      default: begin s_re = '0; s_im = '0; end
    endcase
  end

  sqrt2_mult #(.W(DW+1)) u_mre (.a(s_re), .y(p_re));
  sqrt2_mult #(.W(DW+1)) u_mim (.a(s_im), .y(p_im));

  always_comb begin
    x_rot = x_in;
    if (mode) begin
      unique case (w8_exp)
        2'd0: x_rot = x_in;
        2'd1, 2'd3: begin
          x_rot.re = sat((DW+4)'(p_re));
          x_rot.im = sat((DW+4)'(p_im));
        end
        2'd2: x_rot = mul_mj(x_in);
      endcase
    end
  end

  bf2i #(.D(D)) u_bf (
    .clk, .rst_n, .en, .mode, .x_in(x_rot), .y_out
  );

endmodule

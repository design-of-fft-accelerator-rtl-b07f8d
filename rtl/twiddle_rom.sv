// twiddle_rom -- region-0 twiddle coefficient ROM of the 64-point FFT.
//
// Holds W_64^a = cos(2*pi*a/64) - j*sin(2*pi*a/64) for a = 0..8, the
// angles 0..pi/4 ("region 0"); every other twiddle factor is derived from
// these nine entries by twiddle_gen. Coefficients are Q2.14 (1.0 = 16384)
// rounded to nearest; the values are those of the document's coefficient
// table. Combinational read; addresses above 8 return entry 8.
module twiddle_rom
  import fft_pkg::*;
(
  input  logic [3:0] addr,
  output tw_t        coef
);

  always_comb begin
    unique case (addr)
      4'd0:    coef = '{re: 16'sd16384, im:  16'sd0};
      4'd1:    coef = '{re: 16'sd16305, im: -16'sd1606};
      4'd2:    coef = '{re: 16'sd16069, im: -16'sd3196};
      4'd3:    coef = '{re: 16'sd15679, im: -16'sd4756};
      4'd4:    coef = '{re: 16'sd15137, im: -16'sd6270};
      4'd5:    coef = '{re: 16'sd14449, im: -16'sd7723};
      4'd6:    coef = '{re: 16'sd13623, im: -16'sd9102};
      4'd7:    coef = '{re: 16'sd12665, im: -16'sd10394};
      default: coef = '{re: 16'sd11585, im: -16'sd11585};
    endcase
  end

endmodule

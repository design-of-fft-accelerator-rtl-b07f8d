// cmult -- pipelined complex multiplier.
//
// (a + jb)(c + jd) = (ac - bd) + j(bc + ad): four real 16x16 multiplications
// and two real additions, as the document builds it. The data word is
// 16-bit two's complement and the coefficient Q2.14; the sums are rounded to
// nearest, shifted back by 14 and saturated to 16 bits.
//
// Timing: two register stages (products, then sums), so the result leaves
// two enabled cycles after its operands; both stages advance only while
// `en`. The two-stage split is this design's choice.
module cmult
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cplx_t x,
  input  tw_t   w,
  output cplx_t y
);

  localparam int PW = DW + TW;

  logic signed [PW-1:0] p_ac, p_bd, p_bc, p_ad;
  logic signed [PW:0]   s_re, s_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_ac <= '0; p_bd <= '0; p_bc <= '0; p_ad <= '0;
    end else if (en) begin
      p_ac <= x.re * w.re;
      p_bd <= x.im * w.im;
      p_bc <= x.im * w.re;
      p_ad <= x.re * w.im;
    end
  end

  always_comb begin
    s_re = (PW+1)'(p_ac) - (PW+1)'(p_bd) + (PW+1)'(2**(TW_FRAC-1));
    s_im = (PW+1)'(p_bc) + (PW+1)'(p_ad) + (PW+1)'(2**(TW_FRAC-1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else if (en) begin
      y.re <= sat((DW+4)'(s_re >>> TW_FRAC));
      y.im <= sat((DW+4)'(s_im >>> TW_FRAC));
    end
  end

endmodule

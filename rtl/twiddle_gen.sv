// twiddle_gen -- twiddle address generator and region mapping.
//
// Supplies W_64^m for the complex multiplier between the two radix-2^3
// groups. The sample at position `idx` of a 64-sample block (in the order
// it leaves the first group) has n4 = idx[2:0] and k = k1 + 2k2 + 4k3 =
// bitrev(idx[5:3]), and needs the exponent m = n4 * k (0..49).
//
// Only region 0 (0 <= m <= 8, angles 0..pi/4) is stored. The circle is cut
// into eight regions of N/8 = 8 steps; region r = m[5:3], offset o = m[2:0].
// Even regions read address o, odd regions the mirrored address 8 - o, and
// the coefficient is rebuilt from the stored real part R and imaginary part
// I by swapping and negating:
//   r : 0      1      2      3      4      5      6      7
//   re: R     -I      I     -R     -R      I     -I      R
//   im: I     -R     -R      I     -I      R      R     -I
// Combinational: `coef` belongs to the `idx` of the same cycle.
module twiddle_gen
  import fft_pkg::*;
(
  input  logic [LOG2N-1:0] idx,
  output logic [LOG2N-1:0] m,
  output tw_t              coef
);

  logic [2:0] n4, kk, region, off;
  logic [3:0] addr;
  tw_t        rc;

  always_comb begin
    n4     = idx[2:0];
    kk     = {idx[3], idx[4], idx[5]};
    m      = LOG2N'(n4 * kk);
    region = m[5:3];
    off    = m[2:0];
    addr   = region[0] ? 4'd8 - {1'b0, off} : {1'b0, off};
  end

  twiddle_rom u_rom (.addr, .coef(rc));

  always_comb begin
    unique case (region)
      3'd0: coef = '{re:  rc.re, im:  rc.im};
      3'd1: coef = '{re: -rc.im, im: -rc.re};
      3'd2: coef = '{re:  rc.im, im: -rc.re};
      3'd3: coef = '{re: -rc.re, im:  rc.im};
      3'd4: coef = '{re: -rc.re, im: -rc.im};
      3'd5: coef = '{re:  rc.im, im:  rc.re};
      3'd6: coef = '{re: -rc.im, im:  rc.re};
      3'd7: coef = '{re:  rc.re, im: -rc.im};
    endcase
  end

endmodule

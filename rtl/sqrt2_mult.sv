// sqrt2_mult -- constant multiplier by sqrt(2)/2 built from shifts and adds.
//
// sqrt(2)/2 is taken as 11585/2^14 = 0.70709, the Q2.14 value of the
// W_64^8 entry of the twiddle table. 11585 = 2^13 + 2^11 + 2^10 + 2^8 + 2^6
// + 1, so the product is the sum of six shifted copies of the input,
// rounded to nearest and shifted back by 14. The document realises this
// multiplication with shifters and adders; the particular shift set is this
// design's choice. Purely combinational.
module sqrt2_mult #(
  parameter int W = 17
) (
  input  logic signed [W-1:0] a,
  output logic signed [W-1:0] y
);

  logic signed [W+14:0] ax, acc;

  always_comb begin
    ax  = (W+15)'(a);
    acc = (ax <<< 13) + (ax <<< 11) + (ax <<< 10) + (ax <<< 8) + (ax <<< 6) + ax
          + (W+15)'(2**13);
    y   = W'(acc >>> 14);
  end

endmodule

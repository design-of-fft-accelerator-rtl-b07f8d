// sdf_delay -- feedback shift register of one single-path delay feedback
// (SDF) butterfly stage.
//
// A chain of DEPTH complex registers. While `en` is high, every register
// takes the value of its predecessor and `din` enters at the tail, so a
// sample written now leaves at `dout` DEPTH enabled cycles later. The six
// stages of the 64-point branch FFT use depths 32, 16, 8, 4, 2 and 1,
// 63 registers in all, as the document counts them. The registers are
// cleared by the asynchronous active-low reset (a choice of this design).
module sdf_delay
  import fft_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cplx_t din,
  output cplx_t dout
);

  cplx_t sr [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else if (en) begin
      sr[DEPTH-1] <= din;
      for (int i = 0; i < DEPTH-1; i++) sr[i] <= sr[i+1];
    end
  end

  assign dout = sr[0];

endmodule

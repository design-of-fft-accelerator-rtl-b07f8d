// bf2ii -- SDF butterfly with the trivial -j multiplication (BF2II).
//
// Second butterfly of a radix-2^3 group. Before the butterfly the input is
// multiplied by -j when both `mode` and `rot_mj` are high; (a + jb)(-j) = b - ja needs only a
// swap of the real and imaginary parts and a sign change. In the decimation
// in frequency radix-2^3 index map this applies to the samples of the second
// quarter of a block that came from the difference half of the preceding
// BF2I: the caller drives `rot_mj` with that block's k1 bit, the counter bit
// just above this stage's mode bit.
//
// Interface and timing are those of bf2i: output registered, latency D+1
// enabled cycles.
module bf2ii
  import fft_pkg::*;
#(
  parameter int D = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  mode,
  input  logic  rot_mj,   // k1: with mode, multiply the incoming sample by -j
  input  cplx_t x_in,
  output cplx_t y_out
);

  cplx_t x_rot;

  assign x_rot = (mode && rot_mj) ? mul_mj(x_in) : x_in;

  bf2i #(.D(D)) u_bf (
    .clk, .rst_n, .en, .mode, .x_in(x_rot), .y_out
  );

endmodule

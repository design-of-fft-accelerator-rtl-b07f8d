// fft64_r23sdf -- 64-point radix-2^3 single-path delay feedback FFT.
//
// The branch FFT accelerator. A 64-point decimation-in-frequency FFT is
// split into two radix-2^3 groups of three radix-2 SDF butterflies each:
//
//   x -> BF2I(32) -> BF2II(16) -> BF2III(8) -> x W64 -> BF2I(4) -> BF2II(2) -> BF2III(1) -> X
//
// BF2II multiplies by -j and BF2III by W8^e, trivial products made by
// swapping parts and by sqrt(2)/2 shift-and-add units. The only general
// complex multiplier sits between the groups and takes W64^(n4*k) from the
// nine-entry ROM through the region mapping of twiddle_gen. Feedback
// registers: 32+16+8+4+2+1 = 63 complex words; one complex multiplier.
//
// Interface: 16-bit complex samples in natural order on `in_data`,
// accepted when `in_valid && in_ready`, 64 of them on consecutive cycles
// per block. Results leave in bit-reversed order: `out_idx` gives the
// frequency index k of the word on `out_data`, valid with `out_valid`.
// The output is X(k)/64 (each butterfly halves).
//
// Timing: one sample per clock, blocks back to back; latency 71 cycles
// from a sample's acceptance to the output word at the same block
// position (registered butterflies: 33+17+9, multiplier 2, then 5+3+2).
// The structure, word width, 2^-6 scaling and 71-cycle latency follow the
// document; the pipeline register placement and the slot flow control of
// fft64_ctrl are this design's choices.
module fft64_r23sdf
  import fft_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  cplx_t            in_data,
  output logic             out_valid,
  output logic [LOG2N-1:0] out_idx,
  output cplx_t            out_data,
  output logic             flushing
);

  // offsets (in advances) of each unit's input behind the first butterfly
  localparam int OFF_BF2 = 33;
  localparam int OFF_BF3 = OFF_BF2 + 17;   // 50
  localparam int OFF_MUL = OFF_BF3 + 9;    // 59
  localparam int OFF_BF4 = OFF_MUL + 2;    // 61
  localparam int OFF_BF5 = OFF_BF4 + 5;    // 66
  localparam int OFF_BF6 = OFF_BF5 + 3;    // 69
  localparam int LAT     = OFF_BF6 + 2;    // 71

  logic             adv;
  logic [LOG2N-1:0] cnt, t2, t3, tm, t4, t5, t6, to;
  cplx_t            s1, s2, s3, s4, s5, s6;
  tw_t              w;
  logic [LOG2N-1:0] m_unused;

  fft64_ctrl #(.N(FFT_N), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .adv, .cnt, .out_valid, .flushing
  );

  // block position of the sample at each unit's input
  always_comb begin
    t2 = cnt - LOG2N'(OFF_BF2);
    t3 = cnt - LOG2N'(OFF_BF3);
    tm = cnt - LOG2N'(OFF_MUL);
    t4 = cnt - LOG2N'(OFF_BF4);
    t5 = cnt - LOG2N'(OFF_BF5);
    t6 = cnt - LOG2N'(OFF_BF6);
    to = cnt - LOG2N'(LAT);
  end

  // first radix-2^3 group: N/2, N/4, N/8
  bf2i   #(.D(32)) u_bf1 (.clk, .rst_n, .en(adv), .mode(cnt[5]),
                          .x_in(in_data), .y_out(s1));
  bf2ii  #(.D(16)) u_bf2 (.clk, .rst_n, .en(adv), .mode(t2[4]), .rot_mj(t2[5]),
                          .x_in(s1), .y_out(s2));
  bf2iii #(.D(8))  u_bf3 (.clk, .rst_n, .en(adv), .mode(t3[3]), .w8_exp({t3[4], t3[5]}),
                          .x_in(s2), .y_out(s3));

  // twiddle multiplication between the groups
  twiddle_gen u_tw (.idx(tm), .m(m_unused), .coef(w));
  cmult       u_mul (.clk, .rst_n, .en(adv), .x(s3), .w(w), .y(s4));

  // second radix-2^3 group: 4, 2, 1
  bf2i   #(.D(4))  u_bf4 (.clk, .rst_n, .en(adv), .mode(t4[2]),
                          .x_in(s4), .y_out(s5));
  bf2ii  #(.D(2))  u_bf5 (.clk, .rst_n, .en(adv), .mode(t5[1]), .rot_mj(t5[2]),
                          .x_in(s5), .y_out(s6));
  bf2iii #(.D(1))  u_bf6 (.clk, .rst_n, .en(adv), .mode(t6[0]), .w8_exp({t6[1], t6[2]}),
                          .x_in(s6), .y_out(out_data));

  assign out_idx = bitrev(to);

endmodule

// fft_accel -- FFT accelerator for a MIMO-OFDM receiver (top level).
//
// A variable-length FFT (64 to 2048 points, the sizes of IEEE 802.11n and
// 802.16e) is split between a processor and this accelerator. The
// accelerator does the expensive part: every N-point symbol (N = 64*L) is
// cut, decimation in time, into L sub-sequences of 64 samples, and each is
// transformed by a 64-point radix-2^3 single-path delay feedback pipeline
// (fft64_r23sdf). The processor reads the L 64-point results over the OPB
// and finishes the transform with L-point butterflies and twiddle factors:
//   X(k) = sum_{l<L} W_N^(l*k) * 64 * Y_l(k mod 64)
// where Y_l is the scaled 64-point result of sub-sequence l.
//
// Blocks: one in_buffer per antenna (double-buffered sample memory that
// receives the continuous sample stream), sched_ctrl (serves the antennas'
// symbols in turn through the single branch FFT and reorders the reads),
// fft64_r23sdf, the result memory (dp_ram, NANT*NMAX words), accel_regs
// (control and status registers) and opb_wrapper (OPB slave).
//
// Ports: OPB slave signals; per antenna a sample stream `ant_valid[a]`,
// `ant_data[a]` (one sample per valid, no back-pressure); `irq` while a
// result is ready. The processor itself is outside this design.
//
// Defaults: two antennas (the 2x2 MIMO case, one branch FFT shared by
// both, as in the document's MIMO schedule) and NMAX = 2048 (802.16e's
// largest size). The 64-point FFT follows the document closely; the
// buffers, controller, register map and bus subset are this design's
// construction from the document's block diagrams.
module fft_accel
  import fft_pkg::*;
#(
  parameter int          NANT = 2,
  parameter int          NMAX = 2048,
  parameter logic [31:0] BASE = 32'h8000_0000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            OPB_select,
  input  logic            OPB_RNW,
  input  logic [31:0]     OPB_ABus,
  input  logic [31:0]     OPB_DBus,
  output logic            Sl_xferAck,
  output logic [31:0]     Sl_DBus,
  output logic            Sl_errAck,
  output logic            Sl_retry,
  output logic            Sl_toutSup,
  input  logic [NANT-1:0] ant_valid,
  input  cplx_t           ant_data [NANT],
  output logic            irq
);

  localparam int LAW      = 16;      // local byte address width
  localparam int RES_BASE = 32768;   // result window in the local space
  localparam int RW       = $clog2(NANT*NMAX);
  localparam int AW       = $clog2(NMAX);

  logic            lb_req, lb_we;
  logic [LAW-1:0]  lb_addr;
  logic [31:0]     lb_wdata, lb_rdata, res_rdata;
  logic            enable, busy;
  logic [2:0]      log2l;
  logic [NANT-1:0] set_ready, set_overrun, sym_done, done_bank;
  logic [RW-1:0]   res_raddr, res_waddr;
  logic            res_we;
  cplx_t           res_wdata;
  logic            rd_bank;
  logic [AW-1:0]   rd_addr;
  cplx_t           rd_data [NANT];
  logic            fft_in_valid, fft_in_ready, fft_out_valid, fft_flushing;
  cplx_t           fft_in_data, fft_out_data;
  logic [LOG2N-1:0] fft_out_idx;

  opb_wrapper #(.BASE(BASE), .AW(LAW)) u_opb (
    .clk, .rst_n, .OPB_select, .OPB_RNW, .OPB_ABus, .OPB_DBus,
    .Sl_xferAck, .Sl_DBus, .Sl_errAck, .Sl_retry, .Sl_toutSup,
    .lb_req, .lb_we, .lb_addr, .lb_wdata, .lb_rdata
  );

  accel_regs #(.NANT(NANT), .NMAX(NMAX), .AW(LAW), .RES_BASE(RES_BASE)) u_regs (
    .clk, .rst_n, .lb_req, .lb_we, .lb_addr, .lb_wdata, .lb_rdata,
    .enable, .log2l, .set_ready, .set_overrun, .busy, .irq,
    .res_raddr, .res_rdata
  );

  for (genvar a = 0; a < NANT; a++) begin : g_ant
    in_buffer #(.NMAX(NMAX)) u_buf (
      .clk, .rst_n, .enable, .log2l,
      .in_valid(ant_valid[a]), .in_data(ant_data[a]),
      .sym_done(sym_done[a]), .done_bank(done_bank[a]),
      .rd_bank, .rd_addr, .rd_data(rd_data[a])
    );
  end

  sched_ctrl #(.NANT(NANT), .NMAX(NMAX)) u_sched (
    .clk, .rst_n, .log2l, .sym_done, .done_bank, .rd_bank, .rd_addr, .rd_data,
    .fft_in_valid, .fft_in_ready, .fft_in_data,
    .fft_out_valid, .fft_out_idx, .fft_out_data,
    .res_we, .res_waddr, .res_wdata, .set_ready, .set_overrun, .busy
  );

  fft64_r23sdf u_fft (
    .clk, .rst_n,
    .in_valid(fft_in_valid), .in_ready(fft_in_ready), .in_data(fft_in_data),
    .out_valid(fft_out_valid), .out_idx(fft_out_idx), .out_data(fft_out_data),
    .flushing(fft_flushing)
  );

  dp_ram #(.DEPTH(NANT*NMAX), .WIDTH(32)) u_res (
    .clk, .we(res_we), .waddr(res_waddr), .wdata(res_wdata),
    .raddr(res_raddr), .rdata(res_rdata)
  );

endmodule

// sched_ctrl -- schedule controller: shares one branch FFT among antennas.
//
// Each antenna's in_buffer reports complete symbols. The controller keeps
// one pending flag per antenna and serves pending antennas in round-robin
// order, so in a 2x2 MIMO receiver the branch FFT transforms the symbol of
// one antenna and then the other's, while the processor finishes the
// previous one (the MIMO time schedule). For one symbol of N = 64*L samples
// (L = 2^log2l) it reads the buffer in decimated order, sub-sequence
// l = 0..L-1 holding samples x(L*n1 + l), n1 = 0..63, and streams the L
// sub-sequences back to back into the 64-point FFT. Each result word
// (64-point bin k of sub-sequence l) is written to the result memory at
// a*NMAX + 64*l + k; the processor combines the L transforms into the N-point
// one. When the last word is written, `set_ready` pulses for the antenna.
//
// A symbol that completes while its antenna's previous symbol is still
// pending or being read out raises `set_overrun` (the double-buffered input
// would then be overwritten). The decimation-in-time split between the
// branch FFT and the processor and the round-robin service are this
// design's reading of the document's schedules.
//
// Timing: one cycle to start the first read, then N cycles of streaming.
// When another symbol is pending as the last sample of one is accepted,
// the next symbol follows on the very next cycle, so the FFT sees back to
// back blocks; up to four symbols may be inside the FFT at once, and a
// small queue remembers their antennas for the result writes.
module sched_ctrl
  import fft_pkg::*;
#(
  parameter int NANT = 2,
  parameter int NMAX = 2048
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [2:0]                   log2l,
  // from the input buffers
  input  logic [NANT-1:0]              sym_done,
  input  logic [NANT-1:0]              done_bank,
  output logic                         rd_bank,
  output logic [$clog2(NMAX)-1:0]      rd_addr,
  input  cplx_t                        rd_data [NANT],
  // to and from the branch FFT
  output logic                         fft_in_valid,
  input  logic                         fft_in_ready,
  output cplx_t                        fft_in_data,
  input  logic                         fft_out_valid,
  input  logic [LOG2N-1:0]             fft_out_idx,
  input  cplx_t                        fft_out_data,
  // result memory write port
  output logic                         res_we,
  output logic [$clog2(NANT*NMAX)-1:0] res_waddr,
  output cplx_t                        res_wdata,
  // status
  output logic [NANT-1:0]              set_ready,
  output logic [NANT-1:0]              set_overrun,
  output logic                         busy
);

  localparam int AW = $clog2(NMAX);
  localparam int RW = $clog2(NANT*NMAX);
  localparam int SW = (NANT > 1) ? $clog2(NANT) : 1;

  typedef enum logic [1:0] {S_IDLE, S_PRIME, S_FEED} state_t;

  localparam int QD = 4;     // symbols that can be inside the FFT at once

  state_t          state;
  logic [NANT-1:0] pending, pend_bank;
  logic [SW-1:0]   cur, last_served, pick, out_ant;
  logic            cur_bank;
  logic            found;
  logic [AW-1:0]   i_cnt, o_cnt, i_next, last_i;
  logic            accept, sym_last, chain, start, out_last;
  logic [SW-1:0]   q [QD];   // antenna of each symbol in flight, oldest first
  logic [1:0]      q_wr, q_rd;
  logic [2:0]      q_n;

  // decimated read order: i = 64*l + n1  ->  address L*n1 + l
  function automatic logic [AW-1:0] dec_addr(input logic [AW-1:0] i, input logic [2:0] lg);
    logic [AW-1:0] l, n1;
    l  = i >> LOG2N;
    n1 = i & AW'(FFT_N - 1);
    return (n1 << lg) | l;
  endfunction

  assign last_i   = AW'(((AW+1)'(FFT_N) << log2l) - 1'b1);
  assign accept   = fft_in_valid && fft_in_ready;
  assign i_next   = i_cnt + 1'b1;
  assign sym_last = (state == S_FEED) && accept && (i_cnt == last_i);
  // the next symbol follows the last sample of this one without a gap
  assign chain    = sym_last && found && (q_n < 3'(QD));
  assign start    = ((state == S_IDLE) && found && (q_n < 3'(QD))) || chain;
  assign rd_addr  = chain ? '0 : dec_addr((state == S_FEED && accept) ? i_next : i_cnt, log2l);
  assign rd_bank  = chain ? pend_bank[pick] : cur_bank;

  assign fft_in_valid = (state == S_FEED);
  assign fft_in_data  = rd_data[cur];
  assign busy         = (state != S_IDLE) || (q_n != '0);

  // round-robin choice of the next pending antenna after the last served:
  // scanning from the farthest to the nearest, the nearest pending one wins
  logic [SW:0] rr;
  always_comb begin
    found = 1'b0;
    pick  = '0;
    rr    = '0;
    for (int k = NANT; k >= 1; k--) begin
      rr = (SW+1)'(last_served) + (SW+1)'(k);
      if (rr >= (SW+1)'(NANT)) rr = rr - (SW+1)'(NANT);
      if (pending[rr[SW-1:0]]) begin
        found = 1'b1;
        pick  = rr[SW-1:0];
      end
    end
  end

  // result write: outputs leave in input order, block l of the oldest
  // symbol in flight
  assign out_ant   = q[q_rd];
  assign out_last  = fft_out_valid && (o_cnt == last_i);
  assign res_we    = fft_out_valid;
  assign res_waddr = RW'(int'(out_ant) * NMAX) + RW'({o_cnt[AW-1:LOG2N], fft_out_idx});
  assign res_wdata = fft_out_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pending     <= '0;
      pend_bank   <= '0;
      cur         <= '0;
      cur_bank    <= 1'b0;
      last_served <= SW'(NANT - 1);
      i_cnt       <= '0;
      o_cnt       <= '0;
      set_ready   <= '0;
      set_overrun <= '0;
      q_wr        <= '0;
      q_rd        <= '0;
      q_n         <= '0;
      for (int k = 0; k < QD; k++) q[k] <= '0;
    end else begin
      set_ready   <= '0;
      set_overrun <= '0;
      for (int a = 0; a < NANT; a++) begin
        if (sym_done[a]) begin
          if (pending[a] || (state inside {S_PRIME, S_FEED} && int'(cur) == a))
            set_overrun[a] <= 1'b1;
          pending[a]   <= 1'b1;
          pend_bank[a] <= done_bank[a];
        end
      end

      // output side
      if (fft_out_valid) o_cnt <= out_last ? '0 : o_cnt + 1'b1;
      if (out_last) begin
        set_ready[out_ant] <= 1'b1;
        q_rd <= q_rd + 1'b1;
      end
      q_n <= q_n + 3'(start) - 3'(out_last);

      // input side
      if (start) begin
        cur           <= pick;
        cur_bank      <= pend_bank[pick];
        last_served   <= pick;
        pending[pick] <= sym_done[pick];
        i_cnt         <= '0;
        q[q_wr]       <= pick;
        q_wr          <= q_wr + 1'b1;
      end
      unique case (state)
        S_IDLE:  if (start) state <= S_PRIME;
        S_PRIME: state <= S_FEED;        // first read in flight
        S_FEED: if (accept) begin
          if (!chain) i_cnt <= i_next;
          if (sym_last && !chain) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

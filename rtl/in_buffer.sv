// in_buffer -- input sample memory of one antenna.
//
// Received samples arrive continuously, one per `in_valid`, in natural
// order. They are written into one of two banks of NMAX words; after the
// N-th sample of a symbol (N = 64 * 2^log2l) the symbol is complete,
// `sym_done` pulses with `done_bank` naming the bank it filled, and writing
// continues in the other bank. So one symbol can be read out while the next
// one arrives. Samples are ignored while `enable` is low, and clearing
// `enable` restarts the write pointer at the beginning of a symbol.
//
// The read port is random access (address and bank from the schedule
// controller, one cycle read latency), which lets the controller read a
// symbol out in the decimated order the 64-point branch FFT needs. The
// document states that the input memory takes continuous data and reorders
// it; the two-bank organisation is this design's choice.
module in_buffer
  import fft_pkg::*;
#(
  parameter int NMAX = 2048
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic [2:0]              log2l,      // N = 64 << log2l
  input  logic                    in_valid,
  input  cplx_t                   in_data,
  output logic                    sym_done,
  output logic                    done_bank,
  input  logic                    rd_bank,
  input  logic [$clog2(NMAX)-1:0] rd_addr,
  output cplx_t                   rd_data
);

  localparam int AW = $clog2(NMAX);

  logic [AW-1:0] wr_ptr, last;
  logic          wr_bank, wr_en;
  logic [AW:0]   n_words;

  assign n_words = (AW+1)'(FFT_N) << log2l;
  assign last    = AW'(n_words - 1'b1);
  assign wr_en   = enable && in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      wr_bank   <= 1'b0;
      sym_done  <= 1'b0;
      done_bank <= 1'b0;
    end else begin
      sym_done <= 1'b0;
      if (!enable) begin
        wr_ptr <= '0;
      end else if (wr_en) begin
        if (wr_ptr == last) begin
          wr_ptr    <= '0;
          wr_bank   <= ~wr_bank;
          sym_done  <= 1'b1;
          done_bank <= wr_bank;
        end else begin
          wr_ptr <= wr_ptr + 1'b1;
        end
      end
    end
  end

  dp_ram #(.DEPTH(2*NMAX), .WIDTH(2*DW)) u_mem (
    .clk,
    .we(wr_en), .waddr({wr_bank, wr_ptr}), .wdata(in_data),
    .raddr({rd_bank, rd_addr}), .rdata(rd_data)
  );

endmodule

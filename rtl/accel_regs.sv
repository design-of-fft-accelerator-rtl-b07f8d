// accel_regs -- register module of the accelerator.
//
// Holds the control word that governs the data flow and collects the
// status the processor polls, on the local bus of opb_wrapper (request in
// one cycle, read data registered and valid the next cycle until the next
// request). Byte address map (local):
//   0x0000 CTRL     rw  [31] enable, [2:0] log2l: symbol length N = 64 << log2l
//   0x0004 STATUS   r   [NANT-1:0] result ready per antenna, [8+a] overrun of
//                       antenna a, [16] branch FFT busy;
//                   w   writing 1 to a ready or overrun bit clears it
//   0x0008 SYMBOLS  r   number of symbols transformed since reset
//   RES_BASE + 4*(a*NMAX + 64*l + k)   r   result word {re, im} of antenna a:
//                       64-point transform k of the l-th decimated sub-sequence
// A result read is passed to the result memory, whose one-cycle read
// latency matches the register read path. `irq` is high while any result
// is ready. The document names the register module and says it stores the
// control signals; the map is this design's choice.
module accel_regs #(
  parameter int NANT     = 2,
  parameter int NMAX     = 2048,
  parameter int AW       = 16,
  parameter int RES_BASE = 32768
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         lb_req,
  input  logic                         lb_we,
  input  logic [AW-1:0]                lb_addr,
  input  logic [31:0]                  lb_wdata,
  output logic [31:0]                  lb_rdata,
  // control
  output logic                         enable,
  output logic [2:0]                   log2l,
  // status
  input  logic [NANT-1:0]              set_ready,
  input  logic [NANT-1:0]              set_overrun,
  input  logic                         busy,
  output logic                         irq,
  // result memory read port
  output logic [$clog2(NANT*NMAX)-1:0] res_raddr,
  input  logic [31:0]                  res_rdata
);

  localparam int RW = $clog2(NANT*NMAX);

  logic [NANT-1:0] ready, overrun;
  logic [31:0]     symbols, reg_q;
  logic            sel_res, is_res;

  assign is_res    = lb_addr >= AW'(RES_BASE);
  assign res_raddr = RW'((lb_addr - AW'(RES_BASE)) >> 2);
  assign irq       = |ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable  <= 1'b0;
      log2l   <= '0;
      ready   <= '0;
      overrun <= '0;
      symbols <= '0;
      reg_q   <= '0;
      sel_res <= 1'b0;
    end else begin
      ready   <= ready | set_ready;
      overrun <= overrun | set_overrun;
      symbols <= symbols + 32'($countones(set_ready));
      if (lb_req) begin
        sel_res <= is_res;
        if (lb_we) begin
          unique case (lb_addr)
            AW'(0): begin
              enable <= lb_wdata[31];
              log2l  <= lb_wdata[2:0];
            end
            AW'(4): begin
              ready   <= (ready & ~lb_wdata[NANT-1:0]) | set_ready;
              overrun <= (overrun & ~lb_wdata[8 +: NANT]) | set_overrun;
            end
            default: ;
          endcase
        end else begin
          unique case (lb_addr)
            AW'(0):  reg_q <= {enable, 28'd0, log2l};
            AW'(4):  reg_q <= {15'd0, busy, 8'(overrun), 8'(ready)};
            AW'(8):  reg_q <= symbols;
            default: reg_q <= '0;
          endcase
        end
      end
    end
  end

  assign lb_rdata = sel_res ? res_rdata : reg_q;

endmodule

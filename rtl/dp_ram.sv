// dp_ram -- simple dual-port RAM: one synchronous write port, one
// synchronous read port. `rdata` shows the word at the `raddr` of the
// previous cycle (one cycle read latency). A read of the address being
// written in the same cycle returns the old word. No reset: the contents
// are undefined until written. Used for the sample buffers and the result
// memory of the accelerator.
module dp_ram #(
  parameter int DEPTH = 4096,
  parameter int WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

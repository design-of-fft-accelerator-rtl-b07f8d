// tb_dp_ram -- checks the dual-port RAM: random writes and reads against an
// array model, one cycle read latency, old data on a same-address
// read-during-write.
module tb_dp_ram;
  localparam int DEPTH = 256, WIDTH = 32;
  logic clk = 0, we = 0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  dp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] expq;

  initial begin
    // fill every word first
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = $urandom_range(1); waddr = 8'($urandom); wdata = $urandom;
      raddr = ($urandom_range(3) == 0) ? waddr : 8'($urandom);
      expq = model[raddr];
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expq) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", raddr, rdata, expq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_accel_regs -- checks the register module on its local bus: CTRL
// write and read-back, STATUS ready/overrun bits set by pulses and cleared
// by writing ones (a set pulse in the same cycle wins), the busy bit, the
// symbol counter, the interrupt, and reads in the result window passed to
// a result-memory model with the right word address.
module tb_accel_regs;
  localparam int NANT = 2, NMAX = 2048, AW = 16, RES_BASE = 32768;

  logic clk = 0, rst_n = 0, lb_req = 0, lb_we = 0, enable, busy = 0, irq;
  logic [AW-1:0] lb_addr = '0;
  logic [31:0] lb_wdata = '0, lb_rdata, res_rdata;
  logic [2:0] log2l;
  logic [NANT-1:0] set_ready = '0, set_overrun = '0;
  logic [11:0] res_raddr;
  accel_regs #(.NANT(NANT), .NMAX(NMAX), .AW(AW), .RES_BASE(RES_BASE)) dut (.*);
  always #5 clk = ~clk;

  // result memory model: registered read of a pattern
  always_ff @(posedge clk) res_rdata <= {20'hABCDE, res_raddr};

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic wr(logic [AW-1:0] a, logic [31:0] d);
    @(negedge clk); lb_req = 1; lb_we = 1; lb_addr = a; lb_wdata = d;
    @(negedge clk); lb_req = 0; lb_we = 0;
  endtask

  task automatic rd(logic [AW-1:0] a, output logic [31:0] d);
    @(negedge clk); lb_req = 1; lb_we = 0; lb_addr = a;
    @(negedge clk); lb_req = 0;
    d = lb_rdata;
  endtask

  task automatic pulse_ready(logic [NANT-1:0] r, logic [NANT-1:0] o);
    @(negedge clk); set_ready = r; set_overrun = o;
    @(negedge clk); set_ready = '0; set_overrun = '0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(16'h0, d); chk(d == 0 && !enable, "CTRL reset");
    wr(16'h0, 32'h8000_0005);
    chk(enable && log2l == 3'd5, "CTRL fields");
    rd(16'h0, d); chk(d == 32'h8000_0005, "CTRL read-back");
    chk(!irq, "irq at reset");
    pulse_ready(2'b01, 2'b00);
    pulse_ready(2'b10, 2'b10);
    pulse_ready(2'b01, 2'b00);
    busy = 1;
    rd(16'h4, d); chk(d == 32'h0001_0203, $sformatf("STATUS %h", d));
    chk(irq, "irq with results ready");
    rd(16'h8, d); chk(d == 3, "symbol counter");
    wr(16'h4, 32'h0000_0001);
    rd(16'h4, d); chk(d[1:0] == 2'b10 && d[9:8] == 2'b10, "clear ready 0");
    // clear and a new set in the same cycle: the set wins
    @(negedge clk); lb_req = 1; lb_we = 1; lb_addr = 16'h4; lb_wdata = 32'h0000_0302; set_ready = 2'b10;
    @(negedge clk); lb_req = 0; lb_we = 0; set_ready = '0;
    rd(16'h4, d); chk(d[1:0] == 2'b10 && d[9:8] == 2'b00, $sformatf("set wins %h", d));
    wr(16'h4, 32'h0000_0003);
    busy = 0;
    rd(16'h4, d); chk(d == 0 && !irq, "all clear");
    for (int i = 0; i < 50; i++) begin
      int w;
      w = $urandom_range(NANT*NMAX - 1);
      rd(16'(RES_BASE + 4*w), d);
      chk(d == {20'hABCDE, 12'(w)}, $sformatf("result word %0d: %h", w, d));
      rd(16'h0, d); chk(d == 32'h8000_0005, "register after result read");
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

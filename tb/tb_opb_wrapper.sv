// tb_opb_wrapper -- checks the OPB slave wrapper against a local-bus model
// (a 64-word register array answering one cycle after each request).
// Random reads and writes inside the window must be acknowledged for
// exactly one cycle, two cycles after the transfer starts, with the right
// read data; Sl_DBus must be zero outside acknowledge cycles; transfers
// outside the address window must cause neither a request nor an
// acknowledge.
module tb_opb_wrapper;
  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam int AW = 16;

  logic clk = 0, rst_n = 0;
  logic OPB_select = 0, OPB_RNW = 0;
  logic [31:0] OPB_ABus = '0, OPB_DBus = '0, Sl_DBus, lb_wdata, lb_rdata;
  logic Sl_xferAck, Sl_errAck, Sl_retry, Sl_toutSup, lb_req, lb_we;
  logic [AW-1:0] lb_addr;
  opb_wrapper #(.BASE(BASE), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_req = 0;
  logic [31:0] regs [64];
  logic [31:0] model [64];

  // local-bus responder
  always_ff @(posedge clk) begin
    if (lb_req) begin
      n_req++;
      if (lb_we) regs[lb_addr[7:2]] <= lb_wdata;
      else       lb_rdata <= regs[lb_addr[7:2]];
    end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // one transfer; returns the read data and the cycle of the acknowledge
  task automatic xfer(bit rnw, logic [31:0] addr, logic [31:0] wd, output logic [31:0] rd,
                      output int ack_cyc);
    int c = 0, acks = 0;
    @(negedge clk);
    OPB_select = 1; OPB_RNW = rnw; OPB_ABus = addr; OPB_DBus = wd;
    ack_cyc = -1;
    rd = '0;
    while (c < 6) begin
      c++;
      if (Sl_xferAck) begin
        acks++;
        ack_cyc = c;
        rd = Sl_DBus;
        @(posedge clk); #1;
        OPB_select = 0; OPB_RNW = 0; OPB_ABus = '0; OPB_DBus = '0;
        break;
      end else chk(Sl_DBus == '0, "Sl_DBus not zero without acknowledge");
      @(negedge clk);
    end
    OPB_select = 0;
    @(negedge clk);
    chk(!Sl_xferAck, "acknowledge longer than one cycle");
  endtask

  initial begin
    logic [31:0] rd;
    int ac, req0;
    for (int i = 0; i < 64; i++) begin regs[i] = '0; model[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int w;
      bit rnw, outside;
      w = $urandom_range(63);
      rnw = $urandom_range(1);
      outside = ($urandom_range(9) == 0);
      req0 = n_req;
      if (outside) begin
        xfer(rnw, 32'h4000_0000 | 32'(w * 4), $urandom, rd, ac);
        chk(ac == -1 && n_req == req0, "transfer outside the window answered");
      end else if (rnw) begin
        xfer(1'b1, BASE | 32'(w * 4), '0, rd, ac);
        chk(ac == 3, $sformatf("read acknowledge after %0d cycles", ac));
        chk(rd == model[w], $sformatf("read word %0d: %h exp %h", w, rd, model[w]));
      end else begin
        logic [31:0] d;
        d = $urandom;
        xfer(1'b0, BASE | 32'(w * 4), d, rd, ac);
        chk(ac == 3, $sformatf("write acknowledge after %0d cycles", ac));
        model[w] = d;
      end
    end
    chk(!Sl_errAck && !Sl_retry && !Sl_toutSup, "error/retry/timeout lines");
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

// tb_sdf_delay -- checks the feedback shift register against a queue model:
// with random enable gaps, every word must leave exactly DEPTH enabled
// cycles after it entered, and nothing moves while the enable is low.
module tb_sdf_delay;
  import fft_pkg::*;
  localparam int DEPTH = 32;

  logic clk = 0, rst_n = 0, en = 0;
  cplx_t din = '0, dout;
  sdf_delay #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t q[$];

  initial begin
    for (int i = 0; i < DEPTH; i++) q.push_back('0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (dout != q[0]) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d dout=%h exp=%h", t, dout, q[0]);
      end
      en  = ($urandom_range(3) != 0);
      din = cplx_t'($urandom);
      if (en) begin
        void'(q.pop_front());
        q.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_in_buffer -- checks the double-buffered input memory (NMAX = 256,
// N = 128). Three symbols are streamed with random gaps; after every N-th
// sample sym_done must pulse once, naming the bank just filled, and the
// banks must alternate. The filled bank is then read back in random order
// before the next symbol is written into the other bank. Clearing `enable`
// in the middle of a symbol must restart it.
module tb_in_buffer;
  import fft_pkg::*;
  localparam int NMAX = 256;
  localparam int N    = 128;

  logic clk = 0, rst_n = 0, enable = 0, in_valid = 0, sym_done, done_bank, rd_bank = 0;
  logic [2:0] log2l = 3'd1;
  logic [7:0] rd_addr = '0;
  cplx_t in_data = '0, rd_data;
  in_buffer #(.NMAX(NMAX)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_done = 0;
  cplx_t sym [3][N];
  logic  banks [3];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (sym_done) begin
    banks[n_done % 3] = done_bank;
    n_done++;
  end

  initial begin
    for (int s = 0; s < 3; s++) for (int i = 0; i < N; i++) sym[s][i] = cplx_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    enable = 1;
    // a partial symbol, then enable low: must be discarded
    for (int i = 0; i < 40; i++) begin @(negedge clk); in_valid = 1; in_data = cplx_t'($urandom); end
    @(negedge clk); in_valid = 0; enable = 0;
    @(negedge clk); enable = 1;
    for (int s = 0; s < 3; s++) begin
      for (int i = 0; i < N; i++) begin
        while ($urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk); in_valid = 1; in_data = sym[s][i];
      end
      @(negedge clk); in_valid = 0;
      @(negedge clk);
      chk(n_done == s + 1, $sformatf("symbol %0d: sym_done count %0d", s, n_done));
      if (s > 0) chk(banks[s] != banks[s-1], "banks alternate");
      // read back the completed symbol in random order
      rd_bank = banks[s];
      for (int t = 0; t < N; t++) begin
        int a;
        a = $urandom_range(N - 1);
        @(negedge clk); rd_addr = 8'(a);
        @(posedge clk); #1;
        chk(rd_data == sym[s][a], $sformatf("symbol %0d word %0d", s, a));
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

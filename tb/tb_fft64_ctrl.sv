// tb_fft64_ctrl -- checks the slot flow control of the branch FFT. A
// random mix of blocks and idle periods is offered; the testbench keeps
// its own model: in_ready must be high at slot boundaries and throughout
// data slots and low inside flush slots, the pipeline must advance
// whenever data is offered or still inside and stop otherwise, and
// out_valid must repeat the accept pattern LAT advances later.
module tb_fft64_ctrl;
  localparam int N   = 64;
  localparam int LAT = 71;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, adv, out_valid, flushing;
  logic [5:0] cnt;
  fft64_ctrl #(.N(N), .LAT(LAT)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_flush = 0, n_stop = 0, n_held = 0;
  bit hist [LAT];       // accept flags of the last LAT advances, [0] newest
  int m_cnt = 0;        // model counter
  bit m_data = 0;       // model: current slot carries data

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  int offered_left = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      bit busy, exp_adv, exp_ready, acc;
      @(negedge clk);
      // stimulus: start a block with some probability; once accepted at a
      // boundary, keep offering for the rest of the block
      if (offered_left == 0) in_valid = ($urandom_range(99) < 3);
      busy = 0;
      foreach (hist[i]) if (hist[i]) busy = 1;
      exp_ready = (m_cnt == 0) || m_data;
      exp_adv   = (m_cnt != 0) || in_valid || busy;
      #1;
      chk(in_ready == exp_ready, $sformatf("t=%0d in_ready", t));
      chk(adv == exp_adv, $sformatf("t=%0d adv", t));
      chk(int'(cnt) == m_cnt, $sformatf("t=%0d cnt", t));
      chk(out_valid == hist[LAT-1], $sformatf("t=%0d out_valid", t));
      if (flushing) n_flush++;
      if (!adv) n_stop++;
      if (in_valid && !in_ready) n_held++;
      acc = in_valid && exp_ready;
      if (acc && m_cnt == 0) offered_left = N;
      if (offered_left > 0 && acc) offered_left--;
      if (exp_adv) begin
        if (m_cnt == 0) m_data = in_valid;
        m_cnt = (m_cnt + 1) % N;
        for (int i = LAT-1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = acc;
      end
    end
    chk(n_flush > 0, "no flush slot");
    chk(n_stop > 0, "pipeline never stopped");
    chk(n_held > 0, "no offer was held off");
    $display("flush cycles %0d, stopped %0d, held %0d", n_flush, n_stop, n_held);
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

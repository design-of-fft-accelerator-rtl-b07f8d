// tb_sched_ctrl -- checks the schedule controller with models around it
// (NANT = 2, NMAX = 256, N = 128 so L = 2). The input-buffer model returns
// a word that encodes antenna, bank and address one cycle after the read;
// the FFT model accepts data only at 64-sample boundaries after random
// pauses (like flush slots) and echoes each accepted word LAT cycles later
// with out_idx = its position in the block. So every result write must
// carry the word read from address L*n1 + l of the right bank and antenna,
// land at a*NMAX + 64*l + n1, and set_ready must pulse once per symbol.
// Symbols arriving for both antennas must be served in turn, and a symbol
// arriving while its antenna is still pending must raise set_overrun.
// When a symbol is already pending as the last sample of another is
// accepted, the next one must be offered on the very next cycle.
module tb_sched_ctrl;
  import fft_pkg::*;
  localparam int NANT = 2, NMAX = 256, LAT = 9;
  localparam int LG = 1, L = 2, N = 128;

  logic clk = 0, rst_n = 0;
  logic [2:0] log2l = 3'(LG);
  logic [NANT-1:0] sym_done = '0, done_bank = '0, set_ready, set_overrun;
  logic rd_bank, fft_in_valid, fft_in_ready, fft_out_valid, res_we, busy;
  logic [7:0] rd_addr;
  cplx_t rd_data [NANT];
  cplx_t fft_in_data, fft_out_data, res_wdata;
  logic [LOG2N-1:0] fft_out_idx;
  logic [8:0] res_waddr;
  sched_ctrl #(.NANT(NANT), .NMAX(NMAX)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ready [NANT], n_overrun = 0, n_writes = 0;
  int n_acc = 0, n_chain = 0;
  logic prev_last = 1'b0;
  int order[$];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  function automatic cplx_t enc(int a, int b, int addr);
    return '{re: sample_t'(a * 4096 + b * 1024 + addr), im: sample_t'(addr)};
  endfunction

  // input buffer model
  always_ff @(posedge clk)
    for (int a = 0; a < NANT; a++) rd_data[a] <= enc(a, rd_bank, rd_addr);

  // FFT model: 64-sample slots, random pause before a slot opens
  int pos = 0, pause = 0;
  cplx_t  pipe_d [LAT];
  logic   pipe_v [LAT];
  logic [5:0] pipe_i [LAT];
  assign fft_in_ready = (pos != 0) || (pause == 0);
  always @(posedge clk) begin
    if (fft_in_valid && fft_in_ready) pos <= (pos + 1) % 64;
    if (pos == 0 && pause > 0) pause <= pause - 1;
    if (fft_in_valid && fft_in_ready && pos == 63) pause <= $urandom_range(3);
    for (int i = LAT-1; i > 0; i--) begin
      pipe_d[i] <= pipe_d[i-1]; pipe_v[i] <= pipe_v[i-1]; pipe_i[i] <= pipe_i[i-1];
    end
    pipe_d[0] <= fft_in_data;
    pipe_v[0] <= fft_in_valid && fft_in_ready;
    pipe_i[0] <= 6'(pos);
  end
  assign fft_out_valid = pipe_v[LAT-1];
  assign fft_out_data  = pipe_d[LAT-1];
  assign fft_out_idx   = pipe_i[LAT-1];

  // expected bank per antenna of the symbol being served
  logic exp_bank [NANT];
  int   cur_a = -1, wcount = 0;

  always @(posedge clk) if (rst_n) begin
    // gapless hand-over from one symbol to the next
    if (prev_last && fft_in_valid) n_chain++;
    prev_last <= fft_in_valid && fft_in_ready && n_acc % N == N - 1;
    if (fft_in_valid && fft_in_ready) n_acc++;
    for (int a = 0; a < NANT; a++) begin
      if (set_ready[a]) begin n_ready[a]++; order.push_back(a); end
      if (set_overrun[a]) n_overrun++;
    end
    if (res_we) begin
      int a, l, n1, addr;
      a  = int'(res_waddr) / NMAX;
      l  = (int'(res_waddr) % NMAX) / 64;
      n1 = int'(res_waddr) % 64;
      addr = L * n1 + l;
      n_writes++;
      chk(res_wdata == enc(a, exp_bank[a], addr),
          $sformatf("write %0d: ant %0d l %0d n1 %0d data %h", n_writes, a, l, n1, res_wdata));
    end
  end

  task automatic done(logic [NANT-1:0] which, logic bank);
    @(negedge clk);
    sym_done = which;
    for (int a = 0; a < NANT; a++) begin
      done_bank[a] = bank;
      if (which[a]) exp_bank[a] = bank;
    end
    @(negedge clk);
    sym_done = '0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // both antennas complete a symbol in bank 0, then in bank 1
    done(2'b11, 1'b0);
    repeat (700) @(negedge clk);
    chk(n_ready[0] == 1 && n_ready[1] == 1, "one result per antenna");
    chk(n_writes == 2 * N, $sformatf("%0d result writes", n_writes));
    done(2'b10, 1'b1);
    repeat (20) @(negedge clk);
    done(2'b01, 1'b1);
    repeat (700) @(negedge clk);
    chk(n_ready[0] == 2 && n_ready[1] == 2, "second round");
    chk(order.size() == 4 && order[0] == 0 && order[1] == 1 && order[2] == 1 && order[3] == 0,
        "service order");
    // antenna 1 completes twice while antenna 0 is being served: overrun
    done(2'b01, 1'b0);
    repeat (5) @(negedge clk);
    exp_bank[1] = 1'b0;
    done(2'b10, 1'b0);
    repeat (5) @(negedge clk);
    done(2'b10, 1'b1);
    repeat (800) @(negedge clk);
    chk(n_overrun == 1, $sformatf("overrun count %0d", n_overrun));
    chk(!busy, "idle at the end");
    chk(n_chain >= 2, $sformatf("gapless hand-overs %0d", n_chain));
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

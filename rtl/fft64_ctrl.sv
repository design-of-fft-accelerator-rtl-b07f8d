// fft64_ctrl -- sample counter and flow control of the branch FFT.
//
// The SDF pipeline has no per-stage handshake: all stages move together
// when `adv` is high, and each stage derives its mode from the common
// sample counter `cnt` (the position, 0..N-1, of the sample now entering
// the first butterfly) minus its own fixed pipeline offset.
//
// Time is cut into slots of N advances. A slot opens at cnt = 0; it is a
// data slot if a sample is offered then, and the source must then present
// N samples on N consecutive cycles. Otherwise, while results are still
// inside the pipeline, the slot is an empty "flush" slot that pushes them
// out, and `in_ready` stays low until the next slot boundary. With nothing
// inside and nothing offered the pipeline stops. So back-to-back blocks
// stream at one sample per clock, and the last block leaves without
// needing a following one.
//
// `out_valid` is the accepted-sample flag delayed by LAT advances, the
// input-to-output latency of the datapath (71 cycles, as the document's
// chip). Continuous input within a block and frame alignment are this
// design's own rules; the document gives only the pipeline and its latency.
module fft64_ctrl
  import fft_pkg::*;
#(
  parameter int N   = FFT_N,
  parameter int LAT = 71
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic                 adv,
  output logic [$clog2(N)-1:0] cnt,
  output logic                 out_valid,
  output logic                 flushing    // current slot is an empty flush slot
);

  logic           slot_data;
  logic [LAT-1:0] vsr;
  logic           accept;

  assign in_ready  = (cnt == '0) || slot_data;
  assign accept    = in_valid && in_ready;
  assign adv       = (cnt != '0) || in_valid || (|vsr);
  assign out_valid = vsr[LAT-1];
  assign flushing  = (cnt != '0) && !slot_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      slot_data <= 1'b0;
      vsr       <= '0;
    end else if (adv) begin
      cnt <= cnt + 1'b1;
      if (cnt == '0) slot_data <= in_valid;
      vsr <= {vsr[LAT-2:0], accept};
    end
  end

  // A data slot must be filled on consecutive cycles.
  a_contiguous : assert property (@(posedge clk) disable iff (!rst_n)
                                  (slot_data && cnt != '0) |-> in_valid)
    else $error("fft64_ctrl: input gap inside a data block");

endmodule

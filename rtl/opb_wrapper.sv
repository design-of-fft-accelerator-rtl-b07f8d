// opb_wrapper -- On-chip Peripheral Bus (OPB) slave wrapper.
//
// Lets the processor reach the accelerator's registers and result memory
// over the OPB. A transfer addressed to this slave (OPB_select high and
// OPB_ABus inside the BASE..BASE+SIZE-1 window) is turned into a one-cycle
// request on a simple local bus; the local side answers with its read data
// one cycle later, and the wrapper then raises Sl_xferAck for one cycle
// with Sl_DBus carrying the read data. Sl_DBus is zero whenever the slave
// does not acknowledge, as the OR-ed OPB data bus requires. After an
// acknowledge the wrapper waits one cycle before it accepts the next
// transfer. Errors, retries and timeout suppression are never signalled.
// Writes are whole 32-bit words; the byte enables are not used.
//
// The document says only that the wrapper handles the OPB handshake; the
// subset of OPB signals, the address window and the two-cycle access are
// this design's choices. Bus vectors are numbered [31:0] with bit 31 the
// most significant (OPB documentation numbers them [0:31] from the MSB).
module opb_wrapper #(
  parameter logic [31:0] BASE = 32'h8000_0000,
  parameter int          AW   = 16                  // local byte address width
) (
  input  logic          clk,
  input  logic          rst_n,
  // OPB slave side
  input  logic          OPB_select,
  input  logic          OPB_RNW,
  input  logic [31:0]   OPB_ABus,
  input  logic [31:0]   OPB_DBus,
  output logic          Sl_xferAck,
  output logic [31:0]   Sl_DBus,
  output logic          Sl_errAck,
  output logic          Sl_retry,
  output logic          Sl_toutSup,
  // local bus
  output logic          lb_req,
  output logic          lb_we,
  output logic [AW-1:0] lb_addr,
  output logic [31:0]   lb_wdata,
  input  logic [31:0]   lb_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACK, S_GAP} state_t;
  state_t state;
  logic   hit;

  assign hit = OPB_select && ((OPB_ABus & ~32'((64'd1 << AW) - 1)) == BASE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      lb_req   <= 1'b0;
      lb_we    <= 1'b0;
      lb_addr  <= '0;
      lb_wdata <= '0;
    end else begin
      lb_req <= 1'b0;
      unique case (state)
        S_IDLE: if (hit) begin
          lb_req   <= 1'b1;
          lb_we    <= !OPB_RNW;
          lb_addr  <= OPB_ABus[AW-1:0];
          lb_wdata <= OPB_DBus;
          state    <= S_WAIT;
        end
        S_WAIT: state <= S_ACK;    // local side answers
        S_ACK:  state <= S_GAP;    // acknowledge on the bus
        S_GAP:  state <= S_IDLE;
      endcase
    end
  end

  assign Sl_xferAck = (state == S_ACK);
  assign Sl_DBus    = (state == S_ACK && !lb_we) ? lb_rdata : '0;
  assign Sl_errAck  = 1'b0;
  assign Sl_retry   = 1'b0;
  assign Sl_toutSup = 1'b0;

  // a transfer must not be abandoned before it is acknowledged
  a_hold_select : assert property (@(posedge clk) disable iff (!rst_n)
                                   (state inside {S_WAIT, S_ACK}) |-> OPB_select)
    else $error("opb_wrapper: OPB_select dropped during a transfer");

endmodule

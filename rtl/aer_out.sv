// aer_out: sender side of a parallel AER bus. It drives the board's AER-OUT
// port and also the GPIO port read by the embedded computer, whose software
// answers REQ with ACK.
//
// An event taken from the valid/ready stream is put on the address lines; one
// clock later REQ rises. When the (synchronized) ACK is seen high, REQ falls,
// and when ACK is seen low again the block is free for the next event. This is
// the four-phase order chosen for this design; the document names only the
// REQ and ACK lines. The address is held until the next event, which keeps it
// stable for the whole time REQ is high.
//
// Timing: in_ready is high only in the idle state, for one clock per event.
// With a receiver that answers within the same clock, one event takes 8
// clocks: accept, REQ up, 2 clocks of ACK synchronizer, REQ down, 2 clocks
// of synchronizer for ACK low, return to idle. Reset is synchronous and
// active low.
module aer_out #(
  parameter int unsigned ADDR_W = aer_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // event stream
  input  logic              in_valid,
  input  logic [ADDR_W-1:0] in_addr,
  output logic              in_ready,
  // asynchronous AER bus
  output logic              req,
  output logic [ADDR_W-1:0] addr,
  input  logic              ack
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_WAIT_ACK, S_WAIT_NACK} state_e;
  state_e state;
  logic   ack_s;

  sync_2ff u_sync (.clk(clk), .rst_n(rst_n), .d(ack), .q(ack_s));

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      req   <= 1'b0;
      addr  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          addr  <= in_addr;
          state <= S_SETUP;
        end
        S_SETUP: begin
          req   <= 1'b1;
          state <= S_WAIT_ACK;
        end
        S_WAIT_ACK: if (ack_s) begin
          req   <= 1'b0;
          state <= S_WAIT_NACK;
        end
        S_WAIT_NACK: if (!ack_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The address must not move while REQ is high.
  a_bundled: assert property (@(posedge clk) disable iff (!rst_n) req |=> $stable(addr));
endmodule

// aer_in: receiver side of a parallel AER bus (the board's AER-IN port).
//
// A sender raises REQ with an address on the bus; this block takes the event
// and answers with ACK, so that the asynchronous bus becomes a synchronous
// valid/ready event stream inside the FPGA. The handshake is four-phase:
// REQ up, ACK up, REQ down, ACK down. REQ and ACK are the lines of the AER
// protocol; the four-phase order, the REQ synchronizer and the rule that ACK
// is held back until the event has been taken downstream are choices of this
// design.
//
// Timing: REQ passes a two-flop synchronizer, so the address is sampled two
// or three clocks after REQ rises, while the sender still holds it stable.
// The event is offered on out_valid the clock after that. ACK rises the clock
// after out_ready accepts the event and falls two clocks after REQ falls. A
// full event cycle therefore takes at least 7 clocks plus the sender's own
// delays. Reset is synchronous and active low.
module aer_in #(
  parameter int unsigned ADDR_W = aer_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // asynchronous AER bus
  input  logic              req,
  input  logic [ADDR_W-1:0] addr,
  output logic              ack,
  // event stream
  output logic              out_valid,
  output logic [ADDR_W-1:0] out_addr,
  input  logic              out_ready
);
  typedef enum logic [1:0] {S_IDLE, S_HOLD, S_ACK} state_e;
  state_e state;
  logic   req_s;

  sync_2ff u_sync (.clk(clk), .rst_n(rst_n), .d(req), .q(req_s));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ack      <= 1'b0;
      out_addr <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req_s) begin
          out_addr <= addr;
          state    <= S_HOLD;
        end
        S_HOLD: if (out_ready) begin
          ack   <= 1'b1;
          state <= S_ACK;
        end
        S_ACK: if (!req_s) begin
          ack   <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign out_valid = (state == S_HOLD);

  // A stream event, once offered, stays until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_addr));
endmodule

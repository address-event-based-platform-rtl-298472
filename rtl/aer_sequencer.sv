// aer_sequencer: plays a list of timed events onto the event path.
//
// Each 32-bit sequence word holds a delay in its upper 16 bits and an event
// address in its lower 16 bits. The delay is the time, in ticks, from the
// previous event to this one; a tick is one clock, or one clock in 16 when
// prescale16 is set. A word whose delay field is 16'hFFFF is a pure wait:
// it takes 65535 ticks of the schedule and sends nothing, which lets a
// sequence contain gaps longer than one word can express.
//
// Times are kept on an absolute grid. The counter "since" holds the ticks
// elapsed since the scheduled time of the previous event. An event is
// offered once since reaches its delay, and the delay is then subtracted
// rather than the counter cleared. If the path downstream acknowledged an
// event late, or the words follow faster than the sequencer can send them,
// the excess stays in the counter and the following events go out early
// enough to get back on the grid. A late acknowledge therefore shifts one
// event but does not stretch the rest of the sequence. The word format, the
// maximum-wait word, the x16 time scale and this catch-up rule follow the
// timed output sequencer of an earlier PCI event interface. The encoding of
// the wait-only word, the 24-bit saturating counter and the stream
// interfaces are this design's own.
//
// Timing (no prescale, always-ready receiver): events with delay d >= 3
// leave exactly d clocks apart; shorter delays are sent 3 clocks apart and
// the lag is made up by later, longer delays. The first event is offered d
// ticks after the first clock edge with en high (at least 1 clock). While en
// is low no word is taken and the schedule restarts; a word already taken is
// completed. Reset is synchronous and active low.
module aer_sequencer
  import aer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        prescale16,
  // sequence words
  input  logic        in_valid,
  input  logic [31:0] in_word,
  output logic        in_ready,
  // events
  output logic        out_valid,
  output aer_addr_t   out_addr,
  input  logic        out_ready,
  // status
  output logic [23:0] lag,         // ticks behind schedule at the last release
  output logic        late         // pulse: an event or wait was released behind schedule
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_SEND} state_e;
  state_e      state;
  logic [15:0] delay;
  logic        is_pause;
  logic [23:0] since, since_inc;
  logic [3:0]  pre;
  logic        tick;

  assign tick      = !prescale16 || (pre == 4'hF);
  assign since_inc = (tick && since != '1) ? since + 1'b1 : since;
  assign in_ready  = en && (state == S_IDLE);
  assign out_valid = (state == S_SEND);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      delay    <= '0;
      is_pause <= 1'b0;
      out_addr <= '0;
      since    <= '0;
      pre      <= '0;
      lag      <= '0;
      late     <= 1'b0;
    end else begin
      pre   <= pre + 1'b1;
      late  <= 1'b0;
      since <= since_inc;
      unique case (state)
        S_IDLE: begin
          if (!en) since <= '0;
          if (in_valid && in_ready) begin
            out_addr <= in_word[15:0];
            delay    <= in_word[31:16];
            is_pause <= (in_word[31:16] == 16'hFFFF);
            state    <= S_WAIT;
          end
        end
        S_WAIT: if (since >= 24'(delay)) begin
          since <= since_inc - 24'(delay);
          lag   <= since - 24'(delay);
          late  <= (since != 24'(delay));
          state <= is_pause ? S_IDLE : S_SEND;
        end
        S_SEND: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_addr));
endmodule

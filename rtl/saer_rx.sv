// saer_rx: rebuilds address events from the 10-bit word stream of a serial
// AER (SAER) link (the inverse of saer_tx).
//
// A word with valid=1 and first=1 starts an event and carries its high
// address byte; the next valid word, with first=0, carries the low byte and
// completes the event. Idle words (valid=0) are ignored, even between the
// two halves. A second word without a first word, or two first words in a
// row, counts a framing error and the block resynchronizes on the next first
// word. A serial link has no backpressure, so a completed event that finds
// the output register still full is dropped and counted as an overrun.
//
// Timing: the event is offered on out_valid the clock after its second word
// arrives (word_valid high). Reset is synchronous and active low.
module saer_rx
  import aer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  saer_word_t  word_i,
  input  logic        word_valid,
  output logic        out_valid,
  output aer_addr_t   out_addr,
  input  logic        out_ready,
  output logic [15:0] frame_errors,
  output logic [15:0] overruns
);
  logic       have_hi;
  logic [7:0] hi;
  logic       w_valid, w_first;

  assign w_valid = word_i[W_VALID];
  assign w_first = word_i[W_FIRST];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_hi      <= 1'b0;
      hi           <= '0;
      out_valid    <= 1'b0;
      out_addr     <= '0;
      frame_errors <= '0;
      overruns     <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (word_valid && w_valid) begin
        if (w_first) begin
          if (have_hi) frame_errors <= frame_errors + 1'b1;
          have_hi <= 1'b1;
          hi      <= word_i[7:0];
        end else if (!have_hi) begin
          frame_errors <= frame_errors + 1'b1;
        end else begin
          have_hi <= 1'b0;
          if (out_valid && !out_ready) begin
            overruns <= overruns + 1'b1;
          end else begin
            out_valid <= 1'b1;
            out_addr  <= {hi, word_i[7:0]};
          end
        end
      end
    end
  end
endmodule

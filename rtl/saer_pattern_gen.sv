// saer_pattern_gen: test-pattern source for checking a serial AER link.
//
// While enabled, it offers a new 10-bit word for every word slot of the
// serializer: a counter that goes up by one each time the serializer takes a
// word and wraps from 1023 to 0. A continuously generated 10-bit test word is
// from the document; the counting sequence is this design's choice, and it
// lets the checker at the far end predict each word without knowing the link
// latency.
//
// Interface: word_o is taken when word_ready is high, and the next value
// appears the clock after. When disabled the counter holds. Reset is
// synchronous and active low and restarts the sequence at 0.
module saer_pattern_gen
  import aer_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       word_ready,
  output saer_word_t word_o
);
  always_ff @(posedge clk) begin
    if (!rst_n)                 word_o <= '0;
    else if (en && word_ready)  word_o <= word_o + 1'b1;
  end
endmodule

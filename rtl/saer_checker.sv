// saer_checker: checks the words received on a serial AER link against the
// sequence sent by saer_pattern_gen.
//
// The checker locks once two consecutive received words follow each other
// (the second is the first plus one, modulo 1024); words seen before that,
// such as stale data still in the link when the test starts, are not
// counted. While locked, each word that is the previous one plus one counts
// as good and any other word counts as an error and unlocks the checker,
// which relocks on the next pair of consecutive words. A single corrupted
// word or a single lost word therefore costs exactly one error. Comparing
// each received word with the sent one is from the document; predicting it
// from the previous word, rather than keeping a copy delayed by the link
// latency, is this design's choice, and needs no knowledge of that latency.
//
// Interface: word_i is sampled when word_valid is high. The counters saturate
// at their maximum. Clearing en unlocks the checker and keeps the counts;
// reset (synchronous, active low) clears them.
module saer_checker
  import aer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  saer_word_t  word_i,
  input  logic        word_valid,
  output logic [31:0] good,
  output logic [31:0] errors,
  output logic        locked
);
  saer_word_t expect_w;
  logic       seen;   // expect_w holds a prediction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      good     <= '0;
      errors   <= '0;
      locked   <= 1'b0;
      seen     <= 1'b0;
      expect_w <= '0;
    end else if (!en) begin
      locked <= 1'b0;
      seen   <= 1'b0;
    end else if (word_valid) begin
      expect_w <= word_i + 1'b1;
      seen     <= 1'b1;
      if (word_i == expect_w && seen) begin
        locked <= 1'b1;
        if (good != '1) good <= good + 1'b1;
      end else begin
        locked <= 1'b0;
        if (locked && errors != '1) errors <= errors + 1'b1;
      end
    end
  end
endmodule

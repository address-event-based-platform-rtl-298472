// tb_saer_pattern_gen: self-checking test of saer_pattern_gen.
// The word taken at each word_ready must be the previous one plus one,
// modulo 1024, including the wrap; the word must hold when word_ready is low
// or the generator is disabled, and reset must restart it at 0.
module tb_saer_pattern_gen;
  import aer_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       en = 0, word_ready = 0;
  saer_word_t word_o;
  int checks = 0, failures = 0;
  saer_word_t prev;
  bit have_prev = 0;
  int n_taken = 0;

  saer_pattern_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (have_prev) begin
      checks++;
      if (word_o != prev) begin failures++; $display("word %h exp %h", word_o, prev); end
    end
    if (en && word_ready) begin prev = word_o + 1'b1; n_taken++; end
    else prev = word_o;
    have_prev = 1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (word_o != 0) begin failures++; $display("reset value %h", word_o); end
    en = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      word_ready = $urandom_range(0, 3) != 0;
      if (i % 500 == 499) en = ~en;
    end
    @(negedge clk);
    checks++;
    if (n_taken < 1100) begin failures++; $display("only %0d words, no wrap", n_taken); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_saer_checker: self-checking test of saer_checker.
// A counting sequence with random gaps is fed in after an arbitrary start
// value (the link latency is unknown to the checker); no error may be
// counted and every word after the first must count as good. Then a word is
// corrupted and one is lost, and each must cost exactly one error. Stale
// words before the sequence starts must not count.
module tb_saer_checker;
  import aer_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        en = 0;
  saer_word_t  word_i = '0;
  logic        word_valid = 0;
  logic [31:0] good, errors;
  logic        locked;
  int checks = 0, failures = 0;
  saer_word_t w;

  saer_checker dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input saer_word_t x);
    @(negedge clk);
    while ($urandom_range(0, 2) == 0) begin word_valid = 0; @(negedge clk); end
    word_i = x;
    word_valid = 1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    en = 1;
    send(10'd5); send(10'd77); send(10'd300);  // stale words
    w = 10'd1000;
    for (int i = 0; i < 2000; i++) begin send(w); w++; end
    @(negedge clk);
    word_valid = 0;
    @(negedge clk);
    checks += 3;
    if (!locked) begin failures++; $display("not locked"); end
    if (good != 1999) begin failures++; $display("good %0d exp 1999", good); end
    if (errors != 0) begin failures++; $display("errors %0d", errors); end
    // one corrupted word: it and the word after it mismatch
    send(w ^ 10'h004); w++;
    send(w); w++;
    send(w); w++;
    @(negedge clk);
    word_valid = 0;
    @(negedge clk);
    checks++;
    if (errors != 1) begin failures++; $display("errors %0d exp 1 after corruption", errors); end
    // one lost word
    w++;
    send(w); w++;
    send(w); w++;
    @(negedge clk);
    word_valid = 0;
    @(negedge clk);
    checks++;
    if (errors != 2) begin failures++; $display("errors %0d exp 2 after loss", errors); end
    en = 0;
    @(negedge clk);
    checks++;
    if (locked) begin failures++; $display("still locked when disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

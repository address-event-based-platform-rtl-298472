// tb_saer_tx: self-checking test of saer_tx.
// Random events with random gaps go in; the word stream is taken either
// every clock (as by a serializer chip) or at random clocks. A decoder in
// the testbench checks that each event appears as a first word with the
// high byte followed by a second word with the low byte, that only idle
// words come in between, and that a continuous stream on a word-per-clock
// link carries one event every two clocks.
module tb_saer_tx;
  import aer_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0, in_ready;
  aer_addr_t  in_addr = '0;
  saer_word_t word_o;
  logic       word_ready = 1;
  int checks = 0, failures = 0;
  logic [15:0] sent [$];
  bit   have_hi = 0;
  logic [7:0] hi;
  int n_ev = 0;

  saer_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decoder: a word is consumed at each rising edge with word_ready high
  always @(posedge clk) if (rst_n && word_ready) begin
    if (word_o[W_VALID]) begin
      if (word_o[W_FIRST]) begin
        checks++;
        if (have_hi) begin failures++; $display("two first words"); end
        have_hi = 1;
        hi = word_o[7:0];
      end else begin
        logic [15:0] e;
        checks++;
        if (!have_hi) begin failures++; $display("second word without first"); end
        e = sent.pop_front();
        if ({hi, word_o[7:0]} != e) begin failures++; $display("event %h exp %h", {hi, word_o[7:0]}, e); end
        have_hi = 0;
        n_ev++;
      end
    end else if (word_o != SAER_IDLE) begin
      checks++; failures++; $display("bad idle word %h", word_o);
    end
  end

  task automatic run(input int n, input bit random_ready, input int max_gap);
    for (int i = 0; i < n; i++) begin
      repeat ($urandom_range(0, max_gap)) @(negedge clk);
      @(negedge clk);
      in_valid = 1;
      in_addr  = 16'($urandom);
      word_ready = random_ready ? $urandom_range(0, 1) == 1 : 1'b1;
      #1;
      while (!in_ready) begin
        @(negedge clk);
        word_ready = random_ready ? $urandom_range(0, 1) == 1 : 1'b1;
        #1;
      end
      sent.push_back(in_addr);
      @(posedge clk);
      #1 in_valid = 0;
    end
  endtask

  initial begin
    int t0, n0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(300, 0, 3);
    run(300, 1, 3);
    @(negedge clk);
    word_ready = 1;
    repeat (4) @(negedge clk);
    // throughput on a word-per-clock link, events always waiting
    n0 = n_ev;
    t0 = $time;
    run(100, 0, 0);
    repeat (4) @(negedge clk);
    checks++;
    // 100 events need 200 word slots plus a few clocks of start-up
    if (($time - t0) / 10 > 210) begin failures++; $display("too slow: %0d clocks", ($time - t0) / 10); end
    checks++;
    if (n_ev != 700 || sent.size() != 0) begin failures++; $display("events %0d", n_ev); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

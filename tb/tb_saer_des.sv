// tb_saer_des: self-checking test of saer_des.
// A line model sends 12-bit frames (start '1', ten data bits LSB first,
// stop '0') of random words, back to back and with random idle gaps, and
// starts in the middle of an idle stream so the receiver must find the
// frame boundary. It checks each word, the one-clock word_valid pulse right
// after the stop bit, and that a frame with a bad stop bit is dropped and
// counted.
module tb_saer_des;
  import aer_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        line_i = 0;
  saer_word_t  word_o;
  logic        word_valid;
  logic [15:0] frame_errors;
  int checks = 0, failures = 0;
  saer_word_t sent [$];
  int n_words = 0;

  saer_des dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && word_valid) begin
    saer_word_t e;
    e = sent.pop_front();
    checks++;
    if (word_o != e) begin failures++; $display("word %h exp %h", word_o, e); end
    n_words++;
  end

  task automatic frame(input saer_word_t w, input logic stop);
    logic [FRAME_BITS-1:0] fr;
    fr = {stop, w, 1'b1};
    for (int b = 0; b < FRAME_BITS; b++) begin
      @(negedge clk);
      line_i = fr[b];
    end
  endtask

  initial begin
    int t_stop;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      saer_word_t w;
      w = SAER_W'($urandom);
      if ($urandom_range(0, 3) == 0) begin
        repeat ($urandom_range(1, 5)) begin @(negedge clk); line_i = 0; end
      end
      sent.push_back(w);
      frame(w, 1'b0);
    end
    // timing: word_valid on the clock after the stop bit is sampled
    sent.push_back(10'h2A5);
    frame(10'h2A5, 1'b0);
    @(posedge clk);  // stop bit sampled here
    #1;
    checks += 2;
    if (!word_valid) begin failures++; $display("word_valid not on the clock after the stop bit"); end
    @(posedge clk);
    #1;
    if (word_valid) begin failures++; $display("word_valid longer than one clock"); end
    // bad stop bit
    frame(10'h000, 1'b1);
    @(negedge clk);
    line_i = 0;
    repeat (14) @(negedge clk);
    sent.push_back(10'h155);
    frame(10'h155, 1'b0);
    @(negedge clk);
    line_i = 0;
    repeat (4) @(negedge clk);
    checks += 2;
    if (frame_errors != 1) begin failures++; $display("frame errors %0d", frame_errors); end
    if (n_words != 402 || sent.size() != 0) begin failures++; $display("words %0d", n_words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

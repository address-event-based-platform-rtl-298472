// tb_saer_rx: self-checking test of saer_rx.
// The testbench builds a word stream of events (two words each) with idle
// words mixed in, also between the two halves, and with word_valid dropped
// at random clocks. It checks every event comes out in order one clock after
// its second word, then injects framing faults (a lone second word, two first
// words) and an overrun (output held while a new event completes) and checks
// the error counters.
module tb_saer_rx;
  import aer_pkg::*;
  logic        clk = 0, rst_n = 0;
  saer_word_t  word_i = '0;
  logic        word_valid = 0;
  logic        out_valid, out_ready = 1;
  aer_addr_t   out_addr;
  logic [15:0] frame_errors, overruns;
  int checks = 0, failures = 0;
  logic [15:0] sent [$];
  int n_ev = 0;

  saer_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [15:0] e;
    e = sent.pop_front();
    checks++;
    if (out_addr != e) begin failures++; $display("event %h exp %h", out_addr, e); end
    n_ev++;
  end

  task automatic put_word(input saer_word_t w);
    @(negedge clk);
    while ($urandom_range(0, 3) == 0) begin
      word_valid = 0;
      @(negedge clk);
    end
    word_i = w;
    word_valid = 1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      logic [15:0] a;
      a = 16'($urandom);
      if ($urandom_range(0, 1)) put_word(SAER_IDLE);
      put_word(saer_word(1'b1, 1'b1, a[15:8]));
      if ($urandom_range(0, 3) == 0) put_word(SAER_IDLE);
      put_word(saer_word(1'b0, 1'b1, a[7:0]));
      sent.push_back(a);
      // latency: offered on the clock after the second word
      @(posedge clk);
      #1;
      if (word_valid) begin
        checks++;
        if (!out_valid || out_addr != a) begin failures++; $display("not offered one clock after the second word"); end
      end
    end
    @(negedge clk);
    word_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_ev != 500 || frame_errors != 0 || overruns != 0) begin failures++; $display("n %0d fe %0d ov %0d", n_ev, frame_errors, overruns); end
    // framing faults
    put_word(saer_word(1'b0, 1'b1, 8'h11));   // lone second word
    put_word(saer_word(1'b1, 1'b1, 8'h22));
    put_word(saer_word(1'b1, 1'b1, 8'h33));   // first word again
    put_word(saer_word(1'b0, 1'b1, 8'h44));
    sent.push_back(16'h3344);
    @(negedge clk);
    word_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (frame_errors != 2) begin failures++; $display("frame errors %0d exp 2", frame_errors); end
    // overrun: hold the output and complete two events
    out_ready = 0;
    put_word(saer_word(1'b1, 1'b1, 8'hAB));
    put_word(saer_word(1'b0, 1'b1, 8'hCD));
    sent.push_back(16'hABCD);
    put_word(saer_word(1'b1, 1'b1, 8'h12));
    put_word(saer_word(1'b0, 1'b1, 8'h34));
    @(negedge clk);
    word_valid = 0;
    out_ready = 1;
    repeat (3) @(negedge clk);
    checks += 2;
    if (overruns != 1) begin failures++; $display("overruns %0d exp 1", overruns); end
    if (sent.size() != 0) begin failures++; $display("%0d events missing", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

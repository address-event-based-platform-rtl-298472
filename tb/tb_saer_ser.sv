// tb_saer_ser: self-checking test of saer_ser.
// Random words are given to the serializer each time it asks for one. A
// model of the line records each 12-bit frame from the first start bit on
// and checks: start bit '1', the word's ten bits least significant first,
// stop bit '0', frames back to back, and one word request every 12 clocks.
module tb_saer_ser;
  import aer_pkg::*;
  logic       clk = 0, rst_n = 0;
  saer_word_t word_i = '0;
  logic       word_ready;
  logic       line_o;
  int checks = 0, failures = 0;
  saer_word_t sent [$];
  int last_req = -1;

  saer_ser dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // new word after each request
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && word_ready) begin
      sent.push_back(word_i);
      if (last_req >= 0) begin
        checks++;
        if (cyc - last_req != FRAME_BITS) begin failures++; $display("request period %0d", cyc - last_req); end
      end
      last_req = cyc;
      #1 word_i = SAER_W'($urandom);
    end
  end

  // line monitor: sample in the middle of each bit
  initial begin
    logic [FRAME_BITS-1:0] fr;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // wait for the first start bit
    do @(negedge clk); while (!line_o);
    for (int f = 0; f < 400; f++) begin
      saer_word_t e;
      for (int b = 0; b < FRAME_BITS; b++) begin
        fr[b] = line_o;
        @(negedge clk);
      end
      e = sent.pop_front();
      checks++;
      if (fr != {1'b0, e, 1'b1}) begin failures++; $display("frame %b word %h", fr, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aer_in: self-checking test of aer_in.
// A four-phase sender model sends random addresses with random delays; the
// stream side applies random backpressure. The test checks every address
// arrives in order, that ACK never rises before the event is taken, that ACK
// follows REQ through the whole handshake, and that with no backpressure ACK
// rises on the 4th clock edge after REQ (2 synchronizer clocks, capture,
// accept), which the sender model samples on the 5th.
module tb_aer_in;
  logic        clk = 0, rst_n = 0;
  logic        req = 0, ack;
  logic [15:0] addr = '0;
  logic        out_valid, out_ready = 0;
  logic [15:0] out_addr;
  int checks = 0, failures = 0;
  logic [15:0] sent [$];
  int n_recv = 0;
  bit random_ready = 1;

  aer_in dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream side: random ready, compare with sent list
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        logic [15:0] e;
        e = sent.pop_front();
        checks++;
        if (out_addr !== e) begin
          failures++;
          $display("addr mismatch got %h exp %h", out_addr, e);
        end
        n_recv++;
      end
      out_ready <= random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  end

  task automatic send(input logic [15:0] a, input int gap, output int lat);
    repeat (gap) @(posedge clk);
    addr <= a;
    sent.push_back(a);
    @(posedge clk);
    req <= 1;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!ack);
    repeat ($urandom_range(0, 3)) @(posedge clk);
    req <= 0;
    addr <= 16'($urandom);  // bus may change once REQ is low
    do @(posedge clk); while (ack);
  endtask

  initial begin
    int lat;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 300; i++) send(16'($urandom), $urandom_range(0, 5), lat);
    // latency with no backpressure
    random_ready = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      send(16'($urandom), 2, lat);
      checks++;
      if (lat != 5) begin failures++; $display("ack latency %0d, expected 5", lat); end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (n_recv != 305 || sent.size() != 0) begin
      failures++; $display("received %0d events", n_recv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ACK may rise only after the event was offered and taken
  always @(posedge clk) if (rst_n && ack && !$past(ack) && !$past(out_valid && out_ready)) begin
    failures++; $display("ACK without accept");
  end
endmodule

// tb_aer_out: self-checking test of aer_out.
// A receiver model acknowledges each REQ after a random delay and records
// the address it saw while REQ was high; the stream side sends random
// addresses with random gaps. The test checks order and values, that the
// address is stable while REQ is high, and that with an immediate receiver
// one event takes exactly 8 clocks.
module tb_aer_out;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready;
  logic [15:0] in_addr = '0;
  logic        req, ack = 0;
  logic [15:0] addr;
  int checks = 0, failures = 0;
  logic [15:0] sent [$];
  int n_recv = 0;
  bit fast = 0;

  aer_out dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver model
  initial begin
    forever begin
      @(negedge clk);
      if (req && !ack) begin
        logic [15:0] e;
        if (!fast) repeat ($urandom_range(0, 4)) @(negedge clk);
        e = sent.pop_front();
        checks++;
        if (addr !== e) begin failures++; $display("addr %h exp %h", addr, e); end
        n_recv++;
        ack = 1;
        do @(negedge clk); while (req);
        if (!fast) repeat ($urandom_range(0, 4)) @(negedge clk);
        ack = 0;
      end
    end
  end

  always @(posedge clk) if (rst_n && req && $past(req) && addr != $past(addr)) begin
    failures++; $display("address moved while REQ high");
  end

  // Inputs change at the falling edge; in_ready is looked at half a clock
  // before the rising edge that uses it.
  task automatic put(input logic [15:0] a);
    @(negedge clk);
    in_valid = 1;
    in_addr  = a;
    sent.push_back(a);
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int t0, t1;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      put(16'($urandom));
    end
    repeat (40) @(posedge clk);
    fast = 1;
    // back-to-back events with an immediate receiver: measure period
    @(negedge clk);
    in_valid = 1;
    in_addr = 16'h1234;
    sent.push_back(16'h1234);
    while (!in_ready) @(negedge clk);
    t0 = $time;
    @(negedge clk);
    in_addr = 16'h5678;
    sent.push_back(16'h5678);
    while (!in_ready) @(negedge clk);
    t1 = $time;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if ((t1 - t0) / 10 != 8) begin failures++; $display("event period %0d clocks, expected 8", (t1 - t0) / 10); end
    repeat (40) @(posedge clk);
    checks++;
    if (n_recv != 302) begin failures++; $display("received %0d", n_recv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

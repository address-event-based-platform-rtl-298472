// tb_aer_merger: self-checking test of aer_merger with three inputs.
// Random sources drive each input and a random sink stalls the output. The
// test checks that every event comes out once, in order per input, with the
// right source index, and that with all inputs busy and no stall the grants
// rotate 0,1,2,0,... one event per clock (round robin).
module tb_aer_merger;
  localparam int N = 3;
  logic                 clk = 0, rst_n = 0;
  logic [N-1:0]         in_valid = '0, in_ready;
  logic [N-1:0][15:0]   in_addr = '0;
  logic                 out_valid, out_ready = 0;
  logic [15:0]          out_addr;
  logic [1:0]           out_src;
  int checks = 0, failures = 0;
  logic [15:0] q [N][$];
  int n_out = 0;
  bit rr_phase = 0;
  int rr_expect = 0;

  aer_merger #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: sample at the rising edge
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [15:0] e;
    e = q[out_src].pop_front();
    checks++;
    if (out_addr !== e) begin failures++; $display("src %0d addr %h exp %h", out_src, out_addr, e); end
    if (rr_phase) begin
      checks++;
      if (rr_expect < 0) rr_expect = int'(out_src);
      if (int'(out_src) != rr_expect) begin failures++; $display("grant %0d exp %0d", out_src, rr_expect); end
      rr_expect = (rr_expect + 1) % N;
    end
    n_out++;
  end

  int count_sent = 0;
  logic [N-1:0] taken = '0;

  // One clock of stimulus: inputs change at the falling edge; what the next
  // rising edge will take is noted half a clock ahead.
  task automatic cycle(input bit random_src, input int k);
    @(negedge clk);
    in_valid &= ~taken;
    for (int i = 0; i < N; i++) begin
      if (!in_valid[i] && (!random_src || $urandom_range(0, 1) == 1)) begin
        in_valid[i] = 1;
        in_addr[i] = random_src ? 16'($urandom) : 16'(k * 16 + i);
        q[i].push_back(in_addr[i]);
        count_sent++;
      end
    end
    out_ready = random_src ? ($urandom_range(0, 2) != 0) : 1'b1;
    #1;
    taken = in_valid & in_ready;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2000) cycle(1, 0);
    // drain
    @(negedge clk);
    in_valid &= ~taken;
    out_ready = 1;
    #1 taken = in_valid & in_ready;
    while (in_valid != 0) begin
      @(negedge clk);
      in_valid &= ~taken;
      #1 taken = in_valid & in_ready;
    end
    repeat (3) @(negedge clk);
    // round robin: all inputs busy, no stall
    rr_phase = 1;
    rr_expect = -1;  // the first grant sets the rotation
    for (int k = 0; k < 30; k++) begin
      cycle(0, k);
      checks++;
      if ($countones(taken) != 1) begin failures++; $display("one grant per clock expected"); end
    end
    @(negedge clk);
    rr_phase = 0;
    in_valid &= ~taken;
    #1 taken = in_valid & in_ready;
    while (in_valid != 0) begin
      @(negedge clk);
      in_valid &= ~taken;
      #1 taken = in_valid & in_ready;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (n_out != count_sent) begin failures++; $display("out %0d sent %0d", n_out, count_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

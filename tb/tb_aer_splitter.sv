// tb_aer_splitter: self-checking test of aer_splitter with four outputs.
// Random events are offered while each output stalls at random. For random
// settings of broadcast, output mask and unicast selection, a model works
// out which outputs must see each event; the test checks that each of them
// sees it exactly once, that no other output sees it, and that the input is
// released only when all destinations have taken it.
module tb_aer_splitter;
  localparam int N = 4;
  logic         clk = 0, rst_n = 0;
  logic         bcast = 1;
  logic [N-1:0] out_mask = '1;
  logic [1:0]   uni_sel = '0;
  logic         in_valid = 0, in_ready;
  logic [15:0]  in_addr = '0;
  logic [N-1:0] out_valid, out_ready = '0;
  logic [15:0]  out_addr;
  int checks = 0, failures = 0;
  logic [N-1:0] seen;
  int n_bcast = 0, n_uni = 0;

  aer_splitter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid) begin
    for (int i = 0; i < N; i++) if (out_valid[i] && out_ready[i]) begin
      checks++;
      if (seen[i] || out_addr != in_addr) begin failures++; $display("output %0d duplicate or wrong", i); end
      seen[i] = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 1000; e++) begin
      logic [N-1:0] want;
      @(negedge clk);
      bcast    = $urandom_range(0, 1);
      out_mask = N'($urandom_range(1, 15));
      uni_sel  = 2'($urandom);
      want     = bcast ? out_mask : (out_mask & (N'(1) << uni_sel));
      if (bcast) n_bcast++; else n_uni++;
      seen     = '0;
      in_valid = 1;
      in_addr  = 16'($urandom);
      out_ready = N'($urandom);
      #1;
      while (!in_ready) begin
        @(negedge clk);
        out_ready = N'($urandom);
        #1;
      end
      @(posedge clk);
      #1;
      checks++;
      if (seen != want) begin failures++; $display("event %0d: seen %b want %b", e, seen, want); end
      in_valid = 0;
    end
    checks++;
    if (n_bcast == 0 || n_uni == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

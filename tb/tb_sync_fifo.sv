// tb_sync_fifo: self-checking test of sync_fifo with a small depth.
// Random writes and reads are compared with a queue model: every word read
// must be the oldest one written, count, rd_valid and wr_ready must follow
// the fill level, a write into a full FIFO must be refused, and the FIFO must
// both fill up and run empty during the test.
module tb_sync_fifo;
  localparam int W = 12, DEPTH = 16;
  logic                   clk = 0, rst_n = 0;
  logic                   wr_valid = 0, rd_ready = 0;
  logic [W-1:0]           wr_data = '0;
  logic                   wr_ready, rd_valid;
  logic [W-1:0]           rd_data;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int n_full = 0, n_empty = 0, n_moved = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check the outputs against the model, then update the model at the edge
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (count != model.size() || rd_valid != (model.size() != 0) || wr_ready != (model.size() != DEPTH)) begin
      failures++;
      $display("count %0d valid %b ready %b, model %0d", count, rd_valid, wr_ready, model.size());
    end
    if (model.size() == DEPTH) n_full++;
    if (model.size() == 0) n_empty++;
    if (rd_valid && rd_ready) begin
      checks++;
      if (model.size() == 0 || rd_data != model[0]) begin
        failures++;
        $display("read %h, expected %h", rd_data, model.size() ? model[0] : 'x);
      end
      if (model.size() != 0) void'(model.pop_front());
      n_moved++;
    end
    if (wr_valid && wr_ready) model.push_back(wr_data);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phases: fill-biased, drain-biased, balanced
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      wr_valid = $urandom_range(0, 99) < ((i / 1000) % 3 == 0 ? 80 : (i / 1000) % 3 == 1 ? 20 : 50);
      wr_data  = W'($urandom);
      rd_ready = $urandom_range(0, 99) < ((i / 1000) % 3 == 0 ? 20 : (i / 1000) % 3 == 1 ? 80 : 50);
    end
    @(negedge clk);
    wr_valid = 0; rd_ready = 0;
    checks++;
    if (n_full == 0 || n_empty == 0 || n_moved < 1000) begin
      failures++;
      $display("coverage: full %0d empty %0d moved %0d", n_full, n_empty, n_moved);
    end
    // reset empties it
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    model.delete();
    #1;
    checks++;
    if (count != 0 || rd_valid) begin failures++; $display("not empty after reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aer_sequencer: self-checking test of aer_sequencer.
// A model predicts the clock edge at which each event is released: its
// scheduled time (the sum of the delays since enable, pause words included)
// or, if the sequencer is behind, the earliest edge it can reach after the
// previous event was accepted. Run 1 uses exact delays, short delays that
// fall behind and catch up, a pause word and a receiver that stalls some
// events. Run 2 uses the x16 time scale and checks the spacing of events.
// Addresses, the late flag and that nothing is taken while disabled are
// checked as well.
module tb_aer_sequencer;
  import aer_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        en = 0, prescale16 = 0;
  logic        in_valid, in_ready;
  logic [31:0] in_word;
  logic        out_valid, out_ready = 1;
  aer_addr_t   out_addr;
  logic [23:0] lag;
  logic        late;
  int checks = 0, failures = 0;

  aer_sequencer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word supply
  logic [31:0] words[$];
  int widx = 0;
  assign in_valid = widx < words.size();
  assign in_word  = in_valid ? words[widx] : 32'h0;

  // model and checker
  int  cyc = 0, e0 = -1, sched = 0, earliest = 0, midx = 0;
  int  n_events = 0, n_late = 0, n_stalled = 0, n_pause = 0, prev_rel = -1;
  bit  was_valid = 0, en_seen = 0;
  int  spacing_mode = 0;   // 1: check only the spacing, 16 * delay

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) widx <= widx + 1;
    if (!en) en_seen = 0;
    else if (!en_seen) begin
      en_seen = 1; e0 = cyc; sched = cyc; earliest = cyc + 1; prev_rel = -1;
    end
    if (out_valid && !was_valid) begin
      int rel, exp_rel;
      rel = cyc - 1;
      while (midx < words.size() && words[midx][31:16] == 16'hFFFF) begin
        int p;
        sched += 65535;
        p = (sched > earliest) ? sched : earliest;
        earliest = p + 2;
        midx++;
        n_pause++;
      end
      sched += int'(words[midx][31:16]);
      exp_rel = (sched > earliest) ? sched : earliest;
      checks++;
      if (spacing_mode == 1) begin
        if (prev_rel >= 0 && rel - prev_rel != 16 * int'(words[midx][31:16])) begin
          failures++;
          $display("event %0d: spacing %0d, expected %0d", midx, rel - prev_rel, 16 * int'(words[midx][31:16]));
        end
      end else if (rel != exp_rel) begin
        failures++;
        $display("event %0d released at %0d, expected %0d (scheduled %0d)", midx, rel, exp_rel, sched);
      end
      checks++;
      if (out_addr != words[midx][15:0]) begin
        failures++;
        $display("event %0d address %h, expected %h", midx, out_addr, words[midx][15:0]);
      end
      if (spacing_mode == 0) begin
        checks++;
        if (late != (exp_rel > sched)) begin failures++; $display("event %0d late flag %b", midx, late); end
      end
      if (spacing_mode == 0 && exp_rel > sched) begin
        n_late++;
        checks++;
        if (lag != 24'(exp_rel - sched)) begin failures++; $display("event %0d lag %0d, expected %0d", midx, lag, exp_rel - sched); end
      end
      prev_rel = rel;
      midx++;
      n_events++;
    end
    if (out_valid && !out_ready) n_stalled++;
    if (out_valid && out_ready) earliest = cyc + 2;
    was_valid = out_valid;
  end

  // receiver: stalls every fifth event for a while
  int n_acc = 0;
  always @(negedge clk) begin
    if (out_valid && out_ready) n_acc++;
  end
  initial begin
    forever begin
      @(negedge clk);
      out_ready = !(out_valid && n_acc % 5 == 4 && $urandom_range(0, 9) != 0);
    end
  end

  task automatic run(input int last_idx);
    @(negedge clk);
    en = 1;
    while (midx <= last_idx || out_valid) @(negedge clk);
    repeat (5) @(negedge clk);
    en = 0;
    @(negedge clk);
  endtask

  initial begin
    int base;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // run 1: exact delays, catch-up after short delays, a pause, stalls
    words = '{32'h0005_0101, 32'h000A_0102, 32'h0003_0103, 32'h0000_0104,
              32'h0001_0105, 32'h0001_0106, 32'h0014_0107, 32'hFFFF_0000,
              32'h0007_0108, 32'h0004_0109, 32'h0009_010A, 32'h0003_010B,
              32'h0001_010C, 32'h0030_010D, 32'h0006_010E, 32'h0008_010F};
    for (int i = 0; i < 40; i++) words.push_back({16'($urandom_range(0, 12)), 16'h0200 + 16'(i)});
    run(words.size() - 1);
    // nothing is taken while disabled
    base = widx;
    words.push_back(32'h0002_0300);
    repeat (20) @(negedge clk);
    checks++;
    if (widx != base || out_valid) begin failures++; $display("word taken while disabled"); end
    words.pop_back();
    // run 2: x16 time scale, receiver always ready
    spacing_mode = 1;
    prescale16 = 1;
    force out_ready = 1'b1;
    base = words.size();
    for (int i = 0; i < 20; i++) words.push_back({16'($urandom_range(1, 20)), 16'h0400 + 16'(i)});
    run(words.size() - 1);
    release out_ready;
    checks++;
    if (n_events != 75 || n_pause != 1 || n_late < 5 || n_stalled < 10) begin
      failures++;
      $display("coverage: events %0d pauses %0d late %0d stalled %0d", n_events, n_pause, n_late, n_stalled);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

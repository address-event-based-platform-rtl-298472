// tb_aer_monitor: self-checking test of aer_monitor.
// Random events meet a record sink that sometimes refuses. For each record
// taken, the time field must equal the ticks between this acceptance and
// the previous one (or the enable), computed from the edge numbers, and the
// address field the event's address. Also checked: no record and no
// acceptance while the sink refuses, events discarded while disabled, saturation after a
// gap of more than 65535 clocks, and the x16 time scale.
module tb_aer_monitor;
  import aer_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        en = 0, prescale16 = 0;
  logic        in_valid = 0, in_ready;
  aer_addr_t   in_addr = '0;
  logic        rec_valid, rec_ready = 0;
  logic [31:0] rec_data;
  int checks = 0, failures = 0;

  aer_monitor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edge k counts clock edges since reset was released; ticks(k) is the
  // number of tick edges among edges 1..k for the current time scale
  int  k = 0, ticks = 0, last_ticks = 0;
  bit  en_q = 0;
  int  n_rec = 0, n_sat = 0, n_refused = 0;

  always @(posedge clk) if (rst_n) begin
    int exp_dt;
    k++;
    checks++;
    if (rec_valid != (en && in_valid) || in_ready != (!en || rec_ready)) begin
      failures++;
      $display("edge %0d: rec_valid %b in_ready %b", k, rec_valid, in_ready);
    end
    if (en && !en_q) last_ticks = ticks;
    if (en && in_valid && rec_ready) begin
      exp_dt = ticks - last_ticks;
      if (exp_dt > 65535) begin exp_dt = 65535; n_sat++; end
      checks++;
      if (rec_data != {16'(exp_dt), in_addr}) begin
        failures++;
        $display("edge %0d: record %h, expected %h", k, rec_data, {16'(exp_dt), in_addr});
      end
      n_rec++;
      last_ticks = ticks;
    end
    if (en && in_valid && !rec_ready) n_refused++;
    if (!prescale16 || (k - 1) % 16 == 15) ticks++;
    en_q = en;
  end

  task automatic traffic(input int n, input int gap_max);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      rec_ready = $urandom_range(0, 3) != 0;
      if (!in_valid || in_ready) begin
        // the previous event, if any, was accepted at the last edge
        in_valid = $urandom_range(0, gap_max) == 0;
        in_addr  = aer_addr_t'($urandom);
      end
    end
    // let the last event go
    @(negedge clk);
    rec_ready = 1;
    while (in_valid && !in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // disabled: nothing recorded
    in_valid = 1; in_addr = 16'h1111; rec_ready = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (n_rec != 0) begin failures++; $display("record while disabled"); end
    in_valid = 0;
    repeat (7) @(negedge clk);
    en = 1;
    traffic(3000, 4);
    // a long gap: the time field saturates
    repeat (70000) @(negedge clk);
    in_valid = 1; in_addr = 16'h2222;
    @(negedge clk);
    in_valid = 0;
    traffic(200, 2);
    // disable, re-enable: the time restarts at the enable
    en = 0;
    repeat (30) @(negedge clk);
    en = 1;
    repeat (12) @(negedge clk);
    traffic(500, 3);
    // x16 time scale
    prescale16 = 1;
    en = 0;
    @(negedge clk);
    en = 1;
    traffic(3000, 40);
    checks++;
    if (n_rec < 500 || n_sat != 1 || n_refused < 100) begin
      failures++;
      $display("coverage: records %0d saturated %0d refused %0d", n_rec, n_sat, n_refused);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aer_mapper: self-checking test of aer_mapper at its default table size.
// After the table has cleared itself, the test writes random entries (map,
// discard, or left unwritten) into part of the table, then streams random
// events with random backpressure, with mapping on and off. A model of the
// table in the testbench gives the expected output address, or none for a
// discarded event. It also checks the clear takes 2**MAP_AW clocks, that an
// accepted event is offered one clock later, and the mapped/dropped pulses.
module tb_aer_mapper;
  localparam int MAP_AW = 12;
  logic              clk = 0, rst_n = 0;
  logic              map_en = 0;
  logic              tbl_we = 0;
  logic [MAP_AW-1:0] tbl_waddr = '0;
  logic [17:0]       tbl_wdata = '0;
  logic              init_busy;
  logic              in_valid = 0, in_ready;
  logic [15:0]       in_addr = '0;
  logic              out_valid, out_ready = 0;
  logic [15:0]       out_addr;
  logic              ev_mapped, ev_dropped;
  int checks = 0, failures = 0;

  logic [17:0] model [1 << MAP_AW];
  logic [15:0] expq [$];
  int n_out = 0, n_map_pulse = 0, n_drop_pulse = 0, exp_map = 0, exp_drop = 0;

  aer_mapper #(.MAP_AW(MAP_AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      logic [15:0] e;
      e = expq.pop_front();
      checks++;
      if (out_addr !== e) begin failures++; $display("out %h exp %h", out_addr, e); end
      n_out++;
    end
    if (ev_mapped)  n_map_pulse++;
    if (ev_dropped) n_drop_pulse++;
  end

  // expected result of one event
  task automatic expect_ev(input logic [15:0] a);
    if (map_en && a < 16'(1 << MAP_AW)) begin
      logic [17:0] ent;
      ent = model[a[MAP_AW-1:0]];
      if (ent[17:16] == 2'd1) begin expq.push_back(ent[15:0]); exp_map++; end
      else if (ent[17:16] == 2'd0) expq.push_back(a);
      else exp_drop++;
    end else expq.push_back(a);
  endtask

  task automatic stream(input int n);
    for (int i = 0; i < n; i++) begin
      logic [15:0] a;
      a = ($urandom_range(0, 3) == 0) ? 16'($urandom) : 16'($urandom_range(0, 63));
      @(negedge clk);
      in_valid = 1;
      in_addr  = a;
      out_ready = $urandom_range(0, 2) != 0;
      #1;
      while (!in_ready) begin
        @(negedge clk);
        out_ready = $urandom_range(0, 2) != 0;
        #1;
      end
      expect_ev(a);
      @(posedge clk);
      #1 in_valid = 0;
    end
  endtask

  initial begin
    int t0;
    for (int i = 0; i < (1 << MAP_AW); i++) model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    t0 = 0;
    while (init_busy) begin @(negedge clk); t0++; end
    checks++;
    if (t0 != (1 << MAP_AW)) begin failures++; $display("clear took %0d clocks", t0); end
    // write table entries 0..47: a third map, a third discard, a third identity
    for (int i = 0; i < 48; i++) begin
      @(negedge clk);
      tbl_we    = 1;
      tbl_waddr = MAP_AW'(i);
      tbl_wdata = {2'(i % 3), 16'($urandom)};
      model[i]  = tbl_wdata;
    end
    @(negedge clk);
    tbl_we = 0;
    map_en = 1;
    stream(1500);
    @(negedge clk);
    out_ready = 1;
    repeat (5) @(negedge clk);
    map_en = 0;
    stream(200);
    @(negedge clk);
    out_ready = 1;
    repeat (5) @(negedge clk);
    // latency: event accepted at one edge appears after it
    map_en = 1;
    @(negedge clk);
    in_valid = 1; in_addr = 16'd4; out_ready = 1;
    expect_ev(16'd4);  // entry 4 is a map entry
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || out_addr != model[4][15:0]) begin failures++; $display("latency: not offered one clock later"); end
    repeat (5) @(negedge clk);
    checks += 3;
    if (expq.size() != 0) begin failures++; $display("%0d events missing", expq.size()); end
    if (n_map_pulse != exp_map) begin failures++; $display("mapped %0d exp %0d", n_map_pulse, exp_map); end
    if (n_drop_pulse != exp_drop) begin failures++; $display("dropped %0d exp %0d", n_drop_pulse, exp_drop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

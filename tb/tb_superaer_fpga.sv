// tb_superaer_fpga: end-to-end test of the Super-AER FPGA logic at its
// default parameters.
//
// Around the FPGA sit models of what the board connects to it:
//   - an AER sender on AER-IN and a receiver on AER-OUT (four-phase);
//   - the embedded computer on the GPIO port, which answers each REQ after
//     38 clocks (760 ns at 50 MHz, the handshake-only software loop);
//   - the serializer/deserializer chip pair: the testbench decodes the words
//     sent to the serializer and supplies words from the deserializer;
//   - the far end of the direct serial link: a frame decoder on the line out
//     and a frame encoder on the line in.
// In link-test mode the two serial links are looped back (chip link with a
// 3-clock delay, direct line with a 5-clock delay).
//
// The embedded computer also reads the monitor FIFO at a random pace.
//
// The test writes a mapping table, then sends events on all three external
// inputs at once with broadcast to AER-OUT and GPIO, then unicast to each
// serial output, then broadcast to all five outputs with the monitor on.
// A timed sequence is then played from the sequencer to AER-OUT and the
// monitor, and the time fields of the monitor records must equal the
// sequence delays. A model of the mapping gives,
// for each output, the multiset of addresses it must receive; each output
// must receive exactly those. A burst on a serial input while only the slow
// GPIO port is enabled must overrun the input. Then link-test mode runs, first clean, then
// with one corrupted word on each link. Each mechanism (the three inputs,
// simultaneous inputs, mapping, discard, pass-through of high addresses,
// broadcast, unicast, stall of AER-IN behind the slow GPIO port, link test,
// error detection, mode switch) is counted, and one that never happened is a
// failure. The sequencer, the monitor and exact sequence timing are counted
// too.
module tb_superaer_fpga;
  import aer_pkg::*;
  localparam int MAP_AW = 12;  // the DUT's default, for the model only

  logic              clk = 0, rst_n = 0;
  logic              aer_in_req = 0, aer_in_ack;
  aer_addr_t         aer_in_addr = '0;
  logic              aer_out_req, aer_out_ack = 0;
  aer_addr_t         aer_out_addr;
  logic              gpio_req, gpio_ack = 0;
  aer_addr_t         gpio_addr;
  logic              cfg_we = 0;
  cfg_sel_e          cfg_sel = CFG_REG;
  logic [15:0]       cfg_addr = '0;
  logic [31:0]       cfg_wdata = '0;
  logic              mon_rd_valid, mon_rd_ready = 0;
  logic [31:0]       mon_rd_data;
  logic [9:0]        seq_fill, mon_fill;
  logic [23:0]       seq_lag;
  saer_word_t        ser_word, deser_word = '0;
  logic              deser_lock = 0;
  logic              saer_line_out, saer_line_in = 0;
  logic              init_busy;
  logic [1:0][31:0]  test_good, test_errors;
  logic [1:0]        test_locked;
  logic [1:0][15:0]  rx_frame_errors, rx_overruns;
  logic [15:0]       line_frame_errors;
  logic [31:0]       events_mapped, events_dropped;

  superaer_fpga dut (.*);

  always #10 clk = ~clk;  // 50 MHz

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ scoreboard
  int expected [5][int];   // per output: address -> count still expected
  int n_recv [5];
  bit loopback = 0;

  task automatic got(input int o, input aer_addr_t a);
    checks++;
    n_recv[o]++;
    if (!expected[o].exists(int'(a)) || expected[o][int'(a)] == 0) begin
      failures++;
      $display("output %0d: unexpected event %h", o, a);
    end else expected[o][int'(a)]--;
  endtask

  // mapping model
  logic [17:0] tbl [int];
  logic        map_on = 0;
  logic        bcast_m = 1;
  logic [4:0]  mask_m = 5'h1F;
  logic [2:0]  sel_m = 0;
  int cnt_mapped = 0, cnt_dropped = 0, cnt_high = 0, cnt_bcast = 0, cnt_uni = 0;

  task automatic expect_event(input aer_addr_t a);
    aer_addr_t m;
    logic [4:0] t;
    m = a;
    if (map_on && a < 16'(1 << MAP_AW)) begin
      if (tbl.exists(int'(a))) begin
        if (tbl[int'(a)][17:16] == 2'd1) begin m = tbl[int'(a)][15:0]; cnt_mapped++; end
        else if (tbl[int'(a)][17:16] != 2'd0) begin cnt_dropped++; return; end
      end
    end else if (map_on) cnt_high++;
    t = bcast_m ? mask_m : (mask_m & (5'b1 << sel_m));
    if (bcast_m) cnt_bcast++; else cnt_uni++;
    for (int o = 0; o < 5; o++) if (t[o]) begin
      if (!expected[o].exists(int'(m))) expected[o][int'(m)] = 0;
      expected[o][int'(m)]++;
    end
  endtask

  // ------------------------------------------------------------ AER-IN sender
  aer_addr_t in_q [$];
  int cnt_in = 0, max_ack_wait = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (in_q.size() != 0) begin
        int w;
        aer_in_addr = in_q.pop_front();
        @(negedge clk);
        aer_in_req = 1;
        w = 0;
        while (!aer_in_ack) begin @(negedge clk); w++; end
        if (w > max_ack_wait) max_ack_wait = w;
        aer_in_req = 0;
        while (aer_in_ack) @(negedge clk);
        cnt_in++;
      end
    end
  end

  // ------------------------------------------------------------ AER-OUT receiver
  initial begin
    forever begin
      @(negedge clk);
      if (aer_out_req && !aer_out_ack) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        got(0, aer_out_addr);
        aer_out_ack = 1;
        while (aer_out_req) @(negedge clk);
        aer_out_ack = 0;
      end
    end
  end

  // ------------------------------------------------------------ embedded computer on GPIO
  initial begin
    forever begin
      @(negedge clk);
      if (gpio_req && !gpio_ack) begin
        repeat (38) @(negedge clk);
        got(3, gpio_addr);
        gpio_ack = 1;
        while (gpio_req) @(negedge clk);
        gpio_ack = 0;
      end
    end
  end

  // ------------------------------------------------------------ embedded computer reading the monitor
  int mon_dt [$];
  int max_mon_fill = 0;
  always @(posedge clk) if (rst_n) begin
    if (mon_rd_valid && mon_rd_ready) begin
      got(4, mon_rd_data[15:0]);
      mon_dt.push_back(int'(mon_rd_data[31:16]));
    end
    if (int'(mon_fill) > max_mon_fill) max_mon_fill = int'(mon_fill);
  end
  bit mon_reading = 1;
  always @(negedge clk) mon_rd_ready = mon_reading && $urandom_range(0, 3) == 0;

  // ------------------------------------------------------------ serializer chip side: decode words
  bit ser_have_hi = 0;
  logic [7:0] ser_hi;
  always @(posedge clk) if (rst_n && !loopback) begin
    if (ser_word[W_VALID]) begin
      if (ser_word[W_FIRST]) begin ser_have_hi = 1; ser_hi = ser_word[7:0]; end
      else if (ser_have_hi) begin got(1, {ser_hi, ser_word[7:0]}); ser_have_hi = 0; end
      else begin failures++; $display("chip link: second word alone"); end
    end
  end

  // ------------------------------------------------------------ deserializer chip side: supply words
  saer_word_t chip_q [$];
  saer_word_t lb_chip [3];
  bit corrupt_chip = 0;
  int cnt_chip_in = 0;
  always @(negedge clk) begin
    if (loopback) begin
      deser_word = lb_chip[2];
      if (corrupt_chip) begin deser_word ^= 10'h010; corrupt_chip = 0; end
      lb_chip[2] = lb_chip[1];
      lb_chip[1] = lb_chip[0];
      lb_chip[0] = ser_word;
    end else if (chip_q.size() != 0) begin
      deser_word = chip_q.pop_front();
      if (deser_word[W_VALID] && !deser_word[W_FIRST]) cnt_chip_in++;
    end else deser_word = SAER_IDLE;
  end

  // ------------------------------------------------------------ direct line out: decode frames
  int   lo_state = 0, lo_cnt = 0;
  saer_word_t lo_sh;
  bit   dir_have_hi = 0;
  logic [7:0] dir_hi;
  always @(posedge clk) if (rst_n) begin
    case (lo_state)
      0: if (saer_line_out) begin lo_state = 1; lo_cnt = 0; end
      1: begin
        lo_sh = {saer_line_out, lo_sh[9:1]};
        lo_cnt++;
        if (lo_cnt == 10) lo_state = 2;
      end
      default: begin
        lo_state = 0;
        if (saer_line_out) begin failures++; $display("direct line: bad stop bit"); end
        else if (!loopback && lo_sh[W_VALID]) begin
          if (lo_sh[W_FIRST]) begin dir_have_hi = 1; dir_hi = lo_sh[7:0]; end
          else if (dir_have_hi) begin got(2, {dir_hi, lo_sh[7:0]}); dir_have_hi = 0; end
        end
      end
    endcase
  end

  // ------------------------------------------------------------ direct line in: encode frames
  saer_word_t dir_q [$];
  logic [11:0] li_fr;
  int   li_bit = 12;
  logic lb_line [5];
  bit   flip_line = 0;
  int   cnt_dir_in = 0;
  always @(negedge clk) if (rst_n) begin
    if (loopback) begin
      saer_line_in = lb_line[4];
      if (flip_line) begin saer_line_in = ~saer_line_in; flip_line = 0; end
      for (int i = 4; i > 0; i--) lb_line[i] = lb_line[i-1];
      lb_line[0] = saer_line_out;
    end else begin
      if (li_bit == 12) begin
        saer_word_t w;
        w = (dir_q.size() != 0) ? dir_q.pop_front() : SAER_IDLE;
        if (w[W_VALID] && !w[W_FIRST]) cnt_dir_in++;
        li_fr = {1'b0, w, 1'b1};
        li_bit = 0;
      end
      saer_line_in = li_fr[li_bit];
      li_bit++;
    end
  end

  // ------------------------------------------------------------ helpers
  task automatic cfg(input cfg_sel_e s, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic set_split(input logic b, input logic [4:0] m, input logic [2:0] s);
    cfg(CFG_REG, 16'd2, {23'd0, m, 3'd0, b});
    cfg(CFG_REG, 16'd3, {29'd0, s});
    bcast_m = b; mask_m = m; sel_m = s;
  endtask

  function automatic aer_addr_t rand_addr();
    return ($urandom_range(0, 4) == 0) ? 16'($urandom_range(16'h1000, 16'hFFFF))
                                       : 16'($urandom_range(0, 31));
  endfunction

  task automatic wait_quiet(input int n);
    // wait until nothing is pending and outputs have been idle n clocks
    int idle;
    idle = 0;
    while (idle < n) begin
      @(negedge clk);
      if (in_q.size() == 0 && chip_q.size() == 0 && dir_q.size() == 0 && seq_fill == 0 &&
          !aer_in_req && !aer_out_req && !gpio_req && !mon_rd_valid) idle++;
      else idle = 0;
    end
  endtask

  task automatic check_all_received(input string phase);
    for (int o = 0; o < 5; o++)
      foreach (expected[o][a]) begin
        checks++;
        if (expected[o][a] != 0) begin
          failures++;
          $display("%s: output %0d still expects %0d x %h", phase, o, expected[o][a], a);
        end
      end
  endtask

  task automatic check_count(input string name, input int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("mechanism %s never happened", name); end
  endtask

  // ------------------------------------------------------------ main sequence
  int seq_d [30];
  int cnt_seq_exact = 0;
  int cnt_overrun = 0, cnt_simul = 0, cnt_link_good = 0, cnt_link_err = 0, cnt_mode = 0, t_init = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    deser_lock = 1;
    while (init_busy) begin @(negedge clk); t_init++; end
    checks++;
    if (t_init != (1 << MAP_AW)) begin failures++; $display("table clear took %0d clocks", t_init); end

    // mapping table: a%4==0 -> a+0x100, a%4==1 -> discard, others identity
    for (int a = 0; a < 32; a++) begin
      logic [17:0] e;
      if (a % 4 == 0)      e = {2'd1, 16'(a + 16'h100)};
      else if (a % 4 == 1) e = {2'd2, 16'h0};
      else continue;
      cfg(CFG_MAP, 16'(a), 32'(e));
      tbl[a] = e;
    end
    cfg(CFG_REG, 16'd1, 32'd1);
    map_on = 1;

    // phase 1: all three inputs at once, broadcast to AER-OUT and GPIO
    set_split(1'b1, 5'b01001, 3'd0);
    for (int i = 0; i < 40; i++) begin
      aer_addr_t a, b, c;
      a = rand_addr(); b = rand_addr(); c = rand_addr();
      in_q.push_back(a);
      chip_q.push_back(saer_word(1'b1, 1'b1, b[15:8]));
      chip_q.push_back(saer_word(1'b0, 1'b1, b[7:0]));
      // the serial links have no flow control: space events so that the
      // 38-clock GPIO port, which sees every event, keeps up
      repeat ($urandom_range(150, 190)) chip_q.push_back(SAER_IDLE);
      dir_q.push_back(saer_word(1'b1, 1'b1, c[15:8]));
      dir_q.push_back(saer_word(1'b0, 1'b1, c[7:0]));
      repeat ($urandom_range(13, 16)) dir_q.push_back(SAER_IDLE);
      expect_event(a); expect_event(b); expect_event(c);
      cnt_simul++;
    end
    wait_quiet(300);
    check_all_received("broadcast AER-OUT+GPIO");

    checks++;
    if (rx_overruns != '0) begin failures++; $display("overrun with paced serial input"); end

    // phase 1b: a back-to-back burst on the chip link while only the slow
    // GPIO port is enabled: the serial input must overrun and count it
    set_split(1'b1, 5'b01000, 3'd0);
    for (int i = 0; i < 12; i++) begin
      aer_addr_t b;
      b = 16'h2000 + 16'(i);
      chip_q.push_back(saer_word(1'b1, 1'b1, b[15:8]));
      chip_q.push_back(saer_word(1'b0, 1'b1, b[7:0]));
      expect_event(b);
    end
    wait_quiet(300);
    cnt_overrun = int'(rx_overruns[0]);
    checks++;
    if (cnt_overrun == 0) begin failures++; $display("no overrun on a burst"); end
    for (int o = 0; o < 5; o++) expected[o].delete();  // lost events are not owed

    // phase 2: unicast to each serial output
    for (int s = 1; s <= 2; s++) begin
      set_split(1'b0, 5'h1F, 3'(s));
      for (int i = 0; i < 20; i++) begin
        aer_addr_t a;
        a = rand_addr();
        in_q.push_back(a);
        expect_event(a);
      end
      wait_quiet(300);
      check_all_received($sformatf("unicast %0d", s));
    end

    // phase 3: broadcast to all five outputs, mapping off, monitor on
    cfg(CFG_REG, 16'd1, 32'd0);
    map_on = 0;
    cfg(CFG_REG, 16'd0, 32'd4);
    set_split(1'b1, 5'h1F, 3'd0);
    for (int i = 0; i < 20; i++) begin
      aer_addr_t a;
      a = rand_addr();
      in_q.push_back(a);
      expect_event(a);
    end
    wait_quiet(300);
    check_all_received("broadcast all");

    // phase 3b: a timed sequence from the sequencer to AER-OUT and the
    // monitor; the words are queued first, then the sequencer is enabled
    set_split(1'b1, 5'b10001, 3'd0);
    for (int i = 0; i < 30; i++) begin
      aer_addr_t a;
      a = 16'h3000 + 16'(i);
      seq_d[i] = $urandom_range(20, 60);
      cfg(CFG_SEQ, 16'd0, {16'(seq_d[i]), a});
      expect_event(a);
    end
    @(negedge clk);
    checks++;
    if (seq_fill != 30) begin failures++; $display("sequencer FIFO holds %0d words", seq_fill); end
    mon_dt.delete();
    // the computer reads the records only after the sequence has played
    mon_reading = 0;
    cfg(CFG_REG, 16'd0, 32'd6);
    while (seq_fill != 0) @(negedge clk);
    repeat (200) @(negedge clk);
    mon_reading = 1;
    wait_quiet(300);
    check_all_received("sequence");
    for (int i = 1; i < 30; i++) begin
      checks++;
      if (i < mon_dt.size() && mon_dt[i] == seq_d[i]) cnt_seq_exact++;
      else begin failures++; $display("sequence event %0d: monitor time %0d, delay %0d", i, i < mon_dt.size() ? mon_dt[i] : -1, seq_d[i]); end
    end
    checks++;
    if (seq_lag != 0) begin failures++; $display("sequencer behind by %0d", seq_lag); end
    cfg(CFG_REG, 16'd0, 32'd0);

    checks += 3;
    if (events_mapped != 32'(cnt_mapped)) begin failures++; $display("mapped %0d exp %0d", events_mapped, cnt_mapped); end
    if (events_dropped != 32'(cnt_dropped)) begin failures++; $display("dropped %0d exp %0d", events_dropped, cnt_dropped); end
    if (rx_frame_errors != '0 || rx_overruns[1] != 0 || 32'(rx_overruns[0]) != 32'(cnt_overrun) ||
        line_frame_errors != 0) begin
      failures++; $display("link errors in normal mode");
    end

    // phase 4: link-test mode with loopback
    loopback = 1;
    cfg(CFG_REG, 16'd0, 32'd1);
    cnt_mode++;
    repeat (3000) @(negedge clk);
    checks += 2;
    if (test_errors != '0) begin failures++; $display("link test errors %0d %0d", test_errors[0], test_errors[1]); end
    if (test_good[0] < 2900 || test_good[1] < 240) begin
      failures++; $display("link test good words %0d %0d", test_good[0], test_good[1]);
    end
    cnt_link_good = int'(test_good[0] + test_good[1]);
    // one corrupted word on each link
    corrupt_chip = 1;
    repeat (30) @(negedge clk);
    flip_line = 1;
    repeat (100) @(negedge clk);
    checks += 2;
    if (test_errors[0] == 0) begin failures++; $display("chip link error not detected"); end
    if (test_errors[1] == 0 && line_frame_errors == 0) begin failures++; $display("direct link error not detected"); end
    cnt_link_err = int'(test_errors[0] + test_errors[1] + 32'(line_frame_errors));
    cfg(CFG_REG, 16'd0, 32'd0);
    cnt_mode++;
    repeat (20) @(negedge clk);
    loopback = 0;

    check_count("AER-IN events", cnt_in);
    check_count("chip SAER input events", cnt_chip_in);
    check_count("direct SAER input events", cnt_dir_in);
    check_count("simultaneous inputs", cnt_simul);
    check_count("serial input overrun", cnt_overrun);
    check_count("mapped", cnt_mapped);
    check_count("discarded", cnt_dropped);
    check_count("high address pass-through", cnt_high);
    check_count("broadcast", cnt_bcast);
    check_count("unicast", cnt_uni);
    check_count("AER-IN stalled by GPIO (>38)", max_ack_wait > 38 ? max_ack_wait : 0);
    check_count("AER-OUT events", n_recv[0]);
    check_count("chip SAER output events", n_recv[1]);
    check_count("direct SAER output events", n_recv[2]);
    check_count("GPIO events", n_recv[3]);
    check_count("monitor records", n_recv[4]);
    check_count("monitor FIFO backlog (max fill)", max_mon_fill > 1 ? max_mon_fill : 0);
    check_count("sequenced events on time", cnt_seq_exact);
    check_count("link-test good words", cnt_link_good);
    check_count("link-test errors found", cnt_link_err);
    check_count("mode switches", cnt_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

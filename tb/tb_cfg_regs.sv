// tb_cfg_regs: self-checking test of cfg_regs.
// Checks the reset values, that each register write lands in its field and
// leaves the others alone, that a mapping-table write is passed on one clock
// later with its index and value, that a sequence-word write is passed on one
// clock later for exactly one clock, and that register writes produce
// neither.
module tb_cfg_regs;
  import aer_pkg::*;
  localparam int MAP_AW = 12;
  logic              clk = 0, rst_n = 0;
  logic              cfg_we = 0;
  cfg_sel_e          cfg_sel = CFG_REG;
  logic [15:0]       cfg_addr = '0;
  logic [31:0]       cfg_wdata = '0;
  logic              test_mode, seq_en, mon_en, prescale16, map_en, bcast;
  logic [4:0]        out_mask;
  logic [2:0]        uni_sel;
  logic              tbl_we;
  logic [MAP_AW-1:0] tbl_waddr;
  logic [17:0]       tbl_wdata;
  logic              seq_wvalid;
  logic [31:0]       seq_wdata;
  int checks = 0, failures = 0;

  cfg_regs #(.MAP_AW(MAP_AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input cfg_sel_e s, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // mode = {prescale16, mon_en, seq_en, test_mode}
  task automatic expect_state(input logic [3:0] mode, input logic me, bc, input logic [4:0] mk, input logic [2:0] us);
    checks++;
    if ({prescale16, mon_en, seq_en, test_mode, map_en, bcast, out_mask, uni_sel} != {mode, me, bc, mk, us}) begin
      failures++;
      $display("state %b %b %b %h %0d, expected %b %b %b %h %0d",
               {prescale16, mon_en, seq_en, test_mode}, map_en, bcast, out_mask, uni_sel, mode, me, bc, mk, us);
    end
    checks++;
    if (tbl_we || seq_wvalid) begin failures++; $display("table or sequence write from a register write"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_state(4'b0000, 0, 1, 5'h1F, 0);
    wr(CFG_REG, 16'd0, 32'd1);
    expect_state(4'b0001, 0, 1, 5'h1F, 0);
    wr(CFG_REG, 16'd0, 32'hFFFF_FFFA);
    expect_state(4'b1010, 0, 1, 5'h1F, 0);
    wr(CFG_REG, 16'd0, 32'd5);
    expect_state(4'b0101, 0, 1, 5'h1F, 0);
    wr(CFG_REG, 16'd1, 32'd1);
    expect_state(4'b0101, 1, 1, 5'h1F, 0);
    wr(CFG_REG, 16'd2, 32'h0B0);
    expect_state(4'b0101, 1, 0, 5'h0B, 0);
    wr(CFG_REG, 16'd2, 32'h101);
    expect_state(4'b0101, 1, 1, 5'h10, 0);
    wr(CFG_REG, 16'd3, 32'd4);
    expect_state(4'b0101, 1, 1, 5'h10, 4);
    wr(CFG_REG, 16'd0, 32'd0);
    expect_state(4'b0000, 1, 1, 5'h10, 4);
    // table write: visible on the clock after the write
    @(negedge clk);
    cfg_we = 1; cfg_sel = CFG_MAP; cfg_addr = 16'h0123; cfg_wdata = 32'hFFF1_BEEF;
    @(posedge clk);
    #1;
    cfg_we = 0;
    checks++;
    if (!tbl_we || seq_wvalid || tbl_waddr != 12'h123 || tbl_wdata != 18'h1BEEF) begin failures++; $display("table write wrong"); end
    @(posedge clk);
    #1;
    checks++;
    if (tbl_we) begin failures++; $display("table write longer than one clock"); end
    // sequence word
    @(negedge clk);
    cfg_we = 1; cfg_sel = CFG_SEQ; cfg_addr = 16'h0000; cfg_wdata = 32'h1234_5678;
    @(posedge clk);
    #1;
    cfg_we = 0;
    checks++;
    if (!seq_wvalid || tbl_we || seq_wdata != 32'h1234_5678) begin failures++; $display("sequence write wrong"); end
    @(posedge clk);
    #1;
    checks++;
    if (seq_wvalid) begin failures++; $display("sequence write longer than one clock"); end
    expect_state(4'b0000, 1, 1, 5'h10, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

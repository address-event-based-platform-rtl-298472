// aer_mapper: lookup-table address mapper.
//
// Each event address below 2**MAP_AW indexes a table that says what to do
// with the event: keep its address (entry never written), replace the
// address by the entry's address (one-to-one mapping), or discard the event.
// Addresses at or above 2**MAP_AW, and all events while map_en is low, pass
// unchanged. The table is a single-port-read, single-port-write RAM of
// 2**MAP_AW words of 18 bits, which a synthesis tool puts in block RAM.
// Lookup mapping of event addresses is from the document; the entry format,
// the table size and the pass-through of unwritten entries are this design's
// own.
//
// Entry format: {kind[1:0], address[15:0]}; kind 0 = identity, 1 = map to
// address, 2 = discard (3 is treated as discard).
//
// Timing: after reset the block clears the table, one entry per clock
// (2**MAP_AW clocks, init_busy high, in_ready low, table writes ignored).
// Then the table read is registered: an event accepted at clock t is offered
// at t+1, and one event per clock passes while the output is not stalled.
// A table write takes effect for events accepted on later clocks. Reset is
// synchronous and active low.
module aer_mapper #(
  parameter int unsigned ADDR_W = aer_pkg::ADDR_W,
  parameter int unsigned MAP_AW = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              map_en,
  // table write port
  input  logic              tbl_we,
  input  logic [MAP_AW-1:0] tbl_waddr,
  input  logic [ADDR_W+1:0] tbl_wdata,
  output logic              init_busy,
  // event stream in
  input  logic              in_valid,
  input  logic [ADDR_W-1:0] in_addr,
  output logic              in_ready,
  // event stream out
  output logic              out_valid,
  output logic [ADDR_W-1:0] out_addr,
  input  logic              out_ready,
  // one-clock pulses for statistics
  output logic              ev_mapped,
  output logic              ev_dropped
);
  localparam int unsigned DEPTH = 1 << MAP_AW;
  localparam logic [1:0]  K_IDENT = 2'd0;
  localparam logic [1:0]  K_MAP   = 2'd1;

  logic [ADDR_W+1:0] table_q [DEPTH];
  logic [ADDR_W+1:0] rd_q;
  logic [MAP_AW-1:0] init_cnt;

  // stage 1: event waiting for its table entry
  logic              s1_valid;
  logic [ADDR_W-1:0] s1_addr;
  logic              s1_use;    // entry applies to this event

  logic              keep;
  logic              accept;

  assign keep     = !s1_use || (rd_q[ADDR_W+1:ADDR_W] == K_IDENT) ||
                    (rd_q[ADDR_W+1:ADDR_W] == K_MAP);
  assign out_valid = s1_valid && keep;
  assign out_addr  = (s1_use && rd_q[ADDR_W+1:ADDR_W] == K_MAP) ? rd_q[ADDR_W-1:0] : s1_addr;
  assign in_ready  = !init_busy && (!s1_valid || !keep || out_ready);
  assign accept    = in_valid && in_ready;

  assign ev_mapped  = s1_valid && s1_use && rd_q[ADDR_W+1:ADDR_W] == K_MAP && out_ready;
  assign ev_dropped = s1_valid && !keep;

  // Table: write port (clearing sweep or configuration) and registered read.
  always_ff @(posedge clk) begin
    if (init_busy)   table_q[init_cnt]  <= '0;
    else if (tbl_we) table_q[tbl_waddr] <= tbl_wdata;
    if (accept)      rd_q <= table_q[in_addr[MAP_AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_cnt  <= '0;
      s1_valid  <= 1'b0;
      s1_addr   <= '0;
      s1_use    <= 1'b0;
    end else begin
      if (init_busy) begin
        init_cnt <= init_cnt + 1'b1;
        if (init_cnt == MAP_AW'(DEPTH - 1)) init_busy <= 1'b0;
      end
      if (accept) begin
        s1_valid <= 1'b1;
        s1_addr  <= in_addr;
        s1_use   <= map_en && ((in_addr >> MAP_AW) == '0);
      end else if (out_ready || !keep) begin
        s1_valid <= 1'b0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_addr));
endmodule

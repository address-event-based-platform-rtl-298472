// aer_monitor: turns an event stream into timestamped 32-bit records for the
// embedded computer.
//
// Each event becomes one record {dt[15:0], address[15:0]}, where dt is the
// number of ticks since the previous event (since reset or enable for the
// first one); a tick is one clock, or one clock in 16 when prescale16 is set.
// dt saturates at 16'hFFFF. The record format (event in the 16 low bits,
// time since the last event in the 16 high bits) follows the input monitor
// of an earlier PCI event interface; the saturation, the time scale option
// and the stream interfaces are this design's own.
//
// Timing: combinational from event to record; the event is accepted when
// the record is, so a full record FIFO holds the event back instead of
// losing it. The time counter restarts on the tick after each accepted
// event. While en is low events are taken and discarded, so an enabled
// monitor output in the splitter mask cannot stall the event path, and the
// counter holds at zero.
// Reset is synchronous and active low.
module aer_monitor
  import aer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        prescale16,
  input  logic        in_valid,
  input  aer_addr_t   in_addr,
  output logic        in_ready,
  output logic        rec_valid,
  output logic [31:0] rec_data,
  input  logic        rec_ready
);
  logic [15:0] dt;
  logic [3:0]  pre;
  logic        tick;

  assign tick      = !prescale16 || (pre == 4'hF);
  assign rec_valid = en && in_valid;
  assign rec_data  = {dt, in_addr};
  assign in_ready  = !en || rec_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dt  <= '0;
      pre <= '0;
    end else begin
      pre <= pre + 1'b1;
      if (!en)                         dt <= '0;
      else if (in_valid && rec_ready)  dt <= tick ? 16'd1 : 16'd0;
      else if (tick && dt != '1)       dt <= dt + 1'b1;
    end
  end
endmodule

// aer_splitter: distributes one address-event stream to N outputs, like the
// splitter mode of an AER switch.
//
// In broadcast mode every output whose bit is set in out_mask receives each
// event; in unicast mode only output uni_sel does (if its mask bit is set).
// An event is released from the input only when every destination has taken
// it. A per-output 'done' mask remembers which outputs already took the
// current event, so a slow output does not make the fast ones see it twice.
// An event with no enabled destination is consumed at once. Unicast and
// broadcast come from the document; the mask register and the 'done'
// tracking are this design's own.
//
// Timing: purely combinational from input to outputs plus the done mask; an
// event offered to outputs that are all ready leaves in the same clock.
// The mode inputs should change only while no event is pending. Reset is
// synchronous and active low.
module aer_splitter #(
  parameter int unsigned N      = 4,
  parameter int unsigned ADDR_W = aer_pkg::ADDR_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bcast,
  input  logic [N-1:0]         out_mask,
  input  logic [$clog2(N)-1:0] uni_sel,
  input  logic                 in_valid,
  input  logic [ADDR_W-1:0]    in_addr,
  output logic                 in_ready,
  output logic [N-1:0]         out_valid,
  output logic [ADDR_W-1:0]    out_addr,
  input  logic [N-1:0]         out_ready
);
  logic [N-1:0] target;
  logic [N-1:0] done;
  logic [N-1:0] taken;

  always_comb begin
    if (bcast) target = out_mask;
    else       target = out_mask & (N'(1) << uni_sel);
  end

  assign out_valid = {N{in_valid}} & target & ~done;
  assign out_addr  = in_addr;
  assign taken     = out_valid & out_ready;
  assign in_ready  = ((done | taken | ~target) == '1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= '0;
    end else if (in_valid) begin
      if (in_ready) done <= '0;
      else          done <= done | taken;
    end
  end
endmodule

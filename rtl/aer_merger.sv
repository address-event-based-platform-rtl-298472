// aer_merger: merges N address-event streams into one, like the merger mode
// of an AER switch.
//
// A round-robin arbiter picks one of the requesting inputs each time the
// output register is free; the input after the last winner has the highest
// priority next time, so no input starves. The output is a register, so an
// event leaves one clock after it is accepted, and one event per clock can
// pass while the output is not stalled. Merging is from the document; the
// round-robin policy and the registered output are this design's choices.
// Reset is synchronous and active low.
module aer_merger #(
  parameter int unsigned N      = 3,
  parameter int unsigned ADDR_W = aer_pkg::ADDR_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 in_valid,
  input  logic [N-1:0][ADDR_W-1:0]     in_addr,
  output logic [N-1:0]                 in_ready,
  output logic                         out_valid,
  output logic [ADDR_W-1:0]            out_addr,
  output logic [$clog2(N+1)-1:0]       out_src,   // index of the input the event came from
  input  logic                         out_ready
);
  localparam int unsigned IW = $clog2(N+1);
  logic [IW-1:0] last;     // last winner
  logic [IW-1:0] grant;
  logic          any;
  logic          take;

  // Round robin: search from last+1 upwards, wrapping.
  always_comb begin
    grant = '0;
    any   = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last) + k) % N);
      if (!any && ((in_valid >> idx) & N'(1)) != '0) begin
        any   = 1'b1;
        grant = idx;
      end
    end
  end

  assign take = any && (!out_valid || out_ready);

  always_comb begin
    in_ready = N'(take) << grant;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_src   <= '0;
      last      <= IW'(N-1);
    end else begin
      if (take) begin
        out_valid <= 1'b1;
        out_addr  <= in_addr[grant];
        out_src   <= grant;
        last      <= grant;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_addr));
endmodule

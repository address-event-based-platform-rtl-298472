// sync_2ff: two-flop synchronizer for one asynchronous input, such as the
// REQ or ACK line of a parallel AER bus. The output follows the input two
// clock edges later. Reset clears both flops.
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule

// saer_ser: serializer for a serial AER link driven straight from the FPGA.
//
// Each 10-bit word is sent as a 12-bit frame: a start bit '1', the ten data
// bits least significant first, and a stop bit '0'. This is the frame of the
// commercial serializer used on the other SAER links, so both kinds of link
// carry the same line format; with a 50 MHz word rate it gives the 600 Mbps
// line rate of those links. Here one line bit is shifted per clock of clk,
// so the word rate is the clock rate divided by 12. Frames follow each other
// without gaps from the first clock after reset; the line is '0' during
// reset.
//
// Interface: word_ready is high for one clock at the start of each frame;
// word_i is taken on that clock edge and its start bit appears on line_o
// during the next clock. Reset is synchronous and active low.
module saer_ser
  import aer_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  saer_word_t word_i,
  output logic       word_ready,
  output logic       line_o
);
  logic [FRAME_BITS-1:0]         shreg;
  logic [$clog2(FRAME_BITS)-1:0] cnt;
  logic                          started;

  // Load at the last bit of a frame, or right after reset.
  assign word_ready = !started || (cnt == ($clog2(FRAME_BITS))'(FRAME_BITS - 1));
  assign line_o     = shreg[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg   <= '0;
      cnt     <= '0;
      started <= 1'b0;
    end else if (word_ready) begin
      shreg   <= {1'b0, word_i, 1'b1};
      cnt     <= '0;
      started <= 1'b1;
    end else begin
      shreg <= shreg >> 1;
      cnt   <= cnt + 1'b1;
    end
  end
endmodule

// saer_tx: packs address events into the 10-bit word stream of a serial AER
// (SAER) link.
//
// Each 16-bit event becomes two words, {first=1, valid=1, address[15:8]} then
// {first=0, valid=1, address[7:0]}; when no event is waiting an idle word
// (all zero) is sent, so the serializer always has data. Two words per event
// is the packing chosen for this design (20 line bits of payload per event).
//
// Interface: word_o is the word the serializer takes when word_ready is high;
// the block then loads the next word on that clock edge. A serializer chip
// that takes a word every clock ties word_ready high; the FPGA serializer
// pulses it once per frame. in_ready is high when word_ready is high and the
// second half of the previous event has been sent, so at most one event is
// taken every two word slots. Reset is synchronous and active low.
module saer_tx
  import aer_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  aer_addr_t  in_addr,
  output logic       in_ready,
  output saer_word_t word_o,
  input  logic       word_ready
);
  logic       pend;   // low byte still to send
  logic [7:0] lo;

  assign in_ready = word_ready && !pend;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word_o <= SAER_IDLE;
      pend   <= 1'b0;
      lo     <= '0;
    end else if (word_ready) begin
      if (pend) begin
        word_o <= saer_word(1'b0, 1'b1, lo);
        pend   <= 1'b0;
      end else if (in_valid) begin
        word_o <= saer_word(1'b1, 1'b1, in_addr[15:8]);
        lo     <= in_addr[7:0];
        pend   <= 1'b1;
      end else begin
        word_o <= SAER_IDLE;
      end
    end
  end
endmodule

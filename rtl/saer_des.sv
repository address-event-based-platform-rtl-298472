// saer_des: deserializer for a serial AER link received straight by the FPGA
// (the inverse of saer_ser).
//
// While hunting, the first '1' on the line is taken as a start bit. The next
// ten bits are the data, least significant first, and the bit after them
// must be the stop bit '0'. A good frame gives one word; a bad stop bit
// counts a framing error, drops the word and returns to hunting. Because an
// idle word is all zeros, an idle frame has a single '1' (its start bit),
// which lets the receiver find the frame boundary. The line is sampled with
// the local clock, one sample per bit, the same clock as saer_ser; recovering
// the clock of a remote transmitter is not part of this block.
//
// Timing: word_valid pulses for one clock, the clock after the stop bit is
// sampled. Back-to-back frames give one word every 12 clocks. Reset is
// synchronous and active low.
module saer_des
  import aer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        line_i,
  output saer_word_t  word_o,
  output logic        word_valid,
  output logic [15:0] frame_errors
);
  typedef enum logic [1:0] {S_HUNT, S_DATA, S_STOP} state_e;
  state_e                    state;
  saer_word_t                sh;
  logic [$clog2(SAER_W)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_HUNT;
      sh           <= '0;
      cnt          <= '0;
      word_o       <= '0;
      word_valid   <= 1'b0;
      frame_errors <= '0;
    end else begin
      word_valid <= 1'b0;
      unique case (state)
        S_HUNT: if (line_i) begin
          cnt   <= '0;
          state <= S_DATA;
        end
        S_DATA: begin
          sh  <= {line_i, sh[SAER_W-1:1]};
          cnt <= cnt + 1'b1;
          if (cnt == ($clog2(SAER_W))'(SAER_W - 1)) state <= S_STOP;
        end
        S_STOP: begin
          if (!line_i) begin
            word_o     <= sh;
            word_valid <= 1'b1;
          end else begin
            frame_errors <= frame_errors + 1'b1;
          end
          state <= S_HUNT;
        end
        default: state <= S_HUNT;
      endcase
    end
  end
endmodule

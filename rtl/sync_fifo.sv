// sync_fifo: single-clock first-in first-out buffer with valid/ready ports.
//
// DEPTH words of W bits are held in a RAM; a write is accepted when the FIFO
// is not full and a read when it is not empty. The output is first-word
// fall-through: rd_data shows the oldest word whenever rd_valid is high, and
// a word written into an empty FIFO appears there on the next clock. A full
// FIFO passes one word per clock in and out. It serves as the output FIFO of
// the event sequencer and the input FIFO of the event monitor; their depth is
// this design's choice. DEPTH must be a power of two. Reset (synchronous,
// active low) empties it.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_valid,
  input  logic [W-1:0]             wr_data,
  output logic                     wr_ready,
  output logic                     rd_valid,
  output logic [W-1:0]             rd_data,
  input  logic                     rd_ready,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rp];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk) if (do_wr) mem[wp] <= wr_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      unique case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end
endmodule

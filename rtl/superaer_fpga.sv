// superaer_fpga: FPGA logic of the Super-AER platform, a board that joins
// neuromorphic chips speaking the Address-Event Representation (AER) and
// lets an embedded Linux computer watch and steer their traffic.
//
// Event path. Events arrive on four inputs:
//   0  parallel AER-IN port (REQ/ACK handshake)
//   1  SAER link whose words come from an external deserializer chip
//   2  SAER link received directly by the FPGA
//   3  sequencer: timed events written by the embedded computer
// A round-robin merger joins them into one stream, a lookup-table mapper
// rewrites (or discards) each address, and a splitter sends the result, to
// all enabled outputs or to one, on five outputs:
//   0  parallel AER-OUT port (REQ/ACK handshake)
//   1  SAER link through an external serializer chip (one word per clock)
//   2  SAER link serialized directly by the FPGA (one word per 12 clocks)
//   3  GPIO port of the embedded computer (REQ/ACK handshake, software ACK)
//   4  monitor: timestamped records in a FIFO the embedded computer reads
// On a SAER link each 16-bit event is two 10-bit words (see aer_pkg).
//
// Sequence and monitor. The embedded computer fills the sequencer FIFO with
// 32-bit words {delay, address}; with the sequencer enabled, each event is
// injected after its delay (see aer_sequencer). With the monitor enabled,
// every event sent to output 4 is stored as {time since last event, address}
// in the monitor FIFO, read on the mon_* port.
//
// Link-test mode. With MODE bit 0 set, both SAER outputs send a counting
// 10-bit test pattern instead of events, and both SAER inputs feed checkers
// that count good and wrong words; events for the SAER outputs wait, and
// the SAER inputs are not decoded into events. This is the serial-link
// experiment of the platform.
//
// Configuration. The embedded computer writes registers and mapping-table
// entries through the cfg_* port (see cfg_regs).
//
// Which ports exist (AER-IN, AER-OUT, two SAER inputs and two SAER outputs,
// half of them through external ser/deser chips, the embedded computer on
// GPIO, 50 MHz clock) follows the platform, as do the three tasks of
// sequencing, monitoring and mapping events. The routing through merger,
// mapper and splitter, the word format, the FIFO depths and the register map
// are this design's choices. Everything runs in the clk domain (50 MHz on
// the board); the direct SAER link shifts one bit per clk. Reset is
// synchronous and active low; the mapper needs 2**MAP_AW clocks after reset
// to clear its table before events flow.
module superaer_fpga
  import aer_pkg::*;
#(
  parameter int unsigned MAP_AW    = 12,
  parameter int unsigned SEQ_DEPTH = 512,
  parameter int unsigned MON_DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // parallel AER input port
  input  logic              aer_in_req,
  input  aer_addr_t         aer_in_addr,
  output logic              aer_in_ack,
  // parallel AER output port
  output logic              aer_out_req,
  output aer_addr_t         aer_out_addr,
  input  logic              aer_out_ack,
  // embedded computer: event port on GPIO
  output logic              gpio_req,
  output aer_addr_t         gpio_addr,
  input  logic              gpio_ack,
  // embedded computer: configuration writes
  input  logic              cfg_we,
  input  cfg_sel_e          cfg_sel,
  input  logic [15:0]       cfg_addr,
  input  logic [31:0]       cfg_wdata,
  // embedded computer: monitor records
  output logic              mon_rd_valid,
  output logic [31:0]       mon_rd_data,
  input  logic              mon_rd_ready,
  // SAER link through external serializer / deserializer chips
  output saer_word_t        ser_word,
  input  saer_word_t        deser_word,
  input  logic              deser_lock,
  // SAER link handled directly by the FPGA
  output logic              saer_line_out,
  input  logic              saer_line_in,
  // status
  output logic              init_busy,
  output logic [1:0][31:0]  test_good,     // link test: [0] chip link, [1] direct link
  output logic [1:0][31:0]  test_errors,
  output logic [1:0]        test_locked,
  output logic [1:0][15:0]  rx_frame_errors,
  output logic [1:0][15:0]  rx_overruns,
  output logic [15:0]       line_frame_errors,
  output logic [31:0]       events_mapped,
  output logic [31:0]       events_dropped,
  output logic [$clog2(SEQ_DEPTH):0] seq_fill,   // words waiting in the sequencer FIFO
  output logic [$clog2(MON_DEPTH):0] mon_fill,   // records waiting in the monitor FIFO
  output logic [23:0]       seq_lag       // ticks the sequencer was behind schedule at its last event
);
  // ---------------- configuration
  logic              test_mode, seq_en, mon_en, prescale16, map_en, bcast;
  logic [N_OUT-1:0]  out_mask;
  logic [2:0]        uni_sel;
  logic              tbl_we;
  logic [MAP_AW-1:0] tbl_waddr;
  logic [ADDR_W+1:0] tbl_wdata;
  logic              seq_wvalid;
  logic [31:0]       seq_wdata;

  cfg_regs #(.MAP_AW(MAP_AW)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_addr, .cfg_wdata,
    .test_mode, .seq_en, .mon_en, .prescale16, .map_en, .bcast, .out_mask, .uni_sel,
    .tbl_we, .tbl_waddr, .tbl_wdata, .seq_wvalid, .seq_wdata
  );

  // ---------------- inputs
  logic [N_IN-1:0]             m_valid, m_ready;
  logic [N_IN-1:0][ADDR_W-1:0] m_addr;

  aer_in u_aer_in (
    .clk, .rst_n, .req(aer_in_req), .addr(aer_in_addr), .ack(aer_in_ack),
    .out_valid(m_valid[0]), .out_addr(m_addr[0]), .out_ready(m_ready[0])
  );

  // chip link: the deserializer delivers one word per clock while locked
  saer_rx u_rx_chip (
    .clk, .rst_n, .word_i(deser_word), .word_valid(deser_lock && !test_mode),
    .out_valid(m_valid[1]), .out_addr(m_addr[1]), .out_ready(m_ready[1]),
    .frame_errors(rx_frame_errors[0]), .overruns(rx_overruns[0])
  );

  // direct link
  saer_word_t des_word;
  logic       des_valid;

  saer_des u_des (
    .clk, .rst_n, .line_i(saer_line_in), .word_o(des_word), .word_valid(des_valid),
    .frame_errors(line_frame_errors)
  );

  saer_rx u_rx_direct (
    .clk, .rst_n, .word_i(des_word), .word_valid(des_valid && !test_mode),
    .out_valid(m_valid[2]), .out_addr(m_addr[2]), .out_ready(m_ready[2]),
    .frame_errors(rx_frame_errors[1]), .overruns(rx_overruns[1])
  );

  // sequencer: FIFO written by the embedded computer
  logic        sq_valid, sq_ready;
  logic [31:0] sq_word;
  logic        seq_wready, seq_late;

  sync_fifo #(.W(32), .DEPTH(SEQ_DEPTH)) u_seq_fifo (
    .clk, .rst_n, .wr_valid(seq_wvalid), .wr_data(seq_wdata), .wr_ready(seq_wready),
    .rd_valid(sq_valid), .rd_data(sq_word), .rd_ready(sq_ready), .count(seq_fill)
  );

  aer_sequencer u_seq (
    .clk, .rst_n, .en(seq_en), .prescale16,
    .in_valid(sq_valid), .in_word(sq_word), .in_ready(sq_ready),
    .out_valid(m_valid[3]), .out_addr(m_addr[3]), .out_ready(m_ready[3]),
    .lag(seq_lag), .late(seq_late)
  );

  // ---------------- merge, map, split
  logic        mg_valid, mg_ready;
  aer_addr_t   mg_addr;
  logic [2:0]  mg_src;

  aer_merger #(.N(N_IN)) u_merge (
    .clk, .rst_n, .in_valid(m_valid), .in_addr(m_addr), .in_ready(m_ready),
    .out_valid(mg_valid), .out_addr(mg_addr), .out_src(mg_src), .out_ready(mg_ready)
  );

  logic      mp_valid, mp_ready, ev_mapped, ev_dropped;
  aer_addr_t mp_addr;

  aer_mapper #(.MAP_AW(MAP_AW)) u_map (
    .clk, .rst_n, .map_en, .tbl_we, .tbl_waddr, .tbl_wdata, .init_busy,
    .in_valid(mg_valid), .in_addr(mg_addr), .in_ready(mg_ready),
    .out_valid(mp_valid), .out_addr(mp_addr), .out_ready(mp_ready),
    .ev_mapped, .ev_dropped
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      events_mapped  <= '0;
      events_dropped <= '0;
    end else begin
      if (ev_mapped)  events_mapped  <= events_mapped + 1'b1;
      if (ev_dropped) events_dropped <= events_dropped + 1'b1;
    end
  end

  logic [N_OUT-1:0] s_valid, s_ready;
  aer_addr_t        s_addr;

  aer_splitter #(.N(N_OUT)) u_split (
    .clk, .rst_n, .bcast, .out_mask, .uni_sel,
    .in_valid(mp_valid), .in_addr(mp_addr), .in_ready(mp_ready),
    .out_valid(s_valid), .out_addr(s_addr), .out_ready(s_ready)
  );

  // ---------------- outputs
  // monitor
  logic        rec_valid, rec_ready;
  logic [31:0] rec_data;

  aer_monitor u_mon (
    .clk, .rst_n, .en(mon_en), .prescale16,
    .in_valid(s_valid[OUT_MON]), .in_addr(s_addr), .in_ready(s_ready[OUT_MON]),
    .rec_valid, .rec_data, .rec_ready
  );

  sync_fifo #(.W(32), .DEPTH(MON_DEPTH)) u_mon_fifo (
    .clk, .rst_n, .wr_valid(rec_valid), .wr_data(rec_data), .wr_ready(rec_ready),
    .rd_valid(mon_rd_valid), .rd_data(mon_rd_data), .rd_ready(mon_rd_ready), .count(mon_fill)
  );

  aer_out u_aer_out (
    .clk, .rst_n, .in_valid(s_valid[OUT_AER]), .in_addr(s_addr), .in_ready(s_ready[OUT_AER]),
    .req(aer_out_req), .addr(aer_out_addr), .ack(aer_out_ack)
  );

  aer_out u_gpio (
    .clk, .rst_n, .in_valid(s_valid[OUT_GPI]), .in_addr(s_addr), .in_ready(s_ready[OUT_GPI]),
    .req(gpio_req), .addr(gpio_addr), .ack(gpio_ack)
  );

  // chip link: the serializer takes a word every clock
  saer_word_t tx_chip_word, pat_chip_word;

  saer_tx u_tx_chip (
    .clk, .rst_n, .in_valid(s_valid[OUT_SCH]), .in_addr(s_addr), .in_ready(s_ready[OUT_SCH]),
    .word_o(tx_chip_word), .word_ready(!test_mode)
  );

  saer_pattern_gen u_pat_chip (
    .clk, .rst_n, .en(test_mode), .word_ready(1'b1), .word_o(pat_chip_word)
  );

  assign ser_word = test_mode ? pat_chip_word : tx_chip_word;

  // direct link
  saer_word_t tx_dir_word, pat_dir_word, ser_in_word;
  logic       ser_take;

  saer_tx u_tx_direct (
    .clk, .rst_n, .in_valid(s_valid[OUT_SDI]), .in_addr(s_addr), .in_ready(s_ready[OUT_SDI]),
    .word_o(tx_dir_word), .word_ready(ser_take && !test_mode)
  );

  saer_pattern_gen u_pat_direct (
    .clk, .rst_n, .en(test_mode), .word_ready(ser_take), .word_o(pat_dir_word)
  );

  assign ser_in_word = test_mode ? pat_dir_word : tx_dir_word;

  saer_ser u_ser (
    .clk, .rst_n, .word_i(ser_in_word), .word_ready(ser_take), .line_o(saer_line_out)
  );

  // ---------------- link test checkers
  saer_checker u_chk_chip (
    .clk, .rst_n, .en(test_mode), .word_i(deser_word), .word_valid(deser_lock),
    .good(test_good[0]), .errors(test_errors[0]), .locked(test_locked[0])
  );

  saer_checker u_chk_direct (
    .clk, .rst_n, .en(test_mode), .word_i(des_word), .word_valid(des_valid),
    .good(test_good[1]), .errors(test_errors[1]), .locked(test_locked[1])
  );
endmodule

// aer_pkg: constants and types shared by the Super-AER FPGA blocks.
//
// An address event is a 16-bit address, the width used for events on the
// platform's buses. On a serial AER (SAER) link each event travels as two
// 10-bit words, the word size of the link's serializer. Each word is
// {first, valid, byte}: the high address byte goes in the first word and the
// low byte in the second. A word with valid = 0 is an idle word. This word
// layout is this design's own choice; the 10-bit word size and the 16-bit
// event follow the platform. The package also numbers the merger inputs and
// splitter outputs of the top level and holds the configuration register map.
package aer_pkg;

  localparam int unsigned ADDR_W     = 16;  // address event width
  localparam int unsigned SAER_W     = 10;  // SAER word width
  localparam int unsigned FRAME_BITS = SAER_W + 2;  // start + data + stop on the line

  // Bit positions inside a SAER word.
  localparam int unsigned W_FIRST = 9;
  localparam int unsigned W_VALID = 8;

  typedef logic [ADDR_W-1:0] aer_addr_t;
  typedef logic [SAER_W-1:0] saer_word_t;

  // Build a SAER word.
  function automatic saer_word_t saer_word(input logic first, input logic valid,
                                           input logic [7:0] data);
    return {first, valid, data};
  endfunction

  localparam saer_word_t SAER_IDLE = '0;

  // Splitter outputs.
  localparam int unsigned N_OUT   = 5;
  localparam int unsigned OUT_AER = 0;  // parallel AER-OUT
  localparam int unsigned OUT_SCH = 1;  // SAER through the serializer chip
  localparam int unsigned OUT_SDI = 2;  // SAER serialized by the FPGA
  localparam int unsigned OUT_GPI = 3;  // GPIO handshake port
  localparam int unsigned OUT_MON = 4;  // timestamping monitor

  // Merger inputs.
  localparam int unsigned N_IN = 4;     // AER-IN, SAER chip, SAER direct, sequencer

  // Configuration register addresses (cfg_sel = CFG_REG).
  typedef enum logic [1:0] {
    REG_MODE   = 2'd0,  // bit0 link test, bit1 sequencer, bit2 monitor, bit3 x16 time scale
    REG_MAP    = 2'd1,  // bit0: mapping enable
    REG_SPLIT  = 2'd2,  // bit0: broadcast, bits[8:4]: output enable mask
    REG_UNISEL = 2'd3   // bits[2:0]: unicast output
  } cfg_reg_e;

  // What a configuration write goes to.
  typedef enum logic [1:0] {
    CFG_REG = 2'd0,     // a register
    CFG_MAP = 2'd1,     // a mapping-table entry
    CFG_SEQ = 2'd2      // a word for the sequencer FIFO
  } cfg_sel_e;

endpackage

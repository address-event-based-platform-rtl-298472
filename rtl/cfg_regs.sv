// cfg_regs: configuration registers of the FPGA, written by the embedded
// computer.
//
// A write (cfg_we high for one clock) with cfg_sel = CFG_REG sets one of four
// registers chosen by cfg_addr[1:0]:
//   MODE   bit 0 SAER link-test mode, bit 1 sequencer enable, bit 2 monitor
//          enable, bit 3 time scale x16 for sequencer and monitor
//   MAP    bit 0 address mapping enabled
//   SPLIT  bit 0 broadcast, bits 8:4 output enable mask
//   UNISEL bits 2:0 unicast output
// A write with cfg_sel = CFG_MAP is passed, one clock later, to the mapping
// table as entry cfg_addr with value cfg_wdata[17:0]. A write with cfg_sel =
// CFG_SEQ is passed, one clock later, to the sequencer FIFO as a 32-bit
// sequence word; it is lost if that FIFO is full, so software checks the
// FIFO fill level first. The register map is this design's own; the document
// says only that the embedded computer is connected to the FPGA to control it.
//
// After reset: normal mode, sequencer, monitor and mapping off, broadcast to
// all five outputs. Reset is synchronous and active low.
module cfg_regs
  import aer_pkg::*;
#(
  parameter int unsigned MAP_AW = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  cfg_sel_e          cfg_sel,
  input  logic [15:0]       cfg_addr,
  input  logic [31:0]       cfg_wdata,
  output logic              test_mode,
  output logic              seq_en,
  output logic              mon_en,
  output logic              prescale16,
  output logic              map_en,
  output logic              bcast,
  output logic [N_OUT-1:0]  out_mask,
  output logic [2:0]        uni_sel,
  output logic              tbl_we,
  output logic [MAP_AW-1:0] tbl_waddr,
  output logic [ADDR_W+1:0] tbl_wdata,
  output logic              seq_wvalid,
  output logic [31:0]       seq_wdata
);
  cfg_reg_e reg_sel;
  assign reg_sel = cfg_reg_e'(cfg_addr[1:0]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      test_mode <= 1'b0;
      seq_en    <= 1'b0;
      mon_en    <= 1'b0;
      prescale16 <= 1'b0;
      map_en    <= 1'b0;
      bcast     <= 1'b1;
      out_mask  <= '1;
      seq_wvalid <= 1'b0;
      seq_wdata <= '0;
      uni_sel   <= '0;
      tbl_we    <= 1'b0;
      tbl_waddr <= '0;
      tbl_wdata <= '0;
    end else begin
      tbl_we <= cfg_we && (cfg_sel == CFG_MAP);
      if (cfg_we && cfg_sel == CFG_MAP) begin
        tbl_waddr <= cfg_addr[MAP_AW-1:0];
        tbl_wdata <= cfg_wdata[ADDR_W+1:0];
      end
      seq_wvalid <= cfg_we && (cfg_sel == CFG_SEQ);
      if (cfg_we && cfg_sel == CFG_SEQ) seq_wdata <= cfg_wdata;
      if (cfg_we && cfg_sel == CFG_REG) begin
        unique case (reg_sel)
          REG_MODE:   begin
            test_mode  <= cfg_wdata[0];
            seq_en     <= cfg_wdata[1];
            mon_en     <= cfg_wdata[2];
            prescale16 <= cfg_wdata[3];
          end
          REG_MAP:    map_en    <= cfg_wdata[0];
          REG_SPLIT:  begin
            bcast    <= cfg_wdata[0];
            out_mask <= cfg_wdata[4 +: N_OUT];
          end
          REG_UNISEL: uni_sel   <= cfg_wdata[2:0];
          default: ;
        endcase
      end
    end
  end
endmodule

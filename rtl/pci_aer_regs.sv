// Address decoder and BAR0 register file of the PCI-AER interface.
//
// The PCI core hands every target access to BAR0 over as a one-cycle strobe
// (tgt_wr or tgt_rd) with a byte offset and, for writes, 32 data bits. Read
// data is combinational and valid in the strobe cycle. Register map, in the
// order of the board's BAR0 map:
//   0x00 R   words moved by the last bus-master transfer (live while running)
//   0x04 R/W host memory address for bus-master access
//   0x08 R/W FIFO access: a write pushes one word into the OFIFO, a read
//            pops one word from the IFIFO (polled I/O; ignored while a
//            bus-master transfer runs, and a read of an empty IFIFO returns 0)
//   0x0C R/W interrupt pending (write one to clear) and enable, see pci_aer_irq
//   0x10 R   status: [0] OFIFO empty [1] OFIFO full [2] IFIFO empty
//            [3] IFIFO full [4] OUT-AER busy [5] bus master busy
//            [6] IN-AER stalled, [19:8] OFIFO level, [31:20] IFIFO level
//   0x14 R/W configuration, fields in pci_aer_pkg::config_t; writing bit 4
//            starts a bus-master transfer with the length and direction
//            written alongside (dma_start pulses in the next cycle); it
//            reads back as 0
// The register names come from the document's block diagram; offsets and bit
// layouts are this design's choices.
module pci_aer_regs
  import pci_aer_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // target side of the PCI core
  input  logic              tgt_wr,
  input  logic              tgt_rd,
  input  logic [5:0]        tgt_addr,
  input  logic [31:0]       tgt_wdata,
  output logic [31:0]       tgt_rdata,
  // configuration outputs
  output config_t           cfg,
  output logic [31:0]       mst_base,
  output logic              dma_start,
  // FIFO access
  output logic              of_push,
  output logic [EVW-1:0]    of_wdata,
  input  logic              of_full,
  output logic              if_pop,
  input  logic [EVW-1:0]    if_rdata,
  input  logic              if_empty,
  // interrupt register
  output logic              int_wr,
  input  logic [31:0]       int_rdata,
  // status inputs
  input  logic [15:0]       mst_count,
  input  logic              dma_busy,
  input  logic [7:0]        status_flags,
  input  logic [11:0]       of_level,
  input  logic [11:0]       if_level
);
  logic wr_fifo, rd_fifo;

  assign wr_fifo   = tgt_wr && (tgt_addr[5:2] == REG_FIFO[5:2]);
  assign rd_fifo   = tgt_rd && (tgt_addr[5:2] == REG_FIFO[5:2]);
  assign of_push   = wr_fifo && !dma_busy && !of_full;
  assign of_wdata  = tgt_wdata;
  assign if_pop    = rd_fifo && !dma_busy && !if_empty;
  assign int_wr    = tgt_wr && (tgt_addr[5:2] == REG_INT[5:2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_start <= 1'b0;
    end else begin
      // one cycle after the write, so the transfer sees the new length and direction
      dma_start <= tgt_wr && (tgt_addr[5:2] == REG_CONFIG[5:2]) && tgt_wdata[4] && !dma_busy;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg      <= '0;
      mst_base <= '0;
    end else if (tgt_wr) begin
      unique case (tgt_addr[5:2])
        REG_MST_ADDR[5:2]: mst_base <= tgt_wdata;
        REG_CONFIG[5:2]: begin
          cfg           <= config_t'(tgt_wdata);
          cfg.dma_start <= 1'b0;
          cfg.rsvd      <= '0;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (tgt_addr[5:2])
      REG_MST_COUNT[5:2]: tgt_rdata = {16'h0, mst_count};
      REG_MST_ADDR[5:2]:  tgt_rdata = mst_base;
      REG_FIFO[5:2]:      tgt_rdata = if_empty ? '0 : if_rdata;
      REG_INT[5:2]:       tgt_rdata = int_rdata;
      REG_STATUS[5:2]:    tgt_rdata = {if_level, of_level, status_flags};
      REG_CONFIG[5:2]:    tgt_rdata = cfg;
      default:            tgt_rdata = '0;
    endcase
  end

  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) !(tgt_wr && tgt_rd));
endmodule

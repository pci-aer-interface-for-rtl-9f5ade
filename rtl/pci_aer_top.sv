// PCI-AER interface: the board logic that sits between a PCI bridge core and
// two AER (address-event representation) buses.
//
// Two paths run in parallel. Host to AER: event words reach the OFIFO either
// by bus-master reads of host memory (pci_aer_dma) or by target writes to the
// FIFO register, and the OUT-AER state machine sends each address on the
// output AER bus at the time its time-difference field asks for, recovering
// time lost to slow acknowledges. AER to host: the IN-AER state machine
// accepts events from the input AER bus and stores each address with the
// number of ticks since the previous event in the IFIFO, from where
// bus-master writes or target reads of the FIFO register carry them to the
// host. The decoder/register block holds the configuration, and the IRQ block
// raises the PCI interrupt on end of transfer, OFIFO empty, IFIFO half full
// and IFIFO full.
//
// Interface: the tgt_* and mst_* ports are the user side of the PCI core
// (one-cycle target strobes with combinational read data; a word-by-word
// master request/acknowledge), irq is its interrupt request, and the
// out_aer_* / in_aer_* ports are the two AER buses with active-high
// four-phase REQ/ACK. Everything runs on the PCI clock (30 ns in the
// document). The block structure and the event word follow the document;
// the port protocols, FIFO depths, register layouts and interrupt sources
// are this design's choices.
module pci_aer_top
  import pci_aer_pkg::*;
#(
  parameter int unsigned OFIFO_DEPTH = 512,
  parameter int unsigned IFIFO_DEPTH = 512
) (
  input  logic            clk,
  input  logic            rst_n,
  // PCI core, target side (BAR0)
  input  logic            tgt_wr,
  input  logic            tgt_rd,
  input  logic [5:0]      tgt_addr,
  input  logic [31:0]     tgt_wdata,
  output logic [31:0]     tgt_rdata,
  // PCI core, master side
  output logic            mst_req,
  output logic            mst_we,
  output logic [31:0]     mst_addr,
  output logic [31:0]     mst_wdata,
  input  logic            mst_ack,
  input  logic [31:0]     mst_rdata,
  output logic            irq,
  // AER output bus
  output logic [ADRW-1:0] out_aer_addr,
  output logic            out_aer_req,
  input  logic            out_aer_ack,
  // AER input bus
  input  logic [ADRW-1:0] in_aer_addr,
  input  logic            in_aer_req,
  output logic            in_aer_ack
);
  localparam int unsigned OLW = $clog2(OFIFO_DEPTH) + 1;
  localparam int unsigned ILW = $clog2(IFIFO_DEPTH) + 1;

  config_t          cfg;
  logic [31:0]      mst_base, int_rdata;
  logic             dma_start, dma_busy, dma_done, int_wr;
  logic [15:0]      mst_count;

  logic             of_push, of_pop, of_full, of_empty, reg_of_push, dma_of_push;
  logic [EVW-1:0]   of_wdata, of_rdata, reg_of_wdata, dma_of_wdata;
  logic [OLW-1:0]   of_count;

  logic             if_push, if_pop, if_full, if_empty, reg_if_pop, dma_if_pop;
  logic [EVW-1:0]   if_wdata, if_rdata;
  logic [ILW-1:0]   if_count;

  logic             out_busy, out_sent, out_late, out_wait_done;
  logic             in_stalled, in_overflow;
  logic [NIRQ-1:0]  irq_src;
  logic [7:0]       status_flags;

  pci_aer_regs u_regs (
    .clk, .rst_n,
    .tgt_wr, .tgt_rd, .tgt_addr, .tgt_wdata, .tgt_rdata,
    .cfg, .mst_base, .dma_start,
    .of_push(reg_of_push), .of_wdata(reg_of_wdata), .of_full,
    .if_pop(reg_if_pop), .if_rdata, .if_empty,
    .int_wr, .int_rdata,
    .mst_count, .dma_busy, .status_flags,
    .of_level(12'(of_count)), .if_level(12'(if_count))
  );

  pci_aer_dma u_dma (
    .clk, .rst_n,
    .start(dma_start), .dir(cfg.dma_dir), .len(cfg.dma_len), .base(mst_base),
    .mst_req, .mst_we, .mst_addr, .mst_wdata, .mst_ack, .mst_rdata,
    .of_push(dma_of_push), .of_wdata(dma_of_wdata), .of_full,
    .if_pop(dma_if_pop), .if_rdata, .if_empty,
    .busy(dma_busy), .done(dma_done), .count(mst_count)
  );

  // The register path is blocked inside pci_aer_regs while the master runs.
  assign of_push  = dma_of_push | reg_of_push;
  assign of_wdata = dma_of_push ? dma_of_wdata : reg_of_wdata;
  assign if_pop   = dma_if_pop | reg_if_pop;

  aer_fifo #(.WIDTH(EVW), .DEPTH(OFIFO_DEPTH)) u_ofifo (
    .clk, .rst_n,
    .push(of_push), .wdata(of_wdata), .pop(of_pop), .rdata(of_rdata),
    .full(of_full), .empty(of_empty), .count(of_count)
  );

  aer_out_fsm u_out (
    .clk, .rst_n, .enable(cfg.out_en), .presc(cfg.out_presc),
    .fifo_rdata(of_rdata), .fifo_empty(of_empty), .fifo_pop(of_pop),
    .aer_addr(out_aer_addr), .aer_req(out_aer_req), .aer_ack(out_aer_ack),
    .busy(out_busy), .sent(out_sent), .late(out_late), .wait_done(out_wait_done)
  );

  aer_in_fsm u_in (
    .clk, .rst_n, .enable(cfg.in_en), .presc(cfg.in_presc),
    .aer_addr(in_aer_addr), .aer_req(in_aer_req), .aer_ack(in_aer_ack),
    .fifo_wdata(if_wdata), .fifo_push(if_push), .fifo_full(if_full),
    .stalled(in_stalled), .overflow(in_overflow)
  );

  aer_fifo #(.WIDTH(EVW), .DEPTH(IFIFO_DEPTH)) u_ififo (
    .clk, .rst_n,
    .push(if_push), .wdata(if_wdata), .pop(if_pop), .rdata(if_rdata),
    .full(if_full), .empty(if_empty), .count(if_count)
  );

  assign status_flags = {1'b0, in_stalled, dma_busy, out_busy,
                         if_full, if_empty, of_full, of_empty};

  always_comb begin
    irq_src               = '0;
    irq_src[IRQ_DMA_DONE] = dma_done;
    irq_src[IRQ_OF_EMPTY] = of_empty && cfg.out_en;
    irq_src[IRQ_IF_HALF]  = (if_count >= ILW'(IFIFO_DEPTH / 2));
    irq_src[IRQ_IF_FULL]  = if_full;
  end

  pci_aer_irq u_irq (
    .clk, .rst_n, .src(irq_src),
    .reg_wr(int_wr), .reg_wdata(tgt_wdata), .reg_rdata(int_rdata), .irq
  );
endmodule

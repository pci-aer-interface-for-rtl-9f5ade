// Interrupt controller of the PCI-AER interface (IRQ block).
//
// Each source line is watched for a rising edge; an edge sets its pending
// bit. The INTERRUPTION register reads back pending in bits [NIRQ-1:0] and the
// enable mask in bits [8+NIRQ-1:8]. A register write clears every pending bit
// written as one (write-one-to-clear) and loads the enable mask from bits
// [8+NIRQ-1:8]; a new edge in the same cycle wins over the clear. irq is high
// while any enabled bit is pending and is registered, so it changes one cycle
// after the cause. The block and its register are named by the document; the
// sources, the edge capture and the bit layout are this design's choices.
module pci_aer_irq
  import pci_aer_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NIRQ-1:0]  src,
  input  logic             reg_wr,
  input  logic [31:0]      reg_wdata,
  output logic [31:0]      reg_rdata,
  output logic             irq
);
  logic [NIRQ-1:0] src_q, pending, enable, pend_next;

  always_comb begin
    pend_next = pending;
    if (reg_wr) pend_next = pend_next & ~reg_wdata[NIRQ-1:0];
    pend_next = pend_next | (src & ~src_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q   <= '0;
      pending <= '0;
      enable  <= '0;
      irq     <= 1'b0;
    end else begin
      src_q   <= src;
      pending <= pend_next;
      if (reg_wr) enable <= reg_wdata[8 +: NIRQ];
      irq     <= |(pend_next & (reg_wr ? reg_wdata[8 +: NIRQ] : enable));
    end
  end

  always_comb begin
    reg_rdata = '0;
    reg_rdata[NIRQ-1:0]  = pending;
    reg_rdata[8 +: NIRQ] = enable;
  end
endmodule

// Self-checking testbench for pci_aer_irq: random source waveforms and
// register writes, compared cycle by cycle with a reference model of the
// edge capture, write-one-to-clear, enable mask and registered irq output.
module tb_pci_aer_irq;
  import pci_aer_pkg::*;
  logic clk = 0, rst_n = 1;   // pulled low at 1 ns: asynchronous reset before the first edge
  logic [NIRQ-1:0] src = 0;
  logic reg_wr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic irq;
  int checks = 0, failures = 0, irqs = 0;
  logic [NIRQ-1:0] m_src_q = 0, m_pend = 0, m_en = 0;
  logic m_irq = 0;

  pci_aer_irq dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NIRQ-1:0] np;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 3) == 0) src = NIRQ'($urandom);
      reg_wr    = ($urandom_range(0, 9) == 0);
      reg_wdata = $urandom;
      #1;
      check(reg_rdata[NIRQ-1:0] == m_pend && reg_rdata[8 +: NIRQ] == m_en, "register readback");
      check(irq == m_irq, $sformatf("irq %b expected %b", irq, m_irq));
      if (irq) irqs++;
      // reference model of the next state
      np = m_pend;
      if (reg_wr) np = np & ~reg_wdata[NIRQ-1:0];
      np = np | (src & ~m_src_q);
      @(posedge clk);
      if (reg_wr) m_en = reg_wdata[8 +: NIRQ];
      m_pend = np;
      m_src_q = src;
      m_irq = |(m_pend & m_en);
      #1;
    end
    check(irqs > 100, "interrupt rarely raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

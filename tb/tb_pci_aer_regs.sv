// Self-checking testbench for pci_aer_regs: writes and reads every BAR0
// register, checks the configuration fields, the self-clearing start bit,
// the FIFO-access strobes, the one-cycle start pulse after a write (and their blocking while the bus master runs or
// the FIFO is at its limit), the interrupt-register strobe and the status
// word layout.
module tb_pci_aer_regs;
  import pci_aer_pkg::*;
  logic clk = 0, rst_n = 1;   // pulled low at 1 ns: asynchronous reset before the first edge
  logic tgt_wr = 0, tgt_rd = 0;
  logic [5:0] tgt_addr = 0;
  logic [31:0] tgt_wdata = 0, tgt_rdata;
  config_t cfg;
  logic [31:0] mst_base;
  logic dma_start, of_push, of_full = 0, if_pop, if_empty = 1, int_wr, dma_busy = 0;
  logic [31:0] of_wdata, if_rdata = 32'hCAFE_0042, int_rdata = 32'h0000_0A05;
  logic [15:0] mst_count = 16'd77;
  logic [7:0] status_flags = 8'h5A;
  logic [11:0] of_level = 12'd300, if_level = 12'd9;
  int checks = 0, failures = 0;

  pci_aer_regs dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one-cycle write; strobes are sampled in the same cycle
  task automatic wr(input logic [5:0] a, input logic [31:0] d,
                    output bit s_start, output bit s_push, output bit s_int);
    tgt_addr = a; tgt_wdata = d; tgt_wr = 1;
    #1;
    s_push = of_push; s_int = int_wr;
    @(posedge clk); #1;
    tgt_wr = 0;
    s_start = dma_start;   // registered: pulses in the cycle after the write
    @(posedge clk); #1;
    check(!dma_start, "start pulse longer than one cycle");
  endtask

  task automatic rd(input logic [5:0] a, output logic [31:0] d, output bit s_pop);
    tgt_addr = a; tgt_rd = 1;
    #1;
    d = tgt_rdata; s_pop = if_pop;
    @(posedge clk); #1;
    tgt_rd = 0;
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit s0, s1, s2;
    logic [31:0] d;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;

    rd(REG_CONFIG, d, s0);
    check(d == 0, "config reset value");
    wr(REG_MST_ADDR, 32'h1234_5678, s0, s1, s2);
    check(mst_base == 32'h1234_5678, "master address output");
    rd(REG_MST_ADDR, d, s0);
    check(d == 32'h1234_5678, "master address readback");
    rd(REG_MST_COUNT, d, s0);
    check(d == 32'd77, "master count read");

    wr(REG_CONFIG, 32'h0040_0037, s0, s1, s2);   // len 64, dir 1, start, presc out, en both
    check(s0, "start strobe");
    check(cfg.dma_len == 16'd64 && cfg.dma_dir && cfg.out_presc && !cfg.in_presc
          && cfg.in_en && cfg.out_en, "config fields");
    rd(REG_CONFIG, d, s0);
    check(d == 32'h0040_0027, $sformatf("config readback %h (start reads 0)", d));
    dma_busy = 1;
    wr(REG_CONFIG, 32'h0040_0010, s0, s1, s2);
    check(!s0, "start ignored while master busy");
    dma_busy = 0;

    wr(REG_FIFO, 32'hDEAD_BEEF, s0, s1, s2);
    check(s1 && of_wdata == 32'hDEAD_BEEF, "OFIFO push strobe");
    of_full = 1;
    wr(REG_FIFO, 32'h1, s0, s1, s2);
    check(!s1, "push while OFIFO full");
    of_full = 0; dma_busy = 1;
    wr(REG_FIFO, 32'h1, s0, s1, s2);
    check(!s1, "push while master busy");
    dma_busy = 0;

    rd(REG_FIFO, d, s0);
    check(d == 0 && !s0, "read of empty IFIFO");
    if_empty = 0;
    rd(REG_FIFO, d, s0);
    check(d == 32'hCAFE_0042 && s0, "IFIFO pop read");
    dma_busy = 1;
    rd(REG_FIFO, d, s0);
    check(!s0, "pop while master busy");
    dma_busy = 0;

    wr(REG_INT, 32'h0000_0F01, s0, s1, s2);
    check(s2 && !s0 && !s1, "interrupt register strobe only");
    rd(REG_INT, d, s0);
    check(d == 32'h0000_0A05, "interrupt register readback");
    rd(REG_STATUS, d, s0);
    check(d == {12'd9, 12'd300, 8'h5A}, $sformatf("status %h", d));
    rd(6'h18, d, s0);
    check(d == 0, "unmapped offset reads 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

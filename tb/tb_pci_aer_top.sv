// End-to-end testbench for pci_aer_top at its default sizes.
//
// The host-memory model plays the PCI core's master side; target accesses
// are driven directly. The output AER bus is looped back into the input AER
// bus, as in a board self-test, with a programmable extra delay on the
// acknowledge. The test:
//  1. builds a stream of NEV event words in host memory (random short gaps,
//     back-to-back bursts, one wait-only word, a slow-acknowledge region),
//  2. moves it to the OFIFO by bus master while the OUT-AER machine already
//     sends, so the OFIFO runs full and the master waits,
//  3. lets the IFIFO fill until the IN-AER machine stalls the loop, then
//     drains it to host memory with repeated bus-master writes (the last
//     one stopping early on an empty IFIFO),
//  4. compares the captured stream with the sent one: same addresses, and a
//     captured time never earlier than the schedule, equal to it whenever no
//     delay intervened, and equal again at the end (recovery),
//  5. sends a few events by polled FIFO writes with both prescalers on and
//     reads them back by polled FIFO reads.
// It counts each mechanism (OFIFO full, IFIFO half and full, input stall,
// late events, wait-only word out and in, early stop, interrupts,
// prescaled tick, polled access) and fails if one never occurs.
module tb_pci_aer_top;
  import pci_aer_pkg::*;

  localparam int NEV = 900;
  localparam logic [31:0] TXBUF = 32'h0100_0000;
  localparam logic [31:0] RXBUF = 32'h0200_0000;

  logic clk = 0, rst_n = 1;   // pulled low at 1 ns: asynchronous reset before the first edge
  logic tgt_wr = 0, tgt_rd = 0;
  logic [5:0] tgt_addr = 0;
  logic [31:0] tgt_wdata = 0, tgt_rdata;
  logic mst_req, mst_we, mst_ack;
  logic [31:0] mst_addr, mst_wdata, mst_rdata;
  logic irq;
  logic [15:0] out_aer_addr, in_aer_addr;
  logic out_aer_req, out_aer_ack, in_aer_req, in_aer_ack;

  int checks = 0, failures = 0;

  pci_aer_top dut (.*);
  pci_host_model #(.MAX_LAT(2)) host (.clk, .mst_req, .mst_we, .mst_addr, .mst_wdata,
                                      .mst_ack, .mst_rdata);
  always #15 clk = ~clk;

  // loopback with an optional extra acknowledge delay for one event range
  int ev_out = 0, slow_from = 300, slow_to = 304, slow_dly = 250, dly = 0;
  logic req_q = 0, ack_dl = 0;
  assign in_aer_addr = out_aer_addr;
  assign in_aer_req  = out_aer_req;
  assign out_aer_ack = ack_dl;
  always @(posedge clk) begin
    req_q <= out_aer_req;
    if (out_aer_req && !req_q) begin
      ev_out <= ev_out + 1;
      dly    <= (ev_out >= slow_from && ev_out <= slow_to) ? slow_dly : 0;
    end
    if (!in_aer_ack) ack_dl <= 0;
    else if (dly > 0) dly <= dly - 1;
    else ack_dl <= 1;
  end

  // mechanism counters
  int n_of_full = 0, n_if_half = 0, n_if_full = 0, n_stall = 0, n_late = 0;
  int n_wait_out = 0, n_wait_in = 0, n_irq = 0, n_early = 0, n_presc = 0, n_polled = 0;
  logic irq_q = 0;
  always @(posedge clk) begin
    if (dut.of_full && dut.dma_busy) n_of_full++;
    if (dut.if_count >= 256) n_if_half++;
    if (dut.if_full) n_if_full++;
    if (dut.in_stalled) n_stall++;
    if (dut.out_late) n_late++;
    if (dut.out_wait_done) n_wait_out++;
    if (dut.in_overflow) n_wait_in++;
    irq_q <= irq;
    if (irq && !irq_q) n_irq++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic reg_wr(input logic [5:0] a, input logic [31:0] d);
    @(posedge clk); #1;
    tgt_addr = a; tgt_wdata = d; tgt_wr = 1;
    @(posedge clk); #1;
    tgt_wr = 0;
  endtask

  task automatic reg_rd(input logic [5:0] a, output logic [31:0] d);
    @(posedge clk); #1;
    tgt_addr = a; tgt_rd = 1;
    #1 d = tgt_rdata;
    @(posedge clk); #1;
    tgt_rd = 0;
  endtask

  // bus-master transfer, finished when the done interrupt arrives
  task automatic dma(input logic dir, input int n, input logic [31:0] buf_addr,
                     input logic [3:0] en, output int moved);
    logic [31:0] d;
    int t = 0;
    reg_wr(REG_MST_ADDR, buf_addr);
    reg_wr(REG_CONFIG, {16'(n), 10'h0, dir, 1'b1, 2'b00, en[1:0]});
    while (!irq && t < 200000) begin @(posedge clk); t++; end
    check(irq, "no interrupt at end of bus-master transfer");
    reg_rd(REG_INT, d);
    check(d[IRQ_DMA_DONE], "done not pending");
    reg_wr(REG_INT, 32'h0000_0100 | 32'(1 << IRQ_DMA_DONE)); // clear, keep done enabled
    reg_rd(REG_MST_COUNT, d);
    moved = int'(d[15:0]);
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] tx[$], rx[$], d;
    int moved, total, tries;
    longint s_acc, r_acc, n_eq, n_gt;
    logic [31:0] ev_tx[$], ev_rx[$];
    longint s_t[$], r_t[$];

    // 1. stream in host memory
    for (int i = 0; i < NEV; i++) begin
      logic [15:0] dt;
      if (i >= NEV - 150)            dt = 16'(40 + $urandom_range(0, 40));  // calm tail
      else if (i % 50 < 6)           dt = 0;                                // bursts
      else                           dt = 16'(20 + $urandom_range(0, 30));
      tx.push_back({dt, 16'($urandom_range(0, 16'hFFFE))});
      if (i == 120) tx.push_back(WAIT_WORD);
    end
    foreach (tx[i]) host.mem[TXBUF + 4 * i] = tx[i];

    #1 rst_n = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    reg_wr(REG_INT, 32'h0000_0100);              // enable the done interrupt only
    reg_wr(REG_CONFIG, 32'h0000_0003);           // both state machines on

    // 2. host -> OFIFO while sending
    dma(0, tx.size(), TXBUF, 4'b0011, moved);
    check(moved == tx.size(), $sformatf("bus master moved %0d of %0d", moved, tx.size()));

    // 3. let the IFIFO fill up and stall the loop, seen through its interrupt
    reg_wr(REG_INT, 32'(1 << (8 + IRQ_IF_FULL)));
    tries = 0;
    while (!irq && tries < 500000) begin @(posedge clk); tries++; end
    reg_rd(REG_INT, d);
    check(irq && d[IRQ_IF_FULL], "no IFIFO-full interrupt");
    repeat (100) @(posedge clk);
    reg_rd(REG_STATUS, d);
    check(d[3] && d[6], $sformatf("status %h: IFIFO full and input stalled expected", d));
    reg_wr(REG_INT, 32'h0000_0100 | 32'hF);      // clear all, done interrupt only

    // drain the IFIFO until everything has come back
    total = 0; tries = 0;
    while (total < tx.size() && tries < 200) begin
      dma(1, 1024, RXBUF + 4 * total, 4'b0011, moved);
      if (moved < 1024) n_early++;
      for (int i = 0; i < moved; i++) rx.push_back(host.mem[RXBUF + 4 * (total + i)]);
      total += moved;
      tries++;
      repeat (200) @(posedge clk);
    end
    check(rx.size() == tx.size(), $sformatf("captured %0d words, sent %0d", rx.size(), tx.size()));

    // 4. compare: split into events with cumulative times from the first event
    s_acc = 0; r_acc = 0;
    foreach (tx[i]) begin
      if (ev_tx.size() > 0) s_acc += longint'(tx[i][31:16]);
      if (tx[i] != WAIT_WORD) begin ev_tx.push_back(tx[i]); s_t.push_back(s_acc); end
    end
    foreach (rx[i]) begin
      if (ev_rx.size() > 0) r_acc += longint'(rx[i][31:16]);
      if (rx[i] != WAIT_WORD) begin ev_rx.push_back(rx[i]); r_t.push_back(r_acc); end
    end
    check(ev_rx.size() == ev_tx.size(), "event count");
    n_eq = 0; n_gt = 0;
    for (int k = 0; k < ev_tx.size() && k < ev_rx.size(); k++) begin
      check(ev_rx[k][15:0] == ev_tx[k][15:0], $sformatf("event %0d address %h sent %h",
                                                       k, ev_rx[k][15:0], ev_tx[k][15:0]));
      check(r_t[k] >= s_t[k], $sformatf("event %0d captured at %0d before its time %0d", k, r_t[k], s_t[k]));
      if (r_t[k] == s_t[k]) n_eq++; else n_gt++;
    end
    check(n_gt > 0, "no event was delayed");
    check(n_eq > longint'(ev_tx.size()) / 64'd4, $sformatf("only %0d events on schedule", n_eq));
    check(r_t[r_t.size() - 1] == s_t[s_t.size() - 1], "schedule not recovered by the end");

    // 5. polled FIFO access with both prescalers on
    reg_wr(REG_CONFIG, 32'h0000_0002);           // OUT-AER off: drops any time debt
    reg_wr(REG_CONFIG, 32'h0000_000F);
    for (int i = 0; i < 4; i++) begin
      reg_wr(REG_FIFO, {16'd10, 16'(16'h7700 + i)});
      n_polled++;
    end
    repeat (1500) @(posedge clk);
    reg_rd(REG_STATUS, d);
    check(d[31:20] == 12'd4, $sformatf("IFIFO holds %0d words after polled sends", d[31:20]));
    for (int i = 0; i < 4; i++) begin
      reg_rd(REG_FIFO, d);
      check(d[15:0] == 16'(16'h7700 + i), $sformatf("polled read %h", d));
      if (i > 0) begin
        check(d[31:16] >= 9 && d[31:16] <= 11, $sformatf("prescaled dt %0d", d[31:16]));
        n_presc++;
      end
    end
    reg_rd(REG_STATUS, d);
    check(d[2] && d[0], "both FIFOs empty at the end");

    $display("mechanisms: ofifo_full=%0d ififo_half=%0d ififo_full=%0d stall=%0d late=%0d",
             n_of_full, n_if_half, n_if_full, n_stall, n_late);
    $display("            wait_out=%0d wait_in=%0d irq=%0d early_stop=%0d presc=%0d polled=%0d",
             n_wait_out, n_wait_in, n_irq, n_early, n_presc, n_polled);
    check(n_of_full > 0, "OFIFO never full during bus-master transfer");
    check(n_if_half > 0, "IFIFO never half full");
    check(n_if_full > 0, "IFIFO never full");
    check(n_stall > 0, "input never stalled");
    check(n_late > 0, "no late event");
    check(n_wait_out == 1, "wait-only word not sent once");
    check(n_wait_in == 1, "wait-only word not captured once");
    check(n_irq > 2, "interrupts");
    check(n_early > 0, "no early stop");
    check(n_presc > 0, "prescaler not exercised");
    check(n_polled > 0, "polled access not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

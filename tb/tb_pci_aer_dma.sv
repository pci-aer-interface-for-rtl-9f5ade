// Self-checking testbench for pci_aer_dma with the host-memory model.
// Host to OFIFO: 100 words land in order in a 16-word OFIFO model drained at
// random, from consecutive word addresses, with the count and done pulse
// right. A run takes two cycles per word plus the host's latency.
// IFIFO to host: a 50-word request with 30 words available stops early
// with count 30 and the words in host memory. A zero-length start ends at once.
module tb_pci_aer_dma;
  logic clk = 0, rst_n = 1;   // pulled low at 1 ns: asynchronous reset before the first edge
  logic start = 0, dir = 0;
  logic [15:0] len = 0, count;
  logic [31:0] base = 0;
  logic mst_req, mst_we, mst_ack;
  logic [31:0] mst_addr, mst_wdata, mst_rdata;
  logic of_push, of_full, if_pop, if_empty, busy, done;
  logic [31:0] of_wdata, if_rdata;
  int checks = 0, failures = 0, dones = 0;
  logic [31:0] ofq[$], ifq[$], got[$];
  bit drain = 0;
  int max_lat = 3;

  pci_aer_dma dut (.*);
  pci_host_model #(.MAX_LAT(3)) host (.clk, .mst_req, .mst_we, .mst_addr, .mst_wdata,
                                      .mst_ack, .mst_rdata);
  always #5 clk = ~clk;

  always_comb begin
    of_full  = (ofq.size() >= 16);
    if_empty = (ifq.size() == 0);
    if_rdata = if_empty ? 32'h0 : ifq[0];
  end
  always @(posedge clk) begin
    if (of_push) ofq.push_back(of_wdata);
    if (if_pop) void'(ifq.pop_front());
    if (drain && ofq.size() > 0 && $urandom_range(0, 2) == 0) got.push_back(ofq.pop_front());
    if (done) dones++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic go(input logic d, input logic [15:0] n, input logic [31:0] b);
    @(posedge clk);
    dir <= d; len <= n; base <= b; start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 100; i++) host.mem[32'h0010_0000 + 4 * i] = 32'hA000_0000 + i * 7;

    // host memory -> OFIFO, with back-pressure
    drain = 1;
    go(0, 100, 32'h0010_0000);
    repeat (200) @(posedge clk);
    check(got.size() == 100, $sformatf("OFIFO received %0d words", got.size()));
    foreach (got[i]) check(got[i] == 32'hA000_0000 + i * 7, $sformatf("word %0d = %h", i, got[i]));
    check(count == 100 && dones == 1, $sformatf("count %0d done %0d", count, dones));
    check(host.reads == 100, "one read per word");

    // IFIFO -> host memory, early stop when IFIFO runs dry
    for (int i = 0; i < 30; i++) ifq.push_back(32'h5500_0000 + i);
    go(1, 50, 32'h0020_0000);
    check(count == 30 && dones == 2, $sformatf("early stop count %0d", count));
    for (int i = 0; i < 30; i++)
      check(host.mem.exists(32'h0020_0000 + 4 * i) && host.mem[32'h0020_0000 + 4 * i] == 32'h5500_0000 + i,
            $sformatf("host word %0d", i));
    check(!host.mem.exists(32'h0020_0000 + 4 * 30), "wrote past the available words");

    // zero length
    go(0, 0, 32'h0);
    check(count == 0 && dones == 3, "zero-length transfer");

    // throughput without back-pressure (IFIFO -> host)
    host.writes = 0;
    for (int i = 0; i < 40; i++) ifq.push_back(i);
    t0 = 0;
    fork
      go(1, 40, 32'h0030_0000);
      forever begin @(posedge clk); t0++; end
    join_any
    disable fork;
    check(host.writes == 40, "throughput run incomplete");
    // latency random 0..3: between 2 and 6 cycles per word
    check(t0 >= 2 * 40 && t0 <= 6 * 40 + 8, $sformatf("40 words in %0d cycles", t0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

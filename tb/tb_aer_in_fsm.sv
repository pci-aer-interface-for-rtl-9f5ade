// Self-checking testbench for aer_in_fsm.
//
// A sender process raises each request at a planned clock cycle and runs the
// four-phase handshake; a queue stands in for the IFIFO and can be forced
// full. Since the receiver takes every request with the same latency, the
// stored time difference must equal the distance between the planned
// request cycles (or that distance divided by 16, to within one tick, with
// the prescaler). Also checked: stored addresses, the wait-only word after
// 65535 idle ticks, and that a full IFIFO holds the acknowledge back and
// raises stalled.
module tb_aer_in_fsm;
  import pci_aer_pkg::*;

  logic clk = 0, rst_n = 1;   // pulled low at 1 ns: asynchronous reset before the first edge
  logic enable = 0, presc = 0;
  logic [15:0] aer_addr = 0;
  logic aer_req = 0, aer_ack;
  logic [31:0] fifo_wdata;
  logic fifo_push, fifo_full = 0;
  logic stalled, overflow;

  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [31:0] q[$];
  int stall_cycles = 0, ovf_pulses = 0;

  aer_in_fsm dut (.*);

  always #15 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fifo_push) q.push_back(fifo_wdata);
    if (stalled) stall_cycles++;
    if (overflow) ovf_pulses++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // send one event whose request rises at cycle 'at' (or at once if past)
  task automatic send(input longint at, input logic [15:0] a, output longint rose);
    while (cyc < at) @(posedge clk);
    aer_addr <= a;
    aer_req  <= 1;
    rose = cyc;
    @(posedge clk);
    while (!aer_ack) @(posedge clk);
    aer_req <= 0;
    @(posedge clk);
    while (aer_ack) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint rose, prev, gap;
    logic [15:0] a;
    logic [31:0] w;
    #1 rst_n = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);
    enable <= 1;

    // 1: random gaps, no prescaler
    send(cyc + 10, 16'h0001, prev);
    void'(q.pop_front());
    for (int i = 0; i < 40; i++) begin
      gap = 12 + longint'($urandom_range(0, 300));
      a = 16'($urandom);
      send(prev + gap, a, rose);
      check(q.size() == 1, "one word per event");
      w = q.pop_front();
      check(w[15:0] == a, $sformatf("address %h expected %h", w[15:0], a));
      check(w[31:16] == 16'(rose - prev), $sformatf("dt %0d expected %0d", w[31:16], rose - prev));
      prev = rose;
    end

    // 2: a pause longer than the 16-bit field: one wait-only word first
    gap = 65535 + 777;
    send(prev + gap, 16'hBEEF, rose);
    check(q.size() == 2, $sformatf("long pause stored %0d words", q.size()));
    if (q.size() == 2) begin
      check(q[0] == WAIT_WORD, "wait-only word missing");
      check(q[1] == {16'(gap - 65535), 16'hBEEF}, $sformatf("after pause got %h", q[1]));
    end
    check(ovf_pulses == 1, "overflow pulse count");
    q.delete();
    prev = rose;

    // 3: IFIFO full holds the acknowledge back
    fork
      send(prev + 50, 16'h1234, rose);
      begin
        while (cyc < prev + 48) @(posedge clk);
        fifo_full <= 1;
        repeat (100) @(posedge clk);
        check(aer_ack == 0, "acknowledged while IFIFO full");
        check(stalled == 1, "stalled not raised");
        check(q.size() == 0, "pushed while IFIFO full");
        fifo_full <= 0;
      end
    join
    check(stall_cycles > 90, $sformatf("stalled for %0d cycles", stall_cycles));
    check(q.size() == 1 && q[0][15:0] == 16'h1234, "event lost after stall");
    check(q.size() == 1 && q[0][31:16] >= 16'd140, "stall time missing from dt");
    q.delete();
    send(cyc + 30, 16'h0002, prev);
    q.delete();

    // 4: prescaler on
    presc <= 1;
    send(cyc + 40, 16'h0003, prev);
    q.delete();
    for (int i = 0; i < 10; i++) begin
      gap = 100 + longint'($urandom_range(0, 2000));
      send(prev + gap, 16'(16'h4000 + i), rose);
      w = q.pop_front();
      check(w[15:0] == 16'(16'h4000 + i), "prescaled address");
      check(int'(w[31:16]) >= int'(gap / 16) && int'(w[31:16]) <= int'(gap / 16) + 1,
            $sformatf("prescaled dt %0d for %0d cycles", w[31:16], gap));
      prev = rose;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

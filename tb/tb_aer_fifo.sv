// Self-checking testbench for aer_fifo: random pushes and pops compared with
// a queue reference model, including filling to full and draining to empty,
// simultaneous push and pop, and the ignored push-while-full and
// pop-while-empty cases. Runs with a small depth to reach the limits often.
module tb_aer_fifo;
  localparam int W = 32, D = 16;
  logic clk = 0, rst_n = 1;   // pulled low at 1 ns: asynchronous reset before the first edge
  logic push = 0, pop = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic full, empty;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [W-1:0] model[$];

  aer_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    int bias;
    bit was_full;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 4000; i++) begin
      bias = ((i / 500) % 2 != 0) ? 30 : 70;   // alternate filling and draining phases
      push  = ($urandom_range(0, 99) < bias);
      pop   = ($urandom_range(0, 99) < 100 - bias);
      if (i % 700 == 0) push = 1;        // sometimes push while full
      if (model.size() == 0) pop = pop && (i % 50 == 0); // rarely pop while empty
      wdata = $urandom;
      #1;
      check(int'(count) == model.size(), $sformatf("count %0d model %0d", count, model.size()));
      check(full == (model.size() == D), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(rdata == model[0], $sformatf("head %h expected %h", rdata, model[0]));
      if (full) fulls++;
      if (empty) empties++;
      was_full = (model.size() == D);
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push && !was_full) model.push_back(wdata);
      #1;
    end
    check(fulls > 0 && empties > 0, $sformatf("limits reached: full %0d empty %0d", fulls, empties));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for aer_out_fsm.
//
// A queue stands in for the OFIFO and a receiver process answers the AER
// handshake with a programmable acknowledge delay. The testbench keeps its
// own absolute schedule: event k is due at T_k = T_0 + sum of the time
// differences of all words after the first (wait-only words count 65535).
// Each event must leave exactly at T_k, or, if it could not, later than T_k
// and at the earliest moment the handshake allows (MINLAT cycles after the
// previous acknowledge fell). It also checks the address sequence, that the
// wait-only word sends nothing, the late pulse, recovery after a long
// acknowledge delay, and the x16 prescaled tick.
module tb_aer_out_fsm;
  import pci_aer_pkg::*;

  localparam int MINLAT = 6;    // sampled req rise after sampled ack fall

  logic clk = 0, rst_n = 1;   // pulled low at 1 ns: asynchronous reset before the first edge
  logic enable = 0, presc = 0;
  logic [31:0] fifo_rdata;
  logic fifo_empty, fifo_pop;
  logic [15:0] aer_addr;
  logic aer_req, aer_ack = 0;
  logic busy, sent, late, wait_done;

  int checks = 0, failures = 0;
  longint cyc = 0;

  aer_out_fsm dut (.*);

  always #15 clk = ~clk;

  // OFIFO model
  logic [31:0] q[$];
  always_comb begin
    fifo_empty = (q.size() == 0);
    fifo_rdata = fifo_empty ? 32'h0 : q[0];
  end

  // receiver: records request rises, answers after ack_dly[k] cycles
  int     ack_dly[$];
  longint rise_t[$], ackfall_t[$];
  logic [15:0] got_addr[$];
  int     late_pulses = 0, waits_seen = 0, ack_cnt = 0;
  logic   req_q = 0;
  int     wcnt = 0;
  logic   waiting = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fifo_pop) void'(q.pop_front());
    if (late) late_pulses++;
    if (wait_done) waits_seen++;
    req_q <= aer_req;
    if (aer_req && !req_q) begin
      rise_t.push_back(cyc);
      got_addr.push_back(aer_addr);
      waiting <= 1;
      wcnt    <= (ack_cnt < ack_dly.size()) ? ack_dly[ack_cnt] : 0;
    end
    if (waiting) begin
      if (wcnt == 0) begin
        aer_ack <= 1;
        waiting <= 0;
        ack_cnt++;
      end else wcnt <= wcnt - 1;
    end
    if (aer_ack && !aer_req) begin
      aer_ack <= 0;
      ackfall_t.push_back(cyc);
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Runs one sequence. words: the OFIFO content; for each word that is not
  // wait-only the address is expected in order, and its schedule is checked.
  task automatic run_seq(input logic [31:0] words[$], input bit pre,
                         output int n_late, output int n_ontime);
    longint sched[$];
    logic [15:0] exp_addr[$];
    longint acc = 0;
    bit first = 1;
    int base_ev = rise_t.size();
    int base_fall = ackfall_t.size();
    int tmo;
    n_late = 0; n_ontime = 0;
    foreach (words[i]) begin
      if (!first) acc += longint'(words[i][31:16]);
      if (words[i] != WAIT_WORD) begin
        sched.push_back(acc);
        exp_addr.push_back(words[i][15:0]);
        first = 0;
      end
    end
    presc = pre;
    foreach (words[i]) q.push_back(words[i]);
    @(posedge clk); enable <= 1;
    tmo = 0;
    while ((rise_t.size() - base_ev < exp_addr.size() || busy || q.size() != 0) && tmo < 4000000) begin
      @(posedge clk); tmo++;
    end
    repeat (20) @(posedge clk);
    enable <= 0;
    @(posedge clk);
    check(rise_t.size() - base_ev == exp_addr.size(),
          $sformatf("event count %0d expected %0d", rise_t.size() - base_ev, exp_addr.size()));
    for (int k = 0; k < exp_addr.size() && base_ev + k < rise_t.size(); k++) begin
      longint a = rise_t[base_ev + k] - rise_t[base_ev];
      check(got_addr[base_ev + k] == exp_addr[k],
            $sformatf("event %0d address %h expected %h", k, got_addr[base_ev + k], exp_addr[k]));
      if (k == 0) continue;
      if (!pre) begin
        if (a == sched[k]) n_ontime++;
        else begin
          longint fall = ackfall_t[base_fall + k - 1];
          n_late++;
          check(a > sched[k], $sformatf("event %0d early: at %0d due %0d", k, a, sched[k]));
          check(rise_t[base_ev + k] - fall == longint'(MINLAT),
                $sformatf("late event %0d not sent at once: %0d cycles after ack fell",
                          k, rise_t[base_ev + k] - fall));
        end
        checks++;
      end else begin
        longint d = a - 16 * sched[k];
        check(d > -16 && d < 16,
              $sformatf("prescaled event %0d at %0d, due %0d", k, a, 16 * sched[k]));
        n_ontime++;
      end
    end
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w[$];
    int nl, no, lp0;
    int tot_late;
    #1 rst_n = 0;
    tot_late = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);

    // 1: relaxed timing, prompt acknowledges: every event exactly on time
    w = {};
    for (int i = 0; i < 40; i++) begin
      w.push_back({16'(20 + $urandom_range(0, 180)), 16'($urandom)});
      ack_dly.push_back($urandom_range(0, 3));
    end
    lp0 = late_pulses;
    run_seq(w, 0, nl, no);
    check(nl == 0 && no == 39, $sformatf("relaxed run: %0d late, %0d on time", nl, no));
    check(late_pulses == lp0, "late pulse without a late event");

    // 2: one very slow acknowledge, then short gaps: late, then recovered
    w = {};
    for (int i = 0; i < 50; i++) begin
      w.push_back({16'(i == 0 ? 5 : 30), 16'(16'h1000 + i)});
      ack_dly.push_back(i == 5 ? 400 : 1);
    end
    lp0 = late_pulses;
    run_seq(w, 0, nl, no);
    check(nl >= 5, $sformatf("slow acknowledge produced only %0d late events", nl));
    check(no >= 10, $sformatf("schedule not recovered: %0d on time", no));
    check(late_pulses - lp0 == nl, $sformatf("late pulses %0d, late events %0d", late_pulses - lp0, nl));
    tot_late += nl;

    // 3: zero time differences (back-to-back) mixed with waits, and a wait-only word
    w = {};
    for (int i = 0; i < 12; i++) begin
      w.push_back({16'((i % 3 == 0) ? 100 : 0), 16'(16'h2000 + i)});
      ack_dly.push_back($urandom_range(0, 8));
      if (i == 8) w.push_back(WAIT_WORD);  // next word waits 100: on time
    end
    lp0 = waits_seen;
    run_seq(w, 0, nl, no);
    check(waits_seen - lp0 == 1, "wait-only word not consumed exactly once");
    check(nl > 0, "back-to-back events never ran late");
    tot_late += nl;

    // 4: prescaled tick
    w = {};
    for (int i = 0; i < 10; i++) begin
      w.push_back({16'(5 + $urandom_range(0, 15)), 16'(16'h3000 + i)});
      ack_dly.push_back(1);
    end
    run_seq(w, 1, nl, no);
    check(no == 9, "prescaled run incomplete");

    $display("late events seen: %0d", tot_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

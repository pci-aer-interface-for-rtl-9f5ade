// Workload testbench: loop-back playback of synthetic AER streams at rising
// event load, after the board self-test of the published design.
//
// The output AER bus is looped into the input bus. For each of nine 8x8
// test images, whose grey levels follow a Gaussian histogram with a mean
// rising from image to image, and for each of four ways to turn an image
// into events (scan, uniform, random, exhaustive), the testbench builds
// one frame of events in host memory, plays it through the design at its
// default sizes and captures it again. Words are moved in chunks by
// alternating bus-master transfers, host to OFIFO and IFIFO to host, so
// neither FIFO limits the run. The frame length is fixed, so the event load
// grows with the image. Load is measured against MIN_PERIOD, the shortest
// event period of the loop (14 clock cycles).
//
// Per run it checks that every event comes back with its address, in order,
// and never earlier than its schedule. It reports the mean absolute
// difference between sent and captured inter-spike intervals. It also
// checks that this error does not shrink from the lightest to the heaviest
// image.
//
// The four generation methods are not defined here beyond their names. The
// versions below are simple readings:
//  - scan: G passes; in pass k every pixel brighter than k fires, in raster
//    order;
//  - uniform: a pixel with n events fires at (j+1/2)F/n;
//  - random: every event gets a uniform random time in the frame;
//  - exhaustive: N slices; in slice k pixel p fires if floor((k+1)n/N) >
//    floor(kn/N), in raster order.
module tb_pci_aer_loopback_tis;
  import pci_aer_pkg::*;

  localparam int NPIX = 64, GMAX = 32, NIMG = 9, NMETH = 4;
  localparam int MIN_PERIOD = 14;
  localparam longint LGMAX = longint'(GMAX), LNPIX = longint'(NPIX);
  localparam logic [31:0] TXBUF = 32'h0100_0000;
  localparam logic [31:0] RXBUF = 32'h0400_0000;

  logic clk = 0, rst_n = 1;   // pulled low at 1 ns: asynchronous reset before the first edge
  logic tgt_wr = 0, tgt_rd = 0;
  logic [5:0] tgt_addr = 0;
  logic [31:0] tgt_wdata = 0, tgt_rdata;
  logic mst_req, mst_we, mst_ack;
  logic [31:0] mst_addr, mst_wdata, mst_rdata;
  logic irq;
  logic [15:0] out_aer_addr, in_aer_addr;
  logic out_aer_req, out_aer_ack, in_aer_req, in_aer_ack;

  int checks = 0, failures = 0, n_late = 0;
  longint frame;

  pci_aer_top dut (.*);
  pci_host_model #(.MAX_LAT(1)) host (.clk, .mst_req, .mst_we, .mst_addr, .mst_wdata,
                                      .mst_ack, .mst_rdata);
  always #15 clk = ~clk;

  assign in_aer_addr = out_aer_addr;
  assign in_aer_req  = out_aer_req;
  assign out_aer_ack = in_aer_ack;

  always @(posedge clk) if (dut.out_late) n_late++;

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

  task automatic dma(input logic dir, input int n, input logic [31:0] buf_addr, output int moved);
    logic [31:0] d;
    int t = 0;
    reg_wr(REG_MST_ADDR, buf_addr);
    reg_wr(REG_CONFIG, {16'(n), 10'h0, dir, 1'b1, 4'b0011});
    while (!irq && t < 100000) begin @(posedge clk); t++; end
    check(irq, "no end-of-transfer interrupt");
    reg_wr(REG_INT, 32'h0000_0101);
    reg_rd(REG_MST_COUNT, d);
    moved = int'(d[15:0]);
  endtask

  // grey levels of image i: Gaussian (sum of four uniforms) around a rising mean
  task automatic make_image(input int i, output int g[NPIX]);
    int mean = (GMAX * (i + 1)) / (NIMG + 1);
    for (int p = 0; p < NPIX; p++) begin
      int s = 0;
      for (int u = 0; u < 4; u++) s += $urandom_range(0, GMAX / 2);
      s = mean + (s - GMAX) / 2;
      g[p] = (s < 0) ? 0 : (s > GMAX) ? GMAX : s;
    end
  endtask

  // event times (in cycles) and addresses of one frame, sorted by time
  task automatic make_events(input int m, input int g[NPIX], output longint t[$], output int a[$]);
    longint tt[$];
    int aa[$], idx[$], e;
    t = {}; a = {};
    case (m)
      0: begin // scan
        for (int k = 0; k < GMAX; k++) begin
          int em[$];
          em = {};
          for (int p = 0; p < NPIX; p++) if (g[p] > k) em.push_back(p);
          foreach (em[j]) begin
            tt.push_back((frame * k) / LGMAX + (frame * j) / (LGMAX * longint'(em.size())));
            aa.push_back(em[j]);
          end
        end
      end
      1: begin // uniform
        for (int p = 0; p < NPIX; p++)
          for (int j = 0; j < g[p]; j++) begin
            tt.push_back((frame * (2 * j + 1)) / (2 * g[p]));
            aa.push_back(p);
          end
      end
      2: begin // random
        for (int p = 0; p < NPIX; p++)
          for (int j = 0; j < g[p]; j++) begin
            tt.push_back(longint'($urandom_range(0, 32'(frame - 1))));
            aa.push_back(p);
          end
      end
      default: begin // exhaustive
        for (int k = 0; k < NPIX; k++)
          for (int p = 0; p < NPIX; p++)
            if (((k + 1) * g[p]) / NPIX > (k * g[p]) / NPIX) begin
              tt.push_back((frame * k) / LNPIX + (frame * p) / (LNPIX * LNPIX));
              aa.push_back(p);
            end
      end
    endcase
    // stable sort by time
    e = tt.size();
    for (int i = 0; i < e; i++) idx.push_back(i);
    idx.sort() with (tt[item] * 4096 + longint'(item));
    foreach (idx[i]) begin
      t.push_back(tt[idx[i]]);
      a.push_back(aa[idx[i]]);
    end
  endtask

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g[NPIX];
    int imgs[NIMG][NPIX];
    longint t[$];
    int a[$];
    real err[NMETH][NIMG];
    real load[NIMG];
    string mname[NMETH];
    mname[0] = "scan"; mname[1] = "uniform"; mname[2] = "random"; mname[3] = "exhaustive";

    // frame sized so that the brightest image loads the loop to about 90 %
    for (int i = 0; i < NIMG; i++) make_image(i, imgs[i]);
    begin
      int emax;
      emax = 0;
      foreach (imgs[NIMG-1][p]) emax += imgs[NIMG-1][p];
      frame = (longint'(emax) * MIN_PERIOD * 10) / 9;
    end

    #1 rst_n = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    reg_wr(REG_INT, 32'h0000_0100);

    for (int m = 0; m < NMETH; m++) begin
      for (int i = 0; i < NIMG; i++) begin
        logic [31:0] d;
        longint prev, s_acc, r_acc, s_prev, r_prev, err_sum;
        int sent, got, moved, n;
        logic [31:0] rx[$];
        g = imgs[i];
        make_events(m, g, t, a);
        n = t.size();
        load[i] = real'(n) * MIN_PERIOD / real'(frame);
        prev = 0;
        for (int k = 0; k < n; k++) begin
          host.mem[TXBUF + 4 * k] = {16'(k == 0 ? 0 : t[k] - prev), 16'(a[k])};
          prev = t[k];
        end
        // fresh start for each run: OUT-AER off clears any leftover debt
        reg_wr(REG_CONFIG, 32'h0000_0002);
        reg_wr(REG_CONFIG, 32'h0000_0003);
        sent = 0; got = 0; rx = {};
        while (got < n) begin
          reg_rd(REG_STATUS, d);
          if (sent < n && d[19:8] <= 12'd256) begin
            dma(0, (n - sent < 256) ? n - sent : 256, TXBUF + 4 * sent, moved);
            sent += moved;
          end
          reg_rd(REG_STATUS, d);
          if (!d[2]) begin
            dma(1, 1024, RXBUF, moved);
            for (int k = 0; k < moved; k++) rx.push_back(host.mem[RXBUF + 4 * k]);
            got += moved;
          end
          repeat (20) @(posedge clk);
        end
        check(rx.size() == n, $sformatf("%s image %0d: %0d of %0d events back", mname[m], i, rx.size(), n));
        s_acc = 0; r_acc = 0; s_prev = 0; r_prev = 0; err_sum = 0;
        for (int k = 0; k < n && k < rx.size(); k++) begin
          if (k > 0) begin
            s_acc = t[k] - t[0];
            r_acc += longint'(rx[k][31:16]);
            err_sum += ((r_acc - r_prev) > (s_acc - s_prev)) ? (r_acc - r_prev) - (s_acc - s_prev)
                                                               : (s_acc - s_prev) - (r_acc - r_prev);
          end
          check(rx[k][15:0] == 16'(a[k]), $sformatf("%s image %0d event %0d address", mname[m], i, k));
          check(r_acc >= s_acc, $sformatf("%s image %0d event %0d early", mname[m], i, k));
          s_prev = s_acc; r_prev = r_acc;
        end
        err[m][i] = (n > 1) ? real'(err_sum) / real'(n - 1) : 0.0;
      end
      check(err[m][NIMG-1] >= err[m][0],
            $sformatf("%s: ISI error at the heaviest load below the lightest", mname[m]));
    end

    $display("mean |ISI sent - ISI captured| in ns (30 ns clock), by image load:");
    $write("%-11s", "load %");
    for (int i = 0; i < NIMG; i++) $write("%7.0f", 100.0 * load[i]);
    $display("");
    for (int m = 0; m < NMETH; m++) begin
      $write("%-11s", mname[m]);
      for (int i = 0; i < NIMG; i++) $write("%7.1f", 30.0 * err[m][i]);
      $display("");
    end
    check(n_late > 0, "no event was ever late");
    $display("late events: %0d", n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cdma_noc: the eight-node network end to end. Every node queues packets
// for the nodes of a random permutation (two frames' worth at a time, so the
// transmit buffers hold two packets); every frame must deliver each packet
// to its destination unflagged, PKT_W*L + 2 cycles after frame_start. A
// frame_start during a frame must be ignored.
// A second network with RESERVE_ZERO = 1 (seven nodes on the non-zero
// codewords) runs frames in which only a random subset of nodes sends:
// targeted receivers must get their packet, all others a clean "no data"
// indication, node 0 included.
module tb_cdma_noc;
  localparam int N = 8, L = 8, AW = 3, PW = 38;
  logic clk = 0, rst_n = 0;
  logic          tx_valid [N], tx_ready [N], rx_valid [N], rx_nodata [N], rx_err [N];
  logic [PW-1:0] tx_pkt [N], rx_pkt [N];
  logic frame_start, busy;
  int checks = 0, failures = 0, n_pkts = 0;
  longint cycle = 0;

  cdma_noc #(.N(N), .L(L), .ADDR_W(AW), .PKT_W(PW), .FIFO_DEPTH(2)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PW-1:0] expect_q [N][$];

  // second network: zero codeword reserved for "no data"
  localparam int N2 = 7;
  logic          tx2_valid [N2], tx2_ready [N2], rx2_valid [N2], rx2_nodata [N2], rx2_err [N2];
  logic [PW-1:0] tx2_pkt [N2], rx2_pkt [N2];
  logic          frame2_start, busy2;
  logic [PW-1:0] exp2 [N2];
  bit            has2 [N2];
  int            n2_pkts = 0, n2_nodata = 0;

  cdma_noc #(.N(N2), .L(L), .ADDR_W(AW), .PKT_W(PW), .FIFO_DEPTH(2), .RESERVE_ZERO(1'b1)) dut2 (
    .clk, .rst_n,
    .tx_valid(tx2_valid), .tx_pkt(tx2_pkt), .tx_ready(tx2_ready),
    .frame_start(frame2_start), .busy(busy2),
    .rx_valid(rx2_valid), .rx_pkt(rx2_pkt), .rx_nodata(rx2_nodata), .rx_err(rx2_err));

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N2; n++) if (rx2_valid[n]) begin
      checks++;
      if (has2[n]) begin
        n2_pkts++;
        if (rx2_pkt[n] != exp2[n] || rx2_nodata[n] || rx2_err[n]) begin
          failures++;
          $display("FAIL: reserved-zero node %0d got %h (flags %b%b), expected %h", n, rx2_pkt[n], rx2_nodata[n], rx2_err[n], exp2[n]);
        end
      end else begin
        n2_nodata++;
        if (!rx2_nodata[n] || rx2_err[n]) begin
          failures++;
          $display("FAIL: reserved-zero node %0d, nobody sent, flags nodata=%b err=%b", n, rx2_nodata[n], rx2_err[n]);
        end
      end
    end
  end

  initial begin : drive2
    int perm [N2];
    int j, tmp;
    logic [PW-1:0] p;
    for (int n = 0; n < N2; n++) begin tx2_valid[n] = 0; tx2_pkt[n] = '0; end
    frame2_start = 0;
    @(posedge rst_n);
    for (int t = 0; t < 30; t++) begin
      for (int n = 0; n < N2; n++) perm[n] = n;
      for (int n = N2 - 1; n > 0; n--) begin
        j = $urandom_range(n); tmp = perm[n]; perm[n] = perm[j]; perm[j] = tmp;
      end
      @(negedge clk);
      for (int n = 0; n < N2; n++) has2[n] = 0;
      for (int n = 0; n < N2; n++) begin
        // every node sends with probability 1/2, none in frame 0, all in frame 1
        tx2_valid[n] = (t == 1) || (t > 1 && $urandom_range(1) == 1);
        p = {$urandom, $urandom};
        p[PW-1 -: AW] = AW'(n);
        p[PW-AW-1 -: AW] = AW'(perm[n]);
        tx2_pkt[n] = p;
        if (tx2_valid[n]) begin
          has2[perm[n]] = 1;
          exp2[perm[n]] = p;
        end
      end
      @(negedge clk);
      for (int n = 0; n < N2; n++) tx2_valid[n] = 0;
      frame2_start = 1;
      @(negedge clk);
      frame2_start = 0;
      @(negedge clk);
      while (busy2) @(negedge clk);
    end
    drive2_done = 1;
  end
  bit drive2_done = 0;
  longint start_q [$];

  // receive side: compare with what was sent to that node
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) if (rx_valid[n]) begin
      logic [PW-1:0] e;
      e = expect_q[n].pop_front();
      checks++;
      if (rx_pkt[n] != e || rx_nodata[n] || rx_err[n]) begin
        failures++;
        $display("FAIL: node %0d got %h (flags %b%b), expected %h", n, rx_pkt[n], rx_nodata[n], rx_err[n], e);
      end
      n_pkts++;
    end
    if (rx_valid[0]) begin
      longint t0;
      t0 = start_q.pop_front();
      checks++;
      if (cycle - t0 != PW * L + 2) begin
        failures++;
        $display("FAIL: latency %0d, expected %0d", cycle - t0, PW * L + 2);
      end
    end
  end

  initial begin
    int perm [N];
    int j, tmp;
    logic [PW-1:0] p;
    for (int n = 0; n < N; n++) begin tx_valid[n] = 0; tx_pkt[n] = '0; end
    frame_start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      // queue two packets per node
      for (int k = 0; k < 2; k++) begin
        for (int n = 0; n < N; n++) perm[n] = n;
        for (int n = N - 1; n > 0; n--) begin
          j = $urandom_range(n); tmp = perm[n]; perm[n] = perm[j]; perm[j] = tmp;
        end
        @(negedge clk);
        for (int n = 0; n < N; n++) begin
          p = {$urandom, $urandom};
          p[PW-1 -: AW] = AW'(n);
          p[PW-AW-1 -: AW] = AW'(perm[n]);
          check(tx_ready[n], "buffer has room");
          tx_valid[n] = 1;
          tx_pkt[n] = p;
          expect_q[perm[n]].push_back(p);
        end
        @(negedge clk);
        for (int n = 0; n < N; n++) tx_valid[n] = 0;
      end
      for (int k = 0; k < 2; k++) begin
        @(negedge clk);
        frame_start = 1;
        start_q.push_back(cycle);
        @(negedge clk);
        frame_start = 0;
        repeat (100) @(negedge clk);
        frame_start = 1;   // must be ignored: a frame is in flight
        @(negedge clk);
        frame_start = 0;
        while (busy) @(negedge clk);
      end
    end
    repeat (5) @(negedge clk);
    check(n_pkts == 20 * 2 * N, $sformatf("%0d packets delivered", n_pkts));
    wait (drive2_done);
    check(n2_pkts > 0 && n2_nodata > 0 && n2_pkts + n2_nodata == 30 * N2,
          $sformatf("reserved-zero network: %0d packets, %0d no-data indications", n2_pkts, n2_nodata));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

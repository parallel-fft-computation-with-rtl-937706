// tb_cdma_noc_sweep: network latency and throughput against packet payload
// size. Four copies of the eight-node network are built, with 8, 16, 32 and
// 64 payload bits per packet (3-bit source and destination fields on top).
// Each copy runs a series of frames in which all eight nodes send to a
// random permutation of destinations, so eight transfers happen at once in
// every frame. For each copy the testbench checks that every packet arrives
// intact, that the latency from frame_start to rx_valid is PKT_W*L + 2 chip
// cycles, and that the next frame can start right after, and it prints
//   latency in chip cycles,
//   payload bits delivered per chip cycle over the whole run (the aggregate
//   throughput, eight simultaneous transfers per frame).
// Latency grows linearly with the payload and throughput approaches
// 8 * P / ((P + 6) * L) bits per chip cycle.
module tb_cdma_noc_sweep;
  localparam int N = 8, L = 8, AW = 3, NW = 4, FRAMES = 6;
  localparam int PAY [NW] = '{8, 16, 32, 64};

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  bit   done [NW];
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int PW = PAY[w] + 2 * AW;
    logic          tx_valid [N], tx_ready [N], rx_valid [N], rx_nodata [N], rx_err [N];
    logic [PW-1:0] tx_pkt [N], rx_pkt [N];
    logic          frame_start, busy;
    logic [PW-1:0] expect_q [N][$];
    longint        t_first, t_last, t0;
    longint        start_q [$];
    int            n_rx = 0;

    cdma_noc #(.N(N), .L(L), .ADDR_W(AW), .PKT_W(PW), .FIFO_DEPTH(2)) dut (.*);

    always @(posedge clk) if (rst_n) begin
      for (int n = 0; n < N; n++) if (rx_valid[n]) begin
        logic [PW-1:0] e;
        e = expect_q[n].pop_front();
        checks++;
        if (rx_pkt[n] != e || rx_nodata[n] || rx_err[n]) begin
          failures++;
          $display("FAIL: payload %0d, node %0d got %h, expected %h", PAY[w], n, rx_pkt[n], e);
        end
        n_rx++;
      end
      if (rx_valid[0]) begin
        t0 = start_q.pop_front();
        checks++;
        if (cycle - t0 != PW * L + 2) begin
          failures++;
          $display("FAIL: payload %0d, latency %0d, expected %0d", PAY[w], cycle - t0, PW * L + 2);
        end
        t_last = cycle;
      end
    end

    initial begin
      int perm [N];
      int j, tmp;
      logic [PW-1:0] p;
      for (int n = 0; n < N; n++) begin tx_valid[n] = 0; tx_pkt[n] = '0; end
      frame_start = 0;
      @(posedge rst_n);
      for (int f = 0; f < FRAMES; f++) begin
        for (int n = 0; n < N; n++) perm[n] = n;
        for (int n = N - 1; n > 0; n--) begin
          j = $urandom_range(n); tmp = perm[n]; perm[n] = perm[j]; perm[j] = tmp;
        end
        @(negedge clk);
        for (int n = 0; n < N; n++) begin
          p = PW'({$urandom, $urandom, $urandom});
          p[PW-1 -: AW] = AW'(n);
          p[PW-AW-1 -: AW] = AW'(perm[n]);
          tx_valid[n] = 1;
          tx_pkt[n] = p;
          expect_q[perm[n]].push_back(p);
        end
        @(negedge clk);
        for (int n = 0; n < N; n++) tx_valid[n] = 0;
        // frame_start as soon as the previous frame has left the lines
        while (busy) @(negedge clk);
        frame_start = 1;
        start_q.push_back(cycle);
        if (f == 0) t_first = cycle;
        @(negedge clk);
        frame_start = 0;
      end
      @(negedge clk);
      while (busy) @(negedge clk);
      repeat (4) @(negedge clk);
      checks++;
      if (n_rx != FRAMES * N) begin
        failures++;
        $display("FAIL: payload %0d, %0d packets delivered", PAY[w], n_rx);
      end
      $display("payload %0d bits: latency %0d chip cycles, throughput %0d.%03d payload bits per chip cycle",
               PAY[w], PW * L + 2, (FRAMES * N * PAY[w]) / int'(t_last - t_first),
               ((FRAMES * N * PAY[w] * 1000) / int'(t_last - t_first)) % 1000);
      done[w] = 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

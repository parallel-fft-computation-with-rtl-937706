// tb_cdma_fft_top: the whole design at its default sizes. Both FFT systems
// run at the same time, each fed a stream of transforms (impulse, random
// small values, saturating values) with in_valid held high. Every result is
// compared bit-exactly with the DIF reference model, and in order. Checks
// the indirect response time (1241 cycles) and that the direct pipeline
// outputs each transform three steps after taking it. Counts the mechanisms
// and fails if one never happened: network frames on both systems, "no
// data" frames (direct pipeline filling and draining), saturation on both,
// input stalls on both, and several transforms in flight at once in the
// direct pipeline. At the end it prints the performance figures of both
// mappings (latency, throughput, utilisation, response time).
module tb_cdma_fft_top;
  import cdma_pkg::*;
  import fft_ref_pkg::*;

  localparam int NT   = 10;
  localparam int RESP = STAGES * (PKT_W * CODE_L + 6) + 1;

  logic        clk = 0, rst_n = 0;
  logic        ind_in_valid, ind_in_ready, ind_out_valid, ind_out_sat, ind_out_err;
  logic        dir_in_valid, dir_in_ready, dir_out_valid, dir_out_sat, dir_out_err;
  cplx_t       ind_in_data [FFT_N], ind_out_data [FFT_N];
  cplx_t       dir_in_data [FFT_N], dir_out_data [FFT_N];
  logic [31:0] ind_resp_cycles, dir_steps;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_ind_frames = 0, n_dir_frames = 0, n_nodata = 0, n_ind_sat = 0, n_dir_sat = 0;
  int n_ind_stall = 0, n_dir_stall = 0, max_inflight = 0;

  cdma_fft_top dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat ((NT + 6) * 2500 + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    check(imax_ind == 8 && x_ind == 8 * n_ind_frames, "indirect: eight transfers in every frame");
    report("indirect", x_ind, n_ind_frames, imax_ind, RESP);
    report("direct", x_dir, n_dir_frames, imax_dir, dir_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  c_t xi [NT][16];
  c_t xd [NT][16];

  function automatic c_t rnd_c(int t);
    c_t c;
    if (t >= NT - 2) begin
      c.re = int'($urandom_range(16000)) + 16000;
      c.im = int'($urandom_range(32000)) - 16000;
    end else begin
      c.re = int'($urandom_range(3000)) - 1500;
      c.im = int'($urandom_range(3000)) - 1500;
    end
    return c;
  endfunction

  // Performance figures in the terms of the evaluation: frame latency,
  // maximum and average aggregate throughput (payload bits moved per frame
  // latency, with the largest and the mean number of simultaneous transfers
  // per frame), network utilisation (their ratio) and the response time of
  // one transform. Times are also given in ns for a 64 MHz bit clock, that
  // is a 512 MHz chip clock (1.953 ns per cycle).
  task automatic report(string name, int xfers, int frames, int imax, longint resp);
    int lat, ns_lat, ns_resp, avg_x1000;
    lat       = PKT_W * CODE_L + 2;
    ns_lat    = lat * 1000 / 512;
    ns_resp   = int'(resp) * 1000 / 512;
    avg_x1000 = xfers * 1000 / frames;
    $display("%s: latency %0d cycles (%0d ns), max throughput %0d payload bits/latency (%0d MB/s), avg throughput %0d.%03d transfers x %0d bits/latency (%0d MB/s), utilisation %0d%%, response %0d cycles (%0d ns)",
             name, lat, ns_lat, imax * PAYLOAD_W, imax * PAYLOAD_W * 1000 / 8 / ns_lat,
             avg_x1000 / 1000, avg_x1000 % 1000, PAYLOAD_W, avg_x1000 * PAYLOAD_W / 8 / ns_lat,
             avg_x1000 / 10 / imax, resp, ns_resp);
  endtask

  // monitors
  int ni = 0, nd = 0, d_in = 0;
  longint ti [$];
  int sd [$];
  longint td [$], dir_resp;
  int x_ind = 0, x_dir = 0, imax_ind = 0, imax_dir = 0;
  always @(posedge clk) if (rst_n) begin : monitor
    c_t X [16];
    bit s;
    if (dut.u_indirect.frame_start) n_ind_frames++;
    if (dut.u_direct.frame_start) n_dir_frames++;
    for (int p = 2; p < N_PE; p++)
      if (dut.u_direct.rx_valid[p] && dut.u_direct.rx_nodata[p]) n_nodata++;
    begin
      int ki, kd;
      ki = 0; kd = 0;
      for (int p = 0; p < N_PE; p++) begin
        if (dut.u_indirect.u_noc.rx_valid[p] && !dut.u_indirect.u_noc.rx_nodata[p]) ki++;
        if (p >= 2 && dut.u_direct.rx_valid[p] && !dut.u_direct.rx_nodata[p]) kd++;
      end
      x_ind += ki; x_dir += kd;
      if (ki > imax_ind) imax_ind = ki;
      if (kd > imax_dir) imax_dir = kd;
    end
    if (ind_in_valid && !ind_in_ready) n_ind_stall++;
    if (dir_in_valid && !dir_in_ready) n_dir_stall++;
    if (ind_in_valid && ind_in_ready) ti.push_back(cycle);
    if (dir_in_valid && dir_in_ready) begin
      sd.push_back(dir_steps);
      td.push_back(cycle);
      d_in++;
    end
    if (d_in - nd > max_inflight) max_inflight = d_in - nd;
    if (ind_out_valid) begin
      longint t0;
      t0 = ti.pop_front();
      s = 0;
      fft16_ref(xi[ni], X, s);
      check(cycle - t0 == RESP, $sformatf("indirect response %0d, expected %0d", cycle - t0, RESP));
      for (int m = 0; m < 16; m++)
        check(from_cplx(ind_out_data[m]) == X[m], $sformatf("indirect transform %0d X(%0d)", ni, m));
      check(ind_out_sat == s && !ind_out_err, "indirect flags");
      if (ind_out_sat) n_ind_sat++;
      ni++;
    end
    if (dir_out_valid) begin
      int st0;
      st0 = sd.pop_front();
      dir_resp = cycle - td.pop_front();
      s = 0;
      fft16_ref(xd[nd], X, s);
      check(dir_steps == st0 + 4, $sformatf("direct transform %0d left in step %0d, entered %0d", nd, dir_steps, st0 + 1));
      for (int m = 0; m < 16; m++)
        check(from_cplx(dir_out_data[m]) == X[m], $sformatf("direct transform %0d X(%0d)", nd, m));
      check(dir_out_sat == s && !dir_out_err, "direct flags");
      if (dir_out_sat) n_dir_sat++;
      nd++;
    end
  end

  initial begin : drive_ind
    ind_in_valid = 0;
    for (int n = 0; n < 16; n++) ind_in_data[n] = '0;
    wait (rst_n);
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      for (int n = 0; n < 16; n++) ind_in_data[n] = to_cplx(xi[t][n]);
      ind_in_valid = 1;
      while (!ind_in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    ind_in_valid = 0;
  end

  initial begin : drive_dir
    dir_in_valid = 0;
    for (int n = 0; n < 16; n++) dir_in_data[n] = '0;
    wait (rst_n);
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      for (int n = 0; n < 16; n++) dir_in_data[n] = to_cplx(xd[t][n]);
      dir_in_valid = 1;
      while (!dir_in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    dir_in_valid = 0;
  end

  initial begin : main
    for (int t = 0; t < NT; t++)
      for (int n = 0; n < 16; n++) begin
        xi[t][n] = rnd_c(t);
        xd[t][n] = rnd_c(t);
        if (t == 0) begin
          xi[t][n].re = (n == 0) ? 1024 : 0; xi[t][n].im = 0;
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ni == NT && nd == NT);
    repeat (5) @(posedge clk);
    check(n_ind_frames == NT * STAGES, "indirect: four frames per transform");
    check(n_dir_frames > 0, "direct: network frames never happened");
    check(n_nodata > 0, "direct: no-data frames never happened");
    check(n_ind_sat > 0 && n_dir_sat > 0, "saturation never happened on one system");
    check(n_ind_stall > 0 && n_dir_stall > 0, "input stall never happened on one system");
    check(max_inflight >= 3, $sformatf("direct pipeline held at most %0d transforms", max_inflight));
    $display("mechanisms: ind_frames=%0d dir_frames=%0d nodata_receptions=%0d ind_sat=%0d dir_sat=%0d ind_stall=%0d dir_stall=%0d dir_in_flight=%0d",
             n_ind_frames, n_dir_frames, n_nodata, n_ind_sat, n_dir_sat, n_ind_stall, n_dir_stall, max_inflight);
    check(imax_ind == 8 && x_ind == 8 * n_ind_frames, "indirect: eight transfers in every frame");
    report("indirect", x_ind, n_ind_frames, imax_ind, RESP);
    report("direct", x_dir, n_dir_frames, imax_dir, dir_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

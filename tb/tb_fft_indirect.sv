// tb_fft_indirect: end-to-end test of the CDMA-network FFT at its default
// sizes (8 PEs, 8-chip Walsh codes, 38-bit packets, 16-point FFT).
//
// Runs a series of transforms - an impulse, a constant, random small inputs
// and large inputs that saturate - with in_valid held high so that transforms
// follow each other and the input stalls while the design is busy. Every
// result is compared bit-exactly with a textbook in-place DIF FFT model
// (fft_ref_pkg), the small-input results also with a floating-point DFT.
// It checks the response time (STAGES rounds of frame + 6 cycles, + 1) and
// that every frame carried eight packets with no demodulation error, and it
// counts the mechanisms the design has: network frames, butterfly stages,
// saturation, input stalls. A mechanism that never happened is a failure.
module tb_fft_indirect;
  import cdma_pkg::*;
  import fft_ref_pkg::*;

  localparam int NTRANS   = 24;
  localparam int FRAME    = PKT_W * CODE_L;
  localparam int RESP     = STAGES * (FRAME + 6) + 1;

  logic        clk = 0, rst_n = 0;
  logic        in_valid;
  logic        in_ready, out_valid, out_sat, out_err;
  cplx_t       in_data  [FFT_N];
  cplx_t       out_data [FFT_N];
  logic [31:0] resp_cycles;

  int checks = 0, failures = 0;
  int n_frames = 0, n_compute = 0, n_sat = 0, n_stall = 0, n_rx = 0;
  longint cycle = 0;

  fft_indirect dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // mechanism counters, observed inside the design
  always @(posedge clk) if (rst_n) begin
    if (dut.frame_start) n_frames++;
    if (dut.compute) n_compute++;
    if (in_valid && !in_ready) n_stall++;
    for (int p = 0; p < N_PE; p++) if (dut.rx_valid[p]) begin
      n_rx++;
      if (dut.rx_err[p] || dut.rx_nodata[p]) begin
        failures++;
        $display("FAIL: PE %0d received a packet with a demodulation error", p);
      end
    end
  end

  initial begin : watchdog
    repeat (NTRANS * (RESP + 10) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  c_t x [NTRANS][16];

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic c_t mk(int re, int im);
    c_t c;
    c.re = re;
    c.im = im;
    return c;
  endfunction

  // monitor: acceptance times and result checks, sampled at the clock edge
  int     n_done = 0;
  int     n_acc  = 0;
  longint acc_q [$];

  always @(posedge clk) if (rst_n) begin : monitor
    c_t  Xref [16];
    real Xr [16], Xi [16];
    bit  s;
    longint t_acc;
    if (in_valid && in_ready) begin
      acc_q.push_back(cycle);
      n_acc++;
    end
    if (out_valid) begin
      t_acc = acc_q.pop_front();
      s = 0;
      fft16_ref(x[n_done], Xref, s);
      check(cycle - t_acc == RESP, $sformatf("transform %0d: response %0d cycles, expected %0d",
                                             n_done, cycle - t_acc, RESP));
      check(resp_cycles == RESP, $sformatf("resp_cycles=%0d, expected %0d", resp_cycles, RESP));
      for (int m = 0; m < 16; m++)
        check(from_cplx(out_data[m]) == Xref[m],
              $sformatf("transform %0d X(%0d) = (%0d,%0d), expected (%0d,%0d)", n_done, m,
                        out_data[m].re, out_data[m].im, Xref[m].re, Xref[m].im));
      check(out_sat == s, $sformatf("transform %0d: out_sat=%0b, model %0b", n_done, out_sat, s));
      check(!out_err, $sformatf("transform %0d: out_err", n_done));
      if (out_sat) n_sat++;
      if (!s) begin
        dft16_real(x[n_done], Xr, Xi);
        for (int m = 0; m < 16; m++)
          check((rabs(out_data[m].re / 1024.0 - Xr[m]) < 0.03) &&
                (rabs(out_data[m].im / 1024.0 - Xi[m]) < 0.03),
                $sformatf("transform %0d X(%0d) far from the DFT", n_done, m));
      end
      n_done++;
    end
  end

  initial begin : main
    int  amp;

    for (int t = 0; t < NTRANS; t++) begin
      for (int n = 0; n < 16; n++) begin
        if (t == 0)      x[t][n] = mk(n == 0 ? 1024 : 0, 0);                     // impulse
        else if (t == 1) x[t][n] = mk(512, -256);                                // constant
        else if (t < NTRANS - 4) begin
          amp = 1536;                                                           // |x| < 1.5
          x[t][n] = mk(int'($urandom_range(2 * amp)) - amp, int'($urandom_range(2 * amp)) - amp);
        end else x[t][n] = mk(int'($urandom_range(16000)) + 16000,               // saturating
                              int'($urandom_range(32000)) - 16000);
      end
    end

    in_valid = 0;
    for (int n = 0; n < 16; n++) in_data[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // driver: in_valid stays high from the first to the last transform, the
    // next input is put on the bus as soon as the previous one is taken
    for (int t = 0; t < NTRANS; t++) begin
      @(negedge clk);
      for (int n = 0; n < 16; n++) in_data[n] = to_cplx(x[t][n]);
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    wait (n_done == NTRANS);
    repeat (5) @(posedge clk);
    check(n_frames == NTRANS * STAGES, $sformatf("%0d network frames, expected %0d", n_frames, NTRANS * STAGES));
    check(n_compute == NTRANS * STAGES, $sformatf("%0d butterfly stages, expected %0d", n_compute, NTRANS * STAGES));
    check(n_rx == NTRANS * STAGES * N_PE, $sformatf("%0d packets delivered, expected %0d", n_rx, NTRANS * STAGES * N_PE));
    check(n_sat > 0, "saturation never happened");
    check(n_stall > 0, "input stall never happened");
    check(n_acc == NTRANS, $sformatf("%0d inputs accepted, expected %0d", n_acc, NTRANS));
    $display("mechanisms: frames=%0d packets=%0d butterfly_stages=%0d saturated_transforms=%0d stall_cycles=%0d",
             n_frames, n_rx, n_compute, n_sat, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

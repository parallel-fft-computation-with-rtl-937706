// tb_fft_direct: end-to-end test of the directly mapped FFT pipeline at its
// default sizes. Offers a new transform in every step (in_valid held high),
// so the pipeline fills, runs full and drains; every output is compared
// bit-exactly with the DIF reference model, the non-saturating ones also
// with a floating-point DFT. Checks the order of the outputs, that each
// leaves three steps after it entered, the step length, and counts the
// mechanisms: network frames, frames in which receivers saw "no data"
// (pipeline filling or draining), saturated transforms, and a gap in the
// input (pipeline bubble).
module tb_fft_direct;
  import cdma_pkg::*;
  import fft_ref_pkg::*;

  localparam int NTRANS = 16;
  localparam int FRAME  = PKT_W * CODE_L;
  localparam int STEP   = 12 + 8 * (FRAME + 4);   // stage-0 PEs computing (8 operations)
  localparam int STEP4  = 8 + 8 * (FRAME + 4);    // only later stages computing (4)

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, out_valid, out_sat, out_err;
  cplx_t       in_data  [FFT_N];
  cplx_t       out_data [FFT_N];
  logic [31:0] steps;

  int checks = 0, failures = 0;
  int n_frames = 0, n_nodata = 0, n_sat = 0, n_pkts = 0, n_bubble = 0;
  longint cycle = 0;

  fft_direct dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin : watchdog
    repeat ((NTRANS + 8) * (STEP + 10)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  c_t x [NTRANS][16];
  int n_done = 0;
  longint acc_q [$];
  int     step_q [$];
  longint last_frame = -1;
  bit     any_nodata;

  always @(posedge clk) if (rst_n) begin : monitor
    c_t  Xref [16];
    real Xr [16], Xi [16];
    bit  s;
    if (dut.frame_start) begin
      n_frames++;
      if (any_nodata) n_nodata++;
      any_nodata = 0;
    end
    // nodes 0 and 1 (stage 0) take no packets from the network
    for (int p = 2; p < N_PE; p++) if (dut.rx_valid[p]) begin
      if (dut.rx_nodata[p]) any_nodata = 1;
      else n_pkts++;
    end
    if (in_valid && in_ready) begin
      acc_q.push_back(cycle);
      step_q.push_back(steps);
    end
    if (out_valid) begin
      longint t0;
      int st0;
      t0 = acc_q.pop_front();
      st0 = step_q.pop_front();
      s = 0;
      fft16_ref(x[n_done], Xref, s);
      check(steps == st0 + 1 + 3, $sformatf("transform %0d left in step %0d, entered in step %0d", n_done, steps, st0 + 1));
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

  // step length: distance between compute pulses while the pipeline is busy
  longint last_comp = -1;
  bit stage0_ran;
  int n_steplen = 0;
  always @(posedge clk) if (rst_n && dut.compute) begin
    if (last_comp >= 0) begin
      checks++;
      n_steplen++;
      if (cycle - last_comp != (stage0_ran ? STEP : STEP4)) begin
        failures++;
        $display("FAIL: step of %0d cycles, expected %0d", cycle - last_comp, stage0_ran ? STEP : STEP4);
      end
    end
    last_comp = cycle;
    stage0_ran = dut.in_full[0];
  end

  initial begin : main
    int amp;
    for (int t = 0; t < NTRANS; t++)
      for (int n = 0; n < 16; n++) begin
        if (t == 0) begin
          x[t][n].re = (n == 0) ? 1024 : 0; x[t][n].im = 0;
        end else if (t < NTRANS - 3) begin
          amp = 1536;
          x[t][n].re = int'($urandom_range(2 * amp)) - amp;
          x[t][n].im = int'($urandom_range(2 * amp)) - amp;
        end else begin
          x[t][n].re = int'($urandom_range(16000)) + 16000;
          x[t][n].im = int'($urandom_range(32000)) - 16000;
        end
      end
    in_valid = 0;
    for (int n = 0; n < 16; n++) in_data[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NTRANS; t++) begin
      @(negedge clk);
      for (int n = 0; n < 16; n++) in_data[n] = to_cplx(x[t][n]);
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      if (t == 5) begin
        // one step without input: a bubble travels down the pipeline
        @(negedge clk);
        in_valid = 0;
        while (in_ready) @(negedge clk);
        n_bubble++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (n_done == NTRANS);
    repeat (5) @(posedge clk);
    check(n_pkts == NTRANS * 3 * 2 * 8, $sformatf("%0d packets, expected %0d", n_pkts, NTRANS * 48));
    check(n_nodata > 0, "no-data frames never happened");
    check(n_sat > 0, "saturation never happened");
    check(n_bubble > 0, "pipeline bubble never happened");
    check(n_steplen > 0, "step length never measured");
    $display("mechanisms: steps=%0d frames=%0d packets=%0d frames_with_nodata=%0d saturated=%0d bubbles=%0d",
             steps, n_frames, n_pkts, n_nodata, n_sat, n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

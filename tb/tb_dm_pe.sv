// tb_dm_pe: the eight direct-mapping PEs on an ideal testbench network (a
// packet reaches the PE in its destination field in the next cycle),
// stepped by the testbench like the pipeline sequencer does. Checks the
// stage-0 split (PE1 keeps x(k)+x(k+8), PE2 (x(k)-x(k+8))W16^k), the
// destinations of all packets (PE_ID+2), the number of butterfly cycles
// (8 at stage 0, 4 later), the final bit-exact FFT held by the last two
// PEs, that "no data" packets are dropped and that a packet from the wrong
// source sets err.
module tb_dm_pe;
  import cdma_pkg::*;
  import fft_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, compute, send;
  logic [2:0] send_idx;
  cplx_t load_data [FFT_N];
  logic busy [N_PE], tx_valid [N_PE], rx_valid [N_PE], rx_nodata [N_PE], rx_err [N_PE];
  logic in_full [N_PE], out_valid [N_PE], sat [N_PE], err [N_PE];
  logic [PKT_W-1:0] tx_pkt [N_PE], rx_pkt [N_PE];
  cplx_t out_data [N_PE][8];
  int checks = 0, failures = 0;

  for (genvar p = 0; p < N_PE; p++) begin : g
    dm_pe #(.PE_ID(p)) dut (
      .clk, .rst_n, .load, .load_data, .compute, .busy(busy[p]), .send, .send_idx,
      .tx_valid(tx_valid[p]), .tx_pkt(tx_pkt[p]),
      .rx_valid(rx_valid[p]), .rx_pkt(rx_pkt[p]), .rx_nodata(rx_nodata[p]), .rx_err(rx_err[p]),
      .in_full(in_full[p]), .out_valid(out_valid[p]), .out_data(out_data[p]),
      .sat(sat[p]), .err(err[p]));
  end

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  c_t xs [8][16];

  task automatic step(input bit with_input, input int t);
    int cyc [N_PE];
    pkt_t pk;
    @(negedge clk);
    load = with_input;
    for (int n = 0; n < 16; n++) load_data[n] = to_cplx(xs[t % 8][n]);
    @(negedge clk);
    load = 0;
    compute = 1;
    @(negedge clk);
    compute = 0;
    for (int p = 0; p < N_PE; p++) cyc[p] = 0;
    for (int c = 0; c < 12; c++) begin
      for (int p = 0; p < N_PE; p++) if (busy[p]) cyc[p]++;
      @(negedge clk);
    end
    for (int p = 0; p < N_PE; p++)
      if (cyc[p] != 0) check(cyc[p] == (p < 2 ? 8 : 4), $sformatf("PE %0d busy %0d cycles", p, cyc[p]));
    for (int j = 0; j < 8; j++) begin
      send = 1; send_idx = 3'(j);
      #1;
      for (int p = 0; p < N_PE; p++) begin
        rx_valid[p] = 0;
        rx_nodata[p] = 0;
      end
      for (int p = 0; p < N_PE; p++) if (tx_valid[p]) begin
        pk = pkt_t'(tx_pkt[p]);
        check(int'(pk.src) == p && int'(pk.dst) == p + 2 && p < 6, "packet addresses");
        rx_pkt[p + 2] = tx_pkt[p];
        rx_valid[p + 2] = 1;
      end
      // idle senders: their successor sees a "no data" frame
      for (int p = 2; p < N_PE; p++) if (!rx_valid[p]) begin
        rx_valid[p] = 1; rx_nodata[p] = 1; rx_pkt[p] = {3'd0, 3'd0, 32'hdeadbeef};
      end
      @(negedge clk);
      send = 0;
      for (int p = 0; p < N_PE; p++) begin rx_valid[p] = 0; rx_nodata[p] = 0; end
      @(negedge clk);
    end
  endtask

  initial begin
    c_t X [16], y0, y1;
    bit s;
    load = 0; compute = 0; send = 0; send_idx = 0;
    for (int n = 0; n < 16; n++) load_data[n] = '0;
    for (int p = 0; p < N_PE; p++) begin rx_valid[p] = 0; rx_pkt[p] = '0; rx_nodata[p] = 0; rx_err[p] = 0; end
    for (int t = 0; t < 8; t++)
      for (int n = 0; n < 16; n++) begin
        xs[t][n].re = int'($urandom_range(3000)) - 1500;
        xs[t][n].im = int'($urandom_range(3000)) - 1500;
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 11; t++) begin
      step(t < 8, t);
      // stage-0 split of the transform that just entered
      if (t < 8) begin
        for (int k = 0; k < 8; k++) begin
          s = 0;
          bf_ref(xs[t][k], xs[t][k+8], k, y0, y1, s);
          check(from_cplx(out_data[0][k]) == y0, "PE1 keeps the sums");
          check(from_cplx(out_data[1][k]) == y1, "PE2 keeps the rotated differences");
        end
      end
      // transform t-3 is complete in PEs 6 and 7
      if (t >= 3) begin
        s = 0;
        fft16_ref(xs[t - 3], X, s);
        check(out_valid[6] && out_valid[7], "last stage valid");
        for (int m = 0; m < 16; m++)
          check(from_cplx(out_data[6 + brev4(m) / 8][brev4(m) % 8]) == X[m],
                $sformatf("step %0d X(%0d)", t, m));
      end else check(!out_valid[6], "last stage not valid while filling");
    end
    for (int p = 0; p < N_PE; p++) check(!err[p], "no error flags");
    // a packet from the wrong source
    @(negedge clk);
    rx_pkt[3] = {3'd0, 3'd3, 32'h0};   // PE 3's predecessor is PE 1
    rx_valid[3] = 1;
    @(negedge clk);
    rx_valid[3] = 0;
    check(err[3], "wrong source flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

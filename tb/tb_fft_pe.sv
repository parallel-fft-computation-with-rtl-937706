// tb_fft_pe: eight PEs connected by an ideal testbench network (a packet is
// handed to the PE named in its destination field after a random delay of
// 1..20 cycles), sequenced by the testbench. Checks that every round is a
// set of pairwise swaps (PE p sends to q exactly when q sends to p), that
// each PE receives exactly one packet per round, that after four rounds the
// PEs hold the bit-exact FFT of their input in bit-reversed placement, and
// that a packet from the wrong source sets err.
module tb_fft_pe;
  import cdma_pkg::*;
  import fft_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, send, compute;
  logic [1:0] stage;
  cplx_t load_lo [N_PE], load_hi [N_PE], lo [N_PE], hi [N_PE];
  logic tx_valid [N_PE], tx_ready [N_PE], rx_valid [N_PE], rx_err [N_PE];
  logic [PKT_W-1:0] tx_pkt [N_PE], rx_pkt [N_PE];
  logic rx_done [N_PE], sat [N_PE], err [N_PE];
  int checks = 0, failures = 0;

  for (genvar p = 0; p < N_PE; p++) begin : g
    fft_pe #(.PE_ID(p)) dut (
      .clk, .rst_n, .load, .load_lo(load_lo[p]), .load_hi(load_hi[p]),
      .send, .compute, .stage,
      .tx_valid(tx_valid[p]), .tx_pkt(tx_pkt[p]), .tx_ready(tx_ready[p]),
      .rx_valid(rx_valid[p]), .rx_pkt(rx_pkt[p]), .rx_err(rx_err[p]),
      .lo(lo[p]), .hi(hi[p]), .rx_done(rx_done[p]), .sat(sat[p]), .err(err[p]));
    assign tx_ready[p] = 1'b1;
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

  initial begin
    c_t x [16], X [16];
    pkt_t sent [N_PE];
    int delay [N_PE];
    int got [N_PE];
    bit s, all;
    load = 0; send = 0; compute = 0; stage = 0;
    for (int p = 0; p < N_PE; p++) begin
      rx_valid[p] = 0; rx_pkt[p] = '0; rx_err[p] = 0; load_lo[p] = '0; load_hi[p] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int n = 0; n < 16; n++) begin
        x[n].re = int'($urandom_range(3000)) - 1500;
        x[n].im = int'($urandom_range(3000)) - 1500;
      end
      @(negedge clk);
      for (int p = 0; p < N_PE; p++) begin
        load_lo[p] = to_cplx(x[2*p]);
        load_hi[p] = to_cplx(x[2*p+1]);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int st = 0; st < 4; st++) begin
        stage = 2'(st);
        send = 1;
        #1;
        for (int p = 0; p < N_PE; p++) begin
          check(tx_valid[p], "tx_valid with send");
          sent[p] = pkt_t'(tx_pkt[p]);
          check(int'(sent[p].src) == p, "source field");
        end
        for (int p = 0; p < N_PE; p++)
          check(int'(sent[int'(sent[p].dst)].dst) == p,
                $sformatf("round %0d: PE %0d -> %0d is not a swap", st, p, sent[p].dst));
        @(negedge clk);
        send = 0;
        for (int p = 0; p < N_PE; p++) begin
          delay[p] = $urandom_range(20, 1);
          got[p] = 0;
        end
        for (int c = 1; c <= 21; c++) begin
          for (int p = 0; p < N_PE; p++) begin
            rx_valid[int'(sent[p].dst)] = (delay[p] == c);
            if (delay[p] == c) begin
              rx_pkt[int'(sent[p].dst)] = PKT_W'(sent[p]);
              got[int'(sent[p].dst)]++;
            end
          end
          @(negedge clk);
          for (int p = 0; p < N_PE; p++) rx_valid[p] = 0;
        end
        all = 1;
        for (int p = 0; p < N_PE; p++) begin
          all &= rx_done[p];
          check(got[p] == 1, "one packet per PE per round");
        end
        check(all, "rx_done on every PE");
        compute = 1;
        @(negedge clk);
        compute = 0;
      end
      s = 0;
      fft16_ref(x, X, s);
      for (int m = 0; m < 16; m++) begin
        int q, k;
        k = brev4(m);
        // PE q holds outputs k (lo) and k+1 (hi) with k = its last butterfly
        q = -1;
        for (int p = 0; p < N_PE; p++)
          if ((k & 1) == 0 ? from_cplx(lo[p]) == X[m] : from_cplx(hi[p]) == X[m]) q = p;
        check(q >= 0, $sformatf("transform %0d: X(%0d) held by no PE", t, m));
      end
      check(from_cplx(lo[0]) == X[0] && from_cplx(hi[0]) == X[8], "PE 0 holds X(0) and X(8)");
      for (int p = 0; p < N_PE; p++) check(!err[p] && !sat[p], "no flags");
    end
    // a packet from the wrong source is flagged
    @(negedge clk);
    stage = 0;
    rx_pkt[0] = PKT_W'({3'd5, 3'd0, 32'h0});   // PE 0's stage-0 partner is PE 4
    rx_valid[0] = 1;
    @(negedge clk);
    rx_valid[0] = 0;
    check(err[0], "wrong source flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

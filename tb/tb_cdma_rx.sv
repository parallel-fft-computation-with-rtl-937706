// tb_cdma_rx: eight receivers (one per codeword) listen to chip sums that
// the testbench builds from the codewords of the worked example.
//  - first bit of a frame = the example's sums [3 3 3 7 5 5 5 5]: the
//    decision factors must be the printed +1 -1 -1 +1 -1 -1 -1 +1;
//  - random frames of eight packets along a random permutation must arrive
//    intact, unflagged, one cycle after their last chip;
//  - a destination nobody sends to must report "no data" (lambda = 0);
//  - two senders to one destination must be flagged.
module tb_cdma_rx;
  import fft_ref_pkg::*;
  localparam int L = 8, N = 8, AW = 3, PW = 38;
  localparam int S_EX [8] = '{3, 3, 3, 7, 5, 5, 5, 5};
  localparam int LAM_EX [8] = '{1, -1, -1, 1, -1, -1, -1, 1};
  logic clk = 0, rst_n = 0;
  logic [3:0] sum;
  logic sof;
  logic          pkt_valid [N], pkt_nodata [N], pkt_err [N], lambda_valid [N], busy [N];
  logic [PW-1:0] pkt [N];
  logic signed [7:0] lambda [N];
  int checks = 0, failures = 0, n_nodata = 0, n_err = 0;

  for (genvar n = 0; n < N; n++) begin : g
    cdma_rx #(.L(L), .N(N), .ADDR_W(AW), .PKT_W(PW), .NODE_ID(n)) dut (
      .clk, .rst_n, .sum, .sof,
      .pkt_valid(pkt_valid[n]), .pkt(pkt[n]), .pkt_nodata(pkt_nodata[n]), .pkt_err(pkt_err[n]),
      .lambda(lambda[n]), .lambda_valid(lambda_valid[n]), .busy(busy[n]));
  end

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send[s] = 1: source s sends packet p[s] to dst[s]; otherwise it sends zeros
  task automatic frame(input logic [PW-1:0] p [N], input int dst [N], input bit send [N],
                       input bit example_first_bit);
    int s_i;
    for (int b = 0; b < PW; b++)
      for (int i = 0; i < L; i++) begin
        @(negedge clk);
        s_i = 0;
        for (int s = 0; s < N; s++)
          if (send[s]) s_i += p[s][PW-1-b] ^ code_chip(dst[s], i);
        if (example_first_bit && b == 0) s_i = S_EX[i];
        sum = 4'(s_i);
        sof = (b == 0 && i == 0);
        if (example_first_bit && b == 1 && i == 0)
          for (int n = 0; n < N; n++)
            check(lambda_valid[n] && lambda[n] == LAM_EX[n],
                  $sformatf("example: node %0d lambda %0d, expected %0d", n, lambda[n], LAM_EX[n]));
      end
    @(negedge clk);
    sum = 0; sof = 0;
  endtask

  initial begin
    logic [PW-1:0] p [N];
    int dst [N];
    bit send [N];
    int perm [N];
    int tmp, j, idle;
    sum = 0; sof = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int s = 0; s < N; s++) perm[s] = s;
      for (int s = N - 1; s > 0; s--) begin
        j = $urandom_range(s); tmp = perm[s]; perm[s] = perm[j]; perm[j] = tmp;
      end
      for (int s = 0; s < N; s++) begin
        dst[s] = perm[s];
        send[s] = 1;
        p[s] = {$urandom, $urandom};
        p[s][PW-1 -: AW] = AW'(s);
        p[s][PW-AW-1 -: AW] = AW'(perm[s]);
      end
      idle = -1;
      if (t >= 20 && t < 25) begin
        // the source for node t-18 stays silent, so that node gets no data
        // (its all-zero chips reach node 0 as extra data, node 0 not checked)
        for (int s = 0; s < N; s++) if (dst[s] == t - 18) idle = s;
        send[idle] = 0;
      end
      if (t >= 25) begin
        // two sources to the same node (not node 0): collision
        for (int s = 0; s < N; s++) if (dst[s] == 0) idle = s;
        dst[idle] = (dst[(idle + 1) % N] == 0) ? dst[(idle + 2) % N] : dst[(idle + 1) % N];
        p[idle][PW-AW-1 -: AW] = AW'(dst[idle]);
      end
      frame(p, dst, send, t == 0);
      // the packets were registered in the cycle after the last chip
      for (int s = 0; s < N; s++) begin
        if (t == 0) continue;
        if (t < 20) begin
          check(pkt_valid[dst[s]], "pkt_valid right after the last chip");
        end
      end
      if (t == 0) continue;
      for (int s = 0; s < N; s++) begin
        if (t < 20) begin
          check(pkt[dst[s]] == p[s], $sformatf("frame %0d: node %0d got %h, expected %h", t, dst[s], pkt[dst[s]], p[s]));
          check(!pkt_nodata[dst[s]] && !pkt_err[dst[s]], "flags clear on a clean frame");
        end else if (t < 25) begin
          if (send[s] && dst[s] != 0) check(pkt[dst[s]] == p[s] && !pkt_err[dst[s]], "others unaffected");
        end
      end
      if (t >= 20 && t < 25) begin
        for (int n = 1; n < N; n++) begin
          bit used;
          used = 0;
          for (int s = 0; s < N; s++) if (send[s] && dst[s] == n) used = 1;
          if (!used) begin
            check(pkt_nodata[n], $sformatf("frame %0d: node %0d must report no data", t, n));
            if (pkt_nodata[n]) n_nodata++;
          end
        end
      end
      if (t >= 25) begin
        check(pkt_err[dst[idle]] || pkt_nodata[dst[idle]], "collision flagged");
        if (pkt_err[dst[idle]]) n_err++;
      end
    end
    $display("nodata=%0d err=%0d", n_nodata, n_err);
    check(n_nodata > 0 && n_err > 0, "no-data and error cases both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pkt_valid must rise exactly one cycle after the last chip of a frame
  int since_sof = -1;
  always @(posedge clk) begin
    if (sof) since_sof <= 1;
    else if (since_sof >= 0) since_sof <= since_sof + 1;
    if (pkt_valid[1]) begin
      checks++;
      if (since_sof != PW * L) begin
        failures++;
        $display("FAIL: packet after %0d cycles, expected %0d", since_sof, PW * L);
      end
    end
  end
endmodule

// tb_fft_ctrl: the sequencer against a model of the network whose "all
// received" flag rises D cycles after frame_start and drops on send. Checks
// the command order (load; per stage send, frame_start, compute with the
// right stage number; out_valid), that in_ready is low while a transform
// runs, and the response time STAGES*(D+4)+1, for several values of D.
module tb_fft_ctrl;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, load, send, frame_start, compute, all_rx_done, out_valid;
  logic [1:0] stage;
  logic [31:0] resp_cycles;
  int checks = 0, failures = 0;
  int D;

  fft_ctrl #(.STAGES(4)) dut (.*);
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

  // network model
  int cnt = -1;
  always @(posedge clk) begin
    if (!rst_n) begin all_rx_done <= 0; cnt <= -1; end
    else begin
      if (send) all_rx_done <= 0;
      if (frame_start) cnt <= 1;
      else if (cnt >= 0) cnt <= cnt + 1;
      if (cnt == D) begin all_rx_done <= 1; cnt <= -1; end
    end
  end

  // expected event trace: L, then S F C per stage, then O
  string trace;
  always @(posedge clk) if (rst_n) begin
    if (load) trace = {trace, "L"};
    if (send) trace = {trace, $sformatf("S%0d", stage)};
    if (frame_start) trace = {trace, "F"};
    if (compute) trace = {trace, $sformatf("C%0d", stage)};
    if (out_valid) trace = {trace, "O"};
  end

  initial begin
    int t0, t;
    in_valid = 0;
    D = 10;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      D = 5 + 37 * r;
      trace = "";
      @(negedge clk);
      check(in_ready, "ready when idle");
      in_valid = 1;
      t0 = 0;
      @(negedge clk);
      in_valid = 0;
      t = 1;
      while (!out_valid) begin
        check(!in_ready, "not ready while busy");
        @(negedge clk);
        t++;
      end
      check(t == 4 * (D + 4) + 1, $sformatf("D=%0d: out_valid after %0d cycles, expected %0d", D, t, 4 * (D + 4) + 1));
      @(negedge clk);
      check(resp_cycles == 32'(t), $sformatf("resp_cycles=%0d, measured %0d", resp_cycles, t));
      check(trace == "LS0FC0S1FC1S2FC2S3FC3O", {"command trace ", trace});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

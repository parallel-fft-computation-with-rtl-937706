// tb_dm_ctrl: the pipeline sequencer against models of the PEs (busy for B
// cycles after compute) and of the network (busy for D cycles after
// frame_start). Checks the command trace of a step (load, compute, output,
// eight send/frame pairs with send_idx 0..7), the step length
// 4 + B + 8*(D + 3) with the busy models, that out_valid only comes
// with last_valid, that steps stop when there is no work and that the step
// counter counts; in every cycle, that at most one command is issued and
// none while the PE or network model is busy.
module tb_dm_ctrl;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, load, compute, pe_busy, pipe_active, last_valid, out_valid;
  logic send, frame_start, noc_busy;
  logic [2:0] send_idx;
  logic [31:0] steps;
  int checks = 0, failures = 0;
  int B = 8, D = 20;
  longint cycle = 0;

  dm_ctrl dut (.*);
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

  int pc = 0, nc = 0;
  always @(posedge clk) begin
    if (compute) pc <= B; else if (pc > 0) pc <= pc - 1;
    if (frame_start) nc <= D; else if (nc > 0) nc <= nc - 1;
  end
  assign pe_busy  = (pc > 0);
  assign noc_busy = (nc > 0);

  string trace;
  longint t_comp [$];
  always @(posedge clk) if (rst_n) begin
    if (load) trace = {trace, "L"};
    if (compute) begin trace = {trace, "C"}; t_comp.push_back(cycle); end
    if (out_valid) trace = {trace, "O"};
    if (send) trace = {trace, $sformatf("S%0d", send_idx)};
    if (frame_start) trace = {trace, "F"};
    if (out_valid) check(last_valid, "out_valid without last_valid");
    // every cycle: at most one command, and nothing issued while a PE
    // computes or a frame is on the network
    check($onehot0({load, compute, send, frame_start}), "more than one command");
    check(!((send || frame_start || compute || in_ready) && (noc_busy || pe_busy)),
          "command issued while busy");
    check(!load || in_valid, "load without in_valid");
  end

  localparam string STEP_TR = "S0FS1FS2FS3FS4FS5FS6FS7F";

  initial begin
    longint d;
    in_valid = 0; pipe_active = 0; last_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    check(steps == 0 && in_ready, "no steps without work");
    for (int r = 0; r < 4; r++) begin
      B = 4 + 4 * (r % 2);
      D = 10 + 50 * r;
      trace = "";
      t_comp.delete();
      @(negedge clk);
      in_valid = 1;
      last_valid = (r >= 2);
      @(negedge clk);
      in_valid = 0;
      pipe_active = 1;
      while (!in_ready) @(negedge clk);   // step 1 done
      while (in_ready) @(negedge clk);    // step 2 runs on pipe_active
      pipe_active = 0;
      while (!in_ready) @(negedge clk);
      repeat (30) @(negedge clk);
      check(trace == {"LC", r >= 2 ? "O" : "", STEP_TR, "C", r >= 2 ? "O" : "", STEP_TR},
            {"trace ", trace});
      d = t_comp[1] - t_comp[0];
      check(d == 4 + B + 8 * (D + 3), $sformatf("step of %0d cycles, expected %0d", d, 4 + B + 8 * (D + 3)));
      check(steps == 32'(2 * (r + 1)), $sformatf("steps=%0d", steps));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

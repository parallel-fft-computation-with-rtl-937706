// tb_cdma_switch: plays the modulated codewords of the worked example
// (sources 1..8 sending to destinations 8,5,6,2,3,1,4,7) chip by chip and
// expects the printed chip sums S = [3 3 3 7 5 5 5 5]; then checks random
// chip patterns against a population count, with the one-cycle register
// delay of both the sum and the frame marker.
module tb_cdma_switch;
  localparam int N = 8;
  localparam string MOD [8] = '{"10010110", "00001111", "01011010", "01010101",
                                "00110011", "11111111", "10011001", "00111100"};
  localparam int S_EX [8] = '{3, 3, 3, 7, 5, 5, 5, 5};
  logic clk = 0, rst_n = 0;
  logic [N-1:0] chips;
  logic sof_in, sof_out;
  logic [3:0] sum;
  int checks = 0, failures = 0;

  cdma_switch #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] prev_chips;
    logic prev_sof;
    int pc;
    chips = '0; sof_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      for (int s = 0; s < 8; s++) chips[s] = (MOD[s][i] == "1");
      sof_in = (i == 0);
      @(negedge clk);
      check(sum == S_EX[i], $sformatf("example chip %0d: S=%0d, expected %0d", i, sum, S_EX[i]));
      check(sof_out == (i == 0), "sof delayed by one cycle");
    end
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      chips = N'($urandom); sof_in = ($urandom_range(7) == 0);
      prev_chips = chips; prev_sof = sof_in;
      @(negedge clk);
      pc = 0;
      for (int s = 0; s < N; s++) pc += prev_chips[s];
      check(sum == pc, "random chip sum");
      check(sof_out == prev_sof, "random sof");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

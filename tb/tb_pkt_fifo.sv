// tb_pkt_fifo: random pushes and pops against a queue model; checks data
// order, the ready/valid flags and the count, including full and empty.
module tb_pkt_fifo;
  localparam int W = 38, D = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, wr_ready, rd_valid;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] model [$];

  pkt_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(count == model.size(), $sformatf("count %0d, model %0d", count, model.size()));
      check(wr_ready == (model.size() < D), "wr_ready");
      check(rd_valid == (model.size() > 0), "rd_valid");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      if (model.size() == D) n_full++;
      if (model.size() == 0) n_empty++;
      // bias the traffic so both full and empty phases occur
      wr_en   = wr_ready && ($urandom_range(99) < ((i / 500) % 2 ? 30 : 70));
      rd_en   = rd_valid && ($urandom_range(99) < ((i / 500) % 2 ? 70 : 30));
      wr_data = {$urandom, $urandom};
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cdma_tx: sends random packets to every destination and compares every
// chip with the modulation rule applied to the codewords of the worked
// example (0 = codeword, 1 = inverted codeword). Also checks the frame
// length (PKT_W*L chips), that a frame without a buffered packet sends only
// zero chips ("no data") and pops nothing, and that frame_start is ignored
// while a frame is in flight.
module tb_cdma_tx;
  import fft_ref_pkg::*;
  localparam int L = 8, AW = 3, PW = 38;
  logic clk = 0, rst_n = 0;
  logic pkt_valid, pkt_pop, frame_start, chip, busy;
  logic [PW-1:0] pkt;
  int checks = 0, failures = 0, pops = 0;

  cdma_tx #(.L(L), .ADDR_W(AW), .PKT_W(PW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (pkt_pop) pops++;

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
    logic [PW-1:0] p;
    int dst, pops0;
    pkt_valid = 0; frame_start = 0; pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // idle: zero chips
    repeat (5) begin @(negedge clk); check(chip == 0 && !busy, "idle output"); end
    // empty buffer: frame_start sends nothing
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    repeat (20) begin check(chip == 0 && !busy, "no-data frame"); @(negedge clk); end
    check(pops == 0, "pop without a packet");
    for (int t = 0; t < 40; t++) begin
      dst = t % 8;
      p = {$urandom, $urandom};
      p[PW-AW-1 -: AW] = AW'(dst);
      pops0 = pops;
      @(negedge clk);
      pkt = p; pkt_valid = 1; frame_start = 1;
      @(negedge clk);
      frame_start = 0; pkt_valid = 0;
      for (int b = 0; b < PW; b++)
        for (int i = 0; i < L; i++) begin
          check(busy, "busy during frame");
          check(chip == (p[PW-1-b] ^ code_chip(dst, i)),
                $sformatf("packet %0d bit %0d chip %0d", t, b, i));
          // a second frame_start in flight must be ignored
          frame_start = (b == 3 && i == 2);
          pkt_valid   = (b == 3 && i == 2);
          @(negedge clk);
          frame_start = 0; pkt_valid = 0;
        end
      check(!busy && chip == 0, "frame ends after PKT_W*L chips");
      check(pops == pops0 + 1, "exactly one pop per frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

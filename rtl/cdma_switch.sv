// cdma_switch: the central switch of the CDMA star network.
//
// Every node's transmitter drives one chip line into the switch. In each
// chip cycle the switch adds up the chips of all N nodes, S = number of ones
// (0..N), and broadcasts S to every node's demodulator. No routing happens
// here: the destination of each bit stream is carried only by the Walsh
// codeword it was spread with, and the receivers separate the streams.
//
// Timing: S is registered, so the sum of the chips present in cycle t is on
// `sum` in cycle t+1. The chip-0 marker of a frame (sof_in, aligned with the
// first chip) is delayed with it, giving the receivers their frame timing.
// The registered output stage is this design's choice.
module cdma_switch #(
  parameter int unsigned N = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0]            chips,
  input  logic                    sof_in,
  output logic [$clog2(N+1)-1:0]  sum,
  output logic                    sof_out
);
  localparam int unsigned SW = $clog2(N + 1);

  logic [SW-1:0] sum_d;

  always_comb begin
    sum_d = '0;
    for (int i = 0; i < N; i++) sum_d = sum_d + SW'(chips[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum     <= '0;
      sof_out <= 1'b0;
    end else begin
      sum     <= sum_d;
      sof_out <= sof_in;
    end
  end
endmodule

// cdma_noc: CDMA-based star network-on-chip for N nodes.
//
// Each node has a packet buffer (pkt_fifo), a transmitter/modulator
// (cdma_tx) and a demodulator/receiver (cdma_rx); all nodes connect to one
// central switch (cdma_switch) that adds up their chips. Node n owns Walsh
// codeword n; a packet for node n is spread with codeword n, so all N nodes
// can send at the same time, each to a different destination, without
// interfering. By default node 0 owns the all-zero codeword: the "no
// data" pattern is not reserved, because in the intended use every node
// sends in every frame, and node 0 then cannot tell "no data" from data.
// With RESERVE_ZERO = 1 node n owns codeword n+1 instead, the all-zero
// pattern means "no data" for every node, and at most L-1 nodes fit.
//
// Operation is frame-synchronous: a pulse on frame_start (ignored while
// busy) makes every transmitter with a buffered packet send it, all aligned.
// The frame is PKT_W bits of L chips each. Every receiver delivers what it
// decoded one pulse of rx_valid later, with no-data / error flags.
//
// Timing: frame_start in cycle t, chips on the lines in cycles t+1 ..
// t+PKT_W*L, chip sums one cycle later, rx_valid in cycle t+PKT_W*L+2, so
// a packet takes PKT_W*L + 2 cycles of the chip clock from frame start to
// delivery. busy is high from t+1 until rx_valid.
module cdma_noc #(
  parameter int unsigned N          = 8,
  parameter int unsigned L          = 8,
  parameter int unsigned ADDR_W     = 3,
  parameter int unsigned PKT_W      = 38,
  parameter int unsigned FIFO_DEPTH = 2,
  parameter bit          RESERVE_ZERO = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tx_valid  [N],
  input  logic [PKT_W-1:0] tx_pkt    [N],
  output logic             tx_ready  [N],
  input  logic             frame_start,
  output logic             busy,
  output logic             rx_valid  [N],
  output logic [PKT_W-1:0] rx_pkt    [N],
  output logic             rx_nodata [N],
  output logic             rx_err    [N]
);
  localparam int unsigned SW = $clog2(N + 1);

  logic [N-1:0]  chips, tx_busy, rx_busy;
  logic [SW-1:0] sum;
  logic          sof_chip, sof_sum, go;

  assign go = frame_start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sof_chip <= 1'b0;
    else        sof_chip <= go;
  end

  for (genvar n = 0; n < N; n++) begin : g_node
    logic             q_valid, q_pop;
    logic [PKT_W-1:0] q_pkt;
    logic signed [7:0] lam;
    logic             lam_v;
    logic [$clog2(FIFO_DEPTH):0] q_count;

    pkt_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_en   (tx_valid[n]),
      .wr_data (tx_pkt[n]),
      .wr_ready(tx_ready[n]),
      .rd_en   (q_pop),
      .rd_data (q_pkt),
      .rd_valid(q_valid),
      .count   (q_count)
    );

    cdma_tx #(.L(L), .ADDR_W(ADDR_W), .PKT_W(PKT_W), .RESERVE_ZERO(RESERVE_ZERO)) u_tx (
      .clk, .rst_n,
      .pkt_valid  (q_valid),
      .pkt        (q_pkt),
      .pkt_pop    (q_pop),
      .frame_start(go),
      .chip       (chips[n]),
      .busy       (tx_busy[n])
    );

    cdma_rx #(.L(L), .N(N), .ADDR_W(ADDR_W), .PKT_W(PKT_W), .NODE_ID(n),
              .RESERVE_ZERO(RESERVE_ZERO)) u_rx (
      .clk, .rst_n,
      .sum         (sum),
      .sof         (sof_sum),
      .pkt_valid   (rx_valid[n]),
      .pkt         (rx_pkt[n]),
      .pkt_nodata  (rx_nodata[n]),
      .pkt_err     (rx_err[n]),
      .lambda      (lam),
      .lambda_valid(lam_v),
      .busy        (rx_busy[n])
    );
  end

  cdma_switch #(.N(N)) u_switch (
    .clk, .rst_n,
    .chips  (chips),
    .sof_in (sof_chip),
    .sum    (sum),
    .sof_out(sof_sum)
  );

  assign busy = sof_chip || sof_sum || (|tx_busy) || (|rx_busy);
  initial assert (N + RESERVE_ZERO <= L) else $error("more nodes than codewords");
endmodule

// cdma_rx: demodulator and receiver of one network node.
//
// The demodulator knows only the chip sums S[i] broadcast by the switch and
// its own Walsh codeword c. For every chip it forms the decision variable
//   D[i] = 2*S[i] - L   if c[i] = 0
//   D[i] = L - 2*S[i]   if c[i] = 1
// and after the L chips of one bit the decision factor lambda = sum(D)/L.
// lambda = +1 decodes as bit 1, -1 as bit 0 and 0 as "no data sent"; any
// other value means the chip stream was not a valid superposition of
// orthogonal codewords and is reported as an error. Since the sum is a
// multiple of L in every valid case, the division is an arithmetic shift.
// The receiver shifts the decoded bits into a packet register, MSB first.
//
// Timing: sof marks the cycle in which the sum of chip 0 of bit 0 is on
// `sum`. lambda/lambda_valid appear one cycle after the last chip of each
// bit; pkt_valid pulses one cycle after the last chip of the last bit, with
// the packet, its no-data flag (some bit had lambda = 0) and its error flag
// (some bit had |lambda| > 1, or a packet with data carries a destination
// other than NODE_ID).
// The own codeword is Walsh row NODE_ID + RESERVE_ZERO (see cdma_tx).
module cdma_rx #(
  parameter int unsigned L       = 8,
  parameter int unsigned N       = 8,     // nodes on the switch (width of S)
  parameter int unsigned ADDR_W  = 3,
  parameter int unsigned PKT_W   = 38,
  parameter int unsigned NODE_ID = 0,     // selects the own codeword
  parameter bit          RESERVE_ZERO = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(N+1)-1:0] sum,
  input  logic                   sof,
  output logic                   pkt_valid,
  output logic [PKT_W-1:0]       pkt,
  output logic                   pkt_nodata,
  output logic                   pkt_err,
  output logic signed [7:0]      lambda,
  output logic                   lambda_valid,
  output logic                   busy
);
  localparam int unsigned CW = $clog2(L);
  localparam int unsigned BW = $clog2(PKT_W);
  localparam int unsigned AW = 16;                  // accumulator width
  localparam int unsigned DST_LSB = PKT_W - 2 * ADDR_W;

  logic [L-1:0] code;
  always_comb for (int i = 0; i < L; i++) code[i] = ^(CW'(i) & CW'(NODE_ID + RESERVE_ZERO));

  logic                 active;
  logic [CW-1:0]        chip_cnt;
  logic [BW-1:0]        bit_cnt;
  logic signed [AW-1:0] acc;
  logic [PKT_W-1:0]     shreg;
  logic                 nodata_seen, err_seen;

  logic                 in_frame;
  logic [CW-1:0]        chip_idx;
  logic signed [AW-1:0] d_i, acc_next, lam_full;
  logic                 bit_done, bit_val, bit_nodata, bit_err;
  logic [PKT_W-1:0]     pkt_next;

  assign in_frame = sof || active;
  assign chip_idx = sof ? '0 : chip_cnt;

  always_comb begin
    d_i = (AW'(signed'({1'b0, sum})) <<< 1) - AW'(L);
    if (code[chip_idx]) d_i = -d_i;
    acc_next   = (sof ? '0 : acc) + d_i;
    lam_full   = acc_next >>> CW;
    bit_done   = in_frame && (chip_idx == CW'(L - 1));
    bit_val    = (lam_full > 0);
    bit_nodata = (lam_full == 0);
    bit_err    = (lam_full > 1) || (lam_full < -1);
    pkt_next   = {shreg[PKT_W-2:0], bit_val};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active       <= 1'b0;
      chip_cnt     <= '0;
      bit_cnt      <= '0;
      acc          <= '0;
      shreg        <= '0;
      nodata_seen  <= 1'b0;
      err_seen     <= 1'b0;
      pkt_valid    <= 1'b0;
      pkt          <= '0;
      pkt_nodata   <= 1'b0;
      pkt_err      <= 1'b0;
      lambda       <= '0;
      lambda_valid <= 1'b0;
    end else begin
      pkt_valid    <= 1'b0;
      lambda_valid <= 1'b0;
      if (in_frame) begin
        if (sof) begin
          active      <= 1'b1;
          bit_cnt     <= '0;
          nodata_seen <= 1'b0;
          err_seen    <= 1'b0;
        end
        chip_cnt <= chip_idx + 1'b1;
        acc      <= acc_next;
        if (bit_done) begin
          acc          <= '0;
          lambda       <= 8'(lam_full);
          lambda_valid <= 1'b1;
          shreg        <= pkt_next;
          bit_cnt      <= (sof ? '0 : bit_cnt) + 1'b1;
          if (bit_nodata) nodata_seen <= 1'b1;
          if (bit_err)    err_seen    <= 1'b1;
          if (!sof && bit_cnt == BW'(PKT_W - 1)) begin
            active     <= 1'b0;
            pkt_valid  <= 1'b1;
            pkt        <= pkt_next;
            pkt_nodata <= nodata_seen || bit_nodata;
            pkt_err    <= err_seen || bit_err ||
                          (!(nodata_seen || bit_nodata) &&
                           pkt_next[DST_LSB +: ADDR_W] != ADDR_W'(NODE_ID));
          end
        end
      end
    end
  end

  assign busy = active;
endmodule

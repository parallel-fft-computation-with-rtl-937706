// cdma_tx: transmitter and modulator of one network node.
//
// When frame_start is pulsed and the packet buffer holds a packet, the
// transmitter pops it, reads its destination address and selects the Walsh
// codeword of that destination. It then sends the packet serially, MSB first
// ({src, dst, payload}), one bit per L chip cycles: a 0 bit is sent as the
// codeword itself and a 1 bit as the inverted codeword (the modulation rule
// of the design). With no packet, or between frames, it sends the all-zero
// chip pattern, the "no data" case of that rule.
//
// Timing: frame_start in cycle t loads the packet at the edge ending t; chip
// 0 of bit 0 is on `chip` in cycle t+1 and the frame lasts PKT_W*L cycles.
// All transmitters of a network are started by the same frame_start, so
// their chips are aligned, which the receivers rely on. The clock of this
// block is the chip clock; the bit (system) clock is the chip clock divided
// by L, as in the design, and is represented here by the chip counter.
//
// Code assignment: with RESERVE_ZERO = 0 (default) node d owns Walsh row d,
// so node 0 owns the all-zero row and L codes serve L nodes, as the design
// allows for the FFT, where every node sends in every frame. With
// RESERVE_ZERO = 1 node d owns row d+1 and the all-zero row is kept for
// "no data", the general assignment for up to L-1 nodes.
module cdma_tx #(
  parameter int unsigned L      = 8,    // codeword length (chips per bit)
  parameter int unsigned ADDR_W = 3,
  parameter int unsigned PKT_W  = 38,   // {src[ADDR_W], dst[ADDR_W], payload}
  parameter bit          RESERVE_ZERO = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  // packet buffer side
  input  logic             pkt_valid,
  input  logic [PKT_W-1:0] pkt,
  output logic             pkt_pop,
  // network side
  input  logic             frame_start,
  output logic             chip,       // modulated chip to the switch
  output logic             busy
);
  localparam int unsigned CW = $clog2(L);
  localparam int unsigned BW = $clog2(PKT_W);
  localparam int unsigned DST_LSB = PKT_W - 2 * ADDR_W;

  logic [PKT_W-1:0]  shreg;
  logic [L-1:0]      code;      // code[i] = chip i of the destination codeword
  logic [CW-1:0]     chip_cnt;
  logic [BW-1:0]     bit_cnt;
  logic              sending;

  assign pkt_pop = frame_start && !sending && pkt_valid;
  assign busy    = sending;

  function automatic logic [L-1:0] codeword(logic [ADDR_W-1:0] a);
    logic [L-1:0] c;
    for (int i = 0; i < L; i++) c[i] = ^(CW'(i) & CW'(a + RESERVE_ZERO));
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg    <= '0;
      code     <= '0;
      chip_cnt <= '0;
      bit_cnt  <= '0;
      sending  <= 1'b0;
    end else if (pkt_pop) begin
      shreg    <= pkt;
      code     <= codeword(pkt[DST_LSB +: ADDR_W]);
      chip_cnt <= '0;
      bit_cnt  <= '0;
      sending  <= 1'b1;
    end else if (sending) begin
      chip_cnt <= chip_cnt + 1'b1;
      if (chip_cnt == CW'(L - 1)) begin
        shreg   <= shreg << 1;
        bit_cnt <= bit_cnt + 1'b1;
        if (bit_cnt == BW'(PKT_W - 1)) sending <= 1'b0;
      end
    end
  end

  assign chip = sending ? (shreg[PKT_W-1] ^ code[chip_cnt]) : 1'b0;

  initial assert (L >= 2 && (L & (L - 1)) == 0) else $error("L must be a power of two");
  a_code_exists: assert property (@(posedge clk) disable iff (!rst_n)
                                  pkt_pop |-> 32'(pkt[DST_LSB +: ADDR_W]) + RESERVE_ZERO < L);
  initial assert ((1 << ADDR_W) <= L) else $error("codeword too short for the address space");
endmodule

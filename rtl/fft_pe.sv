// fft_pe: processing element of the indirectly mapped 16-point FFT.
//
// The PE holds one pair of complex values (lo, hi), which together form one
// of the eight "virtual data paths" of the mapping. A 16-point FFT takes
// four rounds, one per radix-2 stage. In each round the PE
//   1. on `send`: hands one of its two values to the network as a packet
//      {src = PE_ID, dst = partner, payload}; a "lower" PE gives its hi
//      value, an "upper" PE its lo value;
//   2. on arrival of the partner's packet: stores the payload in the slot it
//      gave away (rx_done rises);
//   3. on `compute`: replaces (lo, hi) by the butterfly (lo + hi,
//      (lo - hi) * W16^e) in one clock cycle.
// So the PE computes four butterflies in sequence, one per stage. The
// partner, role and twiddle exponent of each stage are constants derived
// from PE_ID by cdma_pkg::pe_schedule. After the fourth compute the PE holds
// two FFT outputs in bit-reversed positions (see cdma_pkg::out_pe).
//
// The data placement follows the design: PE p is loaded with x(2p), x(2p+1)
// and in the first stage exchanges with PE p+4 (p<4). The exact pairing of
// later stages, the one-value-per-packet payload and the flags are this
// design's own reading of the indirect mapping.
//
// Interface: load (with load_lo/load_hi) writes the pair and clears the
// flags; send/compute carry the stage number on `stage`. err is sticky and
// reports a packet that came from the wrong PE or was received with errors.
module fft_pe
  import cdma_pkg::*;
#(
  parameter int unsigned PE_ID = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  cplx_t             load_lo,
  input  cplx_t             load_hi,
  input  logic              send,
  input  logic              compute,
  input  logic [1:0]        stage,
  // network interface
  output logic              tx_valid,
  output logic [PKT_W-1:0]  tx_pkt,
  input  logic              tx_ready,
  input  logic              rx_valid,
  input  logic [PKT_W-1:0]  rx_pkt,
  input  logic              rx_err,
  // state
  output cplx_t             lo,
  output cplx_t             hi,
  output logic              rx_done,
  output logic              sat,
  output logic              err
);
  localparam sched_tab_t SCHED = pe_schedule(PE_ID);

  sched_t cur;
  pkt_t   out_p, in_p;
  cplx_t  y0, y1;
  logic   bf_sat;

  assign cur  = SCHED[stage];
  assign in_p = pkt_t'(rx_pkt);

  always_comb begin
    out_p.src     = ADDR_W'(PE_ID);
    out_p.dst     = cur.partner;
    out_p.payload = cur.upper ? lo : hi;
  end
  assign tx_valid = send;
  assign tx_pkt   = PKT_W'(out_p);

  dif_butterfly u_bf (
    .a  (lo),
    .b  (hi),
    .e  (cur.tw),
    .y0 (y0),
    .y1 (y1),
    .sat(bf_sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo      <= '0;
      hi      <= '0;
      rx_done <= 1'b0;
      sat     <= 1'b0;
      err     <= 1'b0;
    end else if (load) begin
      lo      <= load_lo;
      hi      <= load_hi;
      rx_done <= 1'b0;
      sat     <= 1'b0;
      err     <= 1'b0;
    end else begin
      if (send) rx_done <= 1'b0;
      if (rx_valid) begin
        if (cur.upper) lo <= in_p.payload;
        else           hi <= in_p.payload;
        rx_done <= 1'b1;
        if (rx_err || in_p.src != cur.partner) err <= 1'b1;
      end
      if (compute) begin
        lo  <= y0;
        hi  <= y1;
        sat <= sat | bf_sat;
      end
    end
  end

  a_tx_accepted: assert property (@(posedge clk) disable iff (!rst_n) send |-> tx_ready);
  a_no_rx_during_compute: assert property (@(posedge clk) disable iff (!rst_n) !(rx_valid && compute));
endmodule

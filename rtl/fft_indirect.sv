// fft_indirect: 16-point FFT on eight PEs joined by a CDMA star network,
// with the indirect mapping.
//
// Eight fft_pe blocks, one cdma_noc (eight buffered Walsh-code transmitters,
// a summing star switch and eight demodulating receivers) and the fft_ctrl
// sequencer. The transform is a radix-2 decimation-in-frequency FFT with the
// "indirect" mapping: each PE owns one pair of values and computes one
// butterfly per stage; before every stage all eight PEs swap one value with
// a partner PE at the same time through the switch.
//
// Interface: when in_ready is high, in_valid with in_data[0..15] (time
// order, complex Q5.10) starts a transform; PE p takes x(2p) and x(2p+1).
// out_valid pulses once with out_data[0..15] in natural frequency order
// (the bit-reversed placement in the PEs is undone by wiring). out_sat
// reports that some butterfly saturated, out_err that some packet arrived
// from the wrong PE or with a demodulation error. resp_cycles is the
// response time of the last transform in chip-clock cycles
// (4*(38*8+6)+1 = 1241 at the default sizes).
module fft_indirect
  import cdma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx_t       in_data  [FFT_N],
  output logic        out_valid,
  output cplx_t       out_data [FFT_N],
  output logic        out_sat,
  output logic        out_err,
  output logic [31:0] resp_cycles
);
  logic             load, send, frame_start, compute, noc_busy;
  logic [1:0]       stage;
  logic             tx_valid [N_PE];
  logic [PKT_W-1:0] tx_pkt   [N_PE];
  logic             tx_ready [N_PE];
  logic             rx_valid [N_PE];
  logic [PKT_W-1:0] rx_pkt   [N_PE];
  logic             rx_nodata[N_PE];
  logic             rx_err   [N_PE];
  cplx_t            pe_lo    [N_PE];
  cplx_t            pe_hi    [N_PE];
  logic [N_PE-1:0]  rx_done, pe_sat, pe_err;

  fft_ctrl #(.STAGES(STAGES)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready,
    .load, .send, .frame_start, .compute, .stage,
    .all_rx_done(&rx_done),
    .out_valid,
    .resp_cycles
  );

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    fft_pe #(.PE_ID(p)) u_pe (
      .clk, .rst_n,
      .load,
      .load_lo (in_data[2*p]),
      .load_hi (in_data[2*p+1]),
      .send, .compute, .stage,
      .tx_valid(tx_valid[p]),
      .tx_pkt  (tx_pkt[p]),
      .tx_ready(tx_ready[p]),
      .rx_valid(rx_valid[p]),
      .rx_pkt  (rx_pkt[p]),
      .rx_err  (rx_err[p] || rx_nodata[p]),
      .lo      (pe_lo[p]),
      .hi      (pe_hi[p]),
      .rx_done (rx_done[p]),
      .sat     (pe_sat[p]),
      .err     (pe_err[p])
    );
  end

  cdma_noc #(.N(N_PE), .L(CODE_L), .ADDR_W(ADDR_W), .PKT_W(PKT_W)) u_noc (
    .clk, .rst_n,
    .tx_valid, .tx_pkt, .tx_ready,
    .frame_start,
    .busy(noc_busy),
    .rx_valid, .rx_pkt, .rx_nodata, .rx_err
  );

  // Post-processing: X(m) sits in PE out_pe(m), slot out_slot(m).
  for (genvar m = 0; m < FFT_N; m++) begin : g_out
    localparam int unsigned P = out_pe(m);
    localparam logic        S = out_slot(m);
    assign out_data[m] = S ? pe_hi[P] : pe_lo[P];
  end

  assign out_sat = |pe_sat;
  assign out_err = |pe_err;
endmodule

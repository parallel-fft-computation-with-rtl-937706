// fft_direct: 16-point FFT on eight PEs joined by a CDMA star network,
// with the direct mapping.
//
// Eight dm_pe blocks form two four-stage chains, PE1->PE3->PE5->PE7 and
// PE2->PE4->PE6->PE8 (node numbers 0,2,4,6 and 1,3,5,7 on the network):
// node 2s+h computes stage s for half h of the data. Both stage-0 PEs take
// all 16 inputs; from stage 1 on the two halves are independent 8-point
// transforms. The dm_ctrl sequencer advances the pipeline in steps: load,
// compute, then eight network frames in which PEs 0..5 each pass one value
// to their successor simultaneously. Nodes 0 and 1 never receive; in every
// frame the receivers of nodes whose predecessor has nothing to send see
// "no data" (decision factor 0) and ignore it.
//
// Interface: when in_ready is high, in_valid with in_data[0..15] (time
// order, complex Q5.10) enters the pipeline; out_valid pulses with
// out_data[0..15] in natural frequency order three steps later. A new
// transform can be accepted every step, so up to four are in flight.
// out_sat reports a saturated butterfly in the transform being output,
// out_err a packet from the wrong PE or with a demodulation error;
// steps counts pipeline steps.
module fft_direct
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
  output logic [31:0] steps
);
  logic             load, compute, send, frame_start, noc_busy;
  logic [2:0]       send_idx;
  logic             tx_valid [N_PE];
  logic [PKT_W-1:0] tx_pkt   [N_PE];
  logic             tx_ready [N_PE];
  logic             rx_valid [N_PE];
  logic [PKT_W-1:0] rx_pkt   [N_PE];
  logic             rx_nodata[N_PE];
  logic             rx_err   [N_PE];
  cplx_t            pe_out   [N_PE][8];
  logic [N_PE-1:0]  pe_busy, in_full, out_ok, pe_sat, pe_err;

  dm_ctrl u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .load, .compute,
    .pe_busy    (|pe_busy),
    .pipe_active(|in_full),
    .last_valid (out_ok[6] && out_ok[7]),
    .out_valid,
    .send, .send_idx, .frame_start,
    .noc_busy,
    .steps
  );

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    dm_pe #(.PE_ID(p)) u_pe (
      .clk, .rst_n,
      .load, .load_data(in_data),
      .compute, .busy(pe_busy[p]),
      .send, .send_idx,
      .tx_valid (tx_valid[p]),
      .tx_pkt   (tx_pkt[p]),
      .rx_valid (rx_valid[p]),
      .rx_pkt   (rx_pkt[p]),
      .rx_nodata(rx_nodata[p]),
      .rx_err   (rx_err[p]),
      .in_full  (in_full[p]),
      .out_valid(out_ok[p]),
      .out_data (pe_out[p]),
      .sat      (pe_sat[p]),
      .err      (pe_err[p])
    );
  end

  cdma_noc #(.N(N_PE), .L(CODE_L), .ADDR_W(ADDR_W), .PKT_W(PKT_W)) u_noc (
    .clk, .rst_n,
    .tx_valid, .tx_pkt, .tx_ready,
    .frame_start,
    .busy(noc_busy),
    .rx_valid, .rx_pkt, .rx_nodata, .rx_err
  );

  // X(m) is DIF output bitrev(m): half bitrev(m)/8 (node 6 or 7), slot bitrev(m)%8
  for (genvar m = 0; m < FFT_N; m++) begin : g_out
    localparam int unsigned G = bitrev4(m);
    assign out_data[m] = pe_out[6 + G / 8][G % 8];
  end

  // saturation is tracked per PE for the transform it last computed; the
  // transform leaving now was in stage s three..zero steps ago, so the
  // flags of the earlier stages are carried along with it
  logic [2:0] sat_pipe [3];   // [0]: stage 0 result of the transform now in stage 1, ...
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) sat_pipe[i] <= '0;
    end else if (compute) begin
      // sampled at the start of a step: flags of the step just finished
      sat_pipe[0] <= {2'b0, pe_sat[0] | pe_sat[1]};
      sat_pipe[1] <= {1'b0, pe_sat[2] | pe_sat[3], sat_pipe[0][0]};
      sat_pipe[2] <= {pe_sat[4] | pe_sat[5], sat_pipe[1][1:0]};
    end
  end
  assign out_sat = pe_sat[6] | pe_sat[7] | (|sat_pipe[2]);
  assign out_err = |pe_err;

  for (genvar p = 0; p < N_PE; p++) begin : g_rdy
    a_tx_room: assert property (@(posedge clk) disable iff (!rst_n) tx_valid[p] |-> tx_ready[p]);
  end
endmodule

// dm_pe: processing element of the directly mapped 16-point FFT.
//
// In the direct mapping each radix-2 stage is owned by two PEs and the data
// flows down two chains, PE1->PE3->PE5->PE7 and PE2->PE4->PE6->PE8 (numbered
// from 1; PE_ID here counts from 0, so the chains are 0,2,4,6 and 1,3,5,7).
// STAGE = PE_ID/2 and HALF = PE_ID%2.
//  - Stage-0 PEs (PE1, PE2) both receive all 16 inputs from the host: the
//    first stage pairs x(k) with x(k+8), so PE1 keeps the sums x(k)+x(k+8)
//    (k = 0..7) and PE2 the rotated differences (x(k)-x(k+8))*W16^k. After
//    that the two halves are independent 8-point transforms.
//  - Stage-s PEs (s = 1..3) hold the 8 values of their half, compute the
//    4 butterflies of span 8>>s with twiddles W16^((j mod span) << s) and
//    pass the 8 results on.
// Each PE uses one dif_butterfly, one operation per clock cycle (8 for a
// stage-0 PE, 4 otherwise), and the network carries one value per packet to
// PE_ID+2; the i-th packet of a step lands in slot i of the receiver.
//
// Interface: `load` (stage 0 only) captures load_data; `compute` starts the
// butterflies on the input buffer if it is full (in_full) and marks the
// output buffer valid at the end; `send` with send_idx pushes output value
// send_idx as a packet if the output buffer is valid (stage 0..2);
// received packets flagged "no data" are dropped. out_data/out_valid expose
// the output buffer (used at stage 3). The split of the work between PE1
// and PE2 follows the published remark that they share the same input data;
// the step-wise buffering and the interface are this design's choices.
module dm_pe
  import cdma_pkg::*;
#(
  parameter int unsigned PE_ID = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  cplx_t             load_data [FFT_N],
  input  logic              compute,
  output logic              busy,
  input  logic              send,
  input  logic [2:0]        send_idx,
  output logic              tx_valid,
  output logic [PKT_W-1:0]  tx_pkt,
  input  logic              rx_valid,
  input  logic [PKT_W-1:0]  rx_pkt,
  input  logic              rx_nodata,
  input  logic              rx_err,
  output logic              in_full,
  output logic              out_valid,
  output cplx_t             out_data [8],
  output logic              sat,
  output logic              err
);
  localparam int unsigned STAGE = PE_ID / 2;
  localparam int unsigned HALF  = PE_ID % 2;
  localparam int unsigned NOPS  = (STAGE == 0) ? 8 : 4;
  localparam int unsigned SPAN  = 8 >> STAGE;            // span of this stage's butterflies

  cplx_t       inbuf [FFT_N];    // stage 0 uses 16 entries, the others 8
  logic [3:0]  rx_cnt;
  logic        running;
  logic [2:0]  op;
  cplx_t       a, b, y0, y1;
  logic [2:0]  e;
  logic        bf_sat;
  logic [2:0]  ja, jb;
  pkt_t        out_p, in_p;

  // operands of operation `op`
  always_comb begin
    if (STAGE == 0) begin
      ja = op;
      jb = op;
      a  = inbuf[4'(op)];
      b  = inbuf[4'(op) + 4'd8];
      e  = op;
    end else begin
      // op-th butterfly of span SPAN among 8 local values: insert a 0 at
      // the span bit position of op
      ja = 3'((((op >> $clog2(SPAN)) << ($clog2(SPAN) + 1)) | (op & 3'(SPAN - 1))));
      jb = ja + 3'(SPAN);
      a  = inbuf[4'(ja)];
      b  = inbuf[4'(jb)];
      e  = 3'((32'(ja) & (SPAN - 1)) << STAGE);
    end
  end

  dif_butterfly u_bf (.a(a), .b(b), .e(e), .y0(y0), .y1(y1), .sat(bf_sat));

  assign in_p = pkt_t'(rx_pkt);
  always_comb begin
    out_p.src     = ADDR_W'(PE_ID);
    out_p.dst     = ADDR_W'(PE_ID + 2);
    out_p.payload = out_data[send_idx];
  end
  assign tx_valid = send && out_valid && (STAGE < 3);
  assign tx_pkt   = PKT_W'(out_p);
  assign busy     = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < FFT_N; i++) inbuf[i] <= '0;
      for (int i = 0; i < 8; i++) out_data[i] <= '0;
      rx_cnt    <= '0;
      in_full   <= 1'b0;
      out_valid <= 1'b0;
      running   <= 1'b0;
      op        <= '0;
      sat       <= 1'b0;
      err       <= 1'b0;
    end else begin
      if (STAGE == 0 && load) begin
        inbuf   <= load_data;
        in_full <= 1'b1;
      end
      if (STAGE != 0 && rx_valid && !rx_nodata) begin
        inbuf[rx_cnt] <= in_p.payload;
        rx_cnt        <= rx_cnt + 1'b1;
        if (rx_cnt == 4'd7) in_full <= 1'b1;
        if (rx_err || in_p.src != ADDR_W'(PE_ID - 2) || rx_cnt > 4'd7) err <= 1'b1;
      end
      if (compute && !running) begin
        running   <= in_full;
        out_valid <= 1'b0;
        op        <= '0;
        if (in_full) sat <= 1'b0;
      end
      if (running) begin
        if (STAGE == 0) begin
          out_data[op] <= (HALF != 0) ? y1 : y0;
        end else begin
          out_data[ja] <= y0;
          out_data[jb] <= y1;
        end
        sat <= sat | bf_sat;
        op  <= op + 1'b1;
        if (op == 3'(NOPS - 1)) begin
          running   <= 1'b0;
          out_valid <= 1'b1;
          in_full   <= 1'b0;
          rx_cnt    <= '0;
        end
      end
    end
  end

  // the step structure keeps network transfers and computation apart, so
  // the input buffer never changes under a running computation
  a_no_rx_while_running: assert property (@(posedge clk) disable iff (!rst_n)
                                          !(running && rx_valid && !rx_nodata));
endmodule

// pkt_fifo: the packet buffer a transmitter takes its packets from.
//
// A small synchronous first-in first-out queue of WIDTH-bit packets, written
// as a register array with read and write pointers one bit wider than the
// address so that full and empty are told apart. Push and pop may happen in
// the same cycle. The head packet is visible on rd_data whenever rd_valid is
// high (first-word fall-through); a pop takes effect at the next clock edge.
// A push while full or a pop while empty is ignored (and flagged by an
// assertion). The design only says the transmitter "receives a packet from
// a buffer"; depth, fall-through behaviour and reset are choices of this RTL.
module pkt_fifo #(
  parameter int unsigned WIDTH = 38,
  parameter int unsigned DEPTH = 4     // power of two
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_ready,   // not full
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,   // not empty
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign count    = wptr - rptr;
  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr[AW-1:0]];
  assign do_wr    = wr_en && wr_ready;
  assign do_rd    = rd_en && rd_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> wr_ready);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_valid);
endmodule

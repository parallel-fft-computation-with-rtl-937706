// fft_ctrl: sequencer of the CDMA-network FFT.
//
// Runs one transform as pre-processing (load), STAGES rounds of
// network exchange and butterfly computation, and post-processing (results
// presented at the output). All PEs are driven by the same commands, so
// every exchange of a round goes through the switch concurrently in one
// network frame.
//
//   IDLE  : in_ready; in_valid -> load (all PEs capture their input pair)
//   SEND  : send (every PE writes its packet into its transmit buffer)
//   START : frame_start (the network sends all eight packets at once)
//   WAIT  : until every PE has received its partner's value (all_rx_done)
//   COMP  : compute (every PE runs its butterfly); next round or DONE
//   DONE  : out_valid for one cycle, results stay on the PE registers
//
// Timing: with a frame of F = PKT_W*L chip cycles, one round takes F + 6
// cycles and a transform STAGES*(F+6) + 1 cycles from the cycle in_valid is
// accepted to the cycle out_valid is high; resp_cycles holds that count for
// the last transform. The design sets the bit (system) clock to 1/L of the
// chip clock; this block runs on the chip clock. The state sequence is this
// design's own; the design describes the three phases but not their control.
module fft_ctrl #(
  parameter int unsigned STAGES = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  output logic                       load,
  output logic                       send,
  output logic                       frame_start,
  output logic                       compute,
  output logic [$clog2(STAGES)-1:0]  stage,
  input  logic                       all_rx_done,
  output logic                       out_valid,
  output logic [31:0]                resp_cycles
);
  typedef enum logic [2:0] {S_IDLE, S_SEND, S_START, S_WAIT, S_COMP, S_DONE} state_t;
  state_t state;
  logic [31:0] cyc;

  assign in_ready    = (state == S_IDLE);
  assign load        = (state == S_IDLE) && in_valid;
  assign send        = (state == S_SEND);
  assign frame_start = (state == S_START);
  assign compute     = (state == S_COMP);
  assign out_valid   = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      stage       <= '0;
      cyc         <= '0;
      resp_cycles <= '0;
    end else begin
      if (state != S_IDLE) cyc <= cyc + 1'b1;
      unique case (state)
        S_IDLE:  if (in_valid) begin
                   state <= S_SEND;
                   stage <= '0;
                   cyc   <= 32'd1;
                 end
        S_SEND:  state <= S_START;
        S_START: state <= S_WAIT;
        S_WAIT:  if (all_rx_done) state <= S_COMP;
        S_COMP:  if (stage == ($clog2(STAGES))'(STAGES - 1)) begin
                   state       <= S_DONE;
                   resp_cycles <= cyc + 1'b1;
                 end else begin
                   state <= S_SEND;
                   stage <= stage + 1'b1;
                 end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_one_command: assert property (@(posedge clk) disable iff (!rst_n)
                                  $onehot0({load, send, frame_start, compute, out_valid}));
endmodule

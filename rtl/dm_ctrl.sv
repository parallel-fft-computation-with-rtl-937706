// dm_ctrl: step sequencer of the directly mapped FFT pipeline.
//
// The direct mapping is a four-stage pipeline over the network. It advances
// in steps; in one step
//   START : in_ready; in_valid -> load (stage-0 PEs capture 16 inputs)
//   COMP  : compute pulse, then wait until no PE is busy (8 cycles)
//   OUT   : out_valid if the last-stage PEs hold a finished transform
//   SEND j, FRAME j, WAIT j (j = 0..7): every PE with results pushes value j
//           to its successor, one network frame carries all of them at once,
//           wait for the frame to end
// so every stage works on a different transform and one transform leaves
// the pipeline per step once it is full. A transform accepted in step k
// comes out in step k+3. Steps run while the pipeline holds data or input
// is offered; otherwise the sequencer waits in START.
//
// Timing: with frames of F = PKT_W*L cycles a step lasts 12 + 8*(F + 4)
// chip-clock cycles (2476 at F = 304) when the stage-0 PEs compute (8
// operations), 4 cycles less when only later stages do (4 operations).
// The step structure is this design's reading of the pipelined direct
// mapping; the published description of the mapping gives no control.
module dm_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  output logic        load,
  output logic        compute,
  input  logic        pe_busy,
  input  logic        pipe_active,    // some PE holds data for the next step
  input  logic        last_valid,     // last-stage results are ready
  output logic        out_valid,
  output logic        send,
  output logic [2:0]  send_idx,
  output logic        frame_start,
  input  logic        noc_busy,
  output logic [31:0] steps
);
  typedef enum logic [2:0] {S_START, S_COMP, S_CWAIT, S_OUT, S_SEND, S_FRAME, S_WAIT} state_t;
  state_t state;
  logic [2:0] j;

  assign in_ready    = (state == S_START);
  assign load        = (state == S_START) && in_valid;
  assign compute     = (state == S_COMP);
  assign out_valid   = (state == S_OUT) && last_valid;
  assign send        = (state == S_SEND);
  assign send_idx    = j;
  assign frame_start = (state == S_FRAME);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_START;
      j     <= '0;
      steps <= '0;
    end else begin
      unique case (state)
        S_START: if (in_valid || pipe_active) begin
                   state <= S_COMP;
                   steps <= steps + 1'b1;
                 end
        S_COMP:  state <= S_CWAIT;
        S_CWAIT: if (!pe_busy) state <= S_OUT;
        S_OUT:   begin state <= S_SEND; j <= '0; end
        S_SEND:  state <= S_FRAME;
        S_FRAME: state <= S_WAIT;
        S_WAIT:  if (!noc_busy) begin
                   if (j == 3'd7) state <= S_START;
                   else begin
                     state <= S_SEND;
                     j     <= j + 1'b1;
                   end
                 end
        default: state <= S_START;
      endcase
    end
  end

  a_one_command: assert property (@(posedge clk) disable iff (!rst_n)
                                  $onehot0({load, compute, send, frame_start}));
endmodule

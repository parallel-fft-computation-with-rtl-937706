// cdma_fft_top: the two mappings of a 16-point FFT onto a CDMA star
// network-on-chip, side by side.
//
// Both halves are complete systems of eight PEs on their own eight-node
// CDMA network (Walsh-coded transmitters, a summing star switch,
// demodulating receivers):
//   ind_* : fft_indirect - every PE follows one pair of values through all
//           four stages and swaps one value with a partner before each
//           stage; one transform at a time (response 1241 cycles).
//   dir_* : fft_direct   - two PEs per stage in two chains, pipelined; a new
//           transform every step, each one three steps after it entered.
// Inputs are 16 complex Q5.10 samples in time order, outputs 16 complex
// Q5.10 values in natural frequency order, both handed over in parallel
// with a valid/ready pair on the input and a one-cycle valid on the output.
// All timing is in cycles of the chip clock; one bit on the network takes
// L = 8 chip cycles.
module cdma_fft_top
  import cdma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // indirect mapping
  input  logic        ind_in_valid,
  output logic        ind_in_ready,
  input  cplx_t       ind_in_data  [FFT_N],
  output logic        ind_out_valid,
  output cplx_t       ind_out_data [FFT_N],
  output logic        ind_out_sat,
  output logic        ind_out_err,
  output logic [31:0] ind_resp_cycles,
  // direct mapping
  input  logic        dir_in_valid,
  output logic        dir_in_ready,
  input  cplx_t       dir_in_data  [FFT_N],
  output logic        dir_out_valid,
  output cplx_t       dir_out_data [FFT_N],
  output logic        dir_out_sat,
  output logic        dir_out_err,
  output logic [31:0] dir_steps
);
  fft_indirect u_indirect (
    .clk, .rst_n,
    .in_valid   (ind_in_valid),
    .in_ready   (ind_in_ready),
    .in_data    (ind_in_data),
    .out_valid  (ind_out_valid),
    .out_data   (ind_out_data),
    .out_sat    (ind_out_sat),
    .out_err    (ind_out_err),
    .resp_cycles(ind_resp_cycles)
  );

  fft_direct u_direct (
    .clk, .rst_n,
    .in_valid (dir_in_valid),
    .in_ready (dir_in_ready),
    .in_data  (dir_in_data),
    .out_valid(dir_out_valid),
    .out_data (dir_out_data),
    .out_sat  (dir_out_sat),
    .out_err  (dir_out_err),
    .steps    (dir_steps)
  );
endmodule

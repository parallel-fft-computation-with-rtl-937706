// dif_butterfly: radix-2 decimation-in-frequency butterfly in Q5.10.
//
//   y0 = a + b
//   y1 = (a - b) * W16^e,   W16^e = cos(2*pi*e/16) - j*sin(2*pi*e/16)
//
// Inputs and outputs are complex numbers whose parts are signed 16-bit
// fixed-point values with 10 fractional bits, the number format the design
// specifies. The twiddle factor comes from cdma_pkg::twiddle (Q5.10 as
// well). The sum and difference are formed at 17 bits, the complex product
// at full width, rounded to nearest (add half an LSB, arithmetic shift by
// 10) and every result part is saturated to 16 bits; `sat` reports that a
// saturation happened. Rounding, saturation and the absence of per-stage
// scaling are this design's choices. Purely combinational.
module dif_butterfly
  import cdma_pkg::*;
(
  input  cplx_t           a,
  input  cplx_t           b,
  input  logic [TW_W-1:0] e,
  output cplx_t           y0,
  output cplx_t           y1,
  output logic            sat
);
  localparam int unsigned SW = DATA_W + 1;            // sum / difference
  localparam int unsigned PW = SW + DATA_W + 1;       // sum of two products

  function automatic fx_t sat16(logic signed [PW-1:0] v, output logic s);
    localparam logic signed [PW-1:0] MAXV = PW'(signed'(16'sh7fff));
    localparam logic signed [PW-1:0] MINV = PW'(signed'(16'sh8000));
    s = 1'b0;
    if (v > MAXV) begin s = 1'b1; return 16'sh7fff; end
    if (v < MINV) begin s = 1'b1; return 16'sh8000; end
    return fx_t'(v);
  endfunction

  cplx_t w;
  logic signed [SW-1:0] sr, si, dr, di;
  logic signed [PW-1:0] pr, pi;
  logic [3:0] s;

  always_comb begin
    w  = twiddle(e);
    sr = SW'(a.re) + SW'(b.re);
    si = SW'(a.im) + SW'(b.im);
    dr = SW'(a.re) - SW'(b.re);
    di = SW'(a.im) - SW'(b.im);
    // (dr + j di)(wr + j wi) = (dr*wr - di*wi) + j (dr*wi + di*wr)
    pr = (PW'(dr) * PW'(w.re)) - (PW'(di) * PW'(w.im));
    pi = (PW'(dr) * PW'(w.im)) + (PW'(di) * PW'(w.re));
    pr = (pr + PW'(1 << (FRAC_W - 1))) >>> FRAC_W;
    pi = (pi + PW'(1 << (FRAC_W - 1))) >>> FRAC_W;
    y0.re = sat16(PW'(sr), s[0]);
    y0.im = sat16(PW'(si), s[1]);
    y1.re = sat16(pr, s[2]);
    y1.im = sat16(pi, s[3]);
    sat   = |s;
  end
endmodule

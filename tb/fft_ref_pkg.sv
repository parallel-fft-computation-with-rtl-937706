// fft_ref_pkg: reference models used by the testbenches.
//
// - CODEWORD: the eight 8-chip Walsh codewords as printed in the worked
//   demodulation example of the design (chip 0 is the leftmost character),
//   written out literally rather than computed.
// - tw_ref: Q5.10 twiddle factors computed with $cos/$sin and rounding.
// - bf_ref: bit-exact radix-2 DIF butterfly (17-bit sum/difference, full
//   product, round half up, saturate to 16 bits).
// - fft16_ref: 16-point DIF FFT with the textbook in-place loops on natural
//   indices, output reordered to natural frequency order.
// - dft16_real: floating-point DFT for a tolerance check.
package fft_ref_pkg;
  import cdma_pkg::*;

  localparam string CODE_TXT [8] = '{"00000000", "01010101", "00110011", "01100110",
                                     "00001111", "01011010", "00111100", "01101001"};

  function automatic logic code_chip(int unsigned pe, int unsigned i);
    return CODE_TXT[pe][i] == "1";
  endfunction

  function automatic int tw_re(int e);
    return int'($floor(1024.0 * $cos(2.0 * 3.14159265358979 * e / 16.0) + 0.5));
  endfunction
  function automatic int tw_im(int e);
    return int'($floor(-1024.0 * $sin(2.0 * 3.14159265358979 * e / 16.0) + 0.5));
  endfunction

  function automatic int sat(int v, ref bit s);
    if (v > 32767)  begin s = 1; return 32767;  end
    if (v < -32768) begin s = 1; return -32768; end
    return v;
  endfunction

  function automatic int rnd(longint v);
    return int'((v + 512) >>> 10);
  endfunction

  typedef struct { int re; int im; } c_t;

  function automatic void bf_ref(input c_t a, input c_t b, input int e,
                                 output c_t y0, output c_t y1, ref bit s);
    longint dr, di, wr, wi;
    y0.re = sat(a.re + b.re, s);
    y0.im = sat(a.im + b.im, s);
    dr = a.re - b.re;
    di = a.im - b.im;
    wr = tw_re(e);
    wi = tw_im(e);
    y1.re = sat(rnd(dr * wr - di * wi), s);
    y1.im = sat(rnd(dr * wi + di * wr), s);
  endfunction

  function automatic int brev4(int v);
    return ((v & 1) << 3) | ((v & 2) << 1) | ((v & 4) >> 1) | ((v & 8) >> 3);
  endfunction

  function automatic void fft16_ref(input c_t x [16], output c_t X [16], ref bit s);
    c_t w [16];
    c_t y0, y1;
    int h;
    w = x;
    for (int st = 0; st < 4; st++) begin
      h = 8 >> st;
      for (int j = 0; j < 16; j += 2 * h)
        for (int i = 0; i < h; i++) begin
          bf_ref(w[j+i], w[j+i+h], i << st, y0, y1, s);
          w[j+i]   = y0;
          w[j+i+h] = y1;
        end
    end
    for (int m = 0; m < 16; m++) X[m] = w[brev4(m)];
  endfunction

  function automatic void dft16_real(input c_t x [16], output real Xr [16], output real Xi [16]);
    real ang;
    for (int k = 0; k < 16; k++) begin
      Xr[k] = 0.0; Xi[k] = 0.0;
      for (int n = 0; n < 16; n++) begin
        ang = -2.0 * 3.14159265358979 * k * n / 16.0;
        Xr[k] += (x[n].re * $cos(ang) - x[n].im * $sin(ang)) / 1024.0;
        Xi[k] += (x[n].re * $sin(ang) + x[n].im * $cos(ang)) / 1024.0;
      end
    end
  endfunction

  function automatic cplx_t to_cplx(c_t c);
    cplx_t r;
    r.re = fx_t'(c.re);
    r.im = fx_t'(c.im);
    return r;
  endfunction

  function automatic c_t from_cplx(cplx_t c);
    c_t r;
    r.re = int'(c.re);
    r.im = int'(c.im);
    return r;
  endfunction
endpackage

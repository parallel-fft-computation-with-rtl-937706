// tb_dif_butterfly: random operands and all eight twiddle exponents against
// the bit-exact reference (twiddles from $cos/$sin), plus hand-checked
// cases: W^0 passes the difference through, W^4 = -j rotates it, and
// full-scale operands saturate and raise `sat`.
module tb_dif_butterfly;
  import cdma_pkg::*;
  import fft_ref_pkg::*;
  cplx_t a, b, y0, y1;
  logic [2:0] e;
  logic sat;
  int checks = 0, failures = 0, n_sat = 0;

  dif_butterfly dut (.*);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t cx(int re, int im);
    cplx_t c;
    c.re = fx_t'(re);
    c.im = fx_t'(im);
    return c;
  endfunction

  initial begin
    c_t r0, r1;
    bit s;
    // W^0: y1 = a - b exactly
    a = cx(3000, -1000); b = cx(1000, 500); e = 0; #1;
    check(y0 == cx(4000, -500) && y1 == cx(2000, -1500) && !sat, "W^0 case");
    // W^4 = -j: (x + jy)(-j) = y - jx
    e = 4; #1;
    check(y1 == cx(-1500, -2000) && !sat, "W^4 case");
    // W^2 = (1 - j)/sqrt2 applied to 1.0: 724 - 724j
    a = cx(1024, 0); b = cx(0, 0); e = 2; #1;
    check(y1 == cx(724, -724), "W^2 case");
    // saturation
    a = cx(30000, -30000); b = cx(30000, 30000); e = 0; #1;
    check(sat && y0.re == 16'sh7fff && y1.im == 16'sh8000, "saturation case");
    for (int t = 0; t < 20000; t++) begin
      a = cx($urandom_range(65535), $urandom_range(65535));
      b = cx($urandom_range(65535), $urandom_range(65535));
      if (t % 2) begin   // half of the cases in the non-saturating range
        a = cx(int'(a.re) / 4, int'(a.im) / 4);
        b = cx(int'(b.re) / 4, int'(b.im) / 4);
      end
      e = 3'(t);
      #1;
      s = 0;
      bf_ref(from_cplx(a), from_cplx(b), int'(e), r0, r1, s);
      check(from_cplx(y0) == r0 && from_cplx(y1) == r1 && sat == s,
            $sformatf("a=(%0d,%0d) b=(%0d,%0d) e=%0d: y1=(%0d,%0d) expected (%0d,%0d)",
                      a.re, a.im, b.re, b.im, e, y1.re, y1.im, r1.re, r1.im));
      if (sat) n_sat++;
    end
    check(n_sat > 0, "saturation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

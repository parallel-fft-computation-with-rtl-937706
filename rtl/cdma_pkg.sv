// cdma_pkg: types, constants and schedule functions shared by the CDMA star
// network-on-chip and the 16-point FFT processor built on it.
//
// Network side: eight processing elements (PEs) share one star switch. Every
// PE owns one row of the 8x8 Walsh-Hadamard matrix (row r, chip i is the
// parity of r AND i), so PE 0 owns the all-zero codeword, as in the
// worked demodulation example the design follows. A packet is
// {source address, destination address, payload}, sent MSB first, one bit
// per L chips.
//
// FFT side: samples are complex, each part a signed 16-bit fixed-point number
// with 10 fractional bits (Q5.10), as the design specifies. The 16-point
// radix-2 decimation-in-frequency FFT is spread over the eight PEs with the
// "indirect" mapping: every PE holds one pair of values, computes one
// butterfly per stage and, before each stage, swaps one of its two values
// with a partner PE over the network. pe_schedule() derives the partner,
// the role and the twiddle exponent of every PE in every stage from index
// arithmetic; out_pe()/out_slot() say where each natural-order result ends up.
package cdma_pkg;

  // ---------------- network ----------------
  parameter int unsigned N_PE    = 8;   // PEs on the star switch
  parameter int unsigned CODE_L  = 8;   // Walsh codeword length in chips
  parameter int unsigned ADDR_W  = 3;   // PE address width

  // Chip i of Walsh-Hadamard codeword r (Sylvester order): parity(r & i).
  function automatic logic walsh_chip(int unsigned r, int unsigned i);
    return ^(r & i);
  endfunction

  // ---------------- fixed point ----------------
  parameter int unsigned DATA_W = 16;   // bits per real/imaginary part
  parameter int unsigned FRAC_W = 10;   // fractional bits

  typedef logic signed [DATA_W-1:0] fx_t;
  typedef struct packed {
    fx_t re;
    fx_t im;
  } cplx_t;

  parameter int unsigned PAYLOAD_W = $bits(cplx_t);   // one complex sample per packet

  typedef struct packed {
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
    cplx_t             payload;
  } pkt_t;

  parameter int unsigned PKT_W = $bits(pkt_t);

  // ---------------- FFT ----------------
  parameter int unsigned FFT_N  = 16;
  parameter int unsigned STAGES = 4;    // log2(FFT_N)
  parameter int unsigned TW_W   = 3;    // twiddle exponent 0..FFT_N/2-1

  // Twiddle W16^e = cos(2*pi*e/16) - j*sin(2*pi*e/16), each part rounded to
  // Q5.10: round(1024*cos(2*pi*e/16)) for e = 0..4 is 1024, 946, 724, 392, 0.
  function automatic cplx_t twiddle(logic [TW_W-1:0] e);
    fx_t c [5];
    cplx_t w;
    c = '{16'sd1024, 16'sd946, 16'sd724, 16'sd392, 16'sd0};
    if (e <= 3'd4) begin
      w.re = c[e];
      w.im = -c[4 - e];
    end else begin
      w.re = -c[8 - e];
      w.im = -c[e - 4];
    end
    return w;
  endfunction

  // One stage of one PE's schedule.
  //   partner : PE it swaps a value with before this stage's butterfly
  //   upper   : 0 = it sends its hi value and receives into hi,
  //             1 = it sends its lo value and receives into lo
  //   k       : index (natural order of this stage's data) of the butterfly's
  //             first input; the second input is k + FFT_N/2^(s+1)
  //   tw      : twiddle exponent of that butterfly
  typedef struct packed {
    logic [ADDR_W-1:0] partner;
    logic              upper;
    logic [3:0]        k;
    logic [TW_W-1:0]   tw;
  } sched_t;

  typedef sched_t [STAGES-1:0] sched_tab_t;

  // Schedule of PE p for all stages. PE p is loaded with x(2p), x(2p+1).
  // Stage 0 (span 8): PE p and PE p^4 swap, leaving PE p<4 with butterfly
  // k=2p and PE p>=4 with k=2(p-4)+1. Stage s>=1 (span h): a PE holding
  // (a, a+2h) is "lower" if bit h of a is clear; it swaps its hi value with
  // the PE holding (a+h, a+3h) and keeps k=a, while that partner gets k=a+2h.
  function automatic sched_tab_t pe_schedule(int unsigned p);
    sched_tab_t tab;
    int unsigned kk   [N_PE];
    int unsigned knew [N_PE];
    int unsigned h;
    for (int q = 0; q < N_PE; q++) kk[q] = (q < 4) ? 2 * q : 2 * (q - 4) + 1;
    tab[0].partner = ADDR_W'(p ^ 4);
    tab[0].upper   = (p >= 4);
    tab[0].k       = 4'(kk[p]);
    tab[0].tw      = TW_W'(kk[p] & 7);
    for (int s = 1; s < STAGES; s++) begin
      h = FFT_N >> (s + 1);
      for (int q = 0; q < N_PE; q++) begin
        if ((kk[q] & h) == 0) knew[q] = kk[q];
        else                  knew[q] = kk[q] + h;
      end
      for (int q = 0; q < N_PE; q++) begin
        if (q == p) begin
          for (int r = 0; r < N_PE; r++) begin
            if ((kk[q] & h) == 0 && kk[r] == kk[q] + h) tab[s].partner = ADDR_W'(r);
            if ((kk[q] & h) != 0 && kk[r] == kk[q] - h) tab[s].partner = ADDR_W'(r);
          end
          tab[s].upper = ((kk[q] & h) != 0);
          tab[s].k     = 4'(knew[q]);
          tab[s].tw    = TW_W'((knew[q] & (h - 1)) << s);
        end
      end
      for (int q = 0; q < N_PE; q++) kk[q] = knew[q];
    end
    return tab;
  endfunction

  // After the last stage PE p holds DIF outputs k and k+1 (k = its last
  // butterfly index), i.e. X(bitrev(k)) in lo and X(bitrev(k+1)) in hi.
  function automatic int unsigned bitrev4(int unsigned v);
    return ((v & 1) << 3) | ((v & 2) << 1) | ((v & 4) >> 1) | ((v & 8) >> 3);
  endfunction

  function automatic int unsigned out_pe(int unsigned m);
    sched_tab_t t;
    for (int q = 0; q < N_PE; q++) begin
      t = pe_schedule(q);
      if (int'(t[STAGES-1].k) == int'(bitrev4(m) & 14)) return q;
    end
    return 0;
  endfunction

  function automatic logic out_slot(int unsigned m);
    return 1'(bitrev4(m) & 1);
  endfunction

endpackage

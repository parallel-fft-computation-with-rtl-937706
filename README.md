# A 16-point FFT on a CDMA star network-on-chip

Eight processing elements (PEs) compute a 16-point radix-2
decimation-in-frequency FFT. They do not talk over a bus or a mesh of
routers. They talk through one star switch that uses code-division multiple
access (CDMA). Every PE owns an 8-chip Walsh codeword. A PE that sends to PE
*d* spreads each bit with *d*'s codeword. The switch does nothing but add up
the chips of all eight senders. Every receiver picks its own bit stream out
of that sum by correlating it with its codeword. The codewords are
orthogonal, so all eight PEs can send at the same time, each to a different
destination, with no routing, no arbitration and no collisions.

In an FFT every PE sends exactly one value to exactly one other PE at each
exchange, so the network is always fully used. Two ways of spreading the
FFT over the PEs are built, and they sit side by side in the top level:

* **indirect mapping** (`fft_indirect`): each PE follows one pair of values
  through all four stages. It computes one butterfly per stage and swaps one
  value with a partner PE before each stage.
* **direct mapping** (`fft_direct`): each stage belongs to two PEs, and data
  flows down two chains, PE1→PE3→PE5→PE7 and PE2→PE4→PE6→PE8. This is a
  pipeline that takes a new transform every step.

The design follows the architecture described in "Parallel FFT Computation
with a CDMA-Based Network-on-Chip", called "the source" below. That
description gives the network, the codes, the modulation and demodulation
rules, the number format and the two mappings. Control, handshakes and
buffering are this design's own choices. A section near the end lists where the
design departs from the source.

The RTL is synthesizable SystemVerilog-2017. Testbenches are self-checking
and run with plain Verilator.

## The Walsh-code channel

This is the part that needs the most explanation. It is the same for both
mappings, in `cdma_tx`, `cdma_switch` and `cdma_rx`, and `cdma_noc` puts them
together.

**Codewords.** Node *r* (0..7) owns row *r* of the 8×8 Walsh–Hadamard
matrix in Sylvester order. Chip *i* of that row is `parity(r & i)`:

| node (PE) | codeword, chip 0 first |
|---|---|
| 0 (PE1) | 00000000 |
| 1 (PE2) | 01010101 |
| 2 (PE3) | 00110011 |
| 3 (PE4) | 01100110 |
| 4 (PE5) | 00001111 |
| 5 (PE6) | 01011010 |
| 6 (PE7) | 00111100 |
| 7 (PE8) | 01101001 |

**Modulation (`cdma_tx`).** Each bit of a packet lasts L = 8 chip cycles.
For a 0 the transmitter sends the destination's codeword. For a 1 it sends
the inverted codeword. When it has nothing to send, it sends all-zero chips.
In general CDMA use the all-zero row is kept back as the "no data"
pattern, leaving seven usable codes. The FFT systems give it to node 0 so
that 8 chips serve 8 PEs. That works because in an FFT every PE that should
send does send. The price is that node 0 cannot tell silence from data: an
idle sender's zero chips look like 0 bits to it. The network modules take a
parameter `RESERVE_ZERO`. At its default of 0 node *r* owns row *r*. Set to
1, node *r* owns row *r*+1, so all-zero chips mean "no data" at every
receiver, and at most L−1 = 7 nodes fit.

**Switch (`cdma_switch`).** In each chip cycle the switch counts the ones
among the eight incoming chips, S ∈ 0..8, and broadcasts S to every
receiver. The sum is registered, so it costs one cycle.

**Demodulation (`cdma_rx`).** A receiver with codeword c turns each chip
sum into a decision variable:

    D[i] = 2·S[i] − L    if c[i] = 0
    D[i] = L − 2·S[i]    if c[i] = 1
    λ    = (D[0] + … + D[L−1]) / L

A sender that targets this receiver contributes −L·(−1)^bit to the sum.
Every other sender uses an orthogonal codeword and contributes 0. So λ = +1
decodes as bit 1, λ = −1 as bit 0, and λ = 0 means nobody sent to this node.
Any other value means two senders chose the same destination (or, for node
0, that idle senders' zero chips were counted), and it is reported as an
error. Because the sum is a multiple of L in every valid case, the division
is an arithmetic shift.

A worked example, which `tb_cdma_switch` and `tb_cdma_rx` replay. Sources
1..8 send the bits 1,0,0,0,0,1,1,0 to destinations 8,5,6,2,3,1,4,7. The chip
sums are S = [3 3 3 7 5 5 5 5]. PE3 (codeword 00110011) computes
D = [−2 −2 2 −6 2 2 −2 −2], so λ = −1 and it receives the 0 that PE5 sent.
The eight receivers see λ = +1 −1 −1 +1 −1 −1 −1 +1.

**Packets and frames.** A packet is `{src[3], dst[3], payload[32]}`
(`cdma_pkg::pkt_t`, 38 bits). It is sent MSB first. The payload is one
complex sample. The network is frame-synchronous:

* `frame_start` makes every transmitter that has a packet in its buffer
  (`pkt_fifo`, 2 entries) start at the same time.
* Cycle *t*: `frame_start`.
* Cycles *t*+1 … *t*+304: chips on the lines (38 bits × 8 chips).
* One cycle later: the chip sums.
* Cycle *t*+306: `rx_valid` at every receiver. Each packet comes with a
  no-data flag (some bit had λ = 0) and an error flag (some |λ| > 1, or a
  packet with data names another node as its destination).

So one frame moves eight packets in PKT_W·L + 2 = 306 cycles. Everything
runs on the chip clock. The bit ("system") clock is the chip clock divided
by L. It exists only as the chip counter inside the transmitters and
receivers, not as a second clock. If the bit clock runs at 64 MHz, the chip
clock runs at 512 MHz.

## Number format and butterfly

Every real and imaginary part is a signed 16-bit fixed-point number with 10
fractional bits (Q5.10, range ±32). `dif_butterfly` computes

    y0 = a + b
    y1 = (a − b) · W16^e,   W16^e = cos(2πe/16) − j·sin(2πe/16)

The twiddles are Q5.10 too: round(1024·cos(2πe/16)) for e = 0..4 gives
1024, 946, 724, 392, 0. The function `cdma_pkg::twiddle` builds all eight
from these five values.

* Sum and difference are formed at 17 bits.
* The complex product is kept at full width, then rounded to nearest (add
  512, shift right by 10).
* Every result part is saturated to 16 bits, and `sat` is raised when that
  happens.

There is no scaling between stages, so a 16-point transform can grow by a
factor of 16. Inputs whose real and imaginary parts stay below about 1.0 in
magnitude never saturate: the worst output part is then 16·(1 + 1) = 32.

## Indirect mapping (`fft_indirect`, `fft_pe`, `fft_ctrl`)

PE *p* is loaded with x(2p), x(2p+1). A transform has four rounds. Each
round has four steps:

1. `send`: every PE writes one of its two values into its transmit buffer,
   addressed to its partner for this stage.
2. `frame_start`: the network moves all eight packets at once.
3. Wait until every PE has stored its partner's value (`rx_done`).
4. `compute`: every PE replaces its pair by the butterfly (lo + hi,
   (lo − hi)·W^e), in one cycle.

Every round is a set of four pairwise swaps. A "lower" PE gives away its hi
value and receives into hi. An "upper" PE gives away its lo value and
receives into lo. `cdma_pkg::pe_schedule` derives partner, role and twiddle
exponent from index arithmetic. It follows one rule: a PE holding
(a, a+2h) before a stage of span h is lower if bit h of a is clear, and then
pairs with the PE holding (a+h, a+3h). The resulting schedule (PEs numbered
1..8, partner / role / twiddle exponent):

| PE | stage I (span 8) | stage II (span 4) | stage III (span 2) | stage IV (span 1) | result |
|---|---|---|---|---|---|
| 1 | 5 L 0 | 3 L 0 | 2 L 0 | 5 L 0 | X(0), X(8) |
| 2 | 6 L 2 | 4 L 4 | 1 U 0 | 6 L 0 | X(2), X(10) |
| 3 | 7 L 4 | 1 U 0 | 4 L 0 | 7 L 0 | X(1), X(9) |
| 4 | 8 L 6 | 2 U 4 | 3 U 0 | 8 L 0 | X(3), X(11) |
| 5 | 1 U 1 | 7 L 2 | 6 L 4 | 1 U 0 | X(4), X(12) |
| 6 | 2 U 3 | 8 L 6 | 5 U 4 | 2 U 0 | X(6), X(14) |
| 7 | 3 U 5 | 5 U 2 | 8 L 4 | 3 U 0 | X(5), X(13) |
| 8 | 4 U 7 | 6 U 6 | 7 U 4 | 4 U 0 | X(7), X(15) |

In stage I, PE1 pairs x(0) with x(8), which comes from PE5. PE1 ends with
X(0) and X(8). The outputs sit in the PEs in bit-reversed order, and
`fft_indirect` undoes that by wiring (`cdma_pkg::out_pe`, `out_slot`).

A round takes 310 cycles: 306 for the frame plus 4 cycles of command
overhead. The response time from accepting the input to `out_valid` is
4·(PKT_W·L + 6) + 1 = **1241 cycles**, and it is reported on `resp_cycles`.
Each PE holds its pair for the whole transform, so the next transform is
accepted only after the current one has left.

## Direct mapping (`fft_direct`, `dm_pe`, `dm_ctrl`)

Node 2s+h computes stage s for half h of the data. Stage I pairs x(k) with
x(k+8). So both stage-I PEs (PE1, PE2) take all 16 inputs:

* PE1 keeps the eight sums x(k)+x(k+8).
* PE2 keeps the eight rotated differences (x(k)−x(k+8))·W^k.

After that the two halves are independent 8-point transforms. The stage-s PE
of each half computes four butterflies of span 8>>s on its eight values and
passes them on. Every PE uses one butterfly unit, one operation per cycle.

`dm_ctrl` runs the pipeline in lock-step *steps*. A step is:

1. load (stage-I PEs take a new input if one is offered);
2. compute (8 cycles at stage I, 4 later);
3. output (if the last stage holds a finished transform);
4. eight frames, in each of which PEs 1–6 send value *j* to their successor
   at the same time.

A step lasts 12 + 8·(PKT_W·L + 4) = 2476 cycles, or 4 fewer when stage I is
idle. A transform entering in step k comes out in step k+3, and one
transform finishes per step once the pipeline is full. While the pipeline
fills or drains, some PEs have nothing to send. Their successors then see
λ = 0 ("no data") and drop the frame. PE1 and PE2 never receive, so the
all-zero codeword of node 0 causes no ambiguity.

## Top level (`cdma_fft_top`)

`cdma_fft_top` contains both systems, each with its own eight PEs and its
own network, and brings out the ports of each (`ind_*`, `dir_*`):

| port | meaning |
|---|---|
| `*_in_valid` / `*_in_ready` | input handshake; `*_in_data[0..15]` are 16 complex Q5.10 samples in time order (`cdma_pkg::cplx_t` = `{re, im}`) |
| `*_out_valid` | one-cycle pulse; `*_out_data[0..15]` is the spectrum in natural order |
| `*_out_sat` | a butterfly of this transform saturated |
| `*_out_err` | a packet came from the wrong PE or with a demodulation error |
| `ind_resp_cycles` | response time of the last indirect transform |
| `dir_steps` | pipeline step counter |

Reset is active-low and asynchronous. Sizes are package parameters in
`cdma_pkg` (`N_PE`, `CODE_L`, `DATA_W`, `FRAC_W`, `FFT_N`). The network
modules take them as module parameters, so `cdma_noc` can be reused with
another packet width or codeword length. The FFT part is written for 16
points on 8 PEs.

## Performance

Both FFT systems use 38-bit packets with a 32-bit payload. The figures below
are printed by `tb_cdma_fft_top`. Times in ns assume a 64 MHz bit clock, so
a 512 MHz chip clock.

| | indirect | direct |
|---|---|---|
| frame latency | 306 cycles (597 ns) | 306 cycles (597 ns) |
| transfers per frame, largest | 8 | 6 |
| transfers per frame, mean | 8.0 | 4.9 (pipeline fill and drain) |
| maximum aggregate throughput | 256 bits per frame (53 MB/s) | 192 bits per frame (40 MB/s) |
| network utilisation (mean / largest) | 100 % | 82 % |
| response time of one transform | 1241 cycles (2.4 µs) | 7427 cycles (14.5 µs) |
| transforms finished per cycle, steady state | 1 / 1242 | 1 / 2476 |

In the direct mapping PE7 and PE8 only receive and PE1 and PE2 only send, so
at most six transfers share a frame.

Latency and throughput depend on the packet size. `tb_cdma_noc_sweep`
builds the network with 8, 16, 32 and 64 payload bits and runs
back-to-back frames of eight simultaneous transfers:

| payload bits | latency (cycles) | payload bits per chip cycle |
|---|---|---|
| 8 | 114 | 0.56 |
| 16 | 178 | 0.72 |
| 32 | 306 | 0.84 |
| 64 | 562 | 0.91 |

The latency is (P + 6)·L + 2 cycles. The throughput approaches
8·P / ((P + 6)·L) bits per cycle, because the 6 address bits are a smaller
share of longer packets.

## Where this design departs from the source description, or fills gaps

* **Indirect pairing.** The source gives the first stage (PE1 pairs its
  data with that of PE5) and the end (PE1 holds X(0) and X(8)). It says PE1
  uses "in8 and in9 from PE5". Here PE1 receives only x(8) and PE5 receives
  x(1), so that every PE computes exactly one butterfly per stage. The
  pairings of stages II–IV follow from the swap rule above.
* **Direct-mapping split.** The two stage-I PEs "share the same input
  data". This is read as: both take all 16 inputs and split the butterflies
  into sums and differences.
* **Control, handshakes, buffering.** The sequencers, their step structure,
  frame-synchronous operation, buffer depths, packet field widths (3-bit
  addresses, one 32-bit complex value per payload) and the error flags are
  this design's choices. None of them is specified.
* **Arithmetic.** The number format is specified. Rounding, saturation, the
  absence of scaling and the twiddle quantisation are choices of this
  design.
* **Throughput and response time.** Both mappings see the same frame
  latency, and the indirect mapping moves more data per frame, as the source
  reports. But the indirect response time (1241 cycles) is *shorter* than
  the direct pipeline's (7427 cycles, three steps). The source reports a
  longer response time for the indirect mapping. The difference comes from
  the step structure chosen here for the direct pipeline, in which each
  value crosses the network in its own frame. See "Performance" above.
* **Not built.** The hierarchical star (a central switch joining several
  local switches) is only mentioned as a way to grow beyond 8 PEs. FFTs
  larger than 16 points are not built either: they need 16, 32 and 64 PEs
  (indirect) or 20, 48 and 112 PEs (direct) for 32, 64 and 128 points.
  The FFT systems carry a fixed 32-bit payload, so the payload-size sweep
  is run on the network alone.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`. The reference models are in
`tb/fft_ref_pkg.sv`:

* a bit-exact textbook in-place DIF FFT with the same rounding and
  saturation;
* a floating-point DFT;
* the codeword table written out literally.

| testbench | what it shows |
|---|---|
| `tb_cdma_tx` | every chip follows the modulation rule for all destinations; frame length; no-data frames; `frame_start` ignored mid-frame |
| `tb_cdma_switch` | the worked example's sums [3 3 3 7 5 5 5 5]; random sums; one-cycle delay |
| `tb_cdma_rx` | the worked example's λ values; random permutation frames; no-data detection; collisions flagged; timing |
| `tb_pkt_fifo` | random traffic against a queue model, full and empty |
| `tb_cdma_noc` | random permutations through the whole network, two packets buffered per node, latency 306 cycles; a seven-node network with `RESERVE_ZERO = 1` and random idle senders, where every untargeted node, node 0 included, sees a clean "no data" |
| `tb_dif_butterfly` | 20 000 random operands against the bit-exact model, saturation |
| `tb_fft_pe` | eight PEs on an ideal network: pairwise swaps, bit-exact FFT, wrong-source detection |
| `tb_fft_ctrl` | command order and response time for several network delays |
| `tb_dm_pe`, `tb_dm_ctrl` | the same for the direct-mapping PE and sequencer |
| `tb_fft_indirect`, `tb_fft_direct` | each system end to end: bit-exact against the reference, within 0.03 of the DFT, response or step timing, saturation, stalls, pipeline bubbles, no-data frames |
| `tb_cdma_fft_top` | both systems at the same time at full size; counts every mechanism and fails if one never happened; prints the performance figures |
| `tb_cdma_noc_sweep` | the network at four payload sizes: delivery, latency, throughput |

Apart from `tb_cdma_noc_sweep` and the second network in `tb_cdma_noc`,
the testbenches use the default sizes. Each one builds and runs in seconds.
To run one:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_cdma_fft_top \
        -y rtl -y tb +libext+.sv rtl/cdma_pkg.sv tb/fft_ref_pkg.sv tb/tb_cdma_fft_top.sv
    ./obj_dir/Vtb_cdma_fft_top

Lint with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/cdma_pkg.sv
rtl/<module>.sv`. The remaining warnings are unused bits (such as the source
field the receivers do not need), unused package constants, and notes that
the reset also appears in the assertions' disable conditions.

## Files

`rtl/`: `cdma_pkg` (types, constants, schedule functions), `pkt_fifo`,
`cdma_tx`, `cdma_switch`, `cdma_rx`, `cdma_noc`, `dif_butterfly`, `fft_pe`,
`fft_ctrl`, `fft_indirect`, `dm_pe`, `dm_ctrl`, `fft_direct`,
`cdma_fft_top`. `tb/`: one `tb_<module>.sv` per module, `tb_cdma_noc_sweep.sv` and
`fft_ref_pkg.sv`.

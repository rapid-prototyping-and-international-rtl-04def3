# LDACS physical-layer coding and modulation path in SystemVerilog

LDACS, the L-band Digital Aeronautical Communications System, carries data
between aircraft and ground stations at a few hundred kbit/s to about
1.4 Mbit/s per direction. Its physical layer protects every block of user
data with two codes in series:
- an outer Reed-Solomon (RS) code, which repairs the byte errors the inner
  decoder leaves behind;
- an inner, variable-rate convolutional code, which a Viterbi decoder uses to
  fight the channel noise.

Interleavers between and after the two codes spread out bursts of errors.

This repository is that coding and modulation data path as synthesizable
RTL for the programmable logic of an SoC-FPGA platform:
- a transmit chain that turns user bytes into QPSK, 16-QAM or 64-QAM symbols;
- a receive chain that turns received symbols back into bytes.

The hardest and most expensive part is the receive side's **Viterbi
decoder**. It evaluates all 64 trellis states in one clock and stores the 64
survivor decisions of a trellis step as a single word. This makes the path
memory effectively 64 accesses wide instead of the two accesses of an
ordinary dual-port RAM. Its structure and the reason for it are described
below.

Not included: the OFDM modulator and demodulator, time and frequency
synchronization, the RF/AD/DA front end, and the protocol stack. The
OFDM modem and synchronization are not built because their parameters are
unspecified here (see "Departures and open points"). The RF front end and
protocol stack are outside the programmable logic. The top level ends at
complex baseband symbols (I, Q), which is where an OFDM modem would connect.

## The coding block

Everything works on one fixed-size **coding block**. The default sizes are
this design's own choice:

| quantity | value | formula |
|---|---|---|
| user bytes per block | 478 | `NW * RS_K` (2 x 239) |
| RS codewords per block | 2 | `NW` |
| RS codeword | 255 bytes = 239 data + 16 parity | `RS_N = RS_K + 2*RS_T` |
| coded bytes | 510 | `NBYTES = NW * RS_N` |
| trellis steps | 4086 | `NSTEPS = 8*NBYTES + 6` (6 tail bits) |
| interleaver size | 8172 bits = 12 x 681 | `CAP = HI_ROWS * HI_COLS`, `HI_COLS = ceil(2*NSTEPS/HI_ROWS)` |

A rate-1/2 block fills the interleaver exactly. Rate 2/3 and 3/4 blocks are
shorter and are padded with zero bits up to `CAP`, so every rate uses the
same interleaver and the same symbol count per modulation. `HI_ROWS = 12` is
a multiple of 2, 4 and 6, so a block always holds a whole number of
symbols.

## Transmit chain

```
bytes -> randomizer -> rs_encoder -> block_interleaver -> conv_encoder
      -> helical_interleaver -> qam_mapper -> (I, Q)
```

- **randomizer**: XORs each byte, MSB first, with the PRBS
  `1 + x^14 + x^15`, seeded with `100101010000000`. The sequence restarts at
  every block, so the same module, unchanged, also serves as the
  de-randomizer.
- **rs_encoder**: systematic RS(255,239) over GF(2^8), field polynomial
  `x^8+x^4+x^3+x^2+1`, generator roots alpha^0 .. alpha^15. It is a 16-stage
  LFSR with one GF multiplier per stage. It passes the 239 data bytes through
  and then shifts out the 16 parity bytes. The generator coefficients are
  computed at elaboration time by a constant function in `ldacs_pkg`, so there
  is no table file.
- **block_interleaver**: writes the two codewords as two rows of 255 bytes
  and reads them column by column. After decoding, a burst of wrong bytes
  from the Viterbi decoder is therefore shared between both codewords.
  `DEINT=1` gives the inverse. The module has one buffer, which is filled and
  then drained.
- **conv_encoder**: rate-1/2, constraint length 7, generators 171 and 133
  (octal), giving 64 states. It is punctured to 2/3 (X: `10`, Y: `11`) or 3/4
  (X: `101`, Y: `110`). Six zero tail bits return it to state 0, which makes
  the code *zero-terminated*. It then pads the block with zeros to `CAP`. The
  rate is sampled at the start of each block.
- **helical_interleaver**: the block is written row by row into a 12 x 681
  array. Output k is read from row `r = k mod 12`, column
  `(k div 12 + 5*r) mod 681`. Each row is therefore read along a diagonal
  that is rotated by 5 columns per row, so bits that are adjacent in the
  coded stream end up far apart on the channel. `DEINT=1` gives the inverse
  for soft values (`W` bits wide).
- **qam_mapper**: uses Gray maps. Per axis, the first bit gives the sign and
  the remaining bits give the magnitude:
  - 16-QAM: `0`->1, `1`->3.
  - 64-QAM: `01`->1, `00`->3, `10`->5, `11`->7.

  The levels are multiplied by `SCALE` (4). The first half of a symbol's bits
  go to I and the second half to Q.

## Receive chain

```
(I, Q) -> qam_demapper -> helical de-interleaver -> depuncturer
       -> viterbi_decoder -> block de-interleaver -> rs_decoder -> de-randomizer -> bytes
```

- **qam_demapper**: computes max-log soft bits with piecewise-linear
  formulas. With per-axis sample `y` and `S = SCALE`:
  - sign bit: `-y`;
  - first magnitude bit: `|y| - 2S` for 16-QAM, `|y| - 4S` for 64-QAM;
  - second magnitude bit: `||y| - 4S| - 2S`.

  Each soft value is saturated to a signed 4-bit number in [-7, 7]. A
  positive value means "1". The value 0 means "no information".
- **depuncturer**: rebuilds one (x, y) soft pair per trellis step. It puts
  0, an erasure, where the puncturing pattern dropped a bit. After 4086
  steps it discards the zero padding.
- **viterbi_decoder**: see the next section.
- **rs_decoder**: corrects up to 8 wrong bytes per codeword. See "The
  Reed-Solomon decoder" below.

## The Viterbi decoder

A software Viterbi decoder loops over the 64 states for each trellis step.
Each state's update reads two predecessor metrics, adds branch metrics,
keeps the smaller sum, and writes the one-bit decision to the path memory.
The states do not depend on each other within a step. However, if the path
memory were one RAM, all 64 decision writes of a step would have to pass
through one RAM with two ports, which takes about 32 clocks per step. This
decoder removes that bottleneck in two ways:

1. **64 ACS units in parallel.** For next state `n` (its input bit is
   `u = n[5]`), the predecessors are `{n[4:0],0}` and `{n[4:0],1}`. The
   branch metric is `d(x,X) + d(y,Y)`, with `d(s,1) = 7 - s` and
   `d(s,0) = 7 + s`. All 64 add-compare-select operations are combinational
   and complete in one clock, so the decoder handles one trellis step per
   clock.
2. **Partitioned path memory.** The 64 decisions of a step form one 64-bit
   word, `pmem[step]`. Every state gets its own bit lane, so all 64 lanes are
   written in the same clock. The memory is `NSTEPS x 64` bits (4086 x 64 by
   default).

Path metrics are 12-bit unsigned numbers, compared modulo 2^12 (using the
sign of `c1 - c0`), so they never need rescaling. At the start of a block,
state 0 has metric 0 and every other state has a bias of 512. This reflects
that the encoder starts in state 0.

**Traceback.** The code is zero-terminated, so the correct path ends in
state 0. The traceback starts there at the last step and walks back one step
per clock:
- the decoded bit is `state[5]`;
- the previous state is `{state[4:0], pmem[step][state]}`.

Bits are packed into bytes in an output buffer. The tail bits are skipped.
The decoder then streams the bytes out in order. Because the whole block is
traced back, no truncation depth needs to be chosen.

**Timing per block:** `NSTEPS` clocks of ACS (while input is available),
then `NSTEPS` clocks of traceback, then `NSTEPS/8` output bytes. The input
is held off (`in_ready` low) during the traceback and output phases. The
total is 2 x 4086 + 510 clocks at the defaults. `busy_tb` is high during
the traceback.

## The Reed-Solomon decoder

The decoder works on one codeword at a time in five phases. The codeword is
held in a 255-byte buffer. The byte at buffer index `p` is the coefficient
of `x^(254-p)`, so an error there has location `X = alpha^(254-p)`.

| phase | clocks | work |
|---|---|---|
| input | 255 | store bytes; 16 syndromes `S_j = c(alpha^j)` by Horner's rule |
| Berlekamp-Massey | 16 | one iteration per clock -> error locator `Lambda(x)`, degree `L` |
| evaluator | 1 | `Omega(x) = S(x) Lambda(x) mod x^8` |
| Chien count | 255 | count the roots of `Lambda` over all 255 locations |
| output | 239 | Chien again; at a root add the error value; stream out data bytes |

How the phases work:
- **Berlekamp-Massey.** The correction polynomial is stored already shifted
  (`x^m B(x)`). One iteration is therefore a discrepancy sum, one field
  inverse and one multiply-add per coefficient.
- **Chien search.** Both Chien passes keep one term `lambda_j X^-j` per
  coefficient and multiply it by `alpha^j` each clock.
- **Error value (Forney).** Because the first root is `alpha^0`, the error
  value is simply `Omega(X^-1) / sum_{j odd} lambda_j X^-j`.
- **Failure detection.** A codeword is declared *decodable* only if the
  count of roots equals `L` and `L <= 8`. Otherwise no byte is changed,
  `err` is raised, and the bytes pass on as received.
- **Status outputs.** `err_valid` pulses once per codeword, when the output
  phase starts. `nfix` gives the number of corrected bytes, including those
  in the parity.

One codeword costs 255 + 16 + 1 + 255 + 239 = 766 clocks.

## Throughput

At 100 MHz, the full-size end-to-end test measures 19,900 to 23,000
receive clocks per 478-byte block, with random gaps on the inputs. That is at
most 0.23 ms, or about 16.6 Mbit/s of decoded user data. The highest LDACS user
rate is 1.43 Mbit/s (forward link) and 1.39 Mbit/s (reverse link), so the
receive path is about 11 times faster than real time. Most of the time goes
to the Viterbi decoder: one clock per trellis step for ACS and another for
traceback. The RS decoder adds about 1,500 clocks per block. A whole block
therefore decodes well inside 0.72 ms, the shortest LDACS frame that a
demodulation must keep up with. The transmit side has
no traceback and is faster still.

## Package and interfaces

`ldacs_pkg` holds what is shared between modules:
- the types `code_rate_e` (`RATE_1_2`, `RATE_2_3`, `RATE_3_4`), `mod_e`
  (`MOD_QPSK`, `MOD_16QAM`, `MOD_64QAM`), `soft_t` (signed 4-bit) and `gf_t`;
- the code constants;
- the puncturing tables (`punct_keep`);
- GF(2^8) arithmetic and the RS generator computation.

Every stream uses **valid/ready**: a transfer happens at a rising clock edge
when both signals are high. Each stage has a registered output and accepts
input when its output register is free or is being emptied. `rst_n` is
synchronous and active low. Rate and modulation inputs must be held constant
for a block.

Top level `ldacs_phy_top`, parameters `RS_K`, `RS_T`, `NW`, `HI_ROWS`,
`HI_SHIFT`:

| port group | signals |
|---|---|
| TX control | `tx_rate`, `tx_mod` |
| TX user bytes in | `tx_in_valid/ready/data` |
| TX symbols out | `tx_iq_valid/ready`, `tx_i`, `tx_q` (signed 8-bit) |
| RX control | `rx_rate`, `rx_mod` |
| RX symbols in | `rx_iq_valid/ready`, `rx_i`, `rx_q` |
| RX user bytes out | `rx_out_valid/ready/data` |
| RX codeword status | `rx_cw_err_valid`, `rx_cw_err` (not correctable), `rx_cw_nfix` (bytes corrected) |

## Departures and open points

The following sizes, codes and maps are this design's own choices. The
published system description fixes only the order of the stages and the
kinds of codes:
- RS code size, field and roots;
- convolutional generators and puncturing patterns;
- randomizer polynomial and seed;
- interleaver dimensions;
- constellation maps;
- soft-value width.

LDACS implementations that must interoperate would need the exact values
from the LDACS specification.

Other departures:
- **16-QAM and rate 2/3** are included as the middle step of adaptive coding
  and modulation. The description names only QPSK with rate 1/2 and 64-QAM
  with rate 3/4.
- **The block interleaver** permutes bytes across codewords. The description
  says only that a block interleaver sits between the two codes.
- **Decoder latency for a given packet size** cannot be compared with the
  published figures (606 clocks with the partitioned path memory, 19,300
  without it), because the block length behind those numbers is not stated.
  For this decoder the latency is `2*NSTEPS + NSTEPS/8` clocks. Only the
  partitioned arrangement is built.
- **Fixed user block, padded coded block.** Every block carries 478 user
  bytes whatever the rate. Rates 2/3 and 3/4 fill the rest of the interleaver
  with zeros, so they gain robustness but no throughput. In LDACS, a higher
  coding and modulation scheme carries more user data per frame. Supporting
  that means making `RS_K`, `NW` and `CAP` depend on the scheme at run time.
  The modules are written with fixed parameters.
- **The RS decoder holds one codeword at a time.** While it decodes, it stalls
  the stages in front of it, which adds about 1,500 clocks per block. A
  second buffer would hide this.
- **OFDM modem and synchronization** are not built. Their FFT size, pilot
  pattern, guard interval and synchronization sequence are not specified in
  the source description.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches compare
against independent reference models in `tb/ldacs_ref_pkg.sv`:
- PRBS;
- RS encoding by long division;
- shift-register convolutional encoder with puncturing;
- helical index formula;
- constellation levels.

Inputs and output back-pressure get random gaps (`$urandom`). Every
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The
timing checks are:

| testbench | checked timing |
|---|---|
| `tb_viterbi_decoder` | latency from the first soft pair to the first byte is 2 x NSTEPS (+ up to 4) clocks |
| `tb_rs_encoder` | throughput of about one byte per clock |
| `tb_randomizer` | throughput of one byte per clock |
| `tb_block_interleaver` | drain rate |
| `tb_conv_encoder` | clocks per block |
| `tb_rs_decoder` | error flag 2N + 2T + 1 clocks after the first byte of a gap-free codeword |

`tb_rs_decoder` feeds RS(46,30) codewords with 0 to 10 byte errors. Up to 8
errors must be corrected, with `nfix` equal to the error count. With 9 or 10
errors the codeword must be flagged and passed on unchanged.

`tb_ldacs_phy_top` runs the top level at its default parameters. It loops
the transmitted symbols back into the receiver with added noise and injected
symbol errors, for five blocks:
- QPSK at rate 1/2;
- 16-QAM at rate 2/3;
- 64-QAM at rate 3/4;
- QPSK at rate 1/2 with 80 inverted symbols in a row. The Viterbi decoder
  leaves about 6 wrong bytes per codeword, and the RS decoder must correct
  them all.
- QPSK at rate 1/2 with 400 inverted symbols in a row. This is too much for
  both codes, so the RS decoder must flag both codewords.

For each block it checks:
- the recovered bytes;
- the RS flags, which must agree with the codewords that really came out
  wrong;
- the real-time bounds: below the time the peak user rate needs to deliver
  the block (267,787 clocks), and below one 0.72 ms frame (72,000 clocks).

It also counts that every rate, every modulation, exact and padded blocks,
Viterbi corrections, RS corrections, RS flags and stalls on both sides
occurred.

To run one testbench with plain verilator, for example:

```
verilator --binary --timing -Irtl -Itb rtl/ldacs_pkg.sv tb/ldacs_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v ldacs_pkg) tb/tb_ldacs_phy_top.sv \
    --top-module tb_ldacs_phy_top
./obj_dir/Vtb_ldacs_phy_top
```

The full-size end-to-end run takes well under a second of simulation time.

# A reduced-complexity CDMA base station modulator

A CDMA forward-link base station modulator spreads each user's channel with
two pilot PN codes (I and Q), then shapes it with a 48-tap FIR filter. A
conventional three-sector modulator does this separately for every channel
and for both of its transmit sections: with 64 channels per sector that is
768 spreaders and 768 filters. This design uses a different structure. In
each sector, the Walsh-covered and gain-weighted channels are **added
first**. The resulting multilevel sum is then spread once for I and once
for Q, and each of the two results is filtered once. The whole three-sector
modulator therefore has 6 spreaders, 6 FIR filters and 192 Walsh covers.
The structure follows the modulator proposed in the article "An Improved
Base Station Modulator Design for a CDMA Mobile System"; the details that
article leaves open are filled in here from IS-95 or chosen, as listed
under *Departures and open points*.

What makes adding first possible is a *binary-multilevel exclusive-OR*
operator. It XORs a binary PN chip with a multilevel sum, and the result
equals the sum of the individual binary XORs. This RTL implements the
digital part of the modulator: 192 traffic channel cards, sector routing,
Walsh covering, digital combining, multilevel spreading and filtering. It
ends at the filter outputs, which would drive the D/A converters.

## The binary-multilevel XOR

Take k binary chips y_i, a common binary PN chip p and a sum
r = y_0 + ... + y_{k-1}. Then

    sum_i (p XOR y_i) = r           if p = 0
                      = k - r       if p = 1

So one adder followed by one operator

    EXOR(p, r) = p ? (R - r) : r,     R = radix - 1 = largest value of r

gives the same result as k XOR gates placed before the adder. With gains the
same holds. If r = sum G_i y_i, then sum G_i (p XOR y_i) = EXOR(p, r) with
R = sum G_i taken over the channels in use. Filtering and adding are linear,
so for every sector

    sum_i G_i FIR{ V_i ^ W_i ^ P }  =  FIR{ EXOR(P, sum_i G_i (V_i ^ W_i)) }

Here V_i is the channel symbol, W_i its Walsh chip and P the pilot PN chip.
The left side is the conventional modulator; the right side is this one.
`mlo_xor` is the operator: a subtractor (R - r) and a 2:1 multiplexer
controlled by p. A three-user example with unit gains (R = 3):

    V1 = 100110101, V2 = 011001010, V3 = 110101100, P = 010110010
    r  = 221212211  ->  EXOR(P, r) = 211122221

The same value comes from XORing each V with P and adding the results.

The price is that the filter input is no longer a single bit. It is a 14-bit
level: 64 slots times 8-bit gains gives at most 16320. Each filter therefore
needs real (integer) arithmetic. There are only six filters, though, and
the combiner adds one gated 8-bit gain per channel instead of one
multi-bit filtered sample per channel.

## Signal flow

    vocoder bits --> traffic_channel x192 --> sector_select --+--> sector_modulator (alpha) --> I/Q samples
                     (Section 1 card)        (slot table)     +--> sector_modulator (beta)  --> I/Q samples
                                                              +--> sector_modulator (gamma) --> I/Q samples

    sector_modulator:
      64 x walsh_cover (V ^ W_n, gated by gain G) --> digital_combiner --> level (14 bit)
      enabled gains --> digital_combiner --> R (radix - 1)
      level, R, P_I --> mlo_xor --> fir_filter --> i_out[4]
      level, R, P_Q --> mlo_xor --> fir_filter --> q_out[4]

`bsm_top` also holds `timing_gen`, which provides the chip, symbol and frame
counters, and `cpu_regs`, the microprocessor register file.

## Traffic channel card (`traffic_channel`)

One card per user. In order:

1. `conv_encoder`: rate 1/2 convolutional code, K = 9, generators 753 and
   561 (octal). The register is cleared on the first bit of each frame. The
   vocoder's 8 zero tail bits also flush it.
2. `symbol_repeater`: the rates 9.6 / 4.8 / 2.4 / 1.2 kbps give
   19.2 / 9.6 / 4.8 / 2.4 ksps of code symbols. Each symbol is sent 1, 2, 4
   or 8 times, so the output is always 19.2 ksps. The repeater also paces
   the encoder: it pulls one vocoder bit every 2·2^rate symbols
   (`info_req`).
3. `block_interleaver`: 384 symbols per 20 ms frame, held in a 24 x 16
   array. Symbols are written by columns and read by rows, with two banks
   used in turn. A frame therefore leaves during the next frame.
4. `long_code_scrambler`: a 42-bit long code register that steps once per
   chip. Its output bit is the parity of the register ANDed with the user's
   42-bit mask. The chip at the start of each symbol (decimation by 64) is
   XORed onto the symbol.
5. `puncture_control`: the stream is split into power-control groups of
   24 symbols (1.25 ms, i.e. 800 Hz). In each group, two consecutive
   symbols are replaced by the power-control bit from the microprocessor.
   They start at position 0..15, given by the decimated long code bits at
   positions 20..23 of the previous group (position 23 is the MSB).

Card timing: all stages run in the first five chips of a symbol period.
The result is loaded into `sym_out` on the last chip. So `sym_out` is
constant for a whole symbol period, one period after the symbol was formed.
The symbols of frame f leave during frame f+1. In the first frame after
reset the card sends whatever the interleaver banks hold; they are not
cleared.

## Sector routing and softer handoff (`sector_select`)

Each sector has 64 Walsh slots, and slot n always uses Walsh code n. The
slot table holds, for each of the 3 × 64 slots, a card index, an 8-bit gain
and an enable. Any number of slots may name the same card. A user in softer
handoff between two sectors is simply a card named by one slot in each
sector. A conventional modulator needs a second transmit section on every
card for this case.

## Timing

- `clk` is the chip clock, 1.2288 MHz. A symbol is 64 chips and a frame is
  384 symbols (20 ms).
- `sync` restarts the frame counters, the long code registers and the
  power-control bit positions. It also restarts the pilot PN generators,
  which then hold for their sector's offset (in chips) before running.
  Configure the registers first, then pulse `sync`.
- Pilot PN: 15-bit registers, I: x^15+x^13+x^9+x^8+x^7+x^5+1,
  Q: x^15+x^12+x^11+x^10+x^6+x^5+x^4+x^3+1. One zero is inserted after the
  run of 14 zeros, so the period is 32768 chips.
- Sector pipeline: the combiner sum and the PN chip are registered (1 cycle).
  The XOR is combinational, and the filter registers its output. The filter
  samples for chip c appear two cycles after chip c.
- Filter: 48 taps spaced a quarter chip apart, built as a 4-phase polyphase
  interpolator. Every chip produces 4 samples (`i_out[s][0..3]`) in
  parallel, 32-bit signed. The filter input is the unsigned level, so the
  output carries a DC offset proportional to R/2. The D/A stage must remove
  it, or the level must be mapped to ±1 before the D/A.

## Microprocessor registers (`cpu_regs`)

The bus is write-only: `cpu_we`, a 12-bit address and 32-bit data. A write
takes effect at the next clock edge.

| cpu_addr[11:10] | index | word cpu_addr[9:8] | data |
|---|---|---|---|
| 0 slot | [7:0] = sector·64 + Walsh code | – | [7:0] gain, [15:8] card, [16] enable |
| 1 card | [7:0] card | 0 | [1:0] rate (0 = 9.6 … 3 = 1.2 kbps), [2] power-control bit |
| 1 card | [7:0] card | 1 | long code mask [31:0] |
| 1 card | [7:0] card | 2 | long code mask [41:32] in [9:0] |
| 2 sector | [1:0] sector | – | [14:0] pilot PN offset in chips (used at the next `sync`) |

Reset disables every slot and sets every card to full rate with mask 0.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| bsm_top | N_CARDS | 192 | traffic channel cards |
| bsm_top | N_SECTORS | 3 | sectors |
| bsm_top | N_WALSH | 64 | Walsh slots per sector |
| bsm_top | OSR | 4 | filter samples per chip |
| fir_filter | N_TAPS, COEF | 48, see file | filter |
| bsm_pkg | GAIN_W | 8 | gain width |

Some of these numbers come from the source design: the 192 cards, 3
sectors, 64-ary Walsh covers, 48 filter taps, the 42-bit long code register,
the four rates and repetition counts, 19.2 ksps, 1.2288 Mcps and the 800 Hz
puncturing. The rest are this implementation's choices. The 20 ms frame, the
encoder generators, the long code and pilot PN polynomials, the
power-control bit rule and the four-times filter oversampling follow IS-95.

## Departures and open points

- **Filter coefficients**: the source design gives none. `fir_filter` uses
  a symmetric low-pass response close to the IS-95 baseband filter, scaled
  so that the centre taps are 256. Replace `COEF` for a certified response.
- **Interleaver order**: a plain row/column block interleaver. The IS-95
  bit-reversed row order is not reproduced.
- **Gains**: one gain per slot, shared by I and Q, as the combined-sum
  structure requires. The conventional design has separate I and Q gains.
- **Filter arithmetic**: the filter input is an integer, so each
  coefficient product is built from shifted copies of the input, one per
  set coefficient bit, and summed. There are no multipliers.
- **Microprocessor bus and vocoder interface**: the source design does not
  describe them, so both are this design's own.
- **Not included**: the D/A converters, the carrier mixers, the analog
  low-pass filters and the RF summing. These are analog; `i_out`/`q_out`
  are where they would connect.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`.
Each prints `TB_RESULT checks=N failures=M`. `tb/bsm_ref_pkg.sv` holds
reference models written independently of the RTL: long code and PN
recurrences, the code from its generator polynomials, Walsh codes by
Sylvester doubling, and the filter as a direct sum.

- `tb_bsm_top` runs the full-size modulator (192 cards, 3 × 64 slots) for
  three frames. It checks every I/Q sample of every sector against the
  *conventional* structure: each slot spread and filtered separately, then
  weighted and summed. It also checks two cards' symbol streams against the
  bit-level model, and the bits pulled per frame at all four rates. Softer
  handoffs, both multiplexer paths of the XOR, puncturing and interleaver
  bank swaps must all occur.
- `tb_bsm_full_load` runs the fully loaded cell for two frames: all 192
  cards active, every slot in use, every gain at 255. The combiner's
  largest level is then 64 × 255 = 16320, which fits the 14-bit level.
  It makes the same sample-by-sample comparison.
- `tb_sector_modulator` makes the same comparison for one sector, with
  random symbols and gains.
- `tb_mlo_xor` includes the three-user example above.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
      rtl/bsm_pkg.sv tb/bsm_ref_pkg.sv tb/tb_bsm_top.sv --top-module tb_bsm_top
    ./obj_dir/Vtb_bsm_top

`tb_bsm_top` builds in about half a minute and runs in a few seconds.

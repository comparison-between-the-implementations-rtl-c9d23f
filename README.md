# DVB-S2X BCH decoder, byte-parallel, in SystemVerilog

In a DVB-S2X satellite receiver the LDPC decoder leaves a few residual bit
errors in each frame. An outer BCH code catches them. This RTL is that BCH
decoder for normal FECFRAMEs. It takes a frame of Nbch bits (14400 to 58320),
eight bits per clock. It corrects up to t = 8, 10 or 12 flipped bits,
depending on the code rate. It then returns the Kbch message bits, eight per
clock, and a per-frame status: how many bits it corrected, and whether it
detected a frame it could not decode.

The decoder follows the classic three-step BCH algorithm: syndromes, then
Berlekamp-Massey, then Chien search. Around it sit a code-rate ROM and a
byte-wide frame FIFO. The FIFO holds the frame until the error positions are
known. The block partition follows a design described in a 2019 thesis from
the Universidade de Brasília. That thesis ported an FPGA BCH decoder to a
180 nm ASIC flow: "Comparison Between the Implementations of a BCH DVB-S2X
Decoder in FPGA and in ASIC". That text names the blocks and their roles but
not how they work inside. The algorithms here are the standard published
ones, and the sizes, handshakes and timing are this design's own. The section
"Departures and limits" lists what differs.

## The code

| item | value |
|---|---|
| field | GF(2^16), primitive polynomial x^16 + x^5 + x^3 + x^2 + 1 |
| code | narrow-sense binary BCH, roots alpha^1 .. alpha^2t, shortened from length 65535 to Nbch |
| generator | g(x) = product of the minimal polynomials of alpha^1, alpha^3, ..., alpha^(2t-1) (degree 16t) |
| bit order | first bit on the line is the coefficient of x^(Nbch-1); within a byte, bit 7 is first |

Code rates (`in_rate`, a 6-bit index into the ROM). Indices 0 to 10 are the
DVB-S2 normal-frame rates:

| idx | rate | Nbch | Kbch | t |
|---|---|---|---|---|
| 0 | 1/4 | 16200 | 16008 | 12 |
| 1 | 1/3 | 21600 | 21408 | 12 |
| 2 | 2/5 | 25920 | 25728 | 12 |
| 3 | 1/2 | 32400 | 32208 | 12 |
| 4 | 3/5 | 38880 | 38688 | 12 |
| 5 | 2/3 | 43200 | 43040 | 10 |
| 6 | 3/4 | 48600 | 48408 | 12 |
| 7 | 4/5 | 51840 | 51648 | 12 |
| 8 | 5/6 | 54000 | 53840 | 10 |
| 9 | 8/9 | 57600 | 57472 | 8 |
| 10 | 9/10 | 58320 | 58192 | 8 |

Indices 11 to 34 are the normal-frame rates that DVB-S2X adds. All of them
use t = 12, Nbch = 64800 × rate and Kbch = Nbch − 192:

| idx | rates |
|---|---|
| 11-17 | 2/9, 13/45, 9/20, 90/180, 96/180, 11/20, 100/180 |
| 18-24 | 104/180, 26/45, 18/30, 28/45, 23/36, 116/180, 20/30 |
| 25-31 | 124/180, 25/36, 128/180, 13/18, 132/180, 22/30, 135/180 |
| 32-34 | 140/180, 7/9, 154/180 |

Indices above 34 select rate 9/10.

## Life of a frame

```
 in bytes ──┬──> bch_fifo_fsm2 (8192 x 8) ─────────────────────────┐
            │                                                      v
            └──> bch_synd_gen_par ──> bch_ribm_fsm ──> bch_chien_search ──> XOR ──> out bytes
                 (S1..S24)            (Lambda(x))      (8-bit mask/clk)       status
      bch_alpha_rom: Nbch, Kbch, t, Chien start constants (read on in_sof)
      bch_fifo_ctrl: sequences the three phases
```

1. **Receive** (Nbch/8 accepted bytes). Each byte goes into the FIFO and into
   the 24 syndrome accumulators in the same clock. The first byte, marked by
   `in_sof`, also reads the code-rate ROM.
2. **Locate** (2t + 4 clocks). The RiBM array turns S1..S2t into the error
   locator Lambda(x). The Chien registers are then loaded from Lambda and the
   ROM's start constants.
3. **Correct** (Nbch/8 clocks). The FIFO is read one byte per clock. In the
   same clock the Chien search evaluates the eight positions of that byte.
   The byte leaves XORed with the resulting mask. Only the first Kbch/8 bytes
   are output. The parity bytes are still searched, because roots that fall
   there count toward the status.

The FIFO does one action per clock, a write or a read. So `in_ready` goes low
from the end of receive to the last read of the frame. The stage upstream
must hold its data for that time (2t + 4 + Nbch/8 clocks). Back to back, one
frame takes 2·Nbch/8 + 2t + 4 clocks.

### Cycle budget

Let E0 be the clock edge that accepts the last input byte of a frame:

| event | edge |
|---|---|
| `bm_start` | E1 |
| RiBM iterations | E2 .. E(2t+1) |
| `done`, Lambda registered | E(2t+2) |
| Chien load | E(2t+4) |
| first FIFO read and Chien step | E(2t+5) |
| first `out_valid` (registered) | E(2t+6) |
| last message byte | Kbch/8 − 1 edges later, one per clock |
| `st_valid` | one edge after the frame's last byte (parity included) leaves the FIFO |

The worst frame (58320 bits, t = 12) takes 7290 + 28 + 7290 = 14608 clocks,
or 146 µs at 100 MHz. That is about 400 Mbit/s of BCH frames, well above what
a 5 Msymbol/s satellite link delivers (at most about 36 Mbit/s of BCH frames
at 8 bits per symbol).

## Syndromes eight bits at a time

S_j = r(alpha^j). Evaluated serially, that is one Horner step per bit:
S <- S·alpha^j + r_i. `bch_synd_par` folds eight such steps into one clock:

    S' = S·alpha^(8j) + Σ_{i=0..7} byte[i]·alpha^(j·i)

Both sets of constants are computed at elaboration. In hardware this is a
constant multiplier plus an XOR tree. `bch_synd_gen` wraps one step with a
register and a `first` input. With `first` high, the old value is ignored,
so consecutive frames need no clear cycle. `bch_synd_gen_par` instantiates
all 24 units, even syndromes included, and computes each one directly.

## Finding the error locator: RiBM

`bch_ribm_fsm` is the reformulated inversionless Berlekamp-Massey algorithm
(Sarwate and Shanbhag). It uses 3T+1 = 37 processing elements, each with a
delta and a theta register and two GF multipliers. One iteration takes one
clock:

    delta_i <- gamma·delta_(i+1) + delta_0·theta_i
    if delta_0 != 0 and k >= 0:  theta_i <- delta_(i+1), gamma <- delta_0, k <- -k-1
    else:                        k <- k+1

The array starts with delta_i = theta_i = S_(i+1) for i < 2t, a 1 at
position 3t, and zeros elsewhere. After 2t iterations, Lambda_i =
delta_(t+i). This Lambda is a non-zero multiple of the textbook locator, and
its roots are the same.

t is sampled at `start`, so one 12-error array also serves the t = 8 and
t = 10 rates. The elements above 3t stay zero. Syndromes above S_2t are never
read. This matters because, for a t = 8 frame, S17..S24 are not zero even for
a clean codeword. `deg` is the index of the highest non-zero coefficient of
Lambda: the number of errors the decoder expects to find.

## Chien search on a shortened code

The frame is a shortened code. Its first bit is the coefficient of
x^(Nbch-1), not of x^65534. Bit position p is in error when
Lambda(alpha^-p) = 0, and positions arrive in the order Nbch-1, Nbch-2, …, 0.
`bch_chien_search` keeps one register per coefficient:

    L_j = Lambda_j · alpha^(-j·p0)      (p0 = first position of the current byte)

Position p0 − k of the byte (k = 0..7, byte bit 7−k) is in error when

    Lambda_0 + Σ_j L_j · alpha^(j·k) = 0

Each step multiplies L_j by alpha^(8j). The starting value needs
alpha^(-j·(Nbch-1)) = alpha^(j·(65536−Nbch)), which depends on the code rate.
This is what `bch_alpha_rom` stores: 12 constants per rate, computed at
elaboration from the field definition. So the search starts on the first
received bit, with no idle clocks spent skipping the 65535 − Nbch positions
that were shortened away.

The mask is registered. It appears one clock after the step, which is when
the FIFO byte read in the same clock appears.

## Failure detection

A frame with more than t errors usually gives a Lambda whose roots are not all
among the Nbch positions of the frame. The top counts the mask bits over the
whole frame, parity included. It raises `st_fail` when that count differs from
deg(Lambda). This test cannot catch a miscorrection to another valid codeword.
`st_nerr` is the number of bits flipped. The status comes after the message
bytes, so a failed frame's bytes have already left, with whatever mask was
found.

## The frame FIFO

`bch_fifo_fsm2` is an 8192 × 8 array, one action per clock. Its three-state
FSM records the last action: S_WRITE, S_READ or S_FULL. The write that fills
the last free word enters S_FULL. In S_FULL every write is refused until a
read frees a word, so no write can land outside the readable area. A write
has priority when both are requested. The sequencer never requests both. The
read is registered (data one clock after `rd_en`). 8192 bytes hold the
longest frame (7290 bytes).

## Interface of `dvbs2x_bch_dec`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| in_valid / in_ready | in / out | 1 | byte handshake; a byte moves when both are high |
| in_data | in | 8 | received byte, bit 7 first |
| in_sof | in | 1 | first byte of a frame; bytes while idle without it are dropped |
| in_rate | in | 6 | code-rate index (0..34), sampled with in_sof |
| out_valid | out | 1 | corrected message byte (no back-pressure) |
| out_data | out | 8 | corrected byte |
| out_sof / out_eof | out | 1 | first / last message byte of a frame |
| st_valid | out | 1 | one-clock status pulse per frame |
| st_nerr | out | 5 | bits corrected in the frame |
| st_fail | out | 1 | decoding failure detected |

## Files

| file | block |
|---|---|
| `rtl/bch_pkg.sv` | field constants, types, rate table, GF helper functions |
| `rtl/bch_gf_mult.sv` | GF(2^16) multiplier |
| `rtl/bch_alpha_rom.sv` | code-rate ROM with chip select (Nbch, Kbch, t, Chien start constants) |
| `rtl/bch_synd_par.sv` | one byte-parallel syndrome step |
| `rtl/bch_synd_gen.sv` | one syndrome accumulator |
| `rtl/bch_synd_gen_par.sv` | all 24 syndromes in parallel |
| `rtl/bch_ribm_fsm.sv` | RiBM Berlekamp-Massey with its control FSM |
| `rtl/bch_chien_search.sv` | byte-parallel Chien search |
| `rtl/bch_fifo_fsm2.sv` | single-action frame FIFO, three-state FSM |
| `rtl/bch_fifo_ctrl.sv` | frame sequencer (receive / locate / correct) |
| `rtl/dvbs2x_bch_dec.sv` | top level |
| `tb/bch_tb_pkg.sv` | reference models: log/antilog GF tables, rate table, g(x), systematic encoder, syndromes |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/bch_pkg.sv tb/bch_tb_pkg.sv tb/tb_dvbs2x_bch_dec.sv \
    --top tb_dvbs2x_bch_dec -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Each testbench ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

The testbenches compare the RTL with models written separately. GF
arithmetic in the models uses exp/log tables, while the RTL uses shift-and-add
arrays. Codewords come from a reference encoder whose g(x) is built from
minimal polynomials. A clean codeword must give 24 zero syndromes, which ties
encoder and decoder to the same code. What is covered:

- `tb_dvbs2x_bch_dec` runs at the default sizes. It sends 13 frames back to
  back: DVB-S2 and DVB-S2X rates with t = 8, 10 and 12, frames of 14400 to 58320
  bits, and 0 to
  t random errors anywhere in the frame. Three frames carry more than t
  errors. The test checks every message byte and the status. It checks the
  first-byte latency (2t + 7 sampled edges after the last accepted byte,
  matching the table above) and that message bytes leave on consecutive
  clocks. It also requires that each of these happened at least once: input
  stall, change of t, clean frame, correction, a t-error frame and a flagged
  failure. It takes about 30 s.
- `tb_bch_throughput` streams frames back to back with no input gaps. It uses
  the longest frame of each t and the shortest frame. It checks that the
  frame period is exactly 2·Nbch/8 + 2t + 4 clocks and that every frame
  decodes. At 100 MHz this gives 397 to 400 Mbit/s of BCH frames.
- The unit testbenches check, respectively:
  - the multiplier on 20000 random pairs;
  - every ROM entry;
  - the syndrome step against eight serial Horner steps;
  - the accumulators against direct evaluation;
  - RiBM on 120 error patterns, including its 2t + 2 clock latency, with
    garbage in the unused syndromes;
  - the Chien mask of every byte of full-length frames;
  - the FIFO against a queue, including FULL;
  - the sequencer's phase order, tags and stall.

## Departures and limits

- **Code-rate set.** The ROM covers the normal-frame rates of DVB-S2 and
  DVB-S2X. The rates DVB-S2X defines only for short or medium frames are not
  included.
- **Frame types.** Short (16200-bit LDPC) frames use a GF(2^14) BCH code and
  are not supported.
- **Stalled input.** Input is stalled during locate and correct, because of
  the single-action FIFO. Frames are not overlapped.
- **Parity.** The BCH parity is not output.
- **Late status.** The failure flag comes after the frame's data.
- **Build of the arithmetic.** All syndromes, even ones included, are
  computed directly, and all multipliers are combinational. Timing closure at
  any particular clock (the source design targets 100 MHz) has not been
  evaluated here.
- **Merged packages.** The source design has four VHDL packages (global
  constants, alpha values, decoder types, top-level types). They are merged
  into `bch_pkg`. The alpha values are computed at elaboration rather than
  tabulated.
- **Alternatives not built.** The source design's other FIFO versions and its
  one-bit-per-access top level are not included.
- **Lint.** Verilator reports SYNCASYNCNET on `rst_n` in modules with
  concurrent assertions. The cause is the assertions' `disable iff`, not the
  logic.

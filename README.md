# Memory-based decoder for a time-invariant tail-biting LDPC convolutional code

LDPC convolutional codes get close to the error performance of LDPC block
codes. They also take frames of any length and have simple encoders. Their
drawback in practice is the tail. A terminated code loses rate to the
termination bits. A *tail-biting* code instead wraps the last time instants
of the parity-check matrix around to the first ones, so the frame becomes a
ring with no tail.

This RTL decodes one such code: a rate-1/2, time-invariant, tail-biting LDPC
convolutional code (TB-LDPC-CC). The code is built from a small polynomial
parity-check matrix that is lifted by 6x6 circulants. The decoder does not
shift messages through a chain of processors, as classic pipelined LDPC-CC
decoders do. It keeps every message in memory banks, and four processors walk
through those banks by address. Because the processors only follow addresses,
the iteration count is free. The same hardware can also split its 104 time
instants into one, two or four independent tail-biting frames.

## The code

A time instant carries 8 columns of 6 bits, so 48 code bits. Columns 0-3 are
information and columns 4-7 are parity. The polynomial parity-check matrix
has 4 rows. Each nonzero entry is `D^a * P^s`, where:

- `D^a` is a delay of `a` time instants;
- `P^s` is the 6x6 cyclic permutation shifted by `s`.

Entries are written `a/s`, and `-` marks a zero entry:

| row | c0   | c1   | c2   | c3   | c4   | c5   | c6  | c7  |
|-----|------|------|------|------|------|------|-----|-----|
| 0   | 0/0  | 11/4 | 4/2  | 16/1 | 0/0  | -    | -   | -   |
| 1   | 5/2  | 0/0  | 2/5  | 18/4 | 2/2  | 0/0  | -   | -   |
| 2   | 7/3  | 9/1  | 0/0  | 7/3  | 15/4 | 21/5 | 0/0 | -   |
| 3   | 18/5 | 16/3 | 8/3  | 0/0  | 4/2  | 8/2  | 5/4 | 0/0 |

Check lane `i` of row `r` at time `t` is the XOR, over the nonzero columns
`j`, of bit `(i - s) mod 6` of column `j` at time `t - a`. The time is taken
modulo the frame length, and that wrap is what makes the code tail-biting.

Some properties of this matrix shape the hardware:

- **Memory and constraint length.** The largest delay, the code memory, is 21.
  The constraint length is therefore (21+1) x 48 = 1056 bits.
- **Irregular degrees.** Row degrees are 5, 6, 7 and 8. Column degrees are
  4,4,4,4,4,3,2,1. A variable of degree `d` needs exactly `d` storage slots
  (see below).
- **Lower-triangular parity part.** The parity part has an identity diagonal.
  Each parity column therefore follows directly from the information and the
  earlier parity columns, so a tail-biting codeword exists for every frame
  length. The test bench encodes this way.
- **Delay spacing.** Within any one column, the delays of different rows
  differ by at least 2, modulo 26. This is what lets the pipeline run without
  bypass logic.

Frame sizes are 26, 52 or 104 time instants: 1248, 2496 or 4992 code bits.

## Segments, layers and the processor ring

The message memory is split into four **segments** of 26 time instants. Each
of the four processors (`proc_unit`) owns one segment. All processors work in
lockstep on the same local time `tau` (0..25) and the same **layer**, meaning
base row `r`. The order is layers 0,1,2,3 at `tau = 0`, then the same at
`tau = 1`, and so on. One iteration is therefore 104 layer steps, and each
step does 6 checks in every processor.

A check of processor `q` at local time `tau` reads the variable of column `j`
at local time `tau - a(r,j)`. When that is negative, the variable lies in the
*previous segment of the same frame*. The inter-processor permutation network
(`ipn`) picks that segment:

| `fmode`   | frame                      | previous segment of q            |
|-----------|----------------------------|----------------------------------|
| `MODE_1P` | 26 instants, 4 frames      | q itself                         |
| `MODE_2P` | 52 instants, 2 frames      | the partner in {0,1} or {2,3}    |
| `MODE_4P` | 104 instants, 1 frame      | (q-1) mod 4                      |

The wrap decision depends only on `tau` and `a(r,j)`. So for a given column,
either every processor wraps or none does. As a result every bank serves
exactly one processor per clock, and the network is a plain rotation.

The segments also never overlap in use. A processor at local time `tau`
touches its own instants `tau-21 .. tau`. Its successor touches `tau+5 .. 25`
of the same segment. The two ranges never meet, so running the four
processors side by side is equivalent to one sequential layered schedule.

The controller (`dec_ctrl`) generates one address per column and shares it
with all banks and processors. The messages themselves never move.

## Slot storage: modified on-demand variable node activation

The schedule is layered. Each check uses the newest messages of its variables,
so the variable-to-check message is formed *on demand*, just before the check
that uses it. This converges about twice as fast as flooding.

The storage trick works as follows. A variable of degree `d` has `d`
check-to-variable messages `m1..md` and a channel value `u`. Check `k` needs
`u + sum of the m's other than mk`; it never needs `mk` itself. So `d` slots
are enough:

- The channel value `u` always sits in the slot of the check that visits the
  variable **next**.
- The other slots hold the newest messages of the other checks.

The variable-to-check message for the visiting check is then **the sum of all
`d` slots**. After the check:

1. The new message `mk'` is written into slot `k`.
2. `u`, which was read from slot `k`, moves into the slot of the next visiting
   check.

Compared with keeping `u` separately, this stores 26 instead of 34 values per
48-bit time instant, 30.8% less. A degree-1 variable has only its one slot,
which always holds `u`. Its check messages are used for the hard decision but
never stored. This is the error floor that this code family is known for, and
the model reproduces it faithfully.

Which check visits a variable next depends on the schedule. The check of row
`r` that uses the variable at local time `x` runs at step
`4*((x + a(r,j)) mod 26) + r`. Near the end of a segment, some checks wrap to
the start of the sweep, so the visiting order depends on `x`. `chan_loc`
sorts these step numbers with a few comparators per column. It gives:

- the slot visited first, which is where loading places `u`;
- the slot after the current row's slot, which is where `u` moves.

The hard decision is `sign(variable-to-check + new message)`, that is the full
a-posteriori value. It is written at every visit, so the last visit of the
last iteration decides.

## The 4-stage processor pipeline

| stage | work |
|-------|------|
| S1 | the controller presents the per-column addresses; the banks read (synchronous) |
| S2 | sub-VNUs (`svnu`) sum the slots; `circ_shift` rotates each group into check order |
| S3 | six check node units (`cnu`) compute the new messages; rotate back; build the new slot word; decisions, parity, change flags |
| S4 | write back the word, decisions and flags |

A step writes three clocks after it reads, and there is no forwarding. This is
correct because of the delay spacing: two checks of one variable are always at
least 5 steps apart, including across the boundary between iterations. The
end-to-end test compares the pipelined hardware bit for bit with a purely
sequential model, and they agree.

Between iterations the controller lets the pipeline drain for 4 clocks, so the
early-termination test sees the whole iteration. An iteration therefore takes
108 clocks.

## Arithmetic

- **Number format.** LLRs and messages are 6-bit two's complement with 4
  integer and 2 fraction bits. A positive value means bit 0.
- **Variable-to-check.** The slot sum is kept at 9 bits for the decision, and
  saturated to ±31 for the check node.
- **Check node.** Normalized min-sum with factor 0.75, computed as
  `(m>>1) + (m>>2)` and truncated. Each output takes the minimum and the sign
  product over the *other* inputs.

## Early termination

With `et_en` set, decoding stops after an iteration in which both of these
hold:

- every check is satisfied by the hard decisions produced at that check;
- no hard decision changed.

Under those two conditions the stored decision vector stayed constant for the
whole iteration, and every check was tested against exactly that vector, so
the vector is a codeword. Otherwise decoding stops after `iter_max`
iterations (0 counts as 1). In the modes with several frames, all frames stop
together.

## Test modes

- **`TM_NORMAL`**: decode the input pins.
- **`TM_BIST`**: also compare each output word with `ref_bits` and count the
  differing bits in `bist_errors` (16 bits, saturating). This checks the chip
  at full speed without relying on the output pads.
- **`TM_RANDOM`**: ignore the input pins. Six xorshift32 generators
  (`test_lfsr`) produce an all-zero codeword with noise, with LLRs from -0.25
  to +3.5. The output is compared with zero, which checks the core when the
  input pads are in doubt.

## Interface and timing (`tbcc_decoder`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `fmode` | in | 2 | frame size mode (`fmode_e`) |
| `tmode` | in | 2 | test mode (`tmode_e`) |
| `iter_max`, `et_en` | in | 4, 1 | iteration limit, early termination enable |
| `in_valid`/`in_ready`/`in_llr` | in/out/in | 1/1/288 | one time instant per clock; element `j*6+i` is column `j`, lane `i` |
| `out_valid`/`out_ready`/`out_bits` | out/in/out | 1/1/24 | decided information bits of one time instant |
| `ref_bits` | in | 24 | expected bits in `TM_BIST` |
| `bist_errors` | out | 16 | mismatching bits of the last frame |
| `frame_done`, `frame_iters`, `early_stop` | out | 1, 4, 1 | end-of-frame pulse, iterations used, stopped early |

A job runs in three phases that do not overlap:

1. **Load.** 104 time instants, in time order. In the small-frame modes,
   frame `k` starts at instant `k x frame length`.
2. **Decode.** 108 clocks per iteration.
3. **Output.** One priming clock, then 104 words.

With 4 iterations that is 641 clocks per 2496 information bits. At the
305 MHz clock of the original chip this gives 1.19 Gb/s. The decode phase
alone reaches 5.8 bits per clock, or 1.76 Gb/s. The modes must stay stable
during a frame.

## Memory

Each segment keeps, per column, 26 message words of degree x 36 bits. All
slots of a lane group are in one word, so a variable is read and written in a
single access. Each segment also has one decision bank per column
(26 x 6 bits). Together they hold 97,344 message bits and 4,992 decision bits.

The columns of degree 3 and 4 have one bank (`msg_mem`) per segment. The
narrow columns share banks between segments (`shared_mem`): every processor
uses the same address in the same clock, so their words can sit side by side
in one word of at most 144 bits.

- The degree-1 column puts all four segments in one bank.
- The degree-2 column puts a pair of segments in each bank.

Per-lane write enables let a load fill one segment at a time. All banks are
plain arrays with one read and one write port and synchronous
read-before-write, ready for mapping to SRAM macros.

## Size after generic synthesis

A generic yosys synthesis of the full decoder, before technology mapping,
gives about 12,900 cells and 11,900 flip-flop bits. The four processors'
pipeline registers account for most of the flip-flops. The memory arrays
hold 102,336 bits and stay as arrays, so that SRAM macros can take their
place.

## Where this RTL departs from the original chip, or had to choose

- **Stage contents.** The exact contents of the original pipeline stages, the
  routing of the inter-processor network and the early-termination criterion
  are this design's own.
- **Fixed-point details.** The lane direction of `P`, the saturation and the
  truncation of the 0.75 scaling are this design's choices.
- **No overlap of phases.** Load and output are not overlapped with decoding,
  so sustained throughput is below the original 1.83 Gb/s (see above).
- **Control duplication.** The original duplicates control modules to cut
  fanout. That is left to synthesis here.
- **No encoder.** The chip is a decoder. The bench computes codewords itself.
- **Not included.** Pads and memory macros are process-specific and are not
  part of this RTL.

## Files

`rtl/`:

- `tbcc_pkg.sv`: the code tables and shared types.
- `tbcc_decoder.sv`: the top level.
- `dec_ctrl.sv`: phases, addresses and early termination.
- `proc_unit.sv`: one processor.
- `svnu.sv`, `cnu.sv`: variable and check node arithmetic.
- `circ_shift.sv`, `ipn.sv`: the permutation networks.
- `chan_loc.sv`: channel value location.
- `msg_mem.sv`, `shared_mem.sv`: memory banks (own and shared).
- `test_lfsr.sv`, `bist_cmp.sv`: self-test.

`tb/` has one self-checking bench per module. `tbcc_decoder_tb` runs the
whole design at full size, as follows:

- It encodes random tail-biting codewords and checks that they satisfy H.
- It adds noise and decodes frames in all three frame modes and all three
  test modes, with input stalls and output back-pressure.
- It compares every output bit and the iteration count with an independent
  sequential model of the algorithm.
- It checks cycle counts, and checks that moderately noisy frames (about 9%
  raw bit errors) come out error-free.

To run a bench with plain Verilator:

```
verilator --binary --timing --assert --top-module tbcc_decoder_tb \
  -y rtl -y tb +libext+.sv rtl/tbcc_pkg.sv tb/tbcc_decoder_tb.sv
./obj_dir/Vtbcc_decoder_tb
```

Each bench ends with `TB_RESULT checks=N failures=M`. The full-size bench
runs in well under a second.

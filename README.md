# BPC-PaCo: bitplane coding with parallel coefficient processing

Bitplane coders such as the JPEG2000 tier-1 coder walk a codeblock of wavelet
coefficients one coefficient at a time. Each decision depends on the
neighbours already coded and on one adaptive arithmetic coder, so only one
symbol can be in flight at a time. BPC-PaCo changes the coder just enough to
process **T coefficients in the same clock step**:

- The codeblock is cut into T vertical **stripes of two columns**. Each stripe
  has its own lane and its own arithmetic coder, and all lanes follow the same
  scan in lockstep.
- Contexts are formed from neighbours in a way that works with this scan.
- Probabilities come from a **fixed (stationary) table** indexed by subband,
  bitplane and context. No adaptation runs between symbols.
- Every lane produces **fixed-length codewords** of W bits. The codewords of
  all lanes are placed in one bitstream in an order that a decoder can
  reproduce without side information. A lane reserves its slot when it
  *opens* a codeword and fills it when the codeword is *finished*.

This repository is a synthesizable SystemVerilog implementation of a
codeblock **encoder** and **decoder** with T = 32 lanes for 64×64
codeblocks. Encoder and decoder sit next to each other around one bitstream
memory (`bpc_paco_top`). The testbenches encode random codeblocks, compare
every codeword with an independent behavioural model, decode full and
truncated streams, and check lossless reconstruction.

## The parallel scan

With `COLS = 2T` columns, lane *t* owns columns `2t` and `2t+1`. One **step**
visits one coefficient in every stripe at the same time:

```
for each row y = 0 .. ROWS-1            (top to bottom)
  for h = 0, 1                          (left column of each stripe, then right)
    all lanes t in parallel: coefficient (y, 2t + h)
```

One pass over the codeblock is `2·ROWS` steps (128 at the defaults). All
lanes see the same row, so one read of a row from the codeblock buffer feeds
all lanes. Lanes that have nothing to code in a step sit idle, as SIMD lanes
would.

## Coding passes

Bitplanes are coded from the most significant one, `nbp-1`, down to 0. `nbp`
is the number of bitplanes the largest magnitude needs, and the encoder
reports it for the codeblock header. The top bitplane gets only a cleanup
pass. Every lower bitplane gets three passes in this order:

| pass | a lane codes the visited coefficient when it is ... | symbol |
|---|---|---|
| SPP (significance propagation) | not yet significant, and its significance context is not 0 | bit j |
| MRP (magnitude refinement) | significant since an earlier bitplane | bit j |
| CP (cleanup) | not yet significant, and not coded by this bitplane's SPP | bit j |

When a coded bit makes a coefficient significant, its sign is coded next.
In hardware the sign is coded in a second cycle of the same step:

- **STEP_A** codes the significance or refinement bits of all lanes.
- **STEP_B** codes the signs of the lanes whose coefficient just became
  significant.
- STEP_B is skipped when no lane has a sign to code. This is the common case
  in most passes.

The state of each coefficient is three bits, held per row as `COLS`-bit
vectors:

- **significant**: its significance bit has been coded.
- **newly significant in this bitplane**: it is excluded from this plane's
  MRP.
- **visited by this SPP**: it is excluded from this plane's CP.

They are updated with row masks after every step. The next step therefore
sees neighbours that became significant earlier in the same pass. In the
left column that is three of the eight neighbours (the row above). In the
right column it is five: the row above, plus the left and right neighbours in
the same row. The right neighbour is the left column of the next stripe,
visited one step earlier. Encoder and decoder use the same update, so they agree step by
step.

## Contexts (`bpc_ctx`, `bpc_ctx_row`)

- **Significance context**: the number of significant neighbours among the
  eight around the coefficient (0..8). Positions outside the codeblock count
  as not significant.
- **Sign context**: from `chi = +1 / -1 / 0` for a significant positive,
  significant negative or non-significant neighbour. `chiV` is the sum over
  the up and down neighbours, `chiH` the sum over left and right:
  - 0 when both are non-zero with the same sign;
  - 1 when `chiV = 0` and `chiH != 0`;
  - 2 when `chiV != 0` and `chiH = 0`;
  - 3 otherwise.
- **Refinement**: a single context.

The probability table has 14 entries per subband and bitplane: 0..8 for
significance, 9..12 for sign, 13 for refinement. `bpc_ctx_row` cuts the 3×3
neighbourhood of each lane out of rows y−1, y, y+1 and instantiates one
`bpc_ctx` per lane. This logic is combinational.

## Stationary probability table (`bpc_prob_lut`)

There is one 7-bit probability `p` per (subband, bitplane, context):

- `p = floor(P(lower symbol) · 2^7)`.
- The lower symbol is a 0 bit, or a **negative** sign.
- The table is trained off line. The host loads it through `lut_wr_*` before
  coding. Encoder and decoder each have their own copy, both written by the
  same port.
- All lanes share the subband and bitplane; each lane reads its own context.
  Reads are combinational.
- `NSUB = 16` subbands corresponds to a 5-level transform (3·5 + 1).

## Arithmetic coder with fixed-length codewords (`bpc_ac_encoder`, `bpc_ac_decoder`)

Each lane keeps an integer interval with left end `L` and size `S` (the size
minus one), both W = 16 bits. `S = 0` means "no open codeword".

| event | encoder | decoder (holds the codeword `I`) |
|---|---|---|
| symbol arrives with `S = 0` | reserve a slot; `L = 0`, `S = 2^W − 1` | fetch the next word into `I`; `L = 0`, `S = 2^W − 1` |
| split | `f = ((S·p) >> 7) + 1` | same `f`; `g = L + f` |
| symbol 0 | `S = f − 1` (that is, `(S·p) >> 7`) | if `I < g`: symbol 0, `S = f − 1` |
| symbol 1 | `L = L + f`, `S = S − f` | if `I ≥ g`: symbol 1, `L = g`, `S = S − f` |
| `S` reaches 0 | `L` is the finished codeword | the next symbol needs a new word |

- Probabilities never adapt, so each lane needs only one multiply
  (16 × 7 bits), a shift and an add per symbol.
- A symbol can empty `S` immediately, for example with a very small `p`.
  That codeword then carries one symbol.

## Codeword ordering: reservation, dispatch and flush

This is the part that makes parallel codewords decodable. It needs the most
care when changing the design.

1. **Reservation (`bpc_slot_alloc`).** In a step, every lane that opens a
   codeword gets the next free slot at the end of the bitstream. Left
   stripes come first:
   `slot[t] = count + (number of requesting lanes below t)`.
   `count` then grows by the number of requests. This is a prefix count over
   T request bits.
2. **Dispatch (`bpc_cw_dispatch`).** A lane's codeword can finish many steps
   after it was opened, and several lanes can finish in the same step. A
   finished codeword waits in its lane with its slot number. The dispatcher
   writes one pending codeword per cycle into the single-write-port
   bitstream memory, lowest lane first.
   - While any codeword is pending, the encoder does not advance (`enc_stall`
     is high).
   - A lane therefore never receives a symbol while it still holds a
     finished codeword. An assertion in `bpc_ac_encoder` checks this.
3. **Flush.** When the last pass ends, every lane with an open codeword
   (`S ≠ 0`) writes its current `L` into its reserved slot.

The decoder rebuilds the same order without side information:

- In each step it knows which lanes decode a symbol, because the pass rules
  depend only on state it already has.
- A lane that needs a codeword (`S = 0`) takes the next word of the stream.
  When several lanes need one in the same step, the lowest lane goes first,
  one word per cycle. This is the order in which the encoder reserved the
  slots.

Truncation:

- `dec_word_limit` gives the number of words available.
- When a lane needs a word at or beyond that limit, the decoder stops at
  once and raises `dec_truncated`.
- Bits decoded until then stay in the output buffer. The rest stay 0.
- Ends of passes are natural truncation points: the encoder reports the
  stream length at each one on `enc_pass_done` / `enc_words`.

Overflow:

- The stream holds `BS_WORDS` slots.
- A reservation beyond the end sets the sticky `enc_overflow`, and the write
  of that codeword is dropped.
- `enc_words` saturates at `BS_WORDS`. The first `BS_WORDS` words are still
  exactly the start of the full stream.

## Encoder engine (`bpc_encoder`)

State machine: `IDLE → PLANE → (STEP_A [→ STEP_B]) × 2·ROWS → PASS_END → … → FLUSH → FLUSH_WAIT → DONE`.

- **PLANE** starts a bitplane: it clears the per-bitplane masks and begins
  with the SPP (or with the CP on the top bitplane).
- **STEP_A / STEP_B** read the bit row of the current plane and the sign
  rows from the input buffer. They form contexts, read T probabilities, and
  clock the coders of the lanes that code.
- **PASS_END** pulses `pass_done` with the pass type, the bitplane and the
  stream length reached.
- Cost per codeblock, apart from one cycle at each pass and bitplane boundary:
  - `(3·nbp − 2) · 2·ROWS` steps;
  - plus one cycle for every step that has signs;
  - plus one stall cycle for every finished codeword that must wait for the
    write port.
- Measured on a full-size 64×64 codeblock with 16 bitplanes:
  - the stream is 3837 words;
  - the encoder needs 11469 cycles;
  - the decoder needs 6019 cycles.

## Decoder engine (`bpc_decoder`)

- It follows the same states and scan as the encoder.
- Per step it first fetches codewords for the lanes that need one (one per
  cycle, lowest lane first, `dec_fetch`). Then it decodes all lanes in one
  cycle.
- Decoded bits are written with a row mask into bitplane j of the output
  codeblock buffer. Decoded signs go into its sign rows.
- The buffer is cleared at start. Truncated coefficients therefore read as
  the bits decoded so far, followed by zeros.
- `dec_pass_done` / `dec_pass_type` / `dec_pass_plane` mark each completed
  pass.

## Codeblock buffers (`bpc_cb_buffer`) and bitstream memory (`bpc_bitstream_buf`)

`bpc_cb_buffer` stores the magnitudes **by bitplane**:

- There is one `COLS`-bit word per (bitplane, row). One read gives bit j of
  a whole row, which is what a step needs.
- Signs are one word per row. Rows y−1, y and y+1 are read together for the
  sign contexts.
- The host writes one coefficient per cycle (sign and magnitude). The buffer
  ORs the magnitudes together to give `nbp`.
- The decoder side uses masked row writes.

The buffer is a flip-flop array with per-bit write enables. A real
implementation would map it onto wide RAMs, one per bitplane.
Generic gate-level synthesis of this array is slow at the full size.

`bpc_bitstream_buf` has:

- `BS_WORDS` × W bits;
- one synchronous write port, used by the encoder's dispatcher;
- two combinational read ports, one for the decoder and one for the host
  (`bs_rd_*`).

## Size

A generic synthesis at the default parameters, before technology mapping,
gives:

| module | generic cells | flip-flop bits | memory bits |
|---|---|---|---|
| `bpc_encoder` (32 lanes, with coders, slot reservation and dispatch) | 5016 | 14925 | 0 |
| `bpc_decoder` | 4201 | 13979 | 0 |
| `bpc_ac_encoder` (one lane) | 43 | 77 | 0 |
| `bpc_ctx_row` (32 lanes of contexts) | 1952 | 0 | 0 |
| `bpc_prob_lut` | 455 | 0 | 31360 |
| `bpc_bitstream_buf` | 3 | 0 | 131072 |

Most flip-flops in the engines are the three state bits per coefficient
(3 × 4096). Each codeblock buffer holds 20 × 4096 magnitude bits and 4096
sign bits. Generic synthesis of the buffers, and so of the whole top, did not
finish within ten minutes, so no figures are given for them.

## Top level (`bpc_paco_top`) and how to drive it

1. Load the probability table: for every subband, bitplane and context, one
   cycle of `lut_wr_en` with `lut_wr_sub`, `lut_wr_plane`, `lut_wr_ctx` and
   `lut_wr_prob`.
2. Load the codeblock:
   - pulse `cb_clear`;
   - then write each non-zero coefficient with `cb_wr_en`, `cb_wr_row`,
     `cb_wr_col`, `cb_wr_neg` and `cb_wr_mag` (magnitude, not two's
     complement);
   - `enc_nbp` is valid on the next cycle.
   - `cb_rd_row` / `cb_rd_col` read a stored coefficient back
     (combinational).
3. Encode: pulse `enc_start` with `enc_subband` and wait for `enc_done`.
   - `enc_words` is the stream length.
   - `enc_overflow` means the stream did not fit.
   - Read the words through `bs_rd_addr` / `bs_rd_data` (combinational).
4. Decode: pulse `dec_start` with `dec_subband`, `dec_nbp` and
   `dec_word_limit`, and wait for `dec_done`.
   - Read the coefficients through `out_rd_row`, `out_rd_col`, `out_rd_neg`
     and `out_rd_mag`.
   - `dec_words_read` and `dec_truncated` tell where decoding stopped.

Other conventions:

- Reset is asynchronous and active low (`rst_n`).
- `enc_start` and `dec_start` are sampled only in the idle state.
- Encoder and decoder may run at the same time only on different streams.
  They share the bitstream memory, so in practice a stream is encoded first
  and then decoded.

## Parameters (`bpc_pkg`)

| parameter | default | meaning |
|---|---|---|
| `T` | 32 | lanes = stripes; codeblock width is 2T = 64 |
| `ROWS` | 64 | codeblock height |
| `W` | 16 | codeword and interval width |
| `PHAT` | 7 | probability precision |
| `MAG_W` | 20 | magnitude bitplanes (enough for 16-bit samples after the transform) |
| `NSUB` | 16 | subbands (5 transform levels) |
| `BS_WORDS` | 8192 | bitstream slots (32 bits per coefficient of a 64×64 block) |

- `T`, `ROWS`, `W` and `PHAT` are the reference configuration of the coding
  method.
- `MAG_W`, `NSUB` and `BS_WORDS` are this implementation's choices.
- Other codeblock heights (16, 32, 128 or 256 rows, all 64 wide) are built
  by changing `ROWS`.

## Simulating with Verilator

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if the
design hangs. The behavioural reference model is in `tb/bpc_ref_pkg.sv`. It
is a plain loop-by-loop version of the coding method, written independently
of the RTL.

From the repository root, for example for the end-to-end test:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/bpc_pkg.sv tb/bpc_ref_pkg.sv tb/tb_bpc_paco_top.sv \
    --top-module tb_bpc_paco_top -Mdir obj_top
./obj_top/Vtb_bpc_paco_top
```

Replace `tb_bpc_paco_top` with any other testbench name.

| testbench | what it covers |
|---|---|
| `tb_bpc_ctx` | both context rules, all 256 significance patterns with random neighbour signs |
| `tb_bpc_ac_encoder`, `tb_bpc_ac_decoder` | interval arithmetic against a model with extreme and random probabilities, round trips, slot requests, flush |
| `tb_bpc_slot_alloc` | left-first reservation, counts, overflow |
| `tb_bpc_cw_dispatch` | write order, acknowledgement, dropped overflow writes |
| `tb_bpc_bitstream_buf`, `tb_bpc_cb_buffer`, `tb_bpc_prob_lut` | storage, masks, nbp, neighbour rows, out-of-range contexts |
| `tb_bpc_encoder` | T=4, 8 rows: bitstream and pass lengths word for word against the model |
| `tb_bpc_decoder` | T=4, 8 rows: decoding of model streams, full and truncated |
| `tb_bpc_paco_top` | T=4, 8 rows, 64-word stream, 40 codeblocks through encoder and decoder |
| `tb_bpc_paco_full` | the top at its defaults: three 64×64 codeblocks, up to 16 bitplanes |
| `tb_bpc_paco_workload` | the top at its defaults on wavelet data: 8, 12 and 16-bit images, 5-level 5/3 transform, 25 codeblocks each |

The reduced end-to-end test counts each mechanism and fails if one never
occurs:

- encoder stalls;
- sign steps;
- steps where several lanes finish codewords together;
- all three pass types;
- decoder fetches;
- truncated decodes;
- overflows;
- an empty codeblock;
- lossless round trips.

It also checks:

- every codeword;
- the stream length after every pass;
- the decoder's pass sequence;
- the decoded codeblock against the model for truncated streams.

The full-size test builds in about 20 s and runs in under a second.

### Wavelet workload

`tb_bpc_paco_workload` runs the codec at full size on realistic coefficient
data:

- It builds a 256×256 synthetic image at 8, 12 and 16 bits per sample: a
  ramp, a sharp-edged disc, fine stripes and noise.
- It applies the reversible 5/3 lifting wavelet with 5 levels, inside the
  testbench.
- It cuts the 16 subbands into 64×64 codeblocks. Subbands smaller than 64×64
  are padded with zeros.
- It estimates a stationary probability table from the same data, per
  subband and bitplane.
- It encodes every codeblock, decodes it losslessly, and decodes it again
  from a stream cut in the middle.

Results:

| bits per sample | lossless rate | largest codeblock stream |
|---|---|---|
| 8 | 4.22 bits per sample | 1499 words |
| 12 | 8.07 bits per sample | 2540 words |
| 16 | 12.12 bits per sample | 3558 words |

All results are bit-exact against the model. The largest stream is well
inside the 8192-word bitstream memory. The rates reflect the synthetic
noise and the rough table, not the compression the method reaches with
trained tables on photographic data.

## Where this design departs from the coding method

- **Hardware organisation.** The method is defined for SIMD software, with
  one thread per stripe. Here each stripe has its own lane of logic and all
  lanes advance in one clock step.
  - The sign gets a second cycle (STEP_B) instead of being interleaved in
    the thread's instruction stream.
  - The result is the same bitstream as the sequential definition.
- **Codeword write-back.** Finished codewords are written one per cycle, and
  the scan stalls while any is pending. A wider or multi-port memory would
  remove most stalls without changing the stream.
- **Decoder fetch.** The decoder reads one word per cycle, lowest lane first.
- **Sign symbol.** A negative sign is coded as the lower symbol (like a 0
  bit) and a positive sign as the upper one. Table entries for sign contexts
  are therefore probabilities of "negative".
- **Sizes the method leaves open.**
  - `MAG_W = 20` bitplanes.
  - `BS_WORDS = 8192` words.
  - Overflow saturates the stream and raises a flag, instead of being
    prevented by rate control.
- **Not included.** These parts of a complete coder lie outside the
  bitplane coder and are not built:
  - wavelet transform and quantisation;
  - rate-distortion optimisation, which chooses how many passes of each
    codeblock to keep (the pass-end lengths give it what it needs);
  - training of the probability table (the host loads it);
  - codestream headers;
  - the sequential, single-coder variant of the method.
- **Interfaces.** Handshakes, reset and status outputs are this
  implementation's own.

## Trust and limits

- Every block is checked against independently written expectations.
- Each block's testbench has been shown to fail when that block is broken
  in one significant way.
- Bit-exactness with another implementation of the method has not been
  checked: none was available. The reference model here follows the same
  reading of the method as the RTL. Errors common to both, for example in
  sign polarity or context numbering, would not be caught.
- The probabilities used in the tests are random stationary tables, not
  trained ones. Compression ratios are therefore not meaningful, only
  correctness.

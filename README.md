# Variable-length eight-parallel Reed-Solomon codec (RS(255,239) family)

Multi-gigabit WPAN links (IEEE 802.15.3c, ECMA-387) protect their frames with
RS(255,239) over GF(2^8), which corrects t = 8 symbol errors. Most of the
codewords are *shortened*: the same code, but with fewer message symbols. A
decoder built only for n = 255 wastes time on short codewords because it has
to clock through the 255 − n zero symbols that were never sent. This codec
works on all shortened lengths natively, so its latency scales with the
codeword. It also moves **eight symbols (64 bits) per clock**, which is
19.2 Gb/s at 300 MHz.

Variable length and eight-lane parallelism pull against each other. A
codeword of n symbols fills ceil(n/8) bus words. When n is not a multiple
of 8, the last word is only partly filled. Every parallel stage assumes that
lane *l* of word *w* always carries the same power of alpha. Shortening
breaks that.

The core trick is a **permutation**. Before the stream enters the encoder or
the syndrome unit, it is shifted so that (8 − k mod 8) mod 8 zero symbols
come first. A leading zero in front of a polynomial does not change its
value. With that shift, the lane structure is the same for every code
length: the last symbol always lands in lane H of the last word. What still
depends on the length is handled by **code_size-indexed constants**:

- first-root values in the Chien search;
- a code_size-selected tap on the FIFO that holds received words;
- per-stage controllers that carry code_size along with each codeword.

With these, codewords of different lengths can be in flight at the same
time.

All arithmetic is in GF(2^8) with p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D).
The generator polynomial is g(x) = ∏_{i=0}^{15} (x + α^i).

## Bus format and code_size

- `code_size` is **k**, the number of message symbols, from 1 to 239. The
  codeword has n = k + 16 symbols.
- A symbol stream is carried as `sym8_t = logic [0:7][7:0]`. Lane A (`[0]`,
  bits 63:56) is the first symbol in time, which is the highest-degree
  coefficient.
- A codeword is sent on consecutive clocks in natural order. The last word is
  zero-filled after the last symbol. A `start` pulse marks the first word and
  `code_size` is sampled on that clock.
- Lengths:
  - message: c = ceil(k/8) words;
  - codeword: W = c + 2 words.
- Outputs are framed with `*_valid`, `*_sop` and `*_eop`.
- Reset is asynchronous and active low (`rst_n`).

Padding types are grouped by k mod 8. The table lists the eight types at
p = 28 (message words c = p):

| k mod 8 | leading zeros | example |
|---|---|---|
| 0 | 0 | RS(240,224) |
| 7 | 1 | RS(239,223) |
| 6 | 2 | RS(238,222) |
| 5 | 3 | RS(237,221) |
| 4 | 4 | RS(236,220) |
| 3 | 5 | RS(235,219) |
| 2 | 6 | RS(234,218) |
| 1 | 7 | RS(233,217) |

## Permutation (`rs_permute`)

Let z = (8 − k mod 8) mod 8. Output word *j*, lane *l* is filled as follows:

- if *l* ≥ z, it is input word *j*, lane *l − z*;
- otherwise, it is lane *l − z + 8* of the previous input word (or zero for
  the first word).

Building this takes one register per lane holding the previous word, plus an
8-way lane shift chosen by z. The output is registered, so the latency is one
clock.

The permuted stream is ceil(k/8) words for the encoder and W words for the
syndrome unit (`EXTRA_WORDS` = 0 or 2). Because the z leading zeros do not
change the polynomial, the permuted word holds the same data as the
unpermuted codeword.

## Encoder (`rs_encoder`)

The encoder is systematic and absorbs one permuted message word per clock.
The 16-symbol remainder `rem` (D0..D15) is updated as follows:

```
u_j  = rem[8+j] ^ pw[7-j]                    j = 0..7
rem' = (rem << 8 symbols) ^ Σ_j u_j · G_j
G_j  = x^(16+j) mod g(x)                     (eight partial generator polynomials)
```

The G_j table is computed in `rs_pkg` by constant functions.

The output is the message in its original order, then P0..P15, where P0 is
the x^15 coefficient. Parity starts in the lane after the last message
symbol, and zeros follow the last parity symbol. The first output word
appears **3 clocks** after the first input word. The next codeword can start
W clocks after the previous one.

## Decoder

```
          +-----------+  serial S0..S15   +---------+  σ, ω   +---------------+
 din ---->| permute + |------------------>|   KES   |-------->| Chien/Forney/ |---> dout
    |     | syndrome  |  (8 bit/clk)      | 16 PEs  | 48 clk  |  correction   |
    |     +-----------+                   +---------+         +---------------+
    |                                                               ^ rx
    +-------------> FIFO (delay = 70 + ceil(k/8), tap by code_size) +
```

### Syndromes (`rs_syndrome`)

Each of the 16 accumulators evaluates R(α^i) with a Horner step over eight
symbols per clock:

```
acc_i <- acc_i · α^(8i) ^ Σ_l pw[l] · α^(i(7-l))
```

On the first word the feedback is zero. On the last word, the 16 results are
loaded into a shift register and leave serially, S0 first. S0 is on `syn` in
cycle W + 1 after the first input word, and S15 in cycle W + 16.

Because the transfer is serial, two codewords must be at least 16 clocks
apart at this point. `overrun` flags a load that comes while the shift
register is still busy.

### Key equation solver (`rs_kes`, `rs_kes_pe`)

The solver finds σ(x)·S(x) ≡ ω(x) mod x^16 with the modified Euclidean
algorithm:

- It collects the syndromes and starts a chain of 16 processing elements
  with R = x^16, Q = S(x), λ = 0, μ = 1.
- Each PE does one Euclid step in three register stages:
  1. find the degrees, swap the pairs, and take the leading coefficients;
  2. do the scalar multiplies and the shift by x^(deg R − deg Q);
  3. XOR the results.
- A codeword whose remainder is already below degree 8 passes through
  unchanged.

Sixteen steps are always enough, so σ and ω are valid **48 clocks** after
S15. The chain is fully pipelined.

σ and ω share an unknown scale factor. It cancels in the Forney ratio and
does not move the roots.

### Chien search, Forney and correction (`rs_chien_forney`)

The search runs in the same natural order as the received stream. Because of
that, the corrected word lines up with the FIFO output and needs no inverse
permutation.

Lane *l* of word *w* is at degree d = n − 1 − (8w + l). It is tested at
β = α^(255−d):

- When `kes_valid` arrives, each cell loads coef_i · β₀,l^i, with
  β₀,l = α^(256−n+l). This is the code_size-indexed first-root constant. For
  RS(240,224) the first roots are α^16..α^23.
- On every later clock, each cell is multiplied by the constant α^(8i). The
  last word therefore always reaches α^248..α^255.

The pipeline after `kes_valid` (cycle T) runs as follows:

| cycle | work |
|---|---|
| T+1+w | cells for word w |
| T+2+w | σ(β), σ_odd(β) = β·σ'(β) and ω(β) summed per lane |
| T+3+w | zero detect on σ(β); 256×8 inverse table on σ_odd(β) |
| T+4+w | error value Y = ω(β) · σ_odd(β)⁻¹ (the Forney formula for roots starting at α^0) |
| T+5+w | `dout = rx ^ Y`, registered |

Lanes past the end of the codeword are never corrected.

`errcnt` (4 bits) is the number of roots found. `fail` is set when that
number differs from deg σ, which is the usual sign of more than 8 errors.
Both are valid on the `dout_eop` word.

### FIFO (`rs_fifo`)

The received words are written every clock into a circular memory of 101 × 64
bits. The read address is the write address minus (70 + ceil(tap_k/8)), where
`tap_k` is the code_size of the codeword being corrected. The readable delays
range from 71 to 100 clocks.

This is the delay-line-with-output-mux of the original architecture, with
fewer moving bits. The decoder zeroes the FIFO input outside codewords.

## Latency and wait time

From the first received word to the first corrected word, the decoder takes
**71 + ceil(k/8) clocks**. The sum breaks down as:

- W + 16 clocks until S15;
- 48 clocks in the solver;
- 5 clocks in the correction pipeline.

Because W = c + 2, this adds up to 71 + c. For example, RS(255,239) takes 101
clocks, RS(96,80) 81, and RS(17,1) 72.

Since the latency depends on k, a short codeword that follows a long one
would catch up with it. Codeword *j* with c_j message words may therefore
start after codeword *i* only at:

```
s_j >= s_i + W_i + max(0, c_i - c_j, 16 - W_j)
```

The three terms mean:

- `c_i - c_j`: a shorter codeword waits by the difference in message words,
  so the outputs do not overlap.
- A longer codeword has its wait reduced by the same amount, to zero.
- Codewords of equal size need no wait.
- `16 - W_j`: only matters for codewords shorter than 16 words (k ≤ 111).
  It keeps the serial syndrome transfer free.

A source that always leaves **29 idle clocks** after each codeword is always
correct: 29 is 30 − 1, from RS(255,239) to RS(17,1). A violation raises the
sticky `dec_overrun` (OR of the stage overrun checks). After a violation,
outputs are not guaranteed.

## Top level (`rs_top`)

The top holds the encoder and the decoder side by side. They share only
`clk` and `rst_n`.

| port | dir | width | meaning |
|---|---|---|---|
| `enc_start`, `enc_code_size`, `enc_din` | in | 1, 8, 64 | message input |
| `enc_dout`, `enc_dout_valid/sop/eop` | out | 64, 1 | codeword output, 3 clocks after input |
| `dec_start`, `dec_code_size`, `dec_din` | in | 1, 8, 64 | received codeword |
| `dec_dout`, `dec_dout_valid/sop/eop` | out | 64, 1 | corrected codeword, 71 + ceil(k/8) clocks after input |
| `dec_errcnt`, `dec_fail` | out | 4, 1 | on the `dec_dout_eop` word |
| `dec_overrun` | out | 1 | sticky wait-time violation |

After coarse synthesis, the top is about 39k word-level cells, 33.5k
flip-flop bits and 154k memory bits. Most of the flip-flops are in the
16-element solver chain (4 polynomials × 17 symbols per stage). Most of the
memory bits are read-only tables in the Chien stage. Each of the 72
first-root products looks up a 256-entry α^e table, and each of the eight
lanes has its own 256 × 8 inverse table.

## Where this design departs from the published architecture

- **Solver iteration.** The original uses a degree-computationless
  modified Euclid solver described elsewhere. Here it is a textbook
  modified Euclid step with explicit degrees, built to the same function,
  three-stage pipelining and 48-clock latency.
- **Decoding time and FIFO size.** The design follows the 71 + ceil(k/8)
  latency. One of the original's timing diagrams and its 64 × 77 FIFO
  suggest a shorter pipeline (46 + ceil(k/8)). Holding a word for up to 100
  clocks needs 101 words, so the FIFO is 101 × 64.
- **Error count width.** It is 4 bits, because a 3-bit count cannot
  report 8 errors.
- **Failure rule.** `fail` means "roots found ≠ deg σ". It catches most
  patterns of 9 or more errors, but not all: no decoder can catch them all.
- **Spacing rule.** The 16-clock syndrome spacing term in the wait rule
  belongs to this design, because its syndromes are transferred serially.
- **Enable input.** The original timing charts show an encoder enable
  input. It is not implemented; `enc_start` alone frames a codeword.
- **Primitive polynomial.** It is 0x11D, the polynomial of the WPAN
  standards' RS code.

## Files

`rtl/`:

- `rs_pkg.sv`: field arithmetic and the constant tables (α^i, log,
  inverse, g(x), G_j), all built by functions at elaboration.
- `rs_permute.sv`, `rs_encoder.sv`, `rs_syndrome.sv`: the permutation, the
  encoder and the syndrome unit.
- `rs_kes_pe.sv`, `rs_kes.sv`: the solver element and the solver chain.
- `rs_chien_forney.sv`, `rs_fifo.sv`, `rs_decoder.sv`: the correction
  stage, the received-word FIFO and the decoder.
- `rs_top.sv`: the codec top level.

`tb/`:

- `rs_ref_pkg.sv`: an independent log/antilog GF model. It provides a
  long-division encoder, direct syndromes, locator polynomials and related
  helpers.
- `tb_<module>.sv`: one self-checking test per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb_rs_top.sv`: the end-to-end test at full size. It has three phases:
  1. 48 messages of every padding type (including k = 1 and k = 239) go
     through the encoder. Words and latency are checked.
  2. The encoder's codewords get 0 to 8 random errors, and some get 9 to 12,
     and go through the decoder. It checks the corrected data, the latency of
     71 + ceil(k/8), errcnt and fail. Spacing uses both the tight wait rule
     and the fixed 29-clock wait.
  3. A deliberately early codeword must raise `dec_overrun`.

  The test counts each mechanism (every padding type, equal/shorter/longer
  successor, fixed wait, 8 corrected errors, an uncorrectable codeword,
  overrun) and fails if any of them never occurs.
- `tb_rs_workloads.sv`: runs the intended use cases through encoder and
  decoder at the same time, each checked against the reference:
  - the k = 80, 83, 223 sequence with starts at clocks 1, 39 and 78;
  - RS(255,239) then RS(17,1) after exactly 29 idle clocks;
  - three RS(240,224) codewords with no gap;
  - all eight padding types at k = 217..224 and k = 1..8, with 8 errors
    each.

  In the second and third cases the corrected codewords must leave back to
  back, with no idle clock between them.

## Simulating

With Verilator 5 (packages first):

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/rs_pkg.sv tb/rs_ref_pkg.sv $(ls rtl/rs_*.sv | grep -v rs_pkg) \
    tb/tb_rs_top.sv --top-module tb_rs_top -j 8
./obj_dir/Vtb_rs_top
```

Replace `tb_rs_top` with any other `tb_*` to test one block. Every test
finishes in seconds and has a watchdog. `-Wno-fatal` is needed because the
lane-ordered types (`logic [0:7][7:0]`, lane A first) raise Verilator's
ascending-range style warning; the order is deliberate.

## Changing the design

- `LANES`, `T_CORR`, `N_MAX` and `PRIM_POLY` live in `rs_pkg`. The tables
  follow them.
  - The correction pipeline and the syndrome serialisation assume 8 lanes
    and t = 8 (16 serial clocks, 48 solver clocks). Changing them means
    re-deriving the 71-clock decoding time.
  - The FIFO's `BASE_DELAY` must match that time.
- To move to another field polynomial, change `PRIM_POLY` and the reference
  in `tb/rs_ref_pkg.sv` together.

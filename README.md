# RS(208,200) Reed-Solomon codec with burst-error channel

This is a Reed-Solomon encoder and decoder for the shortened code RS(208,200)
over GF(2^8). Each 200-byte message gets 8 parity bytes. The decoder then finds
and corrects up to t = 4 corrupted bytes anywhere in the 208-byte word. A burst
of errors that stays within four neighbouring bytes is corrected in full, which
is why this code suits storage and broadcast channels.

The codec follows the structure of the RS(208,200) design in "ASIC
Implementation Of Reed Solomon Codec For Burst Error Detection And Correction".
Its top level is a test chip in which every stage is on the die:

    data ROM -> LFSR encoder -> pseudo-random noise -> decoder
                     |                                    |
                syndrome check                     syndrome check
                (enc_fault)                        (dec_fault)

The decoder is the classic five-step chain: partial syndromes, then
Berlekamp-Massey for the error locator, then Chien search for the error
positions, then Forney for the error values, then XOR correction. Everything
is written in synthesizable SystemVerilog and runs at one symbol per clock,
with words back to back.

## Arithmetic

- A symbol is one byte. It is an element of GF(2^8) in polynomial basis, with
  field polynomial i(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D). alpha = 0x02.
- Addition is XOR. Multiplication is a carry-less product reduced modulo i(x):
  an AND-XOR network. `gf_mult` is that network as a module; the Forney stage
  instantiates it. `rs_pkg::gf_mul` is the same operation as a function. The
  other modules call the function, which unrolls into the same kind of
  network.
- Inversion (needed only in Forney) is a^254. It is computed as
  a^2 · a^4 · … · a^128, a chain of 7 squarings and 6 products.
- The generator polynomial is g(x) = (x − α^1)(x − α^2)…(x − α^8). The first
  root, FCR = 1, is this design's choice. With it the Forney formula takes its
  plainest form, Y = Ω(X⁻¹)/σ′(X⁻¹).

Words are sent highest degree first. Symbol 0 of the stream is the
coefficient of x^207, and the 8 parity symbols are the coefficients of x^7
down to x^0.

Constant tables are computed at elaboration by functions, not read from files.
This covers the generator coefficients, the syndrome roots, the Chien start and
step constants, and the ROM contents. They all follow from i(x), FCR, N and K.

## Encoder (`rs_encoder`)

The encoder divides x^8·d(x) by g(x) in an 8-stage LFSR with internal
feedback. For each message byte, the feedback fb = d ⊕ par[7] is multiplied by
the constant coefficients g_0..g_7 and added into the register chain. The
message bytes pass straight to the output. After byte 200, `in_ready` drops
for 8 cycles while the remainder shifts out, highest degree first. Zeros shift
in during those cycles, which clears the registers for the next message. The
output is registered, so the codeword appears one cycle after its message
byte. With a source that never pauses, a word takes exactly N = 208 cycles.

## Decoder (`rs_decoder`)

The decoder has six pipeline stages plus a buffer. Each stage works on a
different word once the pipe is full.

| stage | module | work | cycles per word |
|---|---|---|---|
| syndromes | `rs_syndrome` | S_j = r(α^(1+j)), j = 0..7, by Horner's rule; 8 constant-multiply accumulators | N (while the word arrives) |
| locator | `rs_berlekamp` | σ(x) by inversion-free Berlekamp-Massey, one iteration per clock | 2t + 1 |
| evaluator | `rs_omega` | Ω(x) = S(x)σ(x) mod x^8, t coefficients in parallel | 1 |
| search | `rs_chien` | σ and x·Ω at x = α^−p for p = 207 … 0, one position per clock | N |
| values | `rs_forney` | Y = x·Ω(x) / σ_odd(x) at roots, else 0 | 1 |
| correction | `rs_corrector` | c = r ⊕ Y, plus the word status | 1 |
| buffer | `rs_fifo` | holds the received bytes until their Y is known (256 × 8) | — |

**Berlekamp-Massey without division.** The textbook algorithm divides by the
previous discrepancy at every step. This version keeps a scale factor γ
instead. With σ = B = 1, γ = 1 and L = 0 at the start, iteration r (r = 0..7)
does the following:

    δ  = Σ σ_i S_(r−i)
    σ ← γσ + δ·x·B
    if δ ≠ 0 and 2L ≤ r:  B ← σ(old), γ ← δ, L ← r+1−L
    else:                 B ← x·B

The result is c·σ(x) for some non-zero constant c. The constant changes no
root, and it cancels in Forney's ratio because Ω is made from the same scaled
σ. So nothing downstream normalises. σ and B are kept 2t + 1 = 9 coefficients
wide. Only σ_0..σ_4 go on to the search. A degree L above 4 marks the word as
uncorrectable.

**Chien search in receive order.** The search must give the error value for
each position in the order the buffered bytes leave the buffer. So it runs from
x = α^−207 up to α^0. Term i of σ is loaded as σ_i·α^(−207i) and multiplied by
the constant α^i every clock. The odd-indexed terms are summed on their own.
In characteristic 2, x·σ′(x) equals that odd sum, so Forney needs no separate
derivative. The same trick runs the Ω bank: term j is loaded as Ω_j·α^(−207(j+1))
and stepped by α^(j+1), so the bank yields x·Ω(x). The error value is then

    Y = X^(1−FCR) Ω(X⁻¹) / σ′(X⁻¹) = x·Ω(x) / σ_odd(x),   x = X⁻¹.

Only the 208 positions of the shortened code are searched.

**Status and failure.** With its last corrected byte the decoder reports three
things:

- `out_detected`: some syndrome was non-zero.
- `out_fail`: the word is uncorrectable. This is set when L > 4, when the
  number of roots found differs from L, or when a root has σ_odd = 0.
- `out_nerr`: the number of bytes corrected.

A failed word is still passed on, with whatever corrections the search made.
The flag tells the consumer not to trust it. As with any bounded-distance
decoder, a word with more than 4 errors can, rarely, land within distance 4 of
another codeword. It is then "corrected" into that codeword without a flag.

**Timing.** Every stage has a fixed latency. The first corrected byte of a
word comes out 2t + 7 = 15 cycles after the word's last byte was taken in,
which is N + 2t + 6 = 222 cycles after its first byte when the input has no
gaps. All N bytes then follow in consecutive cycles. The solver
(2t + 3 cycles) is much shorter than a word, so words may arrive with no gap.
The input may also pause at any time. The buffer has 256 entries, which covers
one word plus the latency (224 are needed). Assertions in `rs_berlekamp`,
`rs_chien` and `rs_fifo` flag overlap, overflow and underflow.

## Channel model (`rs_noise`)

A 32-bit Galois LFSR (x^32 + x^22 + x^2 + x + 1) steps every clock. At the
first symbol of each word, the block samples `noise_en` and `burst_len` (L,
0..15). It then picks a start s = ⌊r16·(N−L+1)/2^16⌋ from 16 LFSR bits, so the
burst always fits inside the word. Symbols s … s+L−1 are XORed with non-zero
pseudo-random bytes, so a burst of L is exactly L symbol errors. `out_err`
marks the corrupted symbols. The source only says that the noise is pseudo
random. The burst shape, the LFSR and the error-value rule are this design's
choices.

## Concurrent checking (`rs_ced`)

A valid codeword has all-zero syndromes. `rs_ced` recomputes the syndromes of
a word stream with its own `rs_syndrome` and raises `out_fault` for any word
that should be valid but is not. The top has two of them:

- One checks every encoder output word (`enc_fault`).
- One checks every decoder output word the decoder did not flag as failed
  (`dec_fault`).

A hardware fault that corrupts a word in either block therefore shows up while
the codec runs. The source names concurrent error detection for both encoder
and decoder, and a parity-check scheme for the encoder, but gives no circuit.
The syndrome check is this design's stand-in for both.

## Top level (`rs_codec_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `run` | in | stream messages from the ROM |
| `noise_en`, `burst_len[3:0]` | in | channel control, sampled at each word start |
| `dec_valid`, `dec_data[7:0]`, `dec_last` | out | the 200 decoded message bytes of each word; parity is dropped |
| `word_done` | out | pulse with the last decoded position of a word |
| `dec_detected`, `dec_nerr[4:0]`, `dec_fail` | out | status of that word |
| `chan_valid`, `chan_err` | out | channel output strobe; `chan_err` marks corrupted bytes |
| `enc_fault`, `dec_fault` | out | concurrent checker alarms |

The message ROM (`rs_data_rom`) holds 256 bytes:
rom[a] = ((29a + 7) mod 256) ⊕ rotl3(a). It streams them in order and wraps
around. Because 256 is not a multiple of 200, successive messages differ. The
contents and depth are arbitrary test data.

## Parameters

The code is fixed by `rs_pkg` (M, POLY, RS_N, RS_K, RS_FCR). The modules take
N, K (or NSYM = N − K, T) and FCR as parameters with those defaults, so smaller
codes can be simulated. The field (M = 8, POLY) is fixed by the package
functions.

## Where this differs from the source, or goes beyond it

- **Choices the source leaves open:** the field polynomial, the first root
  FCR = 1, the inversion-free Berlekamp-Massey, the pipeline schedule, the
  buffer, the failure rules, the channel's burst model and the ROM contents.
- **The generator polynomial:** the source prints g(x) with factors from α^i
  to α^(i+2t). That would be 2t+1 factors. It also gives g(x) as a degree-2t
  polynomial. Here g(x) has exactly 2t factors.
- **Chien search direction:** the source describes testing σ(α^p), but its
  Forney step treats the root as X⁻¹. This design follows the Forney reading.
  It evaluates σ at α^−p, and a root there marks position p.
- **Concurrent error detection:** this is a syndrome recheck, not a
  parity-prediction circuit.
- **Size:** the source's FPGA build uses 671 flip-flops. This RTL has about
  1000 flip-flops plus a 2048-bit buffer, so it is not a gate-level match.
  Timing (41 MHz on Spartan-3E, 100 MHz in 180 nm) was not evaluated.

## Verification

Every module has a self-checking testbench in `tb/`, and each ends by printing
`TB_RESULT checks=N failures=M`. The expected values come from `tb_rs_ref`, a
separate model. It builds log/antilog tables by stepping α, encodes by long
division, and evaluates polynomials term by term. The tests are:

- `tb_gf_mult`: all 65536 products.
- `tb_rs_encoder`: codewords against the reference, with and without source
  gaps; 8 stall cycles per word; N cycles per word.
- `tb_rs_syndrome`, `tb_rs_berlekamp`, `tb_rs_omega`, `tb_rs_chien`,
  `tb_rs_forney`: each stage against direct evaluation, including cycle
  timing.
- `tb_rs_fifo`, `tb_rs_corrector`, `tb_rs_ced`, `tb_rs_noise`,
  `tb_rs_data_rom`: buffer order, status rules, checker response, burst
  length, contiguity and position, ROM sequence and wrap.
- `tb_rs_decoder`: 60 words. They carry 0–4 scattered errors, 4-byte bursts,
  parity-only errors and 5–7 errors, sent back to back and with gaps. The test
  checks exact correction, status, the 15-cycle latency, and that every
  accepted word is a codeword.
- `tb_rs_codec_top`: the full codec at its default size. 48 words run with the
  noise switched on and off at random times and bursts of 0–8 bytes. The
  errors counted from `chan_err` are compared with the decoder's report. It
  also checks the decoded bytes against the ROM formula, one word every 208
  cycles, and that neither checker fires. It counts parity stalls, ROM wraps,
  clean, corrected, 4-byte-burst and uncorrectable words, and fails if any
  count is zero.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rs_codec_top \
        -y rtl -y tb +libext+.sv rtl/rs_pkg.sv tb/tb_rs_ref.sv tb/tb_rs_codec_top.sv
    ./obj_dir/Vtb_rs_codec_top

Swap in another testbench name to run its test. Each test takes well under a
second.

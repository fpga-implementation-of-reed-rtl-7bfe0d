# Reed-Solomon codec for the IEEE 802.16 outer code

This is a synthesizable SystemVerilog Reed-Solomon encoder and decoder for the
outer forward-error-correction code of IEEE 802.16: RS(255,239) over GF(2^8).
A block of 239 data bytes gets 16 parity bytes. The decoder can then repair up
to 8 corrupted bytes anywhere in the 255-byte word. It can do this even when the
errors come in a burst, which is the reason a byte-oriented code is used here.
The same RTL, with `T = 6`, builds the RS(255,243) variant, which corrects up
to 6 bytes. With `T = 4`, the encoder builds RS(255,247).

Both sides process one byte per clock. The decoder is pipelined: at any time
it is computing syndromes for one word, solving the key equation for the word
before it, and correcting the word before that.

## The code

| item | value |
|---|---|
| symbol | 8 bits, GF(2^8) |
| field polynomial | p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D), primitive element alpha = 0x02 |
| word length | N = 255 symbols, first transmitted symbol = coefficient of x^254 |
| parity | 2T symbols, T = 8 (RS(255,239)) or 6 (RS(255,243)) |
| generator | g(x) = (x + alpha^1)(x + alpha^2) ... (x + alpha^2T) |
| syndromes | S_i = R(alpha^i), i = 1 .. 2T |

The generator roots start at alpha^1. This choice gives exactly the 802.16
generator coefficients. For T = 8 they are, highest power first:

    01 76 34 67 1F 68 7E BB E8 11 38 B7 31 64 51 2C 4F

For T = 6 they are:

    01 88 C1 22 33 82 93 A7 AA 84 AF FC 78

A generator with roots alpha^0 .. alpha^(2T-1) would produce a different code
that is not interoperable. `rs_pkg::gen_coef` computes g(x) from `T` during
elaboration. The encoder testbench compares its result against the two lists
above.

GF addition is XOR. Every multiplier (`gf_mul`) is a carry-less 8x8 product
reduced modulo p(x): a small AND/XOR array with no tables. Only one operation
needs a division: the Forney step. It uses a 256-entry inverse table, which
`rs_pkg::gf_inv_table` builds during elaboration from
inv(alpha^e) = alpha^(255-e).

## Encoder (`rs_encoder`)

The encoder is systematic: the data symbols go out unchanged, followed by the
remainder CK(x) = x^2T M(x) mod g(x). The remainder comes from the usual
division LFSR, which has 2T byte registers `par[0..2T-1]`. For each data symbol:

    fb       = data XOR par[2T-1]
    par[j]  <= par[j-1] XOR g_j * fb      (par[-1] = 0)

The g_j are constants, so each of the 2T multipliers reduces to a fixed XOR
network. Once K = N - 2T data symbols have entered, `in_ready` drops for 2T
clocks. During those clocks the registers shift out, highest first, while
zeros shift in. This leaves the registers cleared for the next word.

Timing: the output is registered and appears one clock after the symbol is
accepted. With an input that never pauses, a word takes exactly N clocks, so
the output runs at one symbol per clock. The input may pause at any point
during the data phase.

## Decoder (`rs_decoder`)

```
             +-------------+  syn[2T]  +--------+  Lambda, Omega  +--------------+
 in_data --->| rs_syndrome |---------->| rs_bm  |---------------->| rs_chien_    |---> out_data
   |         +-------------+  valid/   +--------+  valid/ready    | forney       |
   |                          ready                               |  (Chien,     |
   |         +---------------------------------------+  rd_en     |   Forney,    |
   +-------->| rs_delay_fifo (512 x 8 dual-port RAM) |<-----------|   correct)   |
             +---------------------------------------+  rd_data   +--------------+
```

Every received symbol goes to the syndrome unit and to the delay FIFO at the
same time. Each of the three stages hands its result to the next through a
register with a valid/ready pair. When a result is ready before the next stage
is free, it simply waits. The one case where this happens is an error-free
word that follows a word with errors, because the error-free word skips the
key equation.

### Syndromes (`rs_syndrome`)

2T Horner cells run in parallel. Each computes `acc_i <= acc_i * alpha^i + r`
with one constant multiplier. After the N-th symbol, the 2T sums are copied to
an output register and the cells restart on the next word with no idle clock.
`syn_zero` flags an all-zero vector, which means the word is a valid codeword.
On its own, the unit restarts its count on `in_sof`, so a word that was cut
short is dropped. The full decoder still needs complete words, because the
delay buffer would otherwise fall out of step with the corrections.

### Key equation: inversion-free Berlekamp-Massey (`rs_bm`)

This stage needs the error locator Lambda(x) and the error evaluator Omega(x)
that satisfy

    Lambda(x) * S(x) = Omega(x)  mod x^2T,    S(x) = S_1 + S_2 x + ... + S_2T x^(2T-1)

The solver is the division-free form of Berlekamp-Massey. It runs one
iteration per clock for r = 0 .. 2T-1:

    delta   = sum_j Lambda_j * S_(r-j+1)               (T+1 multipliers, XOR tree)
    Lambda <= gamma * Lambda + delta * x * B(x)        (2(T+1) multipliers)
    if delta != 0 and k >= 0:  B <= Lambda, gamma <= delta, k <= -k - 1
    else:                      B <= x * B,  k <= k + 1

Here `k` is a signed counter. It encodes the usual register length L through
k = r - 2L. The test `k >= 0` is therefore the classic condition 2L <= r, and
at the end L = (2T - k) / 2.

The result differs from the textbook Lambda by a non-zero constant factor (the
product of the gammas). Omega is computed from this scaled Lambda, so the
factor cancels in the Forney ratio. The scaled polynomials are used as they
are.

After the 2T iterations, the discrepancy unit computes
Omega_i = sum_j Lambda_j S_(i-j+1) for i = 0 .. T-1, one coefficient per clock.
It is the same dot product with Lambda held fixed, so Omega costs T clocks and
no extra multipliers.

Outputs:

- `num_err` is L, the degree of Lambda and the number of errors the decoder
  believes are present.
- `fail` is set when L > T.
- When `syn_zero` is set, the iterations are skipped: Lambda = 1 and Omega = 0
  are offered one clock later. The `clean` flag records this case.

Latency: 3T + 1 clocks from taking the syndromes to `kes_valid`, which is 25
for T = 8.

Truncating Lambda and B to T+1 coefficients is exact whenever L <= T. Each
coefficient up to x^T depends only on coefficients up to x^T, and the degree
of Lambda never exceeds L.

### Chien search and Forney (`rs_chien_forney`)

Position j, which holds the coefficient of x^j, is in error exactly when
Lambda(alpha^-j) = 0. The search visits positions in received order,
j = N-1 down to 0. It keeps every term Lambda_i x^i and Omega_i x^(i+1) in a
register. Each clock, every term register is multiplied by its constant
alpha^i or alpha^(i+1). When a word is loaded, each term starts at
x = alpha^-(N-1).

The generator roots begin at alpha^1. Forney's formula for this case is
e_j = Omega(x) / Lambda'(x), evaluated at x = alpha^-j. In GF(2^m), the
derivative keeps only the odd terms, so x * Lambda'(x) = Lambda_odd(x). This
gives

    e_j = x*Omega(x) / Lambda_odd(x)

Both polynomials are sums of term registers that already exist:
- Lambda(x) is the XOR of all Lambda terms.
- Lambda_odd(x) is the XOR of the odd Lambda terms.
- x*Omega(x) is the XOR of the Omega terms.

A single inverse lookup and one multiplier then produce the error value.

The evaluation has three register stages. The received symbol is read from
the delay FIFO so that it arrives together with its error value:

| clock | stage | work |
|---|---|---|
| c | 0 | term registers hold position j; FIFO read request |
| c+1 | 1 | XOR trees: Lambda(x), Lambda_odd(x), x*Omega(x); FIFO data arrives |
| c+2 | 2 | root test, inverse table, product: error value |
| c+3 | out | corrected symbol = received XOR error value |

`kes_ready` is high while the stage is idle. It is also high in the clock that
issues position 0, so consecutive words leave back to back.

Each word's status comes out with `out_eof`:
- `out_err_cnt`: the number of roots found.
- `out_fail`: set when the key equation reported L > T, or when the number of
  roots differs from L. This is the standard test for a word that has more
  errors than the code can correct.
- `out_clean`: set when the syndrome was zero.

When the key equation has already failed, the word passes through unchanged.
When the failure is only found at the end, any corrections already applied to
the word stay in place, and `out_fail` tells the user not to trust it.

### Delay buffer (`rs_delay_fifo`)

The delay buffer is a FIFO of `DEPTH` = 512 symbols built on a simple
dual-port memory with a registered read. Its pointers are one bit wider than
the address.

At most one word plus the key-equation latency is stored at once: N + 3T + 6
symbols, which is 285 for RS(255,239). This also holds during a key-equation
wait, because the Chien stage is still draining the previous word. Assertions
catch an overflow, or a read from an empty FIFO.

### Decoder timing

| from | to | clocks (T = 8) |
|---|---|---|
| last symbol of a word in | first corrected symbol out | 3T + 6 = 30 |
| same, word with zero syndrome and Chien stage idle | | 6 |
| throughput | | 1 symbol per clock, words may follow without gaps |

The input has no back-pressure. The design guarantees that a rate of one
symbol per clock can always be absorbed, and assertions check this in
simulation.

## Top level (`rs_codec_top`)

The top places the encoder and the decoder side by side, as the transmit and
receive halves of a modem. They share only `clk` and the active-low
synchronous reset `rst_n`. All ports are plain signals, with `enc_` and `dec_`
prefixes. In a system, a channel sits between `enc_out_*` and `dec_in_*`. In
the end-to-end test, a model that corrupts symbols connects them.

Parameters: `N` = 255 and `T` = 8. The decoder also has `DEPTH` = 512.

## Relation to the published design

This RTL implements a published FPGA design of the 802.16 outer-code encoder
and decoder, and follows these parts of it:

- The code parameters: RS(255,239) with t = 8, and RS(255,243) with t = 6 for
  the decoder.
- The field polynomial and the generator coefficients.
- An LFSR encoder that can also be built for t = 4, 6 and 8.
- The decoder chain: syndrome calculation, Berlekamp-Massey, Chien search with
  Forney correction, and a delay block for the received symbols.
- Pipelining of the decoder and of the Chien/Forney evaluation.

The original was written in VHDL for a Spartan-3E device. The resource counts
reported for it are not reproduced here. They were 380 slices, 426 flip-flops
and 719 LUTs for the encoder, and 1848 slices, 751 flip-flops and 3447 LUTs
for the RS(255,239) decoder.

The original states the generator as a product of (x + alpha^i) for
i = 0 .. 2t-1. However, its printed coefficients and its syndromes
S_i = R(alpha^i), i = 1 .. 2t, both belong to roots alpha^1 .. alpha^2t. This
RTL follows the coefficients and the syndromes. In the printed RS(255,243)
generator, the x^7 coefficient reads 83. The construction gives 82, and the
testbench uses 82.

## What is this design's own choice

The following are not fixed by the code definition, and other choices would be
equally valid:

- The valid/ready handshakes, start/end flags, synchronous active-low reset and
  no back-pressure on the decoder input.
- The inversion-free Berlekamp-Massey form, and computing Omega afterwards on
  the same multipliers. A Euclidean solver or a reformulated systolic BM would
  also work.
- The three-stage Chien/Forney pipeline, the inverse table and the
  Forney-by-odd-terms form.
- The FIFO form and size of the delay buffer.
- The per-word status outputs (`out_err_cnt`, `out_fail`, `out_clean`,
  `out_corrected`) and the zero-syndrome bypass of the key equation.

Limits:

- `N` below 255 (shortened words, which 802.16 uses for short bursts) is
  accepted by the parameters but is not exercised by the testbenches.
- T is limited to 16 by the generator function.
- The design was developed for FPGA use. Resource use was not tuned for any
  device, so the yosys cell counts are not LUT counts of a particular FPGA.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The expected values
come from `tb/rs_ref_pkg.sv`, which computes them a different way: log and
antilog tables, long division for encoding, and direct polynomial evaluation
for syndromes.

| testbench | what it checks |
|---|---|
| `gf_mul_tb` | all 65536 products |
| `rs_encoder_tb` | g(x) for T = 8 and 6 against the 802.16 coefficients; random words for T = 8, 6, 4, with and without input gaps; ready timing; N clocks per word |
| `rs_syndrome_tb` | 2T syndromes and the zero flag for words with 0..10 errors, back to back and with gaps; latency; restart on `in_sof` |
| `rs_bm_tb` | normalised Lambda and Omega against the locator built from the known error positions, for 0..8 errors; L; fail flag for more than T errors and for a forced L = 2T; 3T+1 latency; bypass; hold under back-pressure |
| `rs_chien_forney_tb` | corrected words, per-symbol flags, counts, the fail flag (forced by a wrong L and by a key-equation failure); latency; gapless output |
| `rs_delay_fifo_tb` | random traffic against a queue model; full, empty and level |
| `rs_decoder_tb` | full decoders, T = 8 gapless and T = 6 with gaps, 0..T+3 errors per word; latencies 6 and 3T+6 |
| `rs_codec_top_tb` | default-size codec end to end: encoder, error channel, decoder. Counts that each mechanism occurs: parity phase, zero-syndrome bypass, corrections, exactly-T-error words, a burst of T consecutive errors, uncorrectable words, key-equation wait |

Run a testbench with Verilator 5. Packages must come first:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/rs_pkg.sv tb/rs_ref_pkg.sv tb/rs_codec_top_tb.sv \
        --top-module rs_codec_top_tb -o sim
    ./obj_dir/sim

To lint the RTL alone:

    verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/rs_pkg.sv rtl/rs_codec_top.sv \
        --top-module rs_codec_top

The end-to-end test runs 16 words (about 4000 clocks) at the default
RS(255,239) size, and finishes in a few seconds.

## Files

| file | content |
|---|---|
| `rtl/rs_pkg.sv` | symbol type, field constants, GF multiply, generator and inverse-table functions |
| `rtl/gf_mul.sv` | GF(2^8) multiplier |
| `rtl/rs_encoder.sv` | LFSR encoder |
| `rtl/rs_syndrome.sv` | syndrome cells |
| `rtl/rs_bm.sv` | Berlekamp-Massey key-equation solver |
| `rtl/rs_chien_forney.sv` | Chien search, Forney, correction |
| `rtl/rs_delay_fifo.sv` | delay buffer |
| `rtl/rs_decoder.sv` | decoder pipeline |
| `rtl/rs_codec_top.sv` | top: encoder and decoder |
| `tb/rs_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/*_chk.sv` | per-configuration checkers used by the encoder and decoder testbenches |

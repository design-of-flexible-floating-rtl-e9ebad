# FFPPE fingerprint authentication model with extended Golay error correction

This RTL protects fingerprint data bytes on their way through a noisy link and
then checks them against enrolled users. Each byte gets a time stamp from a
delay-line time-to-digital converter. It is keyed with a random number and the
time stamp, then encoded into a 24-bit extended Golay codeword. The receiver
corrects up to three bit errors per word and detects four. The recovered byte
is scored against up to six stored templates, and the best score decides the
verdict. Alongside this chain sits a small 12-bit floating point add /
subtract / multiply unit, the flexible floating point processing element
(FFPPE).

A single idea runs through the error-correction hardware: **modulo-2 division
done one leading one at a time**. A priority encoder finds the highest set bit
of the dividend. A multiplexer picks the generator polynomial shifted to line
up with that bit, and an XOR clears it. Runs of zeros cost nothing. The same
unit makes the check bits when encoding and the syndrome when decoding. A
second copy of the encoder/mux pair picks the error pattern inside the decoder.

Everything is synthesizable SystemVerilog-2017 except one part, which is
physical: the carry-chain delay line. Its sampled outputs enter as a port.

## Block map

```
                 in_valid (hit)      tdl_taps[191:0]
                     |                    |
 in_data[7:0] --> [data reg]   time_stamp_generator (A2) --timestamp[39:0]--+
                     |                                                     |
                     +------------> error_correction (EC1) <-- num[39:0] -- rng_lfsr
                                     |  golay_encoder --> tx_codeword[23:0] ---> link
                                     |  golay_decoder <-- rx_codeword[23:0] <--- link
                                     v
                                decoded_bits[7:0], ec_out[7:0]
                                     |
                                verification (A5) -- max_select
                                     |
               authenticated_user, index, out, authentication_status

 fp_din[23:0], fp_op --> fp_addsub (FFPPE) --> fp_dout[11:0]      (independent)
```

| module | role |
|---|---|
| `fam_top` | wires the chain above and the FFPPE side by side |
| `fam_pkg` | Golay constants (`GOLAY_POLY = 12'hAE3`), word types, decoder status and FP op enums |
| `crc_divider` | leading-one modulo-2 divider (check bits / syndrome) |
| `prio_enc_mux` | priority encoder W1..WN → o[3:0] driving an N:1 mux |
| `weight12` | 12-bit ones counter built from full adders, 2-bit and 3-bit adders |
| `golay_encoder` | (24,12) extended Golay encoder |
| `golay_decoder` | (24,12) extended Golay decoder |
| `time_stamp_generator` | coarse counter + delay-line ones count → 40-bit time stamp |
| `rng_lfsr` | 40-bit LFSR random number generator |
| `error_correction` | keying, encode, decode, un-keying, error report |
| `verification` | template store, Hamming scores, best match, threshold |
| `max_select` | largest of six registered 12-bit values and its position |
| `fp_addsub` | 12-bit floating point add / subtract / multiply |

## The Golay code as built

Codeword layout, used everywhere:

```
 23            12 11           1  0
 [ message (12) ][ check (11)  ][p]
```

The check bits are the remainder of `message · x^11` divided by
`P(x) = x^11 + x^9 + x^7 + x^6 + x^5 + x + 1` (AE3h). This is the cyclic
(23,12) Golay code. Bit `p` makes the total weight even, which turns it into the
extended (24,12) code with minimum distance 8.

Worked example: message 456h gives check bits 5EAh. The divider needs six
subtractions for it, and the codeword is `{456h, 5EAh, 0}` = 456BD4h.

### Check bits: `crc_divider`

A 23-bit register holds the dividend. In each cycle, the upper 12 bits are the
request lines W1..W12 of `prio_enc_mux`. The winning line k selects
`P(x) << (k-1)`, which is XORed into the register. When the upper 12 bits are
zero, the low 11 bits are the remainder and `done` pulses. The division takes
(number of subtractions + 1) cycles after the start edge, so at most 13.

### Parity: `golay_encoder`

The encoder follows a register chain:
- **Rgt1** holds the 23-bit word {message, check}.
- Two `weight12` units count the ones of the check part (L, padded to 12 bits)
  and of the message part (M).
- **Rgt2** holds their sum.
- The sum's LSB is the parity of the 23-bit word. It selects `{Rgt1, 1}` or
  `{Rgt1, 0}` into **Rgt3**.

`valid` is high after the (subtractions + 4)-th edge following the start edge,
so at most 16 cycles.

### Decoding: `golay_decoder`

This is the least obvious part of the design. Decoding runs in three phases.

1. **Syndrome.** `crc_divider` divides the received bits [23:1]. The remainder
   `s` is zero exactly when those bits form a codeword.
2. **Search over cyclic shifts.** The code is cyclic, so rotating the received
   word left by one position turns its syndrome into `x·s mod P(x)`. That is
   one shift and a conditional XOR per cycle. At each shift i (0..22), two tests
   run in parallel:
   - `weight(s) <= 3`: all errors of the rotated word lie in its 11 check
     positions, and the error pattern is `s` itself.
   - For each message position j, `weight(s ^ syn_j) <= 2`. Here `syn_j` is the
     constant syndrome of a single error at bit 11+j. This covers one error
     among the message bits plus up to two among the check bits. The twelve
     results are the request lines of a 12-input `prio_enc_mux`, whose mux
     returns the matching error pattern.

   Any three error positions on a cycle of 23 include two that are at most 7
   apart. So some rotation always puts at least two of the three errors into
   the 11-bit check window, and the search ends within 23 steps for every
   pattern of up to three errors. The code is perfect, so some pattern of
   weight <= 3 always matches.
3. **Correction and the parity bit.** The pattern is rotated back and XORed into
   the word. If its weight w disagrees with the overall parity of all 24
   received bits, the parity bit was wrong too, and w+1 errors are reported.
   A total of 4 means four errors: the decoder cannot tell which codeword was
   sent. It then sets `status = DEC_UNCORRECTED`.

The latency is variable: the syndrome phase takes up to 13 cycles, the search
takes up to 23, and 2 more cycles follow. The worst case is 38. In testing it
never exceeded 27.

## Time stamps: `time_stamp_generator`

A 16-bit coarse counter runs on the 250 MHz clock, so it wraps every
65536 × 4 ns = 262.144 µs. The hit propagates along a 192-cell carry-chain
delay line. On the hit edge, flip-flops capture the line's outputs (`taps`)
together with the coarse count. On the next edge, a ones counter turns the
captured code into the fine count, 0..192. A ones count tolerates "bubbles" in
the thermometer code. The result is

```
timestamp = coarse × 192 + fine      (40 bits; fits in 24)
```

The scaling assumes the 192 cells span one clock period, about 20.8 ps per
cell. In a real FPGA this calibration would have to be measured.

## Keying, matching and the verdict

`error_correction` forms a key byte `num[7:0] ^ timestamp[7:0]` when the time
stamp is ready:
- The message sent is `{4'b0000, in_data ^ key}`.
- After decoding, the key is XORed off again, so `decoded_bits` equals
  `in_data` whenever the link added at most three errors.
- `ec_out` reports the decode: [2:0] errors found, [3] nonzero pad bits,
  [5:4] status.

The key is held until the next byte, so only one byte may be in flight at a
time.

`verification` holds six slots, each with a feature byte and a user number
written through the enrolment port. A decoded byte scores `8 − Hamming
distance` against each used slot. `max_select` registers the six scores,
reduces them pairwise with comparators and returns the best one and its slot
(plus `pe`, a 4-bit priority encoding of the best value, unused here).
The user is accepted if the best score is at least `THRESHOLD` (default 7: one
differing bit allowed). Lowering the threshold trades false rejections for
false acceptances. `max_select`'s `p` input breaks ties toward the earlier
(`p = 0`) or later (`p = 1`) input.

## FFPPE arithmetic unit: `fp_addsub`

The 24-bit input register holds two operands, `{S_A, E_A, M_A, S_B, E_B, M_B}`.
Each operand is 12 bits: sign, a 5-bit exponent with bias 15, and a 6-bit
fraction with a hidden one. Exponent 0 means zero.

Add and subtract follow the textbook path:
1. Subtract the exponents. The borrow picks the larger exponent, and the
   difference aligns the smaller mantissa.
2. Pick add or subtract with the ADD/SUB mux and apply it.
3. Normalise, shifting the exponent to match.

Alignment keeps every shifted-out bit, so the result is the exact value
truncated toward zero. Multiply adds the exponents and multiplies the 7-bit
significands, then uses the same normaliser. Results too small become signed
zero. Results too large saturate to exponent 31, fraction 63. There are no
subnormals, infinities or NaNs.

Latency: `ld` on one edge, and `dout`/`valid` on the next.

## Where this RTL departs from, or adds to, its source description

The source is explicit about the encoder register chain, the weight units, the
division-based check bits, the six-input comparator tree and the FP adder flow.
It is vague or silent about the rest. Choices made here:

- **Decoder method.** The source calls the decoder a polar-code-style decoder
  for the extended Golay code but gives no structure. The syndrome-and-shift
  search above is this design's own. It corrects 3 errors and detects 4, which
  is the code's full power. It does not claim to detect more.
- **Check-bit example.** For data 456h and P(x) = AE3h, the source states the
  check value 1C8h. Plain modulo-2 division gives 5EAh, and this RTL follows the
  arithmetic.
- **Register widths in the encoder.** Rgt1 holds 23 bits (message + check).
  Rgt2 holds the weight sum, not a 24-bit word.
- **Comparator tree outputs.** Besides the 3-bit position `O` and the value
  `R3_out`, the source mentions a 12-to-4-bit priority encoding of the
  comparator output. It is built as `pe`, the position of the leading one of
  `R3_out`; that reading is an interpretation. `R3_out` is 12 bits wide, not
  11, so the largest input fits. The role of the `P` input is a guess (tie
  priority).
- **Priority encoder forms.** Both the 11-input (W2..W12, 11:1 mux) and
  12-input forms are available through `N`. The design uses N = 12 for both
  encoding and decoding. A small gate network that forms W1 in the decoder
  drawing is not reproduced.
- **Time stamp.** The coarse counter runs freely and is sampled at the hit. The
  source instead speaks of counting cycles "since the hit" but names no stop
  event. The coarse-plus-fine combination formula is this design's choice.
- **Unspecified blocks.** The following are inventions that fill gaps the
  source leaves open: the random number generator (any LFSR; this one uses
  x^40+x^38+x^21+x^19+1), the keying, the 4-bit message pad, the meaning of
  `ec_out`, the template store, the score and the threshold.
- **Multiply path.** The FFPPE is said to multiply, but only the add/subtract
  datapath is drawn. The multiply path is added. The number format and
  rounding are this design's own.
- **Unconnected inputs and the FFPPE.** An 8-bit input `Fa` shown on the
  top-level symbol has no stated function and is omitted. The FFPPE is not
  connected to the authentication chain.
- **Handshakes, reset and latencies.** All valid pulses, resets (asynchronous,
  active low, to zero) and latencies are this design's own.

## Not in the RTL

- **Tapped delay line** (192 carry-chain cells). Its behaviour is physical
  propagation delay. Drive `tdl_taps` with the sampled line; for example, a
  thermometer code whose length is the hit-to-clock delay divided by the cell
  delay.
- **Two-step ADC front end.** A drawing associated with the time stamp
  generator shows a capacitive SAR coarse ADC (4 bits), a fine ADC using two
  7-bit TDCs whose difference gives 8 bits, and a "digital error correction"
  that merges them into 10 bits. The first two are analog. For the third, the
  way the codes overlap is not given. None of these is modelled.

## Verification status

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models in
`tb/tb_ref_pkg.sv` are independent of the RTL:
- a bit-serial CRC register;
- long division on integers;
- floating point through `real` arithmetic and truncation.

| testbench | what it covers |
|---|---|
| `tb_weight12` | all 4096 inputs |
| `tb_prio_enc_mux` | random requests, N = 12 and N = 11 |
| `tb_crc_divider` | 456h example; 600 random dividends; exact cycle count |
| `tb_golay_encoder` | every third message plus random ones; exact latency; even weight; minimum distance ≥ 8 between random pairs |
| `tb_golay_decoder` | 3000 words with 0–4 random errors, then every error pattern of weight 1–4 over all 24 bits (12950 patterns); exact correction and count for ≤ 3 errors; detection of 4; latency bound |
| `tb_fp_addsub` | 8000 operations incl. cancellation, overflow, underflow, zero operands |
| `tb_max_select` | random and tie-heavy inputs, both `p` values |
| `tb_time_stamp_generator` | 400 hits with random fine codes (with bubbles), across coarse-counter wraps |
| `tb_rng_lfsr` | 5000 steps vs. a separately written model; seeding; zero seed; hold |
| `tb_error_correction` | 1500 bytes through a channel with 0–4 errors |
| `tb_verification` | enrolment, exact / near / random probes, threshold |
| `tb_fam_top` | end-to-end at default sizes: 600 transactions, FFPPE operations |

Concurrent assertions in the RTL check handshake rules during simulation
(enable them with `--assert`):
- the divider is idle when `done` pulses, and `done` follows as soon as no
  leading one is left;
- every encoder output has even weight;
- the decoder's search stays within 23 shifts, and every accepted decode is a
  codeword;
- no new byte starts while the encoder is still busy.

`tb_fam_top` runs the whole design with every parameter at its default. It
counts each mechanism and fails if any of them never happens:
- clean words, and 1-, 2- and 3-error corrections;
- errors on the parity bit;
- 4-error detection;
- accepted and rejected users, and keyed bytes;
- delay-line bubbles, and time stamps after a coarse wrap;
- FP add, subtract and multiply, saturation and flush-to-zero.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fam_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/fam_pkg.sv tb/tb_ref_pkg.sv tb/tb_fam_top.sv
./obj_dir/Vtb_fam_top
```

Swap `tb_fam_top` for any other testbench name. Lint a module alone with
`verilator --lint-only -Wall -y rtl rtl/fam_pkg.sv rtl/<module>.sv`.

Parameters worth changing:
- `fam_top`: `CELLS` (delay-line length), `COARSE_W` (coarse counter width) and
  `THRESHOLD` (match threshold).
- `fp_addsub`: `EXP_W` and `MAN_W`. The testbench model assumes the default
  5/6 split.

The Golay polynomial and word widths live in `fam_pkg`. The decoder's
single-error syndromes are computed from `GOLAY_POLY` at elaboration, so a
different (23,12) generator needs only that constant changed.

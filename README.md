# Single-stage burst-error decoder for a (15,8) cyclic code

Noisy channels and storage media often corrupt a few *neighbouring* bits at
once: a burst. This design corrects any burst of up to 3 bits in a 15-bit
codeword that carries 8 data bits and 7 check bits. It does so in one
combinational pass. Sequential error-trapping decoders rotate the word one
bit per clock until the error falls into the check bits. Here all 15
rotations are built side by side and tried at once. A few small XOR and
AND/OR networks replace the shift register, so a corrected byte comes out one
propagation delay after a word arrives. No clock or state is involved. In the
reference FPGA implementation of this structure (an Altera Cyclone), decoding
took 19.73 ns and used 223 LUTs. This RTL has not been timed on any device.

## The code

* Codeword length n = 15, check length k = 7, data length m = 8, correctable
  burst length p = 3.
* Generator polynomial G(x) = x^7 + x^6 + x^4 + 1 (`8'hD1`, bit j is the
  coefficient of x^j). G(x) divides x^15 + 1, so the code is cyclic: every
  rotation of a codeword is again a codeword.
* Systematic encoding: `CW(x) = M(x)·x^7 + (M(x)·x^7 mod G(x))`. Bits 14..7
  of the word are the data byte. Bits 6..0 are the check bits. Example:
  data `AA` gives codeword `556F`.
* A *burst of length ≤ 3* is an error pattern whose 1 bits all lie within 3
  consecutive positions. Cyclic wrap-around counts, so bits 14 and 0 are
  neighbours. There are 60 such nonzero patterns: 15 of one bit, 15 of two
  bits and 30 of length three. Each of them has a different remainder mod
  G(x), and that is what makes them correctable. The Reiger bound for bursts
  of 3 asks for at least 6 check bits; this code has 7.

The generator was chosen by an offline search. It looks at candidate
polynomials of rising degree and weight, and keeps the first one that gives
a cyclic code of the needed distance whose burst syndromes are all distinct.
That search is not hardware and is not part of the RTL. Its result is the
`CODE_GEN_POLY` constant in `burst_pkg`.

## How the decoder finds the burst: error trapping over all shifts

Say the received word is `v = c + e`, where `c` is a codeword and `e` a
burst. Rotating `v` left by `i` bits multiplies it by x^i mod x^15 + 1. That
gives `c' + e'`, where `c'` is still a codeword. Dividing by G(x) removes
`c'`, so the remainder is `e' mod G`. There is always some rotation that
moves the burst into bits 6..0. For that rotation `e'` has degree below 7, so
the remainder **is** the error pattern itself. Adding the remainder to the
rotated word and rotating back gives `c`.

The decoder therefore builds 15 *lanes*, one for each rotation i = 0..14.
Lane 0 is the received word as it is:

```
code_in ─┬─ rotl 0  ─ remainder ─ check_pattern ─ result[0]  ─┐
         ├─ rotl 1  ─ remainder ─ check_pattern ─ result[1]  ─┤
         │   ...                                               ├─ pri ─ grant[14:0]
         └─ rotl 14 ─ remainder ─ check_pattern ─ result[14] ─┘
lane i:  decoder2(sw = grant[i], rotated word, remainder) ─┐
                                                           OR ─ code_out ─ data_out = code_out[14:7]
error = no result bit set
```

Why a matching lane can be trusted: say lane i finds a remainder `s` that is
itself a short burst. Then the rotated word minus `s` is a codeword. So the
received word lies within one short burst of some codeword. All short bursts
have distinct syndromes, so that codeword is unique. It does not matter
which lane found it. Often several lanes match the same error: a 1-bit error
fits the check field at 7 rotations, for example. `pri` then simply picks
the highest-numbered lane.

## The four kinds of module

**`remainder`: division as a matrix product.** Row j of a 15×7 matrix over
GF(2) is x^j mod G(x). The remainder is the XOR of the rows that the word's
1 bits select. Rows 0..6 are the identity. The others, written r6..r0, are:

| bit | row     | bit | row     |
|-----|---------|-----|---------|
| c7  | 1010001 | c11 | 0001101 |
| c8  | 1110011 | c12 | 0011010 |
| c9  | 0110111 | c13 | 0110100 |
| c10 | 1101110 | c14 | 1101000 |

So, for example, r6 = c6 ⊕ c7 ⊕ c8 ⊕ c10 ⊕ c14 and r0 = c0 ⊕ c7 ⊕ c8 ⊕ c9 ⊕
c11. The RTL does not type these rows in. A constant function builds them
from `GEN_POLY` at elaboration (multiply by x, reduce once per row). The
module therefore works for any generator, and the synthesised circuit is
nothing but XOR gates.

**`check_pattern`: is this remainder a burst?** It uses K−P+1 = 5 window
masks (`0000111`, `0001110`, … `1110000`). The remainder matches a window
when `rem & ~mask` is zero. The window results are ORed. The all-zero
remainder matches too, so 24 of the 128 possible remainders are accepted.

**`pri`: one lane wins.** This gives a one-hot output at the highest set bit
of `result[14:0]`, or zero if no bit is set.

**`decoder2`: correct and rotate back.** Lane i XORs its remainder into bits
6..0 of its rotated word. It then rotates the result right by i bits, a fixed
wiring permutation (parameter `SHIFT`). A 2-to-1 multiplexer driven by `sw`
(the lane's grant) passes either this word or zero. Zero from the lanes that
lose lets the top OR all 15 lane outputs together.

## Behaviour at the edges

* **No error.** Every remainder is zero, so every lane matches and lane 14
  wins. It adds zero and the word passes through unchanged.
* **Uncorrectable error.** If no lane finds a short burst, `error` goes high
  and `code_out` and `data_out` are zero. Of the 60 cyclic 4-bit bursts, 45
  are flagged this way. The other 15 put the word within a 3-bit burst of a
  *different* codeword. They are "corrected" to that codeword without a flag,
  which no burst-3 decoder can avoid.
* **Reference example** (data `AA`):

| received | error kind                   | data_out | error |
|----------|------------------------------|----------|-------|
| `556F`   | none                         | `AA`     | 0     |
| `5568`   | 3-bit burst (bits 2..0)      | `AA`     | 0     |
| `5560`   | 4-bit burst (bits 3..0)      | `00`     | 1     |
| `546E`   | two bit errors 8 bits apart  | `08`     | 0     |

  The last word lies within a 3-bit burst (bits 14 and 12) of codeword `046E`.
  The decoder returns that codeword. This is a miscorrection, but it is the
  correct result for a burst-3 decoder.

## Interface and timing

`burst_decoder` (top):

| port       | dir | width | meaning                                            |
|------------|-----|-------|----------------------------------------------------|
| `code_in`  | in  | 15    | received word, bit j = x^j, data in bits 14..7     |
| `data_out` | out | 8     | corrected data byte                                |
| `code_out` | out | 15    | corrected codeword                                 |
| `error`    | out | 1     | word not within a 3-bit burst of any codeword      |

Parameters: `N` (15), `K` (7), `P` (3) and `GEN_POLY` (`8'hD1`). The defaults
come from `burst_pkg`. Another code can be used by changing all four
together. The polynomial must divide x^N + 1, and all bursts of length ≤ P
must have distinct remainders. Nothing in the RTL checks either condition.

The whole design is combinational and has no clock and no reset. Outputs
follow `code_in` after the propagation delay. The critical path runs through
the rotation wiring, the XOR tree of `remainder`, `check_pattern`, the
15-input priority chain of `pri`, a lane's multiplexer and the 15-input OR.
To run it in a clocked system, register `code_in` and/or the outputs around
it.

## Where this RTL makes its own choices

The lane and module structure, the matrix division, the pattern check, the
highest-bit priority and the XOR-then-rotate-right correction are taken from
the reference design. The following are choices of this implementation:

* The generator polynomial is read off the division matrix. It reproduces
  the reference encoding (`AA` → `556F`).
* Lane i rotates **left** by i, because the correction rotates right to undo
  it.
* The zero remainder counts as a pattern. This makes error-free words pass
  unchanged and makes `error` simply "no lane matched".
* A disabled `decoder2` outputs zero, and the lanes are combined by OR.
* When `error` is high, the outputs are zero.
* The decoding time (≈20 ns) and LUT count are FPGA results that this RTL
  does not model or check.

## Files

| file                     | content                                                |
|--------------------------|--------------------------------------------------------|
| `rtl/burst_pkg.sv`       | code constants (n, k, p, G)                            |
| `rtl/remainder.sv`       | matrix division by G(x)                                |
| `rtl/check_pattern.sv`   | burst-pattern detector                                 |
| `rtl/pri.sv`             | highest-bit priority selector                          |
| `rtl/decoder2.sv`        | correction lane: XOR, rotate back, gate                |
| `rtl/burst_decoder.sv`   | top: 15 lanes, priority, combine, data and error       |
| `tb/*_tb.sv`             | one self-checking testbench per module                 |

## Verification

Each testbench works out its expected values on its own and ends by
printing `TB_RESULT checks=N failures=M`.

* `remainder_tb` tries all 32768 words against bit-serial long division. It
  also checks the matrix rows above and that `556F` has a zero remainder.
* `check_pattern_tb` tries all 128 remainders, and checks that 24 of them
  are accepted.
* `pri_tb` tries all 32768 requests, and checks that every grant is one-hot.
* `decoder2_tb` tries random inputs on lanes with shift 0, 5 and 14, plus one
  case that is corrected and rotated back to the original word.
* `burst_decoder_tb` runs at the default size. It applies the reference
  words, then every data byte with no error, with each of the 60 correctable
  bursts and with each of the 60 4-bit bursts: 30,980 words. The expected
  result comes from a brute-force search for a codeword within one short
  burst. The testbench counts the clean pass-through, corrections in the data
  bits, in the check bits and across the wrap, cases where the priority
  selector chose among several lanes, and error flags. It fails if any of
  these never happens. It runs in well under a second.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -y rtl rtl/burst_pkg.sv \
          tb/burst_decoder_tb.sv --top-module burst_decoder_tb
./obj_dir/Vburst_decoder_tb
```

Replace `burst_decoder_tb` with any other testbench name to run it.

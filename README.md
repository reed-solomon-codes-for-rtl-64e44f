# Low-power Reed-Solomon RS(40,32,4) codec

A battery-powered radio can use forward error correction to save transmit
power, but only if decoding costs less energy than the coding gain saves. This
design is a Reed-Solomon decoder for the shortened RS(40,32,4) code over
GF(2^8), built to spend as little switching activity as possible:

* **Error detection first.** The syndrome unit always runs. When all syndromes
  are zero, which is almost always the case on a good channel, the key-equation
  solver, the Chien search, the Forney unit and the inverter stay idle, and the
  received data goes out unchanged.
* **The Chien search stops early.** It stops as soon as it has found as many
  error locations as the error locator has roots.
* **Small delay line.** The delay line stores only the 32 data symbols of a
  block, not the parity. It is written and read only when a data symbol
  arrives or leaves, and 36 bytes are enough.
* **Cheap field operators.** The GF(2^8) multipliers and the inverter work in
  the composite field GF((2^4)^2). The inverter needs only a 16-entry GF(2^4)
  table, and one inverter is shared between the key-equation solver and
  Forney's algorithm.

A matching systematic encoder sits beside the decoder in the top module
`rs_fec_top`, so the whole link can be simulated.

## The code and the field

| item | value |
|---|---|
| code | shortened RS(N=40, K=32, T=4): 32 data symbols, 8 parity symbols, corrects 4 symbol errors |
| symbol | 8 bits, an element of GF((2^4)^2) |
| ground field GF(2^4) | polynomial x^4 + x + 1 |
| extension | Y^2 + Y + λ, λ = 8 (GF(2^4) element) |
| byte encoding | byte `{h,l}` is h·Y + l |
| primitive element α | 0x12 |
| generator | g(x) = ∏_{i=1..8} (x + α^i) |
| symbol order | first symbol on the wire = highest-degree coefficient; data first, parity last |

The code length, rate and correction capability are fixed by the design. The
field polynomials, λ, α and the generator roots are choices of this
implementation. Any irreducible extension and primitive element give an
equivalent code. However, the byte encoding differs from a conventional
GF(2^8) polynomial basis such as 0x11D, so this codec does not talk to a codec
built in another basis unless a basis change is added at the ports. All these
constants live in `rtl/gf_pkg.sv`.

## How a block moves through the decoder

The decoder advances on a symbol strobe `sym_en`: one received symbol per
strobe, with blocks of 40 symbols following each other from reset. There is no
frame-sync input: block boundaries are counted from reset. Three blocks are in
flight at once, one in each stage:

```
strobe:      |<------ block f (40 strobes) ------>|<-- block f+1 ... -->
syndrome:    [ accumulate S_1..S_8 of block f     ]
delay line:  [ write data 0..31 ][ parity: no write ]
EEA:                                               [solve f]  (strobes 0..2 of f+1)
Chien/Forney:                                            [ position 0 .. 39 of block f ]
output:                                                   [ data 0..31 of f, 1 clock after its strobe ]
```

The three stages work as follows.

1. **Syndrome stage** (`rs_syndrome`). It has 8 Horner cells,
   S_i ← S_i·α^i + r. After the 40th symbol the syndromes are latched and
   `synd_zero` tells whether they are all zero.
2. **Key equation** (`rs_eea`). It starts only when some syndrome is non-zero.
   It must finish before the Chien search picks up the block, which happens on
   the third strobe after the block ends (`CHIEN_DELAY = 3`).
3. **Chien / Forney / correction.** The search walks the 40 positions in
   received order, one per strobe:
   * A located error on a **data** position asks Forney for its magnitude,
     which is XORed onto the symbol leaving the delay line.
   * Errors on **parity** positions are counted, but not corrected: parity
     symbols are never output.
   * At position 39 the failure indicator reports the block.

**Latency.** Data symbol j of block f enters on strobe 40f+j and leaves, with
`dout_valid`, one clock after strobe 40f+j+43, that is N + 3 strobes later. At
most 35 data symbols are stored at any time, hence the 36-entry delay line.
The end-of-block flags (`blk_done`, `fail`, `blk_bypass`, `nerr`) come one
clock after the strobe of position 39. Only the 32 data symbols are output.

**Flushing.** To get the last block out, keep strobing for 43 more symbol
periods. Any data will do: extra blocks are decoded too.

**Timing requirement.** The solver needs at most 13 clocks (1 load, up to 4
inversions, up to 8 division steps). It gets 3 strobe periods minus one clock,
so strobes must be **at least 5 clocks apart**. An assertion
(`a_eea_in_time`) catches a violation.

A bit-serial radio delivering one 8-bit symbol every 8 clocks has ample
margin. At that rate a block is fully decoded, from its first symbol to its
end-of-block flag, in 657 clocks: 13.1 µs at 50 MHz.

### Why the shared inverter never collides

Two units use the inverter:

* **Forney** asks only on strobes where an error is located on a data
  position, i.e. Chien positions 0..31.
* **The solver** runs between the end of block f+1 and the third strobe after
  it.

While the solver runs, the Chien search of block f is on its positions 37..39.
Those are parity positions, where Forney is idle. So the two requests are
disjoint by construction. `gf_inv_shared` still gives Forney priority and
tells the solver through a grant, and an assertion checks that both never ask
at once.

## Key-equation solver (`rs_eea`)

Extended Euclid on R0 = x^8 and R1 = S(x) = S_1 + S_2 x + … + S_8 x^7, with
cofactors T0 = 0 and T1 = 1. Each clock performs one quotient term:

```
c  = lead(R0) · lead(R1)^-1,   d = deg R0 − deg R1
R0 ← R0 + c·x^d·R1,            T0 ← T0 + c·x^d·T1
if deg R0 < deg R1: swap (R0,T0) with (R1,T1)
stop when deg R1 < T:  Λ = T1, Ω = R1
```

The inverse of the divisor's leading coefficient is fetched once per new
divisor, in state `S_INV`, so at most T = 4 inversions happen per block. The
datapath has 15 general multipliers: 9 for the remainder, 5 for the cofactor,
and 1 for c.

Λ and Ω come out multiplied by a common unknown constant. That constant
cancels in Forney's ratio and does not move the roots, so no normalisation is
done. If the syndromes are non-zero but deg S < 4, the solver returns Λ = 1
and the block is reported as failed.

## Chien search and Forney for a shortened code (`rs_chien`, `rs_forney`)

Position p (p = 0 is the first received symbol) has error locator
X = α^(39−p). The Λ registers are loaded with Λ_i·α^(−39i), so the search
starts at position 0 instead of at the end of the 255-symbol mother code. Each
strobe multiplies register i by α^i.

The Ω registers carry one extra power, Ω_i·X^−(i+1). Their sum is then
directly Forney's numerator X^−1·Ω(X^−1). The sum of the odd Λ registers is
the denominator X^−1·Λ'(X^−1). This gives:

```
error at p  ⇔  Σ Λ registers = 0
magnitude   =  (Σ Ω registers) · inverse(Σ odd Λ registers)
```

When the search is disabled its registers hold their value, so nothing
toggles. The search is disabled for error-free blocks, and once all error
locations of a block have been found.

## Failure indicator (`rs_failure`)

The failure indicator counts the locations flagged in a block and compares
the count with deg Λ.

* `all_found` (count = degree) switches the Chien search off.
* On position 39, `fail` is raised when the count differs from the degree, or
  when the degree is 0 although errors were detected.
* A block that is not flagged but had more than 4 errors can still be
  mis-corrected. That is inherent to the code.
* Because the verdict needs the parity positions, `fail` arrives after the
  data symbols of its block have already been output.

## Composite-field operators (`gf_cgf_mul`, `gf_cgf_inv`)

For a = a_h·Y + a_l, with Y^2 = Y + λ:

* **Multiplier.** It uses three GF(2^4) products: m_hh = a_h·b_h,
  m_ss = (a_h+a_l)(b_h+b_l) and m_ll = a_l·b_l. Then
  p_h = m_ss + m_ll and p_l = λ·m_hh + m_ll.
* **Inverter.** The norm is n = λ·a_h^2 + a_l(a_h+a_l). The result is
  a^−1 = (a_h·n^−1)·Y + (a_h+a_l)·n^−1, where n^−1 comes from a 16-entry
  table. The inverse of 0 is 0.

Multiplications by fixed powers of α (syndrome cells, Chien registers, encoder
taps) use the package function `gf_mul` with a constant operand, which
synthesis reduces to XOR networks.

## Encoder (`rs_encoder`)

The encoder is an LFSR of 8 byte registers dividing by g(x). For positions
0..31 of a block it passes `din` through and feeds the register chain. For
positions 32..39 it ignores `din` and shifts out the parity. The output is
registered, one clock after each strobe.

## Top-level ports (`rs_fec_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, synchronous active-low reset |
| tx_sym_en, tx_din | in | 1, 8 | encoder strobe and message symbol (ignored on parity positions) |
| tx_dout, tx_dout_valid | out | 8, 1 | codeword symbol, one clock after the strobe |
| rx_sym_en, rx_din | in | 1, 8 | decoder strobe (≥ 5 clocks apart) and received symbol |
| rx_dout, rx_dout_valid | out | 8, 1 | corrected data symbol |
| rx_dout_corrected | out | 1 | this symbol was changed |
| rx_blk_done | out | 1 | end-of-block pulse, with the three flags below |
| rx_fail | out | 1 | block could not be decoded |
| rx_blk_bypass | out | 1 | block had zero syndromes |
| rx_nerr | out | 3 | error locations found |

The encoder and decoder share only clock and reset. The testbench connects
`tx_dout_valid`/`tx_dout` to `rx_sym_en`/`rx_din` through an error-adding
channel.

## Deliberate choices and limits

* **Field representation.** The polynomials, λ, α and the generator roots are
  this implementation's choice (see above). No basis conversion is done at the
  ports.
* **Pipeline timing.** The pipeline offset of 3 strobes and the 36-byte delay
  line go together. With a larger `CHIEN_DELAY`, raise `DL_DEPTH` as well: at
  most 32 + `CHIEN_DELAY` data symbols are in flight, so `DL_DEPTH` must be at
  least that plus one.
* **Not built: other solvers.** Berlekamp-Massey and Peterson-Gorenstein-Zierler
  are only compared against the EEA.
* **Not built: 4-input variant.** The 4-input parallel syndrome and Chien
  variant raises logic power and area, and was dropped from the design.
* **Not built: half-syndrome switch-off.** Computing half the syndromes first
  doubles the latency and the memory, and was replaced by the variant built
  here.
* **Code size is fixed.** `gf_pkg` fixes N, K, T and the 8-bit composite
  field. Some modules take T and N as parameters, but the design has only
  been checked at RS(40,32,4).
* **Asynchronous delay-line read.** The delay line is an array read
  asynchronously. For an FPGA block RAM with a registered read, move the read
  one strobe earlier.

## Verification

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=… failures=…` and has a watchdog. The reference arithmetic in
`tb/rs_ref_pkg.sv` is written independently of the RTL operators: schoolbook
products, inverse by search, encoding by long division, syndromes by direct
evaluation.

| testbench | what it shows |
|---|---|
| tb_gf_cgf_mul, tb_gf_cgf_inv | exhaustive against the reference; α has order 255 |
| tb_gf_inv_shared | operand selection, Forney priority, idle operand 0 |
| tb_rs_syndrome | syndromes of random codewords and corrupted words, timing of `synd_valid` |
| tb_rs_eea | Λ, Ω proportional to the reference for 1..4 errors; degree; ≤ 13 clocks plus withheld grants |
| tb_rs_chien | location flags, numerator, denominator and magnitudes at every position; freezing when disabled |
| tb_rs_forney, tb_rs_failure, tb_rs_delay_line, tb_rs_correct | unit behaviour against models |
| tb_rs_encoder | codewords equal long division, zero syndromes |
| tb_rs_decoder | 120 blocks with strobe gaps of 5..10 clocks; see below |
| tb_rs_fec_top | whole link at default sizes; see below |
| tb_rs_zigbee_frames | 128-byte data frames, one in three followed by a 5-byte acknowledgement, padded into blocks and sent over a channel with 4% symbol errors; every frame whose blocks hold at most 4 errors each must come back intact |

`tb_rs_decoder` checks the data, the flags and the N+3 latency. It also checks
that each mechanism happened: bypass, early Chien switch-off, parity errors
left alone, corrections, inverter use by both units, failures, and a delay
line filled to 35.

`tb_rs_fec_top` runs encoder → channel → decoder at the default sizes. It
covers the four error configurations used to characterise the design:

1. no error;
2. four errors in the first quarter of the block;
3. four errors within the first three quarters;
4. four errors with three in the last quarter.

It adds random and uncorrectable blocks, and checks that a block is decoded
within 670 clocks at one symbol per 8 clocks.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/gf_pkg.sv tb/rs_ref_pkg.sv tb/tb_rs_fec_top.sv --top-module tb_rs_fec_top
./obj_dir/Vtb_rs_fec_top
```

Every testbench finishes within seconds of wall-clock time.

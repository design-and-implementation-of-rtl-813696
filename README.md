# RS(255,223) encoder and syndrome-based error detector

Reed-Solomon RS(255,223) adds 32 parity bytes to every 223 message bytes.
Together they form a 255-byte codeword that can absorb up to 16 corrupted
bytes. This RTL covers the two front-end parts of such a codec:

- a **systematic encoder**, built as a linear feedback shift register (LFSR)
  over GF(2^8);
- a **syndrome calculator**. It evaluates the received word at the 32 roots
  of the generator polynomial. It reports whether the word is a valid
  codeword (all 32 syndromes zero) or has been corrupted (some syndrome
  nonzero).

It does not correct errors. Locating and fixing them would need a
Berlekamp-Massey solver, a Chien search and Forney's algorithm, and none of
these is included. The syndromes are the input such a corrector would use.

Both datapaths take one byte per clock. Apart from the registers that hold
parity and syndromes, there is no storage and no control state.

## The field and the code

| quantity | value |
|---|---|
| symbol | 8 bits, an element of GF(2^8) |
| field polynomial p(x) | x^8 + x^4 + x^3 + x^2 + 1 (0x11D); alpha = 0x02 is primitive |
| n, k, 2t | 255, 223, 32 |
| minimum distance | 33, so up to t = 16 byte errors can be corrected |
| generator g(x) | (x + alpha^1)(x + alpha^2) ... (x + alpha^32) |

Expanded, g(x) has these coefficients, g0 first (the constant term):

    45 216 239 24 253 104 27 40 107 50 163 210 227 134 224 158
    119 13 158 1 238 164 82 43 15 232 246 142 50 189 29 232 1

`rtl/gf256_pkg.sv` holds them as `RS_GEN`, together with `RS_N`, `RS_K`,
`RS_NPAR` and the field polynomial. Its functions (`gf_xtime`,
`gf_alpha_pow`, `gf_mul`) only work out constants during elaboration. No
general-purpose multiplier is ever synthesized.

## Constant multipliers: the only arithmetic

Every product in this design has a constant operand: g_j in the encoder, and
alpha^i in the syndrome cells. Multiplying by a constant C is linear over
GF(2), so `gf_const_mult` builds it as an 8x8 XOR matrix:

    y = XOR over b = 0..7 of ( a[b] ? C * alpha^b : 0 )

The eight columns C * alpha^b are worked out during elaboration, so only
XOR gates remain. Addition in GF(2^8) is a bytewise XOR.

A worked example, for C = 45:

- inputs 1, 2, 4, ..., 128
- give outputs 45, 90, 180, 117, 234, 201, 143, 3

The encoder uses 32 of these multipliers (g0..g31; g32 = 1 needs none). The
syndrome calculator uses another 32, one for each alpha^1..alpha^32
(2, 4, 8, ..., 192, 157).

## Encoder (`rs_encoder`)

The register `par[0..31]` holds 32 bytes. Operation has two phases, chosen
by the `shift` input.

**Message phase (`shift = 0`).** Each enabled cycle takes one message byte
`u` and does the following:

    fb       = u + par[31]
    par[0]  <= g0 * fb
    par[j]  <= par[j-1] + g_j * fb        (j = 1..31)
    y        = u                          (systematic: the message passes through)

After 223 bytes, the register holds the remainder of x^32 m(x) divided by
g(x). That remainder is the parity.

**Parity phase (`shift = 1`).** The feedback is forced to zero, so the
register becomes a plain shift register. Each enabled cycle puts `par[31]`
on `y` and shifts a zero in. After 32 cycles the register is empty again.
The next block can therefore start immediately, with no clear cycle.

A block takes 255 enabled cycles: 223 with `shift` low, then 32 with
`shift` high. The encoder does not count symbols. Whatever supplies the data
drives `shift`. `enable` low freezes the register, which allows gaps in the
stream. `y` is combinational, so each code byte appears in the same cycle as
the input that produces it. `clrn` clears the register asynchronously
(active low).

Symbol order: the first byte sent is the coefficient of x^254, and
`par[31]` is the first parity byte.

A useful sanity case is the all-ones message. Its 32 parity bytes are also
all ones. This is because 1 + x + ... + x^254 has every nonzero power of
alpha as a root, so it is a multiple of g(x).

## Syndrome calculator (`syndrome`, `syndrome_block`)

S_i = r(alpha^i), for i = 1..32, is computed by Horner's rule. One register
per root is updated once per received byte:

    S_i <= alpha^i * S_i + r          (syndrome_block: one constant multiply, one XOR)

`init`, applied together with the first byte of a block, loads S_i = r. The
old value is ignored, so blocks can run back to back with no clear cycle.
The 32 syndromes (`s[0]` = S_1) are valid in the cycle after the 255th byte
is accepted. `nonzero` is the OR of all 256 syndrome bits. It is the
error-detected flag.

Each S_i depends only on the error pattern e(x), because c(alpha^i) = 0
for every codeword c. The module does not count bytes either, so it accepts
blocks of any length. Feeding it only the 32 parity bytes of the all-ones
message gives nonzero syndromes, as a 32-byte word is not a codeword.

## The chain (`rs255_detect_top`)

```
msg_in ──► rs_encoder ──► code_out ──► XOR ──► rx_byte ──► syndrome ──► syndromes[32]
                                        ▲                             └► error_detected
                                   err_pattern
```

- The encoder and the syndrome calculator share `clk`, `clrn` and `enable`.
- `first` drives the syndrome calculator's `init`.
- `shift` drives the encoder's phase.
- `err_pattern` is the channel. It models r(x) = c(x) + e(x) one byte at a
  time. Tie it to zero for a clean channel.
- `syndromes` and `error_detected` are valid the cycle after the 255th
  enabled byte.

Top ports:

| port | dir | width | meaning |
|---|---|---|---|
| clk, clrn | in | 1 | clock, asynchronous active-low clear |
| enable | in | 1 | one byte this cycle |
| first | in | 1 | first byte of a block |
| shift | in | 1 | 0 for the 223 message bytes, 1 for the 32 parity bytes |
| msg_in | in | 8 | message byte (ignored while `shift` = 1) |
| err_pattern | in | 8 | channel error for this byte |
| code_out | out | 8 | transmitted byte |
| rx_byte | out | 8 | received byte, `code_out ^ err_pattern` |
| syndromes | out | 32 x 8 | S_1 .. S_32 |
| error_detected | out | 1 | some syndrome nonzero |

## Cost

Each half holds exactly 32 x 8 = 256 flip-flops, the parity register and
the syndrome registers: 512 in total. Everything else is XOR logic. The
critical path is:

- in the encoder: one XOR, then one constant multiplier, then one XOR;
- in the syndrome calculator: one constant multiplier, then one XOR.

## How far to trust it, and where it is this design's own

These points come straight from the code's definition and are used as given:

- the field polynomial;
- the generator roots alpha^1..alpha^32 and the coefficient list above;
- the LFSR encoder structure with its shift-out phase;
- 32 constant multipliers per half;
- 32 syndrome registers;
- the flip-flop count.

These points are choices made here:

- The control signals (`enable`, `shift`, `init`/`first`, `clrn`) and their
  exact timing.
- No symbol counter: the sequencing is left to the data source.
- A combinational code output.
- Symbol order, with the highest degree first.
- Horner evaluation inside the syndrome cells.
- The `nonzero` flag.
- The error-pattern input in the top.

Every block has a self-checking testbench. All of them check against
reference arithmetic written independently of the RTL: carry-less products,
g(x) multiplied out from its roots, polynomial long division, and direct
evaluation of r(alpha^i).

- `tb_gf_const_mult`: all 256 inputs for 13 constants.
- `tb_syndrome_block`: all 256 inputs for roots 1, 3, 17 and 32. It also checks
  the constants for alpha^8..alpha^14, alpha^253 and alpha^254 against the
  known field elements.
- `tb_rs_encoder`: every output byte of 11 blocks, including:
  - the all-ones, all-zero and unit messages;
  - random messages;
  - idle cycles;
  - an asynchronous clear in mid-block.

  It also checks that each block takes 255 cycles and that `RS_GEN` matches
  g(x).
- `tb_syndrome`: all 32 syndromes for:
  - clean words;
  - words with 1 to 16 byte errors;
  - idle cycles;
  - a 32-byte parity-only block.
- `tb_rs255_detect_top`: the whole chain at full size over 10 blocks. It
  runs in well under a second. It counts each mechanism and fails if any
  never occurs:
  - message phase and parity phase;
  - idle cycles;
  - clean and corrupted words;
  - errors in message bytes and in parity bytes;
  - the all-ones message;
  - an asynchronous clear.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/gf256_pkg.sv rtl/gf_const_mult.sv rtl/syndrome_block.sv \
  rtl/rs_encoder.sv rtl/syndrome.sv rtl/rs255_detect_top.sv \
  tb/rs_ref_pkg.sv tb/tb_rs255_detect_top.sv --top-module tb_rs255_detect_top
./obj_dir/Vtb_rs255_detect_top
```

The other testbenches build the same way. Put `tb/rs_ref_pkg.sv` and the
needed `rtl/` files before `tb/tb_<block>.sv`.

To change the code, edit `gf256_pkg`. A different first root or a shorter
code changes `RS_GEN` and the `ROOT` offsets in `syndrome.sv`. The reference
package in `tb/` hard-codes roots alpha^1..alpha^32 and n = 255, so it must
be changed as well.

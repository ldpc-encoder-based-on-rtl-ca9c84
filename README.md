# Full-parallel QC-LDPC encoder for the IEEE 802.11n/ac/ax code family

This design encodes any of the twelve LDPC codes of IEEE 802.11n/ac/ax in a single clock
cycle. The codes have lengths 648, 1296 and 1944 bits and rates 1/2, 2/3, 3/4 and 5/6. A
1620-bit information word goes in, and its parity vector of up to 972 bits comes out two
cycles later. A new word, coded with any of the twelve codes, can go in every cycle. At 1 GHz
that is 1.62 Tbit/s of information bits for the rate-5/6, 1944-bit code.

Encoding is two multiplications by constant matrices over GF(2). Both are built as fixed XOR
trees. All twelve codes exist in hardware at once, and multiplexers choose the code for each
word. The gate count stays low because partial sums are shared between rows of the
parity-check matrices and between code rates.

A second, independent unit is included: a table-driven CRC engine that takes in 256 message
bits per clock (CRC24A of 5G NR by default). It sits next to the encoder in the top level and
is not connected to it.

## Matrix notation and bit order

A code's parity-check matrix is built from Z x Z blocks. Z is 27, 54 or 81 for n = 648, 1296
or 1944. Each block is either zero or the identity matrix cyclically shifted by sigma. A base
matrix lists the sigma of every block, with -1 for a zero block. Every base matrix has 24
block columns. It splits into `H = [H1 | H2]`:

| rate | block rows mb | information blocks kb | k (n = 1944) | m (n = 1944) |
|------|---------------|-----------------------|--------------|--------------|
| 1/2  | 12            | 12                    | 972          | 972          |
| 2/3  | 8             | 16                    | 1296         | 648          |
| 3/4  | 6             | 18                    | 1458         | 486          |
| 5/6  | 4             | 20                    | 1620         | 324          |

Conventions used throughout the RTL and testbenches:

* Bit t of block j of a vector is bit `j*Z + t`, with bit 0 first. `s` is the information
  vector, `p` the parity vector, and the codeword is `[s, p]`.
* A block with shift sigma maps x to y with `y[t] = x[(t + sigma) mod Z]`.
* `H2` is the same staircase in all twelve codes and is generated from a rule, not stored.
  Its first block column has shift 1 in rows 0 and mb-1 and shift 0 in row mb/2. The other
  columns form a double diagonal of unshifted identities.
* The twelve `H1` base matrices are the ones the 802.11n standard defines. They are stored in
  `rtl/ldpc_pkg.sv` and looked up with `h1_shift(len, rate, row, col)`.

The parity vector satisfies `H1 s + H2 p = 0`, so the encoder computes

    q = H1 s          (step 1, h1_xor_tree)
    p = H2^-1 q       (step 2, h2inv_xor_tree)

## Step 1: H1 trees with shared subexpressions

Bit t of block row r of q is the XOR of `s[j*Z + (t + sigma(r,j)) mod Z]` over the nonzero
blocks j of row r. Built row by row, that takes (weight - 1) * Z two-input XORs per row.
`h1_xor_tree` does better by looking for work that two rows have in common.

Take two rows ra and rb. If two columns i and i' have the same shift difference
`d = sigma(ra, .) - sigma(rb, .) mod Z`, then the sum of those columns as row rb sees them,
`T = P^sigma(rb,i) s_i + P^sigma(rb,i') s_i'`, also serves row ra. Row ra uses `P^d T`, and a
cyclic shift costs only wiring. The same holds for any number of columns with equal d.

One `h1_xor_tree` instance covers one codeword length. All four rates of that length read the
same input vector, so their 12 + 8 + 6 + 4 = 30 rows are searched together. This lets codes of
different rates share terms too. The search runs at elaboration time in the constant function
`make_plan`:

1. Take every row pair (ra, rb), ra < rb, in order.
2. Group the columns where both rows are nonzero and neither row has already used that column
   in a shared term. Columns with the same shift difference d go in one group.
3. Each group of two or more columns becomes a shared term. Row rb uses the term directly and
   row ra uses it shifted by d. Mark the columns as used in both rows.

Each row is then the XOR of its shared terms plus its remaining columns. A rate multiplexer
picks the rows of the selected code. The table below counts two-input XORs, with a term of w
columns counted as w - 1 and a row of o operands as o - 1, each times Z:

| length | shared terms | XOR2, row by row | XOR2, shared | saving |
|--------|--------------|------------------|--------------|--------|
| 648    | 40           | 6966             | 5778         | 17 %   |
| 1296   | 33           | 13662            | 11880        | 13 %   |
| 1944   | 24           | 19764            | 17820        | 10 %   |

This is a greedy simplification of the published extraction method. That method also splits a
new group against groups already found (nested intersections) and so finds more sharing. The
greedy plan never changes the result, only how much is shared. Synthesis tools may find
further sharing of their own.

## Step 2: H2^-1 without a carry chain

Adding all block rows of `H2` gives `P^1 + P^0 + P^1 = I`, so the first parity block is the
XOR of all q blocks of the code. The other blocks have a closed form:

    p_0 = q_0 ^ q_1 ^ ... ^ q_(mb-1)
    p_j = (q_0 ^ ... ^ q_(j-1)) ^ P^1 p_0 ^ (j > mb/2 ? p_0 : 0),     1 <= j < mb

No p_j waits for p_(j-1). The running XORs `q_0 ^ ... ^ q_(i-1)` are the basic subtrees shared
by all four rates:

* the first 4 blocks give p_0 for rate 5/6;
* 2 more blocks give p_0 for rate 3/4;
* 2 more give rate 2/3;
* 4 more give rate 1/2.

For example, with Z = 27, parity bit 28 of each rate (block 1, bit 0) is bit 0 of q XOR bit 1
of that rate's p_0. `h2inv_xor_tree` builds all four rates from the same running XORs and then
picks one with the rate multiplexer.

## Datapath and timing

```
s_in --> enc_input_reg (1620 b)
           |
           +--> h1_xor_tree x3 (n = 648 / 1296 / 1944, rate mux inside)
                  |
                  +--> len_select_reg (length mux [+ register if PIPELINE])  -> q (972 b)
                         |
                         +--> h2inv_xor_tree x3 (rate mux inside)
                                |
                                +--> len_select_reg (length mux + register)  -> p_out (972 b)
```

* `wifi_ldpc_encoder` has a valid flag and a code selection (`code_sel_t`: length and rate)
  that travel with the data. There is no back-pressure, because a word is accepted every cycle.
* Latency from `in_valid` to `out_valid` is 2 cycles: one for the input register and one for
  the output register. With `PIPELINE = 1` a register is added between the two steps, which
  makes it 3 cycles. Throughput is one codeword per cycle either way.
* `s_in` uses its first k bits. `p_out` carries m parity bits from bit 0 up; the bits above m
  are zero.
* Reset is synchronous and active low. It clears the valid flags and the registers.
* The input and output registers are loaded and read in parallel, whole words at a time.
  The original architecture calls them shift registers, but one word per clock needs the
  parallel load.

## CRC engine (`crc256_lut`)

A CRC is linear in the message, so the CRC of a 256-bit word is the XOR of 32 per-byte
contributions. Byte b (b = 0 is the last byte sent) reads its own 256-entry table holding
`v(x) * x^(8b + W) mod g(x)` for every byte value v. The engine works on one word per clock:

1. The running CRC is XORed into the top W bits of the new word. On the first word of a
   message, a multiplexer uses the initial value instead.
2. The 32 tables, grouped in eight lanes of four bytes, are read.
3. An XOR tree sums their outputs into the new CRC.

The tables are computed at elaboration time from the polynomial, so changing `POLY`/`CRC_W`
(e.g. `16'h1021`, 16) needs no other change.

How to send a message:

* Send it MSB first, 256 bits per word. Bit 255 goes first.
* If the length is not a multiple of 256 bits, make the first word the short one. Put its
  valid bytes right-aligned and set `in_nbytes` to their count. The engine clears the unused
  high bytes. Leading zeros do not change a CRC with `INIT = 0`.
* `crc_valid` pulses one cycle after the word flagged `in_last`, and `crc` holds the result.

These are choices made for this design: the polynomial, the bit order, the short-first-word
convention, and ROM tables instead of SRAM.

## What is built and what is not

Built:

* The complete two-step encoder for all twelve codes.
* Its optional pipeline stage.
* The CRC engine.

Not built:

* The 5G NR QC-LDPC encoder core that the CRC engine would feed. Its base graphs and
  datapath are not specified in enough detail.
* A 32-bit encoder reported only through its FPGA delay (1.442 ns) and size (38 LUTs), with
  no description of what it computes.

Points to weigh before trusting the design:

* The H1 tables come from the 802.11n standard, not from the design description. Their
  parity parts have been checked against the staircase rule. The information parts have not
  been checked against an independent copy of the standard.
* The testbenches use the same tables, so they prove the encoder is correct for these
  matrices, not that the matrices are the standard's. Before use, compare `ldpc_pkg` with
  the standard's Annex R tables, or check a known codeword.
* The CRC engine was checked against the catalogue check values for "123456789": 0xCDE703
  for CRC24A and 0x31C3 for 0x1021 with init 0.

## Files

| file | contents |
|------|----------|
| `rtl/ldpc_pkg.sv` | types, sizes, `H1` tables, `H2` rule |
| `rtl/ldpc_encoder_top.sv` | top level: encoder and CRC engine side by side |
| `rtl/wifi_ldpc_encoder.sv` | the two-step encoder |
| `rtl/enc_input_reg.sv` | 1620-bit input register |
| `rtl/h1_xor_tree.sv` | step 1 with shared subexpressions, one codeword length |
| `rtl/len_select_reg.sv` | length multiplexer with optional register |
| `rtl/h2inv_xor_tree.sv` | step 2, one codeword length |
| `rtl/crc256_lut.sv` | 256-bit CRC engine |
| `tb/ldpc_ref_pkg.sv` | bit-level reference: H1 s, forward substitution, syndrome check |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends itself. Each has a
watchdog that counts a failure if it hangs.

* `tb_ldpc_encoder_top` runs the top at its default parameters for 240 codewords and 40 CRC
  messages. It checks every parity vector against all parity-check equations and against
  forward substitution, and checks the 2-cycle latency. It also checks that all twelve codes,
  back-to-back words, changes of length and rate between consecutive words, idle cycles,
  short first CRC words, and single- and multi-word CRC messages each occur.
* `tb_wifi_ldpc_encoder` runs the encoder with and without the pipeline stage.
* `tb_h1_xor_tree` also drives single-bit vectors, which test each H1 column on its own.

With Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_encoder_top.sv \
    --top-module tb_ldpc_encoder_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Each runs in well under a second.

## Changing the design

* `PIPELINE` on `ldpc_encoder_top` or `wifi_ldpc_encoder` adds the register between the two
  steps.
* To use another QC-LDPC family with the same staircase `H2`, replace the tables and
  `h1_shift` in `ldpc_pkg`. The sharing plan is recomputed automatically. A family with a
  different `H2` needs a new `h2inv_xor_tree`.
* `crc256_lut` takes `CRC_W`, `POLY` and `INIT` as parameters.

# Two-share masked AES-128 with a block-RAM threshold S-box

This is a first-order masked AES-128 core for FPGAs. Every secret-dependent
value is held in two Boolean shares (`x = x0 ^ x1`). Each share is processed
so that no single point of the circuit, glitches included, depends on both
shares of any bit. The nonlinear part, the S-box, is a threshold
implementation (TI). Its component functions are not built from logic: they
are stored as lookup tables in FPGA block RAMs.

The area saving comes from computing the S-box in two steps through **one** set of 12
BRAMs. In the earlier two-step arrangement, one set of BRAMs held the first
step and a second set held the second step, so each S-box needed 24 BRAMs.
Here the two steps share a memory. One extra address bit, the *step
selector*, picks the table, and the output of the first step is fed back to
the same BRAMs as the address of the second step. This halves the BRAM count,
from 240 to 120 for the whole core. Latency and randomness stay the same.

| | value |
|---|---|
| cipher | AES-128, encryption and decryption in one core |
| shares | 2 (first-order security) |
| S-box units | 10 (8 on the state, 2 in the key schedule), 12 BRAMs each |
| BRAMs | 120 dual-port 2K x 8 |
| latency | 50 cycles per block, start to result |
| fresh randomness | 160 bits per clock cycle |

## The S-box as two cubic maps

Inversion in GF(2^8) is `x^254`, of algebraic degree 7. The core splits it
into two maps of degree 3, because 26 and 49 both have Hamming weight 3 and
`26 * 49 = 1274 = 254 (mod 255)`:

```
F(x) = x^26            G(x) = A(x^49)          W(y) = (A^-1(y))^49
S(x)    = G(F(x))      (encryption: first step F, second step G)
S^-1(y) = F(W(y))      (decryption: first step W, second step F)
```

Here `A` is the AES affine map. Its degree 1 leaves the degree at 3.

### Sharing a cubic map with 12 component functions

A 2-share implementation of an 8-bit cubic map uses 12 *component functions*
`f_0 .. f_11`. Each one sees exactly one share of every input bit. That
property, called non-completeness, is what makes the sharing glitch-resistant.
Which share each function sees is fixed by the sharing table (rows are
component functions, columns a..h are input bits 7..0, and the entry is the
share index):

```
f0  0 0 0 0 1 1 0 0     f6  1 0 0 0 0 0 1 0
f1  0 0 0 1 1 0 1 1     f7  1 0 1 1 1 1 0 1
f2  0 0 1 0 0 0 0 1     f8  1 1 0 0 1 1 1 1
f3  0 0 1 1 0 1 1 0     f9  1 1 0 1 1 0 0 0
f4  0 1 0 1 0 1 0 1     f10 1 1 1 0 0 1 0 0
f5  0 1 1 0 1 0 1 0     f11 1 1 1 1 0 0 1 1
```

The table has the property that matters: for any three columns, the 12 rows
show all eight share patterns. Row 3 has share 1 in column f. With share 0
there, nine triples of columns would lack a pattern, and a cubic map could not
be shared.

The contents of each component function are derived, not listed
(`aes_ti_pkg::component_rom`):

1. Write the target map (F, W or G) in algebraic normal form (ANF): an XOR of
   monomials of degree 3 or less, with 8-bit coefficients.
2. Substituting `x_k = x_k^0 ^ x_k^1` turns a monomial of degree d into 2^d
   terms, one per share pattern.
3. Give each term to the first table row whose entries on the monomial's bits
   equal the term's pattern. Row `i` therefore owns a set of monomials, and
   `f_i(z)` is the XOR of those monomials evaluated on the shares `z` it
   receives.
4. The truth table of `f_i` is the Möbius transform of the ANF restricted to
   the monomials that row `i` owns.

Because every term lands in exactly one row, the XOR of all 12 component
functions is the target map.

### Re-masking and compression

Every BRAM address also carries one fresh bit `r`. Setting `r = 1`
complements all eight output bits. Component functions `i` and `i+6` receive
the same bit (`r0..r5`), so the masks cancel in the final XOR but make each
stored output uniformly masked. The compression layer XORs `f_0..f_5` into
output share 0 and `f_6..f_11` into output share 1. Rows 0-5 use share 0 of
the MSB and rows 6-11 use share 1. It then XORs `{r7,r6}` repeated four times
into both shares. This changes the sharing but not the value.

## One BRAM, two steps

Each component function `i` lives in one dual-port 2K x 8 BRAM
(`ti_bram`, wrapped by `ti_block`). The 11-bit address is

```
 bit 10    bit 9   bit 8   bits 7..0
 step      ed      r       z  (one share of each input bit, per the table)

 step ed   table
  0   0    F_i    first step, encryption
  0   1    W_i    first step, decryption
  1   0    G_i    second step, encryption
  1   1    F_i    second step, decryption
```

Port A always addresses the encryption half (`ed = 0`) and port B the
decryption half. An E/D multiplexer after the output registers picks the
port in use, and each port has its own re-masking bit. A read takes two clock
edges: one to read the array, one into the output register. The output
register must stay enabled. It is the synchronisation point that keeps
glitches on the address away from the compression layer, and it keeps the
re-masked words uniform. Its second stage is also what lets two evaluations
overlap (below).

Logically the memory is two halves, the first-step pair (F_i, W_i) and the
second-step pair (G_i, F_i), with a multiplexer after them driven by the step
selector. Putting the selector on the top address bit of a single BRAM does
the same job without any logic. A BRAM only ever holds tables of its own
index `i`. Putting `F_i` and `F_j` (i != j) in one memory would let one probe
see shares that two different component functions are meant to keep apart.

`ti_sbox` puts one multiplexer in front of the index selector:

```
            sel
x0,x1 ---->|\                                    +--> y0,y1
           | |--> index selector --> 12 x ti_block --> compression --+
  +------->|/        (comb.)          (2 cycles)      (comb.)        |
  +------------------------------------------------------------------+
```

`sel` is both the multiplexer select and address bit 10. No separate control
is needed to tell the BRAMs which step they are in. The index selector and
the compression layer are combinational, so the first-step result goes
straight back as the second-step address.

```
cycle   t      t+1    t+2    t+3    t+4    t+5
sel     0      0      1      1      -      -
issue   a:F    b:F    a:G    b:G
y                     F(a)   F(b)   S(a)   S(b)
```

Two evaluations fit in the two BRAM register stages, so each unit handles two
bytes every four cycles.

## AES schedule

Unit `u` (0..7) of the state handles byte `u` (columns 0-1, group 0) and byte
`u+8` (columns 2-3, group 1). One round takes five cycles (`aes_ti_ctrl`):

| phase | action |
|---|---|
| 0 | issue group 0, first step; also closes the previous round |
| 1 | issue group 1, first step |
| 2 | group 0 second step (`sel = 1`) |
| 3 | group 1 second step (`sel = 1`) |
| 4 | group-0 results on the outputs: captured |
| next 0 | group-1 results on the outputs: round closed |

Closing a round runs ShiftRows, MixColumns and AddRoundKey on each share
(for decryption: InvShiftRows, AddRoundKey, InvMixColumns). The result goes
into the state register and, in the same cycle, group 0 of the next round is
issued from it. The start cycle is phase 0 of round 1, with the initial key
addition done on the way in. The close of round 10 writes the result, so
start to result is 10 x 5 = 50 cycles. The long combinational path is
compression, then the linear layer, then the index selector, then the BRAM
address.

The key schedule (`aes_ti_keysched`) runs alongside with two more S-box units,
each evaluating two of the four SubWord bytes per round on the same
schedule. Encryption expands forward from `k0`. Decryption starts from the
last round key `k10` and runs backward, using `k_{r-1}.w3 = k_r.w3 ^ k_r.w2`
as the SubWord input. The round constant goes into share 0 only.

## Interface (`aes_ti_top`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of the control state |
| `start` | in | 1 | one-cycle request, accepted only when `busy = 0` |
| `ed` | in | 1 | 0 encrypt, 1 decrypt (sampled with `start`) |
| `din0`, `din1` | in | 128 | data shares (sampled with `start`) |
| `key0`, `key1` | in | 128 | key shares: `k0` to encrypt, `k10` to decrypt |
| `rnd` | in | 160 | fresh random bits, new every cycle; 16 per unit, `[16u +: 8]` port A, `[16u+8 +: 8]` port B; units 8-9 are the key schedule |
| `busy` | out | 1 | block in progress |
| `done` | out | 1 | one-cycle pulse: `dout0 ^ dout1` is the result |
| `dout0`, `dout1` | out | 128 | result shares, held until the next result |

Byte order is FIPS-197: byte 0 is bits 127:120, and the state is column-major.
A start request while busy is ignored. The caller must split inputs into
shares with fresh masks and supply true randomness on `rnd`. Neither the
mask generator nor the random source is part of this RTL.

## How far it can be trusted

Verified in simulation:

- All 256 S-box and inverse S-box values, through the masked unit with random
  sharings and randomness.
- Correctness of every component table (XOR of the 12 equals F, W, G).
- Non-completeness of the index selector.
- The exact latencies: 2 cycles per BRAM read, 4 per S-box, 50 per block.
- Forward and backward round keys.
- The FIPS-197 vectors (Appendix B and C.1) both ways, plus 40 random
  blocks checked against an independent unmasked model.

Not verified: side-channel security itself. No leakage simulation or glitch
analysis was done. Non-completeness holds by construction. Uniformity does
**not**. This design's own re-masking scheme complements whole words with
`r0..r5` and adds `{r7,r6}` four times. With it, for a fixed input byte,
output share 0 of the first step takes only 152 to 224 of its 256 values
(input bytes 0x00, 0x01 and 0x53, over all input masks and all 256 random
bytes). The source design keeps 8 random bits per S-box but does not say how
they are spread. Anyone relying on first-order security should replace the
re-masking in `aes_ti_pkg::component_rom` and `ti_compression` with a proven
uniform one.

Taken from the source design:

- The F/G/W decomposition with n = 26, m = 49.
- The 12-row sharing table.
- One BRAM per component function holding both steps, with the step
  selector as the address MSB and as the input multiplexer select.
- The address layout: step on bit 10, E/D on bit 9, `r` on bit 8, shares
  below.
- Port A for encryption and port B for decryption.
- The two-cycle BRAM read and combinational compression and index
  selection.
- 8 + 2 units, 120 BRAMs, 160 random bits, 50 cycles.

This design's own choices:

- Row 3, column f of the sharing table (above), and the column-to-bit order
  (a = MSB).
- How the ANF terms are assigned to rows.
- `r` complementing the whole output word, and the `{r7,r6}` pattern in the
  compression.
- The five-phase schedule and byte-to-unit mapping.
- The on-the-fly key schedule with `k10` as the decryption key.
- The start/busy/done interface.
- One memory per component function, with the step selector as its top
  address bit. The source also draws each block as two table pairs followed
  by a step multiplexer. The behaviour is the same.

Known gap: the published figures give about one block per 10 cycles (1.344
Gbit/s at 105 MHz). This core finishes one block before accepting the next,
which gives one block per 50 cycles. How blocks would overlap is not
specified, so it is not attempted.

The BRAM contents are computed by an `initial` block from package functions,
which is the FPGA way to give a block RAM an initial value. Synthesis flows
that cannot evaluate such functions need the tables exported to memory files
first.

## Files and simulation

`rtl/`:

| file | |
|---|---|
| `aes_ti_pkg.sv` | constants, sharing table, GF(2^8) maps, BRAM contents, AES linear layers |
| `ti_bram.sv` | dual-port 2K x 8 component BRAM, two-cycle read |
| `ti_block.sv` | one component block: addresses, E/D port multiplexer |
| `ti_indices_selector.sv` | share routing per the sharing table |
| `ti_compression.sv` | 12 to 2 share compression with fresh bits |
| `ti_sbox.sv` | masked S-box / inverse S-box unit with step feedback |
| `aes_ti_ctrl.sv` | round and phase sequencer |
| `aes_ti_keysched.sv` | masked key expansion |
| `aes_ti_top.sv` | the core |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M`. `aes_ref_pkg.sv` is the unmasked
reference model they share. To run the end-to-end test:

```
verilator --binary --timing --assert -Irtl \
  rtl/aes_ti_pkg.sv rtl/ti_*.sv rtl/aes_ti_ctrl.sv rtl/aes_ti_keysched.sv \
  rtl/aes_ti_top.sv tb/aes_ref_pkg.sv tb/tb_aes_ti_top.sv \
  --top-module tb_aes_ti_top -Mdir obj && ./obj/Vtb_aes_ti_top
```

The other testbenches build the same way with their module's files. Building
the core takes about a minute, mostly spent on the 120 memories, and the run
takes well under a second.

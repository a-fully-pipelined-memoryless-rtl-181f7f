# A memoryless, fully pipelined AES-128 encryptor

This is synthesizable SystemVerilog for an AES-128 encryption core that takes
a new 128-bit plaintext and a new 128-bit key in **every clock cycle**. The
ciphertext comes out **43 cycles** later. All ten rounds and all ten
key-expansion steps are unrolled into a pipeline, so throughput is one block
per clock: 128 bit × f<sub>clk</sub>. At 139 MHz that is 17.8 Gbit/s.

A fully unrolled AES needs 200 S-boxes: 16 per round for the data and 4 per
round for the key. Built as 256×8 lookup tables, they would take about 100
FPGA block RAMs. This design uses no lookup memories. Each S-box is computed
as arithmetic in a *composite field*, where inverting a byte reduces to a few
4-bit operations. The design follows the published SIG-AES-E architecture
(Signal Processing Laboratory, Helsinki University of Technology, FPGA 2003).
Its structure, field constants and cycle budget are taken from there. The
points where this RTL had to decide something itself are listed in
[Design choices](#design-choices-not-fixed-by-the-original-architecture).

## Interface and timing

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1     | clock; all registers use the rising edge |
| `rst_n`  | in  | 1     | asynchronous active-low reset; clears only the `done` pipeline |
| `load`   | in  | 1     | the values on `datain`/`keyin` are a new pair to encrypt |
| `datain` | in  | 128   | plaintext |
| `keyin`  | in  | 128   | cipher key (every block can have its own key) |
| `edata`  | out | 128   | ciphertext |
| `done`   | out | 1     | `edata` holds the ciphertext of the pair loaded 43 cycles earlier |

Bytes are in FIPS-197 order: byte 0 (the first byte of the block) is
`[127:120]`. The state is filled column by column, so state byte s[r][c] is
byte r+4c.

A pair presented with `load=1` before rising edge *t* appears on `edata`, with
`done=1`, after rising edge *t*+42. In other words, it is visible in the 43rd
cycle after it was sampled. Loads in consecutive cycles give results in
consecutive cycles. There is no back-pressure and no stall: the pipeline
always advances. In a cycle without `load`, the input registers keep their
old contents. That stale pair flows through the pipeline, but `done` is low
for its slot, so it must be ignored. The core is ECB-only by nature:
chaining modes that feed the ciphertext back (CBC, CFB) cannot run at full
rate on it.

## The composite field: why no S-box tables are needed

This is the part of the design that needs the most explanation.

**Standard field F1.** AES works on bytes as elements of
F1 = GF(2)[x]/(x⁸+x⁴+x³+x+1). SubBytes is the multiplicative inverse in F1
followed by an affine bit transform. Inverting in F1 directly is costly in
logic.

**Composite field F2.** The same 256 elements can be written as
F2 = GF(2⁴)[x]/(x² + x + {8}), with GF(2⁴) = GF(2)[y]/(y⁴+y+1). A byte is
b·x + c, with b its high nibble and c its low nibble. The polynomial
x² + x + y³ is irreducible, so F2 is a field of 256 elements, isomorphic to F1.
In F2 the inverse is

    (b·x + c)⁻¹ = b·d⁻¹ · x + (c + b)·d⁻¹,    d = {8}·b² + b·c + c²

Here every operation is in GF(2⁴): 4-bit multiplications, XORs and one
inverse of a 4-bit value (a 16-entry table). That is much less logic than
an 8-bit inverse.

**The map PHI.** There is a linear bit map, an 8×8 matrix over GF(2), that
takes F1 bytes to F2 bytes and respects both addition and multiplication.
It sends the F1 root x = {02} to the F2 element {20}. Column j of PHI is the
F2 image of xʲ: {01, 20, 46, 4c, 3c, d5, 34, e5}. PHI_INV is its inverse.

**Doing the whole cipher in F2.** Mapping into F2 and back around each S-box
would cost two matrix multiplications per byte per round. Instead, the data
and the key are mapped **once**, at the input. Everything else is re-expressed
in F2:

| operation | in F1 | in F2 (constants in `aes_f2_pkg`) |
|-----------|-------|-----------------------------------|
| AddRoundKey | XOR | XOR (PHI is linear) |
| ShiftRows | byte permutation | the same permutation |
| SubBytes affine map | T·v + {63} | `AFF_F2`·v + {c0}, with `AFF_F2` = PHI·T·PHI⁻¹ and {c0} = PHI({63}) |
| MixColumns ×{02}, ×{03} | xtime | bit matrices `MUL2_F2`, `MUL3_F2` (PHI·M·PHI⁻¹) |
| round constants rcon[1..10] | 01 02 04 08 10 20 40 80 1b 36 | 01 20 46 4c 3c d5 34 e5 51 8f |

The ciphertext is mapped back with PHI_INV at the very end, together with
the last AddRoundKey. In the package, each matrix is written row by row, with each row literal
reading left to right as input bits 0..7, exactly like the matrix written
out; `mat_vec` takes care of the index order.

## Pipeline structure

```
            +--------+   +----------+         +----------+   +---------+
datain ---->|        |-->|          |-- ... ->|          |-->|         |--> edata
keyin  ---->| round0 |-->| round1_9 |-- ... ->| round1_9 |-->| round10 |
load   ---->|  3 cyc |-->|  4 cyc   |   x9    |  4 cyc   |-->|  4 cyc  |--> done
            +--------+   +----------+         +----------+   +---------+
                           rcon=01               rcon=51       rcon=8f
```

Each block passes on three things: the state, the round key it used, and a
valid bit. Total latency: 3 + 9·4 + 4 = 43 cycles.

**round0** (3 cycles), in `round0.sv`:

| cycle | data path | key path |
|-------|-----------|----------|
| 1 | `inputreg` (captures when `load`) | `inputreg` |
| 2 | `phi` (F1→F2) | `phi` |
| 3 | `keyadd128`: state ⊕ key | `reg128` (key = round key 0) |

**round1_9** (4 cycles, instantiated 9 times):

| cycle | data path (per column, 4 in parallel) | key path (`subkey` + `reg128`) |
|-------|---------------------------------------|-------------------------------|
| –  | ShiftRows (wiring) | – |
| 1 | `sbox` stage 1: d⁻¹ and c+b | `sbox` stage 1 on the last key word |
| 2 | `sbox` stage 2: products, affine map | `sbox` stage 2 |
| 3 | `mixcolumn` | RotWord, rcon, XOR chain → new round key |
| 4 | `keyadd` with the new round key | `reg128` |

**round10** (4 cycles): ShiftRows, `sbox` ×16 (cycles 1–2), `reg128`
(cycle 3, there is no MixColumns and the key needs three cycles),
`keyadd10` = AddRoundKey + PHI_INV (cycle 4). Its `subkey` uses rcon {8f}.

**subkey**: rk[i] from rk[i−1]. With p0..p3 the four 32-bit words of the
previous key (p0 = `[127:96]`): t = RotWord(SubWord(p3)) ⊕ {rcon,00,00,00},
w0 = p0⊕t, w1 = p1⊕w0, w2 = p2⊕w1, w3 = p3⊕w2. RotWord is only wiring: the
S-box of byte `p3[23:16]` becomes the top byte of t, and only that byte is
XORed with rcon. The XOR chain is a single cycle after the two S-box cycles.

**control0 / control1_10**: shift registers of 3 and 4 bits that carry
`load` along as the valid flag, producing `done`.

## Files

| file | contents |
|------|----------|
| `rtl/aes_f2_pkg.sv` | types, F2 matrices and constants, GF(2⁴) multiply and 16-entry inverse, ShiftRows, F2 MixColumns |
| `rtl/sig_aes_e.sv` | top level: round0, 9× round1_9, round10 |
| `rtl/round0.sv`, `rtl/round1_9.sv`, `rtl/round10.sv` | the three kinds of pipeline block |
| `rtl/inputreg.sv`, `rtl/reg128.sv` | load-enabled input register, balancing pipeline register |
| `rtl/phi.sv`, `rtl/keyadd128.sv`, `rtl/keyadd.sv`, `rtl/keyadd10.sv` | F1→F2 map; AddRoundKey (128-bit, 32-bit column, and final with F2→F1) |
| `rtl/sbox.sv`, `rtl/mixcolumn.sv`, `rtl/subkey.sv` | two-stage S-box, one-column MixColumns, one key-expansion step |
| `rtl/control0.sv`, `rtl/control1_10.sv` | `done` delay chains |
| `tb/aes_ref_pkg.sv` | independent reference: textbook AES in F1, F2 arithmetic rebuilt from its definition |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Design choices not fixed by the original architecture

- **Reset.** The original description has no reset. Here `rst_n` clears the
  `done` chains only, so no false `done` appears after power-up. Data and
  key registers are not reset; their contents are qualified by `done`.
- **Key alignment inside `subkey`.** The published key-expansion diagram
  shows one register box per key word beside the two-cycle S-boxes. For a
  new key every cycle to work, the words must wait exactly as long as the
  S-box results. They are delayed two cycles here. The round constant input
  is delayed with them.
- **The S-box's b register.** Stage 2 needs the high nibble b as well as
  d⁻¹ and c+b. b is carried in a 4-bit register beside them.
- **Latency 43 vs. the published nanoseconds.** The design is exactly 43
  cycles, as the architecture states. The published latency figures (318 ns
  at 7.19 ns per cycle, 337 ns at 7.74 ns) come to about 44 cycles; they
  presumably include I/O timing and are not modelled.
- **GF(2⁴) inverse as a table.** It is written as a 16-entry `case`, as in
  the original. It is a constant function of 4 bits. FPGA synthesis turns
  it into LUT logic, and no block RAM is needed. A generic synthesis run
  may report these as small ROMs (64 bits per S-box, 12,800 bits in all)
  before technology mapping.
- **Byte order** follows FIPS-197. The original only describes the block
  as a 4×4 byte array.
- **Round constants** are fed to each `round1_9` through a port from the
  `RCON_F2` table. `round10` has its constant {8f} as a parameter.

The published work also mentions a decryption core and a combined
encryption/decryption core. Their internals were never given, so they are
not included. FPGA results are properties of placement on a particular part
and cannot be reproduced from RTL: 139.1 MHz and 10,750 slices on a Virtex-II
XC2V2000-5, and 129.2 MHz and 11,719 slices on a Virtex-E XCV1000E-8.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, has a watchdog, and checks latency where it
is defined. The references in `tb/aes_ref_pkg.sv` do not use the design's
matrices:

- AES is computed the textbook way in F1. The S-box is a²⁵⁴ followed by
  the affine map, and MixColumns uses xtime.
- PHI is rebuilt from F2 multiplication, as the powers of {20}.
- Block-level tests work in F1 and map their stimulus into F2 with this
  reference PHI.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_sbox` | all 256 inputs, 2-cycle latency, FIPS-197 S-box values |
| `tb_phi` | every byte in every lane; phi(a·b) = phi(a)·phi(b) through the hardware |
| `tb_mixcolumn` | random columns and the FIPS-197 example column |
| `tb_subkey` | random keys and round numbers every cycle; the full FIPS-197 key schedule to round key 10 |
| `tb_round0`, `tb_round1_9`, `tb_round10` | random per-cycle stimulus with gaps; FIPS-197 appendix B intermediate states |
| `tb_sig_aes_e` | end to end at default size (listed below) |

`tb_sig_aes_e` checks:

- the FIPS-197 vectors (C.1 → `69c4e0d8…`, appendix B → `3925841d…`);
- a 120-block back-to-back burst with a fresh key every cycle, whose
  results must come out in 120 consecutive cycles;
- 200 cycles of mixed traffic with idle cycles and shared keys;
- that every `done` is exactly 43 cycles after its load;
- that idle cycles, back-to-back loads, key changes and key reuse each
  happened at least once.

To run one with plain Verilator (5.x), from the directory holding `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_sig_aes_e \
        tb/aes_ref_pkg.sv rtl/*.sv tb/tb_sig_aes_e.sv
    ./obj_dir/Vtb_sig_aes_e

Replace `tb_sig_aes_e` with any other testbench name. The end-to-end test
runs in well under a second.

## Changing the design

- **Field constants** live only in `aes_f2_pkg`. A different composite
  field (another A, B in x² + A·x + B) means new PHI, PHI_INV, AFF_F2,
  AFF_F2_C, MUL2_F2, MUL3_F2, RCON_F2, and new `sbox` equations. The
  testbenches' reference PHI must then be rebuilt from the new field too.
- **Pipeline depth.** Adding a register stage inside a round means changing
  the matching `control` depth and the key-path balancing, so that key,
  data and `done` still meet. The top's `LATENCY` parameter is only
  checked by an assertion and does not change the structure.

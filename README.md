# Kyber polynomial multiplier with a look-up-table modular multiplier

This is an NTT-based polynomial multiplier for CRYSTALS-Kyber. It computes
`c = a * b` in the ring `Z_3329[x] / (x^256 + 1)` as `INTT(NTT(a) ∘ NTT(b))`.
The design has one unusual feature: **it has no multiplier circuit at all**.
Every modular product `x * y mod 3329` comes from a chain of three ROM
look-ups:

1. a discrete-logarithm table;
2. residue-number-system adders built from tables;
3. a reconstruction table.

The rest of the design is built around that multiplier:

- A dual butterfly unit (DBU) performs two NTT, INTT or coefficient-wise
  butterflies per clock with one dual-ported multiplier.
- Two small memory banks hold both operands.
- A control unit runs the transforms stage after stage with no pipeline
  bubbles.

A full multiplication (NTT a, NTT b, pairwise product, INTT) takes
**1693 clocks**. An NTT or INTT alone takes 455 clocks; the coefficient-wise
product alone takes 328.

The same RTL builds two other versions through the `LANES` parameter of
`kyber_pmul_top`:

| Version | `LANES` | Multipliers | Coefficients per word | Transform | Pairwise product | Full multiplication |
|---|---|---|---|---|---|---|
| one DBU (default) | 2 | 1, dual mode | 2 | 455 | 328 | 1693 |
| single butterfly unit (SBU) | 1 | 1, single mode | 1 | 903 | 648 | 3357 |
| two DBUs | 4 | 2, dual mode | 4 | 231 | 168 | 861 |

All figures are in clocks.

Everything is synthesizable SystemVerilog (IEEE 1800-2017):

- `rtl/` holds the design.
- `tb/` holds one self-checking testbench per module and an end-to-end
  testbench for the top, `kyber_pmul_top`.

## 1. Modular multiplication by table look-up

### The idea

The prime q = 3329 has the primitive root α = 3. Every non-zero residue g
can therefore be written as `g = 3^k mod q` for exactly one k in 0..3327.
Multiplication turns into addition of exponents:

    g1 * g2 mod q = 3^((k1 + k2) mod 3328) mod q

A direct 12b × 12b product table would need 2^24 entries. This way, the
design needs only an index table (g → k), an adder, and an inverse table
(k → g).

The adder does not have to work modulo 3328. Any modulus larger than the
largest possible sum (2 · 3327) will do, because the final reduction
mod 3328 can be folded into the inverse table. The design adds in
**M = 7 · 31 · 32 = 6944** using a residue number system with the
pairwise-coprime moduli 7, 31 and 32. Each residue addition is then a tiny
table:

- mod 7: 3 + 3 address bits, 64 entries;
- mod 31 and mod 32: 5 + 5 address bits, 1024 entries each.

### The four tables

| Table (module) | Size | Address | Content |
|---|---|---|---|
| index (`index_rom`) | 13b × 3329 | g | `{k mod 7, k mod 31, k mod 32}`, where `3^k ≡ g` |
| add mod 7 (`rns_add_rom`, MOD=7) | 3b × 64 | `{x, y}` | `(x + y) mod 7` |
| add mod 31 (`rns_add_rom`, MOD=31) | 5b × 1024 | `{x, y}` | `(x + y) mod 31`, or 31 if x or y is 31 |
| add mod 32 (`rns_add_rom`, MOD=32) | 5b × 1024 | `{x, y}` | `(x + y) mod 32` |
| reconstruction (`crt_rom`) | 12b × 7168 | `{r1, r2, r3}` | `3^(CRT(r1,r2,r3) mod 3328) mod q`, or 0 if r2 = 31 |

The reconstruction table is addressed as 7 pages (r1, the mod-7 residue) of
32 columns (r2, the mod-31 residue) by 32 rows (r3, the mod-32 residue). Its
Chinese-remainder step is

    r = (2976·r1 + 2016·r2 + 1953·r3) mod 6944

The weights follow from the moduli:

- 2976 = 992 · (992⁻¹ mod 7 = 3);
- 2016 = 224 · (224⁻¹ mod 31 = 9);
- 1953 = 217 · (217⁻¹ mod 32 = 9).

Then r is reduced mod 3328 and 3^r mod 3329 is stored. Because `3^3328 ≡ 1`,
the reduction mod 3328 does not change the stored value. It is kept because
it mirrors the three steps of the construction.

**Zero.** Zero has no logarithm. The index table stores the code 31 in its
mod-31 field for g = 0. A valid residue mod 31 is never 31. The mod-31
addition table passes 31 through whenever either input is 31. The whole
r2 = 31 column of the reconstruction table holds 0. A product with a zero
factor therefore comes out as 0 with no extra logic.

**Worked example.** Take 2 · 3327 mod 3329.

1. The index table gives `k(2) = 1134 → (0, 18, 14)` and
   `k(3327) = 2798 → (5, 8, 14)`.
2. The adders give `(5, 26, 28)`.
3. The CRT step gives r = 3932 = 1134 + 2798. Reduced mod 3328 that is 604,
   and `3^604 mod 3329 = 3325`, which is the product.

### Pipeline and dual mode (`rns_modmul`)

Each table is a synchronous ROM, so the multiplier is a 3-clock pipeline:
index look-up, residue addition, reconstruction. It accepts a new operand
pair on every clock.

Every table has two read ports. With `DUAL = 1` (the dual modular
multiplier), port B of every table serves a second, independent
multiplication. Two products per clock then come from the same memories,
which is what makes the dual butterfly unit cheap. The multiplier uses two
index tables (one per operand), three addition tables and one
reconstruction table.

All table contents are computed at elaboration time from the formulas above
by `initial` loops. No data file is read. The shared constants and helper
functions (`pow_mod`, `crt_entry`, bit reversal, twiddle values) are in
`rtl/kyber_pkg.sv`.

## 2. The butterfly unit

`butterfly_unit` has `LANES` lanes (`bf_lane`) that share one `rns_modmul`:

- `LANES = 2` is the dual butterfly unit; the multiplier runs in dual mode.
- `LANES = 1` is the single butterfly unit; the multiplier runs in single
  mode.

Each lane contains:

- a two-clock modular adder (`mod_add`: add, then conditional subtract of q);
- a two-clock modular subtractor (`mod_sub`);
- two combinational halvers (`mod_div2`: `a/2` if a is even,
  `(a >> 1) + (q+1)/2` if a is odd);
- the delay registers that align operands with the 3-clock multiplier.

The lane works in one of three modes.

### NTT mode: Cooley-Tukey, 6 clocks

    o0 = X + W·Y,   o1 = X − W·Y

| Clock | Work |
|---|---|
| 0–2 | Multiply W·Y; X waits in a 3-deep delay line. |
| 3–4 | Add and subtract. |
| 5 | Output register. |

### INTT mode: Gentleman-Sande, 6 clocks

    o0 = (X + Y)/2,   o1 = W·(Y − X)/2

| Clock | Work |
|---|---|
| 0–1 | Add and subtract. |
| 2–4 | Multiply by W. |
| 5 | Halve both results and register them. |

Halving at every one of the 7 stages divides by 2^7 = 128. That is exactly
the `n⁻¹` scaling Kyber's 128-point inverse transform needs, so no final
multiplication pass is required.

### CWM mode: one degree-1 product in 5 multiplier slots

Kyber's NTT is incomplete, so the pointwise product is a product of
degree-1 polynomials modulo `x² − γ`:

    c0 = a0·b0 + a1·b1·γ,   c1 = a0·b1 + a1·b0

That is five multiplications and two additions. The lane feeds its
multiplier port on five consecutive clocks, in this order:

| Slot | Product | Why this position |
|---|---|---|
| 0 | `a1·b1` | It starts the longest chain. |
| 1 | `a0·b0` | |
| 2 | `a0·b1` | |
| 3 | `a1·b0` | |
| 4 | `(a1·b1)·γ` | It uses the result of slot 0, which left the multiplier at slot 3. |

A small tag pipeline records which product leaves the multiplier on each
clock. The lane's adder first forms c1 from `a0·b1` and `a1·b0`, then forms
c0 from `a0·b0` and `a1·b1·γ`.

- A lane accepts an operand set every 5 clocks.
- It delivers the result 10 clocks after the set was applied.
- An assertion (`a_cwm_spacing`) enforces the 5-clock spacing.

With two lanes, the DBU finishes two degree-1 products, which is four
output coefficients, every 5 clocks.

### Interface

`butterfly_unit` has the following ports:

- **Inputs:** `mode`, `in_valid`, and per-lane `u0, u1, v0, v1, w`.
  - In NTT/INTT mode: X = u0, Y = v0, W = w.
  - In CWM mode: a = {u0, u1}, b = {v0, v1}, γ = w.
- **Outputs:** `out_valid`, and per-lane `o0, o1`.

`mode` must stay constant while operands are in flight. The control unit
always drains the pipeline before it switches mode.

## 3. Memory organisation

Both operands live in two banks (`poly_bank`), each 128 words × 24 bits.
Every word packs two neighbouring coefficients `{c[2w+1], c[2w]}`, one per
DBU lane. In general a word holds `LANES` coefficients:

- `LANES = 1`: each bank has 256 words × 12 bits.
- `LANES = 4`: each bank has 64 words × 48 bits.

Each bank is a simple dual-port RAM: one registered read and one write per
clock, with a separate write enable for each coefficient. Everything below
holds for all versions; the one-DBU version is described.

**Logical layout.** There are 256 word addresses, `paddr` 0..255:

- Polynomial A, word w (coefficients 2w and 2w+1), is at `paddr = w`.
- Polynomial B, word w, is at `paddr = 255 − w` (bitwise `~w`), which is
  the opposite order.

**Physical placement.** A word goes to bank `^paddr` (the parity of its
address), at row `paddr[7:1]`.

This placement works because every pair of words the datapath touches in
one clock differs in exactly one address bit:

- **Butterfly operands.** In a stage with butterfly distance m (m ≥ 2
  coefficients), a butterfly pair reads words x and x + m/2. Here x has the
  m/2 bit clear, so the two addresses differ in a single bit. Because m ≥ 2,
  both lanes work on neighbouring butterflies of the same block and share
  one twiddle factor.
- **CWM operands.** A CWM group reads A words 2g and 2g+1 on one clock, then
  B words ~(2g) and ~(2g+1) on the next.

A single-bit difference always flips the parity, so the two reads, and
likewise the two write-backs, always go to different banks. Two simple
dual-port banks therefore sustain two reads and two writes per clock, with
no arbitration. Complementing all 8 bits of B's addresses does not change
parity relations, so the same holds for B.

Both polynomials use 2 × 128 × 24 bits = 6 Kbit in total. Assertions in
`pm_ctrl` (`a_read_banks`, `a_write_banks`) check the one-read-per-bank and
one-write-per-bank rule on every clock.

## 4. Control unit and schedule (`pm_ctrl`)

The control unit drives the following operations:

| `op` | Action | Clocks, one DBU (start accepted → `done`) | SBU | Two DBUs |
|---|---|---|---|---|
| `OP_NTT` | 7 Cooley-Tukey stages on polynomial `sel`, in place | 455 | 903 | 231 |
| `OP_INTT` | 7 Gentleman-Sande stages on polynomial `sel`, in place, with result scaled by 1/128 | 455 | 903 | 231 |
| `OP_CWM` | A ← A ∘ B (128 degree-1 products), in the NTT domain | 328 | 648 | 168 |
| `OP_PMUL` | NTT(A), NTT(B), CWM, INTT(A), so that A ← a·b | 1693 | 3357 | 861 |

With P = 128 / `LANES` issue clocks per stage, a transform takes 7·P + 7
clocks and the pairwise product takes 5·P + 8.

### Transforms: stages issued back to back

Each stage takes 64 issue clocks. Each clock reads one X word and one Y word
(two butterflies), which is 128 butterflies per stage. Twiddle addressing
follows the Kyber reference:

- NTT: stage s, block i uses `ζ^br7(k)` with k = 2^s + i, where ζ = 17 and
  br7 is 7-bit bit reversal.
- INTT: the twiddle index counts down over the same table.

Results are written back to the same two words 7 clocks after the read:

- 1 clock of RAM read;
- 6 clocks of butterfly;
- the write then lands on the next edge.

The next stage starts issuing on the clock after the last issue of the
current stage, with no drain between stages. This is only legal if no word
is read by stage s+1 before stage s has written it. With the natural
issue order (pairs in ascending j), the first words a stage needs were
written by the previous stage at least 7 clocks earlier, for every one of
the 7 stage transitions in both directions. Two checks back this up:

- The assertion `a_no_raw` in `pm_ctrl` fails if a word is read in the same
  clock that its write-back happens.
- The end-to-end testbench keeps a "pending" bit for each word. The bit is
  set when a stage reads the word and cleared when the result is written
  back. The testbench flags any read of a pending word, and any write to a
  word that is not pending.

One transform costs 7 · 64 issue clocks + 7 clocks to drain the last
results = **455 clocks**.

### The distance-2 stage with two DBUs

With four lanes a word holds four coefficients. That is more than the
butterfly distance of the last NTT stage (and the first INTT stage), which
is 2. For that stage the addressing changes:

- Clock t reads words 2t and 2t+1. They still differ in one bit, so they are
  in different banks.
- Each word holds two complete butterflies, (c0, c2) and (c1, c3).
- The two words belong to neighbouring blocks. So the first DBU takes the
  first word with one twiddle, and the second DBU takes the second word with
  the next twiddle.

Each DBU has its own two-port twiddle ROM. In CWM those four ports deliver
the four γ constants of a group.

### CWM: 5-clock groups

A CWM group covers coefficient pairs 2g and 2g+1 (one per lane) and takes
5 clocks:

| Clock | Action |
|---|---|
| 0 | Read A words 2g and 2g+1; address both γ values in the twiddle ROM. |
| 1 | Read B words ~(2g) and ~(2g+1). |
| 2 | Both lanes start with the A words held from clock 1 and the B words just read. |

The twiddle ROM holds the 128 values `γ_i = 17^(2·br7(i)+1) mod q` at
addresses 128..255. With 64 groups: 64 · 5 + 8 = **328 clocks**.

### Host interface

Coefficients are loaded and read back only while `busy` is low:

- **Write:** `host_we` with `host_sel`, `host_idx` and `host_wdata` writes
  one coefficient. The per-coefficient write enable leaves the other half of
  the word alone.
- **Read:** `host_re` reads one coefficient. `host_rdata` is valid one clock
  later, with `host_rvalid`.
- **Run:** pulse `start` with `op` and `sel`. `busy` stays high until the
  clock in which `done` pulses.

Coefficients must be reduced, in 0..3328. The result of `OP_PMUL`, like
every result, is left in A in the normal coefficient order. The NTT-domain
order is Kyber's standard bit-reversed order.

## 5. Module list

| Module | Role |
|---|---|
| `kyber_pkg` | Constants (q, n, α, ζ, sub-moduli, CRT weights), types, table functions |
| `kyber_pmul_top` | Top: control unit, 2 banks, twiddle ROM (one per DBU), butterfly unit; `LANES` selects the version |
| `pm_ctrl` | Operation sequencing, all RAM, ROM and butterfly addressing, host port |
| `butterfly_unit` | DBU (`LANES=2`), SBU (`LANES=1`) or two DBUs (`LANES=4`), one `rns_modmul` per two lanes |
| `bf_lane` | One butterfly lane: NTT, INTT and CWM datapath |
| `rns_modmul` | 3-clock table-based modular multiplier, single or dual |
| `index_rom` | g → (k mod 7, k mod 31, k mod 32), two ports |
| `rns_add_rom` | Residue addition table, two ports |
| `crt_rom` | Reconstruction table, two ports |
| `mod_add`, `mod_sub` | 2-clock modular adder and subtractor |
| `mod_div2` | Combinational halving modulo q |
| `twiddle_rom` | 128 NTT twiddles and 128 CWM γ constants, two ports |
| `poly_bank` | Simple dual-port RAM of `LANES`-coefficient words (128 × 24 bits for one DBU) with per-coefficient write enables |

## 6. How far it can be trusted

Each module has a testbench in `tb/` that compares it with values computed
independently inside the testbench:

- **Tables:** every entry of the index, addition, reconstruction and
  twiddle tables is read on both ports and compared with values built
  independently in the testbench. For example, the reconstruction test
  finds each residue triple by counting, without using the CRT formula.
  Known values are spot-checked too: log₃ 2 = 1134, ζ₁ = 1729, γ₀ = 17.
- **Arithmetic:** the halver is checked exhaustively. The adder, subtractor
  and multiplier get a new operand pair on every clock, including 0, 1 and
  q−1, and each result is compared with `a*b % q` (and so on) at its exact
  latency. The multiplier runs 20 000 clocks on both ports at once.
- **Lanes:** the dual and four-lane butterfly units are checked in all three
  modes, with different operands on every lane. The single-lane unit is
  checked in CWM mode. All are compared with reference formulas, with exact
  latency checks (6 and 10 clocks).
- **Control unit:** `pm_ctrl_tb` runs the real banks and twiddle ROM with a
  behavioural butterfly model (`tb/bf_model.sv`). It checks NTT, INTT and
  CWM results against a reference transform and the cycle counts.
- **End to end:** `kyber_pmul_top_tb` runs the full design at its default
  parameters. It:
  - loads random polynomials;
  - runs `OP_PMUL` and compares the result with a schoolbook negacyclic
    product;
  - runs NTT→INTT round trips and separate NTT/CWM/INTT commands;
  - checks all cycle counts;
  - counts that every mechanism was exercised: forward and inverse
    transforms, CWM groups, stage transitions without a gap, zero operands
    through the multiplier, and host loads and reads.

`kyber_pmul_sbu_tb` and `kyber_pmul_2dbu_tb` run the same end-to-end
sequence on the single-butterfly and two-DBU versions, with their own cycle
counts. The two-DBU test also counts the intra-word butterflies of the
distance-2 stage.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. Each was also shown to fail on a deliberately broken copy of its
module.

What has not been done:

- timing closure or FPGA place-and-route;
- a clock-frequency claim for this code;
- any formal proof.

## 7. Where this design departs from the reference architecture

- **Transform latency: 455 clocks instead of 458.** The published figure is
  458 clocks per NTT/INTT with one DBU. This design issues the 7 stages
  without gaps and takes 455. The 3-clock difference is in the drain and
  control overhead, which the reference does not detail.
  - CWM matches at 328 clocks.
  - A full product takes 1693 clocks, against 2 · 458 + 328 + 458 = 1702.
- **CWM result after 10 clocks.** The reference says a lane's first CWM
  result appears after 9 clocks. Here it appears 10 clocks after the operands
  enter the lane. The extra clock is the output register that the other
  modes also use. The throughput of one result per 5 clocks is the same.
- **Memory.** The reference keeps both operands in a single memory, with B in
  opposite order, and packs coefficients into 24-bit words for the DBU. This
  design keeps the opposite order and the packing, and splits the 256 words
  over two parity-interleaved banks. That split is this design's own choice;
  it is what lets two reads and two writes happen per clock. The storage is
  the same 6 Kbit.
- **Twiddle order.** The twiddles and γ constants, and the order in which
  they are used, follow the Kyber specification (ζ = 17, bit-reversed
  indices). The reference architecture does not list them.
- **Host interface, handshakes, reset values.** The one-coefficient host
  port, the `start`/`busy`/`done` handshake and the `op` encoding are this
  design's own.
- **Single-butterfly version: 903/648 clocks instead of 906/649.** The
  reference figures for this version are 906 clocks per transform and 649
  for the pairwise product. This design takes 903 and 648.
- **Two-DBU version: 231/168 clocks instead of 234–235/169.** The reference
  gives only the 48-bit word width for this version. The rest is this
  design's own:
  - two multipliers;
  - one twiddle ROM per DBU;
  - the handling of the distance-2 stage described in section 4.

## 8. Simulating and changing it

With Verilator 5, for any testbench `X` in `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/kyber_pkg.sv rtl/*.sv tb/X.sv --top-module X
    ./obj_dir/VX

The control-unit testbench also needs `tb/bf_model.sv` on the command line.
The top-level test completes in well under a minute. Apart from the
package, the file order does not matter.

Things to know before changing the design:

- **Multiplier latency.** The lanes assume the multiplier latency is exactly
  3 clocks, in their delay lines and CWM tag pipeline. Changing the table
  pipeline means changing `bf_lane`.
- **Control timing.** `pm_ctrl` assumes a 7-clock read-to-write distance.
  The back-to-back stage schedule is only safe because of it. After any
  change to butterfly or RAM latency, re-run the three end-to-end
  testbenches; their pending-bit monitor reports any stage that reads a word
  too early.
- **Table sizes.** The table sizes follow from q = 3329 and the moduli
  (7, 31, 32). They are package constants, but the reconstruction table
  width and the zero code 31 are tied to that choice of moduli.

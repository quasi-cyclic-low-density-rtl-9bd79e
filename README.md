# Fully parallel min-sum QC-LDPC decoder for IEEE 802.11n (N = 648, rate 1/2)

This is a soft-decision decoder for the shortest rate-1/2 low-density parity-check
code of IEEE 802.11n. The code has 648 bits, 324 of them information bits, and
324 parity checks. The decoder builds the code's Tanner graph directly in
hardware. Every code bit has its own variable node unit (VNU): 648 of them.
Every parity check has its own check node unit (CNU): 324 of them. The 2376
ones of the parity-check matrix become 2376 fixed message wires in each
direction. Messages follow the min-sum algorithm. One full decoding iteration
runs in a single clock cycle. The decoder stops as soon as the decided word
passes every parity check, or when an iteration limit is reached.

The architecture follows the published description of a fully parallel QC-LDPC
min-sum decoder for 802.11n. That description covers:

- the code and its base matrix;
- the comparator-tree check node (`comp2`, `comp6`, `comp7`);
- the convert / add / convert variable node;
- 4-bit sign-magnitude messages;
- the decode / parity-check loop.

The register placement, the interface, saturation, the iteration limit and
the control sequencing are choices made here. They are listed under
[Departures and open points](#departures-and-open-points).

## The code and how it becomes wiring

The parity-check matrix H (324 x 648) is quasi-cyclic. It is a 12 x 24 grid of
27 x 27 sub-matrices. Each sub-matrix is either all zero, or the identity
matrix rotated by a shift `s` (0..26). The 12 x 24 table of shifts (the *base
matrix*, `BASE` in `rtl/qc_ldpc_pkg.sv`) is the whole code:

```
 0  -  -  -  0  0  -  -  0  -  -  0  1  0  -  -  -  -  -  -  -  -  -  -
22  0  -  - 17  -  0  0 12  -  -  -  -  0  0  -  -  -  -  -  -  -  -  -
 6  -  0  - 10  -  -  - 24  -  0  -  -  -  0  0  -  -  -  -  -  -  -  -
 2  -  -  0 20  -  -  - 25  0  -  -  -  -  -  0  0  -  -  -  -  -  -  -
23  -  -  -  3  -  -  -  0  -  9 11  -  -  -  -  0  0  -  -  -  -  -  -
24  - 23  1 17  -  3  - 10  -  -  -  -  -  -  -  -  0  0  -  -  -  -  -
25  -  -  -  8  -  -  -  7 18  -  -  0  -  -  -  -  -  0  0  -  -  -  -
13 24  -  -  0  -  8  -  6  -  -  -  -  -  -  -  -  -  -  0  0  -  -  -
 7 20  - 16 22 10  -  - 23  -  -  -  -  -  -  -  -  -  -  -  0  0  -  -
11  -  -  - 19  -  -  - 13  -  3 17  -  -  -  -  -  -  -  -  -  0  0  -
25  -  8  - 23 18  - 14  9  -  -  -  -  -  -  -  -  -  -  -  -  -  0  0
 3  -  -  -  16 -  -  2 25  5  -  -  1  -  -  -  -  -  -  -  -  -  -  0
```

**Shift convention.** A sub-matrix at block row `br`, block column `bc`, with
shift `s` has one 1 in each of its 27 local rows. Local row `k` has its 1 in
local column `(k + s) mod 27`. So that sub-matrix joins check row `27*br + k`
to code bit `27*bc + (k + s) mod 27`, for k = 0..26. This is the usual 802.11n
convention. If you change it, you must also change it in the testbench encoder.

**Row and column weights.** Block rows have 7 or 8 non-zero sub-matrices, so
every check involves 7 or 8 bits. Block columns have 12, 3 or 2, so every bit
takes part in 12, 3 or 2 checks. In total there are 88 non-zero sub-matrices,
giving 88 x 27 = 2376 edges.

**Edge naming.** The wiring never uses a global edge number. An edge is named
by three values:

- its block row `br`;
- its *slot* `p`: its block column's position among the non-zero entries of
  that block row, counted from the left;
- its local row `k`.

The message arrays are declared `[MB][MAX_DC][Z]` = `[12][8][27]`:

- The CNU for check row `27*br + k` takes slots `0..DC-1` at `[br][*][k]`.
  This is a plain, regular slice.
- The VNU for bit `27*bc + j` finds its `t`-th edge at
  `[br][SLOT(br,bc)][(j - s) mod 27]`, where `br` is the `t`-th non-zero block
  row of column `bc`.

Block rows of weight 7 leave slot 7 unused, and it is tied to zero.

The package computes a few block-level tables once at elaboration: row and
column weights, the slot list per block row, the block-row list per block
column, and the slot of each sub-matrix. None has more than 288 entries. The
generate loops only look up these tables. Avoid calling constant functions per
generate instance, or per-edge tables of thousands of entries. Lint tools then
spend minutes evaluating them.

## One iteration per clock

```
          +-------------------------------------------------+
          v                                                 |
 lambda_q --> VNU x648 --beta--> CNU x324 --alpha_d--> alpha_q (register)
          |      |
          |      +--hard[648]--> syndrome_check --parity_ok--> decoder_ctrl
```

Two sets of registers hold all decoder state:

- `lambda_q`: 648 x 4 bits, the channel values;
- `alpha_q`: 2376 x 4 bits, the check-to-variable messages.

Everything between them is combinational.

At load, the channel values are stored and `alpha_q` is cleared. Each VNU
therefore starts by passing its channel value on unchanged (`beta = lambda`).
The first check node update then works on the raw channel values, as the
flooding schedule requires.

In every following cycle, the VNUs form new variable-to-check messages `beta`
from `lambda_q` and `alpha_q`. The CNUs turn these into new check-to-variable
messages. `alpha_q` takes them on the clock edge. The same VNU totals that
produce `beta` also give the hard decisions. So the parity check in any cycle
judges the word left by the previous iteration.

The critical path runs through one VNU (up to 13 operands added, then a
subtraction and a clip), one CNU (three comparator levels), and the register.
The parity check (a 7- or 8-input XOR per row and a 324-input NOR) drives only
the controller.

## Check node unit: comparator trees

The min-sum check update sends a message back to every connected bit. Its sign
is the product (XOR) of the signs of all *other* incoming messages. Its
magnitude is the minimum of their magnitudes.

The cell `comp2` does this for two messages: it XORs the signs and selects the
smaller 3-bit magnitude. `comp6` reduces six messages with a tree of five
`comp2` cells:

- `m1` = (a,b), `m2` = (c,d), `m3` = (e,f)
- `m4` = (m1,m2)
- output = (m4,m3)

`comp7` reduces seven messages with six cells: it adds `m5` = (m3,g) and takes
the output from (m4,m5).

A check of weight 7 has seven outputs. Each output leaves out its own input,
so it needs the minimum of six inputs: `cnu` builds seven `comp6` trees.
Checks of weight 8 get eight `comp7` trees. This costs more comparators than a
shared first-minimum / second-minimum search would. It is kept because it is
the structure of the original design. `cnu` picks the tree from its `DC`
parameter, which must be 7 or 8.

## Variable node unit: sign-magnitude in, two's complement inside

The node units exchange 4-bit sign-magnitude messages: a sign bit (1 means
negative, so the bit is more likely a 1) and a 3-bit magnitude (0..7). A VNU
with `DV` edges works as follows:

1. It converts the channel value and its `DV` incoming messages to 8-bit two's
   complement (`sm_to_tc`). Both +0 and -0 convert to 0.
2. It adds them into one total `y = lambda + sum(alpha)`. With at most 13
   operands of magnitude 7, `|y| <= 91`, so 8 bits cannot overflow.
3. For each edge it forms the extrinsic value `y - alpha[t]`, which leaves out
   the message from that same check. `tc_to_sm` converts it back to
   sign-magnitude. Magnitudes above 7 are clipped to 7, and zero always
   becomes +0.
4. It sets the hard decision to `1` when `y < 0`.

Saturation matters in practice: with channel values near ±7, the column totals
of the weight-12 columns exceed 7 within one iteration.

## Stopping: parity check and controller

`syndrome_check` computes H times the decided word: one XOR per check row. It
raises `ok` when every check is satisfied.

`decoder_ctrl` runs the loop:

```
IDLE --start--> LOAD --> ITER --(iterations > 0 and (parity_ok or iterations >= limit))--> DONE --> IDLE
```

- LOAD (one cycle) asserts `load`.
- In ITER, each cycle either finishes the frame or asserts `update` and counts
  one iteration. The first ITER cycle always updates, so at least one
  iteration runs even if the channel word is already a codeword.
- DONE lasts one cycle and pulses `done`.
- `success` records whether the last parity check passed.
- The iteration limit `max_iter` is sampled with `start`. A limit of 0 counts
  as 1.

## Interface and timing (`qc_ldpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | start a frame; ignored while `busy` |
| `max_iter` | in | `ITER_W` (6) | iteration limit, sampled with `start` |
| `llr` | in | 648 x `msg_t` | channel values, `{sign, mag[2:0]}`; read in the cycle after `start` |
| `busy` | out | 1 | a frame is in progress (LOAD, ITER, DONE) |
| `done` | out | 1 | one-cycle pulse: result ready |
| `success` | out | 1 | `codeword` satisfies all 324 checks |
| `iterations` | out | `ITER_W` | iterations performed |
| `codeword` | out | 648 | decided bits; bits 0..323 are the information bits (the code is systematic) |

The clock edge that samples `start` is edge 0. For a frame that runs `I`
iterations:

- `llr` is stored at edge 1;
- iterations happen at edges 2 .. I+1;
- the stop decision is taken at edge I+2, after which `done` is high for one
  cycle.

A new `start` is accepted in the cycle after `done`. A frame therefore
occupies `I + 4` cycles. `codeword`, `success` and `iterations` stay valid
until the next `start`. Keep `llr` stable from `start` until the cycle after
it.

The only parameter is `ITER_W` (default 6, so limits up to 63). The code
constants (`Z` = 27, 12 x 24 base matrix, 3-bit magnitudes, 8-bit sums) are in
`qc_ldpc_pkg`. The base matrix is specific to z = 27: the other 802.11n block
lengths use different shift tables, not a scaled copy of this one.

Size after coarse synthesis: about 12,100 flip-flops (2592 for `lambda_q`,
9504 for `alpha_q`) and about 76,000 word-level cells.

## Departures and open points

- **Registers.** The original description does not say where the registers
  sit. Here all 2376 check messages and all 648 channel values are stored, one
  iteration per cycle. The original implementation reports about 3100
  registers, so it stored less. How it did so is not given.
- **Interface.** The original reports about 330 I/O pins, so it had a narrower
  interface. Here all 648 channel values are loaded in parallel.
- **Throughput.** The original reports 82.24 Mbit/s at 69.06 MHz. That is
  about 1.19 bits per clock, or at most about 544 clocks per 648-bit frame.
  This design needs `I + 4` clocks per frame. The clock rate it reaches on an
  FPGA has not been measured.
- **Only one code.** The decoder supports only the N = 648, rate-1/2 code. The
  other eleven 802.11n codes (N = 1296/1944; rates 2/3, 3/4, 5/6) need other
  base matrices and node counts.
- **Base matrix source.** The base matrix was read from a printed table and
  checked against the 802.11n standard. Two cells in block row 10 (counting
  from 0) could not be read with certainty, so the standard's values (23 at
  block column 4, 14 at block column 7) are used. The row and column weights
  match the ones stated for the design.
- **Algorithm choices.** This is plain min-sum, with no normalisation or
  offset. Each extrinsic message is formed as "total minus own input". Message
  saturation at ±7 and the iteration limit input are additions of this design.
- **No input buffering.** Frames cannot overlap: the next frame starts only
  after `done`.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `comp2_tb` | all 256 input pairs |
| `comp6_tb`, `comp7_tb` | 3000 random vectors each, against a loop reference |
| `cnu_tb` | weight 7 and weight 8, every output against "sign product and minimum of the others" |
| `sm_to_tc_tb`, `tc_to_sm_tb` | every input value, including -0 and saturation |
| `vnu_tb` | weights 3 and 12, random inputs, extrinsic outputs, clip flags and hard decision |
| `syndrome_check_tb` | codewords from the reference encoder pass; corrupted words give the reference syndrome; a single error sets one bit per check of that column |
| `decoder_ctrl_tb` | the cycle-by-cycle sequence: early stop, limit stop, pass before the first iteration, limit 0, start while busy |
| `qc_ldpc_decoder_tb` | the full decoder at default size (see below) |

`tb/ldpc_tb_pkg.sv` holds the reference models:

- a systematic encoder that uses the dual-diagonal parity part of the base
  matrix (the first parity block is the XOR of all block rows' information
  products, and each later block follows from the previous row);
- a syndrome computed directly from the base matrix;
- a bit-true integer model of the whole decoder.

`qc_ldpc_decoder_tb` sends 27 frames through the default-size decoder: the
all-zero word, 24 random codewords with 1–3.5 % sign errors, one random-noise
frame, and one frame with limit 0. For every frame it checks four things
against the reference model: the decided word, the iteration count, the
success flag, and the latency (done at edge I+2). It also counts early stops,
limit stops, corrected frames, saturated messages, limit-0 frames and ignored
starts, and fails if any of these never happens.

To simulate with Verilator 5, for example the full decoder:

```
verilator --binary --timing --assert -Irtl -Itb --top-module qc_ldpc_decoder_tb \
    rtl/qc_ldpc_pkg.sv tb/ldpc_tb_pkg.sv rtl/*.sv tb/qc_ldpc_decoder_tb.sv -o sim
./obj_dir/sim
```

Building the full decoder takes about five minutes. Running it takes under a
second. For a leaf block, list the package, the block's module(s) and its
testbench, for example `rtl/qc_ldpc_pkg.sv rtl/comp2.sv tb/comp2_tb.sv` with
`--top-module comp2_tb`.

## Files

- `rtl/qc_ldpc_pkg.sv`: code constants, `msg_t`, base matrix, wiring tables.
- `rtl/comp2.sv`, `rtl/comp6.sv`, `rtl/comp7.sv`, `rtl/cnu.sv`: check node.
- `rtl/sm_to_tc.sv`, `rtl/tc_to_sm.sv`, `rtl/vnu.sv`: variable node.
- `rtl/syndrome_check.sv`, `rtl/decoder_ctrl.sv`: stop logic.
- `rtl/qc_ldpc_decoder.sv`: top level, node arrays and interconnect.
- `tb/`: one testbench per block, plus `ldpc_tb_pkg.sv`.

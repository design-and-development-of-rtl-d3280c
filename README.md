# Decimal matrix code (DMC) protected memory

Radiation can flip several neighbouring memory cells with one particle hit
(a multiple cell upset, MCU). Single-error-correcting Hamming codes do not
survive that, and the codes that do (BCH, Reed-Solomon) have slow, large
decoders. The decimal matrix code is a cheap alternative. The data word is
cut into small symbols. The symbols are protected two ways:

- Horizontally, pairs of symbols are added as plain integers.
- Vertically, every bit column gets an XOR parity bit.

An integer sum shows any change to a single symbol: unlike a parity bit,
it cannot be fooled by an even number of flipped bits in that symbol. The
vertical parity then says which bits to flip back. The same encoder that
builds the check bits on a write also recomputes them on a read. This
*encoder-reuse technique* (ERT) means the decoder needs no adders or parity
trees of its own.

This repository holds synthesizable SystemVerilog for the 32-bit version of
the code. It has the encoder, the decoder (syndrome calculator, error
locator, error corrector), the ERT codec, and a small fault-tolerant memory
built from two SRAM arrays. Each module has a self-checking testbench, and
there are two end-to-end testbenches.

## Codeword layout

The 32 information bits D31-D0 form 8 symbols of 4 bits. Symbol *i* is
D[4i+3:4i]. The symbols sit in a 2 x 4 logical matrix: symbols 0-3 are
row 0 and symbols 4-7 are row 1. As stored cells, the codeword looks like
this:

```
            col 3         col 2         col 1        col 0
row 0:  D15 D14 D13 D12 | D11 D10 D9 D8 | D7 D6 D5 D4 | D3 D2 D1 D0 | H9..H5   H4..H0
row 1:  D31 D30 D29 D28 | D27 .. D24    | D23 .. D20  | D19 .. D16  | H19..H15 H14..H10
        V15 V14 V13 V12 | V11 .. V8     | V7 .. V4    | V3 .. V0
```

Horizontal check bits: four 5-bit groups, each holding the integer sum of
two symbols in the same row that are two columns apart.

| group | bits    | sum                  |
|-------|---------|----------------------|
| 0     | H4-H0   | D3-D0 + D11-D8       |
| 1     | H9-H5   | D7-D4 + D15-D12      |
| 2     | H14-H10 | D19-D16 + D27-D24    |
| 3     | H19-H15 | D23-D20 + D31-D28    |

Vertical check bits: Vj = Dj xor Dj+16, for j = 0..15.

That makes 20 + 16 = 36 redundant bits per 32-bit word, and a 68-bit
codeword. The information SRAM stores the 32 data bits. The redundancy SRAM
stores `{H, V}`, with H in bits 35:16 and V in bits 15:0.

All modules take the geometry as parameters: `SYM_W` (m, 4), `ROWS` (k1, 2)
and `COLS` (k2, 4). `dmc_pkg` collects the defaults. The pairing rule
(symbol c with symbol c + COLS/2 of the same row) extends the 32-bit
equations to other sizes. `COLS` must be even.

## Decoding

A read takes the stored D', H and V. The encoder recomputes H' and V' from
D', and the decoder then works in three steps.

1. **Syndromes** (`dmc_syndrome`).
   - dH = H' - H for each 5-bit group, as an integer difference modulo 32.
     A group sum is at most 30, so dH is zero exactly when the recomputed
     sum equals the stored one.
   - S = V' xor V.
2. **Locating** (`dmc_locator`). A symbol is declared bad when both of
   these are nonzero:
   - the dH of its group;
   - the four S bits of its column.

   dH picks the symbol pair, and S picks the column. The two symbols of a
   pair are in different columns, so together they name one symbol.
3. **Correcting** (`dmc_corrector`). Each bad symbol is XORed with its
   column's S. Every other symbol passes unchanged.

### What this corrects, and what it does not

This follows directly from the rule above. The testbenches check it.

Corrected:

- Any error pattern inside one symbol. All 15 patterns are checked for
  every symbol.
- Any burst across two neighbouring symbols of one row. Neighbouring
  symbols are in different groups and different columns, so nothing
  interferes.
- Every horizontal burst of 1 to 5 adjacent cells in any physical row of
  the layout above, including bursts that run from data cells into H cells,
  and bursts inside the V row. `tb_dmc_mcu_bursts` sweeps all of them.
- The four-symbol example: D1-D3, D9-D11, D20-D23 and D28-D31 together. The
  four symbols are in four different columns.
- Upsets confined to the H bits, or confined to the V bits. Data is left
  alone and nothing is flagged.

Not corrected:

- **Two bad symbols in the same column** (symbol c and symbol c+4). Their
  errors partly cancel in S. A vertical two-cell upset such as D0 together
  with D16 flips the same V column twice, so it is neither corrected nor
  flagged. `tb_dmc_mcu_bursts` reports this as 16 of 16 uncorrected.
  Interleaving the rows physically would turn such hits into horizontal
  ones, but that is not part of this design.
- **Decimal cancellation**: two symbols of one group whose integer changes
  add up to zero (for example +1 and -1) leave dH at zero.
- **Upsets in both H and V** that line up with a group and a column can
  make a clean symbol look bad.

Nothing in the design flags an uncorrectable word. The outputs `dh`, `s`
and `err_loc` are brought out so that a user can build such a check.

## Encoder reuse and memory timing

`dmc_ert_codec` has a single `dmc_encoder`, with a 2:1 multiplexer on its
input driven by `en`:

| en | encoder input       | encoder outputs are used as    |
|----|---------------------|--------------------------------|
| 0  | write data `d_wr`   | the codeword to store (write)  |
| 1  | read word `d_rd`    | H', V' for the syndromes (read)|

`dmc_memory` wraps the codec around two `dmc_sram` arrays of 16 words each
(32 and 36 bits wide). Both arrays have one port and a synchronous read.

- **Write**: `wr` with `addr` and `din`. The encoder output is stored on
  that clock edge.
- **Read**: `rd` with `addr` in cycle t. In cycle t+1, `rvalid` is high,
  `en` is high, and `dout` (corrected), `err_loc`, `dh` and `s` are valid.
  Reads can be issued every cycle.
- **Write stall**: while a read is being decoded, the encoder is busy, so
  `wr_ready` is low and a write has to wait one cycle. This is the one
  price of sharing the encoder.
- **Upset injection**: `error` with `err_mask_d` and `err_mask_r` XORs the
  masks into the stored word at `addr`. It models an MCU for test.
- Rules, checked by assertions: `rd` and `wr` are never high together, `wr`
  is raised only while `wr_ready` is high, and `error` is never raised
  together with `wr`.
- `rst_n` is a synchronous, active-low reset. It clears only the
  read-in-progress flag; memory contents are not reset.

All of the code logic is combinational. Its critical path runs from SRAM
read data through one 5-bit adder, one 5-bit subtracter, an OR-reduce, an
AND and an XOR. There is no pipelining.

## Modules

| module          | role |
|-----------------|------|
| `dmc_pkg`       | default sizes and the `{H, V}` struct |
| `dmc_encoder`   | four 5-bit adders and 16 XORs; `u` is `d` passed through |
| `dmc_syndrome`  | subtracters and XORs |
| `dmc_locator`   | per-symbol flag, (dH group != 0) AND (S column != 0) |
| `dmc_corrector` | XOR of the flagged symbols with their column's S |
| `dmc_decoder`   | syndrome, then locator, then corrector; takes H', V' from outside |
| `dmc_ert_codec` | the shared encoder and the decoder |
| `dmc_sram`      | storage array with an upset port |
| `dmc_memory`    | top: codec plus information and redundancy SRAMs |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example, with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/dmc_pkg.sv tb/tb_dmc_memory.sv --top-module tb_dmc_memory -o sim
./obj_dir/sim
```

| testbench            | what it checks |
|----------------------|----------------|
| `tb_dmc_encoder`     | H and V against the sum and XOR equations, directed and random words |
| `tb_dmc_syndrome`    | dH modulo 32 and its zero property, S |
| `tb_dmc_locator`     | flags against the symbol, group and column table |
| `tb_dmc_corrector`   | the XOR of flagged symbols |
| `tb_dmc_decoder`     | the correction classes above, plus 5000 random upsets against a behavioural model of the rule |
| `tb_dmc_ert_codec`   | both `en` directions of the shared encoder |
| `tb_dmc_sram`        | writes, reads, held read data and upsets against a shadow array |
| `tb_dmc_memory`      | end to end at default size: read latency, correction, H-only and V-only upsets, write stall, back-to-back reads |
| `tb_dmc_mcu_bursts`  | all 1- to 5-cell horizontal bursts through the whole memory |
| `tb_dmc_geometries`  | the codec in the 2 x 4 / m = 4, 2 x 2 / m = 8 and 4 x 4 / m = 2 geometries (uses `tb_dmc_geom_check`) |

## Design choices and departures

The code itself is fully specified: the symbol split, the two sets of
check-bit equations, the subtraction and XOR syndromes, the correction
XOR, and the shared encoder with its read/write enable. The points below are
this design's own choices, or where it parts from figures usually quoted for
the code.

- **Encoder enable**: the encoder enable is realised as an input
  multiplexer. A variant with separate write and read encoders would also
  work; this design shares one, which is the point of the technique.
- **Locator logic**: the locator's gate-level form is the simplest one that
  matches the "both syndromes nonzero" rule.
- **Memory**: the depth (16 words), single port, synchronous read, one-cycle
  read latency, the `wr_ready` stall, the reset, and the upset-injection
  port.
- **Correction capability**: the code is credited with correcting MCUs of
  up to 5 bits. This holds for bursts along a physical row, as tested. It
  does not hold for vertical clusters, as explained above.
- **Redundancy overhead**: the configuration has 36 check bits per 32-bit
  word (20 H + 16 V). A figure of 72 sometimes quoted for this 2 x 4, m = 4
  configuration does not match its own bit list.
- **Other geometries**: 2 x 2 symbols of 8 bits and 4 x 4 symbols of 2 bits
  are expressible through the parameters (`ROWS`, `COLS`, `SYM_W`).
  `tb_dmc_geometries` checks the codec in both. They give 34 and 32
  redundant bits. They are alternatives, not the design: the memory top is
  checked only in the default 2 x 4 geometry.

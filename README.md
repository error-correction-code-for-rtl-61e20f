# Decimal Matrix Code (DMC) protected memory for 32-bit words

Radiation can flip several neighbouring memory cells at once. This is called a
multiple-cell upset (MCU). A plain SEC-DED Hamming code cannot correct it. The
decimal matrix code (DMC) corrects such clustered upsets with a very simple
decoder. It stores 36 check bits per 32-bit word and combines two ideas:

* **Integer sums instead of parity along the rows.** Pairs of 4-bit symbols are
  added as integers. A cluster of flips inside a symbol changes the symbol's
  value, and that change shows up in the stored sum.
* **Parity down the columns.** The column parity gives the exact bit positions.
  The integer sums say which row, and which symbols of that row, are suspect.

The decoder shares its most expensive part with the encoder. The same adders
and XOR gates that make the check bits on a write recompute them on a read.
This is the encoder-reuse technique (ERT).

This repository holds synthesizable SystemVerilog for the codec and for a small
memory built around it: an information array plus a redundancy array. It also
holds a self-checking testbench for every module.

## The code

The 32 data bits `i31..i0` are cut into eight 4-bit symbols. The symbols are
placed in a 2 x 4 matrix. The matrix is only a way of grouping bits: the
memory array itself is not changed.

```
            sym3      sym2      sym1      sym0     horizontal bits
row 0:   i15..i12  i11..i8   i7..i4    i3..i0     f9..f5   f4..f0
            sym7      sym6      sym5      sym4
row 1:   i31..i28  i27..i24  i23..i20  i19..i16   f19..f15 f14..f10
row 2:   v15 ........................... v0        (vertical bits)
```

**Horizontal bits (20).** In each row, the symbols two positions apart are
paired and added as unsigned integers. Each sum is 5 bits wide (0..30):

| group | bits     | sum                     |
|-------|----------|-------------------------|
| 0     | f4..f0   | `i3..i0 + i11..i8`      |
| 1     | f9..f5   | `i7..i4 + i15..i12`     |
| 2     | f14..f10 | `i19..i16 + i27..i24`   |
| 3     | f19..f15 | `i23..i20 + i31..i28`   |

**Vertical bits (16).** `v_j = i_j xor i_(j+16)`: one parity bit per column of
the two data rows.

## Decoding: how a row, a symbol and a bit are found

Decoding a word read back from memory takes four steps. Each step has its own
module:

1. **Recompute** `f'` and `v'` from the received data bits `I` with the encoder
   (`dmc_encoder`).
2. **Syndromes** (`dmc_syndrome`):
   * `Δf = f' − f` for each 5-bit group, as integer subtraction.
   * `S = v' xor v`.

   Both sums lie in 0..30. So the 5-bit difference modulo 32 is zero exactly
   when the two sums are equal.
3. **Locate** (`dmc_error_locator`). Symbol *k* is in row `r = k/4` at column
   position `p = k%4`, and belongs to horizontal group `2r + p%2`. Its four
   mask bits are `S[4p+3:4p]` if `Δf` of its group is non-zero, and zero
   otherwise. The column syndrome gives the bit positions. The horizontal
   syndrome says which of the two rows, and which of the two symbol pairs
   sharing those columns, they belong to.
4. **Correct** (`dmc_error_corrector`): `i_c = I xor mask`.

Why integer sums rather than XOR? Take the two symbols of one group, where both
are hit. Bit by bit, their parities could cancel. Their integer changes cancel
only in rare cases. Worked example: word `0xF5AFF6AC`, so symbol 0 = `1100` and
symbol 2 = `0110`.

* Stored `f4..f0 = 1100 + 0110 = 10010`.
* An upset turns symbol 0 into `1111` and symbol 2 into `0111`: three flipped
  bits in two symbols.
* Recomputed: `f' = 1111 + 0111 = 10110`, so `Δf = 00100`, which is non-zero.
* `S = 0x0103`, so bits 0, 1 and 8 are flipped back.

Every testbench that can see this example checks it.

### What is corrected, and what is not

* **Corrected:** any set of flips confined to the symbols of one row, as long
  as two symbols of the same group do not change by equal and opposite
  amounts. In particular, every burst of 1 to 8 adjacent cells in one row of
  the matrix above is corrected. That includes bursts running into, or lying
  entirely in, the redundant bits. The testbenches check this on 4500 random
  bursts.
* **Upsets only in `f` or `v`:** the data is left alone. `Δf` is then
  non-zero with `S = 0` in those columns, or the other way round.
* **Not corrected:**
  * Flips of the same column in both rows. The vertical parity cancels, and
    both rows would take the same mask.
  * Two symbols of one group whose changes cancel, for example +1 and −1.

  In both cases `err_detected` is still raised whenever some syndrome is
  non-zero. The data may be wrong.

## Encoder reuse (`dmc_ert_codec`)

`dmc_ert_codec` has one encoder. Its data input is a 2:1 multiplexer controlled
by the enable `en` (E_n):

| `en` | memory operation | encoder input       | meaning of the outputs                          |
|------|------------------|---------------------|-------------------------------------------------|
| 1    | write            | `wdata`             | `enc_x`, `enc_f`, `enc_v` = codeword to store   |
| 0    | read             | received `rx_data`  | `corr_data`, `err_detected`, `err_corrected`    |

In `dmc_memory`, `en` is simply the write flag.

## The memory (`dmc_memory`, the top)

```
 wdata ──► mux ──► dmc_encoder ──► x ───────────────► info array (32 b)  ──┐
            ▲          │  f,v ────────────────────────► redundancy array (36 b)
            │          ▼                                        │          │
            └──────────┼──────────── stored data ◄──────────────┼──────────┘
                       ▼                                        ▼
                 dmc_syndrome ◄──────── stored f, v ────────────┘
                       ▼
             dmc_error_locator ──► dmc_error_corrector ──► register ──► rdata
```

| port            | dir | width       | meaning                                                  |
|-----------------|-----|-------------|----------------------------------------------------------|
| `clk`           | in  | 1           | clock                                                    |
| `rst_n`         | in  | 1           | synchronous active-low reset of the output registers     |
| `req`           | in  | 1           | access this cycle                                        |
| `we`            | in  | 1           | 1 = write, 0 = read                                      |
| `addr`          | in  | log2(DEPTH) | word address                                             |
| `wdata`         | in  | 32          | word to write                                            |
| `rvalid`        | out | 1           | read result valid (one cycle after a read request)       |
| `rdata`         | out | 32          | corrected word                                           |
| `err_detected`  | out | 1           | some syndrome was non-zero                               |
| `err_corrected` | out | 1           | at least one data bit was flipped back                   |

**Timing.**
* One request per cycle.
* A write is stored at the rising edge of its request cycle.
* A read decodes in its request cycle and registers the result. `rvalid`,
  `rdata` and the two flags are valid in the next cycle. There is no other
  pipelining.

**Storage.** Both arrays are `dmc_sram` instances: a synchronous write with a
combinational read, LUT-RAM style. Neither array is reset. For an ASIC, put an
SRAM macro in their place. With a macro's registered read, the decoder moves
one cycle later, and a write in that cycle would need the encoder too. That
conflict would then have to be arbitrated.

`DEPTH` (default 256) is the only parameter of the top.

## Files

| file                        | content                                                   |
|-----------------------------|-----------------------------------------------------------|
| `rtl/dmc_pkg.sv`            | sizes (`DATA_W`, `SYM_W`, `HRED_W`, `VRED_W`, ...) and types (`data_t`, `redund_t`) |
| `rtl/dmc_sym_adder.sv`      | 4-bit + 4-bit → 5-bit symbol adder                        |
| `rtl/dmc_encoder.sv`        | four symbol adders and 16 column XORs                     |
| `rtl/dmc_syndrome.sv`       | Δf subtractors and S XORs                                 |
| `rtl/dmc_error_locator.sv`  | syndromes → 32-bit error mask                             |
| `rtl/dmc_error_corrector.sv`| applies the mask                                          |
| `rtl/dmc_ert_codec.sv`      | encoder-reuse codec (the four blocks above plus the input mux) |
| `rtl/dmc_sram.sv`           | storage array                                             |
| `rtl/dmc_memory.sv`         | top: protected memory                                     |
| `tb/tb_<module>.sv`         | one self-checking testbench per module                    |

The geometry (2 x 4 symbols of 4 bits) is fixed by the package constants. The
generate loops in the encoder and locator are written in terms of them. Other
geometries need the vertical parity to span more rows, and need the locator's
row selection to be revisited.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends it with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_dmc_memory \
    rtl/dmc_pkg.sv rtl/*.sv tb/tb_dmc_memory.sv
./obj_dir/Vtb_dmc_memory
```

Replace `tb_dmc_memory` with any other testbench name. `tb_dmc_memory` runs the
top at its default size, with no parameter overrides. It does the following:

* writes all 256 words and reads them back clean;
* injects 1500 random MCUs straight into the stored cells of both arrays,
  through hierarchical references to the array contents;
* replays the worked example;
* checks detection of an uncorrectable same-column upset;
* checks the one-cycle read latency.

It counts each of these events and fails if one never happened. It runs in
well under a second.

## How far to trust it, and where it departs from the original description

Taken from the description of the code:
* the symbol layout and check-bit equations;
* integer addition and subtraction for the horizontal part;
* XOR for the vertical part;
* the correction rule `i_c = I xor S`, gated by a non-zero `Δf`;
* the encoder shared between writing and reading under an enable;
* separate information and redundancy arrays.

The equations are spelled out only for groups 0 and 1 and for `v0`, `v1`.
Groups 2 and 3 and the remaining vertical bits follow the same pattern.

Choices of this design, not of the original:
* the memory interface, depth, read timing and reset;
* the multiplexer that implements the encoder reuse;
* the `err_detected` and `err_corrected` outputs;
* the exact gating in the locator. The original states it only for symbol 0
  and it is generalised here to all eight symbols.

Not reproduced: the FPGA delay (3.81 ns), power and area (184 LUTs) reported for
the original implementation. The OLS code it was compared against is not
included.

# 6-bit flash ADC with a double-base (2,3) output encoder

A flash ADC normally ends in a thermometer-to-binary encoder. This design
replaces that last stage with a **Double-Base Integer Encoder (DBIE)**: the
converted level X (0..63) leaves the ADC as a set of terms 2^i * 3^j whose sum
is X. A signal processor working in the double-base number system (DBNS) can
then take the samples without a binary-to-DBNS conversion.

The encoder is a single OR level: every output (one DBNS term, or "cell") is
the OR of the level lines that use it. What makes it fast is how the codes are
chosen. Every level uses at most three cells, so at most two additions are
needed to rebuild X, and no output has a fan-in above 12.

## The DBNS map

Picture the cells as a table. Columns are powers of two and rows are powers
of three, and a code is a set of marked squares:

```
            1    2    4    8   16   32      (2^i)
   1  (3^0) 1    2    4    8   16   32
   3  (3^1) 3    6   12   24   48    -
   9  (3^2) 9   18   36    -    -    -
  27  (3^3) 27  54    -    -    -    -
```

Only cells below 64 can appear in a 6-bit code.

* **Symmetric map** (4 x 4: columns 1..8, rows 1..27) has 13 cells:
  1 2 3 4 6 8 9 12 18 24 27 36 54.
* **Asymmetric map** (6 x 4: columns 1..32, rows 1..27) has 16 cells. It adds
  16, 32 and 48.

The asymmetric map has three more outputs and about 10 % more gates. In
exchange, no code marks two **neighbouring** squares. Two horizontal
neighbours would add up to the square below them (a + 2a = 3a). Two vertical
neighbours would add up to the square two columns to the right (a + 3a = 4a).
A code without neighbours is "addition ready": DBNS arithmetic after the ADC
never has to merge its terms first. This is why the asymmetric map is the
default (`MAP = MAP_ASYMMETRIC`).

## How the codes were chosen

The tables are `CODE_SYM` and `CODE_ASYM` in `rtl/dbns_pkg.sv`, one row per
level, each row commented with its terms (for example `53 = 36 + 9 + 8`).
Every code follows these rules:

1. It uses the fewest cells possible for that level (1, 2 or 3).
2. The number of levels using each cell is a fixed target fan-in:

   | cell | 54 | 48 | 36 | 32 | 27 | 24 | 18 | 16 | 12 | 9 | 8 | 6 | 4 | 3 | 2 | 1 |
   |------|----|----|----|----|----|----|----|----|----|---|---|---|---|---|---|---|
   | symmetric  | 10 | – | 11 | – | 12 | 10 | 7 | – | 8 | 8 | 10 | 7 | 10 | 8 | 12 | 12 |
   | asymmetric | 9 | 5 | 11 | 6 | 6 | 3 | 6 | 4 | 5 | 7 | 5 | 5 | 9 | 11 | 11 | 12 |

3. With rules 1 and 2, exactly 12 symmetric codes and 5 asymmetric codes need
   three cells (asymmetric: 23, 46, 47, 53, 61).
4. In the asymmetric map, no code marks neighbouring cells. In the symmetric
   map this cannot be met together with rule 2, so it is not required there.

These targets come from the published design of this encoder. The exact code
of each level was not published, and many tables meet every rule. The one
used here is the first found when the levels are taken in increasing order
and, for each level, the code with the larger leading cell is tried first.
Another valid table would have the same output count, fan-ins and addition
depth.

`dbie` checks its table when it is elaborated. Elaboration stops with an
error if a code does not add up to its level, if a code uses more than three
cells, if an asymmetric code marks neighbouring cells, or if an output has a
fan-in above 12.

In the asymmetric table, 41 is coded as 32 + 9. This is also the shortest
(canonical) DBNS form of 41.

Note that a plain greedy DBNS encoder, which always takes the largest cell
that fits, breaks both limits. It needs four cells for 53 (36+12+4+1), and
its fan-in on cell 1 reaches 21.

## Signal chain and timing

```
 vin ──► comparator_bank ──► zero_one_gen ──► dbie ──► output register ──► dbns
        (63 latched          (thermometer →   (OR plane)
         comparators)         one-hot level)
```

| module            | role |
|-------------------|------|
| `comparator_bank` | Behavioural model of the analog front end. It is not meant for synthesis. Comparator b_k fires when `vin >= k * 2^(VIN_W-6)`. Decisions are latched on the rising edge of `clk`. |
| `zero_one_gen`    | One-hot level line: `onehot[k-1] = b_k & ~b_(k+1)`, with b_64 = 0. Level 0 gives no line. |
| `dbie`            | The encoder. `cells[b]` is the b-th smallest cell of the selected map. |
| `flash_adc_dbns`  | Top: wires the three stages and registers the encoder output. |
| `dbns_pkg`        | Map enum, cell values and exponents, and the two code tables. |

Top-level ports:

* `clk`
* `rst_n`: synchronous, active low. It clears the comparators and the output register.
* `vin[VIN_W-1:0]`: the analog input as a fraction `vin / 2^VIN_W` of full scale.
* `dbns[cells_of(MAP)-1:0]`: 16 bits in the asymmetric map, 13 in the symmetric map.

The level is X = floor(vin * 64 / 2^VIN_W). The sum of `CELL_ASYM[b]` (or
`CELL_SYM[b]`) over the set bits of `dbns` equals X.

The circuit takes one sample per clock. The comparators sample `vin` at one
rising edge, and the code of that sample is on `dbns` after the next rising
edge. The 0-1 generator and the encoder between the two registers are purely
combinational. An assertion in the top checks that the level line is one-hot
or empty.

## How far it follows the published design

Taken from the published design:

* the three-stage chain;
* the 6-bit resolution;
* both maps, with their 13 and 16 outputs;
* the limit of two additions;
* the per-cell fan-ins;
* the counts of three-cell codes;
* the addition-ready rule for the asymmetric map.

This design's own choices:

* the code of each level where several meet all the rules (see above);
* the bit order of the outputs;
* the clocking (latched comparators and an output register; the published
  encoder is an unclocked gate network);
* the reset;
* the fixed-point input;
* the simple comparator model with no bubble correction.

The published evaluation is a transistor-level simulation (speed in GHz,
power, transistor count, delays at a 2.5 GHz input). None of it has an RTL
counterpart, so none of it is reproduced here. The fan-in structure that
drives those numbers is reproduced exactly.

## Verification

Each testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`.

* `tb/tb_dbie.sv` applies all 64 levels to both maps and checks five things:
  * the cells sum to the level;
  * each code has the minimum number of cells, found here by brute force;
  * asymmetric codes have no neighbouring cells;
  * the fan-in of each cell matches the table above;
  * the three-cell counts are 12 and 5.

  The cell values are rebuilt in the testbench, independently of the package.
* `tb/tb_zero_one_gen.sv` applies every thermometer code at 6 and 4 bits.
* `tb/tb_comparator_bank.sv` probes each reference tap and its neighbours,
  then random inputs, then reset.
* `tb/tb_flash_adc_dbns.sv` runs the top end to end at its default
  parameters (asymmetric map). `tb/tb_flash_adc_dbns_sym.sv` does the same
  with the symmetric map. The input is level steps, full-scale ramps and
  random samples. Both check the level sums and the one-clock latency after
  the sampling edge. They count level-0, one-, two- and three-cell codes,
  full-scale inputs and resets, and fail if any of them never occurs.

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wall -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_flash_adc_dbns \
  -y rtl -y tb +libext+.sv rtl/dbns_pkg.sv tb/tb_flash_adc_dbns.sv
./obj_dir/Vtb_flash_adc_dbns
```

Replace the top module and testbench file to run another testbench. All of
them finish in seconds.

## Changing it

* **Other encodings.** Edit `CODE_SYM` or `CODE_ASYM` in `rtl/dbns_pkg.sv`.
  `tb_dbie` states the rules (sum, minimum cells, adjacency, fan-in) and
  reports any code that breaks them. Update its fan-in targets if you
  change them on purpose.
* **Other resolutions.** `comparator_bank` and `zero_one_gen` take any
  `N_BITS`. The encoder tables are specific to 6 bits (`ADC_BITS`). A new
  resolution needs a new map and new tables.

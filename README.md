# Self-healing ROM: black-box healing of stuck-at faults on interconnect lines

A small combinational circuit, an 8x8 ROM, survives stuck-at faults on its internal wires
without triplicating anything. The healer never looks inside the circuit. It only knows
what each internal wire *should* carry for the present inputs. A set of XOR gates compares
that expectation with what the wires actually carry, and every wire that disagrees is
inverted before it reaches the output logic. A stuck-at fault can only flip a wire to the
wrong constant. Inverting exactly the flagged wires therefore restores the fault-free value
for any number of simultaneously stuck wires.

The RTL also holds the fault-injection logic used to show this. A control signal `con`
enables fault injection. A 4-bit code `fg` selects which wires are stuck, and at which value.

## The circuit under test

The ROM is a two-level sum-of-minterms circuit with inputs A(2..0):

* **First stage, `rom_decoder`**: a 3-to-8 AND-gate decoder. Line `int(m)` is high
  exactly when the input equals `m`. These eight lines are the interconnect that may be
  faulty.
* **Second stage, `rom_or_array`**: eight OR gates. Output F*k* is the OR of the
  lines of its minterms:

| Output | Minterms         | Mask (bit m = minterm m) |
|--------|------------------|--------------------------|
| F1     | 1, 3, 5, 7       | `8'hAA` |
| F2     | 0, 1, 4, 5       | `8'h33` |
| F3     | 2, 3, 4, 5, 6    | `8'h7C` |
| F4     | 3, 4, 7          | `8'h98` |
| F5     | 0, 1, 2, 3       | `8'h0F` |
| F6     | 0, 5, 6          | `8'h61` |
| F7     | 2, 3, 4, 5       | `8'h3C` |
| F8     | 1, 2, 3, 4, 5, 6 | `8'h7E` |

Output bit `f[j]` carries F(j+1). For input `100` this gives `f[7:0] = 8'b1100_1110`.
The original description of this circuit quotes `11110000` as the output for input `100`.
That value does not follow from the functions above under any bit order, because five of
the eight functions contain minterm 4. This RTL implements the functions as listed. To
reproduce a different table, override the `FUNC_MINTERMS` parameter.

## How the healing works

```
 a ─► rom_decoder ─int_good─► fault_injector ─int_actual─┬───────────────┐
                                 ▲      ▲                │               │
      fg ─► fault_generator ─────┘     con               ▼               ▼
 a ─► bb_model ─int_desired───────────────────► sh_comparator ─err─► sh_healer ─int_healed─► rom_or_array ─► f
```

1. **Black box model (`bb_model`).** A table indexed by the inputs gives the pattern the
   first stage must produce (`int_desired`). By default input `m` gives a pattern with only
   line `m` high. The model knows nothing of the decoder's gates. It holds only the
   input-output relation.
2. **Comparator (`sh_comparator`).** `err_lines = int_actual ^ int_desired`, one XOR per
   line. `fault_detected` is the OR of these flags. When it is 0, the lines reach the
   second stage untouched (the "no error" path).
3. **Healer (`sh_healer`).** For each flagged line, the line is inverted. Unflagged lines
   pass through. Because `err` is `actual ^ desired`, the healed line is always
   `actual ^ (actual ^ desired) = desired`.

Why this covers multiple faults: each line is checked against its own expected value, with
no voting between copies. Stuck-at-1 and stuck-at-0 faults on any subset of the eight lines
are all corrected. The limit is the model and the comparator themselves. A fault inside
`bb_model`, `sh_comparator` or `sh_healer`, or in the OR gates of the second stage, is not
covered. The scheme only protects the interconnect between the two stages.

A rough cost comparison counts the healing gates as one XOR and one NOT per line: 16 gates,
against 19 gates for the bare ROM (8 AND and 3 inverters in the decoder, 8 OR gates), or
about 84 % overhead. Triple modular redundancy (TMR) with bitwise voters costs about 368 %.
The RTL here is written at word level. It also needs the lookup table of `bb_model` and a
per-line 2:1 selection in the healer, which that count leaves out.

## Fault injection

`fault_generator` looks up `fg` in a 16-entry table. Each entry holds a stuck-at-1 mask and
a stuck-at-0 mask, defined in `sh_pkg::FAULT_TABLE_DEFAULT`. `fault_injector` applies them
only while `con = 1`: `int_actual = (int_good | sa1) & ~sa0`. With `con = 0` the lines are
fault-free.

| fg   | Fault                            | fg   | Fault                          |
|------|----------------------------------|------|--------------------------------|
| 0000 | none                             | 1000 | int(1) s-a-1 **and** int(4) s-a-0 |
| 0001 | int(0) s-a-1                     | 1001 | int(2) s-a-0                   |
| 0010 | int(0) s-a-0                     | 1010 | int(3) s-a-1                   |
| 0011 | int(7) s-a-1                     | 1011 | int(5) s-a-1                   |
| 0100 | int(1) s-a-1                     | 1100 | int(6) s-a-0                   |
| 0101 | int(7) s-a-0                     | 1101 | all lines s-a-1                |
| 0110 | int(2), int(3) s-a-1             | 1110 | all lines s-a-0                |
| 0111 | int(6) s-a-1, int(5) s-a-0       | 1111 | even lines s-a-1, odd s-a-0    |

Codes `0100` and `1000` are the scenarios of the reference fault campaign. The other
fourteen codes are this design's own choice, made so that every line is stuck at each value
by some code. If a line is in both masks, stuck-at-0 wins. No default entry puts a line in
both. To use your own fault list, override `FAULT_TABLE` on the top.

The reference campaign at input `100` (time in ns):

| Time      | con | fg   | int_actual | f        |
|-----------|-----|------|------------|----------|
| 0-499     | 0   | 0100 | 00010000   | 11001110 |
| 500-999   | 1   | 0100 | 00010010   | 11001110 |
| 1000-1499 | 1   | 1000 | 00000010   | 11001110 |
| 1500-2000 | 0   | 1000 | 00010000   | 11001110 |

`int_actual` shows the faults. `f` never changes. Without healing, the outputs in the last
two faulty rows would be `11011111` and `10010011`.

## Files and interface

| File | Content |
|------|---------|
| `rtl/sh_pkg.sv` | sizes, table types, default function, model and fault tables |
| `rtl/rom_decoder.sv` | first stage, 3-to-8 decoder |
| `rtl/fault_generator.sv` | `fg` → stuck-at masks |
| `rtl/fault_injector.sv` | applies the masks while `con = 1` |
| `rtl/bb_model.sv` | desired first-stage output |
| `rtl/sh_comparator.sv` | per-line XOR fault flags |
| `rtl/sh_healer.sv` | inverts flagged lines |
| `rtl/rom_or_array.sv` | second stage, OR gates F1..F8 |
| `rtl/self_healing_rom.sv` | top level |

Top-level ports of `self_healing_rom`:

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `a` | in | 3 | inputs A(2..0) |
| `con` | in | 1 | 1 = inject the faults selected by `fg` |
| `fg` | in | 4 | fault scenario code |
| `f` | out | 8 | outputs, `f[j]` = F(j+1) |
| `int_actual` | out | 8 | interconnect lines as the faults leave them |
| `int_healed` | out | 8 | lines after healing, as seen by the second stage |
| `err_lines` | out | 8 | per-line fault flags |
| `fault_detected` | out | 1 | some line is faulty |

Parameters are `FUNC_MINTERMS` (ROM contents), `DESIRED` (model table) and `FAULT_TABLE`.
Their defaults come from `sh_pkg`. The whole design is combinational: there is no clock
and no reset, and outputs settle one gate-path delay after the inputs change.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The top-level test, `tb_self_healing_rom`, does two
things:

* It replays the campaign above.
* It sweeps all 8 inputs × 16 fault codes × both `con` values against a reference written
  independently in the testbench.

It also counts the no-error path, the injections, the detections, single-line heals,
multi-line heals, and faults that would have corrupted `f`. Each of these must occur at
least once. With Verilator:

```
verilator --binary --timing --assert rtl/sh_pkg.sv tb/tb_self_healing_rom.sv -y rtl \
          --top-module tb_self_healing_rom
./obj_dir/Vtb_self_healing_rom
```

Replace the testbench name to run a block-level test, for example `tb_sh_healer`.

## Where this design makes its own choices

* The encoding of `fg` beyond codes `0100` and `1000`, and the precedence rule when a line
  is in both masks.
* `bb_model` is a lookup table. A black-box model could equally be any other circuit that
  reproduces the known input-output relation.
* The healer's per-line selection between the inverted and the direct line.
* The bit order of `f` and the added observation ports (`int_healed`, `err_lines`,
  `fault_detected`).
* The output functions follow the sum-of-minterms definitions, not the `11110000` output
  value quoted for input `100` (see above).

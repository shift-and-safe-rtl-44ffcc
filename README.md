# Shift-and-Safe: a CNN accelerator with undervolted activation memories

Lowering the supply of an SRAM below its safe minimum (Vmin, 0.6 V in the
reference technology) saves energy, but some bitcells then fail permanently,
stuck at 0 or 1. At 0.52 V roughly a quarter of all 16-bit words have at
least one bad cell, and at 0.51 V more than half. Words hit by faults come in
three kinds:

| kind | faulty cells in the word | share at 0.52 V |
|------|--------------------------|-----------------|
| L    | low byte only            | about 12 %      |
| H    | high byte only           | about 11 %      |
| L&H  | both bytes               | about 0.8 %     |

Shift-and-Safe keeps a CNN accurate at these voltages with two cheap tricks
in the read and write ports of the activation memories:

* **Shift.** Nearly every activation (about 99.9 %) has zeros in the two
  magnitude bits below the sign. An L word is stored shifted left by two
  places with the sign kept in place. Its data then sits two cells higher,
  and a bad cell corrupts a bit worth a quarter of what it would otherwise.
  An H word is shifted the same way and then bit-reversed ("flipped"), so
  its bad high-byte cells hold the least significant data bits. Reading
  undoes the transform and shifts zeros back into bits 14:13.
* **Safe.** Shifting cannot help an L&H word. Its value goes instead to the
  *safe bank*: the last 256 KiB bank of the same memory, kept at the safe
  voltage. Layers rarely fill a 2 MiB activation memory, so this bank is
  normally idle. A layer is read back in the order it was written, so the
  safe bank works as a FIFO with a single pointer.

Which treatment a word needs depends only on the die, not on the network. A
2-bit code per word, the **C bits**, records it. The C bits are written once
after the manufacturing memory test and are kept at the safe voltage.

This repository holds synthesizable SystemVerilog for the whole accelerator
that carries the technique. It has a 16 x 16 output-stationary systolic PE
array, two 2 MiB ping-pong activation memories with Shift-and-Safe, a 2 MiB
weight memory, dispatchers, an output buffer and a control unit. It also has
a self-checking testbench for every block.

## Word encodings

Activations and weights are 16-bit sign-magnitude fixed-point numbers: bit
15 is the sign, bits 14:0 the magnitude. The position of the binary point
is set per network. Sign-magnitude matters here. In two's complement a
negative number has ones in its top bits, and dropping those bits would
destroy it.

| C  | kind | stored in the row                                  | returned by a read                 |
|----|------|----------------------------------------------------|------------------------------------|
| 00 | ok   | `a`                                                | stored word                        |
| 01 | L    | `{a[15], a[12:0], 2'b00}`                          | `{s[15], 2'b00, s[14:2]}`          |
| 10 | H    | `flip({a[15], a[12:0], 2'b00})`                    | `{u[15], 2'b00, u[14:2]}`, `u = flip(s)` |
| 11 | L&H  | nothing (cells left unwritten); value into the safe bank | value from the safe bank     |

`flip` reverses the whole word (bit 15 with bit 0, 14 with 1, and so on), so
for an H word the sign ends up in cell 0. An H word's low byte is fault-free,
so the sign is safe there. For an L word the sign stays in cell 15, which is
fault-free too. The sign is never shifted.

Worked example, 8 bits for brevity. The value -3.75 is `1 0011 110`, and the
cell at bit 3 is stuck at 0. Stored plainly it reads back as `1 0010 110` =
-2.75, an error of 1. With the shift, `1 1111 000` is stored and
`1 1110 000` read back. Shifting right gives `1 0011 100` = -3.5, an error of
0.25.

The price is that a word with a 1 in bit 14 or 13 loses it. Such outliers
are rare, and only words that sit on faulty cells are shifted. The shift is
fixed at two places (`sas_pkg::SHIFT`). Measurements of the technique found
one place too little and three too lossy.

## The safe bank and the Safe Pointer

Each activation memory has 2^20 words (65,536 rows of 16 words). Bank 7,
rows 57,344 to 65,535, is the safe bank. `safe_pointer` holds the word
address of the next FIFO entry:

* It starts at the last word, 2^20 - 1, and moves one word **down** per L&H
  word. The FIFO therefore grows from the top of the address space towards
  the layer data, which fills from address 0 upwards. The bank holds
  131,072 entries. A further use raises the sticky `safe_overflow` flag,
  and that value is lost.
* It restarts at the last word whenever the memory changes role. A memory
  that was just written becomes the input of the next layer, and it then
  replays its L&H values in the order they were stored.
* Within a row, L&H words go in lane order, lowest lane first, on both
  write and read.
* The control unit reads the input rows once per output tile. It therefore
  also restarts the input memory's pointer at the start of every tile.

Nothing stops a layer larger than 1.75 MiB from running into the safe
bank. The CNNs the technique was evaluated on have at most 1.56 MiB per
on-chip layer.

## Port timing

There is one physical port per memory, 32 bytes wide, with one-cycle
synchronous reads. Regular rows and safe-bank words share it.

**Read** (`sas_read_port`):

* Cycle 0: the row request is accepted, and the row and its 32 C bits are
  read.
* Cycle 1: they arrive.
* The row's n L&H words are then fetched from the safe bank, one per cycle,
  into per-lane holding registers.
* The block is offered from cycle 2 (n = 0) or cycle n + 3 (n > 0).
* Sixteen 4-input multiplexers, selected by the C bits, choose between the
  raw word, the shifted-back word, the unflipped and shifted-back word, and
  the holding register. The block stays on `out_data` until `out_ready`.

**Write** (`sas_write_port`):

* Cycle 0: the block is accepted and the row's C bits are read.
* Cycle 1: the row is written with its L and H words encoded and its L&H
  lanes disabled.
* One more cycle per L&H word writes that word at the Safe Pointer.
* A block therefore holds the port for 2 + n cycles.

Each L&H word thus costs one extra cycle on write and one on read. This is
the performance cost of the technique: under 2 % on average at 0.52 V for
the networks it was evaluated on.

## The accelerator around the memories

```
             off-chip side (host ports)          weight loading
               |                |                      |
        +------v-----+   +------v-----+        +-------v-------+
        | act_memory |   | act_memory |        | weight_memory |
        |     0      |   |     1      |        +-------+-------+
        +--+------^--+   +--+------^--+                |
           |      |         |      |             weight dispatcher
     dispatcher   |   dispatcher   |                   |
           +--mux-+---------+      |             +-----v------+
                  |  (input memory) +------------+  pe_array  |
                  +------------------------------> 16 x 16 OS |
                               output buffer <---+------------+
                                     |
                         write port of the output memory
```

* **Roles.** In every layer one activation memory is the input and the
  other the output. `control_unit` swaps them (`in_sel`) when the layer
  ends.
* **Layer.** A layer is a matrix product on a batch of 16 vectors. Input
  row k of the layer (memory row k) holds element k of all 16 vectors, one
  per PE row. Weight row `w_base + t*K + k` holds the weights from input k
  to the 16 outputs of output tile t.
* **One tile.** The control unit:
  1. clears the accumulators;
  2. requests the K input rows and reads the matching weight rows;
  3. steps the array once for every row that arrives;
  4. drains the array with 30 empty steps;
  5. captures the results into the output buffer;
  6. writes its 16 columns as output rows `t*16 .. t*16+15`.

  A convolution has to be lowered to this form (im2col) before it reaches
  the accelerator.
* **Array.** `pe_array` is a 2D mesh. Activations move right, weights move
  down, and each PE keeps its own sum (output stationary). The
  `dispatcher`s delay lane i by i steps, so PE (i, j) sees operand k at
  step k + i + j. A tile therefore needs K + 30 steps. The whole array
  stalls together while an input row is incomplete, for example while its
  L&H words are being read from the safe bank.
* **Accumulation.** PEs multiply in two's complement and accumulate in 48
  bits.
* **Output buffer.** `output_buffer` shifts each sum right by `shift`
  (rounding towards minus infinity, one shift per layer for the weights'
  fraction bits). It saturates the magnitude at 2^15 - 1 and returns a
  sign-magnitude word.

## Ports of the top, `sas_accel`

* **Layer:** `start`, with `k_rows` (K), `n_tiles` (T), `w_base` and
  `shift`. `busy` is high while a layer runs. `done` pulses when the last
  output row is stored, and `in_sel` then names the memory that holds it.
* **Off-chip side**, usable while `busy` is low:
  * `h_sel` picks a memory and `h_wr_mode` its role.
  * `h_restart` restarts its Safe Pointer. Pulse it before loading a layer
    and before reading one back.
  * `h_w_*` is a row write stream and `h_r_*` a row read stream, both
    valid/ready. They go through the Shift-and-Safe ports like any other
    access.
  * `wt_ld_*` loads weight rows.
* **Fabrication test:** `cb_we`, `cb_sel`, `cb_row` and `cb_c` write one
  row of C bits. The code per word is 00 with no stuck cell, 01 with stuck
  cells only in bits 7:0, 10 with stuck cells only in bits 15:8, and 11
  with stuck cells in both bytes. The C bits of the safe bank must be 00.
* **Fault map (simulation only):** for each memory, `fi_row` shows the row
  being written. `fi_mask` and `fi_val` say which of its 256 cells are
  stuck and at what value, and the written data is forced accordingly. The
  safe bank ignores them. In silicon these inputs are tied to zero.
* **Status:** `safe_ptr` and `safe_overflow` for each memory.

Default parameters are the full size: 8 banks of 8,192 rows per activation
memory, and 65,536 weight rows.

## Where this design goes beyond, or departs from, the published description

The technique (encodings, C bits, safe bank, Safe Pointer, multiplexer
structure, memory organisation) follows the published design. The following
are this design's own choices or deviations:

* **Safe Pointer direction.** The description says both that the FIFO
  starts at the last address and that it uses ascending addresses. Only
  the downward direction stays inside the memory, so here it counts down
  from the last word.
* **Holding registers.** The safe-bank values are held in flip-flops, where
  the description uses latches.
* **Memory latency.** Memories have one-cycle reads. The published
  performance figures assume three-cycle memories at 1 GHz, so cycle counts
  here are not comparable with them.
* **Control unit.** The layer format, tiling, one-row-in-flight control
  unit, handshakes, rounding and saturation, accumulator width and the
  per-tile pointer restart are this design's. The description gives the
  control unit and dispatchers only by function.
* **Output path.** The output buffer writes the output memory directly. The
  block diagram routes outputs through the memories' dispatchers.
* **Off-chip traffic.** Spilling of layers over 2 MiB to DRAM, and weight
  streaming during a layer, are not built. The DRAM side is the set of
  host ports.
* **Layer placement.** Output rows always start at row 0, so a layer whose
  weights exceed the 2 MiB weight memory cannot be split over several
  calls.
* **Not modelled.** The separate voltage domains, the SRAM macros
  themselves, and power, energy and area are outside the RTL.

## Files

| file | contents |
|------|----------|
| `rtl/sas_pkg.sv` | word and row types, C-code enum, shift/flip/encode/decode functions |
| `rtl/sas_accel.sv` | top level |
| `rtl/control_unit.sv` | layer sequencer |
| `rtl/pe_array.sv`, `rtl/pe.sv` | systolic array and its MAC element |
| `rtl/dispatcher.sv` | skewing feeder for one array edge |
| `rtl/output_buffer.sv` | result capture, rescaling, column stream |
| `rtl/act_memory.sv` | one Shift-and-Safe activation memory |
| `rtl/sas_read_port.sv`, `rtl/sas_write_port.sv` | the two Shift-and-Safe ports |
| `rtl/safe_pointer.sv` | safe-bank FIFO pointer |
| `rtl/cbit_array.sv` | C-bit storage |
| `rtl/sram_bank.sv` | one 256 KiB bank |
| `rtl/weight_memory.sv` | weight memory |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_vdd_sweep.sv` | activation memory at four supply voltages |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
counts a failure if the test hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sas_accel \
    -y rtl -y tb +libext+.sv rtl/sas_pkg.sv tb/tb_sas_accel.sv
./obj_dir/Vtb_sas_accel
```

Replace `tb_sas_accel` with any other testbench. The package must be read
first. The full-size top takes about two minutes to build and a second to
run.

## What the testbenches check

* **`tb_sas_accel`** runs the accelerator at full size.
  * Both memories get a hashed pseudo-random stuck-at map: each cell of the
    undervolted banks is stuck with probability 1.7 %, which touches about
    24 % of words, as at 0.52 V. The C bits are derived from that map.
  * A 16 x 16 input block goes through three chained layers
    (16 -> 32 -> 32 -> 16 features), so each memory serves as both input
    and output.
  * Every output word must equal a reference model that follows each value
    through encoding, stuck cells, decoding and the safe bank.
  * The test fails if any of these never happens: shift-back, unflip,
    safe-bank write and read in both memories, an array stall during
    safe-bank reads, output backpressure, role swaps, or pointer restarts.
  * It also prints how far the result is from a fault-free run, with and
    without the protection. In a typical run the mean error is about 15
    times smaller with Shift-and-Safe.
* **`tb_vdd_sweep`** runs one full-size activation memory at four supply
  voltages. The stuck-cell rate is set so that the share of words with at
  least one stuck cell matches the measured one at each voltage. A layer of
  512 rows is written and read back, and every word is checked. It also
  checks the exact cycle cost of each row and prints the word mix:

  | supply | faulty words | L&H words (of 8192) | read slowdown |
  |--------|--------------|---------------------|---------------|
  | 0.54 V | 1.1 %        | 0                   | 0 %           |
  | 0.53 V | 6.8 %        | 10                  | 1.3 %         |
  | 0.52 V | 23.1 %       | 130                 | 15.8 %        |
  | 0.51 V | 55.3 %       | 844                 | 82.7 %        |

  Stuck cells here fail independently of each other. That gives more L&H
  words at 0.51 V (about 10 %) than the 7.35 % measured on real chips,
  where faulty cells cluster. The slowdown is that of the read stream
  alone. In a full layer it is partly hidden by the array's drain and
  write-back time.
* **`tb_act_memory`** writes and reads back a layer through a small memory
  with a 3 % stuck-cell map and checks every word exactly. It also
  overflows the safe bank on purpose.
* **`tb_sas_read_port`** and **`tb_sas_write_port`** check each encoding
  against independently written bit manipulations, the FIFO order and
  addresses, and the exact cycle counts (2 or n + 3 for reads, 2 + n for
  writes).
* **The remaining testbenches** check their block against integer models:
  the array product and its K + 30 step latency, dispatcher skew under
  stalls, rescaling and saturation, and the control unit's request,
  restart and role-swap sequence.

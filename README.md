# VaWiRAM — a variable-width static RAM

A memory chip is normally built with one fixed organisation, say 1M x 1 or
256k x 4, and a system designer has to buy the organisation that matches the
bus. This design is a RAM whose *data width is a pin setting*: the same
1M-bit array can be used as 1M x 1, 512k x 2, 256k x 4, 128k x 8 or 64k x 16,
and the width can even change from one access to the next.

The cost is small because almost nothing of a conventional RAM changes. The
cell array and the row decoder stay hardwired. Only three units become
programmable, all steered by the same few control values:

* the **column decoder** enables 1, 2, 4, 8 or 16 of its sixteen sub-decoders;
* a **pass-gate tree on the output side** merges the sixteen internal data
  lines into 16, 8, 4, 2 or 1 output bits;
* the **same tree on the input side** spreads the input bits over the lines.

For a maximum width of W_MAX = K = 16 this takes 15 pass gates per data
direction, 8 two-input selectors in the column decoder and a small mode
decoder. With one extra pin (`M`) plus address bits the wide configurations no
longer need, the mode needs no dedicated pins beyond that one.

The architecture follows the published VaWiRAM (variable-width RAM) proposal,
which this text calls the *reference design*. Where that proposal leaves a
detail open, the choice made here is stated in the section concerned and
collected under *Where this RTL departs from or adds to the reference design*.

## Block diagram

```
              A0..A9 ──► cell array + row decoder (1024 rows x 1024 columns)
                                      │ row (1024 bits)
 A10..A19 ──► column decoder ──► column I/O circuits ◄─── 16 internal data lines
     (PCADU: selector stage +        │  line_out                    ▲ line_in
      16 decoders 6-to-64)           ▼                              │
                              output data control           input data control
                              (PODCU, pass-gate tree)       (PIDCU, pass-gate tree)
                                      │                              ▲
                                  dout[15:0]                     din[15:0]
 M, A16..A19 ──► mode control unit (MCU) ──► MC1..MC4 to PCADU, PODCU, PIDCU
 S, W# ──► read/write control ──► access / wr / rd
```

| Module | Role |
|---|---|
| `vawi_ram` | top level, wires the units below |
| `vawi_mcu` | mode control unit: mode pins → MC1..MC4 and the width |
| `vawi_pcadu` | programmable column decoder: selector stage + K decoders |
| `vawi_col_decoder` | one N-to-2^N decoder with enable |
| `vawi_io_circuits` | couples the column each decoder selects to its data line |
| `vawi_podcu` / `vawi_pidcu` | output / input data control (pass-gate trees) |
| `vawi_passgate_net` | which data lines a given MC setting joins |
| `vawi_cell_array` | 2^ROW_BITS x 2^COL_BITS cells, row decoder |
| `vawi_rw_ctrl` | chip select and write enable decode |
| `vawi_pkg` | default sizes, the mode-scheme enum |

## The control values MC1..MC4

Everything programmable is driven by L = log2(K) control values. `mc[b]` in
the RTL is MC(b+1). They form a thermometer code:

| MC4 MC3 MC2 MC1 | configuration |
|---|---|
| 0 0 0 0 | 64k x 16 |
| 1 0 0 0 | 128k x 8 |
| 1 1 0 0 | 256k x 4 |
| 1 1 1 0 | 512k x 2 |
| 1 1 1 1 | 1M x 1 |

MC(b+1) = 1 means two things at once: the pass gates that join data lines
2^b apart are closed, and the column decoder uses one more address bit.

## Pass-gate trees (PODCU, PIDCU)

The sixteen internal data lines D0..D15 are joined by a tree of 15 pass gates
in four levels. MC4 closes 8 gates joining Di and Di+8, MC3 closes 4 gates,
MC2 two and MC1 the last one. With the thermometer codes above, the lines on
one net are exactly the lines whose numbers agree modulo the width: at width 4,
{D0, D4, D8, D12} form one net and reach pin D0, {D1, D5, D9, D13} reach D1,
and so on.

On a read, exactly one line of each net is driven, by the one column decoder
the address enables, so each net carries one data bit to its pin. On a write
the pin drives its whole net and only the line of the enabled decoder reaches
the cell array.

The gates are wired as in the reference drawing:

| Control | Gates (line pairs) |
|---|---|
| MC4 | D0–D8, D1–D9, D2–D10, D3–D11, D4–D12, D5–D13, D6–D14, D7–D15 |
| MC3 | D4–D8, D5–D9, D6–D10, D7–D11 |
| MC2 | D2–D12, D3–D13 |
| MC1 | D0–D1 |

For other values of K the RTL uses the analogous wiring line r to line
r + 2^b (r < 2^b) for level b. This is its own choice. For every code the mode
control unit produces, it joins the same lines as a drawing of that size
would.

A pass gate has no digital direction, so the RTL models a closed gate as a
short. The gates form a tree rooted at D0. `vawi_passgate_net` labels every
line with the highest tree node it still reaches through closed gates. Lines
with equal labels are on one net, and for the thermometer codes the label is
the lowest line of the net, which is the pin that serves it. The output unit
ORs the driven lines of a net onto every pin of that net. The input unit gives
each line the value of the labelled pin. Consequences worth knowing:

* In a w-bit configuration only D0..D(w-1) carry the word. `dout` pins above
  w repeat pin (j mod w), as shorted pins would. `din` pins above w are
  ignored; on a real chip they would be shorted to the low pins and must be
  left undriven.
* `vawi_podcu` asserts that the control values form a thermometer code, the
  only codes the mode control unit produces.

## Column decoder (PCADU) and the address map

The 20-bit address splits into A0..A9 (row), A10..A15 (column within a
sub-decoder) and A16..A19 (choice of sub-decoder). The sixteen 6-to-64
sub-decoders all see A10..A15. Sub-decoder g is enabled when every bit b of
g for which MC(b+1) = 1 equals A(19−b). In the 1-bit configuration, bit b of g
comes from A(19-b), so exactly one sub-decoder is enabled. Each doubling of
the width stops comparing one more bit and so enables twice as many.

The selector stage forms a true and a complement literal of each of A16..A19.
It passes the literal when MC is 1 and a constant 1 when MC is 0. That is
2·log2(K) two-input selectors, which is K/2 = 8 for K = 16. This wiring is
this design's own. The reference design counts K/2 selectors for any K, so for
K > 16 this stage uses fewer than that count.

The address map follows from this. In a 2^m-bit configuration the top m
address bits are not used for addressing. **Pin Dj at address a holds the
same cell as the 1-bit configuration at address a with A(19−b) replaced by
bit b of j.** For example D1 of the 2-bit configuration at address a is the
1-bit cell at a + 2^19, and a 16-bit word at address a (A0..A15) spreads over
the sixteen 1-bit addresses that differ only in A16..A19 (bit-reversed). Data
written at one width can be read at any other width through this map.

## Mode pins: two schemes

`SCHEME` selects how the width reaches the chip.

**`MCU_SHARED` (default): one pin.** Each step up in width frees the highest
address bit still in use, and that bit carries the next piece of mode
information:

| M | A19 | A18 | A17 | A16 | width | address pins used |
|---|---|---|---|---|---|---|
| 0 | addr | addr | addr | addr | 1 | A0..A19 |
| 1 | 0 | addr | addr | addr | 2 | A0..A18 |
| 1 | 1 | 0 | addr | addr | 4 | A0..A17 |
| 1 | 1 | 1 | 0 | addr | 8 | A0..A16 |
| 1 | 1 | 1 | 1 | – | 16 | A0..A15 |

**`MCU_ENCODED`: ceil(log2(log2 K + 1)) dedicated pins** (3 for K = 16).
Code 0 is 16 bits wide, and each step up halves the width, so code 4 is 1 bit
wide. The top address bits a configuration does not need are simply ignored.
Codes 5..7 are not defined by the scheme and are treated here as the 1-bit
configuration.

Neither scheme latches anything. The width follows the pins in the same
cycle, and `width_log2` reports it.

## Interface and timing of `vawi_ram`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | write clock |
| `s` | in | 1 | chip select, active high |
| `w_n` | in | 1 | write enable, active low |
| `mode_pins` | in | 1 or 3 | M (shared) or the mode code (encoded) |
| `addr` | in | ROW_BITS+COL_BITS | A0..A19 |
| `din` | in | K | write data, D0..D(w−1) used |
| `dout` | out | K | read data, 0 when not reading |
| `dout_oe` | out | 1 | 1 during a read (s = 1, w_n = 1) |
| `width_log2` | out | log2(L+1) | log2 of the configured width |

* **Read** (`s=1, w_n=1`): combinational. `dout` is valid in the same cycle
  as the address, like an asynchronous SRAM.
* **Write** (`s=1, w_n=0`): `din` is stored on the rising edge of `clk` and is
  readable from the next cycle.
* **Deselected** (`s=0`): no column is selected, nothing is written, and `dout`
  is 0 with `dout_oe = 0`.

The RAM described is asynchronous. The write clock and the split
`din`/`dout`/`dout_oe` pins (instead of tri-state data pins) are choices of
this RTL. Nothing is reset; the cells start with whatever they hold.
`vawi_ram` asserts that exactly 2^width_log2 sub-decoders are enabled during
every access (one driver per net).

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `K` | 16 | maximum width = width variability factor (minimum width 1), a power of two |
| `ROW_BITS` | 10 | row address bits |
| `COL_BITS` | 10 | column address bits, must exceed log2(K) |
| `SCHEME` | `MCU_SHARED` | mode pin scheme |

The capacity is 2^(ROW_BITS+COL_BITS) bits. The defaults (1024 x 1024 cells,
K = 16) are the sizes of the reference design. The same RTL has been
simulated with K = 32, 64, 128 and 256.

## Cost of the programmability

The transistor-level cost can be counted at K = 16. Each data direction has
15 pass gates (K − 1), the column decoder has 8 two-input selectors, and there
is the mode decoder. At 4 transistors per pass gate and 6 per selector that is
2·15·4 + 8·6 = 168 transistors plus the mode decoder. This agrees with the
published 208-transistor total for a 64k array if the mode decoder is costed
at 40 transistors. Against 6-transistor SRAM cells, that is about 0.05 % of a
64k array. The RTL models function, not transistors; this is only for
orientation.

## Where this RTL departs from or adds to the reference design

* The row decoder and the cell array are behavioural: the row is an array
  index, and sense amplifiers and bit-line circuits are an AND-OR selector.
* Write clock, split data pins, and deselect behaviour: see *Interface and
  timing*.
* Chip control: only the names S and W# are given. The polarity follows the
  names, and the decode (`access = S`, `wr = S & ~W#`, `rd = S & W#`) is this
  design's.
* Pass-gate tree wiring for K other than 16 and the column-decoder selector
  stage: see their sections above.
* The pairing of sub-decoder index bits with A19..A16 (and therefore the
  address map of the wide configurations) is this design's. It is chosen so
  that the bits dropped first are the top ones, which the single-pin scheme
  reuses.
* Not built: the generalisation to a *field programmable memory cell array*
  (a sea of memory blocks with programmable logic, interconnect, I/O blocks
  and configuration RAM). It is described only as a concept, with nothing
  that fixes its logic.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_vawi_mcu` | both mode tables, all input combinations |
| `tb_vawi_pcadu` | sub-decoder enables and all 1024 column selects against an independent model, every width |
| `tb_vawi_io_circuits` | column read selection and per-column write strobes |
| `tb_vawi_podcu`, `tb_vawi_pidcu` | pin/line mapping of the trees for every width |
| `tb_vawi_cell_array` | per-column writes against a reference copy |
| `tb_vawi_rw_ctrl` | truth table |
| `tb_vawi_ram` | **full default size** (1M bits, shared mode pin). Fills the array through the 16-bit configuration and reads all 1M cells back through the 1-bit one. Then runs 200k random reads and writes in random widths with deselected cycles, checking reads in the same cycle and writes one edge later. It counts reads and writes per width, width changes, reads of data written at another width and deselected cycles, and fails if any of them never happens. About 1.4M checks, about 50 s. |
| `tb_vawi_ram_encoded` | the 3-pin scheme on a 1k-bit array, all widths |
| `tb_vawi_ram_widths` | K = 32, 64, 128, 256 on 4k-bit arrays, every width of each (uses the helper `tb_vawi_ram_sized_run`) |

The end-to-end tests compute the expected data from a flat 1-bit reference
memory and the address map above, not from the RTL's structure.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vawi_pkg.sv rtl/*.sv tb/tb_vawi_ram.sv --top-module tb_vawi_ram
./obj_dir/Vtb_vawi_ram
```

For `tb_vawi_ram_widths`, also list `tb/tb_vawi_ram_sized_run.sv`. The RTL
lints cleanly with `verilator --lint-only -Wall`, apart from unused-parameter
notes.

# Multi-rate QC-LDPC decoder for G.hn

This is a layered LDPC decoder for the quasi-cyclic codes of the G.hn
(ITU-T G.9960) home-networking standard. It handles every code length and
rate of the standard with one data path. That data path has 360 processing
units, one per row of the largest circulant (Z = 360), so a whole block row of
the parity-check matrix is processed in parallel. Decoding uses layered
(turbo-decoding message passing) normalised min-sum. Within a layer, block
columns are taken one per clock cycle. The read phase of the next layer
overlaps the write-back of the current one. An early-termination rule stops
decoding once a full iteration's worth of consecutive layers has left every
hard decision unchanged.

The design is written in synthesizable SystemVerilog (IEEE 1800-2017). The
code tables (base matrices) are not built in; they are loaded through a
configuration port (see "Code tables").

## Codes

Every G.hn code has a base matrix with 24 block columns. Each entry of the
base matrix is either empty or a Z x Z cyclically shifted identity. The
decoder knows six mother codes (`mode_in`):

| mode | rate | n    | k    | Z = n/24 | layers M = 24(1-R) | info columns 24-M | most entries per row |
|------|------|------|------|----------|--------------------|-------------------|----------------------|
| 0    | 1/2  | 1920 | 960  | 80       | 12                 | 12                | 8                    |
| 1    | 1/2  | 8640 | 4320 | 360      | 12                 | 12                | 8                    |
| 2    | 2/3  | 1440 | 960  | 60       | 8                  | 16                | 14                   |
| 3    | 2/3  | 6480 | 4320 | 270      | 8                  | 16                | 14                   |
| 4    | 5/6  | 1152 | 960  | 48       | 4                  | 20                | 20                   |
| 5    | 5/6  | 5184 | 4320 | 216      | 4                  | 20                | 20                   |

G.hn's rate-16/18 and rate-20/21 codes (n = 1080/4860 and 1008/4536) are
punctured rate-5/6 codes. To decode them, give the punctured positions an LLR
of 0 and use mode 4 or 5.

The limit on row length comes from the compressed message format (see "EX
memory word"). These limits hold for the standard's codes.

## Number format

Every LLR and every message is a 6-bit two's-complement number with 3
fraction bits. Call this the (6,3) format: a sign, 2 integer bits and 3
fraction bits. Values are kept in the symmetric range -31..+31, so a magnitude
always fits in 5 bits. A negative LLR means bit 1. An input of -32 is clipped
to -31. Every sum and difference in the data path saturates to ±31.

## The algorithm as computed

For each layer (block row) l, each check node r of the layer (one per PU lane)
and each entry j of the row (block column c_j with shift s_j):

1. Read the LLR `L = LLR[c_j][(r + s_j) mod Z]`.
2. Rebuild the old check-to-variable message `R_old(j)` from the stored
   compressed record of (l, r). In the first iteration `R_old = 0`.
3. Compute `Q_j = sat(L - R_old(j))`. Keep Q_j, and feed |Q_j| and sign(Q_j) to
   the min search.
4. After the last entry, the min search holds: min1 (the minimum of |Q|), min2
   (the second minimum), the index j* of min1, and S (the XOR of all signs).
   Normalise with alpha = 0.75, computed as `m - floor(m/4)`.
5. For each entry, compute `R_new(j) = (sign(Q_j) xor S) * (j == j* ? min2' : min1')`
   and `LLR = sat(Q_j + R_new(j))`. Write the LLR back to the same place.
6. Store the record {min1', min2', j*, sign of every R_new(j)} for the next
   iteration.

Rows shorter than the code's row length are padded with absent entries. An
absent entry still takes its cycle, but it enters the min search as +31, the
largest positive value. It therefore never becomes the minimum unless every
other entry is also 31, and it never flips the sign. It is never written back.

## Architecture

```
             +-------------+   Index / Offset tables (code_rom)
  in_llr --> | input_module|------------+
             +------+------+            v
                    |          +------------------+
                    +--------->|   llr_mem        |  18 x (24 x 120) two-port RAMs
                               |  (1 column/word) |
                               +---+----------^---+
                      read port    |          | write port
                                   v          |
                     qc_rotator (router)   qc_rotator (derouter, inverse)
                                   |          ^
                                   v          |
  ex_mem (64 x 12x120) -> ex_router -> pu_array (360 x pu) -> ex_derouter -> ex_mem
                                   |          |
                                   +-> early_term <-+
                                                        output_module --> out_bits
                    central_controller sequences all of it
```

* **llr_mem**: one word is one block column, 360 LLRs in natural order
  (2160 bits, split over 18 RAMs of 24 x 120). It has a separate read port
  and write port, so a column can be read for the next layer while another is
  written back.
* **Router and derouter (`qc_rotator`)**: a rotation modulo Z over the first
  Z lanes, `out[i] = in[(i+s) mod Z]`, and its inverse for the write-back.
  There is no per-mode permutation network. The shift s comes from the offset
  table, and the rotation is built from two barrel shifts of the flat lane
  vector. Lanes at or above Z carry +31.
* **pu_array / pu**: one processing unit per lane. Each unit has a recover
  unit (`pu_recover`), a subtractor, a set of "SUB regs" holding the Q values
  of a layer, a calculation unit (`pu_calc`: min, second min, index, sign XOR,
  alpha scaling) and the final adder. Every unit holds two banks of SUB regs
  and results, which is what lets two layers be in flight at once. Units at or
  above Z are frozen by an enable; this stands in for powering them off.
* **ex_mem**: one word per layer (12 words) holds the compressed records of
  all check nodes of the layer. The word is 64 single-port RAMs of 12 x 120
  bits.
* **early_term**: stores the signs read during a layer's read phase. It
  compares them with the signs written back, and counts consecutive layers
  with no change.
* **input_module / output_module**: load one block column per beat. After
  decoding, they emit the sign bits of the information columns 0 .. 23-M.
* **central_controller**: runs the schedule described next.

## Overlapped layer schedule (the tricky part)

Two processes run at once in `central_controller`:

* The **reader** issues one entry of the current layer per cycle. It looks up
  the entry's column and shift, and reads the column from `llr_mem`. With the
  layer's first entry it also reads the layer's EX word. One cycle later the
  data reach the PUs through the router (`a1_*` signals), and Q goes into the
  layer's bank.
* One cycle after a layer's last read-phase entry, the layer is **finalised**
  (`fin`): the PUs latch min1'/min2'/j*/S for that bank.
* The **writer** then takes the same entries again, one per cycle. The PUs
  compute the new LLR from the SUB regs of that bank, and the derouter writes
  it back. In the writer's first cycle the new EX word is written.
* While the writer works on layer l (bank b), the reader is already reading
  layer l+1 into bank !b.

Cycle picture for layers of 3 entries, no stalls:

```
cycle     0     1     2     3      4      5      6      7
reader    l.0   l.1   l.2   l+1.0  l+1.1  l+1.2
PU in           l.0   l.1   l.2    l+1.0  l+1.1  l+1.2
fin                               l
writer                                    l.0    l.1    l.2
EX write                                  l
```
(`l.1` = entry 1 of layer l. If layer l+1 reads a column that layer l writes
back only in cycles 5..7, the reader stalls until that write has happened.)

The schedule has three hazards. The controller stalls the reader for each:

* **Column hazard**: layer l+1 may need a column that layer l has read but
  not yet written back. Each column read sets a pending bit, which its
  write-back clears, and the reader stalls on a pending column. The result is
  therefore bit-identical to plain sequential layered decoding. How often the
  reader stalls depends on the order of the columns in the tables: if a
  layer's columns are ordered so that those shared with the previous layer
  come last, the stalls shrink.
* **Bank hazard**: a layer can start only when the writer has released the
  bank it will use.
* **EX port**: the EX memory is single-port. The write of a finished layer
  wins, and a first read of a layer that falls in the same cycle waits one
  cycle.

Decoding ends when one of two things happens:

* The writer finishes a layer and the early-termination unit reports that M
  consecutive layers changed no decision.
* The last layer of iteration `max_iter` has been written.

A layer that the reader has partly read at that point is dropped; it has not
written anything.

## EX memory word

A compressed record holds min1', min2' (5 bits each), the min index and one
sign per entry. Its width depends on the rate class, and each class packs its
records at its own stride. This makes the largest code of every class fill the
same 7560 of the 7680 bits:

| class | modes | index bits | sign bits | bits per lane | largest Z x width |
|-------|-------|-----------:|----------:|--------------:|------------------:|
| 1/2   | 0, 1  | 3          | 8         | 21            | 360 x 21 = 7560   |
| 2/3   | 2, 3  | 4          | 14        | 28            | 270 x 28 = 7560   |
| 5/6   | 4, 5  | 5          | 20        | 35            | 216 x 35 = 7560   |

Lane i starts at bit i x width. Its fields are, from the LSB up: min1',
min2', index, signs. `ex_derouter` packs records into a word and `ex_router`
unpacks them. Each is one fixed wiring per class plus a 3-way select.

## Early termination

Within a layer, the sign of every LLR read is compared with the sign of the
same LLR after the update. This covers present entries only, in lanes below
Z. If nothing changed, `et_flag` is incremented; otherwise it is cleared.
Decoding stops when `et_flag` reaches M. A clean channel therefore stops
after one iteration.

## Code tables

`code_rom` holds three tables:

* for each (mode, layer, entry): a present flag, the block column (5 bits)
  and the shift (9 bits);
* for each mode: the row length, i.e. the entries processed per layer. It
  must not exceed the class limit in the table above.

Write the tables after reset, before the first codeword:

* `cfg_we_entry` with `cfg_mode/cfg_layer/cfg_entry/cfg_valid/cfg_col/cfg_off`
  writes one entry.
* `cfg_we_deg` with `cfg_mode` and `cfg_off` writes the row length.

Within one layer, a block column may appear only once, and every shift must
be below Z. The tables are not reset.

## Interface and timing (`ldpc_decoder`)

| signal | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cfg_*` | in | | table writes (above) |
| `mode_in`, `max_iter_in` | in | 3, 5 | taken with the first input column of a codeword |
| `in_valid` / `in_ready` / `in_llr[360]` | in/out/in | 1/1/360x6 | 24 block columns, one per beat, column 0 first; lanes >= Z are ignored |
| `out_valid` / `out_ready` / `out_col` / `out_bits[360]` | out/in/out/out | | the 24-M information columns, one per beat, bit = 1 for a negative LLR |
| `busy` | out | 1 | a codeword is being loaded, decoded or output |
| `dec_done`, `dec_iters`, `dec_early` | out | 1/5/1 | pulse after the last output column; iterations run; early termination hit |
| `stat_stall_hazard`, `stat_stall_bank`, `stat_stall_ex`, `stat_overlap` | out | 1 | per-cycle event flags |

Cycle costs:

* Loading takes 24 cycles.
* Each iteration takes at least M x (row length) cycles, plus stalls.
* Output takes at least 3 cycles per column.

Loading and output are not overlapped with decoding.

## Memory

* LLR memory: 18 x 24 x 120 = 51,840 bits.
* EX memory: 64 x 12 x 120 = 92,160 bits.
* Tables: 6 x 12 x 20 entries of 15 bits, plus row lengths (about 21.6 kbit
  in flip-flops).

## Where this design makes its own choices

These points are this design's own choices, not taken from a specification:

* **Normalisation**: alpha = 0.75.
* **Saturation**: ±31.
* **Tie-breaking**: ties in the min search keep the earlier entry.
* **First iteration**: the first iteration uses R_old = 0.
* **Overlap and hazard rules**: the overlap between layers and the
  pending-column stall described above.
* **EX packing**: field order within a lane, and the index and sign widths of
  the 1/2 and 2/3 classes. Those widths are inferred from the common 7560-bit
  budget.
* **Tables**: the tables are writable rather than fixed ROMs, and their layout
  is larger than a compact ROM of only the real entries would be.
* **I/O**: input and output formats and handshakes, the reset style, and
  information bits taken as block columns 0 .. 23-M.
* **Lane disable**: unused lanes are disabled with an enable; no power
  gating.
* **Throughput**: at 300 MHz, 10 iterations of the n = 8640 rate-1/2 code
  would need about 84 cycles per iteration to reach 1.54 Gbit/s. That is one
  entry per cycle with no stalls. This design adds the load and output cycles
  and any hazard stalls, so it is somewhat slower. How much slower depends on
  the real base matrices.

## Files

* `rtl/ldpc_pkg.sv`: constants, the record type, the mode table, the EX
  packing classes and the arithmetic helpers.
* `rtl/ldpc_decoder.sv`: the top level.
* `rtl/central_controller.sv`, `code_rom.sv`, `input_module.sv`,
  `output_module.sv`, `early_term.sv`.
* `rtl/pu_array.sv`, `pu.sv`, `pu_calc.sv`, `pu_recover.sv`: the processing
  units.
* `rtl/qc_rotator.sv`: the router and derouter.
* `rtl/llr_mem.sv`, `ex_mem.sv`, `ex_router.sv`, `ex_derouter.sv`, `tpram.sv`,
  `spram.sv`: the memories. `tpram` and `spram` are RAM models written as
  arrays; replace them with RAM macros for a chip.
* `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=F`.

## Simulation

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder
./obj_dir/Vtb_ldpc_decoder
```

The same command with another `tb_*` name runs a unit test.

`tb_ldpc_decoder` runs the decoder at full size (360 lanes) on every mode:

* It builds random quasi-cyclic tables, including padded rows, and loads
  them.
* It sends noisy all-zero codewords.
* It compares every output bit, the iteration count and the
  early-termination flag with a sequential reference model in the testbench.

It also checks:

* that the decode time falls between one entry per cycle and fully serial
  phases;
* that early termination, the max-iteration stop, all three stalls, overlap,
  padded entries, disabled lanes, mode switches and output back-pressure each
  happen at least once.

## How far to trust it

* Every block has a self-checking testbench.
* The top-level test matches an independent sequential model bit for bit, on
  all six modes, including a full-width (Z = 360) codeword that does not
  converge.
* No real G.hn base matrix has been run, because the matrices are not part of
  this source. Error-rate performance on the real codes has therefore not
  been measured.
* No synthesis timing or area has been measured.

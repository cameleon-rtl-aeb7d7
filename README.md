# CAMeleon: a binary/ternary CAM inside a computational RAM

A content-addressable memory (CAM) compares a query with every stored key at
once and reports which keys match. A ternary CAM (TCAM) also lets the query
mark bits as "don't care". Building a CAM usually means a dedicated array with
match lines and tuned match-line sense amplifiers, and that array can do
nothing else.

CAMeleon gets the same search out of a **Computational RAM (CRAM)**: a
spintronic memory array in which the cells of a column can also act as the
inputs and output of a logic gate. Nothing in the cell changes. A key is
stored down a column. The query picks one cell per key bit, chosen so that the
picked cell holds 0 exactly when that bit matches. One in-array NOR over the
picked cells then writes a 1 into an output cell of the column iff every bit
matched. All columns do this at the same time, so every stored key is
compared in parallel. When no search is running, every cell of the array is
ordinary CRAM again, for storage and for in-memory logic.

This repository holds synthesizable SystemVerilog for the whole
organisation, at the evaluated size of 1024 keys of 128 bits. The spintronic
array is replaced by a digital equivalent: flip-flops for the cells and a
counting rule for the analog gate (see "The tile model").

## How a column searches

### Bit-pairs (binary search)

Each key bit `k` takes two cells in its column: one holds `k`, the next holds
`~k`. For query bit `q`:

| q | selected cell | it holds 0 when |
|---|---------------|-----------------|
| 0 | the `k` cell  | k = 0 (match)   |
| 1 | the `~k` cell | k = 1 (match)   |

So a selected cell is 0 exactly for a matching bit. Row selection is just
`wl[2i] = ~q[i]` and `wl[2i+1] = q[i]`.

Example: keys `1001` (column 0) and `0001` (column 1), query `0001`. Column
1 sees four zeros and its output switches to 1. Column 0 sees one 1 among the
selected cells and does not switch.

### Wildcards (ternary search)

A bit-mask register sits next to the query register; a 1 marks a wildcard.
Each key bit also gets a **reserved wildcard bit** (RWB): one extra cell per
column, always 0. For a masked bit, the row selection logic picks the RWB
instead of either bit-pair cell. The RWB holds 0, so that bit always "matches".
With an all-zero mask the ternary selection equals the binary one. Example:
query `1XX1` matches `1001` and not `0001`.

### Limited gate width: chunks and an AND

An in-array gate cannot have many inputs. With the default 8-input NOR, a
16-bit segment is searched as two chunks of 8 bits, one after the other. Each
chunk's NOR writes its own output cell. A 2-input in-array AND of the two
outputs then gives the segment's outcome.

## The tile model (`cram_tile`)

In the real array a cell is an MTJ (R_low = 0, R_high = 1) plus an access
transistor. A logic step turns on the word lines of the input cells and the
output cell, then applies a gate-specific voltage. The input currents add up
and flow through the output cell. If their sum exceeds the critical current,
the output cell flips to a fixed value; otherwise it keeps its preset.

The model keeps exactly that decision. For each column:

```
lows = number of active input cells holding 0   (0 = low resistance = more current)
if (output cell active && lows >= thresh) output <= target
```

| gate           | preset | target | thresh              |
|----------------|--------|--------|---------------------|
| n-input NOR    | 0      | 1      | n                   |
| n-input AND    | 1      | 0      | 1                   |
| reduction NOR  | 0      | 1      | S (number of segments) |

The reduction NOR differs from the key NOR: its inputs are only the cells
whose word line is on, and all of them hold 0. The output switches only when
all S are connected. That is the same counting rule with threshold S.

Other properties of the model:

- Word lines are given per cell, `wl[c][r]`. A key tile drives one word line
  per row into every column. A reduction tile drives cells one at a time.
- Writes have a per-column enable, so a key can be written into one column.
- A read gives, per column, the OR of the active cells. The controller turns
  on one row.
- The cells have no reset: they are non-volatile memory.
- Every operation takes one clock cycle. A cycle stands for one device step.
  No analog timing is modelled.

What is not modelled: the split of the column lines into even and odd BSL
groups, which decides in the real array which cells are inputs and which is
the output. Here the controller names the output row. The drivers and sense
amplifiers, energy and device variation are not modelled either.

## Array organisation

Keys are cut into S = KEY_BITS/SEG_BITS segments (8 of 16 bits by default).
They are stored in G = NUM_KEYS/TILE_COLS groups of 64 keys:

- **Key tile (g, s)**, number `g*S + s`, holds segment `s` of the 64 keys of
  group `g`, with one key per column. It has a **read buffer**: a row of
  flip-flops that captures the tile's partial outcome, one bit per key.
- **Reduction tile g**, number `G*S + g`. Cell (s, c) is switched on by bit c
  of the read buffer of key tile (g, s). Its rows 0..S-1 hold constant 0s.
  A NOR with threshold S into row S gives the match bit of each of its
  64 keys.
- The query and bit-mask registers are shared. Segment s drives the row
  selection logic (RSL) of every key tile of segment s.
- The 16 reduction tiles give the 1024-bit match vector. A priority encoder
  (lowest index wins) turns it into an index.

At the defaults that is 128 key tiles plus 16 reduction tiles of 64x64 cells:
589,824 cells, i.e. 72 KiB.

Row layout of a 64-row key tile (defaults):

| rows   | contents                                          |
|--------|---------------------------------------------------|
| 0..31  | bit-pairs: row 2i = key bit i, row 2i+1 = its inverse |
| 32..47 | reserved wildcard bits (0 in CAM mode)            |
| 48, 49 | NOR outputs of chunks 0 and 1 (preset 0)          |
| 50     | AND output = partial outcome (preset 1)           |
| 51..63 | extra cells, free for regular CRAM work           |

Reduction tile: rows 0..7 hold constant 0s, row 8 is the output, rows 9..63
are extra cells.

Word-line merge: in both tile types, the tile controller's word lines are
ORed with the CAM word lines, which come from the RSL in a key tile and from
the read buffers in a reduction tile. The CAM word lines count only during a
CAM step. Outside CAM mode the controller alone drives the tile.

## Search schedule and timing

`cam_sequencer` drives two command buses. All key tiles share one and all
reduction tiles share the other. One step per cycle:

| cycle after accept | key tiles (query n)              | reduction tiles (query n) |
|--------------------|----------------------------------|---------------------------|
| 1 | PRESET_LO: chunk outputs := 0                     |                           |
| 2 | PRESET_HI: AND output := 1                        |                           |
| 3 | NOR chunk 0 (RSL on, threshold 8)                 |                           |
| 4 | NOR chunk 1                                       |                           |
| 5 | AND of the two chunk outputs (threshold 1)        |                           |
| 6 | READ result row into the read buffers; next query accepted |                  |
| 7 | (query n+1 PRESET_LO)                             | PRESET output row := 0    |
| 8 |                                                   | NOR over enabled cells (threshold S) |
| 9 |                                                   | READ match bits           |
| 10 | `res_valid` with `res_match`, `res_hit`, `res_index`, `res_count` |          |

The read buffers act as the pipeline register between the stages. The key
tiles search query n+1 while the reduction tiles finish query n. One query is
accepted every 6 cycles and each result comes 10 cycles after its query was
accepted. The key stage never needs to wait at these sizes. If the reduction
tiles were still using the read buffers when the key stage reached READ, the
key stage would wait there.

With `NOR_INPUTS >= SEG_BITS` there is only one chunk. The PRESET_HI and AND
steps then drop out and the key stage takes 3 steps. With `NOR_INPUTS=16` a
query is accepted every 3 cycles and its result comes 7 cycles later; the
reduction stage takes the same 3 steps, so the two stages stay in step.

Other operations:

- **Enter CAM mode** (`cfg_cam_mode=1`, `cfg_tcam` selects ternary): one
  step clears every wildcard row and every reduction constant row.
- **Key load**: two steps per key. The first writes all cells of the key's
  column that must hold 1; the second writes all that must hold 0, the
  wildcard rows included. Each segment's tile writes its own segment, and
  only the column of the addressed key is enabled.

## Regular CRAM mode

After `cfg_cam_mode=0` the `cram_*` port reaches any single tile:

- write `cram_wdata` into the rows in `cram_rows`, in the columns set in
  `cram_col_en` (`cram_op=1`);
- read one row (`cram_op=2`); `cram_rdata` arrives one cycle later;
- in-array gate (`cram_op=3`): the rows in `cram_rows` other than
  `cram_out_row` are the inputs, and `cram_out_row` is the output.
  `cram_gate=0` is NOR: preset the output to 0 first, and the threshold is
  the number of inputs. `cram_gate=1` is AND: preset the output to 1.

Keys stay in the array across mode switches. Work that uses only the extra
rows leaves a CAM ready to search again. In CAM mode the host port is closed.

## Top-level interface (`cameleon_top`)

| group  | signals | notes |
|--------|---------|-------|
| config | `cfg_valid, cfg_cam_mode, cfg_tcam -> cfg_ready`; `cam_mode, tcam` | accepted only when no search is in flight |
| keys   | `key_valid, key_index[9:0], key_data[127:0] -> key_ready` | CAM mode only |
| query  | `q_valid, q_data[127:0], q_mask[127:0] -> q_ready` | mask bit 1 = wildcard; ignored in binary mode |
| result | `res_valid, res_match[1023:0], res_hit, res_index[9:0], res_count[10:0]` | one-cycle pulse, no back-pressure |
| CRAM   | `cram_valid, cram_tile[7:0], cram_op[1:0], cram_gate, cram_rows[63:0], cram_out_row[5:0], cram_col_en[63:0], cram_wdata[63:0] -> cram_ready`; `cram_rvalid, cram_rdata[63:0]` | CRAM mode only |

All handshakes are valid/ready and `rst_n` is an asynchronous reset, active
low. Priority is configuration, then key load, then query.

Parameters, with their defaults: `NUM_KEYS=1024`, `KEY_BITS=128`,
`SEG_BITS=16`, `TILE_ROWS=64`, `TILE_COLS=64`, `NOR_INPUTS=8`.
`KEY_BITS` must be a multiple of `SEG_BITS` and `NUM_KEYS` a multiple of
`TILE_COLS`. A key tile needs `3*SEG_BITS + chunks + 1 <= TILE_ROWS`.

## Files

| file | role |
|------|------|
| `rtl/cameleon_pkg.sv` | defaults, operation and step enums, row-layout helpers |
| `rtl/cram_tile.sv` | digital CRAM tile: write, read, threshold gate |
| `rtl/row_select_logic.sv` | RSL: query/mask bits to bit-pair or wildcard rows, per chunk |
| `rtl/wl_merge.sv` | OR of controller word lines with CAM word lines |
| `rtl/read_buffer.sv` | flip-flop row between key tile and reduction tile |
| `rtl/query_register.sv` | query and bit-mask registers |
| `rtl/tile_controller.sv` | selects sequencer step (CAM mode) or host command (CRAM mode) |
| `rtl/key_tile.sv` | tile + controller + RSL + merge + read buffer |
| `rtl/reduction_tile.sv` | tile + controller + per-cell merge |
| `rtl/cam_sequencer.sv` | mode entry, key load and the pipelined search schedule |
| `rtl/priority_encoder.sv` | match vector to lowest index and count |
| `rtl/cameleon_top.sv` | the whole array |

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_cameleon_top \
    rtl/cameleon_pkg.sv tb/tb_cameleon_top.sv -Mdir obj && ./obj/Vtb_cameleon_top
```

The other files are found through `-Irtl -Itb`. The block testbenches
(`tb_cram_tile`, `tb_key_tile`, and the others) compute the expected values
from a reference model in the testbench. `tb_key_tile` includes the two
worked examples above.

- `tb_cameleon_top` runs the whole array at a reduced size: 128 keys of
  64 bits in four segments, with 32-column tiles. It covers CRAM-mode writes,
  reads, NOR and AND; binary search with exact, one-bit-off and random
  queries; and ternary search with 50 % wildcards. It also checks a multiple
  match, pipelined overlap, and switching back to CRAM mode and into CAM mode
  again with the keys intact. It checks the 10-cycle latency of every result,
  and it fails if any of these mechanisms never occurred.
- `tb_cameleon_full` runs the same sequence at the default size, with all
  1024 keys loaded. Building it with verilator takes a few minutes; the
  simulation itself takes seconds.
- `tb_cameleon_gate16` repeats the `tb_cameleon_top` sequence with
  16-input gates (`NOR_INPUTS=16`), where each segment is one NOR, and
  checks the 7-cycle latency of that schedule.

The top-level testbenches drive their inputs just after a clock edge and
sample the ready signals at the falling edge, so that a handshake is seen the
same way by the design and by the testbench.

## Where this design makes its own choices

These points are not fixed by the architecture description and were chosen
here:

- the step schedule (the presets and reads around the gates);
- the two-step column write used to load keys;
- the one-step clear on entering CAM mode;
- all handshakes and the command format of the host port;
- lowest-index priority in the encoder, and the match count;
- the bit order within a column: bit i at rows 2i/2i+1 instead of the MSB at
  the top;
- resets of the registers (to 0).
- the row layout. The key tile holds its result in row 50 (`3*SEG_BITS+2`),
  not in its last row, and the reduction tile keeps its constant-0 cells in
  rows 0..S-1 and its output in row S, not in the last row. The rows above
  these are simply unused in CAM mode and free in CRAM mode. Any row would
  work; this layout keeps the row arithmetic simple;
- the share of cells in use during a search. Here a key column uses 51 of
  its 64 rows: 32 bit-pair rows, 16 wildcard rows and 3 gate outputs. The
  reduction tiles use 9 of 64 rows. That is about 72 % of the 72 KiB array.
  An estimate of about 57 % is also quoted for this architecture; it
  presumably counts fewer rows, for instance not the wildcard rows of a
  binary-only search;

Limits:

- The model is digital. It gives the logical behaviour of the spintronic
  array, not its energy, delay or variation.
- The reduction tile uses a single NOR. This needs S <= NOR_INPUTS, which
  holds at the defaults (8 and 8). Splitting a wider reduction into chunks,
  as the key tiles do, is not built.
- Only NOR and AND are offered as in-array gates. The array can make other
  gates with other presets and voltages, but those are not described in
  enough detail to build here.

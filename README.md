# Move-to-front (BSTW) data compressor on a content addressable table

This RTL describes a small hardware data compressor. It uses the
move-to-front scheme known as BSTW, after Bentley, Sleator, Tarjan and Wei.
Sender and receiver each keep the same short list of recently seen
*tuples* (fixed-width source symbols). The most recent tuple is at the top.
If an incoming tuple is already in the list, the sender transmits only its
position in the list, which is shorter than the tuple. The tuple then moves
to the top. If the tuple is not in the list, the sender transmits the tuple
itself, and it goes to the top, pushing everything down. The oldest entry
falls off the bottom. The receiver applies the same update to its own list,
so a position always names the same tuple at both ends. Data with locality
of reference (tuples that recur within a short span) therefore costs fewer
bits.

The list lives in a content addressable memory (CAM). Every record compares
itself with the incoming tuple at the same time. The match lines give the
position directly, and they also decide which records must move. In the
original circuit the cells, latches, encoder and multiplexers are built in
pass-transistor adiabatic logic (PAL), which recovers charge through a
sinusoidal power clock. This RTL models the logic function of that circuit.
It does not model its energy-recovery electronics.

The default size is four records of four bits each. A position then needs
two bits, so a tuple that hits costs half the bits of a tuple sent as-is.

## The move-to-front update in hardware

Take a table with records 0 (top) to N-1 (bottom), and a latched tuple `t`.

* **Hit at record k.** Records 0..k-1 each move down one place, so record k
  is overwritten by record k-1. Record 0 takes `t`. Records below k keep
  their contents. A hit at record 0 rewrites record 0 with the same value,
  so nothing visibly changes.
* **Miss.** Every record moves down one place. The bottom record is lost.
  Record 0 takes `t`.

Both cases reduce to one rule for each record. Record `j` loads at the next
clock edge when a tuple is being processed and none of the records above it
matched:

    shift_en[j] = in_valid & ~(match[0] | ... | match[j-1])

For the bottom record this is a NOR of all the other match lines. A record
that loads takes the record above it; record 0 takes the tuple. No
addresses, counters or pointers are involved. The "shift" is a wave of
parallel loads, enabled from the top down to the first match.

Example with tuples A, B, C, D in records 0..3:

| input | sent        | list after |
|-------|-------------|------------|
| C     | code 2      | C A B D    |
| C     | code 0      | C A B D    |
| E     | literal E   | E C A B    |
| B     | code 3      | B E C A    |

The position code is the binary encoding of the one-hot match lines. Code
bit `b` is the OR of the match lines of all records whose index has bit `b`
set. For four records, each code bit is a two-input OR.

## The compressed symbol

At every valid cycle the compressor produces one symbol:

| field         | width | meaning                                       |
|---------------|-------|-----------------------------------------------|
| `out_hit`     | 1     | 1: the tuple was in the table                 |
| `out_code`    | CW    | position of the match (0 = top); 0 on a miss  |
| `out_literal` | W     | the tuple itself; needed only when `out_hit`=0 |

A channel needs to carry the hit flag and either the code or the literal.
The end-to-end testbench scrambles the literal field whenever a code is
sent, to show that the receiver does not depend on it. On a miss the code
field is 0, which is the position where the new tuple is placed. The hit
flag, and the choice to carry the literal in a separate field, are this
design's own framing of the stream. The underlying scheme only says that a
miss sends the tuple together with a code.

## The receiver

`bstw_decompressor` keeps a table with the same structure: the same CAM
rows, the same shift control and the same read multiplexers. For a code, it
reads the record at that position. For a literal, it takes the literal. The
recovered tuple is then applied to the table's own search input. Its match
lines drive the same `shift_ctrl` logic as in the compressor, so both lists
go through the same updates by construction. A code that names an empty
record violates an assertion.

## Timing

Both halves accept one symbol per clock and answer in the next cycle.

    edge e    : tuple latched into the input register
    cycle e..e+1 : match lines, out_hit/out_code/out_literal valid (combinational)
    edge e+1  : table updated; the next tuple is latched at the same edge

Back-to-back tuples see the table as updated by the previous tuple.
If `tx_out_*` is wired directly to `rx_in_*`, a tuple comes out of
`rx_out_data` two cycles after it enters `tx_in_data`. `rst` is synchronous
and active high. It clears every record's valid bit at one clock edge;
an empty record never matches.

## Storage made of latches

The CAM bit (`cam_cell`) stores its value in two `pal_d_latch` instances in
series. The first is open while `clk` is low and the second while `clk` is
high, so together they behave as a rising-edge register. A hold multiplexer
in front selects between the shifted-in value and the present value.

`pal_d_latch` follows the structure of the PAL latch. Its clocked front end
raises node X when the clock and the data are high, and node Y when the
clock is high and the data is low. A set/reset pair (cross-coupled NOR gates
in the circuit) is set by X and reset by Y. X and Y are never high
together.

Two details matter when simulating or changing this code:

* The latch process is written as `always @(x, y)` with a nonblocking
  assignment, not as `always_latch` with a blocking one. With the nonblocking
  form, the output of a latch pair changes after the clock edge, as a
  flip-flop output does. A flip-flop that samples a table-derived signal on
  the same edge then gets the old value. If the latch is written as
  `always_latch`, Verilator evaluates it before the flip-flops sample, and
  a compressor wired directly to a receiver fails. `tb_cam_cell` checks this.
* Synthesis reports a logic loop through each latch pair: q feeds the hold
  multiplexer, which feeds the first latch. The two latches are never open
  together, so the loop is not a combinational cycle. It is expected, and
  so are the latch cells (two per stored bit).

## Modules

    bstw_codec_top          compressor and receiver side by side
    ├── bstw_compressor     input register, table, encoder, shift control, read port
    │   ├── cam_word  ×N    W cam_cells + valid cell, shared match line
    │   │   └── cam_cell    two pal_d_latch + hold mux + XOR mismatch
    │   ├── shift_ctrl      which records load
    │   ├── pal_encoder     match lines -> code, hit
    │   └── cam_read_mux    tree of pal_mux4 (read by position)
    └── bstw_decompressor   same parts, search word = recovered tuple
    bstw_pkg                default sizes

`bstw_codec_top` brings out both halves' ports separately. The compressor
also has a read port (`tx_rd_addr` → `tx_rd_data`, `tx_rd_valid`) that
reads any record by position, as with an ordinary memory.

## Parameters

| parameter | default | meaning                                          |
|-----------|---------|--------------------------------------------------|
| `N`       | 4       | records in the table                             |
| `W`       | 4       | tuple width in bits                              |
| `CW`      | `$clog2(N)` | code width; derived, leave it at the default |

N = 4 and W = 4 are the size the scheme was built and measured at. Any N ≥ 2
works. The read multiplexer tree pads to a power of four and uses one
`pal_mux4` level per two address bits. The testbenches also exercise N = 7
and N = 8 in the shift control and the encoder. Compression pays only while
CW < W.

## What is modelled and what is not

Taken from the design as described:
* the CAM table organised as a move-to-front list, with parallel comparison;
* shift-down of the records above the match (or of all records on a miss),
  and writing the input at the top;
* the shifting storage built from D latches, two per cell;
* the encoder from match lines to the output code;
* 4:1 multiplexers;
* the match-line-driven shift logic (a NOR of the upper match lines for the
  bottom row);
* the 4 × 4-bit size.

This design's own choices:
* the hit flag and the code value 0 on a miss;
* valid bits and synchronous reset (how the table starts is not given);
* the one-cycle timing with an input register;
* using the 4:1 multiplexers as a read-by-position port;
* the whole receiver, of which only the principle (a mirror table) is given;
* the two-latch phases.

Not modelled:
* the sinusoidal power clock and its resonant generator;
* bit-line precharge and the read/write steering circuitry;
* the dual-rail PAL gates and charge recovery;
* any power or energy behaviour.

The physical match line in the circuit rises on a mismatch. The `match`
signal here is its logical complement (high = equal).

In the block diagram, some gate labels in the shift logic, and the select
labels of the multiplexer branches, are not consistent with the described
function. The RTL follows the described function: shift the records above
the match, and select input `{s1,s0}`. A row of shift-register latches
(`SR1..SRn`) at the bottom of the block diagram has no described role and
is not built.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Example with
Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/bstw_pkg.sv \
        tb/tb_bstw_codec_top.sv --top-module tb_bstw_codec_top -Mdir obj
    ./obj/Vtb_bstw_codec_top

Testbenches:
* `tb_bstw_codec_top`: end to end at the default size, compressor looped
  into the receiver. It takes 6000 cycles in two phases, high locality then
  wide, with idle cycles and a reset. It checks every decision against a
  reference list and checks the 2-cycle latency. It counts hits at every
  position, misses while filling, evicting misses, idle cycles, the reset
  and read-port reads, and fails if any of them never happened. It also
  reports the payload. In the high-locality phase, 5664 payload bits were
  sent for 10664 tuple bits: the 2-of-4-bit code gives close to 50%.
* `tb_bstw_compressor` and `tb_bstw_decompressor`: each half alone, against
  a reference list.
* `tb_cam_word`, `tb_cam_cell` and `tb_pal_d_latch`: storage and
  comparison.
* `tb_shift_ctrl` and `tb_pal_encoder`: exhaustive.
* `tb_pal_mux4`.

The compressor asserts that at most one record matches. The receiver asserts
that a code names a filled record.

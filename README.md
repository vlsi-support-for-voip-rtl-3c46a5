# Order-preserving MIMO cell buffer with a systolic balanced distribution network

A link of 10 Gb/s or more carrying fixed-size cells (ATM cells) is faster than a single
memory running at a moderate clock. The usual remedy is to put N FIFOs side by side and
write up to N cells per time slot. Then the N FIFOs must still behave like one FIFO:

* cells must come out in the order they arrived (cells of one slot in input-link order);
* the FIFOs must fill evenly, so that no cell is lost while another FIFO still has room.

This design does that in three stages:

```
 in link a ─┐   ┌───────────────────────┐   ┌────────┐   ┌──────┐
 in link b ─┤   │ BDN                   │──▶│ FIFO A │──▶│      │──▶ out link 0
    ...     ├──▶│ balanced distribution │──▶│ FIFO B │──▶│ RMUX │──▶ ...
 in link h ─┘   │ network (pack & shift)│──▶│  ...   │──▶│      │──▶ out link M-1
                └───────────────────────┘   └────────┘   └──────┘
```

1. The **BDN** packs the valid cells of a time slot onto adjacent outputs and shifts
   them cyclically so that they start right after the FIFO written last. Cells therefore
   land in the FIFOs round robin, and no two FIFOs ever differ by more than one cell.
   The BDN is a systolic array of 2-by-2 switches steered by two small controllers. It
   ranks no cells and contains no adders, unlike the butterfly/banyan pack-and-shift
   networks it replaces.
2. The **FIFO bank** holds N ordinary single-input single-output cell FIFOs.
3. The **RMUX** (rotating multiplexer) reads the FIFOs in the same cyclic order onto M
   output links. With M = N the whole block is a parallel MIMO buffer. With M = 1 it
   serialises onto one link (e.g. an access point), and with 1 < M < N it is a buffer
   concentrator. Several such buffers can be chained as the stages of a larger switch,
   because each keeps cell order.

The top module is `mimo_buffer` (`rtl/mimo_buffer.sv`).

## Cells, slots and the interface

Everything moves as W-bit words, one per link per clock. A cell is `CELL_WORDS`
consecutive words. A *time slot* is one cell time: all N input links start a cell on the
same clock, flagged by `in_sop`, and `in_valid[i]` (read only with `in_sop`) is the
header bit saying whether link i carries a real cell or an empty one. Slots may follow
each other back to back; a new `in_sop` must come at least `CELL_WORDS` clocks after the
previous one (an assertion checks this).

| port | dir | meaning |
|---|---|---|
| `in_sop`, `in_valid[N]`, `in_data[N]` | in | input slots as above |
| `out_ready` | in | the output links may start a slot |
| `out_sop`, `out_valid[M]`, `out_data[M]` | out | output slots: `out_sop` on the first word, `out_valid[k]` for all `CELL_WORDS` words of a cell on link k |
| `drop[N]` | out | one-clock pulse: a cell routed to FIFO j was lost, FIFO j full |
| `level[N]` | out | cells held by each FIFO |
| `wr_ptr[N]` | out | the BDN's one-hot round-robin pointer |

Within an output slot the cells are on links 0, 1, ... in order. Valid links always come
first. Reading the output slots link by link, and slot after slot, gives back the input
cells in arrival order, minus any dropped on overflow.

Latency: a cell's header enters the FIFO 3N-2 clocks after it entered the buffer. It can
be read once fully written, so its first output word leaves at the earliest
3N-2 + CELL_WORDS + 1 clocks after it arrived (76 clocks at the defaults).

## How the BDN packs and shifts

### The switching element (SWT)

Each SWT has a north and a west input and a south and an east output, all registered
(one clock per switch). It has two modes:

* **cross** (the normal one): north → south, west → east;
* **toggle**: west → south, north → east.

Every column of the array carries, from the top, one *free slot* per time slot. A switch
toggles when a valid cell arrives from the west while the slot coming from the north is
still free. The column then captures the cell, and the free slot travels east and is
thrown away at the row's end. In every other case it crosses. So an empty cell on a row
always keeps going east, and a column that already holds a cell lets later cells pass.
The mode is decided on a cell's header word and held for the rest of the cell.

### Staggering (HOC and VEC)

The switch at row i, column j must see the row-i cell and the column-j slot on the same
clock. The horizontal controller (HOC) therefore delays input row i by i clocks (none on
row a, 1 on b, ... 7 on h), and the vertical controller (VEC) starts column j's slot j
clocks after column 0's. After this the array is a plain pipeline: row i meets column j
at clock i + j.

### Packing

With every column free, the valid cell of the first valid row drops into column 0.
The next valid row finds column 0 occupied, crosses it, and drops into column 1, and so
on. The k-th valid cell of the slot lands in column k. This is packing, with no ranking.

### Shifting: the fold

To start at column p (the column after the one last written), the VEC marks the columns
before p with a **reserved** slot (`TK_RESV`) instead of a free one (`TK_EMPTY`). In the
main rows a reserved slot counts as occupied, so the cells fill columns p, p+1, ...
A cell that leaves row i on the east side without finding a column has passed column
N-1. It then comes back around the *fold* into a short **wrap row** of switches for
columns 0..i-1. In the wrap rows a reserved slot counts as free, so wrapped cells fill
columns 0, 1, ... in order. The k-th valid cell of row order thus lands in column
(p + k) mod N. A cell of row i can need at most column i-1 after wrapping, so wrap row i
stops there and ends in a discard port, and row a needs no wrap row at all. The
`FOLDED` parameter of `swt` selects the wrap-row behaviour.

The array for N = 4 (`S` main-row switch, `W` wrap-row switch, `nD` n delay registers,
`x` discard port):

```
                    A        B        C        D
                    |        |        |        |      free/reserved slots from the VEC
 a  ---------------[S]------[S]------[S]------[S]--->x
 b  ---[1D]--------[S]------[S]------[S]------[S]---> east exit of b -> wrap b
 c  ---[2D]--------[S]------[S]------[S]------[S]---> east exit of c -> wrap c
 d  ---[3D]--------[S]------[S]------[S]------[S]---> east exit of d -> wrap d
                    |        |        |        |
                  [1D]     [2D]     [3D]       |      column delays (j+1)
                    |        |        |        |
 wrap b  ----------[W]->x    |        |        |
 wrap c  ----------[W]------[W]->x    |        |
 wrap d  ----------[W]------[W]------[W]->x    |
                    |        |        |        |
                  [2D]     [1D]       |      [3D]     output alignment
                    |        |        |        |
                 FIFO A   FIFO B   FIFO C   FIFO D
```

Column j passes all N main rows, then j+1 delay registers, then wrap rows j+1..N-1. The
delays keep the column in step with the wrapped cells, which had to travel the whole
row first. The columns then leave the array at different clocks. Output delays of
N-2-j registers (6, 5, 4, 3, 2, 1, 0 for columns A..G at N = 8; column H, which has no
wrap row, gets N-1) align them again. All columns reach the FIFOs on one clock,
3N-2 clocks after row a's header entered.

### The pointer, without arithmetic

The VEC keeps p as a one-hot register. On the clock the aligned slot reaches the FIFOs,
the bank reports `acc[j]`: FIFO j took a cell. The FIFOs that took a cell always form one
cyclic run starting at p, so the new pointer is simply the column j with `acc[j-1]=1`
and `acc[j]=0`. If the run is empty or covers all columns, p stays. The "before p"
mask is a prefix-OR of the one-hot pointer. No adder or counter appears anywhere in
the BDN's routing.

Because the pointer for slot s+1 depends on where slot s ended, a slot must last at least
3N-1 clocks (23 at N = 8; an ATM cell of 53 bytes on 8-bit links is 53 clocks). The
array itself holds no state beyond its pipeline registers.

### Worked example (N = 8)

Slot 1 carries valid cells on a, c, d, e, g, h, and the pointer is at A. They land on
A, B, C, D, E, F and the pointer moves to G. Slot 2 carries a, d, e, h. Cells a and d
land on G and H. Cells e and h leave their main rows unplaced, wrap, and land on A and
B. The pointer moves to C. Afterwards FIFOs A and B hold two cells and C..H one. With
N = 5, slots {b,d,e}, {a,c,e}, {a,b,c,d} go to {A,B,C}, {D,E,A}, {B,C,D,E}.

## FIFO bank and overflow

Each `cell_fifo` is a word array of `DEPTH × CELL_WORDS` entries. Empty and reserved
slots are not written; this is where the empty cells leave the stream. Admission is
decided once, on the header. A cell is taken if the FIFO holds fewer than `DEPTH` cells,
otherwise it is dropped and `drop[j]` pulses. A cell becomes readable once its last word
is in, and its space is freed once its last word is read.

Overflow is the only way a cell is lost. It keeps the order intact. All FIFOs check
space on the same clock. Their levels differ by at most one cell, and the higher ones
are the FIFOs from the read pointer up to the write pointer. So when the bank is short
of room, the cells accepted from a slot are again a cyclic run from p, and the ones
lost are the last ones of the slot. The pointer moves only over the accepted cells,
and the next slot continues the round robin without a hole.

## RMUX

The RMUX keeps a read pointer q to the FIFO with the oldest cell. When `out_ready` is
high and FIFO q has a complete cell, a slot starts on the next clock. Output link k
takes the head cell of FIFO (q + k) mod N, as long as that FIFO and all before it have
a cell, and q moves past the FIFOs read. The words are read straight from the FIFO
arrays. A new slot can start right after the last word of the previous one. The output
rate is therefore set by how often the output side raises `out_ready`, which is how the
buffer adapts to a slower or narrower output.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N` inputs = FIFOs | 8 | the 8×8 network of the architecture |
| `M` outputs | 8 | chosen (MIMO configuration); 1 or 2 give the single-output and concentrator variants |
| `W` word width | 8 | chosen; the architecture keeps the link width symbolic |
| `CELL_WORDS` | 53 | chosen: a 53-byte ATM cell on 8-bit words |
| `DEPTH` cells per FIFO | 16 | chosen |

Constraints: N ≥ 2, `CELL_WORDS` ≥ 3N-1, 1 ≤ M ≤ N.

At the defaults the buffer moves N·W = 64 bits per clock in and out. A 10.6 Gb/s
aggregate rate needs about 166 MHz, and an OC-192 line (9.953 Gb/s) about 156 MHz. A
larger N or W lowers the clock needed. In the crossbar every path runs through one
2-by-2 switch between registers, whatever N is. The paths that grow with N are in the
controllers. One is the VEC's reserved-slot mask, an N-bit prefix OR of the pointer.
The other is the accept decision, from the FIFO levels through the pointer update.

## What is taken from the architecture, and what is this design's own

Taken from the original architecture: the three stages and their roles; the pack-and-shift
function with round-robin balance and order preservation; the 2-by-2 switch with cross
and toggle modes and the rule for valid/empty arrivals; empty cells always routed east
and discarded; the row stagger of 0..N-1 clock delays; the vertical controller with an
empty-cell generator and the state of the last shift; the folded crossbar with its wrap
loops and discard ports; the output delays 6D..1D on columns A..F; adder-free load
balancing; and the RMUX and its one- and two-output variants.

This design's own choices, where the original gives no detail:

* the third slot kind `TK_RESV`, and the rule that main rows treat it as occupied and
  wrap rows as free. This is how the cyclic shift is realised here;
* the exact placement of the wrap rows below the main rows, the j+1 column delays and
  the delay of N-1 on the last column (the original drawing shows none under its last
  column; its internal timing is not given);
* the pointer update by neighbour comparison of the accept bits, and the pointer
  naming the column after the last one written;
* cells as multi-word bursts with a header flag, and a switch mode held per cell;
* the FIFO organisation, header-time admission, tail drop on overflow, and
  store-and-forward reading;
* the RMUX's contiguous-run rule and its `out_ready` slot handshake;
* all widths and sizes except N; reset is asynchronous, active low.

Not built: the circuit-level implementation (dynamic CMOS) behind the quoted 10.6 Gb/s
figure, and the pipelined priority queue mentioned as related work. Neither is
specified at a level that RTL could follow.

## Files

| file | content |
|---|---|
| `rtl/mimo_pkg.sv` | slot kinds (`tok_e`) and the per-word control record (`ctl_t`) |
| `rtl/delay_line.sv` | n-register delay chain (the "nD" elements) |
| `rtl/swt.sv` | switching element |
| `rtl/hoc.sv`, `rtl/vec.sv` | horizontal and vertical controllers |
| `rtl/bdn_xbar.sv` | folded crossbar: main rows, wrap rows, column and output delays |
| `rtl/bdn.sv` | BDN = HOC + VEC + crossbar |
| `rtl/cell_fifo.sv`, `rtl/fifo_bank.sv` | cell FIFO and the bank of N |
| `rtl/rmux.sv` | rotating multiplexer |
| `rtl/mimo_buffer.sv` | top |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. It also has
a watchdog. For example, the end-to-end test at the default sizes:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mimo_pkg.sv rtl/mimo_buffer.sv \
          tb/tb_mimo_buffer.sv --top-module tb_mimo_buffer -Mdir obj -o sim
./obj/sim
```

For another testbench, swap in its file and top. The package must come first.

* `tb_mimo_buffer`: all defaults. It checks the minimum latency, replays the 8×8 example
  above (pointer and FIFO levels), then runs random traffic with a slow output
  (overflow) and a fast one. It checks that every output cell is intact and in order,
  and that every missing cell was reported as dropped. It counts wrap-arounds,
  all-valid slots, empty cells removed, drops, partial output slots, idle output cycles
  and back-to-back slots, and fails if any never happened.
* `tb_bdn`: 400 random slots through the BDN against a reference model of
  pack-and-shift. It also plays a bank that sometimes accepts only the first cells
  of a slot, and checks the pointer and the 3N-2 latency.
* `tb_mimo_variants`: the single-output (M = 1) and two-output concentrator (M = 2)
  variants at N = 8, under load heavy enough to overflow. It checks order, cell
  contents and the drop count.
* `tb_mimo_two_stage`: two buffers in cascade (8 to 4 links, then 4 to 2), the
  output slots of the first being the input slots of the second. Order and contents
  are checked end to end.
* `tb_bdn_xbar`: the crossbar alone at N = 5, with the 5-port example above and random
  slots.
* `tb_swt`, `tb_hoc`, `tb_vec`, `tb_cell_fifo`, `tb_fifo_bank`, `tb_rmux` (N = 5,
  M = 2): unit tests with independent models.

Assertions in the RTL check the systolic alignment of every switch and of the FIFO
inputs, slot spacing, the one-hot pointer, and the FIFO read/write protocol.

## Limits

* The time-slot length must be at least 3N-1 clocks, so very short cells on wide links
  need a larger `CELL_WORDS` per slot or a smaller N.
* A cell is readable only once completely written (store-and-forward per FIFO).
* The design was checked in simulation only. No timing closure or silicon results exist
  for this RTL.

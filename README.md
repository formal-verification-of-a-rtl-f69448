# Block-RAM FIFO with a last-free-block flag

A first-in first-out buffer for queuing data between units of a
high-speed network monitoring pipeline on an FPGA. It stores its words in
on-chip block RAM. It has the usual `EMPTY` and `FULL` flags and one more:
`LSTBLK`, the *last free block* flag.

A writer that produces data in bursts of `BLOCK_SIZE` words can look at
`LSTBLK` before it starts a burst. While `LSTBLK` is low, more than one
block of space is free, so a whole burst fits. When `LSTBLK` is high, at
most one block of space is left. The flag is only worth having if it is
exact, and the cheap ways of computing it are not exact. Most of this
document is about that flag.

## The interface

```
            +-----------------+
   CLK  --->|                 |
   RESET -->|                 |
   WR   --->|            FULL |---> high iff ITEMS words are stored
   DI   ===>|          LSTBLK |---> high iff ITEMS - stored <= BLOCK_SIZE
   RD   --->|              DV |---> DO holds a word just read
   DO   <===|           EMPTY |---> high iff nothing is stored
            +-----------------+
```

Parameters of `fifo_bram`:

| parameter    | default | meaning |
|--------------|---------|---------|
| `ITEMS`      | 64      | capacity in words; need not be a power of two (at least 2) |
| `BLOCK_SIZE` | 4       | words per block; `LSTBLK` threshold (1 .. `ITEMS`) |
| `BRAM_TYPE`  | 18      | data width of one block RAM column |
| `DATA_WIDTH` | 16      | word width of `DI` and `DO` |

Rules. Everything happens on the rising edge of `CLK`.

* **Write.** A write is taken in a cycle with `WR` high and `FULL` low.
  `DI` is stored. A write while `FULL` is ignored.
* **Read.** A read is taken in a cycle with `RD` high and `EMPTY` low. A
  read while `EMPTY` is ignored.
* **Both.** A read and a write can both be taken in the same cycle, at any
  fill level. They never touch the same memory word: the two addresses are
  equal only when the FIFO is empty or full, and then one of the two
  operations is refused.
* **Read data.** The word read appears on `DO` one cycle after the read was
  taken. `DV` is high in exactly that cycle. `DO` keeps its last value
  while `DV` is low.
* **Flags.** `EMPTY`, `FULL` and `LSTBLK` are registers. They change on the
  edge that ends the cycle in which an operation was taken. They are exact
  in every cycle: no flag is early, late or conservative.
* **Reset.** `RESET` is synchronous and active high. It empties the FIFO
  and clears `DV` and `DO`.

Example with `ITEMS = 16` and `BLOCK_SIZE = 4`. The reader is stopped at
address `1011`, and one word is written per cycle, starting with seven
free words. Each row is one cycle:

| write address | free words | `LSTBLK` | `FULL` |
|---------------|-----------:|:--------:|:------:|
| 0100          | 7          | 0        | 0      |
| 0101          | 6          | 0        | 0      |
| 0110          | 5          | 0        | 0      |
| 0111          | 4          | 1        | 0      |
| 1000          | 3          | 1        | 0      |
| 1001          | 2          | 1        | 0      |
| 1010          | 1          | 1        | 0      |
| 1011          | 0          | 1        | 1      |

## The last-free-block flag

By definition, `LSTBLK` is high exactly when `ITEMS - count <= BLOCK_SIZE`.
The two obvious cheap ways of computing it both break that rule. They are
described here because they are the natural thing to try when changing the
module.

**Comparing the block parts of the addresses.** Split each address into a
block number (its upper bits) and an offset. Then raise `LSTBLK` when the
block after the write pointer's block is the read pointer's block. This
costs almost nothing, but it tracks the block boundaries, not the free
space. Take the example above with blocks of four. As the write pointer
moves from block `01` into block `10`, the read pointer's block, the
comparison stops matching and the flag drops. At that point only three
words are free. It stays low until the FIFO is full. A writer that trusts
it then starts a burst that cannot fit. Bounds that still hold for this
scheme: the flag is never high with more than two blocks free, and it is
high at some point before fewer than one block is free. It can still
fall again, though.

**The upper bits of a free-space counter.** Keep a register with the
number of free words and raise `LSTBLK` when its bits above
`log2(BLOCK_SIZE)` are all zero. That computes `free <= BLOCK_SIZE - 1`,
not `free <= BLOCK_SIZE`. So the FIFO acts as if its blocks were one word
smaller: with exactly `BLOCK_SIZE` words free, the flag is still low.

**This design.** `fifo_bram_ctrl` keeps the free-space register
(`cnt_diff`, from `ITEMS` down to 0). It computes the next value of that
register from the operations taken this cycle. All three flags are then
registered from full comparisons of that next value:

```
empty  <= (cnt_diff_next == ITEMS)
full   <= (cnt_diff_next == 0)
lstblk <= (cnt_diff_next <= BLOCK_SIZE)
```

Because the flags are computed from the *next* count, they are correct in
the cycle after every operation, with no extra latency. The cost is one
counter of `clog2(ITEMS+1)` bits, one magnitude comparator against a
constant and three flip-flops. For the default size that comes to 22
flip-flops in the whole control block.

## Inside

```
fifo_bram
 |- fifo_bram_ctrl     address registers, free-space register, flags
 '- bram_sdp x NCOL    block RAM columns, NCOL = ceil(DATA_WIDTH / BRAM_TYPE)
```

* **`fifo_bram_ctrl`** accepts or refuses the requests. It moves the write
  and read address registers, which wrap from `ITEMS-1` to 0, and keeps
  `cnt_diff` and the flags. Its outputs `wr_en`/`waddr` and `rd_en`/`raddr`
  drive the memory. It contains two concurrent assertions. The first says
  an accepted read and an accepted write never use the same address. The
  second says the free count stays within `0..ITEMS`.
* **`bram_sdp`** is one column of simple dual-port memory with a
  synchronous write port. Its read port is registered, with one cycle of
  latency, and holds its output while not enabled. Synthesis tools map it
  to block RAM.
* **Columns.** `BRAM_TYPE` sets the data width of one column. A word wider
  than a column is split across several columns side by side, all sharing
  the same addresses. Unused top bits of the last column are written as
  zero and not read. The default of 18 puts a 16-bit word into a single
  18-bit column.
* **`DV`** is `rd_en` delayed by one register. An assertion in `fifo_bram`
  checks that `DV` never rises without a read taken in the cycle before.

## How it is checked

Every testbench prints `TB_RESULT checks=N failures=M`. Each one stops
itself with a watchdog if it hangs.

| testbench | what it does |
|-----------|--------------|
| `tb_bram_sdp` | Memory column: fills it, then does random reads with a latency check. Also checks that the output holds, that a read and write of one address returns the old word, and that reset clears the output. |
| `tb_fifo_bram_ctrl` | Control block at its defaults, under random fill, drain and mixed traffic. Compares every output in every cycle with an independent model of the addresses and the free count. |
| `tb_fifo_bram` | Whole FIFO at default parameters. Random traffic with a reference queue for the data and a `DV` timing check. Counts how often each mechanism happened: write refused while full, read refused while empty, read and write in one cycle, `LSTBLK` rising and falling, address wrap-around, reset with data inside. A mechanism that never happened counts as a failure. |
| `tb_fifo_bram_fig4` | Replays the example above at `ITEMS = 16`. Checks the address sequence and the flags in every cycle, that a write is refused at full, and that the data drains in order. |
| `tb_fifo_bram_params` | Ten parameter sets run in parallel. They cover depths of 8 to 64, including 20 and 24; block sizes from 1 to the whole FIFO; column widths of 1, 2, 4, 9, 18 and 36; and data widths of 8, 16 and 32. |

The flag testbenches use an observer, `tb/fifo_env_model.sv`. It sits
outside the FIFO and keeps its own count of stored words from the
handshake alone: `+1` for `WR && !FULL`, `-1` for `RD && !EMPTY`. In every
cycle it checks these properties:

1. `FULL` iff count = `ITEMS`.
2. `EMPTY` iff count = 0.
3. `LSTBLK` iff `ITEMS - count <= BLOCK_SIZE`.
4. `LSTBLK` is low when more than two blocks are free.
5. `LSTBLK` is high when fewer than one block is free.
6. The count never goes below 0 or above `ITEMS`.

`fifo_bram_harness` adds reachability checks. From the state left by
every traffic phase, the FIFO must still be able to become full, reach its
last block, and become empty.

All of this is simulation with random and directed stimulus, not a proof.
The properties above are written so they can be handed to a formal tool
as they are.

## Choices beyond the basic specification

The port list, the 16-bit data width, the four parameters and the exact
definitions of `EMPTY`, `FULL` and `LSTBLK` are the specification. The free
words are counted in a register rather than derived from the addresses.
Everything below is this implementation's own choice:

* Default `ITEMS = 64`, which gives six address bits. `BLOCK_SIZE = 4` is
  the block size of the worked example.
* `BRAM_TYPE` as the width of one memory column. The original names the
  parameter without defining it. The block RAM is a generic inferred
  memory, not a vendor primitive.
* One cycle of read latency. `DV` is a one-cycle pulse per word, and `DO`
  holds between reads.
* Synchronous, active-high reset.
* Registered, exact flags; the original does not fix their timing.
* Requests that cannot be served (write while full, read while empty) are
  dropped without any error indication.

## Simulating

All files are plain SystemVerilog-2017. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_fifo_bram tb/tb_fifo_bram.sv
./obj_dir/Vtb_fifo_bram
```

Replace `tb_fifo_bram` with any testbench name from the table. All of them
run in well under a second. Inputs in the testbenches change on the
falling clock edge. The observer and the reference models sample on the
rising edge.

To change the FIFO, override the parameters on `fifo_bram`. The
elaboration-time checks reject `ITEMS < 2` and `BLOCK_SIZE` outside
`1..ITEMS`.

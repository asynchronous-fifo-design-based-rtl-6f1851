# Asynchronous FIFO with Gray-coded pointers

This FIFO carries 8-bit words from a circuit clocked by `wr_clk` to a
circuit clocked by `rd_clk`. The two clocks are unrelated. The hard part is
not storing the data. The hard part is telling the writer when the buffer is
full and the reader when it is empty. Each side only knows the other side's
position through a synchronizer, so that knowledge is always a little out of
date. The design solves this in three steps:

* Each pointer is one bit wider than a RAM address.
* Each pointer is sent across in Gray code, through two flip-flops.
* Each side compares its own up-to-date pointer with the other side's
  delayed pointer.

The flags this produces can only be too cautious, never too late. The FIFO
can say "full" or "empty" for a couple of cycles longer than it should. It
can never let a write overrun a word that has not been read, or let a read
return a word that has not been written.

The default size is 8 words of 8 bits, with 4-bit pointers. Both are
parameters.

## Parts

```
            wr_clk domain                          rd_clk domain
  data_in ──► dpram (8 x 8) ─────── combinational read ──► rd_ctrl ──► data_out
  wr_en ───► wr_ctrl ── wr_addr/ram_we ──►              rd_addr ◄──  rd_en
              │  wr_ptr_g ───► ptr_sync (2 rd_clk flops) ──► wr_ptr_g_d2 ──► empty
   full ◄─────┘  rd_ptr_g_d2 ◄── ptr_sync (2 wr_clk flops) ◄── rd_ptr_g
```

| module           | clock(s)          | role |
|------------------|-------------------|------|
| `async_fifo`     | both              | top level; wires the four parts below |
| `dpram`          | `wr_clk`          | `DEPTH x DATA_W` array; synchronous write, combinational read |
| `wr_ctrl`        | `wr_clk`          | write pointer, RAM write strobe and address, `full` |
| `rd_ctrl`        | `rd_clk`          | read pointer, RAM read address, registered `data_out`, `empty` |
| `ptr_sync`       | both              | one two-flop synchronizer per direction (`sync_2ff`) |
| `async_fifo_pkg` | none              | default sizes, `bin2gray()`, `gray_full()` |

## Pointers: the extra bit

For `DEPTH = 8`, each pointer has 4 bits. The low 3 bits (`wr_addr`,
`rd_addr`) select the RAM word. The top bit flips each time the pointer
wraps around. So after reset:

* The pointers are equal when the reader has caught up with the writer.
  The FIFO is **empty**.
* The low bits are equal but the top bit differs when the writer is one
  whole lap ahead. The FIFO is **full**.

In binary that would be the whole rule. But a binary counter can change
several bits at once (0111 → 1000). A synchronizer that samples it during
that change can capture a value that was never there. So each pointer is
converted to Gray code, `g = b ^ (b >> 1)`, before it crosses. Counting up
by one then changes exactly one bit. A sample taken mid-change gives either
the old value or the new one, and both are safe.

In Gray code, "one lap ahead" looks different from binary. With 4 bits, the
pointers 0 and 8 are `0000` and `1100`. They differ in the **top two**
bits, not only the top one. So:

* `full  = (wr_ptr_g == rd_ptr_g_d2 with its two top bits inverted)`
* `empty = (rd_ptr_g == wr_ptr_g_d2)`

Both flags are combinational. Each compares a domain's own Gray pointer
with the other pointer after two of its own clock edges.

## Why the flags are safe, and what "false full/empty" means

The pointer that reaches the write domain (`rd_ptr_g_d2`) shows where the
reader was two or three `wr_clk` edges ago. The reader only moves forward,
so this is an under-estimate of how much space has been freed. `full` may
therefore stay high after the reader has already taken a word: a **false
full**. It can never be low while the FIFO really holds `DEPTH` words.

The read side mirrors this. `wr_ptr_g_d2` under-estimates how much has been
written, so `empty` may stay high while a word is already stored: a **false
empty**. The read side never reads a word that is not there.

The cost is throughput and a little effective capacity near the two limits.
It never costs correctness. The end-to-end testbench counts thousands of
false full and false empty cycles under random traffic. It also checks that
the true state is never missed.

## Timing

* **Write.** At a rising `wr_clk` edge with `wr_en = 1` and `full = 0`,
  `data_in` is stored and the write pointer advances. A request while
  `full = 1` is dropped. The writer must hold or repeat it.
* **Read.** At a rising `rd_clk` edge with `rd_en = 1` and `empty = 0`,
  the oldest word is loaded into `data_out` and the read pointer advances.
  `data_out` keeps that word until the next accepted read. A request while
  `empty = 1` is dropped.
* **Flag latency.** The first write into an empty FIFO clears `empty` after
  2 `rd_clk` edges, or 3 if the edges line up badly. A read from a full
  FIFO clears `full` after 2 to 3 `wr_clk` edges. The testbench checks both
  bounds.
* **Reset.** `wr_rst_n` and `rd_rst_n` are asynchronous and active low.
  Each one clears its own domain's pointer and its own synchronizer stages.
  `rd_rst_n` also clears `data_out`. Assert both together to empty the
  FIFO. Resetting only one side is not supported. The RAM itself is not
  reset.

`DEPTH` must be a power of two, at least 2. `DATA_W` can be any width.

## Relation to the published design

The structure, sizes, pointer widths, Gray conversion, two-stage
synchronizers, flag equations and reset style follow the published design
of this FIFO. The following are choices made here:

* The RAM is a module of its own with a combinational read port. In the
  original, the write control writes the array directly and the read
  control reads it into `data_out`. The behaviour at the ports is the same.
* The empty comparison is written as plain equality of the Gray read
  pointer and the synchronized Gray write pointer. The original states this
  rule and shows it in its waveforms.
* Gray conversion uses `b ^ (b >> 1)`, where each lower Gray bit is the XOR
  of two neighbouring binary bits. The original also gives a prose
  description of the lowest Gray bit that does not match this. The
  waveform values (binary 8 shown as Gray `1100`) match the formula used
  here.
* `data_out` is reset to zero. In the original it is not reset.
* Widths are parameters, and the full test inverts the top two Gray bits
  for any power-of-two depth.
* Assertions are added in `wr_ctrl` and `rd_ctrl`. They check that the
  pointer never moves while `full` or `empty` is high. They also check that
  each Gray pointer changes by at most one bit per clock.

No vendor synchronizer cells or timing constraints are included. On real
silicon or an FPGA, the two `sync_2ff` instances need the usual CDC
treatment: keep the two flops close together, and limit the skew between
the bits of the Gray bus (for example with a max-delay constraint).

## Testbenches

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench             | what it exercises |
|-----------------------|-------------------|
| `dpram_tb`            | fill, then random writes (some disabled) and reads against a shadow array |
| `wr_ctrl_tb`          | pointer, Gray code, strobe and `full` against a modelled reader position, including blocked writes and wrap |
| `rd_ctrl_tb`          | pointer, `empty` and `data_out` against a modelled writer and RAM |
| `ptr_sync_tb`         | exact two-edge delay on both paths with unrelated clocks; per-domain reset |
| `async_fifo_tb`       | end to end at the default size: scoreboard, five clock ratios, flag latencies, false flags, wrap, reset |
| `async_fifo_paper_tb` | three fixed scenarios at the default size: fill 8 words to full (Gray `1100` against `0000`), drain to empty (`1100` against `1100`), then slow writes with fast reads showing a false empty |

To simulate one testbench with Verilator 5, run this from the repository
root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/async_fifo_pkg.sv \
          tb/async_fifo_tb.sv -y rtl --top-module async_fifo_tb
./obj_dir/Vasync_fifo_tb
```

Replace `async_fifo_tb` with any other testbench name. Each one runs in
well under a second.

# Prefetch (first-word-fall-through) asynchronous FIFO

A FIFO that crosses between two unrelated clocks, with a read port that keeps
the next word ready. In an ordinary FIFO, the consumer asserts a read
and gets the word one clock later. Here the oldest word is already on
`fifo_dout` whenever `fifo_empty` is low. A read consumes that word at the
clock edge that samples it, and the following word is in place right after
that edge. The consumer never waits a cycle for data, and continuous reading
runs at one word per read clock.

The design is built in two layers:

1. An ordinary asynchronous FIFO, 16 words of 16 bits by default. It uses a
   register RAM, Gray-coded pointers and two-flop synchronizers, and has
   registered full and empty flags. Its read data is registered, so data shows
   one edge after the read.
2. A prefetch stage (`fwft`) in the read clock domain. It has an enable
   controller and an output register. The controller reads the ordinary FIFO
   ahead of demand. The output register holds the word shown to the user.

```
            write clock domain                 |          read clock domain
                                               |
 wr_n_i ──►┌──────────────────────────────── async_fifo ─────────────────────────┐
 wr_data_i►│ gray_ptr (write) ──waddr──► fifo_mem ──rdata──► [rdata reg] ────────┼─► fifo_dout_i ─┐
 fifo_full◄│ full_flag ◄── sync_2ff ◄──── rptr (Gray) ◄───── gray_ptr (read) ◄──┼── fifo_rd_n_o ◄┤  fwft
           │        wptr (Gray) ──────────► sync_2ff ──► empty_flag ───────────┼─► fifo_empty_i ┘  (enable controller
           └───────────────────────────────────────────────────────────────────┘                   + output register)
                                                                                     rd_n_i ──► fwft ──► fifo_dout
                                                                                                     ──► fifo_empty
```

## Files

| file | module | role |
|---|---|---|
| `rtl/fifo_pkg.sv` | package | default sizes, Gray-code helper |
| `rtl/fifo_mem.sv` | `fifo_mem` | dual-port register RAM: synchronous write, combinational read |
| `rtl/gray_ptr.sv` | `gray_ptr` | pointer counter: binary RAM address, Gray pointer `g`, look-ahead `ginc` |
| `rtl/sync_2ff.sv` | `sync_2ff` | two-flop synchronizer for a Gray pointer |
| `rtl/full_flag.sv` | `full_flag` | registered full flag (write clock) |
| `rtl/empty_flag.sv` | `empty_flag` | registered empty flag (read clock) |
| `rtl/async_fifo.sv` | `async_fifo` | ordinary asynchronous FIFO built from the above |
| `rtl/fwft.sv` | `fwft` | prefetch stage: enable controller and output register |
| `rtl/prefetch_fifo.sv` | `prefetch_fifo` | top: `async_fifo` followed by `fwft` |

## Top-level interface (`prefetch_fifo`)

| port | dir | width | meaning |
|---|---|---|---|
| `wclk`, `wrst_n` | in | 1 | write clock; write-domain reset (asynchronous, active low) |
| `wr_n_i` | in | 1 | write strobe, **active low**, sampled on rising `wclk` |
| `wr_data_i` | in | `DATA_W` | write data |
| `fifo_full` | out | 1 | the RAM holds `DEPTH` words; writes are ignored while high |
| `rclk`, `rrst_n` | in | 1 | read clock; read-domain reset (asynchronous, active low) |
| `rd_n_i` | in | 1 | read strobe, **active low**, sampled on rising `rclk` |
| `fifo_dout` | out | `DATA_W` | oldest word; valid whenever `fifo_empty` is low |
| `fifo_empty` | out | 1 | no word on `fifo_dout`; reads are ignored while high |

Parameters: `DATA_W = 16`, `DEPTH = 16`. `DEPTH` must be a power of two, and
an elaboration-time assertion in `async_fifo` checks this.

Usage rule: a read is "taken" at a rising `rclk` edge where `rd_n_i` is low
and `fifo_empty` is low. The word consumed is the one on `fifo_dout` just
before that edge. Use it like a valid/ready interface where
`valid = !fifo_empty` and `ready = !rd_n_i`.

## The prefetch stage

This is the part that differs from a textbook asynchronous FIFO. The ordinary
FIFO underneath is a standard-read FIFO: a read at edge *k* puts the word on
its `rdata` register after edge *k*. To hide that cycle, `fwft` keeps two
valid bits:

* `fifo_valid`: the ordinary FIFO's output register holds a word that has
  been read from the RAM but not yet moved on;
* `out_valid`: the output register (`fifo_dout`) holds a word; `fifo_empty = !out_valid`.

The enable controller computes, combinationally in each cycle:

```
rd       = !rd_n_i
load_out = fifo_valid & (!out_valid | rd)           // output register takes fifo_dout_i
fifo_rd  = !fifo_empty_i & (!fifo_valid | load_out) // read the ordinary FIFO (fifo_rd_n_o = !fifo_rd)
```

At the rising edge:

```
fifo_valid <= fifo_rd ? 1 : (load_out ? 0 : fifo_valid)
out_valid  <= load_out ? 1 : (rd ? 0 : out_valid)
fifo_dout  <= load_out ? fifo_dout_i : fifo_dout
```

The FIFO is read whenever its output register will be free after the edge.
That is the case when it is empty now, or when its word moves into the output
register at this same edge. Because of this, once both stages are full, a read
on every cycle refills both stages every cycle: one word per clock, with no
bubble. When the user stops reading, nothing moves. The ordinary FIFO holds
its `rdata` register while it is not read, so no extra skid buffer is needed.
Note that `fifo_rd_n_o` depends combinationally on `rd_n_i`.

Timing, with both clocks equal and aligned (checked by the testbenches):

| event | edges of `rclk` after the write edge |
|---|---|
| write pointer through the two-flop synchronizer | 2 |
| `empty_flag` (`fifo_empty_i`) falls | 3 |
| ordinary FIFO read, `fifo_valid` set | 4 |
| output register loaded, `fifo_empty` falls | 5 |

Compared with the ordinary FIFO, the word is already waiting when the read is
issued. The ordinary FIFO needs one edge between request and data. The
prefetch FIFO needs none.

Capacity: `fifo_full` reflects the RAM only. Two more words can sit in the
prefetch stage: one in the ordinary FIFO's output register, one in
`fifo_dout`. So with the reader idle the whole path accepts `DEPTH + 2` = 18
words before writes are dropped.

## The clock-domain crossing

* **Pointers.** `gray_ptr` keeps an `ADDR_W+1` bit binary count. The low bits
  address the RAM, and the top bit flips on every wrap. The same count, Gray
  coded (`b ^ b>>1`), is the pointer sent to the other domain. The RAM is
  addressed with the binary count, not with the low Gray bits. The low four
  bits of a five-bit Gray count revisit an address at the half-way wrap, so
  they cannot serve as the address.
* **Synchronizers.** `sync_2ff` has two flip-flops per bit in the receiving
  domain. Only one Gray bit changes per increment. A sample taken mid-change
  therefore yields either the old or the new pointer, never a wrong one.
* **Flags.** Both flags are computed from the *next* pointer value (`ginc`)
  and registered. The flag is therefore exact in the cycle the local pointer
  moves:
  * empty: `rgraynext == rq2_wptr`;
  * full: `wgraynext == {~wq2_rptr[MSB:MSB-1], wq2_rptr[MSB-2:0]}`, meaning
    the writer is one lap ahead.

  Each flag clears two or three edges after the far side moves. This is
  conservative: it can block a write or a read for a few cycles, but it never
  lets one overrun.
* **Resets.** Each domain has its own asynchronous active-low reset. Pointers
  and synchronizers reset to zero, `empty` to 1, `full` to 0, and the data
  registers to zero. The RAM array is not reset. Release both resets together,
  while neither side is accessing the FIFO.

## Where this RTL makes its own choices

The overall structure is taken as given: RAM, two pointer blocks, two
synchronizers, full and empty logic, then an enable controller and output
register for the prefetch. So are the 16 x 16 size, the two-flop Gray-code
synchronization and the port names of the prefetch stage. The following
points are this implementation's own:

* the exact full/empty equations, which are the standard Gray-pointer
  comparisons;
* the valid-bit scheme and equations of the prefetch stage;
* the registered read data of the ordinary FIFO, chosen to match its
  one-beat read latency;
* active-low strobes at the top (`wr_n_i`, `rd_n_i`). The reference waveforms
  instead use active-high `fifo_wr`/`fifo_ren` and an active-high `rst`, on a
  single clock. Invert at the boundary if you need that convention;
* the separate write and read clocks and resets;
* full and empty never reset the FIFO. They only block writes and reads, so
  no stored data is lost;
* there is no used-words count output. Only the full and empty status flags
  are provided.

Metastability itself cannot be shown in a two-state simulation. The
testbenches check the logic of the crossing: pointer order, flags and data
integrity under unrelated clock periods. They do not check the analog
behaviour.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fifo_mem` | every address written and read back against a reference array; disabled writes |
| `tb_gray_ptr` | address, Gray pointer and `ginc` against a reference count; exactly one bit changes per step; wrap |
| `tb_sync_2ff` | two-edge delay of random data; reset |
| `tb_full_flag` / `tb_empty_flag` | flag equals the binary-distance test (distance `DEPTH` / 0) for random Gray pointer pairs |
| `tb_async_fifo` | scoreboard under five clock ratios and loads; standard-read latency; never more than `DEPTH` words; write-to-empty-low latency of 3 edges |
| `tb_fwft` | the prefetch stage against a behavioural standard-read FIFO: order, 2-edge fall-through, one word per clock on continuous read, never reads an empty FIFO |
| `tb_prefetch_fifo` | whole design at default size: 1-, 2- and 3-word write/read sequences (1111, 2222, 3333), 5-edge latency, fill to `DEPTH+2`, dropped writes, full-rate drain, random traffic with unrelated clocks; each mechanism must occur at least once |
| `tb_read_latency` | ordinary and prefetch FIFO side by side: one edge of wait against none, on the same workloads |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_prefetch_fifo rtl/fifo_pkg.sv tb/tb_prefetch_fifo.sv
./obj_dir/Vtb_prefetch_fifo
```

All testbenches finish in well under a second of wall time. The unit
testbenches set their block's parameters to the default values explicitly.
`tb_prefetch_fifo` uses the top with no parameter overrides.

## Changing the size

`DATA_W` and `DEPTH` are parameters of `prefetch_fifo` and `async_fifo`; the
address and pointer widths follow (`ADDR_W = $clog2(DEPTH)`). The prefetch
stage is independent of `DEPTH`. Synthesis maps `fifo_mem` to a memory with a
combinational read port followed by a register. That pattern suits distributed
or LUT RAM. For block RAM, move the read register into the memory.

# ZORO: an open-row-oriented request scheduler

Most DRAM controllers schedule first-ready, first-come-first-served
(FR-FCFS). They serve requests to a bank's open row before anything else,
because a row hit skips the precharge and activate steps. A controller can
only pick from what is already in its queue, though. ZORO sits in front of
the controller, on the CPU side, and reorders requests before the controller
sees them. It guesses which row the controller has open, lets through requests
to that row, and holds the rest back for a while. The intent is to hand the
controller runs of same-row requests: more row hits and fewer activations.

This repository is a synthesizable SystemVerilog version of that scheduler.
The scheduling rule comes from the published algorithm. The hardware
choices needed to make it a circuit are spelled out below. These are the
buffer size, one transfer per cycle, the port priority, the address-to-row
mapping and the reset state.

## The rule

The scheduler keeps one **guessed open row**, which is the row of the last
transaction it sent. It never sees the controller's real state.

When a new transaction arrives:

* if it is in the guessed row, it is sent to the controller at once;
* otherwise it goes into the **ZORO buffer** with a retry count of zero.

Every clock cycle the **buffer check** looks at every buffered transaction:

* in the guessed row: it may be sent;
* not in the row, and its retry count has reached `MAX_RETRIES`: it may be
  sent anyway (it has *aged*);
* otherwise its retry count goes up by one and it stays.

Sending a transaction from another row, which in practice means an aged one,
moves the guess to that row. From then on, the buffered transactions of the
new row start to drain.

`MAX_RETRIES` trades row locality against waiting time. A small value
approaches plain in-order issue. A large value holds other-row requests back
longer, hoping more same-row requests will gather. The published evaluation
swept 1 to 15 and found DRAM activation energy lowest near 3 and read latency
lowest near 8. The default here is 3.

One known weakness is kept on purpose, because it is part of the algorithm as
published. A transaction outside the guessed row always waits its full
`MAX_RETRIES` cycles, even when the buffer holds nothing for the guessed row
and the controller is idle. With small caches this raised latency above a
plain controller in the original evaluation.

## From rule to circuit: one port, three candidates

The controller takes at most one transaction per cycle, but the rule can make
several transactions sendable in the same cycle. The port goes to the first
of these that exists:

1. the **oldest aged** buffered transaction;
2. the **oldest buffered** transaction in the guessed row;
3. the **new** transaction, if it is in the guessed row (the bypass).

Aged transactions go first so that `MAX_RETRIES` really does bound how long
an other-row request can be starved by a steady flow of same-row traffic.
Buffered row hits go before the new one because they are older. This also
keeps any two requests to the same address in their original order:

* same address means same row, so both are "in row" or "not in row" together;
* their retry counts rise together, and the older count is never the smaller;
* within each class the oldest is picked.

A new transaction that does not leave in its arrival cycle is put in the
buffer. That covers one that is not in the row, one that lost the port, and
one that arrived while `out_ready` was low. A sendable transaction that is
not picked keeps its state: an aged one stays aged (counters stop at
`MAX_RETRIES`), and one in the row never counts a retry.

### Timing

| event | cycles |
|---|---|
| new transaction in the guessed row, buffer has nothing to send, `out_ready` high | 0 (combinational, `in_*` to `out_*`) |
| new transaction in the guessed row, port busy | leaves from the buffer, at earliest the next cycle |
| new transaction outside the guessed row | at earliest `MAX_RETRIES + 1` cycles after it was accepted |

The `MAX_RETRIES + 1` comes from the buffer timing. A transaction pushed at
one clock edge is first checked in the next cycle, with count 0. It counts
up at the following `MAX_RETRIES` edges and is sendable in the cycle after
the last one.

After reset no row is known. Until the first transaction has been sent,
every transaction counts as in the row, so the first request goes straight
through. It does not wait out its retries.

## What a "row" is

The row identity is `addr[ROW_LSB +: ROW_W]` (see `zoro_pkg`). The defaults
assume an 8 GB single-rank DDR4 memory of x8 devices. That memory has 4 bank
groups of 4 banks, 65,536 rows and 1,024 columns, uses bursts of 8 on a
64-bit bus, and is mapped row : bank : bank group : column : offset from the
top bit down:

| bits | field |
|---|---|
| 32:17 | row (16 bits) |
| 16:15 | bank |
| 14:13 | bank group |
| 12:6 | column / burst (7 bits) |
| 5:0 | byte in the 64-byte burst |

So two transactions are "in the same row" when bits 32:13 match: the same
row of the same bank. Following the published scheme, there is a single
guessed row for the whole memory, not one per bank. For another memory or address
mapping, change `ADDR_W`, `ROW_LSB` and `ROW_W` in `zoro_pkg`.

## Interface of `zoro`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid`, `in_ready` | in / out | 1 | request handshake from the CPU side; `in_ready` = buffer not full |
| `in_txn` | in | 42 | `txn_t`: `addr` (33), `is_write` (1), `tag` (8) |
| `out_valid`, `out_ready` | out / in | 1 | request handshake to the memory controller |
| `out_txn` | out | 42 | the transaction sent |
| `out_kind` | out | 2 | `SEND_BYPASS`, `SEND_ROWHIT` (from buffer, in row) or `SEND_AGED` |
| `open_row`, `open_valid` | out | 20, 1 | the guessed row, and whether one is known |
| `buf_count` | out | 5 | buffer occupancy |

A transfer happens in a cycle where valid and ready are both high. `in_ready`
does not depend on `out_ready`. `out_*` is a request, not a held offer: while
`out_ready` is low, the transaction shown may change from one cycle to the
next, for example when an entry ages. A controller that needs a stable
offer would need a holding register in front of it. The scheduler does not
touch transactions. The `tag` field is carried so that a requester can match
responses after reordering. Write data is not carried; it would travel beside
the tag.

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 16 | buffer entries (not given by the published scheme) |
| `MAX_RETRIES` | 3 | buffer checks a transaction outside the guessed row waits before it may go |

## Blocks

```
            in_*                                         out_*
 CPU side ───────► zoro_txn_handler ─────────────────────────► memory controller
                      │   ▲    │ upd_row                          (FR-FCFS)
                 push │   │sel │
                      ▼   │    ▼
                  zoro_buffer   zoro_row_tracker
                  └ zoro_buffer_check ◄── open_row
```

* `zoro_pkg`: transaction type, row extraction, `send_kind_e`.
* `zoro_row_tracker`: the guessed-row register, plus the hit test for the new
  transaction.
* `zoro_buffer`: `DEPTH` registered entries with their retry counters. They
  are kept packed in arrival order, so entry 0 is the oldest. Removing an
  entry shifts the younger ones down. A push and a pop can happen in the
  same cycle. An assertion flags a push into a full buffer.
* `zoro_buffer_check`: combinational classification of every entry (in row,
  aged, counts a retry) and the oldest-first pick.
* `zoro_txn_handler`: the new-transaction decision and the port priority
  above. It also updates the guessed row with whatever is sent.
* `zoro`: the top, wiring the four together.

At the defaults the design synthesizes to roughly 800 word-level cells and
672 bits of buffer storage (16 entries × 42-bit transaction). It also has 58
flip-flops: the 21-bit guessed row and its valid bit, a 5-bit occupancy
count, and 16 two-bit retry counters.
The cost grows with `DEPTH`. Every entry compares its 20-bit row with the
guess every cycle, and the shifting buffer needs a `DEPTH`-wide multiplexer
per entry.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_zoro_row_tracker`: random updates and lookups against a model, and the
  reset state.
* `tb_zoro_buffer_check`: random buffer contents against a priority-search
  model.
* `tb_zoro_buffer`: random push/pop against a queue model. Includes a
  directed check of the `MAX_RETRIES + 1` aging delay.
* `tb_zoro_txn_handler`: every combination of control inputs against the
  decision table.
* `tb_zoro`: the whole scheduler at its default parameters, checked cycle by
  cycle against a reference model over 40,000 cycles of random traffic with
  back-pressure phases. It counts each mechanism and fails if any never
  occurs: bypass, buffered row hit, aged send, retry count, row switch,
  buffer-full stall, back-pressure, and an in-row request buffered because
  the port was taken. It also checks the first-after-reset pass-through and
  the aging delay.
* `tb_zoro_sweep`: the same synthetic trace through a plain path and through
  schedulers with `MAX_RETRIES` = 1, 3, 8, 15. Each path ends in
  `fr_fcfs_mc_model`, a behavioural FR-FCFS controller with 16 banks, a
  32-entry queue and fixed hit/miss service times. It checks that every
  request is served once and that the guessed row moves only on an aged send.
  It prints row hits, activations and mean read latency per path.

The sweep's trace interleaves six sequential streams that compete for the
same banks. On it the scheduler changes row hits and latency by well under
1%, in either direction. The original evaluation, with CoreMark under a full
system simulator, likewise saw small effects. The model's timings are round
numbers for comparison only, so its figures are not DDR4 predictions. That
CoreMark setup is not reproduced here.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/zoro_pkg.sv tb/tb_zoro.sv --top-module tb_zoro -o sim
./obj_dir/sim
```

Replace `tb_zoro` with any other testbench name. Lint the RTL with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/zoro_pkg.sv rtl/zoro.sv`.
The remaining warnings are harmless. They cover the low address bits that
`row_of` ignores, the buffer's `sel_idx` output that the top leaves open, and
the check's per-entry `in_row` and `aged` flags, which the buffer does not use.

## Where this departs from, or adds to, the published scheme

* **One transaction per cycle, with a fixed priority.** The published
  flowcharts send everything eligible in one pass.
* **Buffer size, address mapping, tag and handshakes** are this design's.
* **Reset:** with no row known, everything counts as in the row.
* **Counters saturate** at `MAX_RETRIES`, and a transaction in the row never
  counts a retry.
* **Not built**, because they were only proposed as future work:
  * sending an other-row request early when a sweep finds no same-row
    requests;
  * predicting the controller's row from how many same-row requests are
    still in flight.
* The memory controller, DRAM, CPU and caches are outside this design.

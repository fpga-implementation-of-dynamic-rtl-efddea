# Energy-aware SDRAM controller for an H.264/AVC encoder

A video encoder reads and writes SDRAM in a way that is mostly known in
advance: current macroblocks, reference search areas, reconstructed frames.
This controller is built around three ideas. First, it lays macroblocks out
so that one macroblock is always one SDRAM row. Second, it reorders accesses:
per-bank read and write queues, a priority that weighs waiting time, burst
length and read-over-write, and open-row hits ahead of everything else. It
does this without breaking read-after-write or write-after-write order.
Third, it postpones refresh as long as the SDRAM allows, and watches bus
activity to switch between open-page and close-page operation and to put the
SDRAM into power-down when it is idle.

The RTL follows the architecture of the FPGA memory controller described in
"FPGA Implementation of Dynamic Energy Efficient Memory Controller for a
H.264/AVC Application". That description gives the block structure, the
priority formula, the refresh urgency levels and the final precedence order.
It gives almost no sizes or timing values. Every width, depth, threshold and
timing value here is a choice of this implementation, and the section
"Departures and open points" lists them.

## Block map

```
 encoder port ─┐
               ├─► addr_gen ──► dyn_scheduler ─────────────► final_select ──► sdram_cmd_gen ──┐
 mb_order_gen ─┘   (MB → bank/   ┌ bank b: read queue  ┐     (5-level        (PRE/ACT/RD/WR,   │
                    row/col,     │         write queue ├─►   precedence)      CKE, read data)  ├─► SDRAM bus
                    auto-pre)    └ bank_arbiter ───────┘        ▲    │                          │
                        ▲                                       │    └─► auto_refresh_gen ─────┤
 bus_activity_monitor ──┘ page mode          refresh_counter ─► refresh_priority             │
   (idleness predictor) ── pd_req ──► sdram_cmd_gen                                            │
 init_unit ─────────────────────────────────────────────────────────────────────────────────┘
```

| Module | Role |
|---|---|
| `memctrl_pkg` | Shared types: packet, SDRAM bus, command encoding, refresh urgency, decision kinds |
| `memctrl_top` | Wires everything and arbitrates ownership of the SDRAM bus |
| `addr_gen` | Maps frame store, macroblock number and word offset to bank, row and column; adds auto-precharge in close-page mode |
| `mb_order_gen` | Streams current-macroblock reads, with two B-frames interleaved macroblock by macroblock |
| `burst_queue` | Arrival-ordered queue with per-entry waiting counters and address search |
| `bank_arbiter` | Picks the read- or write-queue head of one bank |
| `dyn_scheduler` | Per-bank queues and arbiters, and the read-after-write redirect |
| `refresh_counter` | Refresh interval counter and refresh backlog |
| `refresh_priority` | Backlog to MAY / RELEASE / NEED / MUST urgency |
| `final_select` | Chooses refresh, read or write for the next transaction |
| `sdram_cmd_gen` | Executes one burst packet as SDRAM commands; tracks open rows; owns CKE |
| `auto_refresh_gen` | PRECHARGE ALL (if needed), AUTO REFRESH, tRFC wait |
| `bus_activity_monitor` | Bus utilisation and row hit rate give the page mode; an idle-run threshold gives the power-down request |
| `init_unit` | SDRAM power-up sequence |

## Macroblock layout

The SDRAM row is 512 columns of 16 bits, which is 1 KiB. A 4:2:0 macroblock
with 8-bit samples (16x16 luma and two 8x8 chroma blocks) is 384 bytes, or
192 words. Two macroblocks therefore share a row, each in a 256-column slot:

```
pair = mb >> 1
bank = pair mod 4
row  = frame * 1020 + pair / 4          (1020 = 8160 macroblocks / 2 / 4 banks)
col  = {mb[0], offset[7:0]}
```

A macroblock is never split across rows, so fetching it costs one activation.
Neighbouring macroblock pairs sit in different banks, so their rows can be
open at the same time. A 1920x1088 frame (8160 macroblocks) takes 1020 rows
per bank. The 13-bit row address holds eight frame stores.

`mb_order_gen` covers the access-order part of the layout. Two consecutive
B-frames of an IBBP sequence use the same reference data, so their current
macroblocks are fetched alternately: (a,0), (b,0), (a,1), (b,1), and so on.
Each macroblock is fetched as 24 bursts of 8 words.

## Packets, queues and hazards

Everything after `addr_gen` works on a **packet** (`packet_t`). A packet
holds a read or write flag, the start address, a burst length of 1 to 8
column accesses in one row, an auto-precharge flag, a 6-bit tag and up to
eight words of write data. Here, "burst" means a run of accesses to one row
of one bank. At the SDRAM pins every column command moves exactly one word.

Each bank has a read queue and a write queue of 8 packets. Both are strict
FIFOs: entry 0 is the oldest, a pop shifts the queue, and every entry counts
the cycles it has waited, saturating at 255. Packets are steered as follows:

* A **write** joins the bank's write queue. Two writes to the same address
  stay in FIFO order, so write-after-write cannot happen.
* A **read** first searches the bank's write queue for a packet whose column
  range overlaps its own in the same row. If it finds one, the read joins the
  *write* queue behind that write. It then executes after the write and
  returns the new data, so read-after-write cannot happen. The `raw_redirect`
  output pulses when this happens. Otherwise the read joins the read queue.
* `req_ready` is low while the target queue is full.

Write-after-read is **not** prevented by hardware. Reads get a larger
priority constant, so a queued read normally goes before a later write to the
same address. But an aged write, a write whose row is open, or a full write
queue can still overtake it. A client that needs the old value must wait for
the read data before it writes the same address.

## Choosing the next transaction

This is the core of the design. It works in two stages.

**Per bank (`bank_arbiter`).** The arbiter compares the heads of the read
queue and the write queue. Each head gets a sort key:

```
key = { forced, row_hit, priority }
priority = X*W_T + Y*BL + P           X = 1, Y = 2, P = 16 for reads, 0 for writes
forced   = write queue is full         (only for the write head)
row_hit  = bank has a row open and it is the packet's row
```

The larger key wins, and the read wins a tie. A redirected read in the write
queue is scored as a read. In order of importance:

1. A full write queue is drained first, so that writes keep flowing.
2. Open-row hits come next.
3. The formula decides the rest: long waits, long bursts and reads go first.

**Across banks (`final_select`).** The best read is the read proposal with
the largest key over all banks. The best write is found the same way. Refresh
competes with them by urgency:

| Rank | Chosen when |
|---|---|
| 1 | refresh urgency is MUST (or still held, see below) |
| 2 | a read exists and its key is not below the best write's key |
| 3 | refresh urgency is NEED |
| 4 | a write exists (this includes a write that outranked the best read) |
| 5 | refresh urgency is MAY and no access is proposed |

A decision is only made while the command path is free: initialisation is
done, `sdram_cmd_gen` is idle with CKE high, and no refresh is running.

**Refresh urgency.** `refresh_counter` counts REFI = 780 cycles (7.8 µs at
100 MHz) per refresh interval and adds one to a backlog at the end of each.
Every AUTO REFRESH that is issued takes one away. `refresh_priority` maps the
backlog to levels:

| Level | Backlog | Effect |
|---|---|---|
| MAY | > 0 | refresh when nothing else is waiting |
| RELEASE | > 3 | level down to which a MUST episode keeps refreshing |
| NEED | > 7 | refresh ranks above writes, below reads |
| MUST | > 11 | refresh before any access |

When MUST fires, `must_hold` stays high until the backlog is no longer above
the RELEASE level. The controller then issues a block of about eight refreshes
back to back before it serves accesses again. Under a steady read stream,
refresh is postponed up to twelve intervals and then paid off in one run.
SDR and DDR2 devices specify how many refreshes may be postponed. Check that
limit before you use the MUST level with a real part: a level of 11 means up
to twelve owed refreshes.

## Power-down and page policy

`bus_activity_monitor` looks at the command bus:

* **Page mode.** Open pages pay off only when the bus is busy *and* accesses
  keep returning to the same rows. The monitor measures both over windows of
  64 cycles. It counts the command cycles. It also counts the bursts started
  and how many of them went to the row last used in their bank. Such a
  "locality hit" is counted even if that row was closed in the meantime, so
  close-page mode can still see what open-page mode would gain. At the end of
  a window, open-page is chosen when there were 8 or more commands and at
  least 50 % of the bursts were locality hits. A window with no bursts passes
  the hit test. Otherwise close-page is chosen: `addr_gen` then marks each
  packet for auto-precharge, and the last column command of the burst
  carries A10. The mode changes only at window boundaries. Reset starts in
  open-page mode.
* **Power-down.** A constant-threshold idleness predictor counts consecutive
  cycles with no command and nothing pending. "Pending" means queued packets,
  a request at the port, a refresh backlog, or a running refresh. After 32
  such cycles `pd_req` rises, and `sdram_cmd_gen` drops CKE once it is idle.
  New work clears `pd_req` in the same cycle. CKE then rises and commands
  resume after tXP. A refresh backlog counts as pending, so the SDRAM wakes up
  for every refresh interval.

## SDRAM command generation

`sdram_cmd_gen` runs one packet at a time:

| Bank state | Sequence |
|---|---|
| row hit | column commands only |
| row empty | ACT, tRCD, column commands |
| row conflict | PRE (after tRAS and tWR), tRP, ACT, tRCD, column commands |

Column commands of a burst go out on consecutive cycles at consecutive
columns. Every burst returns to idle right after its last column command,
so the next packet can start at once. Nothing waits on a fixed post-burst
delay. Instead, three kinds of counters guard each later command:

* the cycles since the last ACT and the last write guard every precharge
  (tRAS, tWR);
* a per-bank timer holds the next ACT of a bank until its precharge has had
  tRP. After an auto-precharged write, that precharge starts tWR after the
  write;
* `pre_ok` combines them: tRAS and tWR are met and no bank is still
  precharging. Refresh and power-down entry wait for it.

A write is held until CL + 1 cycles after the last read, which keeps the data
bus free of collisions.

`auto_refresh_gen` issues PRECHARGE ALL when any bank is open and tells the
command generator to forget its open rows. It waits for `pre_ok` first, both
for the precharge-all and for a refresh with all banks already closed. Then, tRP later, it issues AUTO
REFRESH and holds the command path for tRFC.

`init_unit` holds CKE low during reset and waits T_INIT cycles (200 µs). It
then issues PRECHARGE ALL, two AUTO REFRESH commands, and MODE REGISTER SET
with burst length 1, sequential order and CAS latency 2.

Default timing, in cycles of the assumed 100 MHz clock: tRP 2, tRCD 2,
tRAS 5, tWR 2, CL 2, tRFC 7, tMRD 2, tXP 2.

## Top-level interface (`memctrl_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `req_valid` / `req_ready` | in/out | request handshake; a request is taken on a clock edge with both high. `req_ready` is low until initialisation is done and while `mb_order_gen` runs |
| `req_we`, `req_frame[2:0]`, `req_mb[12:0]`, `req_offset[7:0]`, `req_blen[3:0]`, `req_id[5:0]`, `req_wdata[8][16]` | in | access: write flag, frame store, macroblock, word offset in the macroblock (0..191), burst length 1..8, tag, write data (word i at index i). A burst must not cross its 256-word macroblock slot |
| `seq_start`, `seq_pair`, `seq_frame_a/b`, `seq_mb_count` | in | start a current-macroblock fetch job |
| `seq_busy`, `seq_done` | out | job running / finished (pulse) |
| `rd_valid`, `rd_data[15:0]`, `rd_id[5:0]` | out | one read word per pulse, tagged. Words of a packet arrive in order. Packets arrive in execution order, not request order |
| `sdram` | out | `sdram_bus_t`: `cke`, `cmd` ({cs_n, ras_n, cas_n, we_n}), `ba`, `a` (A10 = auto-precharge / all banks), `dq_oe`, `dq_out` |
| `dq_in[15:0]` | in | SDRAM read data. It is sampled CL + 1 clock edges after the edge that registered READ, which suits a device that drives DQ from CL cycles after it sees the command |
| `init_done`, `page_open`, `in_pd`, `sel_kind`, `ref_backlog`, `raw_redirect`, `ev_hit`, `ev_conflict` | out | status and event strobes for observation |

All SDRAM outputs are registered. The top parameters are `FRAME_W`, `MB_W`,
`OFF_W`, `QDEPTH`, `T_INIT`, `REFI`, `T_RFC`, `WINDOW`, `UTIL_THRESH`, `HIT_PCT` and
`IDLE_THRESH`. Geometry (16-bit data, 512 columns, 8192 rows, 4 banks, bursts
up to 8) is set in `memctrl_pkg`.

## Departures and open points

* **Single-data-rate interface.** The original design targets a DDR2 part.
  This RTL drives a generic single-data-rate SDRAM with one word per column
  command and no DQS, DLL or ODT handling. A DDR2 PHY would have to replace
  the bus stage of `sdram_cmd_gen` and `init_unit`.
* **Bandwidth.** The encoder's stated need is about 607 Mbyte/s. A 16-bit
  bus at 100 MHz peaks at 200 Mbyte/s, so this configuration cannot carry a
  1080p30 encoder. Either widen the data bus or raise the clock. The
  macroblock layout assumes 16-bit words, so widening the bus also means
  revisiting `addr_gen`.
* **Little command overlap between packets.** The command generator takes
  the next packet as soon as the last column command of the current one is
  out. A bank's precharge then runs on while another bank transfers data. It
  does not, however, activate the next packet's row while the current
  packet is still transferring. With one column command per word, the
  command bus is busy on every cycle of a transfer, so such an ACTIVATE
  would have no free slot. The gain from reordering therefore comes mostly
  from row hits and fewer precharges.
* **Four banks.** The architecture drawing shows three queue pairs as an
  example. The RTL uses four because bank counts are powers of two.
* **"Queue full" rule.** The source rule reads "if the read queue is not full
  the read is performed, else the write first". This RTL drains a *full write
  queue* first instead. The literal reading would stall the full read queue
  behind writes.
* **Write-after-read** is only made unlikely, not prevented (see above).
* **Not built:** level-C search-area data reuse. It belongs to the encoder's
  motion-estimation fetch, and its search ranges are not given. The encoder
  and the SDRAM device are outside the controller.
* **All numeric choices** are this implementation's: queue depth, priority
  coefficients, thresholds of the bus monitor, timing values and the 100 MHz
  clock. The only numbers from the source are the refresh thresholds
  (0/3/7/11), 512 columns and 16-bit data.

## Simulation

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. `tb/sdram_model.sv` is a behavioural
SDRAM. It stores data, returns reads after CL, and counts protocol and timing
errors: access to a closed bank, tRCD, tRP (also before REFRESH), tRAS, tWR
(a write with auto-precharge starts its precharge tWR late), tRFC, commands
in power-down, and DQ contention.

`tb_memctrl_top` runs the whole controller at its default parameters, in
about 80 000 cycles:

1. initialisation;
2. dense random traffic with row hits, row conflicts and read-after-write
   redirects;
3. sparse traffic, which switches to close-page mode and enters power-down;
4. an idle stretch;
5. a 30-macroblock B-pair fetch, which pushes refresh to MUST;
6. a write stream, which fills the write queues and pushes refresh to NEED;
7. read-back.

The testbench checks host reads against a memory image kept in request
order, and all read words against an image kept in execution order. It checks
the refresh count against the elapsed intervals. It also requires that every
mechanism happened at least once: RAW redirect, row hit, row conflict,
power-down, both page-mode switches, auto-precharge, write-queue full, the
MUST/RELEASE hold, and each of the five decision kinds.

`tb_hdtv_workload` drives encoder-like traffic at the default parameters.
For each macroblock it stores 192 words, reads three reference macroblocks
(a vertical search range of 16 with level-C reuse) and writes 192 words of
reconstruction. It checks every word and measures throughput: about 86 %
bus efficiency and 1116 cycles per macroblock. At 100 MHz that is about
11 frames/s of 1080p, which quantifies the bandwidth gap described above.

To run one testbench with Verilator 5 (`-y` lets it find each module in the
file of the same name):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/memctrl_pkg.sv tb/tb_memctrl_top.sv --top-module tb_memctrl_top -o sim
./obj_dir/sim
```

Name another testbench file and top module to run any unit testbench.

# A predictable DDR3 memory controller for multi-requestor systems

When several cores and DMA engines share one DRAM, the time a single memory
request takes depends on what everybody else does. Commercial controllers
reorder requests to favour row hits, which is good for the average case but
makes the worst case either unbounded or uselessly large. This controller
gives each requestor a latency bound that depends only on how many requestors
there are, not on their traffic, while still letting a requestor profit from
its own row hits.

Two ideas carry the design:

* **Private banks with an open-row policy.** Requestor *i* owns DRAM bank
  *i* (mod 8). Nobody else can close a row it has opened, so a row hit really
  costs only one column command (CAS). A row miss costs PRE, ACT, CAS.
* **A global arbitration FIFO with one slot per requestor.** Each requestor
  may have at most one command waiting for the command bus at a time. The
  queue is scanned from the front, and the first command that may legally
  issue is issued, but a read or write may never overtake another read or
  write that is still blocked. In the worst case every other requestor
  therefore delays a command by at most one of its own commands.

The default build serves 8 requestors on a single rank of DDR3-1333H with a
64-bit data bus. Each request moves one 64-byte line (one burst of 8 beats).

## Block structure

```
 requestor 0 ─► private_buffer[0] ─┐
 requestor 1 ─► private_buffer[1] ─┤  one command each
    ...                            ├──────────────► global_fifo ──► command bus (cmd_out)
 requestor 7 ─► private_buffer[7] ─┘                  ▲    │
                   ▲  (addr_map inside each)          │    ▼
                   │                            bus_timing  data_path ◄──► data bus (dq)
                   └──── serviced / rsp ◄─────────────────────┘
                             refresh_ctrl ──► PREA / REF on the command bus
```

| File | Role |
|---|---|
| `rtl/mc_pkg.sv` | Types (`dram_cmd_t`, `timing_t`, address fields) and the DDR3-1333H timing record |
| `rtl/addr_map.sv` | Splits an address into bank/row/column and checks that the bank is the requestor's own |
| `rtl/private_buffer.sv` | Request queue of one requestor. It generates PRE/ACT/CAS, tracks the requestor's own bank timing, and offers one command at a time |
| `rtl/global_fifo.sv` | The arbitration queue (Rules 1, 3, 4 below) |
| `rtl/bus_timing.sv` | Timing between different banks: tRRD, tFAW, tRTW, tWTR and data-bus occupancy |
| `rtl/data_path.sv` | Drives and collects data bursts tWL/tRL after each CAS and reports when each transfer ends |
| `rtl/refresh_ctrl.sv` | A refresh every tREFI: drain, precharge-all, REF, wait tRFC |
| `rtl/mem_ctrl.sv` | Top level wiring all of the above |

## The four arbitration rules

The latency bound relies on these four rules. Each maps onto a specific piece
of logic.

1. **One command per requestor in the FIFO.** `private_buffer` offers a
   command (`enq_valid`, a one-cycle pulse) and then waits in `S_WAIT` until
   the FIFO reports it `serviced`. PRE and ACT are serviced when they issue.
   A read or write stays in the FIFO, marked issued, until its data transfer
   ends (`data_path.done`). This keeps later reads and writes from slipping
   in while the data bus is still tied up. The FIFO therefore needs exactly
   NUM_REQ slots, and an assertion checks that a requestor never has two.
2. **A command enters the FIFO only when its own-bank timing is met.** The
   private buffer keeps down-counters for tRCD, tRP, tRAS, tRC, tRTP, tWR and
   for tWTR/tRTW between its own reads and writes. It offers a command only
   when they are all zero. Once in the FIFO, a command can therefore be held
   back only by other requestors' commands.
3. **Issue the first ready command from the front.** `global_fifo` computes a
   ready bit per slot:
   * PRE is always ready;
   * ACT needs `act_ok` (tRRD, tFAW);
   * a read needs `rd_ok` and a write needs `wr_ok` (tWTR, tRTW, data bus).

   A priority pick takes the oldest ready slot. Slots are compacted every
   cycle, so slot 0 is always the oldest.
4. **No CAS overtakes a blocked CAS.** During the scan, the first read or
   write that is not ready sets `cas_blocked`, and no later read or write is
   then ready. PRE and ACT may still pass it.

`stat_reorder` pulses when Rule 3 issues something other than the oldest
waiting command. `stat_rule4_hold` pulses when Rule 4 holds back a CAS that
would otherwise have been ready. Both are for monitoring only.

## Timing conventions

All timing lives in one `timing_t` parameter (`T`), so another speed grade is
a single override. Defaults, in memory-clock cycles (DDR3-1333H):

| tRCD | tRL | tWL | tBUS | tRP | tWR | tRTP | tRAS | tRC | tRRD | tFAW | tRTW | tWTR | tRFC | tREFI |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| 9 | 8 | 7 | 4 | 9 | 10 | 5 | 24 | 33 | 4 | 20 | 6 | 5 | 107 | 5200 |

tRFC (160 ns) and tREFI (7.8 µs) are converted with the 1.5 ns clock of
DDR3-1333.

`mc_pkg` also provides `DDR2_800E`:
* tRCD 6, tRL 6, tWL 5, tBUS 4, tRP 6, tWR 6, tRTP 3;
* tRAS 18, tRC 24, tRRD 3, tFAW 14, tRTW 6, tWTR 3;
* tRFC 78, tREFI 3120 (2.5 ns clock).

Select it with `mem_ctrl #(.T(mc_pkg::DDR2_800E))`.

The timing reference points are as follows:
* tWR and tWTR count from the **end of write data**, i.e. tWL + tBUS after
  the write command.
* tRTW counts from the read command.
* The data bus is reserved for tBUS cycles starting tRL (read) or tWL (write)
  after the CAS. A new CAS is allowed only when its burst would start after
  the last reserved burst ends.

Constraint counters are loaded with X−1 on the clock edge where a command
issues. The dependent command is allowed exactly X cycles later.

Pipeline latency of the controller itself:

* **Request buffer:** a request accepted in cycle *t* can have its first
  command offered in *t*+1.
* **FIFO:** a command offered in cycle *t* can issue in *t*+1, because the
  FIFO is registered. This adds one cycle per command to the pure DRAM
  timing.
* **Completion:** `rsp_valid` pulses in the last cycle of the data burst. For
  a load, `rsp_rdata` holds the full line in that same cycle; its top 128 bits
  come straight from `dq_in`, which is why those outputs have no register.

## Interfaces

Requestor side, per requestor *i*:

* `req_valid[i]`/`req_ready[i]`: handshake. A request is accepted when both
  are high at a clock edge.
* `req_we[i]`: 1 for a store, 0 for a load.
* `req_addr[i]`: the address, 31 bits, as in the table below.
* `req_wdata[i]`: the 512-bit store line.

| bits | 30:28 | 27:13 | 12:6 | 5:0 |
|---|---|---|---|---|
| field | bank | row | column burst | byte in line |

* `rsp_valid[i]` pulses when the request completes. `rsp_we[i]` repeats the
  store flag, and `rsp_rdata` (shared by all requestors) carries the load
  line in that cycle.
* A request whose bank field is not the requestor's own bank is refused
  without touching the DRAM. It completes at once with `rsp_err[i]`.
* The private buffer holds `BUF_DEPTH` (4) requests. A core with a single
  outstanding miss needs only one slot; DMA engines and out-of-order cores
  can queue more.

DRAM side:

* `cmd_out` is `{cmd, bank, row, col}`, with `CMD_NOP` in idle cycles. The
  commands are PRE, ACT, RD, WR, PREA and REF.
* `dq_out`/`dq_oe`/`dq_in` carry the two data beats of one clock together as a
  128-bit word. Beat 2k is in the low half, and beat 0 is the least
  significant 64 bits of the line.
* Encoding onto DDR3 pins, the DQS strobes and the double-data-rate I/O
  belong to a PHY, which is not part of this RTL.

Reset is synchronous and active low (`rst_n`).

## Refresh

Every tREFI cycles `refresh_ctrl` closes the requestors' access for one
refresh:

1. It lowers `enq_allow`, so no private buffer offers a new command.
2. It waits until the FIFO is empty, the data bus is idle and every bank may
   be precharged.
3. It issues PREA, then REF exactly tRP later.
4. It keeps the command bus for tRFC.
5. `ref_done` then tells each private buffer that its bank is closed, so a
   request that was a row hit before the refresh now needs an ACT.

The controller only uses the command bus for refresh while the FIFO is empty,
so refresh and arbitration never collide (this is asserted in `mem_ctrl`).

## The latency bound that the design guarantees

For one request of a requestor that issues its next request only after the
previous one has finished, the worst-case latency is t_AC + t_CD:

* **t_AC (arrival to CAS entering the FIFO).**
  * An open request (row hit) costs:
    * tWTR for a load after a store;
    * max(tRTW − tRL − tBUS, 0) for a store after a load;
    * 0 otherwise.
  * A row miss costs t_DA + t_IA + tRCD, where:
    * t_DP = max(precharge constraint of the previous request: tRTP−tRL−tBUS
      after a load or tWR after a store; tRAS−t_prev after a previous miss; 0);
    * t_DA = max(t_DP + (M−1) + tRP, tRC−t_prev after a previous miss);
    * t_IA = ⌊(M−1)/4⌋·tFAW + ((M−1) mod 4)·tRRD, the worst case of M−1
      other ACTs queued in front.
* **t_CD (CAS to end of data).** It is the worst case in which all other
  requestors have a CAS queued ahead, in alternating read/write order. Each
  read in that pattern adds tWTR + tRTW, and each write adds tWL + tBUS:
  * for a write: ⌊M/2⌋·(tWTR + tRTW) + ⌈M/2⌉·(tWL + tBUS);
  * for a read: tWTR + tRL + tBUS + ⌊(M−1)/2⌋·(tWTR + tRTW) +
    ⌈(M−1)/2⌉·(tWL + tBUS).

For M = 8 at DDR3-1333H this gives:

| Request | Cycles |
|---|---|
| Row hit, load after load | 94 |
| Row hit, store | 88 |
| Row miss, load after a missed load | 154 |
| Row miss, store after a store | 155 |

For M = 2 the same cases give 28, 22, 54 and 55 cycles.

Refresh adds at most one tRFC plus the drain per tREFI, and may turn hits
into misses. The end-to-end testbench checks every request of the observed
requestor against this bound.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_addr_map` | Field extraction and bank ownership, against an independent decode, for directed and random addresses |
| `tb_bus_timing` | Random command streams against a timestamp model of tRRD, tFAW, tRTW, tWTR and data-bus overlap. Every cycle, `act_ok`/`rd_ok`/`wr_ok` must equal the model's answer |
| `tb_global_fifo` | A directed Rule-4 scenario: write, read, write from three requestors, where the second write is ready before the blocked read and must wait. Plus random traffic against a reference queue that applies Rules 1, 3 and 4 |
| `tb_data_path` | Burst placement on the bus for reads and writes, store data on `dq_out`, load line reassembly, and `done` timing |
| `tb_refresh_ctrl` | Period, drain, PREA→REF distance (tRP) and REF→`ref_done` distance (tRFC) over eight refresh periods |
| `tb_private_buffer` | A cycle-accurate reference of command generation and every own-bank constraint, with random serviced/issue timing |
| `tb_mem_ctrl` | The whole controller at its default parameters (see below) |
| `tb_worst_case` | The worst-case patterns behind the bound, at the default size with requestor 7 placed last. They are eight simultaneous ACTs, the alternating read/write pattern ending in a write, and the same pattern ending in a read. Every command's issue cycle is checked against a schedule worked out from the timing rules. The read pattern completes exactly at t_CD(read) plus the two register stages, so that bound is tight |
| `tb_workloads` | The controller at 2 and 4 requestors, and at 8 requestors on DDR2-800E timing. It uses `tb/mc_env.sv`, one instance per configuration. The observed requestor has 50 % row hits and 20 % stores, and every request is checked against the bound for that configuration |

`tb_mem_ctrl` connects the controller to a behavioural DDR3 rank,
`tb/dram_model.sv`. The model checks every JEDEC constraint independently of
the controller and stores the data. Requestor 0 behaves like an in-order core
with one outstanding request. Requestors 1–7 keep their buffers full of random
loads and stores. The testbench checks:

* zero DRAM timing violations;
* the data of every load;
* the completion flags;
* a store→load spacing test;
* the latency of every request of requestor 0 (those not overlapped by a
  refresh) against the bound above, plus the controller's own pipeline
  stages: one cycle for the request buffer and one per command for the
  registered FIFO.

It also counts each mechanism, and a mechanism that never occurs is a
failure. The mechanisms are:
* PRE, ACT, read, write, PREA and REF;
* row hits and row misses;
* Rule-3 reordering;
* Rule-4 holds;
* a full private buffer;
* a refresh drain;
* an out-of-bank request.

In a typical run, the observed latencies stay 15 or more cycles below the
bound.

The 4-requestor workload mirrors a standard comparison point: 4 requestors,
half of the accesses row hits, one fifth stores, DDR3-1333H. There, the
published average worst-case latency is 101.85 ns. Over the random request
sequence of `tb_workloads`, the per-request bounds average about 100 ns; the
remainder is the worst-case ordering of hits, misses and stores plus refresh.
The latency actually observed averages about 46 ns under greedy interference.

To simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mc_pkg.sv tb/tb_mem_ctrl.sv --top-module tb_mem_ctrl -o sim
./obj_dir/sim
```

Swap `tb_mem_ctrl` for any other testbench name to run a unit test.

## Choices that go beyond the source analysis

These points are not fixed by the analysis this controller follows. They are
choices of this implementation:

* **Address layout and ownership.** The address layout (bank in the top bits)
  and the rule "requestor *i* owns bank *i* mod 8" are local choices.
  Out-of-bank requests are refused with `rsp_err`. A separate bank set for
  shared data is not provided.
* **What the private buffer stores.** It stores requests, not pre-expanded
  command lists. It derives the next command from the bank state, which
  produces the same command sequence and copes naturally with rows closed by
  refresh.
* **Registered FIFO.** The FIFO stage is registered, which costs one cycle
  per command compared with the idealised analysis.
* **Simultaneous offers.** When several requestors offer a command in the
  same cycle, they join the FIFO in requestor-index order.
* **How refresh empties the rows.** Refresh drains the FIFO and uses a single
  precharge-all. The analysis only says that rows are closed by refresh.
* **Buffer sizes.** BUF_DEPTH = 4 and MAX_INFLIGHT = 4 are sizing choices.
* **Clock period.** The 1.5 ns clock period used to convert tRFC and tREFI is
  taken from the DDR3-1333 standard.
* **Read t_CD.** The second floor term of the read-CAS bound is taken as
  ⌈(M−1)/2⌉ writes (M/2 for even M). That is the count of writes in an
  alternating pattern of M−1 commands ahead of the read. `tb_worst_case`
  shows that the hardware reaches this value exactly: 94 cycles for M = 8.
  With ⌊(M−1)/2⌋ the bound would be 11 cycles too small.
* **Scope of the build.** Only one rank and the open-row policy are built.
  Close-row controllers appear in the analysis only as baselines.
* **Other configurations.** Timing for the other DDR3 speed grades (800D to
  2133M) must be supplied through `T`. A 32-bit data bus needs `W_BUS = 32`
  in `mc_pkg` and two requests per 64-byte line.

## Synthesis notes

The top level synthesises to roughly 1,750 cells and 1,400 flip-flops. The
private buffers' line storage adds about 19.6 kbit of memory, which is the
bulk of the area: 8 requestors × 4 requests × 512 bits.

Outputs that are plain wiring:
* `addr_map`'s field outputs are slices of its input.
* The bank field of a buffer's commands is a constant.
* The top 128 bits of `rsp_rdata` come directly from `dq_in`.

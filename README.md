# Low-energy DDR3 memory controller

A DDR3 memory controller spends energy in two ways that it can control: each
row activation costs energy, and so does every turn of the data bus between
reads and writes. This design is a DDR3 controller built around those two
costs, in two parts that share a clock and a reset:

1. **An FPGA DDR3 controller** that sits between an AXI4 bus and a vendor DDR3
   PHY. It has an AXI4 slave with read priority, a user interface made of two
   FIFOs, and a command engine. The engine keeps up to four banks open, closes
   the *least recently opened* bank when it needs a fifth, and refreshes on
   time. It checks every DDR3 timing rule with counters.
2. **A request scheduler** with the two scheduling ideas the design is about:
   - a **write drain that exploits row-buffer locality**: once writes are
     being drained, row-hit writes go first, and the direction switches only
     when the other side has a row hit waiting;
   - a **delayed adaptive closed-page policy**: it learns from each bank's
     read/activate history whether rows there are worth keeping open.

   A **staggered power-down manager** sits next to the scheduler. It puts
   the DRAM into active or precharge power-down when the DRAM is idle, and
   into self refresh when a refresh falls due during precharge power-down.

The command engine serves requests in order, as the FPGA controller it
follows does. The scheduler is a separate unit. Its inputs are
(bank, row, column) requests and its output is the order in which to serve
them, with a close-or-keep decision for each.

The FPGA controller targets a single DDR3-1600 1 Gb x16 device: 8 banks,
8192 rows and 1024 columns. That is 128 MB, with one 128-bit burst (BL8 on a
16-bit bus) per access.

The scheduler's requests address a 1 GB rank of eight x8 devices: 8 banks,
16384 rows and 1024 columns of 64 bits.

## Controller path

```
AXI4 master ─► axi_slave ─► user_interface ─────────► ddr3_controller ─► phy_* ports
                            ├ cmd_fifo (sync)         ├ addr_map
                            └ wdata_fifo (async)      ├ bank_manager
                                                      └ refresh_timer
```

### AXI4 slave and read priority (`axi_slave`)

Each AXI beat of 16 bytes becomes one user-interface command. Writes send a
write command and the 128-bit data with its byte mask to the two FIFOs in the
same cycle. The byte mask is the inverted WSTRB.

The arbitration gives **reads priority**. A write address is accepted only in
two cases:

- no read address is pending, or
- 16 read bursts (`RD_WAIT_LIMIT`) have been granted while that write waited.

The slave handles one transaction at a time. A read burst is only issued when
the read return buffer has room for all its beats, so RREADY back-pressure
never loses data. Responses are always OKAY. WRAP bursts are handled like
INCR.

### User interface (`user_interface`, `cmd_fifo`, `wdata_fifo`)

- **Address/Command FIFO**: synchronous, first-word fall-through. It reports
  `empty` and `almost_empty`, the latter at one entry or fewer.
- **Write Data FIFO**: asynchronous, with Gray-coded pointers and two-flop
  synchronisers. It has its own write clock and reset. In the top both clocks
  are `clk`.
- **Read data**: passed through with a valid strobe and no back-pressure.

### Command engine (`ddr3_controller`)

The engine waits in INIT until the PHY raises `phy_init_done`. The PHY owns
power-up initialisation and calibration. After that, the engine takes one
command at a time from the Address/Command FIFO.

**Address mapping (`addr_map`).** The command's 27-bit byte address is split
in one of two ways. Bit 0 is unused, because the words are 16 bits wide.

| scheme (`MAP`)              | column   | bank      | row       |
|-----------------------------|----------|-----------|-----------|
| Row/Bank/Column (default)   | [10:1]   | [13:11]   | [26:14]   |
| Bank/Row/Column             | [10:1]   | [26:24]   | [23:11]   |

Row/Bank/Column puts consecutive 2 KB blocks in different banks, for
bank-level parallelism. Bank/Row/Column keeps a region inside one bank, which
leaves the other banks idle and able to power down.

**Bank management (`bank_manager`).** A table of at most four open
(bank, row) pairs, kept in the order they were opened. Each access gets one of
four decisions:

| decision         | condition                                   | commands               |
|------------------|---------------------------------------------|------------------------|
| bank hit         | bank open with the same row                 | RD/WR                  |
| open in free slot| bank not open, fewer than four open         | ACT, RD/WR             |
| evict LRO        | bank not open, four already open            | PRE (oldest), ACT, RD/WR |
| row conflict     | bank open with another row                  | PRE, ACT, RD/WR        |

Re-opening a bank moves it to the youngest place in the table. The victim is
always entry 0, the least recently opened bank.

**Refresh (`refresh_timer`).** The timer adds one owed refresh every tREFI
(6240 cycles, which is 7.8 µs at 800 MHz). Up to eight refreshes can be owed.
The engine serves them only between user commands, as follows:

1. PRECHARGE ALL (A10 high on `phy_addr`).
2. AUTO REFRESH.
3. Wait tRFC.
4. Activate again the bank and row of the last access.

After that, accesses open banks as usual.

**Timing.** Every DDR3 spacing rule is a down-counter. A command may issue in
the cycle its counter reads zero. When a command issues, each counter it
affects is loaded with the larger of its current value and the new distance
minus one.

| counter | guards | loaded by |
|---|---|---|
| per-bank `act_cnt` | next ACTIVATE | ACT (tRC), PRE (tRP), PREA (tRP, all banks), REF (tRFC, all banks) |
| per-bank `col_cnt` | next READ/WRITE | ACT (tRCD) |
| per-bank `pre_cnt` | next PRECHARGE | ACT (tRAS), RD (tRTP), WR (tCWL+tBURST+tWR) |
| `rrd_cnt` | ACT to ACT on any bank | ACT (tRRD) |
| `faw_cnt[4]` | four-activate window | ACT (tFAW) |
| `rd_cnt` | next READ | RD (tCCD), WR (tCWL+tBURST+tWTR) |
| `wr_cnt` | next WRITE | WR (tCCD), RD (tCL+tCCD+2−tCWL) |

One DRAM command is issued per clock. The clock is taken to be the DRAM clock,
so all timings are in DRAM clock cycles. The defaults are for DDR3-1600
11-11-11 x16:

| tRCD | tRP | tRAS | tRC | tCL | tCWL | tBURST | tCCD | tWR | tWTR | tRTP | tRRD | tFAW | tRFC | tREFI |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| 11 | 11 | 28 | 39 | 11 | 8 | 4 | 4 | 12 | 6 | 6 | 6 | 32 | 88 | 6240 |

**PHY ports.** The engine drives one command per cycle on `phy_cmd`, together
with `phy_bank` and `phy_addr`. `phy_addr` carries the row for ACT and the
column for RD/WR. The 128-bit write data and its mask travel with the WR
command, and the PHY applies the write latency. Read data comes back on
`phy_rddata` with `phy_rddata_valid`, in request order. It leaves the engine
one clock later.

## Request scheduler

```
requests ─► write_drain_sched ─► scheduled requests (+ row hit, auto-precharge)
            ├ req_queue (32 reads)         ▲            ▲ only while cmd_allow
            └ req_queue (64 writes)        │ keep_open  │
                         │ reads, activates │            │
                         └────► page_policy ┘            │
  refresh_timer ─► power_down_manager ──────────────────┘ ─► CKE, PREA, REF, power state
```

### Write drain exploiting row-buffer locality (`write_drain_sched`)

A conventional write drain starts when the write queue reaches a high
watermark, and writes the oldest entries until the queue is down to a low
watermark. That can close rows that waiting reads were about to hit, and then
reopen them again. This scheduler lets row locality decide when to turn the
bus around. It tracks which row it left open in each bank. In every cycle it
picks one request, in this order.

**In read mode:**

1. a row-hit read;
2. if the write queue has reached `HIGH_WM` (54 of 64), switch to write mode,
   with a row-hit write if one exists, else the oldest write;
3. the oldest read;
4. with no reads queued, a write (row hits first), without changing mode.

**In write mode:**

1. a row-hit write, even while reads are waiting;
2. with no row-hit write left but a row-hit read waiting, switch to read mode;
3. with neither, while more than `LOW_WM` (32) writes remain, the oldest write
   (the conventional drain step);
4. otherwise return to read mode.

Both queues (`req_queue`) are age-ordered and compacting, so "oldest" is the
lowest index. The search over both queues is combinational, so a request can
be chosen in the cycle it is offered.

The status outputs do not count individual requests:

- `write_mode` shows the current direction;
- `stat_switch_rd` pulses when a row-hit read ends a drain;
- `stat_wm_drain` pulses on every conventional drain step.

### Delayed adaptive closed page (`page_policy` + the scheduler's close decision)

By default the policy is closed page: each request closes its row (auto
precharge). It stays open in two cases:

- at least `KEEP_THRESH` (1) other queued request targets the same row
  (the adaptive closed page), or
- the bank's `keep_open` bit is set.

`page_policy` sets `keep_open` from a signed history counter in each bank:

- +1 for each read;
- −1 for each activate. For the scheduler, an activate is any request that is
  not a row hit.

Every `EPOCH` (10 000) cycles each bank is judged. If its counter is above
zero, the bank had locality, so its precharges are postponed in the next epoch
(`keep_open` = 1). If the counter is zero or below, the bank goes back to
closed page. The counters then clear.

The two conditions work together. With only the history rule, a closed-page
bank could never score a row hit, so it would never earn `keep_open`. The
queued-request rule supplies those first hits.

### Staggered power-down (`power_down_manager`)

The scheduler's DRAM is in one of six power states: `IDLE`, `ACT`, `REF`,
`ACT_PDN`, `PRE_PDN` and `SREF`.

**While awake** (`IDLE` with all banks closed, `ACT` with a bank open):

- requests may leave the scheduler (`cmd_allow`);
- after **tPDE = tRAS + tRP + tCK** (40 cycles) with nothing pending, CKE
  drops. The DRAM goes to precharge power-down if all banks are closed, and
  to active power-down if one is open.

**When a refresh falls due**, the manager has its own `refresh_timer`:

- **awake**: commands stop. If a bank is open, PRECHARGE ALL is issued, which
  also clears the scheduler's open-row state. AUTO REFRESH follows tRP later,
  then `REF` lasts tRFC. With nothing pending after that, the DRAM goes
  straight to precharge power-down; the time after a refresh is the cheapest
  moment to sleep.
- **in active power-down**: the DRAM wakes to refresh.
- **in precharge power-down with nothing pending**: the DRAM enters **self
  refresh** and refreshes itself. Every refresh that falls due there is
  acknowledged without a command.

**Waking up:**

- a request wakes the DRAM from either power-down after tXP (5 cycles);
- a request ends self refresh after tXS (tRFC + 10 ns, 96 cycles);
- `cmd_allow` stays low during the exit time.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `axi_slave` | `RD_WAIT_LIMIT` | 16 | read bursts before a waiting write is forced |
| `axi_slave` | `ID_W`, `ADDR_W`, `RBUF_DEPTH` | 4, 32, 16 | |
| `user_interface` | `CMD_DEPTH`, `WDF_DEPTH` | 16, 16 | |
| `bank_manager` | `OPEN_MAX` | 4 | open banks at once |
| `ddr3_controller` | `MAP`, `T_*` | Row/Bank/Column, table above | |
| `refresh_timer` | `T_REFI`, `MAX_POSTPONE` | 6240, 8 | |
| `write_drain_sched` | `RQ_DEPTH`, `WQ_DEPTH` | 32, 64 | read and write queue entries |
| `write_drain_sched` | `HIGH_WM`, `LOW_WM`, `KEEP_THRESH` | 54, 32, 1 | |
| `page_policy` | `EPOCH`, `HIST_W` | 10000, 16 | |
| `power_down_manager` | `T_PDE`, `T_XP`, `T_XS`, `T_RP`, `T_RFC` | 40, 5, 96, 11, 88 | |

The package `ddr3_pkg` fixes the device geometry:

- 13 row bits (14 for the scheduler's requests), 3 bank bits, 10 column bits;
- a 16-bit DQ bus and burst length 8;
- 128-bit user data with a 16-bit mask.

The top `ddr3_mc_top` has no parameters, and all blocks keep their defaults.

## Where this design makes its own choices

These points are not fixed by the architecture this design follows. They are
local decisions and are the first things to review:

- **Watermarks.** The high and low watermarks (54 and 32), `KEEP_THRESH` = 1,
  and the conventional drain step when neither side has a row hit.
- **Epoch length.** The epoch is counted in controller clocks. The original
  policy is stated in CPU cycles.
- **Zero history.** A history of exactly zero counts as closed page.
- **Timing values.** All DDR3 timing values are standard DDR3-1600 figures.
  They were not taken from a specific memory part.
- **Re-activation after refresh.** The engine re-opens the last accessed row
  after a refresh, and later accesses then choose the banks as usual. The
  architecture describes both behaviours.
- **Row conflicts.** A row conflict is served as precharge, then activate,
  then the access.
- **Command order.** The command engine serves requests strictly in order.
  The scheduler is not in its path; the two parts are shown side by side.
  To use the scheduler in front of a DRAM, its output order and its
  auto-precharge flags have to drive a command engine that issues
  RDA/WRA. That engine is not built here.
- **AXI slave.** It handles one transaction at a time. WRAP bursts are treated
  as INCR, and all responses are OKAY.
- **PHY port set.** The PHY interface is a simplified set of ports: one
  command, bank and address per cycle, with whole 128-bit bursts.
- **Clocks.** The Write Data FIFO is asynchronous, but the top drives both of
  its clocks with `clk`.
- **Power-down details.** The self-refresh rule, the power-down right after a
  refresh, and the exit times are local choices. The scheme is described only
  as a staggered power-down. The entry delay tPDE and the choice between
  active and precharge power-down follow the architecture.

## What is not here

- **The PHY.** Vendor I/O, calibration and initialisation. Only its
  controller-side signals are ports of the top.
- **The DDR3 device.**

For simulation, the testbenches use a behavioural PHY and DRAM model,
`tb/ddr3_phy_model.sv`.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cmd_fifo` | random push/pop against a queue model; flags, count, almost-empty |
| `tb_wdata_fifo` | two unrelated clocks, random enables, order and data |
| `tb_addr_map` | both schemes against bit arithmetic |
| `tb_bank_manager` | random access stream against a reference LRO table |
| `tb_refresh_timer` | request spacing of tREFI, owed count, urgent flag |
| `tb_page_policy` | hot, cold and balanced banks across two epochs; exact epoch boundary |
| `tb_write_drain_sched` | every choice against a reference model of the policy; counts drains, row-hit writes with reads waiting, switches to reads, drain steps, rows kept open |
| `tb_user_interface` | commands, data and masks through both FIFOs, read pass-through |
| `tb_axi_slave` | bursts, strobes, read buffer, and a write granted after exactly 16 reads |
| `tb_ddr3_controller` | with the PHY model: all four bank decisions, refresh with PRECHARGE ALL, ACT→WR spacing equal to tRCD, zero timing violations, data |
| `tb_power_down_manager` | every output every cycle against a reference model; all six states; exit times equal to tXP and tXS |
| `tb_ddr3_mc_top` | the whole design at its defaults (see below) |

### End-to-end test

`tb_ddr3_mc_top` runs the top with every parameter at its default. An AXI
master writes and reads through the controller into the PHY model, and the
model checks every timing rule on its own timestamps. Read data is compared
byte by byte. At the same time, random traffic in phases runs through the
scheduler.

The test counts each mechanism and fails if one never occurs:

- all four bank decisions;
- refresh after PRECHARGE ALL;
- re-activation after refresh;
- a write forced by the read wait limit;
- a write drain at the high watermark;
- row-hit writes while reads wait;
- a switch back to reads;
- a conventional drain step;
- a row kept open;
- a page-policy change at an epoch;
- all six power states of the scheduler's DRAM, including a refresh.

It also checks that every scheduler request leaves exactly once, and only
while the DRAM is awake. The test takes a few seconds.

### Synthetic traffic and power states

`tb_traffic_power` sends a synthetic traffic sweep through the scheduler and
power-down path of the full design, with every parameter at its default:

- 80 % reads, each request 64 bytes, covering 8 columns;
- 64, 256 or 512 sequential bytes in one row before a new random row;
- 1, 4 or 8 banks in use;
- random gaps from tCCD up to tPDE, 50 × tPDE or 100 × tPDE.

For each of the 27 settings it prints the share of time in each power state.
It checks three things:

- every request leaves the scheduler exactly once;
- with sparse traffic, the DRAM sleeps (precharge power-down or self refresh)
  more than half the time, and more than with dense traffic;
- sparse traffic reaches self refresh.

Typical results:

- gaps up to tPDE: about 98–100 % IDLE;
- gaps up to 50 × tPDE: about 80–88 % PRE_PDN and 6–15 % SREF;
- gaps up to 100 × tPDE: about 70–80 % PRE_PDN and 14–27 % SREF.

The power states come from the scheduler's view of which banks are open. The
scheduler side has no DRAM command timing, so the few cycles a bank is active
during a closed-page access are not counted as ACT.

### Running the tests

Run them with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
t=tb_ddr3_mc_top
verilator --binary --timing --assert --top-module $t -Irtl -Itb -y rtl -y tb \
          rtl/ddr3_pkg.sv tb/$t.sv --Mdir obj_$t -o sim
./obj_$t/sim
```

Replace `t` with any other testbench name. Verilator is two-state, so every
register read by the logic has a reset value.

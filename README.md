# DDR3 SDRAM controller

A DDR3 memory controller sits between a simple request port and a DDR3 SDRAM
device. It turns "read this burst" and "write that burst" into the exact sequence of
DDR3 commands the device needs. It opens and closes rows, inserts refreshes, sends the
device into self-refresh or power-down, and powers the device up after reset,
or resets it again on request. The
hard part is timing. Every command has minimum distances to earlier commands, some
per bank and some for the whole device. Write data and the on-die termination must
reach the pins at fixed cycles after the command. This RTL keeps all of that inside
the controller, so the user side needs only a valid/ready handshake.

The block structure follows the architecture of the paper *Design and Simulation of
High Performance DDR3 SDRAM Controller*: a clock synchronization module, a
configuration interface, a three-stage command queue, command decode logic,
bank management, an initialization state machine, command application logic,
address/command decode and ODT control. That paper names these blocks and says
what each one does, but it does not describe how they work inside. The internal
design, the register map, the interfaces and all timing values here are therefore
this implementation's own. They follow the JEDEC DDR3 standard where it applies.
The section "Where this departs from the original description" lists every
difference.

## Block diagram

```
             clk_in ─► clock_sync ─► ctrl_clk (= ddr_ck, clocks everything below)
                                     ctrl_rst_n
 cfg load/fetch ─► config_interface ──── cfg (burst length, CL, CWL, enables,
                        │                     RTT values, refresh interval)
                        ▼
 user req ─► cmd_pipeline ─► cmd_decode ─► cmd_app ─► addr_cmd_decode ─► CKE CS# RAS# CAS# WE# BA A
 (valid/ready)  3 entries      ▲    │       ▲  │  │                        (registered)
                               │    ▼       │  │  └─► odt_ctrl ─────────► ODT
                            bank_mgmt ◄─────┘  │
                                               ├─► ddr3_data_path ─────► mem_wrdata(_en)
                            init_fsm ─────────►┘        ▲                 RESET#
 rd_valid/rd_data ◄─────────────────────────────────────┴────────────── mem_rddata(_valid)
```

| module | file | role |
|---|---|---|
| `ddr3_pkg` | `rtl/ddr3_pkg.sv` | geometry, JEDEC timing defaults, command and request types, register map, mode-register encoders |
| `clock_sync` | `rtl/clock_sync.sv` | divides `clk_in` by 2 × `sync_factor`, synchronizes reset to the result |
| `config_interface` | `rtl/config_interface.sv` | 16 × 8-bit registers with a load/fetch port |
| `cmd_pipeline` | `rtl/cmd_pipeline.sv` | three-entry request FIFO |
| `cmd_decode` | `rtl/cmd_decode.sv` | address split; row hit / row miss / closed-bank classification |
| `bank_mgmt` | `rtl/bank_mgmt.sv` | open row and three timing counters per bank |
| `init_fsm` | `rtl/init_fsm.sv` | JEDEC power-up and mode-register programming |
| `cmd_app` | `rtl/cmd_app.sv` | the scheduler: one command per clock |
| `addr_cmd_decode` | `rtl/addr_cmd_decode.sv` | command → pin encoding, registered |
| `odt_ctrl` | `rtl/odt_ctrl.sv` | ODT window around writes |
| `ddr3_data_path` | `rtl/ddr3_data_path.sv` | write data at CWL, read data back to the user |
| `ddr3_ctrl_top` | `rtl/ddr3_ctrl_top.sv` | top level |

## Data width: one word per burst

DDR3 uses an 8n prefetch. For each read or write, the DRAM core moves one 8n-bit
word, and the pins carry it as eight n-bit beats on both clock edges. The controller
works at that word level. For the default 64-bit module (`DQ_W = 64`), one user
request carries a 512-bit word (`WORD_W`), which is a whole BL8 burst. The
memory-side data ports (`mem_wrdata`, `mem_rddata`) also carry one burst per
transfer. The I/O cells that serialize the burst onto DQ with DQS strobes are
device-specific and are not part of this RTL. A PHY or a vendor DDR I/O block goes
between these ports and the pins.

## How a request becomes commands

`cmd_decode` splits the address at the head of the queue into
`{row[13:0], bank[2:0], column/8[6:0]}`. Columns are always burst-aligned. It then
compares the request with `bank_mgmt`:

* **row hit**: the bank has this row open. `cmd_app` issues RD or WR, or RDA/WRA
  for the auto-precharge operations, and removes the request from the queue.
* **row miss**: the bank has another row open. `cmd_app` issues PRE for that bank,
  then treats the request like a closed-bank access.
* **bank closed**: `cmd_app` issues ACT for the row. Once tRCD has passed, the
  request is a row hit.

Rows stay open after an access (open-page policy). They close only when:

* the access used auto-precharge (RDA/WRA);
* a different row is needed in the same bank;
* a refresh, a mode-register write or a low-power entry needs all banks closed.

Requests are served strictly in order, one at a time. There is no reordering
across banks.

`bank_mgmt` has three down-counters per bank. One gates the next ACT, one the next
RD/WR and one the next PRE. They are loaded from the commands `cmd_app` issues:

| command | next RD/WR | next PRE | next ACT |
|---|---|---|---|
| ACT | tRCD | tRAS | tRC |
| RD | – | ≥ tRTP | – |
| WR | – | ≥ CWL + 4 + tWR (write recovery) | – |
| RDA / WRA | bank closes | – | (later of tRAS and tRTP or write recovery) + tRP |
| PRE / PREA | bank closes | – | ≥ tRP |
| REF | – | – | ≥ tRFC |

`cmd_app` also enforces the spacing rules that apply to the whole device:

* tCCD between column commands;
* CWL + 4 + tWTR from a write to a read;
* CL + tCCD + 2 − CWL from a read to a write;
* tRRD between activates;
* a global busy count after REF (tRFC), MRS (tMOD), self-refresh exit (tXS) and
  power-down exit (tXP).

tFAW is not checked separately. At DDR3-800 with 1 KB pages, tFAW equals 4 × tRRD,
so tRRD spacing already satisfies it. A faster speed bin would need an
explicit four-activate window.

## Cycle alignment at the pins

This is the part to read before changing anything. `cmd_app` decides a command in
cycle *t*. `addr_cmd_decode` registers the pins, so the device sees the command
in cycle *t*+1. Everything that must line up with the command is timed from
*t*+1:

* **Write data.** `ddr3_data_path` keeps a short shift register of write issues.
  It raises `mem_wrdata_en` with the burst in cycle *t*+1+CWL, which is exactly CWL
  after the WR on the pins. The burst is taken from the head of the queue in cycle
  *t* and waits in a 4-entry FIFO.
* **ODT.** `odt_ctrl` raises ODT in cycle *t*+1+CWL−2 (ODTLon with zero additive
  latency). ODT stays high for 6 cycles after a BL8 write and 4 after a BC4 write.
  Writes that are closer together keep it high.
* **Read data.** The PHY returns the burst CL cycles after the RD on the pins.
  The controller registers it once and presents it on `rd_valid`/`rd_data`. Reads
  return in request order.

The CAS latency, CAS write latency and burst length used for this alignment are
never read from the configuration registers directly. `cmd_app` decodes them from
the MR0 and MR2 values it actually drives onto the address pins, both during
initialization and at run time. The data path and ODT therefore always match what
the device was told, even if software edits a register without issuing an MRS.

## Initialization

`init_fsm` runs the JEDEC sequence after reset, then hands over to `cmd_app`:

1. RESET# is low for 200 µs (`P_RESET`, 80,000 cycles at 400 MHz), with CKE low.
2. RESET# goes high. CKE stays low for another 500 µs (`P_CKEON`, 200,000 cycles).
3. CKE goes high. After tXPR, the FSM issues MRS to MR2, MR3, MR1 and MR0, tMRD
   apart. MR0 is written with DLL reset.
4. After tMOD, the FSM issues ZQCL, waits tZQinit, and raises `init_done`.

The mode-register contents come from the configuration registers. `ddr3_pkg`
encodes them:

| register | field | source |
|---|---|---|
| MR0 | A1:A0 burst length, A6:A4 CL−4, A8 DLL reset, A11:A9 write recovery (tWR = 6 → 010), A12 fast-exit power-down | config 0, config 1 |
| MR1 | A9/A6/A2 RTT_Nom, DLL on, RZQ/7 drive | config 4, if ODT is enabled |
| MR2 | A5:A3 CWL−5, A10:A9 RTT_WR (dynamic ODT) | config 2, config 5, if dynamic ODT is enabled |
| MR3 | 0 | – |

## Refresh and low-power states

A refresh timer counts `config[6]` × 16 cycles. The default is 195 × 16 = 3120
cycles, which is 7.8 µs at 400 MHz. When the timer expires, a refresh becomes due.
It is served before the next user request: PREA if any row is open, then REF after
tRP, then tRFC of silence. Writing a shorter interval takes effect at once. Setting
`config[3]` bit 0 to zero turns periodic refresh off.

The user can send the device into a low-power state with a queued request:

* `OP_SELF_REFRESH`: all banks are closed, then REF is issued with CKE falling. The
  device refreshes itself, and the refresh timer stops.
* `OP_POWER_DOWN`: all banks are closed, then CKE falls with a NOP. This is
  precharge power-down.

Before either entry, the controller waits until all read data have returned and
write recovery is complete.

The controller raises CKE again under these conditions, after at least
tCKESR or tCKE:

* **Self-refresh:** the next request reaches the head of the queue. The controller
  then waits tXS and restarts the refresh timer.
* **Power-down:** the next request arrives, or a refresh falls due. The controller
  then waits tXP.

## Memory reset

DDR3 has a RESET# pin that returns the device to its power-up state at any
time. An `OP_MEM_RESET` request uses it. When the request reaches the head of
the queue, the controller waits until all read data have returned and write
recovery is complete, then closes every open row. It then restarts
`init_fsm`:

* `init_done` falls.
* RESET# and CKE go low together.
* The full initialization sequence runs again, with the long waits.
* The mode registers are written from the current configuration registers.

During that time, `cmd_app` only forwards the initialization commands. Queued
requests wait and are served once `init_done` rises again. The configuration
registers and the rest of the controller keep their state.

After RESET#, treat the memory contents as lost. The standard does not
guarantee them, and the test model clears its storage to make sure nothing
relies on them.

## Run-time mode-register writes

An `OP_MRS` request with `addr[1:0]` = *n* rewrites MR*n* from the current
configuration registers. It first closes all rows. The new setting holds until the
next MRS. This is how the burst length changes (BL8 ↔ BC4), and also CL, CWL and
the ODT values. Typical use: load the new value into the configuration register,
then queue `OP_MRS`.

## Configuration registers

Sixteen 8-bit registers. `cfg_load` writes `cfg_in_value` into register
`cfg_register_number` at the clock edge. `cfg_fetch` copies that register to
`cfg_out_value`, which holds its value until the next fetch.

| # | contents | reset |
|---|---|---|
| 0 | burst length code, MR0 A1:A0 (0 = BL8, 1 = on the fly, 2 = BC4) | 0 |
| 1 | CAS latency, 5–11 | 6 |
| 2 | CAS write latency, 5–8 | 5 |
| 3 | bit 0 periodic refresh, bit 1 ODT, bit 2 dynamic ODT (RTT_WR) | 7 |
| 4 | RTT_Nom code (MR1) | 1 (RZQ/4) |
| 5 | RTT_WR code (MR2) | 1 (RZQ/4) |
| 6 | refresh interval / 16 cycles | 195 |
| 7–15 | spare, read/write | 0 |

## Ports of `ddr3_ctrl_top`

* **Clock**
  * `clk_in`, `rst_n` (asynchronous), `sync_factor`.
  * `ctrl_clk` = `clk_in` / (2 × `sync_factor`). A factor of 0 acts as 1.
  * `ctrl_rst_n` is reset synchronized to `ctrl_clk`.
  * For a 300–400 MHz memory clock, drive `clk_in` at 600–800 MHz with a factor
    of 1.
* **User port** (synchronous to `ctrl_clk`)
  * A request is accepted when `req_valid` and `req_ready` are both high.
  * Request fields: `req_op` (`ddr3_pkg::user_op_e`), `req_addr`
    (`{row, bank, column/8}`) and `req_wdata` (512 bits).
  * Read bursts come back on `rd_valid`/`rd_data`.
  * Status outputs: `init_done`, `self_refresh`, `power_down`.
* **Configuration port**
  * `cfg_register_number`, `cfg_in_value`, `cfg_load`, `cfg_fetch`,
    `cfg_out_value`.
* **Memory port**
  * Command pins: `ddr_ck`, `ddr_reset_n`, `ddr_cke`, `ddr_cs_n`, `ddr_ras_n`,
    `ddr_cas_n`, `ddr_we_n`, `ddr_ba[2:0]`, `ddr_addr[13:0]`, `ddr_odt`.
  * Burst-wide data ports: `mem_wrdata_en`/`mem_wrdata` and
    `mem_rddata_valid`/`mem_rddata`.

The top has two parameters, `P_RESET` and `P_CKEON` (the two power-up waits in
memory cycles). Every other timing value is a parameter of `bank_mgmt`,
`cmd_app` and `init_fsm`, and its default is in `ddr3_pkg`. The defaults are
DDR3-800E values at 2.5 ns: CL 6, tRCD 6, tRP 6, tRAS 15, tRC 21, tRFC 64 for a
2 Gb device, and tREFI 3120. The geometry is also in `ddr3_pkg`: 8 banks, 14-bit
row, 10-bit column, 64-bit DQ.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_clock_sync` | output period and high time for factors 2, 1, 3, 5 and 0; reset synchronizer |
| `tb_config_interface` | reset contents, 51 into register 15, every register round trip, hold, load+fetch |
| `tb_cmd_pipeline` | 3000 random cycles against a reference queue, full/ready behaviour |
| `tb_cmd_decode` | address split, flags, hit/miss/empty for random requests and bank states |
| `tb_bank_mgmt` | exact cycle at which ACT/RD/WR/PRE are allowed after each command |
| `tb_init_fsm` | RESET#/CKE timing, MRS order and spacing, encoded MR0–MR3 bits, tZQinit; the same again after a restart |
| `tb_cmd_app` | command sequences and exact spacing for hit/miss/closed, turnarounds, MRS, refresh, self-refresh, power-down, memory reset |
| `tb_addr_cmd_decode` | every command against the DDR3 truth table |
| `tb_odt_ctrl` | ODT waveform cycle by cycle for CWL 5–8, BL8/BC4, back-to-back writes |
| `tb_ddr3_ctrl_top` | whole controller against a DDR3 model (below), with shortened power-up |
| `tb_ddr3_full` | whole controller at default parameters: full 700 µs power-up, 384 bursts, periodic refresh |

`tb/ddr3_mem_model.sv` is a behavioural DDR3 device used only for testing. It
tracks every bank and stores written bursts, then returns them CL cycles after a
read. It also checks the protocol and counts violations:

* reset and CKE timing, including a RESET# in the middle of operation;
* initialization order;
* tRCD, tRP, tRAS, tRC, tRRD, tCCD, tWTR, tRTP, write recovery and read-to-write;
* tMRD, tMOD, tRFC, tXS, tXP and tCKESR;
* write data exactly at CWL;
* the ODT window;
* the maximum gap between refreshes.

`tb_ddr3_ctrl_top` makes every mechanism happen at least once and counts it:

* activates, row hits, row-miss precharges and precharge-all;
* auto-precharge reads and writes;
* a full queue;
* refreshes, including with rows open;
* a run-time change to CL 7 / CWL 6, and a switch to BC4;
* self-refresh, and power-down left both for a request and for a due refresh;
* a memory reset in the middle of traffic, followed by re-initialization;
* ODT windows.

If a mechanism never happens, or the model finds a single protocol error, the
test fails. Read data are compared against a reference copy of everything
written.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/ddr3_pkg.sv tb/tb_ddr3_ctrl_top.sv --top-module tb_ddr3_ctrl_top
./obj_dir/Vtb_ddr3_ctrl_top
```

Replace the testbench name to run another one. `tb_ddr3_full` simulates 280,000
power-up cycles plus traffic in under a second.

## Where this departs from the original description

* **Internals.** The original names the blocks and their functions only. Their
  internals are this implementation's own. This includes:
  * the scheduling policy, the open-page policy details and the low-power
    entry/exit triggers;
  * the user request format and the address map;
  * the configuration register map and its reset values;
  * the clock divider and the reset synchronizer.
* **32 banks.** The original says up to 32 banks can be managed at a time. This
  controller drives one rank with one CS#, so it manages the 8 banks of one DDR3
  device. 32 banks would need four ranks with their own CS#, CKE and ODT, and that
  is not built.
* **DDR I/O.** The double-data-rate I/O (DQ/DQS serialization, read capture,
  write leveling, read training) is left out. The controller stops at burst-wide
  data ports.
* **Memory reset trigger.** The memory reset is started by a queued request.
  How the reset is triggered is this implementation's choice.
* **External init control.** An external agent cannot step the initialization
  sequence. It can only choose the mode-register contents, through the
  configuration registers.
* **Timing values.** All timing values are JEDEC DDR3-800E values at 400 MHz. The
  original gives none. At a 300 MHz memory clock the cycle counts stay safe,
  because each cycle is longer. The refresh interval must then be lowered to
  `config[6]` = 146, so that refreshes come every 7.8 µs.
* **Speed.** The original reports 104.3 MHz for its synthesized clock
  synchronization and configuration blocks. No timing closure has been done for
  this RTL.

## Lint notes

Verilator's `-Wall` reports a few warnings that are intentional:

* unused package constants (each module uses a subset of `ddr3_pkg`);
* unused bits of the shared request and configuration structs;
* two unconnected status outputs in the top;
* `SYNCASYNCNET` on the synchronized reset, because the assertions use it in
  `disable iff` while the flip-flops use it as an asynchronous reset.

There are no latches, combinational loops or multiply-driven nets.

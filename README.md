# Usage parameter control for four ATM links, with cell-loss-priority tagging

An ATM network has to check that each connection sends no more cells than its
traffic contract allows. Without that check, a faulty or malicious source can
flood a link. This device does the check, called usage parameter control (UPC),
for four independent links of up to 155 Mb/s each at full load. It checks each
cell against its connection's contract with the Virtual Scheduling Algorithm
(VSA), then does one of three things:

- passes the cell,
- **tags** it (sets the cell loss priority bit, CLP, to 1, so the network drops it first when congested),
- **discards** it.

The policy protects high-priority traffic. A non-conforming CLP=0 cell can be
tagged instead of lost. A non-conforming CLP=1 cell is already low priority, so
it is dropped.

One external memory holds the state of every connection: up to 64K connections
per link (256K in total) in *direct* mode, or 64K in total in *table lookup*
mode. Each connection has an all-purpose event counter, and there is a
counter-only mode. A microprocessor port configures the device and reads the
status of the input links.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The external
memory is the only part not written as RTL. A behavioural model of it is in
`tb/ext_mem_model.sv`.

## How a cell travels through the device

```
 link i ──► input_port ──► cell_flow_control ──► header_extract ──► vsa_unit ◄──► mem_ctrl ◄──► external memory
  (rx_clk)  4-cell FIFO     round robin over      mask → index       lookup,          ▲
            early/late      the four links                            read, decide,    │
            sync, overflow        │                                   write back   param_transfer ◄── processor
                                  ▼
                          clp_tag_discard (link i) ──► tx link i     (device clock)
```

1. **`input_port`** (one per link) collects 53-byte cells on the link's own byte
   clock `rx_clk`. A cell becomes visible to the device only once all 53 bytes
   are in. The FIFO holds four cells. It only decouples the two clocks and does
   no rate adaptation.
2. **`cell_flow_control`** picks, in round-robin order, a link that has a
   complete cell and an idle output stage. It sends that cell's header (bytes
   0..3) and link number to the policing path.
3. **`header_extract`** turns the header into a 16-bit connection index, using
   the bits selected by the mask registers.
4. **`vsa_unit`** finds the connection record and decides with `vsa_core`. It
   writes the updated record back and returns pass, tag or discard. In table
   mode it first reads a lookup-table entry.
5. **`clp_tag_discard`** (one per link) streams the cell out on the device
   clock, one byte per clock. For a tagged cell it sets the CLP bit on the way
   out. For a discarded cell it releases the FIFO slot in one clock.

Only one cell is in the policing path at a time. The four output stages run in
parallel, so a link streams one cell while the next link's cell is being
policed.

## The policing decision (`vsa_core`)

Each connection record holds:

| field | width | meaning |
|---|---|---|
| `tat` | 32 | theoretical arrival time of the next cell, in device clocks |
| `t`   | 32 | cell interval T = 1 / peak cell rate, in device clocks (20 ns) |
| `tau` | 32 | cell delay variation tolerance, in device clocks |
| `e`   | 8  | configuration byte E (below) |
| `cnt` | 41 | event counter |

A cell arrives at time `ta`. That is the value of a free-running device-clock
counter at the moment the VSA unit accepts the request. The two comparisons are
made at the same time, and a priority select picks the outcome. The whole
decision is one combinational step, with no sequential steps.

| condition (first true wins) | result | new TAT |
|---|---|---|
| E[4] counter-only mode | pass | unchanged |
| `ta >= TAT` (the cell is late) | pass | `ta + T` |
| `TAT - ta <= tau` (early, within tolerance) | pass | `TAT + T` |
| CLP = 0 and E[0] set | **tag** | unchanged |
| otherwise | **discard** | unchanged |

The configuration byte E:

| bit | name | meaning |
|---|---|---|
| 0 | `E_TAG` | tag non-conforming CLP=0 cells instead of discarding them |
| 1 | `E_CNT_PASS` | count passed cells |
| 2 | `E_CNT_DISC` | count discarded cells |
| 3 | `E_CNT_TAG` | count tagged cells |
| 4 | `E_CNT_ONLY` | counter-only mode: no policing; every cell passes (and is counted when bit 1 is set) |

The counter saturates at 2^41 − 1. At 155.52 Mb/s (366,792 cells/s), one
connection fills it in about 69 days.

Times wrap modulo 2^32 and are compared by their signed difference. This stays
correct as long as a connection's TAT and its next arrival are less than 2^31
clocks (about 43 s) apart. A connection that is idle for longer may see its
first cell judged wrongly once. With 32-bit T, the slowest contract is one cell
per 2^32 clocks (about 86 s). 16 kb/s needs T = 1,325,000. T is a whole number
of clocks, so a requested rate is rounded by less than 1/T. That is below 0.78%
for every rate up to 166 Mb/s.

## Finding a connection: masks and the two modes

The four 8-bit **mask registers** MASK0..MASK3 select bits from header bytes
0..3. These bytes hold GFC/VPI, VPI/VCI, VCI, and VCI/PT/CLP. The HEC byte
cannot be selected.

The selected bits keep their transmission order (byte 0 bit 7 first) and are
packed towards bit 0, so the last selected bit becomes index bit 0. If fewer
than 16 bits are selected, the upper index bits are zero. If more than 16 are
selected, only the last 16 are used. Example: masks `00 0F FF F0` select the 16
VCI bits, so the index equals the VCI.

| mode (CTRL bit 0) | lookup | record address | connections |
|---|---|---|---|
| direct (0) | none | `{0, link[1:0], index[15:0]}` | 64K per link, 256K in total |
| table lookup (1) | entry at `{1, 00, link[1:0], index[13:0]}`, bits 15:0 = connection number | `{0, 00, connection[15:0]}` | 64K in total |

In table mode the four links share one 64K-entry lookup table, so each link can
use 14 index bits. Memory words are 145 bits, one record per word, with the
layout of `upc_pkg::conn_rec_t`. The address is 19 bits.

## Link inputs and their status events (`input_port`)

**Link signals.** A link sends `rx_data` with `rx_valid` (a byte is present)
and `rx_soc` (cell sync, high with the first byte of a cell). Each of the 52
valid bytes after the first belongs to the same cell.

**Events.** The receiver reports four events per link:

- **Early sync**: a cell sync arrives while a cell is still loading. It is
  ignored, and that byte is stored as data.
- **Late sync**: the byte-clock cycle right after the last byte of a cell
  carries no cell sync. A link with gaps between cells raises this after every
  gap and should ignore it.
- **FIFO overflow**: a cell starts while the FIFO holds four cells. The whole
  cell is discarded. This happens when the link's byte clock is faster than the
  device can forward cells.
- **Missing byte clock**: no `rx_clk` edge for `MISS_CYC` device clocks (256
  clocks = 5.1 µs by default). It is reported once per outage.

**Crossing into the device clock.** The FIFO's cell pointers cross between the
two clocks in Gray code. The early, late and overflow events are toggles in the
link domain, synchronised into the device domain, where each appears as a
one-cycle pulse. The missing-clock watchdog runs in the device domain on a
synchronised copy of a flop that toggles on every `rx_clk` edge.

## Processor interface (`param_transfer`)

The processor sees word registers of 32 bits. Writes take effect at the clock
edge. Reads are combinational.

| index | register | contents |
|---|---|---|
| 0 | CTRL | bit 0: table lookup mode |
| 1–4 | MASK0–3 | header mask for header byte 0..3 |
| 5 | STATUS0 | link 0 in bits 3:0, link 1 in bits 7:4 |
| 6 | STATUS1 | link 2 in bits 3:0, link 3 in bits 7:4 |
| 7 | IRQ_EN | interrupt enable, bit i for bit i of {STATUS1, STATUS0} |
| 8 | MEM_ADDR | external memory word address |
| 9 | MEM_CMD | write 1: store MEM_DATA at MEM_ADDR; write 2: load it; read bit 0: busy |
| 10–14 | MEM_DATA0–4 | one memory word, MEM_DATA0 = bits 31:0 |

Each status nibble holds: bit 0 early sync, bit 1 late sync, bit 2 FIFO
overflow, bit 3 missing byte clock. A status bit stays set until the processor
writes a 1 to it. If an event and its clear happen in the same clock, the bit
stays set. `irq` is high while any enabled status bit is set.

Connection records and lookup entries are written through the MEM window. To
program a connection, write MEM_ADDR and MEM_DATA0–4, then write 1 to MEM_CMD,
and poll MEM_CMD bit 0 until it reads 0.

## External memory interface (`mem_ctrl`)

`mem_ctrl` shares the memory between the VSA unit and the processor window. It
grants them in round-robin order, one access at a time. Towards the memory it
uses a hold-until-acknowledge handshake:

- `ext_req`, `ext_we`, `ext_addr` and `ext_wdata` stay stable until the memory
  raises `ext_ack` for one clock.
- Read data is taken from `ext_rdata` in that clock.

DRAM details (row/column timing, refresh) belong on the memory side of this
handshake. With a memory that answers 3 clocks after `ext_req`:

- one access takes 6 clocks from the client's request to its done pulse,
- a cell takes 14 clocks in the VSA unit in direct mode and 20 in table mode.

## Throughput and capacity

| requirement | needed | this design |
|---|---|---|
| 4 links × 155.52 Mb/s at 100 % load | one decision per 34.1 device clocks | about 16 clocks direct, 22 table (6-clock memory access); enough while one access takes ≤ 15 clocks (direct) or ≤ 10 (table) |
| output of one link | 366,792 cells/s | 53 clocks per cell = 943,396 cells/s |
| direct mode | 256K records | 2^18 record addresses |
| table mode | 64K lookup entries + 64K records | 2^16 + 2^16 |
| counter for 69 days at 155 Mb/s | 2.19·10^12 | 2^41 = 2.20·10^12 |
| lowest rate 16 kb/s | T = 1.33·10^6 clocks | T up to 4.29·10^9 |

## Choices made where the source description is silent, and departures from it

These choices are this design's own:

- **Index width.** The source states both 8 and 16 extracted header bits. 16 is
  used (`EXT_W`), because 64K connections per link need 16 bits.
- **Counter width.** The source mentions a 16-bit counter per channel, but also
  a counting range of 2^41 that lasts 69 days at 155 Mb/s. The counter is
  41 bits.
- **Parameter coding.** The bit widths of TAT, T, tau and E are not given. This
  design uses 32-bit clock counts and the 8-bit E layout above. The source
  quotes a 0.78 % rate granularity, which points to a compact floating-point
  coding of T. Plain integers are used instead. They are wider, but at least as
  fine.
- **The CLP rule.** The source bases the algorithm on the CLP bit and aims to
  keep CLP=0 losses low, but does not spell out the rule. The rule here is
  single-bucket VSA with optional tagging of CLP=0 cells and discard of CLP=1
  cells. Tagged cells do not advance TAT.
- **No sustainable-rate bucket.** Sustainable cell rate and maximum burst size
  are mentioned for counter-only mode. No second bucket is built, because the
  connection record consists of TAT, T, tau and E only.
- **Not built at all:**
  - the "decision table" for programming the counter (E bits are used instead),
  - UTOPIA handshake signals beyond data, valid and cell sync,
  - HEC regeneration after tagging (the HEC byte passes unchanged).
- **Own choices of interface and structure:**
  - the register map and bus width,
  - the memory map,
  - the memory handshake,
  - round-robin service of the links,
  - policing one cell at a time,
  - `MISS_CYC`,
  - output timing on the device clock.
- **Reset.** One asynchronous active-low reset, `rst_n`, serves all clock
  domains.

## Files

| file | contents |
|---|---|
| `rtl/upc_pkg.sv` | constants, `conn_rec_t`, `decision_e`, event bit numbers, memory map functions |
| `rtl/upc_top.sv` | the device |
| `rtl/input_port.sv` | link receiver and four-cell dual-clock FIFO |
| `rtl/cell_flow_control.sv` | round-robin link service |
| `rtl/header_extract.sv` | mask-based index extraction |
| `rtl/vsa_unit.sv`, `rtl/vsa_core.sv` | policing sequencer and decision |
| `rtl/mem_ctrl.sv` | external memory sharing |
| `rtl/param_transfer.sv` | processor registers |
| `rtl/clp_tag_discard.sv` | link output stage |
| `tb/ext_mem_model.sv` | behavioural external memory (sparse, fixed latency) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_upc_full_load.sv` | the device at its rated load (four links, 155.52 Mb/s, 100 %) |

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
stops with `$finish`. It also has a watchdog that counts a failure if the run
hangs. For example, the whole device at its default sizes:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/upc_pkg.sv tb/tb_upc_top.sv --top-module tb_upc_top -Mdir obj_top
./obj_top/Vtb_upc_top
```

Swap in `tb_<module>` to run a block's own testbench. Verilator's lint, run
with `verilator --lint-only -Wall rtl/upc_pkg.sv rtl/<module>.sv -y rtl`,
reports only unused package constants, a few unused bits, and `rst_n` being
used both as an asynchronous reset and in assertion `disable iff` clauses.

What the testbenches establish:

- **`tb_upc_top`** runs the whole device, with every parameter at its default.
  - Setup: four links on 51, 53, 47 and 9 ns byte clocks; 90 cells per link;
    direct mode, then table mode.
  - Every decision is checked against an independent model of the records.
  - Every forwarded cell is checked byte for byte, in order, with its CLP tag.
  - The final memory contents, the status registers with their clearing, and
    the interrupt are checked.
  - The test fails unless each of these happened at least once: pass, tag,
    discard, counter-only, table lookup, early sync, late sync, FIFO overflow
    (link 3), missing byte clock (link 2) and interrupt.
- **`tb_upc_full_load`** runs the device at its rated load.
  - All four links send cells back to back at 155.52 Mb/s (a 19.44 MHz byte
    clock), in direct mode and then in table mode.
  - No FIFO may overflow, and every cell must be policed and forwarded.
  - Each decision must take at most 34 device clocks, the time one cell takes
    on the four links together. The longest measured are 15 clocks in direct
    mode and 21 in table mode.
- **Block testbenches**:
  - `vsa_core`: boundaries of the VSA rule, tagging, counter-only mode and
    saturation, against a 64-bit reference.
  - `header_extract`: random masks, including more than 16 bits set, for
    both the 16-bit and the 8-bit index width.
  - `input_port`: cell content across the clock crossing, and each event alone.
  - `vsa_unit`: records and decisions in both modes, and exact cycle counts.
  - `mem_ctrl`: data integrity, latency and fairness.
  - `param_transfer`: write-one-to-clear and the memory window.
  - `cell_flow_control`: round-robin order and busy handling.
  - `clp_tag_discard`: output bytes and timing.

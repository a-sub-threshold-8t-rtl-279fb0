# Sub-threshold 8T SRAM macro, 1 KB, with read burst mode and retention standby

This is the logic of a 1 KB SRAM macro meant for battery-less IoT chips that run
from harvested energy at sub-threshold supplies (roughly 350-700 mV). The macro
targets low standby power and low energy per access. The ideas visible in its
logic are:

* **8T cells with a separate read port.** Reading a cell does not disturb it.
  Each row also has its own read-port footer (VVSS). Only the row being read
  has its footer pulled low, so cells in other rows cannot leak the read bit
  line down.
* **Read before write.** Any write reads the whole 128-bit row first. The
  addressed 16-bit word is then replaced and the whole row is written back.
  No cell on the word line is left half-selected with undriven bit lines.
* **Read burst mode (RBM).** A row read loads all eight words of the row into
  latches. A later read of the same row is served from those latches without
  touching the array.
* **Power modes.**
  * Hold: ENABLE is low.
  * Standby: the peripherals are power gated, and the cells and drivers keep
    the data.
  * Shutdown: everything is off and the data is lost.

The RTL describes the macro at the level of its control signals: word lines,
footers, bit lines and the strobes REN, WEN, L_CLK and FF_CLK. The bit-cells
are a behavioural logic model. The analog parts of the real circuit cannot be
expressed as logic, so they are not here:

* the charge pumps that boost RWL and WWL and overdrive the VVSS pull-down;
* the high-V_T devices;
* the full-swing discharge of the read bit lines.

## Organisation

| | |
|---|---|
| cells | 64 rows x 128 columns = 8192 bits |
| word | 16 bits, 8 words per row, 512 words |
| address | `ADR[8:3]` row, `ADR[2:0]` word within the row |
| word w of a row | columns `16*w .. 16*w+15` |

```
            +--------------+   +-----+   +-----------+   +-------------+
 ADR/DIN -->| input_latches|-->| row |-->| row_driver|-->|             |
 ENABLE     +--------------+   | dec |   | RWL WWL   |   | bitcell_    |
 RD_WR           |             +-----+   | VVSS      |   | array       |
 RBM        +---------+  +------------+  +-----------+   | 64 x 128    |
       ---->|  BCU    |->|control_unit|--REN/WEN-------->|             |
            +---------+  +------------+                  |             |
                              | L_CLK/FF_CLK enables     |             |
                         +-----------+  D<127:0>  +------+---+  BL/BLB |
                OUT <----|    dmu    |----------->| column_  |-------->|
                         |           |<---RBL-----| driver   |<--RBL---|
                         +-----------+            +----------+---------+
 STDBY/SHTDWN/RESET --> power_gating_ctrl --> iso, peripheral reset, array power
```

## One access per clock cycle

The request is sampled on the rising edge of CLK. The cycle then runs in two
halves:

| | high phase | falling edge | low phase |
|---|---|---|---|
| read, row not latched | REN=1: RWL on, VVSS of the row low, RBL discharges for 0 bits | L_CLK and FF_CLK rise: row saved in the latches, word loaded into OUT | RBL precharged |
| read, burst hit | REN stays 0 | FF_CLK rises: OUT loaded from the latches | - |
| write | REN=1: the row is read (FF_CLK stays high) | L_CLK rises: row saved in the latches | WEN=1: WWL on, BL/BLB carry the latched row with DIN in the addressed word |
| hold (ENABLE=0) | nothing | nothing | nothing |

OUT changes half a cycle after the request is sampled and then holds until the
next read. A read one cycle after a write to the same word returns the new
data. The write completes in the low phase of the write cycle, and the next
row read starts in the following high phase.

All strobes come from two toggle flip-flops, one on each clock edge. Their XOR
marks the high phase. This keeps every strobe steady across the edge that
samples it, so the design simulates without races in a zero-delay simulator.
L_CLK and FF_CLK are generated with their intended waveforms and brought out.
Inside the DMU, the latches and the output register are loaded on the falling
CLK edge with enables. That is the same instant L_CLK and FF_CLK rise.

## Burst rule

The burst control unit (BCU) keeps a record of which row the DMU latches hold.
A read is a **burst hit** if all of these are true:

* RBM is high;
* the previous enabled access was a read;
* that read was to the same row.

A burst hit skips the row read, so REN and L_CLK do not toggle. Eight
sequential reads therefore cost one row read. Reading all 512 words in order
takes 64 row reads with RBM on and 512 with it off.

A write clears the record, because the latches then hold the row as it was
before the write. Hold cycles keep the record. Standby, shutdown and RESET
clear it.

## Power modes

| mode | entered by | powered | state |
|---|---|---|---|
| active | ENABLE=1 | all | accesses served |
| hold | ENABLE=0 (clock may be stopped) | all | everything kept, burst record kept |
| standby | STDBY=1 | cells, row and column drivers | data kept; peripherals reset |
| shutdown | SHTDWN=1 | nothing | data lost (the model clears it to 0) |

STDBY and SHTDWN are not latched and act at once. SHTDWN wins if both are
high. While either is high:

* the row drivers hold RWL and WWL low and VVSS high;
* the column drivers hold BL and BLB low and RBL high;
* the peripherals are held in reset and requests are ignored.

The peripherals are the input latches, the decoder, the control unit, the BCU
and the DMU. When the mode is left, OUT reads 0 and no burst is pending. The
next rising edge may carry a request.

## Modules

| file | block |
|---|---|
| `rtl/sram_pkg.sv` | sizes, power-mode type |
| `rtl/sram_macro.sv` | top: the macro |
| `rtl/input_latches.sv` | request capture on the rising edge |
| `rtl/burst_control_unit.sv` | BCU, burst-hit decision |
| `rtl/control_unit.sv` | REN, WEN, L_CLK, FF_CLK and the DMU enables |
| `rtl/row_decoder.sv` | one-hot row select |
| `rtl/row_driver.sv` | RWL, WWL, VVSS for all rows; standby isolation |
| `rtl/column_driver.sv` | BL/BLB drive, RBL precharge; standby isolation |
| `rtl/bitcell_array.sv` | 64 x 128 8T cell model |
| `rtl/dmu.sv` | output buffer, row latches, word select, output register, write merge |
| `rtl/power_gating_ctrl.sv` | mode decode, isolation, peripheral power and reset |

Top-level ports:

* Inputs: `CLK`, `RESET` (active high, asynchronous), `STDBY`, `SHTDWN`,
  `ENABLE`, `RD_WR` (1 = read), `RBM`, `ADR[8:0]`, `DIN[15:0]`.
* Data output: `OUT[15:0]`.
* Observation outputs: `REN`, `WEN`, `L_CLK`, `FF_CLK`, `BURST_HIT`,
  `MODE[1:0]`.

The sizes are parameters: `ROWS`, `COLS` and `WORD_W`. Their defaults are the
1 KB configuration.

## Where this RTL makes its own choices

These points are not fixed by the circuit description this design follows.
They were chosen here:

* **Pins and address.**
  * The SHTDWN pin and its priority over STDBY.
  * The row/column split of the address and the placement of words on the
    columns.
  * RESET polarity.
  * Bringing the control strobes out as ports.
* **Timing.**
  * The input latches are modelled as registers loaded on the rising edge.
  * The DMU uses falling-edge enables rather than separate L_CLK/FF_CLK clock
    nets.
  * The word select is a multiplexer rather than tristate buffers.
* **Burst rule.**
  * "Consecutive addresses" is read as back-to-back reads of the same row.
    Strictly incrementing addresses are not required.
  * A write ends the burst.
* **Cell model.**
  * While its word line is on, a cell stores `BL & ~BLB`.
  * The half-select pseudo-read is not modelled. It cannot occur here, since
    every write drives the whole row.
  * Shutdown clears the cells to 0.
* **Bit lines and word line.** In the circuit the column drivers set BL/BLB
  before WWL rises. In this RTL both follow WEN in the same instant, because
  the order between them is an analog timing margin.
* **Write timing.** Two readings of the write cycle are possible: its row read
  in the high phase, or in the low phase. This RTL reads in the high phase and
  writes in the low phase, as for reads.
* **Power gating.** Which peripherals are power gated in standby, and that
  they come back from reset.

Not modelled: the charge pumps (analog), and any encoding that raises the
share of 1 bits in stored words. Storing more 1s lowers read and write power,
because only a 0 discharges the read bit line. That choice belongs to the
system using the macro.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The macro's
end-to-end test, at full size, is `tb/tb_sram_macro.sv`. It runs:

* a fill of all 512 words;
* sequential reads with RBM off and on, with the row-read counts checked;
* rows of words with 0, 4, 8, 12 and 16 zero bits, counting discharged read
  bit lines;
* 3000 random accesses with hold cycles;
* standby retention and shutdown loss.

It checks every strobe in both clock phases on every cycle.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_sram_macro rtl/sram_pkg.sv tb/tb_sram_macro.sv
./obj_dir/Vtb_sram_macro
```

Replace `tb_sram_macro` with any other `tb_*` name to run that block's test.
The testbenches seed internal state randomly and never rely on x values.

## Lint notes

`bitcell_array` is made of latches on purpose (`always_latch`, 8192 bits). A
bit-cell is a latch, and a write is a word-line pulse, not a clock edge. The
control unit and the DMU use both clock edges, as the macro's access cycle
does.

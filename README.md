# Read-out controller ASIC quality-assurance tester

This is the FPGA firmware that tests a read-out controller (ROC) chip, written as synthesizable
SystemVerilog. The ROC is a packet processor. It takes eight 640 Mbps input streams of detector data
and a 320 Mbps trigger/timing (TTC) stream. For every level-1 trigger it sends a packet on each of
its four sub-read-out (SROC) outputs. To test a chip, the firmware closes a loop around it:

```
            +------------------------- expected triggers -----------------------+
            |                                                                   v
  +---------+---------+  8 x 640 Mbps  +-----------+  4 x 640 Mbps  +-----------+-----------+
  | stimuli generators| -------------> |    ROC    | -------------> | output capture and    |
  |   (SG)            | -- TTC ------> |   (DUT)   |                | analysis (OCA) x 4    |
  +---------+---------+  320 Mbps      +-----+-----+                +-----------+-----------+
            ^                                | I2C x 2                          |
            |            +-------------------+-----------+                      |
            +----------- | monitor and control (MC)      | <---- status --------+
             config      | AXI4-Lite register bank, I2C  |
                         +-------------------------------+
```

* The **SG** side makes level-0 (L0) events. It sends one packet per event on each input lane, with
  content that can be predicted. After a set latency it sends the level-1 accept (L1A) for each
  event.
* The **OCA** side decodes each SROC output and checks every packet against what the SG sent.
  The checks cover the 8b10b encoding, packet syntax, parity, checksum, length, content and trigger
  identity.
* The **MC** side is a register bank that a processor reads and writes over AXI4-Lite, plus two
  I2C masters that configure the chip.

A chip passes if no checker raises a flag.

The top module is `qa_tester_top` (`rtl/qa_tester_top.sv`). The chip itself is outside: its pins are
the `roc_*` ports.

## Time base

Everything runs from a single 320 MHz clock. The design uses two clock enables:

| rate | period | what happens |
|---|---|---|
| 64 MHz symbol slot | 5 cycles | one 10-bit 8b10b symbol per lane (2 bits per cycle = 640 Mbps) |
| 40 MHz bunch crossing (BC) | 8 cycles | one 8-bit TTC command word, 1 bit per cycle (320 Mbps) |

`roc_bc_clk` is the 40 MHz clock forwarded to the chip. It is high in the first four cycles of a BC.
The first (most significant) bit of that BC's TTC word goes out in the same cycle. In the original
setup only the serial logic runs at 320 MHz and the rest runs at 160 MHz. Here one clock is used,
so there is no clock-domain crossing. The DDR output and input registers, the calibrated
delay lines and the clock manager are FPGA primitives and are not modelled. A lane is presented
as a 2-bit word per cycle: `{rising-edge bit, falling-edge bit}`.

## Stimulus generation

**L0 scheduler** (`l0_scheduler`). Once per BC it decides whether an L0 event happens. The average
rate is `freq_sel × 100 kHz`, with `freq_sel` from 1 to 14 (100 to 1400 kHz). There are three modes:

* random: probability `freq_sel/400` per BC, drawn from a 16-bit LFSR;
* constant: a phase accumulator gives exactly `freq_sel × 10` events per 100 µs;
* burst (the fixed worst case): 8 events in consecutive BCs, with bursts at `1/8` of the rate.

All eight lanes see the same events, and each event is pushed into the TTC latency FIFO.

**Input data generators** (`input_data_generator`, one per lane, parameter `CH`). Each generator
queues events (16 deep, with a sticky overflow flag) and sends one packet per event. It sends K28.5
commas between packets:

```
K28.0 | 0000 BCID[11:8] | BCID[7:0] | N | hit_0 ... hit_N-1 | K28.4
```

* Hit content is `hit_content(CH, BCID, i)` in `roc_qa_pkg`. It is an XOR mix of BCID, index and
  channel, so it is deterministic and different on every lane.
* Per event, an LFSR decides whether the packet is empty. The `empty_sel` setting gives 0, 25, 50
  or 75 % empty packets.
* The LFSR also picks the number of hits: uniform over `1 .. 2m-1`, with mean `m` = 2, 4, 8 or 16
  set by `size_sel`. `const_size` forces exactly `m` hits.
* Bytes go through `enc8b10b` (standard code, running disparity) and `ddr_serializer`.

**TTC generator** (`ttc_generator`, with `bcid_counter` and the `sync_fifo` latency FIFO). Each BC it
sends one command word, most significant bit first:

| bit | command | when |
|---|---|---|
| 7 | BCR, bunch counter reset | BCID = 0, once per 3564-BC orbit; this keeps the chip's BCID counter equal to the firmware's |
| 6 | ECR, event counter reset | once after a rising edge of the request bit |
| 5 | L1A | the oldest L0 event in the latency FIFO is exactly `latency_us × 40` BCs old |

When an L1A is sent, its FIFO entry (BCID and BC time stamp) is popped. The BCID also goes to every
OCA checker as the expected trigger. The latency is clamped to 20–300 µs. The FIFO holds 512 events.
The worst case is 1400 kHz × 300 µs = 420 events in flight, so it does not fill. A 16-bit BC time
stamp is enough because it wraps only after 1.6 ms.

## Output capture and analysis

This is the part that decides whether a chip is good, and the most involved.

**Alignment** (`comma_aligner`). Two bits arrive per cycle, so a symbol boundary can sit at any of
ten bit positions. The boundary is fixed by two values:

* which of the two newest 10-bit windows holds the symbol (bit offset 0 or 1);
* which cycle of the 5-cycle symbol period it ends in (phase).

The aligner compares both windows with both disparities of K28.5 every cycle. A comma followed
exactly 5 cycles later by another comma at the same offset gives lock. After that, the aligner
sends one symbol every 5 cycles. Lock holds until reset or the realign control bit.

**Decoding** (`dec8b10b`). The decoder looks up the 6-bit and 4-bit sub-blocks in the standard
tables. It flags codes that are in no table and sub-blocks whose disparity is not allowed. It
tracks the running disparity from the received code, and it does not check disparity on the first
symbol after reset.

**Assembler state machine** (`oca_assembler`). It expects this SROC packet format (this design's
own):

```
K28.0 | L1ID | 0000 BCID[11:8] | BCID[7:0] | LEN | LEN x ( {P,0000,CH[2:0]} DATA ) | CSUM | K28.4
```

P is the even parity of DATA. CSUM is the XOR of every byte from L1ID to the last DATA byte.
Between packets only K28.5 is allowed. Sticky error bits (`err_bit_e`):

| bit | error | raised when |
|---|---|---|
| 0 | encoding | code or disparity error from the decoder |
| 1 | syntax | a control symbol where data belongs, or data between packets |
| 2 | parity | P does not match DATA |
| 3 | checksum | CSUM does not match |
| 4 | length | K28.4 arrives before LEN hits, or data arrives where K28.4 belongs |
| 5 | content | DATA ≠ `hit_content(CH, BCID, k)`, where `k` counts hits of channel CH in this packet |
| 6 | L1 | BCID differs from the oldest expected trigger, or L1ID differs from the packet count since reset or ECR |
| 7 | unexpected | a packet arrived with no trigger outstanding |

After a control symbol inside a packet, the checker resynchronises on the next K28.0.

**SROC step check** (`sroc_sync_checker`). Every SROC answers every trigger. A sticky `desync` flag
is set if the four packet counters ever differ by more than 8. The largest difference seen is
reported.

## Monitor and control

`axi_reg_bank` has 64 registers of 32 bits behind an AXI4-Lite slave:

* registers 0–35 are read/write control outputs and reset to 0;
* registers 36–63 are read-only status inputs; writes to them are accepted and ignored.

Each write takes the address and data channels together and honours `wstrb`. The register map is
defined in the header of `rtl/qa_tester_top.sv`:

* control: SG enable/ECR/realign, rate and traffic mode, latency, I2C commands, 32 bits of chip
  control (`dut_ctrl`);
* status: lock, flags, I2C results, per-SROC error flags and counters, L0/L1 counts.

`i2c_master` (two instances, 400 kHz at `QDIV = 200`) runs one register transaction with 10-bit
addressing:

* write: `S 11110A9A8 0 | A7..A0 | sub | data | P`
* read: `S 11110A9A8 0 | A7..A0 | sub | Sr 11110A9A8 1 | data NACK | P`

The bus is open drain: the `*_oe` outputs pull low. There is no clock stretching. A missing ACK
sets `nack`.

## What follows the original setup and what is this design's own

These follow the original test setup:

* the structure: SG, OCA and MC, with the latency FIFO between L0 generation and the TTC generator;
* 8 inputs and 4 SROC outputs;
* 640 Mbps input lanes and a 320 Mbps TTC line;
* 8b10b coding with K28.5 alignment after two consecutive commas;
* 100–1400 kHz in 100 kHz steps, with selectable empty share, mean size, constant-size and
  constant-rate options, and a fixed burst case;
* 20–300 µs latency in 1 µs steps;
* the list of checks and the L1 counters per SROC;
* the 64/36/28 register bank;
* two I2C masters with 10-bit addressing.

These are this design's own choices:

* the single clock;
* one 640 Mbps lane per generator (the original splits each generator's stream over two DDR
  serializers, without saying how);
* every packet format and the TTC bit assignment (the real chip's formats are not reproduced);
* the predefined empty shares and sizes, and the burst shape;
* the FIFO and queue depths;
* the sync tolerance;
* the register map;
* the I2C transaction shape.

A real ROC would need its packet parsers and TTC word changed to match its own formats. These
formats sit in `input_data_generator`, `ttc_generator`, `oca_assembler` and `roc_qa_pkg`.

Not included:

* the soft processor, its memory, the AXI interconnect, UART, timer and AXI I2C (reach the register
  bank through the AXI4-Lite port instead);
* the clock manager and the delay lines;
* the test software and its ten-test suite;
* the jitter and skew measurement of the chip's clocks.

## Files

| file | contents |
|---|---|
| `rtl/roc_qa_pkg.sv` | constants, TTC bits, error bits, 8b10b tables and encoder function, hit content function |
| `rtl/qa_tester_top.sv` | top level and register map |
| `rtl/l0_scheduler.sv`, `input_data_generator.sv`, `enc8b10b.sv`, `ddr_serializer.sv` | stimulus lanes |
| `rtl/bcid_counter.sv`, `sync_fifo.sv`, `ttc_generator.sv` | trigger path |
| `rtl/comma_aligner.sv`, `dec8b10b.sv`, `oca_assembler.sv`, `sroc_sync_checker.sv` | output analysis |
| `rtl/axi_reg_bank.sv`, `i2c_master.sv` | monitor and control |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/roc_model.sv` | behavioural ROC in the formats above, for the end-to-end test |
| `tb/i2c_slave_model.sv` | behavioural 10-bit-address I2C slave |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog ends it with a failure
if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_qa_tester_top \
    -y rtl -y tb +libext+.sv rtl/roc_qa_pkg.sv tb/tb_qa_tester_top.sv
./obj_dir/Vtb_qa_tester_top
```

Replace `tb_qa_tester_top` with any other `tb_*` name to run that testbench.

`tb_qa_tester_top` runs the top at its default parameters (about 10 s). The behavioural ROC and
two I2C slaves are attached. The test does the following:

1. sends an ECR;
2. runs constant-rate, random-rate (50 % empty) and burst traffic at 20 µs latency;
3. runs traffic at 300 µs latency;
4. checks through the register bank:
   * all four checkers are locked with no error flag;
   * each SROC sent one packet per L1A;
   * there are as many L1As as L0 events;
   * every L1A matched its L0 event at exactly the configured latency;
5. writes and reads back a register on both I2C buses;
6. damages one hit on purpose and checks that the content flag rises.

It counts each mechanism and fails if any of them never happened.

`tb_workload_max_rate_latency` runs the most demanding corner of the settings: L0 events at
1400 kHz with 300 µs latency, first with random spacing and then in bursts. About 420 events wait
for their L1A at once, and the test checks the following:

* the 512-entry latency FIFO holds them without overflow (the peak occupancy is printed);
* every L0 event gets its L1A on time;
* every SROC checker stays clean.

The module testbenches check their blocks against values worked out independently:

* `tb_enc8b10b`: known code words, plus disparity, run length and uniqueness over all bytes;
* `tb_l0_scheduler`: exact event counts per frequency step, and the burst shape;
* `tb_ttc_generator`: that every L1A lands exactly `latency × 40` BCs after its event;
* `tb_oca_assembler`: that each injected error raises its own flag.

The rest are in `tb/`.

# ATCA LLRF controller: fast field loop and register access in SystemVerilog

A superconducting linac RF station with 32 cavities has its cavity fields held
to a fixed amplitude and phase by a digital low-level RF (LLRF) controller.
About a hundred analog signals come in, too many for one board. So the
controller is spread over four ATCA carrier blades, which talk to each other on
three time scales:

* **Inside the RF pulse** (intra-pulse), the feedback loop must close within a
  few hundred nanoseconds. Each carrier adds up the field vectors of its own
  cavities into a *partial vector sum*. It sends that sum to the main carrier
  over a point-to-point **Low Latency Link** (LLL) in the backplane's full-mesh
  fabric. The main carrier adds the four partial sums and drives the vector
  modulator.
* **Between pulses** (inter-pulse), the pulse records and the controller
  tables move over **PCI Express**. Software reaches each FPGA's registers
  through a PCIe-to-register-bus bridge.
* **Slow traffic** goes over Ethernet through a root-complex computer. That
  path is software and is not part of this RTL.

This repository holds the FPGA logic of that system. It covers the
partial-sum / link / controller path, the pulse timing and recording, and the
PCIe-to-register access path with its clock-domain crossing, plus a top level
that wires four carriers together. The multi-gigabit transceivers, the PCIe
endpoints and switches, the ADCs and the DACs are vendor or analog parts. Their
digital sides are ports of the top level, and the testbenches drive them with
small behavioural models.

## System picture

```
              trigger, 81 MHz clock (backplane)
                 |
   carrier #1 ---+--------------------------------------------+
   carrier #3    | adc -> partial_vector_sum -> daq_buffer     |
   carrier #4    |                      \-> lll_tx ==LLL==\    |
                 | TLP <-> ii_pcie_bridge <-> ii_sync_clk <-> carrier_regs
                 +---------------------------------------------+
                                                         ||  (three links)
   carrier #2 (main)                                     \/
                 | adc -> partial_vector_sum -> daq_buffer
                 |                      \-> field_controller -> dac_i / dac_q
                 |          lll_rx x3 --/        ^ set-point / feed-forward tables
                 | TLP <-> ii_pcie_bridge <-> ii_sync_clk <-> carrier_regs
```

`llrf_top` instantiates four `carrier_fpga`s. Carrier index 1, which is ATCA
slot #2, is the main one (`IS_MAIN = 1`). The other three transmit. In the top
level, link *k* of the main carrier is fed by the *k*-th transmitting carrier
in slot order (#1, #3, #4).

## One RF pulse, clock by clock

Everything in the user clock domain runs on the 81 MHz backplane clock. A
rising edge on `trigger` opens the pulse window (`pulse_timer`):

| what | when |
|---|---|
| `rf_pulse` high | from the clock after the trigger edge, for exactly `PULSE_CYCLES` = 1024 us x 81 MHz = 82944 clocks |
| `step_idx` | counts microseconds (every 81 clocks) and indexes the controller tables |
| DAC codes | follow the window with a 3-clock pipeline delay; zero outside it |
| `pulse_end` | one clock after the window closes; raises the interrupt of every carrier |
| readout | between pulses, software reads the pulse record of each carrier over PCIe |

A trigger that arrives while the window is open is ignored.

## The fast loop

### Partial vector sum

Each carrier adds the I and Q samples of its eight channels in one clock
(`partial_vector_sum`, 24-bit result). It applies no calibration rotation or
per-channel gain. The inputs are already I/Q pairs: turning the 54 MHz IF
samples into I/Q happens outside this RTL. Each carrier also records
`sum / 8`, the mean I and Q packed as `{Q[15:0], I[15:0]}`, one word per
clock of the pulse (`daq_buffer`).

### Low Latency Link framing

The link is a custom protocol on the 32-bit user interface of a 8b/10b
transceiver. Each byte has a "control character" flag (`charisk`). Frames
follow each other with no gap:

| word | data | charisk |
|---|---|---|
| start | `{K27.7 (0xFB), seq[7:0], 16'h0000}` | `1000` |
| 1 | I, sign-extended to 32 bits | `0000` |
| 2 | Q, sign-extended to 32 bits | `0000` |
| 3 | `I ^ Q ^ {seq,24'h0} ^ 32'hA5A5A5A5` | `0000` |
| idle | `{K28.5 (0xBC), D16.2, D16.2, D16.2}` | `1000` |

The transmitter (`lll_tx`) always sends the newest sum. If a sum is replaced
before its frame starts, the frame carries the newer one, because only the
latest value matters to a feedback loop. The receiver (`lll_rx`) handles bad
frames as follows:

* A bad check word drops the frame and is counted as an error.
* A control character in the middle of a frame also drops it and is counted
  as an error.
* A gap in the sequence number is counted as a sequence error, but the frame
  is still delivered.

There is no retransmission: a lost frame is replaced by the next one, one
frame time later.

**Latency budget.** From `in_valid` on the transmitter to `out_valid` on the
receiver, the link takes 1 + D + 3 + 1 clocks, where D is the transceiver path
delay. The testbenches check this exactly with D = 13. The transceiver itself
needs 12.5 to 23 clocks at 106.25 MHz, which is 117 to 216 ns. The framing
adds 5 clocks, which is 47 ns at 106.25 MHz. The total is therefore 164 to 263
ns, above a strict 150 ns intra-pulse bound. The controller is pipelined,
though, and a new frame arrives every 4 clocks (38 ns at 106.25 MHz). That is
well within a 200 ns controller update period. In this RTL the link logic runs
on the 81 MHz system clock. A real 106.25 MHz transceiver clock would need an
elastic buffer at the receiver, and that buffer is not modelled.

### Controller

`field_controller` keeps the newest partial sum from each link. It adds them
to its own sum and divides by 32 (an arithmetic shift), which gives the mean
cavity vector VS. During the pulse it computes, separately for I and Q:

```
u = FF[step] + floor( Kp * (SP[step] - VS) / 256 )      saturated to 16 bits
```

Here `Kp` is a signed 16-bit gain with 8 fractional bits. `SP` and `FF` are
1024-entry tables, one entry per microsecond, each entry `{Q, I}`. The
register `CTRL` turns each term on or off: bit 0 switches feedback and bit 1
switches feed-forward. The pipeline has three stages:

1. total sum and table read;
2. error;
3. gain, add and saturate.

Saturated samples are counted. "Adaptive" feed-forward means software
rewrites the `FF` table between pulses from the recorded data. The FPGA only
plays the table back.

## Register access: PCIe -> Integral Interface

Software sees each FPGA as a set of registers and memory areas on a simple
32-bit bus, the **Integral Interface** (II). Its signals are active low:

* `strobe_n`, `write_n`, `addr[31:0]` and `data_in[31:0]`, driven by the master;
* `ack_n` and `data_out[31:0]`, driven by the slave;
* `irq_n` and `irq_ack_n`, for the interrupt.

In this RTL the bus is two packed structs, `ii_req_t` and `ii_rsp_t` (in
`llrf_pkg`).

**Handshake (four-phase).**

1. The master sets the address, data and `write_n`, then pulls `strobe_n`
   low. It holds all of them until `ack_n` goes low.
2. Read data is valid while `ack_n` is low.
3. The master releases `strobe_n`. The slave then releases `ack_n`.

The interrupt works the same way. `irq_n` stays low until it sees an
acknowledge edge. The master holds `irq_ack_n` low until `irq_n` rises.
Because every signal is a level held until answered, the whole bus can cross
clock domains with plain two-flip-flop synchronizers. That is the job of
`ii_sync_clk`.

**Path of one access:**

* `ii_pcie_bridge` (on the PCIe endpoint clock: 62.5, 125 or 250 MHz) takes a
  request packet from the endpoint. It accepts 32-bit memory writes and
  reads of one doubleword. Anything else is consumed and dropped.
* The bridge runs one II cycle. The word address is the byte address divided
  by 4, masked to a 2^24-word window.
* For a read, the bridge returns a completion with data. The completion
  carries the request's requester ID and tag, byte count 4 and the lower
  address.
* `ii_sync_clk` carries the cycle into the 81 MHz domain. It also releases the
  user-side reset in step with that clock.
* `carrier_regs` decodes the address and answers 3 user clocks after it sees
  the strobe.
* An II interrupt becomes an endpoint interrupt request
  (`cfg_interrupt_n`/`cfg_interrupt_rdy_n`). Once the endpoint takes it, the
  bridge acknowledges it on the II bus.

**DMA.** A single-word read across PCIe takes about 2 us, far too slow for a
pulse record. So the bridge can also push a block of II words into host
memory by itself. It has four registers of its own at the top of the BAR
window. These are never passed on to the II bus:

| word address | name | contents |
|---|---|---|
| `0xFF_FFFC` | SRC | II word address of the first word |
| `0xFF_FFFD` | DST | host byte address, doubleword aligned |
| `0xFF_FFFE` | LEN | number of words |
| `0xFF_FFFF` | CTRL | write bit 0 to start; reads `{done, busy}` in bits 1..0 |

While a transfer is busy, the bridge works whenever no request is waiting:

1. it reads up to 32 words over the II bus, one handshake each;
2. it sends them as one 32-bit-address memory write packet, with its own ID
   as requester.

Packets end at 128-byte aligned host addresses, so none crosses a 4 KB
boundary. Register requests from the host are served between packets. The
host polls CTRL until `done` is set. Each word still costs one II handshake
through the clock synchronizer, about 18 PCIe clocks at 125 MHz. That gives
about 141 Mbit/s per carrier: a full 82944-word record moves in 18.8 ms.

**Register map of a carrier** (word addresses):

| address | name | access | contents |
|---|---|---|---|
| `0x0000_0000` | ID | r | `{16'hA7CA, board number, 7'b0, main}` |
| `0x0000_0001` | CTRL | rw | bit 0 feedback on, bit 1 feed-forward on, bit 2 link transmitter on |
| `0x0000_0002` | KP | rw | signed gain, 8 fractional bits |
| `0x0000_0003` | STATUS0 | r | pulses since reset |
| `0x0000_0004` | STATUS1 | r | words in the last pulse record |
| `0x0000_0005` | STATUS2 | r | record words dropped (record full) |
| `0x0000_0006` | STATUS3 | r | link frames sent (transmitting carrier) or received (main) |
| `0x0000_0007` | STATUS4 | r | link frame errors |
| `0x0000_0008` | STATUS5 | r | link sequence errors |
| `0x0000_0009` | STATUS6 | r | saturated DAC samples |
| `0x0000_000A` | STATUS7 | r | good frames per link, 8 bits each (main) |
| `0x0000_1000 + n` | SP[n] | rw | set-point table `{Q, I}` |
| `0x0000_2000 + n` | FF[n] | rw | feed-forward table `{Q, I}` |
| `0x0010_0000 + n` | DAQ[n] | r | pulse record `{mean Q, mean I}` |

Unmapped addresses read as zero and ignore writes. Every carrier interrupts at
the end of each pulse.

`ii_example_regs` is a hand-written II slave for a small register definition
in the Integral Interface's text format:

* `reg1`: 14 bits, read/write, at word address 0;
* `area1`: 234 words of 12 bits, read/write, at word address `0x400`.

It shows what the register generator would produce for such a definition. It
is not part of the LLRF system. In `llrf_top` it stands beside the four
carriers, unconnected to them, with its own ports (`ex_*`, clocked by `clk`).

## Sizes

| parameter | default | meaning |
|---|---|---|
| `N_BOARDS` / `N_BRD` | 4 | carriers |
| `CH_PER_BOARD` / `N_CH` | 8 | cavities per carrier (32 in total) |
| `PULSE_CYCLES` | 82944 | pulse window, 1024 us at 81 MHz |
| `CLKS_PER_STEP` | 81 | clocks per table step (1 us) |
| `TABLE_DEPTH` | 1024 | set-point and feed-forward entries |
| `DAQ_DEPTH` | 82944 | pulse record words per carrier (2.65 Mbit) |
| `SAMPLE_W` / `SUM_W` / `DAC_W` | 16 / 24 / 16 | sample, sum and DAC widths |

These defaults hold a 32-cavity station and a full 1024 us pulse record. They
do not cover the following:

* **A strict 150 ns link latency** (see the latency budget above).

Reading the records between pulses does fit. At 10 Hz there are 100 ms
between pulses, and DMA moves one carrier's record in 18.8 ms. The four
carriers have separate PCIe paths, so they can read out in parallel. Even
one after another they take 75 ms. Single-word reads alone would need about
166 ms per record.

## Where this RTL departs from, or adds to, the original system

* **Pulse window.** The pulse window is 1024 us, following the pulse timing
  diagram of the system. The system description also mentions RF pulses of
  "about 2 ms" at 1 to 10 Hz. Change `PULSE_CYCLES`, `TABLE_DEPTH` and
  `DAQ_DEPTH` together for another window.
* **Own choices, where the system fixes nothing:**
  * the link frame format, check word and sequence numbers;
  * the control law's fixed-point formats, the per-microsecond tables and the
    saturation;
  * the register map;
  * the II handshake timing, the interrupt handshake and the bridge's packet
    subset;
  * the DMA registers and packet size. The DMA reaches about 141 Mbit/s per
    carrier. The original system measured 2400 Mbit/s in DMA mode over a
    four-lane link.
* **Simplified parts:**
  * The vector sum is a plain sum: no calibration or rotation.
  * Only the cavity probe signals are taken in. The forward and reflected
    power signals of each cavity are not.
  * The ADC samples enter each carrier FPGA as parallel ports. In the
    original system the ADC mezzanine cards send them to the FPGA over the
    same low-latency link protocol.
  * The pulse record is kept in the carrier FPGA. The original keeps it on
    the ADC mezzanine cards.
  * The link logic shares the 81 MHz clock.
* **Not built:**
  * IF-to-I/Q detection;
  * piezo / Lorentz-force compensation;
  * the interlock;
  * the optional Gigabit Ethernet in the FPGA;
  * IPMI management and the RS-232 diagnostic port;
  * the cross-point switches;
  * the PCIe switches, endpoints and root complex;
  * the converters and everything analog.

## Files

* `rtl/llrf_pkg.sv`: constants, II bus structs, link word type, TLP codes.
* `rtl/llrf_top.sv`: four carriers, plus the example register set beside them.
* `rtl/carrier_fpga.sv`: one carrier.
* `rtl/pulse_timer.sv`
* `rtl/partial_vector_sum.sv`
* `rtl/daq_buffer.sv`
* `rtl/lll_tx.sv` and `rtl/lll_rx.sv`
* `rtl/field_controller.sv`
* `rtl/carrier_regs.sv`
* `rtl/ii_example_regs.sv`
* `rtl/ii_sync_clk.sv`
* `rtl/ii_pcie_bridge.sv`: register bridge and DMA.
* `tb/tb_<block>.sv`: self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_llrf_top.sv`: end-to-end test at reduced sizes (300-clock pulse,
  256-word record, so the record overflows).
* `tb/tb_llrf_top_full.sv`: the same test at the default sizes (82944-clock
  pulse).
* Models used by the testbenches:
  * `tb/lll_lane_model.sv`: transceiver lane with fixed delay and bit-flip
    injection;
  * `tb/pcie_host_bfm.sv`: endpoint and host, with TLP reads and writes,
    interrupt service, host memory for DMA packets and a DMA routine;
  * `tb/ii_master_bfm.sv`: II bus master.

The two top-level tests run three pulses:

1. feedback plus feed-forward;
2. feed-forward only;
3. feedback with a saturating gain, with one corrupted link word.

They compare every DAC code after the loop has settled with the control law
computed in the testbench. They also check each carrier's interrupt, its
status counters and a sample of its pulse record. After the first pulse, the
whole record is moved by DMA and checked word by word. The reduced test does
this for every carrier; the full-size test does it for the main carrier. The
tests also write and read the example register set.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_llrf_top \
    -y rtl -y tb +libext+.sv rtl/llrf_pkg.sv tb/tb_llrf_top.sv -o sim
./obj_dir/sim
```

Replace `tb_llrf_top` with any other testbench name. The full-size top-level
test takes about 20 seconds. Every flop that is read is reset. Resets are
asynchronous and active low. Each carrier's user-domain reset is derived from
its PCIe-side reset. A testbench must therefore give `pci_rst_n` a falling
edge at start-up.

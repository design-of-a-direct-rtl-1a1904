# uidmac: a four-channel DMA controller for the RISC32 system bus

`uidmac` moves bytes between memory and I/O devices, or from one block of memory to another, without the processor handling each byte. An I/O device raises a request line (DREQ). The controller asks the processor for the bus with a hold request (HRQ). Once the processor answers with hold acknowledge (HLDA), the controller drives a 16-bit address and the memory and I/O strobes itself. Each byte then goes straight from the device to memory (or the reverse) in three or four clocks, and the byte never passes through a processor register.

The controller has four independent channels. The organisation is the classic 8237-style one:

- 16-bit base and current address registers per channel;
- 16-bit base and current word-count registers per channel;
- an 8-bit data bus that doubles as the upper address byte;
- a command register and four mode registers;
- status, mask and request registers;
- fixed or rotating priority.

Between services the processor programs the controller as an I/O peripheral on its lower four address lines.

## The system around the controller

```
            DREQ[3:0]                       HRQ  ->
 I/O  ----------------->  +----------+  ------------->  RISC32
 dev  <-----------------  |  uidmac  |  <-------------  processor
            DACK[3:0]     |          |       HLDA
                          |          |--- AEN, MEMR#, MEMW#, IOR#, IOW#, EOP#
                          |          |--- A7..A4 (addr_msb), A3..A0 (addr_lsb)
                          |          |=== D7..D0 (data bus; A15..A8 in S1)
                          +----------+--- ADSTB --> 8-bit latch --> A15..A8
```

- **Address pins.** A15..A8 are not on pins of their own. In state S1 the controller puts them on the data bus and raises ADSTB, and an external 8-bit latch holds them for the rest of the transfer. A7..A4 come out on `uidmac_addr_msb`. A3..A0 come out on `uidmac_addr_lsb`; these same pins select a register when the processor programs the controller.
- **Data path.** Data never passes through the controller in I/O transfers. The device and the memory see complementary strobes at the same time, and the byte goes directly across the data bus.
- **Memory-to-memory.** Here the data does pass through the controller, in its temporary register (see below).

## Register map

The processor accesses the controller while chip select is low and the controller is idle, using IOR# to read and IOW# to write. A3..A0 select the register.

| A3..A0 | Read | Write |
|---|---|---|
| `0 c c 0` | current address of channel `cc`, low byte then high byte | base and current address of channel `cc` |
| `0 c c 1` | current word count of channel `cc` | base and current word count of channel `cc` |
| `1000` | status register; clears its terminal-count bits | command register |
| `1001` | request register (bits 7..4 read as 1) | one request bit: bits 1..0 = channel, bit 2 = set/clear |
| `1010` | command register | one mask bit: bits 1..0 = channel, bit 2 = set/clear |
| `1011` | next channel's mode register (bits 7..2; bits 1..0 read as 1) | mode register of the channel in bits 1..0 |
| `1100` | sets the first/last flip-flop | clears the first/last flip-flop |
| `1101` | temporary register | master clear |
| `1110` | clears the mode read-back counter | clears all mask bits |
| `1111` | mask register (bits 7..4 read as 1) | all four mask bits (bits 3..0) |

**Byte order.** The 16-bit channel registers are accessed a byte at a time. A first/last flip-flop selects the byte: it starts at 0 (low byte) and toggles on every channel-register access. Clear it before each pair of accesses.

**Loads.** Writing a channel register loads the base and current copies together. The base copies are used only to reload the current registers when a channel autoinitializes.

**Command register:**

| Bit | Meaning when set |
|---|---|
| 0 | memory-to-memory |
| 1 | channel 0 address hold (memory-to-memory fill) |
| 2 | controller disable |
| 3 | compressed timing |
| 4 | rotating priority |
| 5 | extended write |
| 6 | DREQ active low |
| 7 | DACK active high |

After reset every bit is 0. That means DREQ is active high, DACK is active low, fixed priority and normal timing.

**Mode register** (one per channel; 6 bits are stored):

| Bits | Field | Values |
|---|---|---|
| 7..6 | service mode | 00 demand, 01 single, 10 block, 11 cascade |
| 5 | address direction | 1 = decrement |
| 4 | autoinitialize | 1 = on |
| 3..2 | transfer type | 00 verify, 01 write (I/O to memory: IOR# + MEMW#), 10 read (memory to I/O: MEMR# + IOW#), 11 treated as verify |
| 1..0 | channel | selects the channel when writing |

**Status register:**
- Bits 3..0 are set when the channel's service ends on terminal count or EOP.
- Bits 7..4 show the pending request of each channel, from DREQ or the request register.

## The state machine

The timing and control unit runs one state machine for the whole controller. One state lasts one clock.

| State | What happens |
|---|---|
| SI | Idle. The processor may access the registers. A valid request moves the controller to S0. |
| S0 | HRQ is high and the controller waits for HLDA. If the request goes away first, it returns to SI. |
| S1 | AEN and ADSTB are high. A15..A8 are on the data bus and A7..A0 are on the pins. An external EOP or a lost HLDA ends the service here. |
| S2 | The read strobe goes low: MEMR# for a read transfer, IOR# for a write transfer. With extended write the write strobe goes low here as well. |
| S3 | The read and write strobes are both low. The controller stays in S3 while READY is low (wait states). |
| S4 | The strobes are high. The internal EOP is driven if the word count ran out. At the end of S4 the current address steps by ±1 and the current word count by −1. |
| SC | Cascade. HRQ and DACK are held while the channel's request stays. No address or strobes are driven. |

**After S4.** The service continues at S2 if A15..A8 are unchanged. If the next address is on a new 256-byte page, it continues at S1 so that ADSTB latches the new upper byte. The service ends in SI in these cases:

- **Single mode:** after every byte.
- **Demand mode:** when the channel's DREQ goes inactive.
- **Block mode:** at terminal count.
- **Any mode:** at terminal count or EOP.

**Rate.** A block transfer takes:
- 4 clocks for the first byte of each 256-byte page (S1 S2 S3 S4);
- 3 clocks for each following byte (S2 S3 S4);
- 2 clocks per byte with compressed timing (S2 S4), where S3 is dropped and READY is sampled in S2.

The bus handover adds S0 plus one clock of HLDA latency in the bench's processor model.

**Strobe timing:**
- **Normal (late) write:** the write strobe is asserted only in S3, one clock after the read strobe, so the source has driven the bus before the destination samples it.
- **Extended write:** the write strobe starts in S2 together with the read strobe, for slow devices.

**DACK.** DACK of the served channel is active from S1 to S4 and drops in SI. DACK is not asserted during memory-to-memory transfers.

**End of process (EOP):**
- The pin is open-drain. `uidmac_eop_oe` high means the controller pulls it low; it does so in S4 of the last transfer.
- An external EOP seen in S1 ends the service at once.
- An external EOP seen in S2 or S3 lets the byte in flight finish through S4. The address and count then reflect every byte that was actually moved.

## Word count

A channel programmed with count N moves N bytes; the count is checked for 1 before each step. After the last transfer the current count reads 0. A count of 0 wraps, so it moves 65536 bytes.

## Memory-to-memory

Memory-to-memory needs command bit 0 set. It is started by a request on channel 0, usually a software request through the request register. Each byte takes two S1..S4 passes:

1. **Read pass, channel 0 (source).** MEMR# goes low and the byte is captured into the temporary register at the end of S3.
2. **Write pass, channel 1 (destination).** The temporary register drives the data bus and MEMW# goes low.

Between the two passes the S1 of the write pass latches channel 1's upper address byte.

**Channel 0 address hold** (command bit 1) keeps channel 0's address fixed. A single source byte then fills the whole destination block.

**End of the service:**
- Channel 1's word count ends the service. Channel 0's count also steps, but its terminal count is not used.
- Both channels get their status bit, and their mask bits are set unless they autoinitialize.
- Pulling EOP low also ends the service.

## Priority, masks and requests

A channel's request is valid in either of these cases:
- its DREQ is active (with the command-bit-6 polarity) and its mask bit is clear;
- its software request bit is set. Software requests ignore the mask.

Command bit 2 disables every request.

**Priority:**
- **Fixed:** channel 0 is highest and channel 3 lowest.
- **Rotating** (command bit 4): the channel served last becomes the lowest, and the search starts at the channel after it.

The winner is frozen when HLDA arrives and stays fixed for the whole service.

**End of a service on terminal count or EOP:**
- the channel's status bit is set;
- its software request bit is cleared;
- its mask bit is set unless it autoinitializes. An autoinitializing channel instead reloads its current address and count from the base registers and stays enabled.

After reset and after master clear, the registers are as follows:
- command, status, request and mask: all 0, so all channels are unmasked;
- temporary data, temporary address and temporary count: 0;
- HRQ: low;
- DACK: all inactive (4'hF with the default active-low polarity).

## Structure of the RTL

| File | Contents |
|---|---|
| `rtl/dmac_pkg.sv` | sizes (`NCH`=4 channels, `AW`=16 address/count bits, `DW`=8 data bits), state and mode enums, the command/mode register structs, the register-operation strobe bundle |
| `rtl/uidmac.sv` | top: wires the three units and combines their pin drivers; bus-rule assertions |
| `rtl/bidmac_dp.sv` | datapath: channel address/count registers, temporary registers, ±1 stepping, CPU register port and address decode, read-back multiplexer, address and data-bus pin drive |
| `rtl/bidmac_ctrl_time.sv` | timing and control: command and mode registers, the state machine, strobe and EOP generation, memory-to-memory sequencing |
| `rtl/bidmac_pr.sv` | priority: status, mask and request registers, request qualification, fixed/rotating encoder, HRQ and DACK |

**The units talk through a few signals:**
- The datapath decodes a processor access into one-cycle `regop` strobes and a write byte `wdata`, which the other two units act on.
- The timing and control unit tells the datapath:
  - which channel is active;
  - when to step its address and count (`xfer_done`);
  - when to reload from base (`restore`);
  - when to capture or drive the temporary register.
- The priority unit picks the channel (`ch`).
- The timing and control unit reports the end of a service (`fin`, `release_svc`).

All logic is synchronous to `uidmac_clk`, with a synchronous active-high reset.

**Pins.** Every bidirectional pin is split into an input, an output value and an output enable: the data bus, IOR#, IOW#, A3..A0 and EOP#. A7..A4 has an enable. A board-level wrapper must build the real three-state pins from these.

**Synthesis.** Synthesis with yosys gives about 360 cells, 44 flip-flop bits, and 280 bits of register arrays: the channel address and count registers and the mode registers.

## Where this design departs from, or fills in, its source description

The controller follows the published description of the RISC32 DMA module. That description covers these parts:

- its three-unit partitioning;
- register set and sizes;
- register codes;
- command, mode, status, mask and request bit layouts;
- pin list;
- states SI, S0..S4 and their outputs;
- the waveform of a two-byte block transfer.

These points are this design's own:

- **Address step.** The address and count step at the end of S4. The description places the increment in S2; stepping later keeps the address stable while the strobes are active. The waveform of the description also shows the address changing between S4 and the next S2.
- **Word count.** The description says both that the operation stops when the count reaches zero and that 101 must be programmed for 100 transfers. This design uses the first: N programmed gives N transfers.
- **EOP in S2/S3.** The transfer finishes through S4 instead of being abandoned.
- **Page change.** After S4 the service continues at S2, or at S1 when A15..A8 change. Continuation is not spelled out beyond the waveform.
- **Read transfers.** A read (memory-to-I/O) transfer drives MEMR# and IOW#.
- **Cascade mode.** This mode is named but not described. Here it only holds HRQ/DACK for a downstream controller.
- **Memory-to-memory channels.** The source is channel 0, the destination is channel 1, and channel 1's count ends the service.
- **Rotating priority.** The rule is "last served becomes lowest".
- **Register read-back and pins.** These follow the 8237 convention, which the description does not give:
  - request and mask read back with ones in the unused upper bits;
  - the mode read-back counter;
  - status TC bits clear on read;
  - the first/last flip-flop toggles on each channel-register access.
- **Reset.** Reset is synchronous and active high.
- **Pin split.** Pins are split into value and enable, as described above.

Not included:
- the processor, memory, address latch and I/O devices, which the testbench models;
- any interrupt or exception handling;
- any physical implementation.

**Address reach.** The controller addresses 64 KiB through its 16-bit registers. How that maps into the 32-bit RISC32 address space is left to the system.

## Verification

Each unit has a self-checking testbench in `tb/`. Every testbench ends by printing `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_bidmac_dp` | byte-wise programming and read-back of all channels; every command-code strobe; read-back multiplexer; no access outside the idle cycle; increment, decrement, hold; `last` and page-change flags; autoinitialize restore; pin drive in S1..S4; temporary register; master clear |
| `tb_bidmac_ctrl_time` | state sequences for each service mode (checked as traces like `1234234234`); strobes per transfer type, late and extended write, compressed timing; READY wait states; internal and external EOP; memory-to-memory passes and channel 0 hold; cascade; autoinitialize restore; mode read-back counter |
| `tb_bidmac_pr` | fixed-priority winner for all 15 request patterns against a reference encoder; rotating priority over eight services; mask, software request, disable, DREQ/DACK polarity; channel freeze under HLDA; TC handling with and without autoinitialize; status clear on read; master clear |
| `tb_uidmac` | the whole controller with default parameters in a modelled system (processor, 64 KiB memory, ADSTB latch, one device per channel) |

`tb_uidmac` runs through these scenarios:
- reset values;
- block write with the 3-clocks-per-byte rate;
- single-mode read with decrement;
- demand mode with DREQ dropped part way;
- fixed and rotating priority;
- page crossing;
- READY wait states;
- compressed timing;
- extended write;
- verify;
- autoinitialize;
- external EOP;
- memory-to-memory copy and fill;
- cascade;
- polarity options;
- master clear.

The bench computes every expected byte and address itself. It counts each mechanism and fails if any of them never occurred.

To run a testbench with Verilator 5 (the example runs the full-system test):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_uidmac \
    rtl/dmac_pkg.sv rtl/bidmac_dp.sv rtl/bidmac_ctrl_time.sv rtl/bidmac_pr.sv \
    rtl/uidmac.sv tb/tb_uidmac.sv
./obj_dir/Vtb_uidmac
```

For a unit testbench, compile `rtl/dmac_pkg.sv`, the unit's file and its testbench. The simulations finish in well under a second.

**Sizes.** The parameters `NCH`, `AW` and `DW` in the package document the sizes, but the pin and register layout is tied to four channels, 16-bit addresses and an 8-bit bus. Changing them means changing the register map as well.

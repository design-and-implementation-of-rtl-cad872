# PCMCIA (PC Card) Type II I/O card controller

A PC Card I/O card, such as a modem or a LAN card, holds two slaves behind its 68-pin
connector:

- an **I/O device**, whose registers the host reads and writes with IORD#/IOWR#;
- an **attribute memory**, which holds the card information structure and which the
  host reads and writes with OE#/WE# while REG# is low.

This controller is the glue between the socket and those two slaves. It buffers the
address and decides which of the four card transactions the host is running. It steers
bytes between the host's 16-bit data bus and the card's 16-bit data bus according to
the PC Card byte-enable rules. It also generates the attribute memory strobes and the
INPACK# acknowledge.

The controller has no clock, no reset and no state. Every output is a combinational
function of the socket and card inputs. A transfer therefore lasts exactly as long as
the host holds its strobe. The design follows a published VHDL controller that was
implemented in a Xilinx Spartan-II XC2S30 and used 65 LUTs, no flip-flops and 96 pins.

All signals whose names end in `_n` are active low.

## The four transactions

REG# must be low and exactly one of the four strobes must be low:

| transaction            | REG# | OE# | WE# | IORD# | IOWR# |
|------------------------|------|-----|-----|-------|-------|
| I/O read               | 0    | 1   | 1   | 0     | 1     |
| I/O write              | 0    | 1   | 1   | 1     | 0     |
| attribute memory read  | 0    | 0   | 1   | 1     | 1     |
| attribute memory write | 0    | 1   | 0   | 1     | 1     |

Every other combination is "no transaction" and the card stays idle. That covers
REG# high (I/O inhibit), no strobe, and two strobes at once. The table is standard for
I/O cards. Treating every other code as idle is this design's choice.

## Byte lanes: the part that needs care

Both data buses are 16 bits wide, but the two sides lay out bytes differently.

- **Card bus (`dataout`)**: fixed layout. The even byte is always on bits 7:0 and the
  odd byte on bits 15:8. This holds for the I/O device and for the attribute memory.
- **Host bus (`datain`)**: an 8-bit host sees every byte on bits 7:0. So a byte access
  to an odd address carries the *odd* byte on the host's *low* lane.

The controller chooses the lanes from CE2# (`ce_n[1]`, odd byte), CE1# (`ce_n[0]`,
even byte) and A0:

| CE2# | CE1# | A0 | mode      | host 15:8 | host 7:0  | card lanes used |
|------|------|----|-----------|-----------|-----------|-----------------|
| H    | H    | x  | standby   | -         | -         | none            |
| H    | L    | L  | byte      | -         | even byte | 7:0             |
| H    | L    | H  | byte      | -         | odd byte  | 15:8 (swapped)  |
| L    | L    | x  | word      | odd byte  | even byte | 15:8 and 7:0    |
| L    | H    | x  | high only | odd byte  | -         | 15:8            |

The swap is the only real datapath in the design. It uses two 8-bit multiplexers:
- Read: card 15:8 goes onto host 7:0.
- Write: host 7:0 goes onto card 15:8.

A lane that does not move is left undriven on both buses.

Three decisions here go beyond the usual byte-enable tables:

- **Word access at an odd address.** The standard table lists the word access with
  A0 = L only. The original design's reference waveform performs a word I/O write at
  address 0A7h, so this controller ignores A0 for word accesses.
- **Word access to an 8-bit register.** The I/O device pulls IOIS16# low when the
  addressed register is 16 bits wide. If it leaves IOIS16# high during an I/O word
  access, only the even byte moves, and the host is expected to split the access into
  two byte accesses. IOIS16# has no effect on byte, high-only or attribute accesses.
  This rule is this design's own.
- **Attribute memory** uses the same lane table as I/O. The original design's waveforms
  show byte accesses to it with the even byte on the low lane.

## Strobes and acknowledge

| output     | low (or high for enables) when                                      |
|------------|---------------------------------------------------------------------|
| `aoe_n`    | attribute read and at least one byte lane moves                     |
| `awe_n`    | attribute write and at least one byte lane moves                    |
| `cs_n`     | attribute read or write and at least one byte lane moves            |
| `inpack_n` | I/O read, address inside the I/O window, at least one lane moves    |
| `datain_oe[k]`  | read (attribute, or I/O in the window) and host lane k carries a byte |
| `dataout_oe[k]` | write (attribute, or I/O in the window) and card lane k receives a byte |

AOE# and AWE# follow OE# and WE#, as in the original design. The original does not say
when CS# is asserted. Asserting it only during an attribute access is this design's
choice.

**I/O window.** The card recognises an I/O address when
`((address ^ IO_BASE) & IO_MASK) == 0`. The original design gives no address range.
With the default `IO_MASK = 0` every I/O address belongs to the card, and the I/O device
does its own decoding. Outside the window the controller neither acknowledges nor moves
data, in either direction.

**IORD#/IOWR# to the I/O device.** These are not regenerated. The device takes them
straight from the socket, together with `add`. The original design's pin count (30
outputs: ADD, AOE#, AWE#, CS#, INPACK#) confirms this.

**IOIS16#.** It is an input here, driven by the I/O device. On the card this is the same
wire that the socket sees. The original design's signal list calls it an output, but its
schematic symbol, its waveforms and its pin count all treat it as an input.

## Structure

```
                      +---------------------- pcmcia_io_controller ----------------------+
 reg_n oe_n we_n ---->| pcmcia_cmd_decode --trans--+                                      |
 iord_n iowr_n        |                            v                                      |
 address, ce_n ------>| pcmcia_addr_decode --lanes,io_hit--> pcmcia_ctrl_logic --> aoe_n  |
 iois16_n             |   (contains pcmcia_lane_sel)              |  rd_en, wr_en   awe_n  |
                      |   add ------------------------------------+------------->  cs_n   |
                      |                                           v              inpack_n |
 datain_i/_o/_oe <--->|                    pcmcia_data_xcvr  <---> dataout_i/_o/_oe       |
                      +-------------------------------------------------------------------+
```

| file                         | contents                                                    |
|------------------------------|-------------------------------------------------------------|
| `rtl/pcmcia_pkg.sv`          | `trans_t`, `mode_t`, `lanes_t`, `io_trans()`                |
| `rtl/pcmcia_cmd_decode.sv`   | strobes -> transaction                                      |
| `rtl/pcmcia_lane_sel.sv`     | CE#, A0, IOIS16# -> access mode and byte lanes              |
| `rtl/pcmcia_addr_decode.sv`  | address buffer, lane decode, I/O window                     |
| `rtl/pcmcia_ctrl_logic.sv`   | AOE#, AWE#, CS#, INPACK#, transfer direction                |
| `rtl/pcmcia_data_xcvr.sv`    | 16-bit transceiver with lane enables and odd-byte swap      |
| `rtl/pcmcia_io_controller.sv`| top level                                                   |

### Top-level ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `address` | in | 26 | socket address A25:A0 |
| `ce_n` | in | 2 | [1] CE2# (odd byte), [0] CE1# (even byte) |
| `reg_n`, `oe_n`, `we_n`, `iord_n`, `iowr_n` | in | 1 | socket strobes |
| `inpack_n` | out | 1 | input acknowledge to the socket |
| `datain_i` / `datain_o` / `datain_oe` | in / out / out | 16 / 16 / 2 | socket data bus, split for a tri-state pad per byte |
| `add` | out | 26 | card address bus to the I/O device and the attribute memory |
| `aoe_n`, `awe_n`, `cs_n` | out | 1 | attribute memory output enable, write enable, chip select |
| `iois16_n` | in | 1 | from the I/O device: the addressed register is 16 bits |
| `dataout_i` / `dataout_o` / `dataout_oe` | in / out / out | 16 / 16 / 2 | card data bus, split the same way |

Parameters: `AW = 26` (address width), `IO_BASE`, `IO_MASK` (I/O window, default:
every address).

The bidirectional buses are brought out as `_i`, `_o` and a per-byte `_oe`. In an FPGA
or ASIC, join each triple in a tri-state pad: `pad = oe ? o : 'z`, `i = pad`. Joined
like this, the pin count is the original 96: 34 inputs, 30 outputs and 32
bidirectional pins.

## Timing

There is no clock. Outputs settle one gate delay after the inputs change. A host cycle
looks like this:

1. Set the address, CE# and REG#.
2. Assert a strobe.
3. Data and strobes appear on the other side.
4. Release the strobe. The controller stops driving at once.

The host must keep write data and the address stable until the strobe has risen. The
slaves see their write strobe (AWE#, IOWR#) fall at the same moment as their data lanes
are enabled. The original implementation's slowest net was about 5 ns, against a 100 ns
cycle at the 10 MHz bus speed it was designed for.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it does |
|-----------|--------------|
| `tb_pcmcia_cmd_decode` | all 32 strobe codes against a strobe-counting reference |
| `tb_pcmcia_lane_sel` | all 32 combinations of CE#, A0, I/O, IOIS16# against the lane table |
| `tb_pcmcia_addr_decode` | random addresses and enables, default and 16-byte window at 0300h |
| `tb_pcmcia_ctrl_logic` | every transaction x lane code x hit |
| `tb_pcmcia_data_xcvr` | both directions, all lane codes, random data, bytes picked by name |
| `tb_pcmcia_io_controller` | end to end, see below |
| `tb_pcmcia_io_controller_full` | default parameters, four reference transfers |

The end-to-end test places the controller, built with a 32-byte I/O window at 0300h,
between a host driver and two behavioural models:

- `tb/pcmcia_io_device_model.sv`: 32 registers. The lower 16 bytes are 16-bit
  registers and the upper 16 bytes are 8-bit.
- `tb/pcmcia_attr_mem_model.sv`: 64 bytes.

The test runs directed transfers, then 3000 random ones. It checks every lane, strobe
and acknowledge against reference copies of both memories, checks for bus contention,
and compares both memories with their reference copies at the end. It counts how often
each mechanism occurs, and fails if any never occurs. The mechanisms are:
- I/O read and I/O write;
- attribute read and attribute write;
- even-byte, odd-byte, word and high-only accesses;
- a word access to an 8-bit register;
- standby;
- REG# inhibit;
- an address miss;
- an illegal double strobe.

The full-size test replays the original design's four reference waveforms at default
parameters:
- a word I/O write of 38AEh at 0A7h;
- a byte I/O read at 0A3h, which returns the odd byte ABh;
- an attribute read at 002h, which returns FFh;
- an attribute write of ABCDh at 00Ch, which writes CDh.

Immediate assertions check that a transfer never drives both buses and that the read and
write enables are never on together.

### Running with Verilator

```
verilator --binary --timing --assert --top-module tb_pcmcia_io_controller \
    -y rtl -y tb +libext+.sv rtl/pcmcia_pkg.sv tb/tb_pcmcia_io_controller.sv
./obj_dir/Vtb_pcmcia_io_controller
```

Replace the top module and the file with any other testbench. To lint the RTL alone:
`verilator --lint-only -Wall -Wno-fatal -y rtl rtl/pcmcia_pkg.sv rtl/pcmcia_io_controller.sv`.
Lint reports two harmless warnings: the `mode` field of `lanes_t` is carried for
visibility, and neither the control logic nor the transceiver reads it.

## Trust and limits

- The transaction and byte-lane tables are the PC Card rules for I/O cards, checked
  exhaustively.
- These behaviours are choices of this design, not of the original:
  - the I/O window (its default reproduces the original, which recognises everything);
  - CS# timing;
  - gating of the I/O data path by the address hit;
  - the even-byte-only rule for word accesses to 8-bit registers;
  - ignoring A0 on word accesses.
- Not included:
  - the I/O device and the attribute memory themselves, which are external chips on
    the card (models exist only for simulation);
  - the host socket controller;
  - the FPGA pad buffers.

  An on-chip attribute memory was only suggested as a future extension of the original
  design and is not built.
- The design was checked with Verilator (lint and simulation) and with a
  Yosys/slang elaboration. It has not been run on hardware.

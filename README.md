# PCMCIA memory card controller

A PCMCIA Type I memory card (SRAM or Flash) looks to the host like a block of
memory behind a 26-bit byte address and a 16-bit data bus. Behind the socket,
the card holds up to sixteen byte-wide memory devices and a small attribute
memory (an EEPROM holding the Card Information Structure, CIS). This
controller sits between the two. It turns the host's address, card enables
and strobes into:

- device chip selects,
- separate read and write strobes for each byte lane,
- strobes for the attribute memory.

It also buffers the data between the socket's bus and the devices' bus, and
moves the odd byte onto the low lane when the host works in 8-bit mode.

The controller has **no clock and no storage**. Every output is a
combinational function of the socket pins. A host bus cycle therefore reaches
the memory devices after gate delay only: the strobes follow OE# and WE#
directly, with no synchronisation and no wait states. The only flow control
is the card's RDY/BUSY# line.

## Structure

```
            Address[25:0] ──► cs_decoder ──► CS#[7:0], ADD[24:0]
REG#, OE#, WE#, CE#[1:0], A0 ──► access_decoder ──► mode
                                       │
          WPin, ATTWP, RDY ──► rw_control ◄────┤──► COEL#/COEH#/CWEL#/CWEH#
                                       │        CISOE#/CISWE#/CSa#, READY, WP
   DIHIGH/DILOW (socket) ◄─► data_steering ◄─► DOHIGH/DOLOW (devices)
```

| file | contents |
|---|---|
| `rtl/pcmcia_pkg.sv` | `access_mode_e`, the controller's access modes; default bus sizes |
| `rtl/access_decoder.sv` | socket pins → access mode (the function table below) |
| `rtl/rw_control.sv` | byte-lane and attribute strobes; write protection; RDY gating |
| `rtl/cs_decoder.sv` | one-of-eight chip select; word address to the devices |
| `rtl/data_steering.sv` | data buffer between socket and devices; 8-bit lane swap |
| `rtl/pcmcia_ctrl.sv` | top level |

## The access modes

The whole controller comes down to one decode. `access_decoder` reads six
pins and picks one row of this table. The other blocks act only on that row.

| mode | REG# | OE# | WE# | CE1# | CE0# | A0 | strobes | socket lane ← / → device lane |
|---|---|---|---|---|---|---|---|---|
| output disable | x | 1 | 1 | x | x | x | none | none |
| standby | x | x | x | 1 | 1 | x | none | none |
| byte read, even | 1 | 0 | 1 | 1 | 0 | 0 | COEL# | DILOW ← DOLOW |
| byte read, odd (8-bit) | 1 | 0 | 1 | 1 | 0 | 1 | COEH# | DILOW ← DOHIGH (swap) |
| odd byte only read (16-bit) | 1 | 0 | 1 | 0 | 1 | x | COEH# | DIHIGH ← DOHIGH |
| word read | 1 | 0 | 1 | 0 | 0 | x | COEL#, COEH# | both lanes straight |
| byte write, even | 1 | 1 | 0 | 1 | 0 | 0 | CWEL# | DILOW → DOLOW |
| byte write, odd (8-bit) | 1 | 1 | 0 | 1 | 0 | 1 | CWEH# | DILOW → DOHIGH (swap) |
| odd byte only write (16-bit) | 1 | 1 | 0 | 0 | 1 | x | CWEH# | DIHIGH → DOHIGH |
| word write | 1 | 1 | 0 | 0 | 0 | x | CWEL#, CWEH# | both lanes straight |
| attribute read | 0 | 0 | 1 | 1 | 0 | 0 | CISOE# | DILOW ← DOLOW |
| attribute write | 0 | 1 | 0 | 1 | 0 | 0 | CISWE# | DILOW → DOLOW |

Two choices fill gaps that the table leaves open:

- **OE# and WE# low together** is not a legal PCMCIA cycle. It decodes as
  standby, so no strobe is asserted.
- **Attribute cycles other than the even-byte row** are ignored, because
  attribute memory can only be reached as even bytes on the low lane. This
  covers odd addresses, CE1# low, and word cycles.

In the **byte read, even** and **byte write, even** rows only the low lane
is strobed. An 8-bit host reads both bytes through DILOW: the high device
stays idle on even cycles and drives DILOW through the swap path on odd
cycles.

"8-bit mode" and "16-bit mode" are not a setting of the controller. They are
simply which CE# patterns the host uses. An 8-bit host holds CE1# high and
steps A0. A 16-bit host uses CE1#/CE0# to pick the odd byte, the even byte or
the whole word.

## Chip selects and the address buffer

There are eight chip selects. Each one serves a pair of byte-wide devices,
one per lane, for sixteen devices in all. `cs_decoder` drives CS#[k] low when
Address[25:23] = k:

| Address[25:23] | CS#[7:0] |
|---|---|
| 000 | 11111110 |
| 001 | 11111101 |
| … | … |
| 111 | 01111111 |

All chip selects stay high unless REG# is high and at least one CE# is low.
So the attribute space and an idle socket select no common device. ADD[24:0]
carries the word address Address[25:1] to the devices. A0 is used only by the
byte-lane logic.

## Write protection, RDY and the host status pins

- **WPin** high blocks every common-memory write strobe.
- **ATTWP** high blocks the attribute write strobe.
- **RDY** low (device busy) blocks all write strobes. A slow Flash or EEPROM
  that is still busy is therefore not written again. Reads are not gated.

In a blocked write the data path still points at the devices. Nothing is
stored, because no strobe reaches them.

READY and WP to the host are RDY and WPin, passed through.

## Tri-state pins

On the card, four groups of pins are tri-state:

- DIHIGH/DILOW, the socket data bus,
- DOHIGH/DOLOW, the device data bus,
- CISOE#, CISWE# and CSa#.

The RTL does not use `z`. Each such pin appears as an input, an output and an
output enable, and the FPGA's I/O buffers join them:

| pin group | enable | driven when |
|---|---|---|
| DIHIGH / DILOW | `d_host_oe_hi` / `d_host_oe_lo` | a read mode places data on that lane |
| DOHIGH / DOLOW | `d_mem_oe_hi` / `d_mem_oe_lo` | a write mode places data on that lane |
| CISOE#, CISWE#, CSa# | `cis_drive` | REG# is low; released otherwise |

CSa# selects the attribute device while REG# and CE0# are both low. Assertions
in `rw_control` and `data_steering` check two rules:

- a lane never gets a read and a write strobe at once,
- the card never drives both buses at once.

## Timing

The latency is zero cycles. A strobe edge at the socket changes the device
strobes and data enables within the same simulation step. On the original FPGA
(a Spartan-XL), the reported delay from OE#/WE# to the device strobes was
about 6 ns for reads and 7 ns for writes, well inside a 10 MHz PCMCIA cycle.
Because the RTL has no registers, a different target only changes these gate
delays.

## Parameters

`pcmcia_ctrl` and `cs_decoder` take two parameters:

- `ADDR_W`, default 26: the host address width. ADD is `ADDR_W-1` bits wide.
- `NUM_CS`, default 8: the number of chip selects, a power of two. They are
  decoded from the top `log2(NUM_CS)` address bits.

The data bus is fixed at two byte lanes.

## Where this design goes beyond its source

The pin list, the chip-select table, the function table and the 8-bit swap
follow the controller's original description. Two rows are fixed in line
with that description's measured waveforms and write rows:

- An even-byte cycle strobes only the low lane. A measured even-byte read
  shows COEL# low and COEH# high.
- A word cycle is CE1# = CE0# = 0, for reads as well as writes.

These points are this design's own choices:

- the module split,
- the RDY gating of write strobes,
- the chip-select gating by REG#/CE#,
- which address bits ADD carries,
- when the CIS pins are driven,
- the handling of illegal combinations.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- `tb_access_decoder` applies all 64 pin combinations against a transcription
  of the table above, and checks that every mode occurs.
- `tb_rw_control` covers every mode with every REG#/CE0#/WPin/ATTWP/RDY
  combination.
- `tb_cs_decoder` checks the chip-select table, the two addresses from
  measured waveforms (0F9EFCA → FD, 19CCDA0 → F7), and random idle and
  attribute cycles.
- `tb_data_steering` covers every mode with random data on both buses.
- `tb_pcmcia_ctrl` runs the full-size top end to end as a PCMCIA host, in
  front of `tb/card_memory_model.sv`: 16 small byte-wide devices plus a CIS
  memory, with level-sensitive writes and a bus-protocol monitor.
  - It replays the published transfers: attribute read of CD, attribute
    write of FF, common read of FA at 0F9EFCA, and common write of CD/55 at
    19CCDA0.
  - It then runs 400 random write/read pairs across all chip selects and
    transfer types, checked against a golden byte store.
  - Finally it runs writes blocked by WPin, ATTWP and RDY.
  - It counts every mechanism and fails if any of them never occurred.

- `tb_published_transfers` drives the top directly, without the memory
  model, through the same four reference transfers. It checks every recorded
  pin value with the strobe asserted: CS# FD/F7, COEL# 0 and COEH# 1 on the
  even read, CSa#, CISOE#, CISWE#, and the data bytes.

The memory model keeps only the low 8 bits of ADD per device, and the golden
store aliases addresses the same way.

To run one testbench, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pcmcia_pkg.sv \
    tb/tb_pcmcia_ctrl.sv --top-module tb_pcmcia_ctrl
./obj_dir/Vtb_pcmcia_ctrl
```

Replace the testbench name to run the others. Each finishes in well under a
second.

## Not included

These parts are outside the RTL:

- the memory devices and the CIS EEPROM (modelled only in the testbench),
- the FPGA's pad buffers,
- the write-protect switch,
- the SRAM backup battery.

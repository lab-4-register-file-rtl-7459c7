# Register file and bus memory system for a small MIPS-style processor

This is two pieces of hardware that a teaching processor needs before it
can run code:

* a **register file**: 32 registers of 32 bits, two combinational read
  ports, one clocked write port, register 0 always zero;
* a **memory system** on a simple synchronous bus: a 4 KB ROM, a 4 KB RAM,
  a one-word register shown on a four-digit seven-segment display, and a
  port that reads eight board buttons. An address decoder picks the one
  device that answers. A small **copy controller** can take over the bus
  and run a fixed demonstration sequence without a processor.

The two pieces are independent: `lab4_top` places them side by side, each
with its own ports.

## The bus

A master drives four signals every cycle and receives one:

| signal    | width | meaning                                       |
|-----------|-------|-----------------------------------------------|
| `read`    | 1     | read request (never together with `write`)     |
| `write`   | 1     | write request                                  |
| `address` | 16    | byte address                                   |
| `wrdata`  | 32    | data to write                                  |
| `rddata`  | 32    | data returned by a read                        |

**Writes** take effect on the rising edge that ends the cycle in which
`write` is high. A new request can follow in the next cycle.

**Reads** have exactly one cycle of latency. The device captures the
address and the request on the rising edge ending cycle *n*. It drives the
data on `rddata` during cycle *n+1*. A new read can be issued in cycle
*n+1*, so back-to-back reads deliver one word per cycle. A master that
needs the value for its next address must wait one cycle, as the copy
controller does.

`rddata` is zero in every cycle that answers no read. This includes reads
of the display register, reads of unmapped addresses, and every write cycle.

### Address map

| region          | bytes           | device          | address bits used |
|-----------------|-----------------|-----------------|-------------------|
| ROM             | 0x0000 – 0x0FFF | `rom`           | 11..2             |
| RAM             | 0x1000 – 0x1FFF | `ram`           | 11..2             |
| 7-segment       | 0x2000 – 0x200F | `seven_segment` | (2, unused)       |
| buttons         | 0x2010 – 0x2037 | `buttons`       | (2, unused)       |
| unmapped        | 0x2038 – 0xFFFF | none            |                   |

Every device is word aligned and ignores address bits 1..0. The ROM and
RAM see only bits 11..2 of the address, so any address in their region
reaches one of their 1024 words. The display and the button port each hold
a single word. That word repeats over the whole region of the device.

The published map gives 0x2035 as the last button address and 0x2038 as the
first free one. Since 0x2035 is not word aligned, this design gives the
buttons every word from 0x2010 to 0x2034.

### One bus, many drivers

The original scheme gives each readable device a tri-state buffer on a
shared `rddata` line. Here each device instead has an output enable
`rddata_oe` and forces its `rddata` to zero when it is not answering.
`memory_system` ORs the three readable devices together. Because the
decoder never selects two devices at once, this is equivalent to a
tri-state bus. It also simulates in a two-state simulator and maps onto
FPGA fabric without internal tri-states. An assertion in `memory_system`
checks that no two enables are ever high together.

## Blocks

| module           | what it is                                                           |
|------------------|----------------------------------------------------------------------|
| `lab4_pkg`       | widths, address map constants, bus request struct, display pin struct |
| `register_file`  | 32 x 32 register file                                                 |
| `decoder`        | address to one-hot chip select (`cs_rom`, `cs_ram`, `cs_do`, `cs_di`) |
| `rom_core`       | 1024 x 32 block ROM: registered address, loaded from a hex file        |
| `rom`            | bus wrapper around `rom_core`                                          |
| `ram`            | 1024 x 32 bus RAM                                                      |
| `seven_segment`  | display register written over the bus                                  |
| `seven_four`     | four-digit multiplexed hex display driver                              |
| `buttons`        | 8-button input port read over the bus                                  |
| `memory_system`  | decoder plus the four devices, wired to one bus                        |
| `mem_controller` | bus master running the demonstration sequence                          |
| `lab4_top`       | memory system + controller + register file                             |

### Register file

Reads are combinational: `a = R[aa]`, `b = R[ab]` in the same cycle, with
`R[0]` forced to zero. When `wren` is high, `wrdata` is written to `R[aw]`
on the rising edge. A write to register 0 is dropped. A value written in
one cycle is readable from the next. There is no same-cycle bypass, and
there is no reset, so registers 1..31 are undefined until written.

### ROM and RAM

Both follow the read timing above. Each registers the word address (in the
ROM, the register is inside `rom_core`, as in an FPGA block ROM). Each also
registers a "read pending" flag (`cs && read`). During the next cycle, the
registered address selects the word and the flag enables the output.

The RAM writes on the edge when `cs && write`. If a read and a write of the
same word come in the same cycle, the read returns the new word. The bus
protocol never does that.

ROM contents come from the hex file named by the `INIT_FILE` parameter
(`ROM_INIT` on `memory_system` and `lab4_top`). Paths are relative to the
directory the simulator runs in. The default is `rtl/rom_init.hex`. The file
has one 32-bit hexadecimal word per line from address 0. Words past its end
read as zero. The shipped file is 16 example words. Word 0 is `0x00001010`,
a RAM address, so the copy controller has a pointer to follow.
The contents are loaded by `$readmemh` in an `initial` block. FPGA synthesis
tools honour that; a synthesis front end that ignores it builds an all-zero
ROM.

Neither memory has a reset.

### Seven-segment display

`seven_segment` holds one 32-bit register. A bus write with its select
stores `wrdata` on the rising edge, and `reset` clears it. The low 16 bits
go to `seven_four`, which shows them as four hex digits, most significant on
the left. The display cannot show the upper half-word.

`seven_four` lights one digit at a time. A counter moves to the next digit
every `2**SCAN_BITS` cycles. The default `SCAN_BITS = 16` gives about
1.3 ms per digit at 50 MHz. The outputs form the struct `seg_pins_t`:
`sel[3:0]` (digit enables; `sel[3]` is the leftmost digit), `dp`, and
`segment[6:0]` (`segment[0]` = a … `segment[6]` = g). All of them are
active low, as on common-anode boards. The decimal point is always off.

### Buttons

A register samples the eight button inputs on every clock edge. This also
synchronises them to the clock. A bus read returns that register,
zero-extended, in the next cycle. The value returned is the one sampled at
the edge that ended the request cycle. Writes to the port do nothing.

### Copy controller

On a `start` pulse, `mem_controller` runs this sequence on the bus, one step
per cycle:

| cycle | bus operation                                        |
|-------|------------------------------------------------------|
| 1     | read ROM at `ptr_addr`                               |
| 2     | capture the pointer *P*                              |
| 3     | read address *P* (normally a RAM word)               |
| 4     | capture                                              |
| 5     | write it to the display (0x2000)                     |
| 6     | read the buttons (0x2010)                            |
| 7     | capture                                              |
| 8     | write the button value to the display                |
| 9     | read ROM at `copy_src`                               |
| 10    | capture                                              |
| 11    | write it to `copy_dst` (normally in RAM)             |
| 12    | `done` high for one cycle                            |

Cycle 1 is the cycle after the one in which `start` is seen. `busy` is high
from cycle 1 to cycle 12, and `start` is ignored while busy. In `lab4_top`
the controller owns the bus while `busy` is high. The external master's
requests (`proc_*`) are dropped during that time, and pass straight through
otherwise. Both masters see `rddata`.

The display steps last one cycle each, so on a real board only the button
value stays visible. Add a hold time between steps if the intermediate
value should be seen.

## What is specified and what is chosen

Taken from the specification this design follows:

* the register file's size, ports, read and write timing and zero register;
* the address map;
* the 4 KB ROM and RAM, word aligned;
* one-cycle read latency and zero-latency writes on the bus;
* the display register and the 8-bit button port with their port lists;
* the connection of everything through one decoder;
* what the controller should do.

Chosen here:

* the output-enable bus in place of tri-state buffers;
* the button region ending at 0x2037;
* showing the low half-word on the display;
* all details of the display driver (polarity, digit order, scan rate),
  which was only named as an existing component;
* sampling the buttons every cycle;
* the controller's step order, handshake and address inputs, and its
  priority over the external master;
* reset behaviour (synchronous, active high, only on the display, the
  buttons and the controller);
* the hex file format and contents for the ROM.

The processor that normally masters the bus is outside this design; its bus
is the `proc_*` port of `lab4_top`.

## Simulating

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M` and stops. `tb_lab4_top` runs the
whole design at its default parameters: RAM and ROM traffic, back-to-back
reads, buttons, the display through a full digit scan, an unmapped access, a
controller run with the external master locked out, and the register file.
It counts each of these and fails if one never happened.

Run from the directory that holds `rtl/` and `tb/`, so that the ROM file
path resolves:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lab4_top \
    -y rtl -y tb rtl/lab4_pkg.sv tb/tb_seg_ref_pkg.sv tb/tb_lab4_top.sv
./obj_dir/Vtb_lab4_top
```

For another testbench, replace `tb_lab4_top` with its name. `tb_seg_ref_pkg`
holds reference segment patterns used by the display tests.

Some testbenches shorten the display scan (`SCAN_BITS`) to keep runs short.
`tb_lab4_top` does not.

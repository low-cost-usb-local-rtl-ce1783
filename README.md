# USB to local bus bridge for FPGA based systems

A small FPGA design that lets an ordinary PC (or an embedded PC) drive the
parallel local bus of an FPGA based system over USB, without a VME crate or
any other bus infrastructure. A cheap USB bridge chip, the FTDI FT2232H, does
all of the USB work. Channel A of the chip runs in FT245 asynchronous FIFO
mode, and the FPGA sees it as two byte FIFOs. Channel B runs in MPSSE-JTAG mode
and configures the bridge FPGA itself. The FPGA turns a framed byte stream from
the host into bus cycles on a 16-bit local bus. It can also reach an I2C
master and a JTAG master that sit at reserved bus addresses.

```
 host PC ==USB== FT2232H chan A ==FT245 async FIFO== [ ft245_async_if ]
                                                           | bytes
                                                      [ cmd_engine ]--[ rdata_buffer ]
                                                           | accesses
                                                      [ target_mux ]
                                   .-----------------------+----------------------.
                              [ lb_master ]          [ i2c_master ]        [ jtag_shifter ]
                          A[15:0] D[15:0] RD WR BUSY    SCL SDA          TCK TMS TDI TDO
                 FT2232H chan B (MPSSE-JTAG) -> configuration port of this FPGA (no logic)
```

The published design behind this RTL describes the bridge chip, the choice of
mode, the command protocol and the extra interfaces. It does not publish its
FPGA logic. Everything below the level of "what each part does" was designed
here and is marked as such.

## The command protocol

The host can only send and receive a stream of bytes, so commands must be
recognisable inside that stream. Two applications that share the interface
must not be able to corrupt each other's commands without anyone noticing.
The bridge therefore uses **bit 7 of every byte as a start-of-frame marker**.
Only the first byte of a command has it set. The other seven bits carry the
payload. Addresses and data are cut into 7-bit groups, most significant group
first, and right-aligned:

| item                     | bytes | bits carried | content                      |
|--------------------------|-------|--------------|------------------------------|
| address record           | 3     | 21           | `{5'b0, A[15:0]}`            |
| data word                | 3     | 21           | `{5'b0, D[15:0]}`            |
| (address, data) record   | 5     | 35           | `{3'b0, A[15:0], D[15:0]}`   |

The 5-byte write record and the 3-byte read record are the sizes of the
original prototype. The address always comes before the data. The address of
an (address, data) record is complete after its third byte. `cmd_engine` then
announces it on `early_addr`, and `lb_master` puts it on the idle address
lines. The system's address decoders thus settle while the two data bytes
are still crossing USB, about 280 ns before the write strobe.

Header byte: `{1, op[2:0], 3'b000, (L-1)[7]}`. Block and scattered commands
follow it with a length byte `{0, (L-1)[6:0]}`, so a block holds 1 to 256
words.

| op | command          | after the header                          | response after the status byte |
|----|------------------|-------------------------------------------|--------------------------------|
| 0  | write            | (address, data) record                    | none                           |
| 1  | read             | address record                            | 1 data word                    |
| 2  | block write      | length, start address, L data words       | none                           |
| 3  | block read       | length, start address                     | L data words                   |
| 4  | scattered write  | length, L (address, data) records         | none                           |
| 5  | scattered read   | length, L address records                 | L data words                   |

Block commands increment the address after each word. The reserved I2C and
JTAG addresses are the exception: there the address stays put, so a block
written to one of them is a stream of bytes into that interface. Scattered
commands carry a free list of addresses. The prototype was built around them,
because the software mostly touched registers spread over the address space.

Ops 0 to 3 keep the order of the two-bit code of the plain block protocol.
The 3-bit op field, ops 4 and 5, the length encoding and the status layout are
this design's choices.

### Responses and errors

Every command is answered, writes included, so that the host always knows
whether the command arrived intact and whether the bus accepted it. The
response begins with a status byte:

```
bit 7      1 (start marker)
bits 6..4  op code of the command being answered
bit 3      bad_op     op code 6 or 7
bit 2      frame_err  a new start byte arrived before the command was complete
bit 1      bus_err    an access failed (local-bus timeout, I2C no-acknowledge)
bit 0      err        OR of bits 3..1
```

Read commands follow the status byte with their data words. The status is
known only after the last access, but it has to go out first. So read data
waits in `rdata_buffer`, which holds 256 words, the largest block.

These error rules are this design's choice:

* **Frame error.** A start byte in the middle of a command abandons that
  command. Its status byte goes out with `frame_err` set and without data.
  The start byte is then taken as the header of the next command.
* **Stray payload.** Payload bytes that arrive outside a frame are dropped.
* **Failed access.** After a failed access the rest of the command is still
  read from the host, but no further bus access is made. Read words that are
  missing are returned as 0, so the response always has the length the host
  expects.

### Timing of one command

`cmd_engine` collects the payload bytes of one record into a shift register.
It starts the access as soon as the record is complete. Meanwhile
`ft245_async_if` already fetches the next byte into its holding register. With
the default parameters this gives, at a 50 MHz clock:

* scattered write: 720 ns per operation (5 bytes of 140 ns each, plus the bus
  cycle);
* scattered read: about 880 ns per operation (3 bytes in, the bus cycle, and
  3 bytes out).

The original prototype reported 1.3 us per operation in both directions.
That figure included extra wait states for a local bus carried on a ribbon
cable. The end-to-end testbench checks that the design stays below it.

## The bridge chip side (`ft245_async_if`)

In FT245 asynchronous mode, RXF# low means the host has sent a byte, and an
RD# pulse reads it. TXE# low means there is room, and a WR# pulse writes a
byte. The published figures for the mode are a shortest read cycle of 80 ns
and a shortest write cycle of 50 ns.

* **Synchronizers.** RXF# and TXE# pass through two-flop synchronizers.
* **Read.** RD# is low for `RD_LOW` clocks, and the data is sampled on the
  last of them. RD# then stays high for `RD_HIGH` clocks, long enough for RXF#
  to show through the synchronizer whether another byte is waiting.
* **Write.** The data is driven one clock before WR# falls. WR# stays low
  for `WR_LOW` clocks, and the data is held one clock after WR# rises.
* **Priority.** Response bytes go before new input, so that a response can
  always drain.

With the defaults, both cycles take 7 clocks (140 ns). The chip's data bus is
brought out as `ft_d_in`, `ft_d_out` and `ft_d_oe`; the tri-state buffer
belongs in the pad ring.

Channel B of the chip, in MPSSE-JTAG mode, is wired to the configuration JTAG
port of the bridge FPGA. It needs no user logic and has no RTL here.

## The local bus (`lb_master`)

The bus signals are a 16-bit address, 16-bit data, RD, WR and BUSY. A cycle
has three phases:

1. **Setup.** The address (and, for a write, the data) is driven for `SETUP`
   clocks.
2. **Strobe.** RD or WR is active for at least `STROBE` clocks, and longer
   while the synchronized BUSY is high. These are the wait states.
3. **Hold.** The strobe is released, and the address and data are held for
   `HOLD` clocks.

Between cycles the address lines are not left alone. When a write record's
address arrives ahead of its data, `lb_master` drives it at once on
`early_addr` (see the command protocol above).

Read data is sampled on the last strobe clock. If BUSY is still high after
`TIMEOUT` strobe clocks, the cycle ends and reports `bus_err`. BUSY passes
through two flops, so a slave must raise it within `STROBE-2` clocks of the
strobe edge.

The signal set, the wait states and the timeout come from the published
design. The polarity (all active high), the phase lengths and the timeout
length are this design's choices.

## Interfaces behind reserved addresses

Giving every new interface its own command code would widen the op field
every time. Instead, single addresses at the top of the address space are
reserved. `target_mux` routes an access to the I2C master when the address is
`I2C_ADDR` (0xffff), to the JTAG shifter when it is `JTAG_ADDR` (0xfffe), and
to the local bus otherwise.

### I2C (`i2c_master`)

A block write to the I2C address is one I2C write transaction:

* **Start.** The first word of the block holds the 7-bit slave address. The
  master sends a START, or a repeated START if a transaction is still open,
  followed by the address with the write bit.
* **Data.** Each following word sends one data byte and checks its
  acknowledge.
* **End.** The last word of the block ends with a STOP.

So "send these N bytes to slave 0x52" is one command from the host, not
thousands of pin toggles. The end-to-end testbench sends such a block of 13
words: the slave address and 12 data bytes.

If a byte is not acknowledged, the master sends a STOP at once and the access
fails (`bus_err`). The rest of the block is rejected without bus activity.
Reading the I2C address returns `{14'b0, nack, busy}`, where `nack` is sticky
and cleared by the read.

Each bit takes four quarter periods of `QUARTER` clocks; the default gives
100 kHz at 50 MHz. The master does not support clock stretching or I2C reads.
SCL and SDA are open-drain controls (`*_drive_low`).

### JTAG (`jtag_shifter`)

The JTAG channel of the bridge chip is enough to configure the small bridge
FPGA. The boards of the developed system get a faster JTAG master in the
FPGA. Each byte written to the JTAG address is one TCK cycle:

| bit | meaning                     |
|-----|-----------------------------|
| 0   | TMS                         |
| 1   | TDI                         |
| 2   | expected TDO                |
| 3   | compare TDO in this cycle   |

In each cycle the shifter:

1. sets TMS and TDI;
2. waits `HALF` clocks with TCK low;
3. samples TDO and, if asked, compares it with the expected value;
4. pulses TCK high for `HALF` clocks.

A read returns `{14'b0, mismatch, tdo}`, the current TDO level and whether
any checked cycle since the previous read saw a wrong TDO. The read clears
the flag. This is what an SVF player needs to replay a file with expected TDO
values without reading back every bit. A block write streams many cycles in
one command. The bit positions and the TCK rate are this design's choices.

## Departures and limits

* **SPI and other interfaces not built.** SPI is named as a possible further
  interface, with no detail, and is not built.
* **Assumed values.** The clock (50 MHz), the reserved JTAG address, every
  phase length and timeout, and every byte layout beyond "bit 7 marks the
  start" and the record sizes are assumptions.
* **Host software not included.** The C library, its Python wrappers and the
  TCP/IP server belong to the host side and are not part of this RTL.
* **FT245 cycle length.** The cycles are 140 ns, not the 80/50 ns minimum.
  The synchronizers and the idle clock between cycles cost the difference.
  Lowering `FT_RD_HIGH` needs care: RXF# must have time to pass the
  synchronizer.

## Files

`rtl/`, one module or package per file:

| file | content |
|------|---------|
| `usb_lb_pkg.sv` | op codes, status bits, and the access request/response structs shared by all blocks |
| `usb_lb_bridge.sv` | top level |
| `ft245_async_if.sv` | FT245 asynchronous FIFO interface |
| `cmd_engine.sv` | framing, commands and responses |
| `rdata_buffer.sv` | read data FIFO |
| `target_mux.sv` | routing by address |
| `lb_master.sv` | local bus master |
| `i2c_master.sv` | I2C write master |
| `jtag_shifter.sv` | JTAG master |

An *access* is a request held stable from `valid` until the target answers
with a one-cycle `done`. The request carries `we`, `addr`, `wdata`, and the
`first`/`last` flags of a block.

`tb/` holds one self-checking testbench per block (`tb_<module>.sv`) and
`tb_usb_lb_bridge.sv`, which takes the whole bridge through every command
type and error case at default parameters. It also holds behavioural models:

* `ft245_model.sv`: the bridge chip's FIFO side, with cycle-time checks;
* `lb_slave_model.sv`: a memory with BUSY;
* `i2c_slave_model.sv`: an I2C slave;
* `host_proto_pkg.sv`: builds commands and expected responses.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/usb_lb_pkg.sv tb/host_proto_pkg.sv tb/tb_usb_lb_bridge.sv \
    --top-module tb_usb_lb_bridge -o sim
obj_dir/sim
```

Replace the testbench name to run another one. Testbenches that do not use
the host protocol package can leave `tb/host_proto_pkg.sv` out. The
end-to-end run simulates about 1.8 ms of bridge time in a few seconds. It
prints the measured time per scattered operation and a count for each
mechanism it exercised.

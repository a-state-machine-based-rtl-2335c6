# A state-machine SPI master with a host-facing command multiplexer

This is a synthesizable SPI (Serial Peripheral Interface) master for an FPGA
that a host processor drives through a small command interface and two byte
FIFOs. Its main idea is to write the SPI protocol as an explicit state
machine, one state per bus step: select the slave, set the clock, wait, reset
the clock, wait, and so on. The result is easy to follow and to change. Any of
the four clock modes and the clock rate can be chosen per port while the
design runs. Several ports run side by side, and each port drives several
chip-select lines, so one port can reach several slaves.

The structure follows the paper *A State Machine-Based Approach for
Implementing SPI Communication on FPGAs* (A. S. Shama, M. H. Lashin,
A. A. Nada). That paper builds the design in LabVIEW FPGA and tests it on an
NI sbRIO-9631 board with an L3G4200D gyroscope. This RTL is an independent
SystemVerilog version. Where the paper is silent (widths, handshakes, FIFO
sizes, reset), the choices here are this design's own. They are listed below.

## Structure

```
        host                                              SPI port p (one per port)
  host_cmd/host_start ─►┌─────────┐ eng_start, port, cmd,  ┌────────────┐
  host_busy/host_done ◄─│ spi_mux │ cfg, total_bits ──────►│ spi_engine │──► sclk[p]
                        │         │◄──── eng_done[p] ──────│ PORT_ID=p  │──► mosi[p]
  h2f_push ─►[h2f FIFO]─►         ├─► [tx FIFO p] ────────►│            │◄── miso[p]
  f2h_pop  ◄─[f2h FIFO]◄─         │◄─ [rx FIFO p] ◄────────│            │──► cs[p][NUM_CS]
                        └─────────┘                        └────────────┘
```

| File | Role |
|---|---|
| `rtl/spi_pkg.sv` | Command enum, configuration struct, host command struct, widths |
| `rtl/spi_top.sv` | Top: host FIFOs, multiplexer, and one engine with two FIFOs per port |
| `rtl/spi_mux.sv` | "FPGA multiplexer": host handshake, global configuration, byte routing |
| `rtl/spi_engine.sv` | "SPI engine": the protocol state machine of one port |
| `rtl/spi_fifo.sv` | Byte FIFO (first-word fall-through): the two host FIFOs and two per port |

The paper calls the two host-side FIFOs *target-scoped* and the per-port
FIFOs between multiplexer and engine *VI-scoped*. The RTL keeps that split:
`h2f`/`f2h` are the host FIFOs, `tx`/`rx` are the per-port FIFOs.

## Commands

The host fills in an `spi_host_cmd_t` and pulses `host_start` for one cycle
while `host_busy` is low. The record is captured on that cycle. `host_done`
pulses once the command has finished.

| Field | Meaning |
|---|---|
| `port` | Port to act on. A value of `NUM_PORTS` or more finishes at once and does nothing. |
| `cmd` | `CMD_CONFIGURE`, `CMD_WRITE_READ` or `CMD_IDLE` |
| `cfg.cs_sel` | Chip-select line of the port to use (0 .. `NUM_CS`-1) |
| `cfg.cs_active` | Level of the selected line while active (0 = active low). The other lines sit at the opposite level. |
| `cfg.cpol`, `cfg.cpha` | SPI clock mode |
| `cfg.clk_div` | System clocks per SCLK half period. SCLK = f_clk / (2·clk_div). Values below 2 count as 2. |
| `total_bits` | Bits in a Write/Read transfer (1 .. 65535) |
| `total_bytes` | Bytes the host supplies for it. This must be ceil(total_bits / 8). |

* **Configure** writes the configuration into the multiplexer's global
  register. The multiplexer then raises the start flag for the named port's
  engine, which copies it into its own configuration. It also parks SCLK at the
  new idle level and all CS lines at the inactive level. Each port keeps its
  own configuration, so the ports can run different modes and rates. A port's
  configuration can be changed at any time between commands.
* **Write/Read** raises the start flag with the bit count. The multiplexer
  then moves `total_bytes` bytes from the host FIFO into the port's transmit
  FIFO, and at the same time moves received bytes from the port's receive
  FIFO into the host's return FIFO. The host may push the bytes before the
  command or while it runs, and must pop the same number of answer bytes. The
  command ends when the engine has finished and every answer byte has reached
  the return FIFO.
* **Idle** only passes through the engine's *Start* and *Set Done* states.
  It gives the host a way to check that a port responds.

Two status outputs help with monitoring. `port_busy[p]` is high while port
p's engine is active. `write_flag[p]` pulses for one cycle each time port p
has exchanged a byte.

## The engine state machine

This is the core of the design (`rtl/spi_engine.sv`). The states and their
order come from the paper's flow chart:

```
IDLE ─(start & port==PORT_ID)─► START ─┬─ Configure ─► CONFIG_HW ─► SET_DONE ─► IDLE
                                       ├─ Idle ────────────────────► SET_DONE
                                       └─ Write/Read ─► START_HW ─► INIT ─► READ_FIFO ─► SET_CS
   ┌──────────────────────────────────────────────────────────────────────────────┘
   ▼
 WAIT_SET ─► SET_CLK ─► WAIT_RESET ─► RESET_CLK ─┬─ more bits in byte ─► WAIT_SET
   ▲                                             └─ byte done / last bit ─► WRITE_FIFO
   │                                                   ├─ bits left ─► READ_FIFO ─► WAIT_SET
   └───────────────────────────────────────────────────┘
                                                       └─ none left ─► RESET_CS ─► STOP ─► SET_DONE
```

*SET_CLK* drives SCLK to its active level (the leading edge). *RESET_CLK*
returns it to idle (the trailing edge). What happens to data at each edge
depends on CPHA:

| | leading edge (SET_CLK) | trailing edge (RESET_CLK) | first bit placed |
|---|---|---|---|
| CPHA = 0 | sample MISO | next bit onto MOSI | in SET_CS, before the first edge |
| CPHA = 1 | next bit onto MOSI | sample MISO | at the first leading edge |

With CPOL this gives the usual modes. Mode 0 idles low and samples on the
rising edge. Mode 1 idles low and samples on the falling edge. Mode 2 idles
high and samples on the falling edge. Mode 3 idles high and samples on the
rising edge. Bits go out MSB first. After 8 bits, or after the last bit of the
transfer, *WRITE_FIFO* stores the received byte. A final partial byte sends
the top bits of its transmit byte. Its received bits come back right-aligned.

MISO is sampled in the system clock cycle *before* the SCLK register changes.
So the engine reads the value just ahead of the sampling edge, and the slave
has a full half period to settle its output. There is no input synchronizer.
A slave with a slow or asynchronous MISO path needs `clk_div` large enough, or
a synchronizer added in front of `miso`.

### Timing

Each wait state counts `clk_div − 1` cycles. Together with the SET or RESET
cycle, both SCLK half periods therefore last exactly `clk_div` system
clocks within a byte. Between bytes, the idle half period gets two more cycles
(WRITE_FIFO and READ_FIFO). When no FIFO has to wait, a Write/Read of *N* bits
(*B* bytes) takes

    2 · clk_div · N + 2 · B + 8  system clocks

from the cycle the engine samples its start flag to the cycle its `done` is
seen. The multiplexer adds two cycles in front and one behind. For example,
the gyroscope's 16-bit register read at `clk_div = 4` takes 140 cycles in the
engine. That is 3.5 µs at a 40 MHz system clock, with SCLK at 5 MHz.

### Waiting on FIFOs

The engine waits with SCLK idle and CS still active in two cases. In
*READ_FIFO* it waits while the transmit FIFO is empty. In *WRITE_FIFO* it waits
while the receive FIFO is full. SPI tolerates a stretched idle phase, so a
slow host only slows the transfer down. It never corrupts it.

## Where this design departs from the paper or fills its gaps

* **Loop back through WAIT_SET.** The paper's flow chart returns from the end
  of a bit straight to *Set Clock*. Its text asks for a waiting state that
  guarantees the clock rate. Here the loop goes through *WAIT_SET*, so SCLK
  has a 50 % duty cycle.
* **READ_FIFO for every byte.** The flow chart shows further bytes going back
  to *Set Clock*. Here each new byte is fetched in READ_FIFO first. With
  CPHA = 0 its first bit is placed there as well.
* **Configure ends in SET_DONE.** The flow chart's Configure branch is drawn
  towards both *Set Done* and *Start Hardware*. This design follows the text
  and ends the command after the configuration is stored.
* **Clock divider written by Configure.** One passage lists only CPOL, CPHA
  and CS as the values that Configure stores. The host API description and
  its sequence also include the SCLK rate, and that is what is done here.
* **Meaning of the fields.** `clk_div` is read as the half period in system
  clocks, `cs_sel` as a line index, and `total_bits` as the transfer length.
  `total_bytes` has to match `total_bits`.
* **Sizes.** The paper gives none. The defaults are `NUM_PORTS = 2`,
  `NUM_CS = 4`, host FIFOs of 64 bytes and per-port FIFOs of 16 bytes. Port
  numbers are 4 bits wide (up to 16 ports), and so are CS line indices (up to
  16 lines).
* **Reset** is synchronous and active low. After reset each port is in
  mode 0, uses line 0 active low, and has `clk_div = 2`.
* **Not built:** the host software (the configure and write/read calls, and
  the program that turns the gyroscope rates into angles), the sbRIO board
  and the sensor. For reference, the paper's LabVIEW build used 2124
  registers, 3336 LUTs, 4 block RAMs and 1 multiplier on its FPGA, together
  with the rest of its application. That figure does not describe this RTL.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. A watchdog stops it if it hangs.

| Testbench | What it checks |
|---|---|
| `tb/tb_spi_fifo.sv` | Random push and pop against a queue model: head byte, full, empty and count every cycle |
| `tb/tb_spi_engine.sv` | All four modes against a behavioural slave, transfers of 8 to 29 bits (partial bytes included), late transmit data, a full receive FIFO, SCLK half-period widths, the exact latency formula above, CS line selection, and that a start for another port is ignored |
| `tb/tb_spi_mux.sv` | Two ports with stand-in engines: configuration delivery, byte routing to the named port only, answer order, back-pressure from a full host return FIFO, Idle command, out-of-range port |
| `tb/tb_spi_top.sv` | The whole design at its default parameters (below) |

`tb_spi_top` runs the gyroscope sequence of the paper's host program on
port 0, against a model of the L3G4200D (`tb/l3g4200d_model.sv`). It uses
mode 3 and `clk_div = 4`. It writes CTRL_REG1/2/4/5 (0x20, 0x21, 0x23, 0x24
with 0x07, 0x09, 0xB0, 0x60) and reads WHO_AM_I. It reads the six rate
registers with the commands 0xA8 to 0xAD as separate 16-bit transfers, and
once more as a 56-bit burst with address auto-increment (0xE8). The X, Y and Z
values read back are compared with the values loaded into the model. It also checks
that `write_flag` pulses once per byte and that SCLK has a period of
2·`clk_div` clocks. One six-register sample takes about 870 system clocks,
including the host model. That is about 22 µs at 40 MHz, well inside the
10 ms of the sensor's 100 Hz output rate. On
port 1 two generic slaves sit on CS lines 1 and 2. They are used in mode 0 and
mode 2 with different dividers, so the port is reconfigured between them.
Then a 200-byte transfer runs while the host first reads no answers and then
supplies no data. The testbench counts each mechanism and fails if one never
happens: Configure, Write/Read and Idle commands, a mode switch, a divider
change, a CS line change, the engine waiting for transmit data, the engine
waiting for receive space, a full host FIFO, and an out-of-range port.

The behavioural models in `tb/` are `spi_slave_model.sv` (a generic slave for
any mode, driving a MISO bit pattern and recording MOSI) and
`l3g4200d_model.sv`. Both are for simulation only.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/spi_pkg.sv tb/tb_spi_top.sv --top-module tb_spi_top -o sim
./obj_dir/sim
```

Use the same command with `tb_spi_engine`, `tb_spi_mux` or `tb_spi_fifo` in
place of `tb_spi_top`. Each one finishes in well under a second. For lint, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/spi_pkg.sv rtl/spi_top.sv`.

What these tests do not cover: real I/O timing (MISO sampled without a
synchronizer, no I/O constraints), and slaves that need set-up or hold time
between CS and the first or last SCLK edge beyond about one system clock.

# APB general-purpose I/O controller

A small peripheral that gives software direct control over up to 32 chip pins.
Each pin can be an input that software polls, an input that raises an
interrupt on a chosen edge, an output, a bi-directional pin, or an output handed
over to another on-chip peripheral. Software programs all of this through ten
32-bit registers on an APB (AMBA Advanced Peripheral Bus) slave port. Inputs can
be sampled on the system clock or, pin by pin, on either edge of an external
clock reference. Three synthesis options size the core to its system: the
number of pins, the host bus width (8, 16 or 32 bits), and whether software can
read the configuration registers back.

The register set, the pin modes, the interrupt rules and the reset state follow
a published description of this GPIO core. That description leaves some points
open: register offsets, control-bit positions, bus timing and error responses,
and how the external-clock sampling is built. The choices made for those points
are marked **(design choice)** below.

## Pins and registers

Every register except RGPIO_CTRL has one bit per pin (`GPIO_W` bits, 1 to 32,
default 32). Bits above `GPIO_W` read as 0 and are ignored on write.

| Offset | Register    | Access | Meaning of bit *i* |
|-------:|-------------|--------|--------------------|
| 0x00 | RGPIO_IN    | R   | registered value of input *i* |
| 0x04 | RGPIO_OUT   | R/W | value driven on pin *i* |
| 0x08 | RGPIO_OE    | R/W | 1 = output driver of pin *i* enabled |
| 0x0C | RGPIO_INTE  | R/W | 1 = input *i* may raise an interrupt |
| 0x10 | RGPIO_PTRIG | R/W | 1 = interrupt on rising edge, 0 = on falling edge |
| 0x14 | RGPIO_AUX   | R/W | 1 = pin *i* driven by auxiliary input `aux_i[i]` |
| 0x18 | RGPIO_CTRL  | R/W | bit 0 INTE (global interrupt enable), bit 1 INTS (interrupt recorded) |
| 0x1C | RGPIO_INTS  | R/W | 1 = input *i* has raised an interrupt since last cleared |
| 0x20 | RGPIO_ECLK  | R/W | 1 = sample input *i* on `gpio_eclk` instead of the system clock |
| 0x24 | RGPIO_NEC   | R/W | 1 = use the falling `gpio_eclk` edge, 0 = the rising edge |

The offsets and the CTRL bit positions are **(design choice)**; the registers
and their meaning are the core's. All registers reset to 0. That puts every pin
in input mode with its driver off, masks every interrupt, and samples every
input on the system clock. Those three are required of the core; zero for OUT,
PTRIG, AUX and NEC is **(design choice)**.

With `READBACK_EN = 0` the read multiplexer for the seven configuration
registers (OUT, OE, INTE, PTRIG, AUX, ECLK, NEC) is left out, and they read as 0.
RGPIO_IN, RGPIO_CTRL and RGPIO_INTS stay readable, because software cannot use
the core without them. Which registers keep read back is **(design choice)**;
the option itself is the core's.

How software uses a pin:

- **Polled input.** OE = 0, INTE = 0; read RGPIO_IN.
- **Interrupting input.** OE = 0; set PTRIG for the edge you want; clear
  RGPIO_INTS; set the pin's INTE bit and CTRL.INTE.
- **Output.** Set OE and write the value to OUT. One write to RGPIO_OUT sets
  all pins at once.
- **Bi-directional.** Toggle the OE bit to drive or release the pin; RGPIO_IN
  always shows the pin level.
- **Auxiliary output.** Set OE and AUX; the pin then follows `aux_i`, the
  output of some other on-chip peripheral.

## Input sampling and the two clock domains

This is the least obvious part of the core. RGPIO_IN must be able to follow
either the system clock `PCLK` or an external reference `gpio_eclk`, on a
per-pin basis, and with the `gpio_eclk` edge selectable per pin.
`gpio_input_sampler` builds this without muxing clocks:

```
ext_pad_i[i] ──┬──────────────────────────┐
               ├─► FF @ posedge gpio_eclk ─┤ ECLK=0: pad
               └─► FF @ negedge gpio_eclk ─┤ ECLK=1, NEC=0: rising capture   ──► FF @ posedge PCLK ──► RGPIO_IN[i]
                                           │ ECLK=1, NEC=1: falling capture
```

The two capture flip-flops per pin are the only logic in the `gpio_eclk`
domain. The value they hold is passed through a per-pin multiplexer and
re-registered on `PCLK`. The bus and the interrupt unit therefore only ever
see a `PCLK`-domain register. In system-clock mode a pin change appears in
RGPIO_IN after the next `PCLK` rising edge. In external-clock mode it is first
latched on the chosen `gpio_eclk` edge, and that latched value reaches
RGPIO_IN on the following `PCLK` edge. **(Design choice:** the core only
requires that RGPIO_IN be "clocked by" the chosen edge. Re-registering on
`PCLK` is this implementation's way of keeping one clock domain for
everything software reads.**)**

There is a single register between a pin and RGPIO_IN, as the core specifies
("registered value"). There is no two-stage synchronizer. If `gpio_eclk` or
the pins are asynchronous to `PCLK`, add synchronizers outside the core or
accept the metastability risk of one flop. `PRESETN` resets both domains
asynchronously.

## Interrupts

`gpio_irq` compares RGPIO_IN with its value one clock earlier. A pin raises an
event when:

- it shows the edge its PTRIG bit selects (rising when PTRIG = 1, falling when
  PTRIG = 0),
- its INTE bit is set, and
- CTRL.INTE is set.

An event sets the pin's RGPIO_INTS bit and CTRL.INTS, and both stay set until
software writes 0 to them. The output is `IRQ = CTRL.INTE & CTRL.INTS`, so
software can remove an interrupt in two ways:

1. Write 0 to RGPIO_INTS and to CTRL.INTS. RGPIO_INTS alone is not enough:
   IRQ stays high until CTRL.INTS is cleared too.
2. Clear CTRL.INTE. RGPIO_INTS keeps its record.

Latency: a pin change sampled on the system clock raises `IRQ` two `PCLK`
rising edges later. One edge loads RGPIO_IN; the next sets INTS/CTRL.INTS.
**(Design choice:** an event in the same clock as a software write to INTS or
CTRL wins over the write, so no event is lost. The previous-value register
resets to 0, so a pin held high through reset counts as one rising edge once
sampling starts.**)**

Only edge-triggered interrupts are implemented. Some versions of this core
family also offer level-sensitive and level-change interrupts; the register set
described here has no field to select them, so they are not included.

## Bus interface

`gpio_apb_slave` is an APB slave with no wait states. Its data width `BUS_W`
is 8, 16 or 32 bits; 32 is the default.

- `PREADY` is tied to 1, so every transfer takes two `PCLK` cycles (setup,
  access).
- A write updates its register on the `PCLK` edge that ends the access phase.
  The pad outputs change at that same edge.
- Read data is combinational during the access phase; `PRDATA` is 0 at other
  times.
- `PSLVERR` is raised in the access phase for a misaligned address, an address
  past 0x24, or a write to RGPIO_IN. Such a write changes nothing.
  **(design choice)**
- With a narrower bus the registers stay 32 bits wide at the same offsets.
  Byte lane group *k* of register *i* is at `4*i + k*BUS_W/8`, so an 8-bit bus
  reaches the bytes of RGPIO_OUT at 0x04, 0x05, 0x06 and 0x07. A write changes
  only the bytes it addresses. The slave places the data in its lanes and
  passes byte enables to the register file. Addresses must be aligned to
  `BUS_W/8`. **(design choice)**

`PADDR` is `ADDR_W` = 8 bits wide by default **(design choice)**; it must be at
least 6. The slave also carries assertions on the master's behaviour:

- Each access phase directly follows this slave's setup phase (`PENABLE` itself may be shared with other slaves).
- Address and direction stay stable from setup to access.

Lint tools report `PRESETN` as used both asynchronously (flip-flop resets) and
synchronously. The synchronous use is only these assertions' `disable iff`,
which is intended.

## Structure

| File | Module | Role |
|------|--------|------|
| `rtl/gpio_pkg.sv` | package | register indices, CTRL bit positions, the internal register-request struct `reg_req_t` |
| `rtl/gpio_apb_slave.sv` | `gpio_apb_slave` | APB decode into `reg_req_t`, `PSLVERR`, protocol assertions |
| `rtl/gpio_regs.sv` | `gpio_regs` | OUT, OE, INTE, PTRIG, AUX, ECLK, NEC and the read multiplexer for all ten registers |
| `rtl/gpio_input_sampler.sv` | `gpio_input_sampler` | `gpio_eclk` captures and RGPIO_IN |
| `rtl/gpio_irq.sv` | `gpio_irq` | RGPIO_INTS, RGPIO_CTRL, `IRQ` |
| `rtl/gpio_pad_if.sv` | `gpio_pad_if` | aux multiplexing onto `ext_pad_o`, `ext_padoe_o` |
| `rtl/gpio_top.sv` | `gpio_top` | the core; parameters `GPIO_W` (32), `ADDR_W` (8), `BUS_W` (32), `READBACK_EN` (1) |

Data flows as follows:

- The APB slave feeds the register file.
- The register file drives the pad interface, and the auxiliary inputs join
  on that path.
- The input sampler feeds RGPIO_IN to both the register file and the
  interrupt unit.

The I/O cells are not part of the core. Connect `ext_pad_o` and `ext_padoe_o`
(1 = drive) to three-state or open-drain pad cells, and their input side to
`ext_pad_i`.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. Example with plain Verilator (list the package first):

```
verilator --binary --timing --assert --timescale 1ns/1ps rtl/gpio_pkg.sv rtl/gpio_apb_slave.sv rtl/gpio_regs.sv \
  rtl/gpio_input_sampler.sv rtl/gpio_irq.sv rtl/gpio_pad_if.sv rtl/gpio_top.sv \
  tb/tb_gpio_top.sv --top-module tb_gpio_top -o sim && obj_dir/sim
```

| Testbench | What it establishes |
|-----------|---------------------|
| `tb_gpio_top` | the full core at default size, driven only at its pins. Reset state; random register write/read-back; output, aux, polled input; rising and falling `gpio_eclk` capture, including a per-pin mixture; rising and falling interrupts with the two-clock `IRQ` latency; both ways of clearing; masked pins; a bi-directional pin; bus errors. It counts each of these 14 mechanisms and fails if any never happened. |
| `tb_gpio_top_options` | an 8-bit-bus core without read back next to a 16-bit-bus core with it. Checks registers built from lane writes, a single-lane rewrite, read back on and off, RGPIO_IN read lane by lane, and an interrupt raised and cleared through lane writes. |
| `tb_gpio_apb_slave` | 32-, 16- and 8-bit slaves side by side. Checks strobe timing and decode, byte enables and data lanes, read data lanes, `PSLVERR` cases and back-to-back transfers. |
| `tb_gpio_regs` | reset values, random byte-enabled writes against a shadow copy, and the read multiplexer for every index, with read back on and off |
| `tb_gpio_input_sampler` | RGPIO_IN against a reference model, with `PCLK` and `gpio_eclk` running at unrelated rates |
| `tb_gpio_irq` | INTS/CTRL/IRQ against a reference model, directed latency and clearing cases, random mixture |
| `tb_gpio_pad_if` | every output and enable bit for random and corner-case inputs |

All testbenches pass. Each was also run against a copy of its module with one
deliberate bug, and each caught it.

## Limits and departures

- Register offsets, CTRL bit positions, zero-wait-state timing, the
  `PSLVERR` rules, the byte-lane layout of the narrow bus options and `ADDR_W`
  are this implementation's own. Software written
  for another implementation of the same register set may expect a different
  map.
- No interrupt modes other than single-edge (see Interrupts).
- Bit-wise set/clear access to the output register is not provided. Such
  access appears in some versions of this core family, but this register set
  has no place for it.
- No input synchronizer beyond the RGPIO_IN register.

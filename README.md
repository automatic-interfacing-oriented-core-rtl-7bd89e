# Bus-agnostic peripheral cores: an adder and a counter on a slave bus

Hooking a custom block up to a processor bus usually costs more effort than
the block itself: address decoding, read and write multiplexing, handshakes
and interrupt plumbing get mixed into the functional code. This design keeps
them apart. A **core** is written with no knowledge of any bus. It has its own
data ports plus three kinds of *standard* port, recognised by name:

| name | role | how it is connected |
|------|------|---------------------|
| `clk` | clock | wired straight to the bus clock |
| `reset` | reset | wired to the peripheral's reset (system or local software reset) |
| `intr1` .. `intrN` | interrupts | fed to the interrupt controller of the bus interface |

Every other core port is a *custom* port and becomes a bus register. Because
the split is mechanical, the two outer layers can be produced for any core
that follows these names. Here they are written out by hand for two small
example cores: a 32-bit adder with an overflow interrupt, and a counter that
raises an interrupt N clocks after it is started.

```
            peripheral (adder_ip / counter_ip)
 bus  +--------------------------------------------------------------+
 ---->| bus interface   |  register layer        |  core             |
 req  | (opb_ipif)      |  (core_regs)           |  (adder_core /    |
 <----|  address decode |  write: bus data ->    |   counter_core)   |
 rsp  |   -> rd/wr CE   |    one register per    |                   |
      |  intr. control  |    core input          |  custom ports     |
 <----|  local reset /  |  read: mux of inputs   |  clk, reset,      |
 intr |   module info   |    and core outputs    |  intr1..intrN     |
      +--------------------------------------------------------------+
```

## The layers

### Core

The core holds only the function. `adder_core` registers `r = a + b` and
`intr1 = signed overflow` on each clock (one clock of latency).
`counter_core` loads `n` on a rising edge of `start` and pulses `intr1` for one
clock, `n` clocks after the cycle in which `start` was first seen high
(`n = 0` acts like 1; a new rising edge restarts the count). Both use a
synchronous, active-high `reset`.

### Register layer (`core_regs`)

A generic register bank, sized by `NUM_IN` (core inputs) and `NUM_OUT` (core
outputs). Word `i < NUM_IN` is a 32-bit register driving core input `i`; it
loads the bus data in the cycle its write chip enable is high. Word
`NUM_IN + j` is read-only and returns core output `j` directly. A read returns
the one selected word, so the read path is a multiplexer and the write path a
demultiplexer. On reset every register goes to zero; each core defines its own
reset state separately. Interrupt lines pass through unchanged to the
interface, which masks and merges them.

### Bus interface (`opb_ipif`)

Everything bus-specific sits here, as three services:

* **Address decoding** (`ipif_addr_decode`). A component owns a 128-byte
  aligned window. The word offset inside it becomes two one-hot chip-enable
  arrays, one for reads and one for writes. The register layer sees only these
  enables and the write data.
* **Interrupt source control** (`ipif_intr_ctrl`). Each core interrupt sets a
  status bit on its rising edge. The bit stays set until software writes a 1
  to it; if a new edge arrives in the same cycle as the clear, the edge wins.
  An enable register masks the sources, and the device interrupt is the OR of
  the enabled status bits.
* **Local reset and module information** (`ipif_reset_mir`). Writing a value
  whose low nibble is `0xA` to the reset word gives a one-clock reset pulse.
  The pulse reaches the core, the register layer and the interrupt controller.
  The system reset is ORed in. A read of the same word returns a constant
  identification word: `{major 4'd3, minor 7'd1, rev 5'd1, block_id[7:0],
  type 8'h01}`, so the adder reads `0x3021_0101` and the counter
  `0x3021_0201`.

Word map of every peripheral, as byte offsets from its base address:

| offset | access | content |
|--------|--------|---------|
| `0x00 + 4*i` | R/W or R | core register `i` (inputs first, then outputs) |
| `0x40` | R, W1C | interrupt status, bit `k` = `intr(k+1)` |
| `0x44` | R/W | interrupt enable |
| `0x48` | W: `0x…A` resets; R: info word | local reset / module information |
| others in window | R = 0, W ignored | acknowledged all the same |

## Bus handshake and timing

The request and response are packed structs from `ipif_pkg`:
`bus_req_t {sel, rnw, addr[31:0], wdata[31:0]}` and
`bus_rsp_t {ack, rdata[31:0]}`. The master raises `sel` with the address, the
direction and any write data, and holds them until it sees `ack`.

```
clk        _/‾\_/‾\_/‾\_/‾\_
sel        __/‾‾‾‾‾‾‾\_____        cycle t  : access cycle (chip enables high,
ack        ______/‾‾‾\_____                   write taken at its closing edge)
rdata      ======<valid>===        cycle t+1: ack, read data valid
```

* A transfer takes two clocks. If `sel` stays high after an `ack`, the same
  peripheral inserts one idle clock before it takes the next access. A
  different peripheral can answer at once.
* `rdata` is zero whenever `ack` is low. The top therefore combines the two
  peripherals' responses with a plain OR.
* An address outside every window is never acknowledged. The master must time
  it out.

Latencies measured from the access cycle `t` of the write that causes them:

| event | cycle |
|-------|-------|
| adder `R` readable with the new sum | `t+2`, so a read issued right after the write already sees it |
| adder overflow on `adder_intr` (if enabled) | `t+3`: operand register, then the core's result register, then the status bit |
| counter done on `counter_intr` after writing `start = 1` | `t+N+2` |
| local reset pulse | `t+1`, for one clock |

## Top level (`ip_cores_top`)

Both peripherals share one bus. The adder sits at `0x4000_0000` and the
counter at `0x4001_0000`, set by the `ADDER_BASEADDR` and `COUNTER_BASEADDR`
parameters. Each peripheral has its own interrupt output. Ports: `clk`,
`sys_reset` (synchronous, active high), `req`, `rsp`, `adder_intr` and
`counter_intr`.

Using the counter from software:

1. Write `N` to `0x4001_0000`.
2. Write `1` to `0x4001_0004` (clear it first if it is already 1).
3. Enable the interrupt with `0x4001_0044 = 1`.
4. Wait for `counter_intr`.
5. Clear it with `0x4001_0040 = 1`.

The adder works the same way: write `A` at `+0` and `B` at `+4`, then read `R`
at `+8`.

## Adding another core

To add a core, follow the naming rule: `clk`, `reset`, `intr1..intrN`, plus any
data ports. Then build a peripheral like `adder_ip`:

1. Instantiate `opb_ipif` with `NUM_USER_CE = NUM_IN + NUM_OUT` (at most 16)
   and `NUM_INTR = N`.
2. Instantiate `core_regs` with the same counts.
3. Instantiate the core.
4. Connect the core's inputs to slices of `core_in`, its outputs to `core_out`,
   and its interrupts to `core_intr`.

Narrow inputs take the low bits of their register, as `start` does in
`counter_ip`.

## What is modelled and what is not

The interface services mirror those of a commercial slave interface core
(version 3.01b) for the 32-bit On-chip Peripheral Bus (OPB) of the IBM
CoreConnect architecture. Only their function is
implemented, in a minimal form: the register map, the handshake and the
register behaviour are this design's own. The RTL does **not** drive real OPB
signals, and it does not reproduce that interface's register layout.

Choices where the original description is silent:

* overflow means two's-complement overflow, not unsigned carry;
* the adder registers its result;
* the counter starts on a rising edge of `start` and its interrupt is a
  one-clock pulse;
* interrupts are captured on edges and cleared by writing 1;
* the reset key, the pulse length and the fields of the information word;
* the 128-byte window and the base addresses.

Not built:

* the higher-level device interrupt controller, which would merge interrupts
  from FIFO services;
* the read/write FIFOs, burst transfers and byte steering;
* the processor and the bus arbiter;
* bus time-out and retry/error responses;
* the software that would generate the outer layers. It is replaced by the
  hand-written `core_regs`, `adder_ip` and `counter_ip`.

The approach was judged against "monolithic" versions of the same two
peripherals, with the bus logic written into the function. Those versions and
their FPGA area figures are not part of this design.

Bit numbering: data vectors are `[31:0]` with bit 0 least significant. A
big-endian `(0 to 31)` description maps bit `k` to bit `31-k` here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog:

| testbench | what it establishes |
|-----------|---------------------|
| `tb_adder_core` | sums and overflow flag against 64-bit reference arithmetic, one-clock latency, reset |
| `tb_counter_core` | interrupt exactly N clocks after start for several N, restart, reset abort |
| `tb_core_regs` | writes land only in the addressed register, read mux, outputs read-only, reset, interrupt pass-through |
| `tb_ipif_addr_decode` | every word of the window, neighbours outside it, random addresses |
| `tb_ipif_intr_ctrl` | cycle-by-cycle comparison with a reference model: capture, mask, clear, set/clear collision |
| `tb_ipif_reset_mir` | key decoding, one-clock pulse, information word |
| `tb_opb_ipif` | ack latency, one chip-enable clock per access, back-to-back transfers, no ack outside the window, interrupt and reset services over the bus |
| `tb_adder_ip`, `tb_counter_ip` | each peripheral end to end, including interrupt latencies `t+3` and `t+N+2` |
| `tb_ip_cores_top` | both peripherals at default parameters, adder work during a running count. It counts every mechanism (sums, overflow and count interrupts, masking, clearing, local reset of one peripheral leaving the other intact, info reads, unanswered request, back-to-back transfers) and fails if one never happened |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/ipif_pkg.sv tb/tb_ip_cores_top.sv \
  --top-module tb_ip_cores_top -Mdir obj_top
./obj_top/Vtb_ip_cores_top
```

Replace the testbench name to run another. Every simulation finishes in well
under a second. The testbenches initialise or reset everything they read, so
they do not depend on X propagation.

## Files

| file | content |
|------|---------|
| `rtl/ipif_pkg.sv` | widths, word map, reset key, bus request/response and info-word structs |
| `rtl/adder_core.sv`, `rtl/counter_core.sv` | the two cores |
| `rtl/core_regs.sv` | generic register layer |
| `rtl/ipif_addr_decode.sv`, `rtl/ipif_intr_ctrl.sv`, `rtl/ipif_reset_mir.sv` | interface services |
| `rtl/opb_ipif.sv` | bus interface: handshake and the three services |
| `rtl/adder_ip.sv`, `rtl/counter_ip.sv` | complete peripherals |
| `rtl/ip_cores_top.sv` | both peripherals on one bus |

# QDR module control logic: triggered acquisition, FIFO flag offsets and VME interrupts

The QDR is a VME receiver board. Its FPGA holds the control registers, the
acquisition gate for the receiver channels, access from VME to the output
FIFOs, and the interrupt logic. This RTL implements three additions to that
FPGA logic:

- **Continuous triggered acquisition.** The board stays passive until an
  external gate edge arrives. From then on it acquires continuously. A
  single-trigger flip-flop turns the first gate edge into a steady gate.
- **Programmable FIFO flag offsets.** Software can read and program the
  almost-empty (PAE) and almost-full (PAF) offset registers of the
  CY7C4255-type FIFOs. It uses the same register accesses as for FIFO data.
  A control bit holds the FIFOs' `/LD` pin low while the offsets are
  accessed.
- **FIFO-status interrupts.** Four interrupt sources each watch the FIFO
  status register through a value/mask compare. They are served by
  priority through the VME controller's `/LIRQ`/`/LDEN` pins. The request
  is released on acknowledge (ROAK).

Everything runs on one clock `clk`, with an asynchronous active-low reset
`rst_n`. All files are synthesizable SystemVerilog-2017. The exception is
`tb/`, which holds testbenches and a behavioural FIFO model.

## Block structure

```
qdr_top
 ├─ ctrl_reg      control register 0x0010
 ├─ gate_ctrl     gate_in synchroniser + /gate multiplexer
 │   ├─ ext_gate_ff   single trigger (mode 10)
 │   └─ ddc_gate      gate for modes 00 / 01 / 11
 ├─ fifo_access   FIFO data registers 0x0000/4/8 -> /wen, /ren, /ld, D, Q
 └─ irq_ctrl      interrupt registers 0x0100..0x0140, /lirq, /lden, vector
     └─ irq_match ×4  masked compare of the FIFO status
```

`qdr_pkg` holds the register addresses, the acquisition-mode enum
`acq_mode_e`, the decoded control register struct `ctrl_t` and the bus
request struct `bus_req_t`.

Outside the FPGA, and therefore ports of `qdr_top`:

- the FIFO chips;
- the CY7C960 VME controller, which turns `/lirq` into the VME `IRQ*` and
  asserts `/lden` during the interrupt acknowledge cycle;
- the DIP switch that sets the VME interrupt level (level 4 is expected);
- the receiver data path.

The control bits for the data path (acquisition mode select, link port, DDC
data format, VME access enable) are only brought out as ports.

## Register map

| Offset | Bits | Register | Access |
|---|---|---|---|
| 0x0000, 0x0004, 0x0008 | [17:0] | data register of FIFO 0, 1, 2 (stack, or PAE/PAF offsets when control bit 6 = 1) | R/W, each access is one FIFO strobe |
| 0x0010 | 0 | VME access enable | R/W |
| | [2:1] | acquisition: 00 off, 01 continuous, 10 continuous triggered, 11 gated | R/W |
| | [4:3] | acquisition mode select (01 = direct, FIFOs bypassed) | R/W |
| | 5 | link port | R/W |
| | 6 | FIFO access select: 0 stack, 1 PAE/PAF offset registers | R/W |
| | 7 | stored only | R/W |
| | [9:8] | DDC data format | R/W |
| 0x0100 | [3:0] | Fn: interrupt flags, bit 0 = IRQ1 (highest priority) | R, write 1 to clear |
| 0x0104 + 0x10·(m−1) | [9:0] | Xm: status value for IRQ m | R/W |
| 0x0108 + 0x10·(m−1) | [9:0] | Mm: mask, 1 = compare this status bit, 0 = ignore it | R/W |
| 0x010C + 0x10·(m−1) | [31:0] | Vm: Status/ID vector of IRQ m | R/W |
| 0x0140 | [3:0] | IE: interrupt enables | R/W |

All registers reset to zero. Unmapped addresses read as zero.

### Register bus

This register bus is the design's own. The bus master gives a one-clock
`bus_valid` with `bus_we`, a byte address `bus_addr` and `bus_wdata`. It
then waits for the one-clock `bus_ack`; for a read, `bus_rdata` is valid in
that clock. The master must not start a new access before the ack.

| Access | Ack |
|---|---|
| control and interrupt registers | 1 clock after the request edge |
| unmapped address | 1 clock after the request edge |
| FIFO data register | 2 clocks after the request edge |

`fifo_access` has an assertion that flags a FIFO request made while one is
still in progress.

## The interrupt controller

This block has the most state. The figure below shows how one interrupt is
served:

```
status matches Xm (under Mm), IEm = 1  ──► Fn[m] set ──► /lirq low
                                             │
                first clock with /lirq low:  irq_vec_nr <= Fn   (snapshot)
                                             │
 VME IACK cycle, controller drives /lden low:
     ld_out = V[lowest set bit of irq_vec_nr], ld_oe = 1
     /lirq_off set ─► /lirq released (ROAK)
                                             │
 service routine ends: write 1s to Fn bits served
     those flags clear, /lirq_off clears, snapshot re-armed
     any flag still set ─► /lirq low again at once ─► next snapshot
```

- **Setting a flag.** Flag m is set on the clock after `(status XOR Xm) AND
  Mm` becomes zero while IEm = 1. A status that stays matched sets the
  flag only once, so clearing the flag does not retrigger it. It takes a
  new match, meaning the compare becomes false and then true again.
  A trigger and a clear of the same flag in one clock leave the flag set.
- **`/lirq`.** `/lirq` is low while any Fn flag is set and `/lirq_off` is
  clear.
  - `/lirq_off` is set while `/lden` is low and cleared by any write to Fn.
  - So once acknowledged, `/lirq` stays released for the whole service
    routine, even if new flags are set meanwhile.
  - New flags only queue up. They are served after the Fn write, one by one
    in priority order.
- **The vector.** The vector is taken from the snapshot made when `/lirq`
  went active, not from the live Fn. A higher-priority interrupt that
  arrives between the request and the acknowledge is therefore served in
  the next round. The lowest set bit of the snapshot has priority.
- **Driving the vector.** `ld_out`/`ld_oe` are meant for the local data bus
  tristate driver. The vector is driven for as long as `/lden` is low.
- **Vector values.** Software should load even values 0–254 into Vm, since
  the VME handler uses 8-bit Status/ID vectors. For a pure 8-bit ID on a
  32-bit bus, the VME controller expects the upper bytes set to 0xFF. That
  too is a matter of the value written to Vm.
- **Software steps.** Software should write `0xF` to Fn at initialisation.
  Here this is harmless, since reset already clears Fn. At the end of each
  service routine it writes the served bit back to Fn.
- **Timing.** `/lden` is sampled with `clk`. `/lirq` rises one clock after
  `/lden` is sampled low, long before the acknowledge cycle ends. The CY7C960
  is assumed to run without its LACK handshake; this logic has no LACK
  output.

## Triggered acquisition and `/gate`

- **Synchroniser.** `gate_in` is synchronised with two flip-flops.
- **Modes 00, 01 and 11.** `/gate` comes from `ddc_gate`:
  - 00: high (idle);
  - 01: low (continuous);
  - 11: follows the synchronised `gate_in`, inverted.
- **Mode 10.** `/gate` comes from `ext_gate_ff`. It stays high until the
  first rising edge of `gate_in`, then stays low whatever the gate does.
  Writing any other mode clears the flip-flop, and writing 10 again arms
  it for a new trigger.
- **Latency.** `gate_in` reaches `/gate` three clocks after its rising edge,
  in both mode 10 and mode 11.
- **Own choices.** The edge polarity and the gated-mode behaviour are this
  design's own. The original gate logic for modes 00/01/11 has other,
  unspecified inputs, which are not modelled.

## FIFO offset registers

With control bit 6 set, `/ld` is held low. Each data-register access then
reaches the FIFO's offset registers instead of the stack. The FIFO itself
alternates PAE, PAF, PAE, … on every access. The logic does not track which
register is next. Software keeps order with this sequence:

1. set control bit 6;
2. read (PAE), read (PAF);
3. write PAE, write PAF (writing back a value just read keeps it);
4. clear control bit 6.

A read-only sequence uses step 2 alone. The offsets are 14 bits wide on the
CY7C4255. The data bus to the FIFOs is 18 bits wide.

Each access is one clock of `/wen` or `/ren` low, with `clk` as the FIFO
read and write clock:

- **Read.** Q is captured one clock after the strobe.
- **Write.** D is held with the strobe.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `qdr_top`, `fifo_access` | `N_FIFO` | 3 | FIFOs, one per data register 0x0000/4/8 |
| `qdr_top`, `fifo_access` | `FIFO_W` | 18 | FIFO data width (D0–D17) |
| `irq_ctrl` | `N` | 4 | interrupt sources |
| `irq_ctrl`, `irq_match` | `W` | 10 | FIFO status register width |

The register map assumes `N_FIFO` ≤ 4 and `N` = 4.

## Where this RTL goes beyond the QDR description

These points are design choices, not taken from the description of the
board:

- the register bus protocol and its latencies;
- the assignment of one FIFO to each data register;
- the single shared `/ld` pin;
- the gate synchroniser and the rising-edge trigger;
- the per-mode `ddc_gate` logic;
- edge-triggered interrupt flags;
- reset values;
- read-back of every register;
- the separate `ld_out`/`ld_oe` port for the vector.

There are also some points where the description is not consistent:

- **Bit 7.** One passage uses control bits 6 *and* 7 for offset access.
  The memory map and the worked example use only bit 6, and so does this
  RTL.
- **IE placement.** The prose describes IE gating the interrupt after Fn is
  set. The block diagram puts IE before Fn. The RTL follows the diagram, so
  a disabled source leaves no flag in Fn.

Not implemented, because they are not described:

- the receiver data path and FIFO bypass;
- the link port;
- the bit assignment of the FIFO status register, which is an input port.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`.

| Testbench | Covers |
|---|---|
| `tb_ctrl_reg` | random writes, field decode, write latency |
| `tb_ext_gate_ff` | random modes and gate activity against a reference model |
| `tb_ddc_gate` | every mode, random gate |
| `tb_gate_ctrl` | per-mode `/gate` levels, 3-clock latency, single trigger and re-arming |
| `tb_irq_match` | directed and random compares against a bitwise reference |
| `tb_irq_ctrl` | see below |
| `tb_irq_ctrl_random` | random status traffic served by a software model; Fn checked every clock against a reference, every vector checked against the priority rule, every flag served |
| `tb_fifo_access` | stack traffic on three FIFO models; offset read/program sequence; 2-clock ack |
| `tb_qdr_top` | end to end at default parameters, see below |

`tb_irq_ctrl` covers:

- register read-back;
- the enable and the mask;
- the ROAK handshake;
- priority order;
- the snapshot rule;
- an interrupt arriving during service;
- no retrigger on a held match;
- a set and a clear in the same clock.

`tb_qdr_top` runs the gate modes and programs a FIFO's PAF offset. It then
fills the FIFO until the almost-full interrupt fires, serves it, and serves
two queued interrupts in priority order. It counts each mechanism and fails
if one never happens.

`tb/cy7c4255_model.sv` is a behavioural FIFO with offset registers, for the
testbenches only. It is 16 words deep, with one PAE/PAF selector shared by
reads and writes.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/qdr_pkg.sv tb/tb_qdr_top.sv --top-module tb_qdr_top -o sim
./obj_dir/sim
```

Replace `tb_qdr_top` with any other testbench name. Each run takes well
under a second.

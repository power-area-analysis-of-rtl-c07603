# Run-time swappable Mul/Div unit with an ICAP reconfiguration controller

A LEON3 (SPARC V8) system on a Virtex-4 FPGA only occasionally needs its hardware
multiplier or divider. So instead of building both into the integer pipeline, the two units
share one floorplanned *reconfigurable region*. While the rest of the chip keeps running,
the processor rewrites that region through the FPGA's internal configuration port (ICAP).
The region holds one of three things: nothing (a blank bitstream), a 1-cycle 32x32
multiplier, or a 36-cycle 64/32 divider. Only the loaded unit takes area and draws power.
To swap, software streams a partial bitstream through an APB peripheral, the *ICAP
wrapper*.

This repository holds SystemVerilog for the parts of that system that are logic of its own:

| part | module | role |
|---|---|---|
| top level | `pdr_top` | static ICAP wrapper plus dynamic Mul/Div region |
| reconfigurable region | `muldiv_rp` | holds nothing, the multiplier or the divider, as configured |
| multiplier | `mul32` | 32x32 signed/unsigned, 64-bit product, 1 cycle |
| divider | `div64` | 64/32 signed/unsigned, radix-2 non-restoring, quotient only, 36 cycles |
| ICAP wrapper | `icap_wrapper` | APB slave that moves bitstream words between a buffer and ICAP |
| slave interface | `apb_slave_if` | APB to local bus, 4 access cycles per transfer |
| ICAP decoder | `icap_decoder` | splits bitstream data (buffer) from commands (registers) |
| ICAP state machine | `icap_fsm` | runs one transfer word by word |
| address controller | `icap_addr_ctrl` | buffer address and remaining word count |
| ICAP controller | `icap_ctrl` | drives the ICAP port for one write or read |
| buffer | `dpram` | dual-port 512 x 32 block RAM |
| shared types | `pdr_pkg` | register map, region IDs, request/response structs |

Several parts of the system are not RTL here. The LEON3 processor, its AMBA buses and
peripherals come from an existing IP library. The ICAP primitive and the configuration
memory are part of the FPGA fabric. The bus macros at the region boundary are pre-routed
wires. `pdr_top` therefore brings these connections out as ports:

- the APB slave port, from the AHB/APB bridge;
- the ICAP port;
- `rm_id`, which module the configuration memory currently holds in the region;
- the integer unit's Mul/Div request and response.

## How a swap works

The loop runs from software, through the wrapper and ICAP, into the configuration memory,
and back into the region:

```
 software ──APB──> icap_wrapper ──ICAP port──> [ICAP + configuration memory] ──rm_id──> muldiv_rp
                                                                                       ^
 integer unit ───────────────────────── muldiv_req / muldiv_rsp ───────────────────────┘
```

1. Software copies up to 512 words of the partial bitstream into the buffer (APB writes to
   byte offsets `0x000`-`0x7FC`).
2. It writes the word count to `SIZE` (`0x800`) and the first buffer word to `OFFSET`
   (`0x804`). Writing `CTRL` (`0x808`) with bit 0 = 0 starts a *configure* transfer.
3. The state machine moves the words one at a time into ICAP. Software polls `STATUS`
   (`0x80C`): bit 1 = busy, bit 0 = done. The done bit stays set until the next start.
4. Software repeats steps 1 to 3 until the whole bitstream has been sent. A 28 KiB
   multiplier bitstream is 7168 words, so it takes 14 buffer loads.
5. The bitstream ends with a DESYNC command. The new contents of the region then take
   effect, and `rm_id` changes.

Readback goes the other way. A configure transfer sends the readback command words. A
transfer with `CTRL` bit 0 = 1 then fills the buffer from ICAP, and software reads the
buffer over APB. The same path reads ICAP's internal registers, such as IDCODE, as well as
frame data.

While a transfer runs, writes to `SIZE`, `OFFSET` and `CTRL` are ignored. The buffer stays
accessible, because it is dual-ported, but software should leave it alone until the
transfer is done.

## The reconfigurable region in simulation

In the FPGA only one module exists in the region at a time. RTL cannot change its own
netlist, so `muldiv_rp` instantiates both units and uses `rm_id` to choose which one is
present:

- The absent unit is held in reset, and its outputs are ignored. A unit that has just been
  swapped in therefore starts from reset. A swap during a division abandons that division.
- A request for a unit that is not loaded gets a one-cycle `unimpl` pulse in the next
  cycle, instead of `ready`. This applies to every request while the region is blank. The
  integer unit can trap on `unimpl` as it would for an unimplemented instruction. This
  response is a choice of this design. It is how software can check which module is
  present.
- `rm_id` must come from whatever knows what the configuration memory holds. In the
  testbenches that is the ICAP model (`tb/icap_model.sv`). On a real FPGA the region
  simply contains one module, and `rm_id` and the multiplexing disappear.

For synthesis of a single configuration (one partial bitstream), tie `rm_id` to a
constant. The tools then remove the other unit.

## Multiplier and divider timing

Both units use the same handshake. The integer unit raises `start_mul` or `start_div` for
one cycle (cycle 0), together with `sgn`, `op1`, `op2` and (for a divide) `y`. `ready`
then pulses for one cycle with the result:

- multiply: in cycle 1. `result` is the full 64-bit product.
- divide: in cycle 36. `result[31:0]` is the quotient of `{y, op1} / op2`. No remainder is
  produced.

The divider spends its 36 cycles as follows:

| cycle | work |
|---|---|
| 1 | take magnitudes |
| 2 | check for divide by zero and overflow; load the upper dividend word as the partial remainder |
| 3-34 | 32 non-restoring steps |
| 35 | restore the sign and saturate |
| 36 | result valid |

A non-restoring step adds the divisor when the partial remainder is negative and subtracts
it when the remainder is positive. No step ever restores the remainder. Each quotient bit
is the inverted sign of the new remainder, so the quotient needs no final correction. The
remainder would need one, but it is never returned.

Overflow and divide by zero follow the SPARC V8 divide instructions:

- **Overflow.** A quotient that does not fit in 32 bits saturates: unsigned to `0xFFFFFFFF`;
  signed to `0x7FFFFFFF` or `0x80000000`. `ovf` is then set. Unsigned overflow is exactly
  the case where the upper dividend word is at least the divisor.
- **Divide by zero.** A zero divisor sets `dbz` and returns 0.
- **Rounding.** Signed quotients are truncated toward zero.

## ICAP wrapper timing

**APB.** Each APB transfer has one setup cycle followed by exactly four access cycles.
`pready` is high in the fourth access cycle, and `prdata` is valid then. Four cycles per
read or write is the wrapper's specified access time. `pready` is this implementation's
way of making APB wait for it. An AMBA 2.0 bridge without `pready` needs an equivalent
wait. The address must stay stable during the access phase, and assertions in
`apb_slave_if` check this.

**Local bus.** The slave interface sends a one-cycle request to the decoder.
The decoder acknowledges one cycle later, with read data from either the buffer or a
register.

**ICAP port.** The port is 32 bits wide, with active-low `icap_ce_n` and `icap_write_n`.
A word passes on a rising edge where `icap_ce_n` is low and `icap_busy` is low. While
`icap_busy` is high, the controller holds its request and its data, for as long as needed.

**Throughput.** One configure word takes at least three cycles: issue, buffer read, ICAP
write. A readback word takes issue, ICAP wait and buffer write. Moving the data over APB
costs about five cycles per word. In the end-to-end test, at the wrapper's own speed, a
28 KiB bitstream loads in about 66,000 cycles (1.3 ms at 50 MHz). The processor-driven
loop of the original system needed about 821,000 cycles (16.4 ms). The test's driver is not
that software, so the two numbers measure different things.

## Departures and choices

Where the description of the design gives the function but not the construction, this
RTL makes its own choices:

- the register map and the status bits;
- the local bus between the slave interface and the decoder, which stands in for the
  on-chip bus of the original ICAP core;
- the buffer size (512 words, one block RAM);
- the ICAP width and handshake;
- the sequencing inside the state machine and the controller;
- the order of the divider's 36 cycles;
- the overflow rules;
- the `unimpl` response;
- the single clock and synchronous reset (active high inside, `rst_n` active low at the
  top).

Each file's header says which of its parts are specified and which are chosen.

The partial-bitstream format that the testbench ICAP model accepts is a reduced Virtex-4
packet format (sync word, FAR, FDRI, FDRO, CMD/DESYNC). It serves only to exercise the
wrapper. The model decides which module is loaded from a signature in the first frame
word. Real bitstreams carry no such signature.

## Simulating

Every testbench is self-checking. It ends with a line `TB_RESULT checks=N failures=M` and
has a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pdr_pkg.sv tb/pdr_tb_pkg.sv tb/tb_pdr_top.sv --top-module tb_pdr_top
./obj_dir/Vtb_pdr_top
```

To run another testbench, replace `tb_pdr_top` with its name.

| testbench | what it shows |
|---|---|
| `tb_pdr_top` | end to end at default sizes. Checks that the blank region refuses both operations, a 26 KiB divider bitstream and divisions (including overflow and /0), a 28 KiB multiplier bitstream and multiplications, a one-frame readback, an IDCODE register read, and a blank bitstream. Counts APB waits, buffer reloads, ICAP stalls, readback and each swap, and fails if any never happened. Prints the cycles of each reconfiguration. |
| `tb_icap_wrapper` | wrapper and ICAP model with a 64-word buffer, many reloads, frame contents, frame and register readback |
| `tb_mul32`, `tb_div64` | corner and random operands against the simulator's own arithmetic; latency of 1 and 36 cycles |
| `tb_muldiv_rp` | all three region contents, refusals, and a swap during a division |
| `tb_apb_slave_if`, `tb_icap_decoder`, `tb_icap_fsm`, `tb_icap_addr_ctrl`, `tb_icap_ctrl`, `tb_dpram` | each block alone |

`tb/icap_model.sv` (the ICAP primitive and the configuration memory) and
`tb/pdr_tb_pkg.sv` (builds bitstreams, and gives the formula for every frame word) are
for simulation only.

## Changing it

- **Buffer size.** `pdr_top #(.BRAM_DEPTH(n))` or `icap_wrapper #(.DEPTH(n))`. The
  buffer window must stay below `REG_BASE` (0x800), so `n` is at most 512 unless the map
  in `pdr_pkg` is moved.
- **APB wait.** `ACCESS_CYCLES` sets the number of access cycles per APB transfer. It must
  be 3 or more.
- **Another reconfigurable module.** Add a value to `rm_id_t` and an instance in
  `muldiv_rp` with its own present/reset gating. Add a matching signature to the ICAP
  model.

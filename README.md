# JTAG test access port for debugging a RISC-V processor

This design adds IEEE 1149.1 (JTAG) test hardware to a processor so that its inner state can be
watched and its pins controlled from outside. The processor is wrapped in a boundary-scan chain.
A four-wire port (TCK, TMS, TDI, TDO, plus an optional TRST*) controls everything.

Besides the instructions the standard defines (BYPASS, IDCODE, SAMPLE, PRELOAD, EXTEST, INTEST),
the port has one extra *debug scan* instruction for each processor module of interest. Each one
takes a snapshot of all the registers of that module at once and shifts it out through TDO as a
single serial word. Using one instruction per module keeps each read-out short and easy to
decode. It also leaves the scan hardware of the other modules idle. The four observed modules are
called `tram_Addressable`, `tram_Bank`, `deb_ca` and `deb_b`.

The same test access port is used a second time, around a small 8 x 32-bit memory. This JTAG
test chip was the first vehicle used to check SAMPLE/PRELOAD, INTEST and BYPASS. It is included as
a complete, self-contained design.

The processor core itself is **not** part of this RTL. Its inputs, outputs and observed register
groups are ports of the top level. You connect your own core there.

## Block structure

```
              +------------------------------- jtag_tap ---------------------------------+
 pin_in_i --->| input cells ---> core_in_o      core_out_i ---> output cells |---> pin_out_o
              |   ^ (chain: TDI -> input cells -> output cells -> TDO)       |           |
              |   |                                                          v           |
  TDI ------->+---+--> bypass (1) --------------------------------------+                |
              |   +--> IDCODE (32) -------------------------------------+  data register |
              |   +--> debug capture 0..3 (tram_Addressable, tram_Bank, +-> multiplexer  |
              |   |        deb_ca, deb_b)  <--- cap_data_i[g]           |       |        |
              |   +--> instruction register --> decoder ---> selects    |       v        |
              |                    |                                    +-> IR/DR mux --> TDO
 TMS, TCK, -->| TAP controller (16 states) -> capture/shift/update strobes,               |
 TRST*        |                               dbg_capture_o[g] -> core                   |
              +--------------------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `jtag_pkg` | TAP states, strobes struct, opcodes, data-register selector |
| `jtag_tap_fsm` | TAP controller: the 16-state machine of the standard |
| `jtag_ir` | instruction register: shift stage and hold stage |
| `jtag_ir_decoder` | maps the instruction to the data register and the boundary-cell modes |
| `jtag_bypass_reg` | 1-bit bypass register |
| `jtag_idcode_reg` | 32-bit device identification register |
| `jtag_bsc` | one boundary-scan cell: a capture/shift flip-flop, an update flip-flop and a mode multiplexer |
| `jtag_bsr` | the boundary-scan chain around the core |
| `jtag_capture_reg` | debug capture register for one register group |
| `jtag_tdo_mux` | data-register mux, then IR/DR mux, retimed on falling TCK, with the TDO enable |
| `jtag_tap` | all of the above joined into one port around a core |
| `jtag_test_ram` | 8 x 32-bit memory with a write clock and an asynchronous read |
| `jtag_ram_chip` | the memory inside its own `jtag_tap` (40 input cells, 32 output cells) |
| `jtag_top` | the processor's port (core side as ports) and the memory test chip, side by side |

## Timing on TCK

This is the part that most often goes wrong when the port is connected to a tester or to a core.

* **Rising edge of TCK**:
  * The TAP controller samples TMS and moves to its next state.
  * In Capture-DR or Capture-IR the selected register loads its parallel value.
  * In Shift-DR or Shift-IR the selected register takes TDI and shifts towards TDO.
* **Falling edge of TCK**:
  * In Update-IR the new instruction is copied to the hold stage and takes effect.
  * In Update-DR the boundary cells copy their shift stages into their update stages.
  * TDO takes its new value on every falling edge.
  * A tester should therefore drive TMS/TDI while TCK is low and sample TDO on the rising edge.
* **TDO enable**: `tdo_oe_o` is high only while the controller is in Shift-IR or Shift-DR. At all
  other times a pad would float TDO. There are no tri-state buffers in the RTL.
* **Reset**: `trst_n_i` (active low) resets the port asynchronously. The TAP controller also
  reaches Test-Logic-Reset after five TCK cycles with TMS high.
  * Either reset selects IDCODE as the current instruction.
  * Either reset returns the boundary cells to normal, transparent operation.
  * The reset is edge-triggered in simulation, so pulse `trst_n_i` low rather than starting the
    simulation with it low.
* **Bit order**: every data register shifts its bit 0 out first. A scan word is therefore sent
  least significant bit first, and the bit that comes out in cycle *i* is bit *i* of the captured
  value.

## Instructions

The instruction register is 4 bits long. In Capture-IR it loads `0001`: the two low bits `01` are
required by the standard, which lets a tester check the length of the chain.

| Opcode | Instruction | Register between TDI and TDO | Effect |
|---|---|---|---|
| 0000 | EXTEST | boundary scan | output cells drive the output pins; input cells capture the pins |
| 0001 | SAMPLE | boundary scan | device works normally; captures pins and core outputs |
| 0010 | PRELOAD | boundary scan | the same register as SAMPLE: loads the update stages before EXTEST or INTEST |
| 0011 | INTEST | boundary scan | input cells drive the core; output cells capture the core outputs |
| 0100 | IDCODE | identification (32 bits) | the default after reset |
| 1000 | SCAN_TRAM_ADDR | debug capture 0 | snapshot of the `tram_Addressable` registers |
| 1001 | SCAN_TRAM_BANK | debug capture 1 | snapshot of the `tram_Bank` registers |
| 1010 | SCAN_DEB_CA | debug capture 2 | snapshot of the `deb_ca` registers |
| 1011 | SCAN_DEB_B | debug capture 3 | snapshot of the `deb_b` registers |
| 1111 | BYPASS | bypass (1 bit) | one cycle of delay through the device |
| others | BYPASS | bypass (1 bit) | as the standard requires for undefined codes |

The all-ones BYPASS code and the IDCODE default follow the standard. The other opcode values and
the 4-bit length are this design's own choices. If a debugger expects other codes, change them in
`jtag_pkg`.

## The boundary-scan chain

There is one cell between each device input pin and the core, and one between each core output and
its pin.

* **Serial path**: TDI feeds the input cells first, then the output cells, and the last output cell
  feeds TDO.
* **Numbering**: chain position 0 is the cell next to TDO.
  * Positions `0 .. N_OUT-1` are the output cells. Position *j* serves `core_out_i[j]`.
  * Positions `N_OUT .. N_OUT+N_IN-1` are the input cells. Position `N_OUT+k` serves `pin_in_i[k]`.
* **Scan word**: a scan word of `N_IN+N_OUT` bits, sent least significant bit first, therefore
  reads `{input cells, output cells}`.

Each cell is a capture/shift flip-flop followed by an update flip-flop.

* **Parallel output**: it is the update flip-flop when the instruction lets the register drive,
  and the parallel input otherwise.
  * INTEST sets the input cells to drive.
  * EXTEST sets the output cells to drive.
* **SAMPLE, PRELOAD, IDCODE, BYPASS and the debug scans**: the register is transparent, so the
  device keeps working.
* **Update stages**: they keep their value from one instruction to the next. PRELOAD followed by
  EXTEST or INTEST therefore applies the preloaded pattern the moment the new instruction takes
  effect.

### Scan word of the memory test chip

The chip has 72 cells. Bits 0..31 of the scan word are the output cells, `ram_dataOutput_o[0..31]`.
Bits 32..71 are the input cells, in this order:

| Scan-word bits | Pins |
|---|---|
| 32..63 | `ram_dataInput_i[31]` down to `ram_dataInput_i[0]` |
| 64..66 | `ram_writeAddress_i[2]` down to `ram_writeAddress_i[0]` |
| 67..69 | `ram_readAddress_i[2]` down to `ram_readAddress_i[0]` |
| 70 | `ram_writeEnable_i` |
| 71 | `ram_writeClock_i` |

So the input pins are listed most significant bit first, in the order they enter TDI. For example,
the test vector below applies data `F656ACAD`, write address 0, read address 2, write enable 0 and
write clock 1:

```
1111 0110 0101 0110 1010 1100 1010 1101  000  010  0  1
```

To apply it, shift 32 bits for the output cells and then these 40 bits.

The write clock also passes through a boundary cell. Under INTEST, a write takes two updates: one
with `ram_writeClock_i` low and one with it high. The test benches use three scans per write (clock
low, clock high, enable off).

The memory's read port has no clock. After a scan that sets the read address, the next Capture-DR
loads the word at that address into the output cells.

## Debug capture registers

Each capture register is `CAP_W` bits wide (default 128). Its contents come from
`cap_data_i[g]` / `cpu_dbg_i[g]`. How the registers of a module are concatenated into that vector is
up to you. Bit 0 of the vector is the first bit out on TDO.

The snapshot is taken on the rising TCK edge that ends Capture-DR. Changes to the inputs after that
edge do not reach the word being shifted. For that TCK cycle, `dbg_capture_o[g]` /
`cpu_dbg_capture_o[g]` is high, so the core can hold the group steady if it needs to.

The registers are read-only. Anything shifted in through TDI is discarded at the next capture.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `jtag_top` | `CPU_IN`, `CPU_OUT` | 32, 32 | processor pins under boundary scan (own choice) |
| `jtag_top` | `CAP_W` | 128 | width of each debug register group (own choice: four 32-bit registers) |
| `jtag_top` | `CPU_IDCODE`, `RAM_IDCODE` | `1000_1001`, `1000_2001` | identification codes (placeholders, bit 0 = 1) |
| `jtag_tap` | `N_IN`, `N_OUT`, `N_CAP`, `CAP_W`, `IDCODE` | 32, 32, 4, 128, `1000_0001` | sizes of one port; `N_CAP` may be 0..4 |
| `jtag_test_ram` | `DATA_W`, `ADDR_W` | 32, 3 | memory word width and address width |

## What is fixed and what is chosen

Taken from the design:
* the set of blocks and how they connect;
* the chain path from TDI through the input cells and then the output cells;
* one debug instruction per module, and the names of the four modules;
* the memory test chip's pins and their order on the chain.

Taken from IEEE 1149.1:
* the TAP state machine;
* the IR capture pattern;
* the bypass capture of 0;
* the IDCODE layout with bit 0 = 1;
* TDO on the falling edge;
* undefined opcodes acting as BYPASS.

This design's own choices, which you may want to change:
* the instruction length and the opcodes;
* the IDCODE values;
* the processor pin counts and the register group widths;
* the boundary cell type, which is the plain capture/update cell: no cell implements a separate
  control (output-enable) cell, and there are no CLAMP or HIGHZ instructions;
* the asynchronous read of the memory, and its output port.

Not included:
* the RISC-V core;
* the I/O pads;
* the USB-to-JTAG adapter and host software used to drive the port on an FPGA board. In the
  testbenches, the `jtag_drv_if` tester takes the adapter's place.

How far it is verified: every block has a self-checking testbench. Each module has also been
deliberately broken in one important way, and its testbench was shown to catch the fault. The end
to end test (`tb_jtag_top`, at the default sizes) runs every instruction on both ports. It also
passes through Pause-DR and uses both TRST* and TMS reset. The processor side has been tested only
with its core ports driven by the testbench, because there is no processor in this RTL.

## Simulating

All sources are in `rtl/` (design) and `tb/` (testbenches and the `jtag_drv_if` tester). With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_jtag_top \
    -y rtl -y tb +libext+.sv rtl/jtag_pkg.sv tb/tb_jtag_top.sv
./obj_dir/Vtb_jtag_top
```

Replace `tb_jtag_top` with any other testbench in `tb/`: `tb_jtag_tap_fsm`, `tb_jtag_ir`,
`tb_jtag_ir_decoder`, `tb_jtag_bypass_reg`, `tb_jtag_idcode_reg`, `tb_jtag_bsr`,
`tb_jtag_capture_reg`, `tb_jtag_tdo_mux`, `tb_jtag_tap`, `tb_jtag_test_ram` or
`tb_jtag_ram_chip`.

Each testbench prints `TB_RESULT checks=N failures=M` and stops. It has a watchdog that counts a
failure if the test hangs. The full-size top-level test takes well under a second.

`tb_jtag_ram_chip` repeats the chip's SAMPLE / PRELOAD / INTEST sequence with the test vector
above, and its BYPASS test, including the exact sequence of TAP states that a BYPASS load and one
data scan pass through. It also writes and reads all eight words through the scan chain alone.

To lint the design: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/jtag_pkg.sv rtl/jtag_top.sv`.
The remaining warnings are about strobe bits that a given register does not use.

# Intelligent sensor-network node: base controller glue logic

A distributed sensor network corrects the drift of its sensors with small
neural-network models. The models are trained on a central computer, and
each intelligent node between the sensors and that computer runs them.
Whenever the models change, the node must accept new software over the
network. The node is built around an 89C51 single-chip microcontroller. That
part has separate code and data address spaces, and it normally runs only
what is in its own flash ROM.

The board logic in this repository gets around that. A small **system loader**
stays in the MCU's internal ROM. It receives a routine from the network and
writes it, as data, into an external RAM **starting at address zero**. It
then touches a special address. A **trigger** flips the board to "external
program" mode: EA goes low and the MCU is restarted. The MCU now fetches the
routine from the same RAM as code, at the same addresses it was linked for.
The routine needs no relocation or patched interrupt vectors, and it can be
replaced at any time by switching back to the loader.

The RTL describes the board's digital glue around the MCU. The MCU, the
analog network line driver and the clock oscillator are outside it.

## Memory map

| MCU address   | Target                                              | Access          |
|---------------|-----------------------------------------------------|-----------------|
| 0000-3FFF     | RAM, loaded routine (code)                          | PSEN in routine mode; RD always; WR only in loader mode |
| 4000-7FFF     | RAM, data                                           | RD / WR always  |
| 8000-80FF     | expansion boards on the system bus (EWR / ERD)      | RD / WR         |
| C0D0, C0D1, C0E0, C0E1 | BIOP output registers 0..3                 | WR              |
| C0F0, C0F1    | BIOP input ports 0..1                               | RD              |
| C040          | switch to the routine in external RAM              | RD or WR        |
| C080          | switch to the loader in internal ROM               | RD or WR        |
| anything else | nothing; reads return FF                            |                 |

The code/data split is the parameter `CODE_TOP` (default `16'h4000`). The RAM
is a 32 KB 61256-type part. Addresses are fully decoded, so no target
appears at an alias. The exact six BIOP addresses, and which of them are
inputs, are this design's reading of a range given only as C0D0..C0F1.

## The program switch (the part to understand first)

Three blocks work together.

* **`mode_trigger` (Tr)** holds the mode: `MODE_INTERNAL` (loader, `EA` high)
  or `MODE_EXTERNAL` (routine, `EA` low). It acts on the leading edge of an
  RD or WR strobe while the decoder selects C040 or C080. The mode changes on
  the next clock, and `restart` pulses for one clock. A strobe held low counts
  once. Every access restarts the MCU, even one that does not change the
  mode, so C040 also means "start the routine again from zero".
* **`reset_ctrl` (Res)** turns `restart` into an MCU `RST` pulse of
  `RST_CYCLES` clocks (default 24, two 8051 machine cycles). It also makes
  the power-up reset: `board_rst_n` asserts at once and is released two clocks
  after `por_n` rises, and `mcu_rst` is held `RST_CYCLES` clocks longer. The
  restart does **not** reset the board logic. Otherwise the trigger would
  fall back to loader mode, and the BIOP outputs and pending interrupts would
  be lost.
* **`ram_ctrl` (CS)** decides which strobes reach the RAM in each mode:

  | strobe | loader mode              | routine mode                  |
  |--------|--------------------------|-------------------------------|
  | WR     | anywhere in 0000-7FFF    | only 4000-7FFF; code writes blocked (`ram_wr_blocked`) |
  | RD     | anywhere in 0000-7FFF    | anywhere in 0000-7FFF         |
  | PSEN   | not passed (ROM runs)    | anywhere in 0000-7FFF         |

  The routine therefore cannot overwrite itself. An assertion in `ram_ctrl`
  states that rule. The loader can read back what it wrote.

A complete reprogramming cycle, as `tb/tb_in_node.sv` runs it:

1. `por_n` rises. The MCU is released in loader mode after 26 clocks (2 for
   synchronisation plus 24).
2. The loader writes the routine with MOVX to 0000.. and any tables to 4000...
3. The loader writes C040. One clock later `mode` = external, `mcu_ea_n` = 0,
   and `mcu_rst` goes high for 24 clocks.
4. The MCU comes out of reset and fetches from 0000 with PSEN. The bytes come
   from the RAM.
5. Later the routine writes C080. The MCU restarts in the loader, which may
   overwrite the code range again.

## Bus interface and timing

The glue logic is synchronous. It samples the MCU pins on the rising edge of
`clk`, the board clock that also drives the MCU. P0 is split into the MCU's
drive (`mcu_p0_out`, `mcu_p0_oe`) and the node's return (`mcu_p0_in`). A
pull-up value FF is returned when nothing drives it. A bus cycle must look
like this:

```
clk      _/‾\_/‾\_/‾\_/‾\_
ALE      _/‾‾‾\___________      address on P0 (low) and P2 (high)
RD/WR/PSEN ‾‾‾‾‾\_______/‾      at least two clocks, P2 held
```

* `addr_latch` (AR) loads P0 on every clock edge while ALE is high, so
  A0..A7 are valid from the first edge after ALE rises.
* `sys_decoder` (DC) is combinational on `{P2, A0..A7}`.
* Reads are combinational from strobe to `mcu_p0_in`: RAM, BIOP input or
  expansion data, selected by the driver's enable.
* RAM writes happen on each clock edge while WR is low. Repeating the same
  byte is harmless.
* The trigger and the interrupt acknowledge react to edges, so they act once
  per strobe.

Real 89C51 timing (ALE and strobe widths in oscillator periods) is not
modelled. Any MCU model, or a bridge from a real MCU, that keeps the
cycle above works.

## Interrupts

The non-maskable request `sbi_nmi` goes straight to `mcu_int0_n`, the
highest-priority input of the MCU. The `N_IRQ` maskable requests (default 4)
go through `irq_ctrl` (IC):

* a rising edge on `sbi_irq[i]` sets pending bit `i`;
* `mcu_int1_n` is low while any bit is pending;
* `mcu_p1_src`, wired to P1 input pins, gives the lowest-numbered pending
  source;
* a rising edge on `mcu_p1_ack`, a P1 output pin, clears the source shown
  at that moment. If other requests remain, INT1 stays low and the
  level-triggered INT1 of the MCU re-enters its handler.

Edge capture, fixed priority and the acknowledge pin are this design's
choices. The board description gives only the INT1 line and the use of P1
for identifying the source.

## Peripheral ports and the system bus

* `biop_regs` (BIOP) has four write-only output registers (display segments,
  keyboard scan, printer data, a link to a measurement module) and two
  read-only input ports. The output registers are cleared at power-up.
* `sbi_bus` (SBI with the bus former CD) gates WR and RD into `sbi_ewr_n` and
  `sbi_erd_n` for the page 8000-80FF. It drives `sbi_dat_out` (with
  `sbi_dat_oe`) during EWR and returns `sbi_dat_in` to the MCU during ERD. The
  low address `sbi_a` comes from the address latch. The clock, timer and
  interrupt lines of the expansion connector go to the MCU directly, so they
  are not ports of this block.

## Files

| File | Block |
|------|-------|
| `rtl/in_node_pkg.sv` | address map constants, `prog_mode_e`, the decoder's `dec_sel_t` |
| `rtl/in_node.sv` | top: the whole base controller |
| `rtl/addr_latch.sv` | AR, low address register |
| `rtl/sys_decoder.sv` | DC, system decoder |
| `rtl/ram_ctrl.sv` | CS, RAM strobe gating and write protection |
| `rtl/sram_32k.sv` | 32K x 8 RAM (array; clocked write, asynchronous read) |
| `rtl/mode_trigger.sv` | Tr, program-mode trigger |
| `rtl/reset_ctrl.sv` | Res, board and MCU reset |
| `rtl/irq_ctrl.sv` | IC, interrupt circuit |
| `rtl/biop_regs.sv` | BIOP registers |
| `rtl/sbi_bus.sv` | SBI strobes and data buffer control |

Top-level parameters: `CODE_TOP` (16'h4000), `RST_CYCLES` (24) and `N_IRQ` (4).
The RAM size is fixed at 32 KB, the largest the board takes.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_sys_decoder` checks all 65536 addresses. `tb_ram_ctrl` checks all 64
  mode and strobe combinations.
* `tb_sram_32k` fills and checks every RAM byte. `tb_irq_ctrl` compares
  5000 random clocks with a reference model.
* `tb_reset_ctrl` measures the reset lengths in clocks. `tb_mode_trigger`
  checks the single-clock restart and the edge rule.
* `tb_in_node` runs at the default parameters and plays the MCU and an
  expansion board. It runs the full reprogramming cycle: it loads and
  fetches back all 16 KB of code, checks both reset lengths and tries
  blocked code writes. It also covers data accesses, expansion-board reads
  and writes, BIOP ports, an unmapped read, two queued INT1 requests and the
  NMI. It counts each of these and fails if one never happened.
* `tb_in_node_predict` uses the node the way the sensor-correction software
  does, with the two prediction models the node is meant to run:
  * a six-input linear neuron, checked on a quadratic-plus-sine drift curve
    sampled at step 0.4 on 40..80;
  * a 5-4-1 sigmoid perceptron, checked on a sum of two sines sampled at
    step 0.1.

  The loader stores the weights and samples in data RAM and starts the
  routine. The routine reads them back over the bus and computes one-step
  and multi-step predictions, writing the multi-step ones back into RAM as
  the next inputs. Every result is compared with the same computation on a
  private copy. In this testbench values are stored as 8-byte doubles.

To simulate one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_in_node rtl/in_node_pkg.sv tb/tb_in_node.sv
./obj_dir/Vtb_in_node
```

Replace `tb_in_node` with any other testbench name. All testbenches finish
in well under a second of simulation time.

## What is not here, and where this design departs

* **The MCU** is a bought-in 89C51. The testbenches perform its bus cycles
  with tasks and do not execute 8051 code.
* **The network interface** is an opto-isolated transistor line driver for
  RS-232C and a two-wire line up to 1.5 km. It is analog and sits between
  the MCU's on-chip UART and the line, so it has no signal in this logic.
  **The clock generator** is the `clk` input.
* **The neural-network prediction and training** are software. Training runs
  on the central computer; prediction runs on the node's MCU from the loaded
  routine. Only the storage and bus traffic of prediction are exercised
  here.
* **Choices not fixed by the board description:**
  * synchronous glue logic;
  * restarting the MCU on every program switch;
  * either strobe triggers a switch;
  * full address decoding and the BIOP address assignment;
  * the interrupt capture, priority and acknowledge scheme;
  * `RST_CYCLES`;
  * the clocked RAM write.

  RD into the code range is allowed in loader mode, so the loader can
  verify what it wrote. The board description lists RD among the strobes
  passed while the routine runs and does not forbid it during loading.
* `reset_ctrl` uses the usual reset synchroniser: a flop cleared
  asynchronously by `por_n` drives the asynchronous reset of the other
  flops. Lint tools report that net as used both ways, and that is
  intended.

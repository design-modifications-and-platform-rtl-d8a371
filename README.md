# Partially reconfigurable G.729 decoder: static logic and first two modules

A G.729 speech decoder turns each 10 ms frame of 80 received bits back into
speech by calling about 36 functions one after another. In a static FPGA
design each function is its own hardware block, and at any moment all but
one of them sit idle. This design puts those functions into a
**reconfigurable partition**. This is one region of the FPGA that the
configuration port rewrites at run time with the function needed next. Only
the parts every function shares stay fixed:

- the control state machine;
- the math units;
- the memories;
- the interface to the processor.

The hard part is the handshake between the decoder and the processor that
performs the reconfiguration. This SystemVerilog contains:

- the complete static side of that scheme;
- the bus peripheral that connects it to a processor;
- the first two reconfigurable modules of the decoder, `bits2prm_ld8k` and
  `CheckParityPitch`.

Together they take one frame from its serial bit words to checked decoder
parameters. Each frame reconfigures the partition twice.

## How the pieces fit

```
 processor bus (PLB IPIF user-logic signals)      configuration port
        |                                                |
 g729_decoder_periph  -- 32 registers, 64 KB memory --   | icap_rm_id
        |                                                |
 top_level -----------------------------------------------------------
 |  top_level_fsm                          |  top_level_datapath      |
 |   decoder_ctrl_fsm --+                  |   19 x basic_op_unit     |
 |                      port_abstraction <-+-> scratch_mem_ctrl       |
 |   rm_partition ------+    (one set of   |     scratch_memory       |
 |     bits2prm_ld8k (b1)     signals)     |   const_mem_ctrl         |
 |       bin2int                           |     constant_memory      |
 |     check_parity_pitch (b3)             |                          |
 ---------------------------------------------------------------------
```

`dpr_pkg` holds the types and constants every block shares:

- the 5-bit module id;
- the memory word and address types;
- the memory offsets;
- the generalized port structs;
- the operator enum;
- the G.729 basic-operator arithmetic.

## The reconfiguration handshake

Three 5-bit ids carry the whole protocol. Ids name reconfigurable modules
(RMs): 1 is `bits2prm_ld8k` (b1), 3 is `CheckParityPitch` (b3) and 0 is none.
Five bits can name up to 31 modules, enough for the full decoder's 24.

| signal | driven by | meaning |
|---|---|---|
| `rm_load` | control FSM | the RM the decoder will run next |
| `rm_ready` | processor (register 2) | the RM the processor has finished loading |
| `icap_rm_id` / `cfg_id` | configuration port | the RM the partition actually holds (0 while blank or being rewritten) |

The FSM raises `rm_load` as early as it can: at the first point where the
next module is certain. It then keeps doing static work while the processor
reconfigures, and waits for `rm_ready == rm_load` only right before it
starts the module. If the reconfiguration finished during the static work,
the wait costs one cycle. If not, the FSM stalls in its wait state until
`rm_ready` arrives. Either way, a module never runs before the processor
has said it is present.
An assertion in the FSM checks this rule in every simulation.

The processor program, which the end-to-end testbench models, runs one frame
like this:

1. Write the 80 serial words at scratch word 2944.
2. Write `continue` = 1 and `rm_ready` = 0.
3. Write start = 1, then start = 0.
4. Loop:
   - Read `rm_ready` and `rm_load`.
   - If they differ, reconfigure the partition with module `rm_load` and
     write `rm_ready` = `rm_load`.
   - Read `done`, and stop when it is 1.
5. Read the parameters at scratch word 624.

`done` is not a pulse. It is high whenever the FSM is idle and drops only
when a new frame starts, so a polling processor cannot miss it.

The `continue` input exists for testing. The FSM has a pause state before
each wait state, and it holds there while `continue` is low. With `continue`
high the pauses fall through.

## One frame, state by state

The control FSM (`decoder_ctrl_fsm`) state codes can be read in register 18:

| code | state | what happens |
|---|---|---|
| 0 | IDLE | `done` high; a rising edge on start begins a frame |
| 1 | LOAD_B1 | `rm_load` <= 1 |
| 2 | PAUSE_1 | held while `continue` is low |
| 3 | WAIT_B1 | stall until `rm_ready` == 1 |
| 4, 5 | RUN_B1, BUSY_B1 | start pulse to the partition; wait for its done |
| 6 | LOAD_B3 | `rm_load` <= 3, the cycle after b1 is done |
| 7, 8, 9 | ERASE_* | frame erasure scan, overlapping the reconfiguration |
| 10 | PAUSE_2 | held while `continue` is low |
| 11 | WAIT_B3 | stall until `rm_ready` == 3 |
| 12, 13 | RUN_B3, BUSY_B3 | start pulse; wait for done |
| 14 | FINISH | back to IDLE |

The static work between the two modules is the frame erasure check:

- The scan reads the 80 serial words.
- It writes 1 to `parm[0]` if any word is all zeros, as a lost frame is
  marked.
- It takes 160 cycles.
- It is the window in which the partition is rewritten.

The FSM owns the scratch memory port in every state except RUN and BUSY,
where the module in the partition owns it.

## The generalized port set

The FPGA flow requires every module of a partition to have the same port
list. The partition port list is the **subset** of the modules' needs: for
each port width, the largest count any module needs. Counts include `clk`
and `rst_n`.

| | 1-bit | 12-bit | 16-bit | 32-bit |
|---|---|---|---|---|
| b1 inputs | 5 | 0 | 2 | 2 |
| b3 inputs | 5 | 0 | 2 | 1 |
| b1 outputs | 4 | 3 | 4 | 1 |
| b3 outputs | 4 | 2 | 4 | 1 |

These ports become the structs `rm_in_t` and `rm_out_t`. With `clk` and
`rst_n` as separate ports, each generic port has this role:

- **`in_1`:** start, unit A done, unit B done.
- **`in_16`:** unit A result, unit B result.
- **`in_32`:** scratch read data, constant read data.
- **`out_1`:** done, scratch write enable, unit A start, unit B start.
- **`out_12`:** scratch read address, scratch write address, constant address.
- **`out_16`:** unit A operands 1 and 2, unit B operands 1 and 2.
- **`out_32`:** scratch write data.

`port_abstraction` translates these ports back to named signals:

- Ports with the same meaning for every module are plain wires.
- Ports whose meaning depends on the module go through a multiplexer steered
  by `rm_ready`. Unit A is the `shl` unit for b1 and the `shr` unit for b3;
  unit B is the `add` unit for both.
- While `rm_ready` names no known module, no unit can be started and the
  partition's done is ignored.
- The other 17 math units get idle requests.

The datapath has no multiplexer bank choosing among execution modules.
Whatever is in the partition is the only source of requests.

## The partition in simulation

On the FPGA the partition is a black box. In `rm_partition` both modules are
instantiated side by side:

- Each drives its own output bundle.
- `cfg_id` selects the bundle that reaches the static logic.
- A module that is not configured is held in reset, so when it is loaded
  again it starts in its initial state, like a freshly configured module.
- While `cfg_id` names no module, all outputs are 0.

This lets a simulation show a bad handshake, for example starting a module
before it is loaded. Such a start does nothing, and the frame hangs or gives
wrong parameters.

## The two modules

**`bits2prm_ld8k` (b1).** This module unpacks the 80 serial bit words of a
frame into the 11 G.729 parameters:

- A serial word is 0x0081 for a 1 bit and 0x007F for a 0 bit.
- Field widths, most significant bit first, are 8, 10, 8, 1, 13, 4, 7, 5,
  13, 4 and 7.
- The parameters are written to `parm[1..11]`.

Each field is built by `bin2int`, which computes value = 2·value + bit with
the shared `shl` and `add` units. b1 takes 354 cycles plus one per 1 bit in
the frame.

**`check_parity_pitch` (b3).** This module checks the parity bit that
protects the first pitch index:

- It reads `parm[3]` (the index) and `parm[4]` (the parity bit).
- It sums 1, bits 7..2 of the index and the parity bit, using the `shr` and
  `add` units.
- It writes bit 0 of the sum back to `parm[4]`: 1 means a parity error.

b3 takes 33 cycles.

Both algorithms are the standard G.729 routines. The state machines and
their timing are this design's own.

## Shared datapath

`basic_op_unit` is one G.729 basic operator with a start/done handshake. The
result and overflow flag are registered, and done follows start by one
cycle. There are 19 instances:

- add, L_add, sub, L_sub;
- mult, L_mult;
- shl, L_shl, shr, L_shr;
- norm_l, norm_s;
- L_abs, L_negate;
- L_mac, L_msu;
- mpy_32_16, Mpy_32;
- div_s.

They follow the usual saturating 16/32-bit definitions. `div_s` with invalid
operands returns 0 and sets overflow.

Operands travel in one request struct, `math_req_t`:

| operator | operands taken |
|---|---|
| 16-bit operators | `c`, `d` |
| L_add, L_sub | `a`, `b` |
| L_shl, L_shr | `a` (value), `d` (shift count) |
| L_mac, L_msu | `a` (accumulator), `c`, `d` |
| mpy_32_16 | `c` (hi), `d` (lo), `b[15:0]` (n) |
| Mpy_32 | `c`, `d`, `b[31:16]`, `b[15:0]` |

The memories:

- **Scratch memory:** 4096 × 32 bits, separate read and write ports,
  registered read, read-before-write.
- **Constant memory:** 4096 × 32 bits, single port.

Each memory has a controller. The decoder owns the memory while it is busy.
A host access waits until the decoder is idle, and is acknowledged one cycle
after it is granted. The two built modules read no constants. The constant
memory is there for the other decoder functions and can be loaded and read
by the host.

Scratch memory layout (word offsets):

- serial bits at 2944..3023;
- `parm[0..11]` at 624..635;
- the remaining decoder state (`aq_t`, `synth_buf`, `old_exc` and others) at
  their usual offsets, up to word 4080.

## Bus peripheral (`g729_decoder_periph`, the top)

The bus side is the user-logic signal set of a PLB IPIF: per-register
chip enables `Bus2IP_RdCE`/`WrCE`, a memory chip select `Bus2IP_CS` and byte
enables. There are 32 registers:

| reg | name | access |
|---|---|---|
| 0 | start | RW bit 0 |
| 1 | done | R |
| 2 | rm_ready | RW bits 4:0 |
| 3 | rm_load | R |
| 4 | continue | RW bit 0 |
| 5 | CheckParityPitch done | R, sticky |
| 6, 7 | D_lsp, int_qlpc done | R, 0 in this build |
| 8 | bits2prm_ld8k done | R, sticky |
| 9..17 | done flags of later functions | R, 0 in this build |
| 18 | FSM state | R |
| 19 | port abstraction select | R |
| 20 | last word the decoder wrote | R |
| 21..31 | reserved | read 0 |

Register accesses are acknowledged in the cycle they are presented.

The 64 KB memory space maps byte address bits 14:2 to a word address. Bit 14
selects the constant memory. Memory accesses are acknowledged when the
controller grants them, so an access made during a frame waits until `done`.
`icap_rm_id` is a port: it comes from the configuration controller, which is
outside this design.

## Timing

All figures below are at a 100 MHz clock.

- **Decoder logic for one frame:** about 600 cycles, or 6 µs, when no
  reconfiguration stalls it. That is b1 (354 cycles plus one per 1 bit),
  the 160-cycle erasure scan, b3 (33 cycles) and about 10 cycles of control
  states. With the processor model's register polling and short
  reconfigurations, a frame from start write to done reads takes about
  900 cycles.
- **Frame with measured reconfigurations:** with each reconfiguration taking
  10,113,000 cycles (101.13 ms), one frame takes 20,226,704 cycles, or
  202.3 ms. Nearly all of that is the two reconfigurations. The decoder
  cannot hide that time, because the erasure scan it overlaps with is only
  160 cycles long.
- **Real time:** a 10 ms frame period is met by the logic but not by
  reconfiguration at that speed.

## What is not here

- **The other decoder functions.** These are D_lsp through post_process, and
  the copy, Log2 and Pow2 utilities. Their algorithms are G.729 reference
  code that would have to be written as state machines; only their names and
  port counts are known here. The control FSM therefore stops after b3, and
  the done flags of those functions read 0.
- **Constant tables.** The G.729 constant tables are not preloaded.
- **Processor-side parts.** The processor, bus, HWICAP configuration
  controller, timer and external memory are platform parts. The testbenches
  model what the decoder sees of them:
  - register and memory accesses;
  - a delay for each reconfiguration;
  - the `icap_rm_id` value.

## Own choices to be aware of

- **Start edge:** a frame starts on the rising edge of `start`, so leaving
  it high does not restart.
- **Erasure scan:** the scan stands in for the control work between b1 and
  b3, whose details are not given.
- **`mux_sel`:** `mux_sel` (register 19) follows `rm_ready`, the module the
  processor says is present.
- **Sticky done flags:** they are set by the partition's done and cleared by
  the next start.
- **Unit assignment:** which units a module uses (A = shl/shr, B = add) and
  the index assignment of the generic ports are this design's own.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- draws random stimulus from `$urandom`;
- compares against `tb/g729_ref_pkg.sv`, a reference written separately
  from the RTL (clamped wide-integer arithmetic and direct bit slicing of
  the frame).

`tb_g729_decoder_periph` is the end-to-end test. It drives the top exactly
as the processor program does, with the default configuration:

- It decodes 13 frames and checks every parameter and status register.
- The last frame uses the measured 101.13 ms reconfiguration time.
- It counts these mechanisms, and fails if any never happens:
  - a stall in a wait state;
  - a reconfiguration hidden behind the erasure scan;
  - a held pause;
  - a held host access;
  - an erasure;
  - a parity error;
  - `done` held in idle;
  - a masked byte-enable write;
  - the constant memory path.

It simulates about 203 ms of time, roughly 25 s of wall time.

`tb_workload_500_frames` runs the 500-frame timing run through the same bus
interface. It shortens reconfigurations to 20 to 400 cycles so that the run
takes about a second. Every parameter of every frame is checked, so frames
cannot disturb one another. The frame time outside reconfiguration is
444 to 596 cycles, with a mean of 485. This is less than the decoder's busy
time, because the erasure scan is hidden behind the second reconfiguration.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dpr_pkg.sv tb/g729_ref_pkg.sv tb/tb_g729_decoder_periph.sv \
    --top-module tb_g729_decoder_periph -o sim
./obj_dir/sim
```

Replace the testbench name to run another. `tb_basic_op_unit` sets the `OP`
parameter to step through all 19 operators.

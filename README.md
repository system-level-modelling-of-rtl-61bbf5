# A run-time reconfigurable DSP unit: one filter slot, two filters

This design filters a stream of samples with one of two filters, a 4-tap FIR
filter or a third-order recursive (IIR) filter, but it never holds both. The
filter sits in a *reconfiguration region* of an FPGA, and switching filters
means rewriting that region's configuration frames while the rest of the
system keeps running.

The idea behind it is partial evaluation of a multiplexer. Written as plain
logic, the unit is "both filters, and a MUX on `sel`" (`dsp_mux`). If `sel`
changes rarely, the MUX can be evaluated ahead of time for each value of
`sel`. Each result is a circuit holding just one filter, and that circuit is
loaded into the region whenever `sel` changes. `sel` is therefore called the
*partial evaluation parameter*: 0 selects the IIR filter, 1 selects the FIR
filter. It is a 4-bit unsigned number, and the other values select nothing.

The RTL covers the whole loop: a register for `sel`, an interrupt that fires
when it changes, a controller that copies the right partial bitstream from
memory into the region, and a model of the region itself. It also holds a
small unrelated example, a full adder built from two half adders.

## What happens when `sel` changes

```
sel ──> par_eval_reg ──> intr_gen ──irq/ack──> reconfig_ctrl
              │                                  │        │
              └──────────── pe_value ────────────┘   reads │
                                       bitstream_store ◄───┘
                                                 │ 32-bit configuration words
datain ──> [bus macro] ── reconfig_region (RR1) ── [bus macro] ──> dataout
```

1. The static logic writes a new value into the partial evaluation register
   (`sel_we` high for one cycle).
2. `intr_gen` sees that the register differs from the value it last saw and
   raises `irq`. `irq` is a level and stays high until acknowledged.
3. `reconfig_ctrl` has two phases. In the wait phase it waits for `irq` and
   acknowledges it. In the reconfiguration phase it reads the register,
   streams that candidate's partial bitstream out of `bitstream_store` at one
   32-bit word per cycle, and then returns to the wait phase.
4. When the region sees the bitstream's header word, it stops working,
   because its old logic is being overwritten. For the next 1968 words it
   accepts no samples, and `out_valid` stays low even when `in_valid` is
   high. After the last word it behaves as the new filter, starting from an
   empty delay line.

Timing at the default size: `reconfig_done` pulses 1974 cycles (`BS_WORDS`
+ 5) after the cycle in which `sel` was written. The region drops samples for
1969 of those cycles. Before and after that window the data path is
combinational: `dataout` belongs to the sample on `datain` in the same cycle.

Corner cases, which are this design's choices:

- **A change while a load is running** is not lost. `irq` rises again, and
  the controller serves it as soon as it is back in the wait phase. It reads
  the register at that point, so several changes merge into one load of the
  latest value.
- **Writing the value the register already holds** causes no interrupt and
  no load.
- **A value with no candidate** (2 to 15) is acknowledged and ignored.
  `reconfig_skipped` pulses and the region keeps its current filter.
- **After reset** the region holds the FIR filter and the register holds 1,
  so reset does not start a load.

## Partial bitstreams and the region model

This is the part of the design to read most carefully. An FPGA region's
function is whatever configuration data was last written into it, and that
cannot be synthesized as ordinary logic. `reconfig_region` is therefore a
**behavioural model**:

- **Geometry.** The region is 3 CLB columns of 16 configuration frames each,
  at 1312 bits per frame: 62976 bits in all. With a 32-bit configuration port
  that is 41 words per frame and 1968 words per partial bitstream. The
  32-bit width matches the 32-bit mode of the Virtex-4 configuration port.
- **Format.** Each bitstream in the store is one header word
  `{CFG_TAG, id}` (`CFG_TAG` = `28'hC0F16A5` in bits 31:4, the candidate
  number in bits 3:0), followed by the 1968 frame words. The header is this
  design's stand-in for real frame contents: the model takes the candidate
  number from the header and ignores what the frames contain. It does fold
  the frames into `cfg_signature` (rotate left by one, then xor), so a test
  can prove that every word arrived, in order.
- **Behaviour.** Inside, the model instantiates `dsp_mux` with its select
  tied to the configured candidate. That is exactly the multiplexer partially
  evaluated for one value of `sel`. The filter history is cleared while the
  region is being written, as a freshly configured device's flip-flops are.
  A configuration word outside a bitstream that lacks the header tag sets the
  sticky `cfg_err`.
- **Bus macros** are the fixed connection points between the region and the
  static logic. In RTL they are just the region's data ports (`in_valid`,
  `datain`, `out_valid`, `dataout`).

So the model gets the *timing and sequencing* of a reconfiguration right:
which samples are lost, when the new filter starts, and that it starts clean.
It does not model what real configuration frames do. To use real partial
bitstreams, replace `reconfig_region` with the device's configuration access
port and a region holding the actual filter. The controller already writes
one 32-bit word per cycle in address order.

The bitstreams themselves are not part of the RTL. Before use they are
loaded through the store's write port (`bs_we`, `bs_waddr`, `bs_wdata`).
Candidate `c` starts at word `c * 1969`. The store is a plain array with a
synchronous read (3938 × 32 bits), so synthesis can map it to block RAM.

## The two candidate filters

Both are Mealy machines. The output is combinational in the input and the
registers, and the registers update on the clock edge that accepts a sample
(`in_valid` high).

**FIR filter** (`fir_filter`), coefficients d0..d3, delay line reg0..reg2:

    y = d0·x + d1·reg0 + d2·reg1 + d3·reg2        then reg0 ← x, reg1 ← reg0, reg2 ← reg1

**IIR filter** (`iir_filter`), coefficients d0..d2, delay line of past outputs:

    y = x + d0·reg0 + d1·reg1 + d2·reg2           then reg0 ← y, reg1 ← reg0, reg2 ← reg1

Choices made here, not fixed by the filters' definitions:

- Samples and coefficients are 16-bit two's complement (`rtr_pkg::DATA_W`).
- Products and sums are computed exactly and then truncated to 16 bits, so
  the arithmetic wraps like fixed-width signed integers. There is no
  fixed-point scaling.
- The coefficient values are placeholders (FIR `{1, 2, 3, 4}`, IIR
  `{1, -1, 1}`). Set them with the `COEF` parameter. With integer
  coefficients, most IIR settings grow without bound, and wrapping keeps
  them bounded.
- There are two descriptions of the FIR filter: the block diagram, and the
  functional expression of its sum. They differ on how x enters the sum. This
  design follows the block diagram: x is weighted by d0. In the functional
  expression, x is added unweighted as the starting value of the sum, which
  equals the block diagram with d0 = 1. The IIR filter's two descriptions
  agree.

## Departures from the reconfigurable system as first built

- In the original system the reconfiguration state machine is software on an
  embedded PowerPC running Linux. That software reads the bitstreams from
  files and writes them through the vendor's configuration-port driver. Here
  the state machine is hardware (`reconfig_ctrl`), and the store is an
  on-chip memory, so the unit works without a processor.
- The original connects the processor, registers and region over a system
  bus. Here the blocks are wired point to point, and the bus signals that
  would reach the processor (`irq`, `pe_value`, the status outputs) are top
  ports.
- Only one region is built. A second region and the rest of the static
  platform (processor, Ethernet MAC, DDR, UART and LCD controllers, other
  application logic) are not part of this RTL.
- The handshakes, the sample strobe, the reset behaviour and the one word per
  cycle configuration rate are this design's own choices. The original flow
  did not yet model reconfiguration timing.

## Files

| file | what it is |
|---|---|
| `rtl/rtr_pkg.sv` | shared types (`sample_t`, `sel_t`, `cfg_word_t`), candidate numbers, region geometry, header format |
| `rtl/rtr_system.sv` | top: the reconfigurable DSP unit, plus the full adder beside it |
| `rtl/par_eval_reg.sv` | partial evaluation register (write strobe, reset value = FIR) |
| `rtl/intr_gen.sv` | change detector that raises and holds `irq` until `ack` |
| `rtl/reconfig_ctrl.sv` | reconfiguration state machine: WAIT, READ_REG, LOAD, DRAIN, DONE |
| `rtl/bitstream_store.sv` | partial bitstream memory, one write port and one synchronous read port |
| `rtl/reconfig_region.sv` | behavioural model of the reconfiguration region with its bus macros |
| `rtl/dsp_mux.sv` | both filters and the MUX on `sel` (the unit before partial evaluation) |
| `rtl/fir_filter.sv`, `rtl/iir_filter.sv` | the two candidate filters |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | stand-alone example: full adder from two half adders, carry-out = xor of the two carries |
| `tb/tb_*.sv` | one self-checking testbench per module |

The controller and the top carry SystemVerilog assertions:

- a configuration word appears only during a load;
- `ack` is given only in the wait phase;
- after a load, the region holds the candidate the controller loaded;
- the region is never busy while the controller is idle.

## Simulating

Every testbench checks its block against a reference model written
independently inside the testbench. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_rtr_system \
    rtl/rtr_pkg.sv rtl/*.sv tb/tb_rtr_system.sv -o sim -Mdir obj
./obj/sim
```

Replace `tb_rtr_system` with any other `tb_<module>`. Verilator warns about
unused package constants and about lint style; no warning is an error.

`tb_rtr_system` runs the top at its default, full size: two 1969-word
bitstreams and 12000 sample cycles, finishing in well under a second. A
cycle-level reference of the whole unit predicts `irq`, `reconfig_busy`,
`reconfig_done`, `out_valid` and `dataout` in every cycle. The test:

- compares the region's signature with the stored frames after each load;
- checks the 1974-cycle latency from the write of `sel` to done;
- exercises loads of both filters, dropped samples, a rewrite with an
  unchanged value, a change during a load, a value with no candidate, and
  all full-adder inputs. It fails if any of these never happened.

## Changing it

- **Filter coefficients:** the `COEF` parameter of `fir_filter` and
  `iir_filter`. Coefficients enter the testbenches' reference models
  explicitly, so update those too.
- **Sample width:** `DATA_W` in `rtr_pkg`.
- **Region size:** `RR_COLUMNS`, `FRAMES_PER_COLUMN` and `FRAME_BITS` in
  `rtr_pkg`. `PBS_WORDS` and `BS_WORDS` follow from them. The top's `BS_LEN`
  parameter sets the store layout and the region's word count together.
- **More candidates:** raise `NUM_CANDIDATES`, add the filter to `dsp_mux`'s
  case statement, and store one more bitstream.

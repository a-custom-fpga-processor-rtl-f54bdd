# DEPE — a differential equation processing element

Physical models of lungs, hearts or chemical reactions are systems of ordinary
differential equations (ODEs) that are stepped forward in time by an explicit
solver such as Euler or Runge-Kutta. Every time step runs the same
straight-line arithmetic: evaluate the derivatives from the current state,
then update the state. DEPE is a very small programmable processor built
around that observation. It has **no instruction set and no branches**. Its
program memory holds raw datapath control words, one executed per clock, and
the program is exactly one solver time step, repeated forever.

The result is a soft processor of a few hundred FPGA LUTs, one multiplier and
a couple of block RAMs. It is meant to run a small model (up to about 100 ODEs)
on its own, or to be one tile in a network of many such elements.

## The datapath

```
             d1   d2   d3     (external inputs, or neighbouring elements)
      d0      |    |    |
   +-->------[ input mux ]<------- Input_sel
   |               |
   |          [ Data RAM ]<------- We, Addr_w, Addr_r (A and B)
   |           |        |               ^
   |          [   ALU    ]<------- Op_sel      control word
   |               |                    |
   +---------------+--> dout       [ Inst RAM ]<-- [ PC ]
```

* **Data RAM** (512 × 32 by default) is the register file. It holds constants
  (step size, reciprocals of model parameters, zero), state variables and
  temporaries. It has two read ports and one write port.
* **ALU**: add, subtract, and a fixed-point multiply `(a*b) >>> FRAC_W`. There
  is no divider. Division by a model constant is a multiply by its stored
  reciprocal.
* **Input mux** picks what is written to the Data RAM. `d0` is the ALU result,
  and `d1..d3` are the three external inputs.
* **PC / Inst RAM** (2048 × 32 by default) fetch one control word per clock.
  After `prog_last` the PC wraps to 0.

## Control words

There are two kinds of word:

| kind    | meaning                          | fields used                        |
|---------|----------------------------------|------------------------------------|
| compute | `dram[w] = dram[a] op dram[b]`   | `we=1, input_sel=0, op_sel, w, a, b` |
| store   | `dram[w] = d<input_sel>`         | `we=1, input_sel=1..3, w`          |
| no-op   | nothing                          | `we=0`                             |

Bit layout (`depe_pkg::cw_t`):

```
 31   30:29      28:27    26:18    17:9     8:0
 we   input_sel  op_sel   addr_w   addr_a   addr_b
```

`op_sel`: 0 add, 1 sub, 2 fixed-point multiply, 3 reserved (adds).
`input_sel`: 0 ALU result, 1 `d1`, 2 `d2`, 3 `d3`.

Three 9-bit addresses and 5 control bits fill exactly 32 bits. This is why
the Data RAM is at most 512 words. A smaller `DRAM_DEPTH` uses the low
address bits.

### Example: one Euler step of an RC lung

The model is `dV/dt = Pmouth − V/Com`. The data layout is `ram[0]=V`,
`ram[1]=1/Com`, `ram[2]=Pmouth`, `ram[3]` a temporary and `ram[4]=dt`:

```
store   d2            -> ram[2]     Pmouth sampled from input 2
compute ram[0]*ram[1] -> ram[3]     V/Com
compute ram[2]-ram[3] -> ram[3]     dV/dt
compute ram[3]*ram[4] -> ram[3]     dV/dt * dt
compute ram[0]+ram[3] -> ram[0]     V += ...
```

With `prog_last = 4` the element does one Euler step every 5 clocks.
`depe_pkg` has helper functions `cw_compute`, `cw_store` and `cw_nop` to
build such words.

## Pipeline and the bypass

A word passes through three stages:

| stage | clock n          | clock n+1                                | clock n+2                                    |
|-------|------------------|------------------------------------------|----------------------------------------------|
|       | F: PC → Inst RAM | R: word's `addr_a/addr_b` → Data RAM (registered) | X: ALU, input mux, Data RAM write at the clock edge |

A word is fetched on every clock, so consecutive words overlap. Word *k+1*
reads the Data RAM in the same clock in which word *k* writes it. The RAM is
read-first, so word *k+1* would see the old value. Compiled ODE code does
this all the time: each line of the example above uses the previous line's
result.

The core handles it with a **registered bypass**. When the write address of
the word in X equals a read address of the word in R, the written value is
captured. In the next clock it replaces that RAM output at the ALU input.
Both operand ports have their own compare, so `x*x` of the previous result
also works. Words two or more apart read the updated RAM directly. The
pipeline therefore never stalls, and a program of L words takes exactly
L clocks per time step. This also holds across the wrap from the last word
back to the first.

Timing seen from outside:

* The Data RAM write of the last word of a step and the rise of
  `step_done` happen on the same clock edge. After `run` rises, the first
  `step_done` arrives L+2 clocks later, and after that one arrives every
  L clocks.
* `dout` takes the result of each compute word on the clock edge that
  writes it into the Data RAM, and `dout_valid` is high for the following
  clock.
* Store words sample `d1..d3` in their X stage. Inputs that change during a
  run are therefore picked up at a fixed point within each time step.

## Using it

1. Hold `run` low. Load control words with `imem_we/imem_addr/imem_wdata`.
   Preset constants and initial values with `dram_we/dram_addr/dram_wdata`.
   The assertions in `depe` flag a host write while words are executing.
2. Set `prog_last` to the index of the last word. Pulse `restart` to put
   the PC at 0.
3. Raise `run`. The element steps the model until `run` falls. Words already
   fetched still complete, and `busy` stays high until they have.
4. With `run` low and `busy` low, read any Data RAM word through
   `dram_raddr`. The data appears on `dram_rdata` one clock later. This
   read shares Data RAM port A, which the datapath does not use while it is
   idle.

Numbers are signed Q15.16 by default (`W=32`, `FRAC_W=16`). Add, subtract and
multiply wrap on overflow. The product keeps bits `[FRAC_W+W-1:FRAC_W]` of
the full product, which means it rounds toward minus infinity.

## Parameters (top `depe`)

| parameter    | default | notes |
|--------------|---------|-------|
| `DRAM_DEPTH` | 512 | 64 and 128 suit distributed (LUT) RAM, 512 a block RAM; at most 512 |
| `IMEM_DEPTH` | 2048 | enough for an RK4 step of a ~50-ODE model |
| `W`          | 32 | data width |
| `FRAC_W`     | 16 | fraction bits of the fixed-point format |

## Where this design follows its source, and where it chooses

These parts follow the published design:

* the no-instruction-set principle, and the two kinds of word;
* the blocks PC, instruction RAM, Data RAM as register file, ALU with
  adder/subtractor and multiplier, the input mux over `d0..d3`, and one
  output;
* one word per clock, no branches, and the 32-bit word with its 512-word
  Data RAM limit.

These are choices made here, because the source does not specify them:

* the three-stage split and the bypass (the source says only that the
  element is pipelined);
* the field order and encodings;
* the data format;
* the instruction RAM depth;
* the host load and read ports, `run`/`restart`/`step_done`/`busy`;
* the reset style.

Two points need care:

* The original reports one DSP block per element. That suggests a data word
  narrower than 32 bits (for example 18 bits). Set `W`/`FRAC_W` to match a
  target.
* The original builds a 64- or 128-word Data RAM from LUTs, presumably
  with asynchronous reads. The RTL here always reads synchronously, so one
  pipeline works for every size.

Not included:

* the model compiler, which turns equations into control words (the
  testbenches contain small hand-written equivalents);
* optional ALU extensions such as a divider, mentioned only as possible
  additions;
* a different number of external inputs or outputs. The source says these
  numbers can be adjusted per model. Here there are three inputs and one
  output, because a wider `input_sel` would not fit the 32-bit word;
* networks of several elements, which are future work in the source. The
  ports `d1..d3` and `dout` are where neighbours would connect.

## Files

| file | content |
|------|---------|
| `rtl/depe_pkg.sv` | control-word struct, encodings, data format, word builders |
| `rtl/depe.sv` | top: pipeline, bypass, host ports, assertions |
| `rtl/depe_pc.sv` | program counter with wrap |
| `rtl/depe_inst_ram.sv` | instruction RAM, synchronous read, load port |
| `rtl/depe_data_ram.sv` | 2-read/1-write Data RAM, synchronous read-first |
| `rtl/depe_alu.sv` | add / sub / fixed-point multiply |
| `rtl/depe_input_mux.sv` | write-data select `d0..d3` |
| `tb/tb_depe.sv` | end-to-end test at default parameters (RC lung, Euler and RK2) |
| `tb/tb_depe_weibel.sv` | RK4 on 2- and 4-generation lung trees (6 and 30 ODEs) |
| `tb/tb_depe_dram_sizes.sv` | Euler RC lung on 64- and 128-word Data RAMs |
| `tb/tb_depe_*.sv` | one self-checking test per block |

## Verification

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`. Each one also has a watchdog.

* **`tb_depe`** loads the Euler program above, an extended version, and a
  second-order Runge-Kutta (Ralston) program. It checks all 512 Data RAM
  words after each run against a sequential interpreter of the control
  words. This catches any pipeline or bypass error. It also compares the
  integrated volume with the closed-form solution
  `V(t) = P·Com + (V0 − P·Com)·e^(−t/Com)`: Euler agrees within 0.002 and
  RK2 within 0.0001. It checks the step rate (L+2 clocks to the first
  `step_done`, then L per step) and counts each mechanism: bypass on each
  port, store from each input, each ALU operation, no-op, wrap, program
  reload and host access. A mechanism that never occurred counts as a
  failure.
* **`tb_depe_weibel`** compiles RK4 for a binary airway tree with flow and
  volume per branch. The branch equations, a lumped R/I/C ladder, are
  defined in the testbench itself. It runs 256 steps and checks the
  fixed-point result bit-exactly against the interpreter, and within 0.002
  against real-number RK4. It reports:

  | tree | control words per step | Data RAM words | one simulated second at h = 0.1 ms, 175 MHz |
  |------|------------------------|----------------|---------------------------------------------|
  | 2 generations (6 ODEs)  | 167 | 36  | about 9.5 ms |
  | 4 generations (30 ODEs) | 839 | 144 | about 48 ms  |

  The published figures for models of these sizes are 11 ms and 66 ms.
* **`tb_depe_dram_sizes`** runs the Euler program on elements with
  64-word and 128-word Data RAMs, with the variables at the top of each
  address range. It checks the result bit-exactly and against the closed
  form, and checks the 5-clock step period.

To run a test with plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/depe_pkg.sv rtl/depe*.sv \
          tb/tb_depe.sv --top-module tb_depe
./obj_dir/Vtb_depe
```

To run a block test, replace the testbench and top (for example
`tb/tb_depe_alu.sv --top-module tb_depe_alu`). All tests finish in seconds.

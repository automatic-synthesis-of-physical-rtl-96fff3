# A network of tiny programmable processors for solving ODE models in real time

Physical models — airways of a lung, a grid of wave nodes, a cube of heart
cells — are systems of thousands of ordinary differential equations (ODEs)
in which each equation talks only to a few neighbours. This RTL solves such a
system with many small processing elements (PEs), each holding a handful of
the equations, wired point to point in the shape of the model itself. Every
PE runs a short fixed program once per solver step. All PEs share one clock
and have programs of equal length, so they stay in lock-step. The wires and
the programs alone decide when data moves between PEs; there is no
handshake, no bus and no shared memory.

The design has two levels:

* `pe` — a general PE: a microcoded processor with a data RAM as register
  file, an input multiplexer, an integer ALU with a multiplier and shifter,
  two pipeline registers (Data reg, Out reg) and two forward paths.
* `pe_network` — any number of PEs whose input ports are wired to each
  other's outputs by a connection table, plus a small step controller and
  ports to load programs and read results.

Numbers are 32-bit fixed point; the scale of each variable is picked
offline, and a multiply is followed by an arithmetic right shift.

## One solver step

A step of an explicit solver (Euler, or four stages of Runge-Kutta 4) has
three phases on every PE:

1. **evaluate** — compute the derivatives of the PE's state variables from
   the values it holds,
2. **update** — `x <- x + dt * dx/dt` for each of its state variables,
3. **transfer** — send each new value to the PEs whose equations use it.

PEs finish evaluate/update at different times. Programs are padded with
IDLE words so that all have the same length, `step_len`. The transfer phase
then runs on a schedule fixed when the programs were written. A PE places a
value on its output. In the right cycle, each receiving PE executes a STORE
from the input port wired to that output. The program counter wraps after
`step_len` words and the next step begins.

## The PE

```
            din[1..N_IN]   d0 (own Out reg)
                 \            /
   PC -> Inst RAM -> control word
                 \
          input MUX ---------------------> Data RAM (write: STORE)
                                             | read A, read B
                         Out reg --FWD2--> MUX (RAM / FWD2 / zero)
                                             |
                                          Data reg
                                             |
                         Out reg --FWD1--> MUX (Data reg / FWD1)
                                             |
                                            ALU
                                             |
                                          Out reg ---> dout
```

There is no instruction decoder. Each instruction RAM word is a control word
whose fields drive the multiplexers, RAM addresses and ALU directly
(`pe_pkg.sv` gives the layout):

| field  | bits            | use |
|--------|-----------------|-----|
| kind   | 2               | `K_IDLE`, `K_STORE`, `K_COMPUTE` |
| op     | 3               | `OP_ADD`, `OP_SUB`, `OP_MUL`, `OP_SHL`, `OP_SHR`, `OP_PASS` |
| isel   | clog2(N_IN+1)   | STORE source: 0 = own Out reg, p = input port p |
| src_a, src_b | 2 each    | operand source: `SRC_RAM`, `SRC_FWD1`, `SRC_FWD2`, `SRC_ZERO` |
| shamt  | 5               | shift of MUL (`(a*b) >>> shamt`, full 64-bit product), SHL, SHR |
| addr_a | clog2(DATA_DEPTH) | read address A, or STORE write address |
| addr_b | clog2(DATA_DEPTH) | read address B |

For the default PE (3 ports, 64-word data RAM) a control word is 28 bits.

**STORE** writes one word into the data RAM: either the PE's own Out reg
(write-back of a result) or an input port (data from another PE or from
outside). **COMPUTE** reads two operands and puts the ALU result into the
Out reg; it never writes the RAM. **IDLE** does nothing.

### Timing rules for program writers

This is the part a program writer needs to know exactly. Number the words of
a program by the cycle in which they are issued, meaning read from the
instruction RAM and applied to the datapath.

* A COMPUTE issued in cycle *n* reads the data RAM in cycle *n* and
  executes in *n+1*. Its result is in the Out reg from cycle *n+2* on.
* The Out reg changes only when a COMPUTE executes. Over IDLE and STORE
  words it holds its value, so several PEs can pick it up over several
  cycles.
* `SRC_FWD1` (forward path 1) gives the result of the COMPUTE issued in
  cycle *n-1*.
* `SRC_FWD2` (forward path 2) gives the Out reg as it is in cycle *n*: the
  result of the COMPUTE issued in *n-2*, or an older result if *n-1* was not
  a COMPUTE.
* A STORE issued in cycle *n* writes at the end of cycle *n*. A COMPUTE
  issued in *n+1* reads the new word. `STORE isel=0` in cycle *n* saves the
  Out reg as it is in cycle *n*.
* Two PEs swap values in three cycles: both COMPUTE (`x + 0` with
  `SRC_ZERO`) in cycle 1, IDLE in cycle 2, and in cycle 3 each STOREs from
  the port wired to the other.

Because of the forward paths, temporary results of an expression rarely
need a trip through the data RAM. The update `F + ((Ppar - P) - R*F) * kL`
is four COMPUTE words in a row, with no STORE between them:

```
MUL  RAM[R],   RAM[F]   >>>16     ; R*F
SUB  RAM[Ppar], RAM[P]            ; Ppar - P
SUB  FWD1,     FWD2               ; (Ppar - P) - R*F
MUL  FWD1,     RAM[kL]  >>>16     ; dF
```

The sequencing is static. No hardware checks a program, so reading a
forwarded value in the wrong cycle simply gives a wrong number.

### PE versions

`N_IN` (input ports), `DATA_DEPTH`, `INST_DEPTH` and `ALU_OPS` are
parameters. The intended versions are 1, 3, 7 or 15 ports (with d0 this
fills the select field), data RAMs of 32, 64, 128 or 1024 words, and
instruction RAMs of 1 to 4 block RAMs (1024 to 4096 words). The default is
the 3-port, 64-word version with one block RAM of instructions and all six
ALU operations.

`ALU_OPS` has one bit per operation (`pe_pkg::OPS_ALL` sets all six). An
operation left out returns zero, and its logic disappears in synthesis: for
example, the multiplier of a PE whose programs never multiply.

The data RAM has two builds, picked by depth. Up to 128 words it has
asynchronous reads, which map to LUT RAM. Above 128 words (the 1024-word
version) the reads are registered, as a block RAM needs. The RAM's output
register then plays the part of the Data reg. The forward path 2 / zero
choice moves behind it and uses a copy of the Out reg taken in S1. A
program sees exactly the same timing in both builds. The only visible
difference is the monitor read (`dbg_data`), which arrives one clock edge
after `dbg_addr` in the block RAM build. Each read port (two operands, one
monitor) gets its own copy of the array, so a synthesis tool uses three
block RAMs for it.

## The network

`pe_network` instantiates `N_PE` PEs. Input port *p* (1..N_IN) of
PE *i* is driven by `CONN[i][p-1]`:

* a value below `N_PE` selects that PE's Out reg,
* `N_PE + k` selects external input `ext_in[k]`,
* `pe_pkg::CONN_NONE` ties the port to 0 (a STORE from it writes 0).

`CONN` is how a particular model's partition becomes wires. Its default is a
binary tree, the shape of a lung airway model with one branch per PE. PE 0
is the trachea, PE *i* has children 2*i*+1 and 2*i*+2, port 1 is the parent
(for the root, the driving pressure `ext_in[0]`), and ports 2 and 3 are the
left and right child. With the default `N_PE = 7` this is a
three-generation tree.

PEs need not all be the same version. `PE_N_IN`, `PE_DATA_DEPTH`,
`PE_INST_DEPTH` and `PE_ALU_OPS` are arrays with one entry per PE. A
mapping can use them to give a busy PE more memory, a hub more ports, or a
PE without multiplies a smaller ALU. They default to the network-wide
`N_IN`, `DATA_DEPTH` and `INST_DEPTH` and to all operations. When they are
used, those network-wide sizes must be the largest entries, because they size `CONN`
and the shared load and monitor ports. An assertion checks at `start` that
`step_len` fits every PE's instruction RAM.

### Running

1. With `busy` low, load every PE: `ld_pe` selects the PE;
   `ld_inst_we/addr/data` write control words and `ld_data_we/addr/data`
   write data words (constants, initial state, initial copies of neighbour
   values).
2. Set `step_len` (same for all PEs), `n_steps` and `ext_in`, then pulse
   `start`.
3. `busy` rises. The PEs fetch for exactly `n_steps * step_len` cycles, then
   the last two words drain. `done` pulses one cycle later, and
   `steps_done == n_steps`. From the edge that samples `start` to the edge
   that sets `done` there are `n_steps * step_len + 2` further edges.
4. Read results through `dbg_pe` / `dbg_addr` -> `dbg_data`
   (combinational; one edge later with the 1024-word data RAM), or watch
   `pe_out`.

The data RAMs keep their contents between runs. A new run continues from the
last state, for example after `ext_in` is changed to make a square-wave
input. Loading while a PE runs is not allowed; the PE has an assertion for
it.

### Speed and size, for orientation

One solver step takes `step_len` cycles, the length of the slowest PE's
program. The design was aimed at FPGAs of the Virtex-6 class, at about
165–195 MHz. There, networks of 200 to 400 PEs solved lung, wave and
heart-cell models of 3,000 to 6,400 ODEs with 270 to 1,600 cycles per step.
These are properties of the architecture, not measurements of this RTL,
which has only been simulated. Such networks need `N_PE`, `INST_DEPTH` and a
`CONN` produced by a partitioning tool. That tool, which assigns ODEs to PEs
(simulated annealing over a cost of bottleneck-PE cycles times connection
count) and writes the programs, is software and is not part of this
repository.

## Departures and choices

These points are this design's own, or differ from the architecture it
follows:

* **Loading.** The original fixes RAM contents (programs, constants,
  initial values) at synthesis time, and each PE has its own build. Here
  they are loaded at run time through `ld_*` ports, and a monitor read port
  (`dbg_*`) was added.
* **Control word.** The encoding, the IDLE kind, the zero operand source and
  the MUL-with-shift operation are choices made here. The original PE has
  store and compute words but its encoding is not reproduced.
* **Step control.** The `start`/`n_steps`/`done` controller and the shared
  `step_len` register are additions. The original keeps PEs in step only by
  the global clock and by programs of equal length, and so does this design
  while running.
* **Shared load buses.** With mixed PE versions, all PEs share one set of
  load and monitor ports sized for the largest version, and smaller PEs use
  the low bits. A loader must pack each PE's control words for that PE's
  own field widths.
* **Reset.** Control and pipeline registers reset asynchronously (active
  low `rst_n`). RAMs are not reset.
* **Block RAM data RAM.** The original reports two block RAMs in total
  for the 1024-word, one-instruction-block version. This build gives each
  data RAM read port its own copy: three for data plus one for
  instructions. Placing the forward path 2 / zero choice after the RAM is
  also this design's choice.
* **Instruction RAM depth.** 1024 words per block RAM assumes 32 Kb at a
  word of up to 32 bits.

## Files

| file | contents |
|------|----------|
| `rtl/pe_pkg.sv` | kinds, ALU ops, operand sources, field-width functions, `CONN_NONE` |
| `rtl/pe_alu.sv` | combinational ALU: add, sub, multiply-shift, shifts, pass |
| `rtl/pe_input_mux.sv` | STORE source select: d0 or port 1..N_IN |
| `rtl/pe_data_ram.sv` | data RAM, 2 operand reads + 1 monitor read, 1 write; LUT or block RAM build |
| `rtl/pe_inst_ram.sv` | instruction RAM with registered read |
| `rtl/pe_pc.sv` | program counter wrapping at `step_len` |
| `rtl/pe.sv` | the pipelined PE |
| `rtl/pe_network.sv` | network, wiring table, step controller (top) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus workloads |

## Verification

Every testbench checks its outputs against values computed independently
inside the testbench. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_pe_data_ram` tests both builds of the data RAM (64 words
  asynchronous, 1024 words registered) against a shadow array.
* `tb_pe_input_mux` tests the input mux with 3, 15 and 5 ports, the last
  one for the out-of-range select codes.
* `tb_pe_alu`, `tb_pe_inst_ram` and `tb_pe_pc` test the units with
  directed and random stimulus against reference models. `tb_pe_alu` also
  checks an ALU built without multiply and left shift.
* `tb_pe` runs a 16-word program on one PE. It checks the Out reg value in
  every cycle (the *n+2* rule), both forward paths, the zero source, STOREs
  from d0 and from each port, and the PC wrap over two steps.
* `tb_pe_network` runs the default network with no parameter changes. The
  model is a three-generation airway tree, one branch (volume and flow ODEs)
  per PE, solved by the Euler method. The driving pressure is a square wave
  over five runs and 120 steps. After every run, every state word of every
  PE is compared with an integer reference model of the same equations. The
  test also checks the cycle count of each run, and it counts every
  mechanism: forward paths, zero source, each kind of STORE, IDLE words,
  step wraps and continued runs.
* `tb_wave_grid` runs the grid (wave) model: an 8x8 grid on a 4x4 network
  of 7-port, 32-word PEs, four ODEs per PE, with a grid `CONN`. It checks
  all 64 node values after 1, 11 and 51 steps.
* `tb_chain_rk4` runs a linear chain (the shape of the segmented airway
  lung model): eight diffusion cells on eight default PEs with a chain
  `CONN`, solved by the classical Runge-Kutta 4 method. The program is 47
  words per step, and each of the four stages ends with an exchange of the
  stage value with both neighbours. Every state and neighbour word is checked
  after 1, 6 and 36 steps. A second copy of the network mixes PE versions:
  3, 7 and 15 ports; 32, 64, 128 and 1024 data words, the last in the
  block RAM build; 1024 and 2048 instruction words. It runs the same
  program, packed for each PE's field widths. It must match the first
  copy's outputs in every cycle, and the reference values at the end.
* `tb_atrial_cube` runs a three-dimensional cube (the shape of the atrial
  cell model): 3x3x3 cells on 27 PEs of the 7-port, 32-word version, each
  cell wired to its six neighbours, with a pacemaker input on port 7 of
  one corner. Each cell follows a simple excitable-membrane equation plus
  diffusion to its neighbours, solved by the Euler method in 26 words per
  step. Every potential and every received word is checked after 4, 24 and
  44 steps. The excitation must reach the opposite corner. The program
  only adds, subtracts and multiplies, so these PEs are built with that
  reduced ALU.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  -y rtl +libext+.sv -Irtl rtl/pe_pkg.sv tb/tb_pe_network.sv \
  --top-module tb_pe_network -o sim
./obj_dir/sim
```

Not verified: timing closure or resource use on an FPGA, networks larger
than 27 PEs, and programs of several thousand words.

# Carry-save flexible DSP accelerator and a 32-bit pipelined RISC processor

DSP kernels are mostly chains of additions and multiplications: `A·(X+Y)+K`, multiply-accumulate,
butterflies. If every intermediate result is converted to ordinary binary, each conversion pays a
full carry-propagation delay. This design keeps intermediate values in **carry-save (CS)** form,
as a pair of words `{c, s}` whose sum is the value. A multiplier normally needs a binary operand
and would force a conversion, so here the multiplier recodes a CS operand **straight into
Modified Booth digits**. An add–multiply–add chain therefore runs without any carry-propagate adder.
Only the final result passes through one ripple-carry converter (CStoBin).

The accelerator is built from four such **Flexible Computational Units (FCUs)**, a scratch register
bank, a multiplexer network, a CStoBin unit, a small data store and a control unit. The control
unit applies one control word per clock cycle.

Next to it, and independent of it, sits a **32-bit load/store RISC processor**. It has a
five-stage pipeline (IF, ID, EX, MEM, WB), an ALU, a barrel shifter/rotator, a radix-4 Booth
multiplier, an accumulator, a 16-entry register file, 16 instructions and one shared memory for
program and data. The top level `dsp_risc_top` instantiates the two side by side. They share
only the clock; each has its own reset and its own host ports.

All arithmetic is integer arithmetic modulo 2^32.

---

## 1. Carry-save values

`accel_pkg::cs_t` is `{c, s}` (32 bits each); its value is `c + s mod 2^32`. A binary value is a
CS pair with `c = 0`. Any pair whose sum is right is a valid representation, so two equal values
can have different bit patterns. Testbenches therefore always compare `c + s`, never the words.

Negating a CS value needs both words complemented and **+2**:
`-(c+s) = (~c + 1) + (~s + 1)`. Every subtraction in the design is done this way. The two +1s go
into carry positions that are free anyway: the LSB of a shifted carry row, or bit 1 of a
correction word. No adder is added for them.

## 2. The FCU (`fcu.sv`) — the heart of the design

One FCU evaluates, combinationally and entirely in CS form,

```
Eq. (1)   W* = A · (X* ± Y*) ± K*
Eq. (2)   W* = A · K* ± (X* ± Y*)
```

`X*`, `Y*`, `K*` and `W*` are carry-save. `A` is a binary (two's complement) word.

```
 Y* ──MUX0(cl0: Y* or ~Y*)──┐
 X* ────────────────────────┴─ 4:2 CS adder (cin = cl0) ── N* = X* ± Y*
                                   │
        K* ──┬── MUX1 (cl1: N* | K*) ── P* ──► CS-to-MB recoding ─► PP generation ─┐
             └── MUX2 (cl2: K* | N*) ── MUX3 (cl3: as is | 1's compl.) ──────────────┤
 A ──(unit_mul: A | 1)──────────────────────────────────► PP generation            │
                                             CS adder tree (PPs + addend + corr) ──┴─► W*
```

Configuration word (`fcu_cfg_t`):

| bit        | 0                             | 1                                 |
|------------|-------------------------------|-----------------------------------|
| `cl0`      | N* = X* + Y*                  | N* = X* − Y*                      |
| `cl1`      | multiply N* (Eq. 1)           | multiply K* (Eq. 2)               |
| `cl2`      | add K* (Eq. 1)                | add N* (Eq. 2)                    |
| `cl3`      | add the MUX2 output           | subtract it                       |
| `zero_add` | —                             | addend forced to 0                |
| `unit_mul` | —                             | A forced to 1 (no multiplication) |

The template library maps onto it as follows:

| template | operation              | setting                      |
|----------|------------------------|------------------------------|
| T1       | A·(X*±Y*) ± K*         | cl1=0 cl2=0                  |
| T2       | A·K* ± (X*±Y*)         | cl1=1 cl2=1                  |
| T3       | (X*±Y*) ± K*           | cl1=0 cl2=0 unit_mul=1       |
| T4       | A·(X*±Y*)              | cl1=0 zero_add=1             |
| T5       | A·K*                   | cl1=1 zero_add=1             |

`cl0..cl3` and the four multiplexers follow the original FCU structure. `zero_add` and
`unit_mul` are this design's own additions. Templates T3–T5 need some way to skip the multiply
or the addend, and the original description gives no control for it.

### CS-to-Modified-Booth recoding (`cs_to_mb.sv`)

This is the least obvious part of the design. Its goal is to produce radix-4 Booth digits
`e_j ∈ {−2..2}` with `Σ e_j·4^j = c + s`, without a carry that travels across the word. Each
2-bit slice j gives `u_j = C_j + S_j ∈ [0,6]`. Two transfer levels follow, and each passes at most
one unit into the next slice:

```
level 1:  u_j = 4·a_j + v_j,   v_j ∈ [−2,1], a_j ∈ {0,1,2}    →  w_j = v_j + a_(j−1) ∈ [−2,3]
level 2:  w_j = 4·b_j + d_j,   d_j ∈ [−2,1], b_j ∈ {0,1}      →  e_j = d_j + b_(j−1) ∈ [−2,2]
```

The delay is therefore a few gate levels, whatever the width. Transfers out of the top slice
have weight 2^32 and are dropped. Each digit is encoded as `{neg, one, two}`. The original design
uses a recoding technique that it cites but does not describe, so this two-level scheme is this
design's own.

### Partial products and the adder tree (`cs_multiplier.sv`, `cs_adder_tree.sv`)

Each digit selects 0, ±A or ±2A, shifted by 2j. A negative partial product is the 1's complement,
and its +1 goes into a correction word at bit 2j. Bit 1 of the same word carries the +2 of a
subtracted addend. One Wallace-style CS tree of 3:2 rows then sums 19 words: 16 partial products,
the addend's two words and the correction word. The FCU output is the tree's `{carry, sum}`.

## 3. The accelerator (`flex_accel.sv`)

```
           ┌──────────── control unit (one ctrl_word_t per cycle) ──────────────┐
 data port ── LD ──► register bank (16 × CS) ──► interconnect muxes ──► FCU0 → FCU1 → FCU2 → FCU3
   ▲                     ▲  ▲                           │                    │
   └──── ST ◄── CStoBin ◄┴──┴───────────── FCU outputs ◄┘────────────────────┘
```

* **Register bank** (`accel_register_bank`): 16 CS registers, all read in parallel. It has six
  write ports: one per FCU, one for CStoBin (written with `c = 0`) and one for loads. When two
  ports write the same register, the higher port wins: load > CStoBin > FCU3 > … > FCU0. Reset
  clears every register, and register 0 is a handy constant zero if kernels never write it.
* **Interconnect** (`accel_src_mux`, one per operand): source indices 0–15 are the registers and
  16–19 are the outputs of FCU0–FCU3. FCU *i* may only take FCUs 0…*i*−1, so chaining runs
  downward inside one cycle. An FCU source that is not allowed, or any index from 20 up, reads as
  zero. The operand `A` is the sum word of a register. A kernel must take A only from registers
  that hold binary values, i.e. ones written by a load or by CStoBin. CStoBin may read any
  register or any FCU output.
* **CStoBin** (`cs_to_bin`): an explicit ripple-carry adder, the only carry-propagate adder in
  the accelerator. Its result can be written back to the register bank and/or stored through the
  data port in the same cycle.
* **Data port** (`accel_data_port`): 256 words of local storage. Each cycle it allows one
  combinational load and one store. The host can read and write it while the accelerator is idle.
* **Control unit** (`accel_control_unit`): a 1024-entry control store, written by the host. The
  original flow generates a kernel-specific FSM instead. A programmable store lets one datapath run
  any kernel.

### Control word and timing

`ctrl_word_t` holds everything for one cycle:

* per FCU: `cfg`, the `x`/`y`/`k` sources, the `a` register, and a write enable with its
  destination;
* for CStoBin: `cb_src`, a write-back enable with destination, and `st_en`/`st_addr`;
* for loads: `ld_en`, `ld_addr`, `ld_wd`;
* `last`, which marks the final step.

The host sequence is:

1. While `busy` is low, write steps 0…N−1 through `prog_*` and the input data through `host_*`.
2. Pulse `start`. The next cycle step 0 is applied, and one step is applied per cycle after that;
   `busy` is high for exactly N cycles.
3. All register-bank writes and stores of a step happen at the clock edge that ends its cycle.
   The operands of a step are the register contents from before that edge.
4. `done` pulses for one cycle after the last step. The results can then be read through `host_*`.

### Example kernel: FIR16

`tb/accel_tb_pkg.sv` (`fir16_kernel`) maps `y[n] = Σ_{k<16} h[k]·x[n+k]` as follows. Each of the
four rounds of one output loads four (h, x) pairs into r1…r8, which takes eight cycles. One cycle
then runs four chained T2 operations, `W* = A·K* + X* + 0`. FCU0 adds the running sum held in CS
form in r9, and each later FCU takes the previous FCU's output as X*. In the last round, CStoBin
converts FCU3's output in the same cycle and the data port stores it. The kernel takes 36 cycles
per output, and that count is set by the single load port.

## 4. The RISC processor (`risc_processor.sv`)

### Instruction set (`risc_pkg.sv`)

`[31:28] opcode | [27:24] rd | [23:20] rs1 | [19:16] rs2 | [15:0] imm (signed)`

| op | mnemonic | effect                    | op | mnemonic | effect                        |
|----|----------|---------------------------|----|----------|-------------------------------|
| 0  | ADD      | rd = rs1 + rs2            | 8  | INC      | rd = rs1 + 1                  |
| 1  | SUB      | rd = rs1 − rs2            | 9  | DEC      | rd = rs1 − 1                  |
| 2  | MUL      | rd = low32(rs1 × rs2)     | A  | SHL      | rd = rs1 << rs2[4:0]          |
| 3  | AND      | rd = rs1 & rs2            | B  | SHR      | rd = rs1 >> rs2[4:0] (logical)|
| 4  | OR       | rd = rs1 \| rs2           | C  | ROL      | rotate left by rs2[4:0]       |
| 5  | XOR      | rd = rs1 ^ rs2            | D  | ROR      | rotate right by rs2[4:0]      |
| 6  | NOT      | rd = ~rs1                 | E  | LD       | rd = mem[rs1 + imm]           |
| 7  | NAND     | rd = ~(rs1 & rs2)         | F  | ST       | mem[rs1 + imm] = rs2          |

r0 always reads as zero, so the all-zero word (`ADD r0,r0,r0`) is a NOP. There are no branches:
a program runs straight through memory from address 0. The original description fixes the count
of 16 instructions and their kinds (arithmetic, increment/decrement, basic logic gates, shift,
rotate, multiply, load/store). The opcode list and the encoding are this design's own.

### Pipeline and hazards

* **IF** reads the shared memory at PC. The memory has a single address bus and a single data
  bus.
* **ID** holds the word in the instruction register, decodes it (`risc_control_unit`) and reads
  two registers. The register file is write-through, so a value being written back in the same
  cycle is seen.
* **EX** runs the ALU, the barrel shifter or the Booth multiplier. The accumulator
  (`risc_accumulator`) takes the chosen result and acts as the EX/MEM result register.
* **MEM** performs the load or store at the accumulator address.
* **WB** writes the register file.

The processor handles three hazards:

| mechanism          | when                                                 | effect                        |
|--------------------|------------------------------------------------------|-------------------------------|
| forwarding         | EX needs a register that an older instruction in MEM (ALU result) or WB is writing | operand taken from the accumulator or from the write-back value |
| load-use stall     | the instruction in ID reads the register that the load in EX fetches | PC and instruction register hold for 1 cycle; a bubble enters EX |
| memory-port stall  | a load or store is in MEM                            | no fetch in that cycle; PC holds; a bubble enters ID |

Without these hazards one instruction retires per cycle: N instructions take N + 4 cycles.
The host loads the program through `host_*` while `run` is low, because the pipeline is frozen
then. It then pulses reset and raises `run`. `retired` pulses once per completed instruction.

## 5. Where this RTL departs from the original description

* **Precision of the FCU multiplier.** In the original, the recoded P* is 33 bits and only the
  32 most significant bits of the 33-bit W* are kept, with a truncation-error compensation method
  that is cited but not described. Here every value is an integer modulo 2^32 and the product keeps
  its low bits. Kernels on fractional fixed-point data must scale explicitly.
* **Operand width.** 32 bits, which is the width this version of the design targets. The earlier
  design it extends used 16 bits.
* **FCU controls** `zero_add` and `unit_mul` (templates T3–T5) are additions.
* **Control unit**: a programmable control store replaces the per-kernel FSM that the mapping flow
  generates. There is a host programming interface.
* **Interconnect**: the complete network is built, with every register and every allowed FCU
  output at every multiplexer. The original shares and prunes it per kernel.
* **Memory bandwidth**: one load and one store per cycle. The published kernel latencies assume as
  much memory bandwidth as the schedule wants, so cycle counts here are higher for load-bound
  kernels. FIR16 takes 36 cycles per output here against 6, and JPEGDCT takes 768 against 131.
* **Sizes not given by the original**: 16 registers, 256-word data store, 1024-step control store,
  16 processor registers, 1024-word processor memory, the instruction encoding, the hazard logic,
  and all handshakes and resets.
* **One instruction per cycle** holds here only for instructions that do not touch memory. The
  original asks for both one shared memory with a single address and data bus and single-cycle
  execution. Those two cannot both hold, so a load or store here costs one fetch cycle, and a load
  followed at once by a use of its result costs one more.
* **Not hardware, not built**: the DFG mapping flow (CS-aware transformation, template clustering,
  list scheduling, binding). No connection between the processor and the accelerator is defined,
  so none is made.

## 6. Which kernels fit

The reference kernels are: a 16-tap FIR filter, 1-D and 2-D DCTs (UDCT, JPEGDCT), a 2-D inverse
DCT (MPEG_IDCT), and elliptic and Volterra filters. The sizes below are this design's own
mappings. With one load per cycle, a kernel's length is mostly set by its loads.

| kernel     | data words | registers | control steps          | fits at default sizes  |
|------------|------------|-----------|------------------------|------------------------|
| FIR16      | 32         | 9         | 36 per output          | yes (simulated)        |
| UDCT       | 48         | 13        | 48                     | yes (simulated)        |
| JPEGDCT    | 224        | 13        | 768                    | yes (simulated)        |
| MPEG_IDCT  | 224        | 15        | 896                    | yes (simulated)        |
| ELLIPTIC, VOLTERRA | —  | —         | dataflow graphs not available | unknown         |

**The DCT mapping** (`tb/tb_dct_kernels.sv`) is the clearest use of template T1. An 8-point pass
loads its eight inputs once. Each output k then needs the four coefficients
`C[k][n] = round(256·cos((2n+1)kπ/16))`, n = 0…3, loaded into r9…r12, and one cycle of four
chained T1 operations `W_i* = C[k][i]·(x[i] ± x[7−i]) + W_(i−1)*`. These use the symmetry
`C[k][7−n] = (−1)^k·C[k][n]`, with `−` for odd k. CStoBin converts and stores the result in the
same cycle. JPEGDCT is eight row passes into a transposition area, then eight column passes,
all in one run of 768 steps.

**MPEG_IDCT** has its symmetry on the output side instead: `x[n] = E + O` and `x[7−n] = E − O`,
where E is the even-k half of `Σ_k C[k][n]·X[k]` and O is the odd-k half. For each n < 4 the
kernel loads four even coefficients and forms E with four chained T2 operations into a register.
It does the same for O, then converts `E + O` and `E − O` (two T3 operations) through CStoBin.
That is 12 steps per output pair and 56 per pass, so 16 passes take 896 steps.

## 7. Files

Accelerator (`rtl/`):

* `accel_pkg.sv`: sizes, `cs_t`, `fcu_cfg_t`, `ctrl_word_t`.
* `csa42.sv`, `cs_to_mb.sv`, `cs_adder_tree.sv`, `cs_multiplier.sv`, `fcu.sv`: the FCU and its
  parts.
* `cs_to_bin.sv`, `accel_register_bank.sv`, `accel_src_mux.sv`, `accel_data_port.sv`,
  `accel_control_unit.sv`, `flex_accel.sv`: the rest of the accelerator.

Processor (`rtl/`):

* `risc_pkg.sv`: sizes, opcodes, instruction and decode types.
* `risc_alu.sv`, `barrel_shifter.sv`, `booth_multiplier.sv`, `risc_register_file.sv`,
  `risc_accumulator.sv`, `risc_control_unit.sv`, `risc_memory.sv`, `risc_processor.sv`.

Top: `dsp_risc_top.sv`.

Testbenches (`tb/`) follow the naming `tb_<module>.sv`. Shared helpers are in `tb/accel_tb_pkg.sv`
(value-level accelerator model, random control words, the FIR16 kernel) and `tb/risc_tb_pkg.sv`
(encoder, random programs, instruction-level model).

## 8. Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/accel_pkg.sv rtl/risc_pkg.sv tb/accel_tb_pkg.sv tb/risc_tb_pkg.sv \
  tb/tb_dsp_risc_top.sv --top-module tb_dsp_risc_top -Mdir obj -o sim
./obj/sim
```

Replace the top module name to run any other testbench; the packages can stay on the command line.

* `tb_dsp_risc_top` runs both designs at their default sizes at the same time, in about 10 s. It
  fails if any mechanism never occurred: templates T1–T5, subtraction, FCU chaining, CStoBin
  write-back, loads, stores, write collisions, both forwarding paths, load-use stalls and
  memory-port stalls.
* `tb_flex_accel` compares random kernels and four FIR16 outputs with the accelerator model, word
  by word, and checks one cycle per step.
* `tb_dct_kernels` runs UDCT, JPEGDCT and MPEG_IDCT and compares each output with the integer matrix
  product and with the real-valued transform, within the bound that coefficient rounding allows.
* `tb_risc_processor` compares random programs with the instruction-level model and checks the
  one-instruction-per-cycle throughput.

The unit testbenches compare each block against the arithmetic written directly in SystemVerilog.
Each of them has been shown to fail on a deliberately broken copy of its block.

Changing sizes: edit the parameters at the top of `accel_pkg.sv` or `risc_pkg.sv`. The structs
follow the sizes automatically. `SRC_W` grows with `NUM_REGS + NUM_FCU`.

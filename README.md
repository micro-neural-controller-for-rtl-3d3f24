# Micro neural-controller for optical character recognition

A small embedded system that reads a character drawn as a 3x5 pixel bitmap
and recognises which decimal digit it is. Two engines share the work:

* a **feedforward neural network** (15 inputs, 12 hidden neurons, 10
  outputs, positive-ramp activation) does the recognition, and
* a **custom Von Neumann microcontroller** with 16-bit instructions moves
  data between the user and the network and runs an application program.

The application shipped in the code ROM is a 1-digit calculator: the user
draws one digit on each of two 3x5 push-button matrices, presses *add*,
*subtract* or *multiply*, and the controller classifies both drawings with
the network, computes the result and shows it on an output port. Every
recognised character is also emitted as ASCII on a text output.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, single clock,
active-low asynchronous reset.

```
  board (active low)          mnc_uc (microcontroller)
  m0_n, m1_n, btn_n ---> mnc_io: NOT + latch, I/O registers
  out0, out1 <---------- mnc_io          |
                                 address / data / control buses
                          mnc_control_unit, mnc_alu, mnc_pc_reg,
                          mnc_rom (code), mnc_ram (data)
                                         |
                         ann_pixels, ann_start | busy, valid, class
                                         v
                          mnc_ann (15-12-10 network)
                                         | done, class
                                         v
                          mnc_text_output ---> char_o, char_valid, char_count
```

## The neural network (`mnc_ann`)

### What it computes

The input is a 15-bit vector `x`, one bit per pixel, pixel `p = 3*row + col`
with row 0 at the top and column 0 at the left; 1 means a dark pixel.

```
h[j] = ramp( b1[j] + sum_{i=0..14} W1[j][i] * x[i] )      j = 0..11
y[o] = ramp( b2[o] + sum_{j=0..11} W2[o][j] * h[j] )      o = 0..9
class = the o with the largest y[o] (lowest o on a tie)
```

`ramp(s)` is the positive ramp: 0 for negative `s`, `s` itself up to 255,
and 255 above (activations are 8-bit unsigned). The hidden-layer size 12 is
the geometric-pyramid rule, round(sqrt(15 x 10)).

### Number formats

| quantity | format |
|---|---|
| weights `W1`, `W2`, biases `b1`, `b2` | 8-bit signed integers |
| activations `h`, outputs `y` | 8-bit unsigned, saturating |
| accumulator | 20-bit signed (cannot overflow: 12 x 255 x 128 < 2^19) |

There is no fractional scaling: a set of real-valued trained weights has to
be scaled to integers by the user, and the ramp saturation at 255 has to be
kept in mind when choosing the scale.

### Datapath and timing

One multiply-accumulate unit serves every neuron. A small sequencer walks
the neurons one after the other:

* hidden neuron: 15 clocks, one per input (the product is the weight or
  zero, since inputs are bits), then 1 clock to add the bias, apply the ramp
  and store `h[j]`;
* output neuron: 12 clocks, one per hidden value (8-bit unsigned x 8-bit
  signed product), then 1 clock for bias and ramp; the arg-max is updated in
  the same clock.

A classification therefore takes `12*(15+1) + 10*(12+1) = 322` clocks,
exported as `mnc_pkg::ANN_LATENCY`: `done` rises 322 clock edges after the
edge that samples `start`.

Handshake: pulse `start` for one clock with the bitmap on `pixels`; the
pixels are captured at that edge. `busy` is high from the next clock until
`done` pulses; a `start` while busy is ignored. `valid` drops when a start
is accepted and rises with `done`; `class_o` and `scores[0..9]` then hold
until the next start. Two assertions in the module check these rules.

### Default weights

The weights are module parameters (`W1`, `B1`, `W2`, `B2`). The original
network was trained offline with back-propagation (learning constant 0.1,
momentum 0.9), with noise added to the training set, but its trained values
are not available. The defaults, computed by functions in `mnc_pkg`, turn
the network into a template matcher for the ten training digits:

* hidden neuron `h < 10` belongs to digit `h`: weight +8 for a pixel that is
  dark in the digit, -8 for a light one, bias `40 - 8 x (dark pixels of the
  digit)`. For a 0/1 input the sum is exactly `40 - 8 x Hamming(x, digit)`,
  so the neuron outputs 40 for a perfect match, 8 less per wrong pixel, and
  0 from five wrong pixels on;
* hidden neurons 10 and 11 have zero weights and bias (unused);
* output neuron `o` has weight 2 on hidden neuron `o` and 0 elsewhere.

The class is thus the nearest training digit in Hamming distance. All ten
clean digits are recognised. Over every possible corruption of every digit,
these weights recognise 73.5 % of the characters with 2 corrupted pixels
(772 of 1050) and 59.4 % with 3 (2706 of 4550). The original trained
network is reported to reach 97.5 % on noisy characters with 2 or 3
corrupted pixels. The gap comes from the weights, not from the
structure, which has the same size. Many 3x5 digits differ in a single pixel
(8 against 0, 6 and 9, for example), so no weight set can recover every
2-pixel corruption.

To use trained weights, override the parameters. The tables are packed
arrays indexed `W1[hidden][input]` and `W2[output][hidden]` (types `w1_t`,
`b1_t`, `w2_t`, `b2_t` in `mnc_pkg`).

### The digit font

`mnc_pkg::digit_pattern(d)` holds the ten 3x5 training digits (a standard
3x5 font: "0" is a ring, "1" a single centre column, and so on). The
testbenches carry their own copy of the font, so they check the package
against an independent table.

## The microcontroller (`mnc_uc`)

### Structure

The control unit, ALU, program counter, memory and I/O share one address
bus, one data bus and a set of control lines. The buses are multiplexers,
not tri-state nets. Code and data live in the same memory block and are
reached over the same bus. Instruction fetches (`bus_code = 1`) read the
128 x 16-bit code ROM at the PC. Data accesses with address bit 7 clear go
to the 128-byte RAM, and those with bit 7 set go to the I/O registers.
Every read answers one clock after it is issued.

### Machine cycle

Every instruction takes exactly four clocks, one per stage:

| stage | work |
|---|---|
| FETCH | PC onto the address bus, ROM read |
| DECODE | word into the instruction register, opcode decoded into control signals |
| EXECUTE | data read for `LD`; ALU result and flags latched; jump condition evaluated |
| STORE | result written to A, B or memory; PC loaded (jump taken) or incremented |

`HALT` parks the control unit until reset.

### Instruction format and set

```
 15    12 11     8 7             0
+--------+--------+---------------+
| opcode |  dst   | operand (imm) |
+--------+--------+---------------+
```

Destination codes: 0 = register A, 1 = register B, 2 = memory at address
`imm`, 15 = nothing. Data, registers and memory are 8 bits wide.

| code | mnemonic | effect |
|---|---|---|
| 0 | NOP | none |
| 1 | LDI | dst (A/B) <= imm |
| 2 | LD | dst (A/B) <= mem[imm] |
| 3 | ST | mem[imm] <= A (dst 0) or B (dst 1) |
| 4 | ADD | dst <= A + B; Z, C (carry) |
| 5 | SUB | dst <= A - B; Z, C (borrow) |
| 6 | AND | dst <= A & B; Z, C=0 |
| 7 | OR | dst <= A \| B; Z, C=0 |
| 8 | XOR | dst <= A ^ B; Z, C=0 |
| 9 | CMP | flags of A - B only |
| A | MOV | A <= B (dst 0) or B <= A (dst 1) |
| B | JMP | PC <= imm |
| C | JZ | PC <= imm if Z |
| D | JNZ | PC <= imm if not Z |
| E | JC | PC <= imm if C |
| F | HALT | stop |

Only ALU instructions change the flags. `mnc_pkg::instr(op, dst, imm)`
assembles one word.

### Memory and I/O map

| address | access | content |
|---|---|---|
| 0x00-0x7F | RW | RAM; reads 0 for every byte after reset |
| 0x80 | R | auxiliary buttons (bit 0 add, 1 subtract, 2 multiply) |
| 0x81 / 0x82 | R | matrix 0 pixels 7:0 / 14:8 |
| 0x83 / 0x84 | R | matrix 1 pixels 7:0 / 14:8 |
| 0x85 / 0x86 | RW | network input pixels 7:0 / 14:8; writing 0x86 starts the network |
| 0x87 | R | network status: bit 7 busy, bit 4 valid, bits 3:0 class |
| 0x88 / 0x89 | RW | output ports 0 / 1 |

The board's buttons are active low. `mnc_io` inverts them (parameter
`ACTIVE_LOW`) and registers them on every clock, so the program sees only
active-high, synchronous signals.

The RAM clears by resetting one "written" flag per byte instead of the
array. This keeps the array mappable onto RAM primitives.

### The calculator program

`mnc_pkg::calc_program()` builds the 77-word program that is the default
ROM content. RAM bytes 0x10 to 0x14 hold the operation, the two digits, the
result and a loop counter. The program:

1. polls the buttons until add, subtract or multiply is pressed;
2. copies matrix 0 to the network input, polls the status until valid, and
   stores the class; then does the same for matrix 1;
3. adds or subtracts directly. It multiplies by repeated addition, since
   the ALU has no multiplier;
4. writes the result (8-bit two's complement, -9 to 81) to port 0 and the
   operation to port 1, then waits for the buttons to be released.

From the button press, an addition takes roughly 850 clocks: two network
runs of 322 clocks and about 45 instructions of 4 clocks. A multiplication
adds 40 clocks per unit of the second digit.

## Text output (`mnc_text_output`)

Each `done` of the network produces the ASCII code `'0' + class` on
`char_o`, with `char_valid` high for one clock on the edge after `done`.
An 8-bit wrapping counter `char_count` counts the characters. A class
index above 9 would give `'?'`.

## Top level (`mnc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| btn_n | in | 4 | auxiliary buttons, active low (bit 3 unused by the program) |
| m0_n, m1_n | in | 15 | the two 3x5 button matrices, active low |
| out0, out1 | out | 8 | calculator result, operation |
| char_o, char_valid, char_count | out | 8, 1, 8 | text output |
| halted | out | 1 | the program executed HALT |

## How this relates to the original design

Taken from the original description:

* the system partition: microcontroller with code memory, network and text
  output;
* a Von Neumann microcontroller with 16 instructions of 16 bits, the
  opcode in the top 4 bits, the destination in the middle 4 and an 8-bit
  value in the low 8;
* registers A and B, a four-stage fetch/decode/execute/store cycle, and an
  ALU with AND, OR, ADD and SUBTRACT;
* a PC that increments after each instruction and that only jumps change;
* a 128 x 16-bit ROM holding the program, and a 128-byte RAM that reads
  zero after reset;
* inverted, latched active-low inputs;
* the 15-12-10 network with biases and a positive-ramp activation;
* 3x5 digits on two push-button matrices, and the calculator application.

Chosen here, where the description gives no detail:

* the opcode values, the destination codes and the flags;
* XOR, CMP, MOV, the conditional jumps and HALT;
* the 8-bit data width, the address map and the I/O registers;
* one clock per stage, and synchronous memories;
* the network's fixed-point formats, its serial datapath and the arg-max
  output;
* the default weights (the trained ones are not available);
* the calculator program and the ASCII text output.

The original was implemented on a Spartan-3 FPGA at 1,236 flip-flops, 3,061
LUTs, one block RAM and four 18x18 multipliers. This RTL is smaller: about
450 flip-flop bits before mapping, and one multiplier in the network. Those
original figures are not a target here.

Not covered here: network training, which was done offline, and loading
programs from a PC, which is a planned extension of the original.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mnc_alu` | all operations on corner and random operands, result and flags |
| `tb_mnc_pc_reg` | reset, increment, wrap, jump load and its priority |
| `tb_mnc_ram` | all-zero after each reset, random read/write against a model, 1-clock latency |
| `tb_mnc_rom` | calculator words against hand-encoded values, a second image via parameter |
| `tb_mnc_io` | inversion, latch delay, every register, single start pulse |
| `tb_mnc_text_output` | ASCII codes, strobe, counter |
| `tb_mnc_ann` | clean and noisy digits: all ten scores against a reference, class, 322-clock latency, start while busy |
| `tb_mnc_control_unit` | a program using all 16 instructions against a memory model: memory, registers, PC, 4 clocks per instruction |
| `tb_mnc_uc` | microcontroller with a test program, I/O, RAM clearing and a modelled network |
| `tb_mnc_top` | the calculator end to end at default parameters: 14 calculations, noisy digits, negative results, multiply by zero, every digit, network latency |
| `tb_mnc_noise_workload` | the network on all 5600 digits with 2 or 3 corrupted pixels: class against a reference classifier, latency, recognition rate printed |

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert --top-module tb_mnc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/mnc_pkg.sv tb/tb_mnc_top.sv
./obj_dir/Vtb_mnc_top
```

Replace `tb_mnc_top` with any other testbench name. Each one runs in about
a second. `tb_mnc_top` reaches into the top's internal `ann_start` and
`ann_done` nets to measure the network latency.

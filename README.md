# A bit-serial digital control computer

This is RTL for a small on-line control computer of 1964. It was designed to
sit in a control loop, read a shaft angle, and switch an external system. Its
program is not in memory: it is wired on a plugboard of 64 steps. Its data live
in a recirculating delay line of 61 words and in six fast registers. All
arithmetic runs one bit at a time through a single serial adder/subtractor,
on 12-bit two's complement fractions. The machine's two main ideas are:

- **Time as the address.** Every register is a shift register. Each store word
  passes the read head once per revolution. A transfer or an addition is a
  choice of which bit enters which register during the twelve data bit times
  of a word.
- **Modification.** Store locations can be modified by an index register.
  Together with the I-register orders and a test flip-flop, this gives counted
  program loops, although the program itself is fixed wiring.

The RTL rebuilds the machine from its published logic design: the blocks,
the order list, the timing signals, and the multiply and divide algorithms.
It does not copy the original NAND-gate wiring, so the insides of many blocks
are this design's own. The section *Where this design departs from the
original* lists those choices.

## Numbers and words

- **Data words.** A data word is 12 bits in two's complement. The top bit is
  the sign, with weight -1. The other bits weigh 2^-1 .. 2^-11, so
  `0.01100000000` is 3/8 and `1.10100000000` is -3/8.
- **Operand range.** The keyboard and digitizer give at most 10 magnitude
  digits, so operands should stay below 1/2 in magnitude. Multiplication and
  division rely on this: they can overflow outside that range.
- **Word time.** A *word time* is 16 bit times, named T0..T15. The data bits
  travel least significant first, in T1..T12. The other four bit times are
  spacers, which the machine uses for single-place shifts and housekeeping.
- **Six-bit quantities.** The location or integer N and the index registers I
  are 6-bit numbers. They travel in T1..T6.
- **Speed.** At the original 200 kc/s clock a bit time is 5 us and a word
  time 80 us. The store revolves once every 61 words, which is 4880 us.

## Timing: bit counter and timing unit

A free-running 4-bit counter steps once per clock. The timing unit decodes it
into one-hot `t[15:0]` and into two pulse trains: `t1_12` (T1..T12) and
`t1_6` (T1..T6).

The original decoding gates take the count as n-1 during T_n, so count 15 is
T0. The RTL keeps that offset. Reset puts the counter at 15, so the first bit
time after reset is T0.

Every state change at word level happens in T15.

## The serial datapath

| register | size | what it does |
|---|---|---|
| A | 12 | Accumulator. Every arithmetic result goes here. Also the input/output register; its 12 stages drive the console lamps. |
| Q | 12 | Extends A for multiplication and division. |
| H1..H4 | 4 x 12 | Fast working store, with no wait for the delay line. |
| I1, I2 | 2 x 6 | Index registers, for modification and loop counts. |
| N | 6 | Control register: holds a store location, a jump target or the integer N. |
| S | 61 x 16 bits | Delay-line store, locations L0..L60. |

**Shifting.** During T1..T12 the registers taking part in an order shift right
one place per clock. Their least significant bits go onto the *enter bus*.
`enter_bus` picks, for each destination, which bit enters it on that clock:

- A register that takes its own bit *recirculates*, so it keeps its value.
- A register that takes another register's bit *receives a copy*.
- A register that takes the adder output `z` *receives a sum or difference*.

**Adding.** The adder/subtractor is one full adder/subtractor stage and a
carry/borrow flip-flop W, which is cleared in T0. Its truth table:

    Z = X ^ Y ^ W    Co = majority(X, Y, W)    Bo = ~X&Y | ~X&W | Y&W

For example, A + H3 is one word time with these settings in each of T1..T12:

- The adder inputs are X = A[0] and Y = H3[0].
- A shifts right and takes Z at the top.
- H3 shifts right and takes its own bit back.

After twelve clocks A holds the sum and H3 is unchanged.

**Control.** The sequencer sends one control word per clock (`dp_ctrl_t` in
`dcc_pkg`). It says what each register does and where its entering bit comes
from.

## The delay-line store and how an S-order finds its word

The store is a 976-bit loop. One bit leaves and one bit re-enters on every
clock. A word is written by gating new bits in while the old ones pass. The
line's length is exactly 61 word times, so store words stay aligned with the
machine's word time forever.

The **word counter** holds the location of the word that will appear *next*,
not the one now passing. It steps in T15 and wraps from 60 to 0. At T15 the
**compare unit** checks N against the word counter. If they are equal, the
next word time carries the wanted location, and the sequencer performs the
S-order in it.

So an S-order waits between 0 and 60 word times for its word. This access
time is the price of the delay line, and the reason the H-registers exist.

## Program board and the life of a step

The **program board** has 64 steps, and each step has four hubs:

- **O** is wired to one of 32 order bus bars.
- **R** is wired to one of the register bus bars H1 H2 H3 H4 I1 I2.
- **L** is wired to one of the location bus bars L0..L60.
- **M** is wired to M1 or M2.

The instruction counter drives a 6-to-64 decoder. The decoder energises the
current step's hubs, and through their wires the bus bars. The board is
modelled as a table of wires, `step_t` per step, written through the `plug_*`
port.

The **location encoder** turns the energised L bus bar into a binary number.
Depending on the order, that number is a store location, a jump target
(a step number) or the integer N.

Each step passes through word-long states:

| state | when | what happens |
|---|---|---|
| SETUP | always | N is loaded from the location encoder in T0. |
| MODIFY | hub M plugged | N <- N - I1 (M1) or N - I2 (M2), serially in T1..T6. |
| WAIT | S-orders | Word times pass until the compare unit matches. |
| EXEC | always | The order runs: 1 word, 7 for a multiply, 12 for a divide. |

At the end of EXEC the instruction counter is handled like this:

- By default it is increased by one, wrapping from 63 to 0.
- If a jump is taken, it is loaded from N.
- HALT stops the machine and leaves the counter alone.

## Modification and loops

A modified order has its location computed as N - I. To step through
locations 30..39 ten times:

1. Preset I1 = 10 with N->I (hub L on L10).
2. Wire the loop's S-order with L = L40 and M = M1. Its first pass reads
   L40 - 10 = L30.
3. End the loop with I-N->I (N = 1), then TEST MOD back to the loop's start.

I-N->I sets the TEST flip-flop when the 6-bit result is zero, and clears it
otherwise. TEST MOD jumps while TEST is ZERO. So the tenth pass reads L39,
brings I1 to 0, and falls through. `tb_sample_loop` runs this program at full
size, fed by the keyboard input subroutine (HALT, key in a word, START, store
it at a modified location, loop).

## Multiplication: two multiplier bits per word

A x H -> A takes seven word-long phases, counted by the phase counter.

**Phase 1.** The multiplier shifts from A into Q, and A is cleared. A:Q now
forms a 24-bit partial product with the multiplier in its low half. The KEEP
flip-flop K is cleared.

**Phases 2..7.** Each phase consumes two multiplier bits. In T0 the
multiplication unit looks at Q[1] (L1), Q[0] (L0) and K:

| L1 L0 K | action | multiple of H added |
|---|---|---|
| 000, 111 | none | 0 |
| 010, 001 | add, then shift twice | +1 |
| 110, 101 | subtract, then shift twice | -1 |
| 011 | shift, add, shift | +2 |
| 100 | shift, subtract, shift | -2 |

This is radix-4 Booth recoding. The multiple of H is -2*L1 + L0 + K. The x2
cases are made by doing one of the phase's two right shifts *before* the
addition: (P/2 + H)/2 = (P + 2H)/4.

Within a phase:

- **T0.** If the unit chose "shift first", A:Q shifts one place right
  (arithmetic). The SHIFT MEMORY flip-flop records that the early shift is
  done. K takes L1, the bit shared with the next pair.
- **T1..T12.** A shifts through the adder with H, or recirculates if the
  action is "none".
- **T13 and T14.** A:Q makes the remaining right shifts, arithmetic. A[0]
  enters Q[11], and used multiplier bits fall out of Q[0].

**Scaling.** Twelve right shifts would leave A holding half the product. So
the last phase makes one shift fewer: eleven in all. A then holds
floor(X*Y*2^11) / 2^11, the product as a fraction truncated toward minus
infinity, and Q holds further low-order bits. The original says only that
the product goes into A; this shift count is this design's choice.

## Division: non-restoring, twelve phases

A / H -> A divides the fraction in A (the dividend) by H. The result is only
a fraction if |A| < |H| < 1/2.

**Phases 1..11** each make one quotient digit:

1. In T0 the division unit compares the sign of the partial remainder (A)
   with the sign of the divisor (H).
2. If the signs agree, H is subtracted and the digit is 1. If not, H is added
   and the digit is 0. The addition or subtraction runs in T1..T12.
3. In T13, A shifts left (the new partial remainder is twice the old) and
   the digit shifts into Q from the right.

The digits q0..q10 stand for +1 or -1 at weights 1, 1/2, ... 2^-10. As a
12-bit two's complement fraction that sum is `{q1 .. q10, 1, 0}`.

**Phase 12** shifts this pattern into A: a 0 in T1, a 1 in T2, then Q[0..9]
in T3..T12. The quotient is within 2^-10 (two least significant bits) of
the exact value. That error bound is what the testbenches check.

## Order list

Orders carry the numbers of their order bus bars. S means an S-order: it
waits for its store word.

| # | order | effect | execute time (word times) |
|---|---|---|---|
| 1 | H->A | A <- H | 1 |
| 2 | A->H | H <- A | 1 |
| 3 | A->H & CL | H <- A, A <- 0 | 1 |
| 4 | A+H->A | A <- A + H | 1 |
| 5 | A-H->A | A <- A - H | 1 |
| 6 | AxH->A | A <- A x H | 7 |
| 7 | A/H->A | A <- A / H | 12 |
| 9 | S->H (S) | H <- S[L] | 1 |
| 10 | H->S (S) | S[L] <- H | 1 |
| 11 | S->A (S) | A <- S[L] | 1 |
| 12 | A->S (S) | S[L] <- A | 1 |
| 13 | A->S & CL (S) | S[L] <- A, A <- 0 | 1 |
| 14 | A+S->A (S) | A <- A + S[L] | 1 |
| 15 | A-S->A (S) | A <- A - S[L] | 1 |
| 17 | right shift | A <- A/2, sign repeated | 1 |
| 18 | left shift | A <- 2A, sign stage kept | 1 |
| 19 | JUMP (A<0) | jump to step L if A < 0 | 1 |
| 20 | JUMP (A=0) | jump to step L if A = 0 | 1 |
| 21 | N->I | I <- N | 1 |
| 22 | I+N->I | I <- I + N | 1 |
| 23 | I-N->I | I <- I - N; TEST <- (result = 0) | 1 |
| 25 | TEST MOD | jump to step L if TEST = 0 | 1 |
| 27 | INPUT | A <- {00, D-register} | 1 |
| 28 | OUTPUT | set OUTPUT flip-flop 1 (R = I1) or 2 (R = I2) | 1 |
| 29 | U. JUMP | jump to step L | 1 |
| 31 | HALT | stop | 1 |

Orders 8, 16, 24, 26, 30 and 32 are spares. They, and an unplugged O hub,
pass as a one-word no-operation.

Every step also spends one SETUP word. A modified step adds one MODIFY word,
and an S-order adds 0..60 WAIT words.

## Console

These are one-clock pulses on the top:

- **START** (`btn_start`), while stopped, increases the instruction counter
  and runs until a HALT. After a HALT at step s, START continues at step s+1.
- **STOP AND INITIALIZE** (`btn_stop`) stops at once and clears the TEST and
  OUTPUT flip-flops.
- **ZERO COUNTER** (`btn_zero`), while stopped, clears the instruction
  counter. A program therefore starts with ZERO COUNTER then START, and its
  first step is step 1.
- **CLEAR ACCUMULATOR** (`kb_clear`) and the twelve **ACCUMULATOR INPUT**
  buttons (`kb_set`) clear A, or set single stages of A to ONE.

`d_reg` is the 10-bit D-register of the shaft-position digitizer. `a` is the
lamp display, and `out_ff` the two OUTPUT flip-flops.

## Where this design departs from the original

- **Analog and external parts.** The delay line is modelled by its logic
  function: a 976-bit array with a rotating position, without transducers or
  amplifiers. The master clock is the `clk` input. The digitizer, keyboard
  and lamps are ports.
- **Sequencing.** The SETUP word, the separate MODIFY word, and the bit times
  chosen for shifts (T0, T13, T14) and strobes are this design's own. So are
  the multiply scaling (eleven shifts) and the division correction pattern.
  The original gives the phase counts and algorithms, not these details.
- **Enter bus.** The enter bus and adder input gating are plain
  multiplexers. A separate "inversion gating" block of the original is not
  built, because subtraction uses the adder's borrow logic.
- **OUTPUT.** Which OUTPUT flip-flop is set is chosen by hub R (I1 or I2).
  The original does not say how the choice is made.
- **INPUT** clears the two top stages of A.
- **S->A** loads A. The original's description of this order also says
  "to specified H-register", which conflicts with its name and with S->H.
- **Resets.** The registers, counters and the plugboard table have an
  asynchronous reset (`rst_n`); the delay line contents do not. The original
  has only its console buttons.
- **Overflow.** Nothing detects overflow. Keep operands within +-1/2.

## Files

| file | block |
|---|---|
| `rtl/dcc_pkg.sv` | shared sizes, order numbers, control word and bit-source types |
| `rtl/control_computer.sv` | top: the whole machine |
| `rtl/bit_counter.sv`, `rtl/timing_unit.sv` | bit timing |
| `rtl/delay_line_store.sv`, `rtl/word_counter.sv`, `rtl/compare_unit.sv` | store and its addressing |
| `rtl/accumulator.sv`, `rtl/h_registers.sv`, `rtl/i_registers.sv`, `rtl/control_register.sv` | registers A/Q, H, I, N |
| `rtl/enter_bus.sv`, `rtl/adder_subtractor.sv` | serial datapath |
| `rtl/multiplication_unit.sv`, `rtl/division_unit.sv`, `rtl/phase_counter.sv` | multiply and divide |
| `rtl/instruction_counter.sv`, `rtl/instruction_decoder.sv`, `rtl/program_board.sv`, `rtl/location_encoder.sv` | program stepping |
| `rtl/control_sequencer.sv` | start/stop, order decoding, modification, jump/test, TEST and OUTPUT flip-flops |

Each file opens with a description of the block, its interface and timing.

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog. To build and run one
with Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
        --top-module tb_control_computer rtl/dcc_pkg.sv tb/tb_control_computer.sv
    ./obj_dir/Vtb_control_computer

The package file must come first; the other modules are found by name in
`rtl/`. Substitute any `tb/tb_<block>.sv` to test one block.

- **`tb_control_computer`.** The whole machine at its default size, running
  two wired programs as an operator would: at each HALT it checks the state,
  keys in the next number, and presses START. The programs cover every
  implemented order, both kinds of jump outcome, the store wait, the
  modification loops, and the counter wrapping from 63 to 0. It times
  multiply and divide (7 and 12 word times) and counts that each mechanism
  happened. Operands are random within the +-1/2 range. Products must match
  floor(X*Y/2^11) exactly; quotients must be within two LSBs.
- **`tb_sample_loop`.** The ten-pass modification loop described above. It
  checks the locations read, in order, and the sum.
- **`tb_<block>`.** One testbench per block, checking it against values
  computed independently. Examples: the adder's full truth table and random
  serial sums, every row of the Booth table, the delay line returning every
  bit after exactly 976 clocks, and the sequencer's per-bit control words
  and word counts for each kind of step.

The whole-machine tests run in well under a second.

# Associative Search Network chip

This is a small learning machine in hardware. It watches 16 sensory inputs and drives 2 binary outputs (actions). After each step it receives a scalar payoff from its environment. Over many steps it changes its internal weights so that actions which raised the payoff become more likely in the situations where they were taken. Each output belongs to one *element*. In every step, each element:

1. forms a weighted sum of the inputs,
2. adds a random number (noise, so that the network explores), and
3. fires when the noisy sum exceeds a threshold.

Learning uses one *eligibility trace* per weight. The trace remembers how often that input was active while the element fired. When the payoff changes, every weight moves in proportion to its trace and to the change in payoff.

The whole machine is bit-serial. Every number travels over one wire, least significant bit first. Every arithmetic unit is a one-bit adder with a carry flip-flop. A step (an *iteration*) therefore takes 45 to 61 clock cycles instead of one. In exchange, each of the 32 weight/trace cells needs only a few adders and two 16-bit shift registers.

## The learning rule

Per iteration, with inputs `x_j` (4-bit unsigned), payoff `z` (8-bit signed), weights `w_ij` (16-bit signed) and traces `T_ij` (16-bit unsigned):

```
T_ij  <- T_ij + y_i(previous) * x_j(previous)              (mod 2^16)
T_ij  <- T_ij / 2           every (D+1)-th iteration       (trace decay)
s_i    = sum_j w_ij * x_j                                  (20 bits)
y_i    = [ s_i + noise_i  >  threshold ]                   (signed compare)
R      = z - z_previous                                    (9 bits, exact)
w_ij  <- w_ij + ((T_ij * R) >>> (8 + N_c))                 (mod 2^16)
```

`N_c` (0 to 16) sets the learning rate as a power of two. `D` is the decay period. Both come from registers that software writes while the chip is paused. The trace used in the weight update is the one just updated in the same iteration.

## Bit-serial arithmetic

Three small pieces do all of the arithmetic.

**Serial adder** (`serial_adder`). A full adder plus a carry flip-flop. The carry produced by bit *k* is added into bit *k+1* on the next cycle. `clr` empties the carry before a new number starts. `cin1` forces a carry-in of 1 for one cycle, which turns `a + ~b` into `a - b`. The sum is normally registered (`REG_SUM=1`), so every serial stage adds one cycle of latency. The z difference unit uses the combinational form.

**Ring registers** (`shift_register`, inside `intersection`). A weight or trace is a 16-bit register that shifts right. Its LSB leaves through a serial adder, and the adder's output re-enters at the MSB. In 16 shifts the register goes round once, and whatever was fed to the adder's other input has been added to it. This gives the trace update (adding `Yold AND Xold`), the weight update (adding product bits) and read-out (with the adder input at 0, the register just circulates). Writing is the same ring with the adder bypassed: the data line enters the MSB and the old bits fall off the end. Halving a trace is one extra right shift with a 0 entering the MSB.

**Shift-adder** (`shift_adder`), a serial × parallel multiplier. The hardest part of the design, because one unit per cell serves two different multiplications:

- **W × X.** The 16-bit weight is the parallel operand. The 4-bit X arrives serially. Each cycle, if the current X bit is 1, the weight is added into an accumulator. The accumulator's LSB is emitted as the next product bit, and the accumulator shifts right by one. After the four X bits it keeps draining. 20 cycles give the whole 20-bit product. The weight is signed, so this shift is arithmetic (*SignExtend* = 1).
- **T × R.** The unsigned trace is the parallel operand. The signed reinforcement R arrives serially. This shift is logical (*SignExtend* = 0), because the trace has no sign bit. R is signed, so the R line keeps sending R's sign bit after its 9 real bits. A multiplier that never ends in a sign bit is treated by the adder as an infinitely long two's-complement number, so every product bit read out is exact.

The original uses a row of one-bit adders that each keep their own carry (carry-save form). The RTL writes that row as one 18-bit accumulator with a word-wide adder. The product bits come out in the same cycles.

## One iteration, cycle by cycle

`t` counts clock cycles from the start of an iteration. Each block registers its output, which delays a serial stream by one cycle per stage:

- The W×X product bit *k* reaches the adder tree at `t = k+2`.
- The tree sum bit *k* appears at `t = k+6` (four adder levels).
- The noisy sum bit *k* appears at `t = k+7`.

| t | activity |
|---|---|
| 0 | pause check; all serial pipelines cleared |
| 1–4 | X bits 0..3 on the 16 `x_in` pins; the previous X leaves the input buffers as Xold |
| 1–8 | payoff bits 0..7 on `z_in` |
| 1–16 | trace update: every trace adds `Yold AND Xold` (`Xold` is 4 bits wide, so this spans bits 0..3) |
| 17 | decay slot: if the decay counter is 0, every trace shifts once more with a 0 entering (halved) and the counter reloads; otherwise the counter decrements |
| 1–20 | shift-adders multiply W × X; product bits flow into the adder trees |
| 6–25 | noise bit *k* of each element is added to sum bit *k* at `t = 6+k` |
| 7–26 | threshold comparison; the sign bit is compared at `t = 26`, where `y` is latched |
| 21 on | z difference unit puts R on the R line; shift-adders multiply T × R |
| 27 on | new `y_out` valid |
| 29+N_c … 44+N_c | weight update: the weights circulate and add product bits `8+N_c … 23+N_c` of T × R |
| 44+N_c | last cycle; the next iteration starts |

This makes an iteration `45 + N_c` cycles long. The original schedule has the same length. Its individual events fall one to three cycles earlier than here, because the original uses unregistered adder outputs at several points.

## The element datapath

**Adder tree** (`adder_tree`). Sixteen W×X product streams are summed by a balanced tree of fifteen serial adders in four registered levels. The sum's LSB emerges four cycles after the products' LSBs, and 20 sum bits are produced. An *enable register* bit of 1 forces that input's product to zero, so the input takes no part in the sum. This follows the original's convention that a high enable line removes the input.

**Noise** (`noise_element`). One pin carries two random bits per clock cycle: element 0's bit in the first half of the cycle, element 1's in the second half. Element 0's bit is captured on the falling edge. Both bits then enter their elements' serial adders on the rising edge. Control register bit 7 switches the noise off. This scheme fits exactly two elements.

**Threshold** (`threshold_element`). Noisy sum and threshold are compared bit-serially with one bit of state:

- a sum bit 1 against a threshold bit 0 sets the state;
- the opposite pair clears it;
- equal bits keep it.

After the MSB, the state says "sum > threshold" for unsigned numbers. Both numbers are two's complement, so on the sign bit the roles of the two inputs are swapped, which makes the comparison signed. Both elements share one 20-bit threshold register, which circulates during the comparison and is loaded by software.

**Output** (`asn_network`). `y_out[e]` is the latched `y`. Alternatively, if control register bit *e* is set, it is the noisy sum itself as a serial stream, bit *k* at `t = 7+k`, for testing.

## Reinforcement and traces

**z difference** (`z_difference`). The payoff shifts into an 8-bit z register. When R is needed:

- z shifts out into a serial adder, and at the same time into the z_old register;
- z_old shifts out through an inverter into the adder's other input;
- the adder's carry is preset to 1.

The adder therefore produces `z - z_old`, and the new payoff becomes z_old for the next iteration. After 8 bits the adder is fed the two sign bits, so R is extended with its own sign (see the shift-adder above).

**Input buffers** (`x_input_buffer`). Each input line has a 4-bit shift register. While the new X enters, the previous X leaves at the other end. The previous X is needed by the trace update.

**Decay** (`decay_unit`). The 16-bit Decay Register holds the period. The 16-bit Decay Count Register counts down once per iteration. In the iteration where it is zero, the traces are halved and the count reloads from the Decay Register.

## Timing sequencer

`timing_fsa` produces every timing line. It has one state per segment of the schedule, plus CHECK (t = 0) and PAUSE. Entering a segment loads that segment's 6-bit duration word from a small ROM into a register and resets a 6-bit counter. When the counter equals the register, the segment ends. The wait before the weight update takes its duration from the C register (`N_c`) and is skipped when `N_c = 0`. The pause request is examined only at t = 0. While paused, the sequencer stays in PAUSE and asserts *pause acknowledge*. Releasing the request starts a new iteration.

## Microprocessor interface and pause mode

Software reaches the chip over an 8-bit bus with a chip select (`cs_n`) and a write enable (`we_n`). There are no address lines. To access the chip:

1. Drive `pause_n` low and wait until the status byte shows bit 7 set (pause acknowledged).
2. Perform accesses. Every clock cycle with `cs_n` low is one access, at the address held in an internal 10-bit counter. After each access the counter advances by one.
3. Return `pause_n` high. The counter clears whenever the chip is not paused, so every pause session starts at address 0.

Outside pause, a read returns the status byte and a write does nothing.

| address | contents |
|---|---|
| 0–511 | weight/trace registers, one bit per access: bits 3:0 = bit number, bit 4 = weight (0) or trace (1), bits 8:5 = input line. Data bit *e* belongs to element *e* |
| 512, 513 | Decay Register low, high |
| 514 | control: bit *e* = serial output for element *e*, bit 7 = noise off |
| 515 | C register, `N_c` in bits 5:0 |
| 516, 517 | enable (ignore) register, inputs 0–7, 8–15 |
| 518, 519 | iteration counter low, high; writing either clears both |
| 520–522 | threshold bytes 0–2 (20 bits, two's complement) |
| 523, 524 | Decay Count Register low, high |
| 538, 1023 | status: bits 1:0 = current outputs `y`, bit 7 = pause acknowledge |

The weight/trace registers are accessed through the ring registers described above:

- **Read:** the addressed register pair circulates by one bit per access. The LSB appears on data bits 1:0 in the same cycle, so sixteen reads return the register LSB first and leave it unchanged.
- **Write:** each access shifts data bits 1:0 into the MSBs, so sixteen writes load a value LSB first.

Because the counter only counts up, reaching a high address means stepping through the lower ones. Reads change nothing (a register read circulates the register back to where it was), so software reads its way there. The status byte during pause is at 538 and 1023. Outside pause, any read returns it.

`data_out` and `data_oe` (high during a read) drive the bus. `data_in` is the bus as seen by the chip. The bidirectional pad is not part of the RTL.

## Pins of `asn_chip`

| pin | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (one minor cycle per period); asynchronous reset, active low |
| `x_in[15:0]` | in | one serial 4-bit input per line, t = 1..4 |
| `z_in` | in | serial 8-bit signed payoff, t = 1..8 |
| `noise_in` | in | two noise bits per cycle, t = 6..25 |
| `y_out[1:0]` | out | element outputs, valid from t = 27 |
| `pause_n` | in | pause request, active low |
| `cs_n`, `we_n` | in | bus chip select and write enable, active low |
| `data_in[7:0]` | in | bus data into the chip |
| `data_out[7:0]`, `data_oe` | out | bus data out and its drive enable |

Iteration boundaries are not brought out. After reset the chip starts at t = 0. An environment either counts cycles (45 + `N_c` per iteration) or pauses the chip and restarts it, since a release always begins at t = 0.

## Where this design departs from the original description, or fills a gap

- **Clocking and reset.** The original uses a two-phase non-overlapping clock and no reset pin. This design uses one rising-edge clock, with a falling-edge capture only for the noise bit. It adds an asynchronous active-low reset that clears every register.
- **Signed arithmetic.** In the original, the threshold comparison table is unsigned, the R line stops after 8 bits, and one passage asserts SignExtend during the trace multiplication. This design:
  - compares signed numbers;
  - extends R with its sign;
  - multiplies the unsigned trace without sign extension, following the description of the trace register as unsigned.
- **Intersection address range.** One passage of the original gives 0–255 for the intersection addresses; its interface drawing gives 0–511. 512 addresses are needed for 16 lines × 2 registers × 16 bits, so this design uses 0–511. The bit order within the address, addresses 520–524 (threshold and decay count), and the control-register bit positions are this design's choices.
- **Iteration counter.** The counter is 16 bits, as in the original's main plan. The original builds it as a ripple of JK flip-flops; here the JK flip-flops share one clock (a synchronous counter). The JK flip-flop merges its asynchronous clear and preset into one override, in which clear wins.
- **Shift-adder.** Described as a word-wide accumulator rather than a row of carry-save adders. It is equivalent at its outputs.
- **Adder tree.** A balanced tree, which matches the four-cycle latency given in the original's text.
- **Overflow.** Sums wrap at 20 bits; weights and traces wrap at 16 bits. No saturation is described or built.
- **Data pad.** The pad is not modelled; the bus is split into `data_in`, `data_out` and `data_oe`.
- **Schedule.** Cycle numbers differ by a few cycles from the original because outputs are registered (see the table above). The iteration length, `45 + N_c`, is the same.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

`tb_asn_chip` runs the complete chip at its default size. It drives only the pins: it configures the chip through the interface in pause mode and runs many iterations with random inputs, payoff and noise. It reads back weights, traces and outputs and compares them with an independent cycle-free model of the learning rule (`asn_model_pkg`). It counts each mechanism and fails if one never happens:

- pause entry, register writes and reads;
- trace halving;
- ignored inputs;
- noise off;
- serial output mode;
- both output values;
- weight increase and decrease;
- `N_c = 0` and `N_c > 0`.

`tb_asn_learning` shows the chip learning from the payoff alone. Each iteration shows one of two random patterns, 15 on input 1 or 15 on input 2. Element 0 should fire on the first, element 1 on the second. The payoff is +63 for each correct action and −63 for each wrong one. Settings: threshold −300, 11-bit noise, `N_c = 0`, traces halved every iteration.

In 2000 iterations the share of correct actions rises from about 0.67 to about 0.93–0.96, and the weights separate as expected. The test fails below 0.80. With a slower decay, a threshold of 0 or a payoff of ±31, one or both elements often stop firing early and never learn. An element that does not fire builds no trace. Rounding the weight step towards −∞ also adds a small downward drift to every weight with a small trace.

`tb_asn_network` runs the network with the real sequencer and decay registers. The other testbenches check single blocks against values computed in the testbench.

To simulate with plain Verilator 5, for example the whole chip:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/asn_pkg.sv tb/asn_model_pkg.sv \
    $(ls rtl/*.sv | grep -v asn_pkg) tb/tb_asn_chip.sv --top-module tb_asn_chip
./obj_dir/Vtb_asn_chip
```

`-Wno-fatal` keeps lint warnings (unused package constants, for instance) from stopping the build. For a single block, list `rtl/asn_pkg.sv`, the block's file and the files of the modules it instantiates, then its `tb/tb_<module>.sv`. The sizes are parameters with the original's numbers as defaults (`N_IN`, `N_ELEM`, `X_BITS`, `Z_BITS`, `W_BITS`, `SUM_BITS`). The noise element, however, serves exactly two elements.

## Files

- `rtl/asn_pkg.sv`: sizes, interface addresses, the timing-line struct.
- `rtl/asn_chip.sv`: the top. It instantiates:
  - `timing_fsa`;
  - `decay_unit`;
  - `upi` (interface, containing `iteration_counter` → `jk_ff`);
  - `asn_network`, which contains:
    - `x_input_buffer`;
    - `z_difference`;
    - `asn_element` (16 × `intersection` → `shift_register`, `serial_adder`, `shift_adder`, plus `adder_tree`);
    - `noise_element`;
    - `threshold_element`;
    - the threshold register.
- `tb/`: one testbench per module, the learning demonstration `tb_asn_learning.sv`, and the reference model `asn_model_pkg.sv`.

# Microprogrammed control unit with per-state microprogram fields

A classic hardwired control unit is a *synchronous phase register* machine: input
flip-flops, output set/reset flip-flops, a one-hot state register ("1-from-n" code, one
flip-flop per state) and a combinational network that decides, in each state, which outputs
to set or reset and which state to go to next. Put that combinational network in read-only
memory and the machine becomes a microprogrammed control unit. The memory's contents are
the microprogram, and the flip-flops around it act as the processor.

The obvious way to do this addresses one memory with every input and every state bit. Memory
size then doubles with each extra address line. Once the address needs more lines than one
memory part has, the number of parts grows exponentially.

This design splits the microprogram memory into **one field per state** instead:

* Each field is addressed only by the inputs its own state's conditions depend on.
* Each field drives only the output and next-state lines that can change in that state.
* Each field is enabled by its state's flip-flop.

Because the state register is one-hot, exactly one field is active at a time. All fields share
the same output lines.

The RTL implements one complete control unit: 6 inputs x1..x6, 4 outputs z1..z4 and 3 states
y1..y3, built from 32-word x 8-bit memory parts. Its storage takes six such parts. A single
memory addressed by all 6 inputs and all 3 state bits would take 2^(6+3-5) = 16 parts.

## The control function

The combinational part has 11 *change lines*:

* `z_i:1` sets output z_i.
* `z_i:0` resets output z_i.
* `Y_j` moves the unit to state y_j.

Each line is a sum over states of `y_k AND F^k`. `F^k` is the line's *identifying function*
in state k: the input condition under which that change happens in state k. The unit
implemented here has these identifying functions (`'` is NOT):

| line | in y1 | in y2 | in y3 |
|------|-------|-------|-------|
| z1:1 | x2 x6 | – | x2 x6 |
| z1:0 | – | x3' x5 + x1' | – |
| z2:1 | x1' | – | – |
| z2:0 | x5' x6 + x3' x5 | – | – |
| z3:1 | x1' x3' + x3' x5 + x2' x4 | x3' x5 | – |
| z3:0 | x1' x3 | – | x2 x6 |
| z4:1 | x5' x6 | – | x2 x6 |
| z4:0 | x3' x5 + x2' x4 | x3' x5 | – |
| Y1 | – | x3 x5 | – |
| Y2 | x2 x6 | – | x2 x6 |
| Y3 | x3' x5 + x1' x3' | x3' x5 | – |

Some input combinations make two conditions true at once. One case is `z2:1` and `z2:0`
together in y1. Another is both `Y2` and `Y3` in y1. The design procedure that produces such
equations guarantees these combinations never occur in the state concerned while the unit
runs as specified. The hardware does not resolve them; assertions flag them (see
"Departures and design choices").

## Storage fields

For state y_k the relevant sets are:

* **X/F^k**: the inputs any identifying function of y_k depends on. These become the field's
  address lines.
* **Z/y_k ∪ Y/y_k**: the change lines that can be 1 in y_k. These become the field's data
  bits.

| field | address inputs (X/F^k) | data lines | memory parts |
|-------|------------------------|------------|--------------|
| y1 | x1 x2 x3 x4 x5 x6 (6) | z1:1 z2:1 z2:0 z3:1 z3:0 z4:1 z4:0 Y2 Y3 (9) | 4 |
| y2 | x1 x3 x5 (3) | z1:0 z3:1 z4:0 Y1 Y3 (5) | 1 |
| y3 | x2 x6 (2) | z1:1 z3:0 z4:1 Y2 (4) | 1 |

The wiring follows fixed rules:

* Address lines take the field's inputs in ascending order onto C1, C2, ….
* Data outputs D1, D2, … map onto the field's lines in ascending line order.
* Unused address lines of a part are tied to 0.

The y1 field needs 6 address bits and 9 data bits, but a part has only 5 and 8. So it uses two
*banks* of two parts side by side:

* x1..x5 drive the address of all four parts.
* x6, together with y1, chooses which bank is enabled. Bank 0 is x6 = 0.
* Within a bank, the first part holds data bits 1..8 and the second holds bit 9.

`storage_field` works this out for any field size: 2^(A−R) banks for A address bits on R-input
parts, and ceil(O/S) slices for O lines on S-output parts.

**Microprogram construction rule.** Consider the part enabled in state y_k. Its data bit for a
line is 1 at every address where the line's identifying function is 1, and 0 at every other
address. The contents are therefore not stored as a table. `mpcu_pkg::field_word` computes them
at elaboration from the identifying functions in `mpcu_pkg::identify`, and `storage_field`
slices them into the `CONTENT` parameter of each `memory_unit`. For the y2 part, with address
order x1 x3 x5 and x1 as the leftmost bit, the rule gives:

| x1 x3 x5 | z1:0 | z3:1 | z4:0 | Y1 | Y3 |
|----------|------|------|------|----|----|
| 000 | 1 | 0 | 0 | 0 | 0 |
| 001 | 1 | 1 | 1 | 0 | 1 |
| 010 | 1 | 0 | 0 | 0 | 0 |
| 011 | 1 | 0 | 0 | 1 | 0 |
| 100 | 0 | 0 | 0 | 0 | 0 |
| 101 | 1 | 1 | 1 | 0 | 1 |
| 110 | 0 | 0 | 0 | 0 | 0 |
| 111 | 0 | 0 | 0 | 1 | 0 |

`tb_storage_field` checks the generated y2 part against this table.

**Joined outputs.** All fields share the 11 change lines. Real memory parts would drive them
with tri-state outputs, only the enabled part driving. In this RTL a disabled `memory_unit`
outputs 0 and the lines are the OR of all parts. This gives the same values as long as one
field is enabled, which the one-hot state guarantees.

## The processor and its timing

`mpcu_processor` holds everything except the memory:

* **Clock generator.** Produces the two phases C1 and C2 as alternating one-cycle enables of
  a single `clk`, starting with C1 after reset.
* **Input flip-flops.** Sample x in C1, so the memory sees stable inputs during C2.
* **Output flip-flops.** Set/reset flip-flops updated in C2. Set alone gives 1, reset alone
  gives 0, neither holds the value.
* **Clock enabling network and phase register.** The equations only say when a state bit
  goes from 0 to 1. The state must therefore stay unchanged when no `Y_j` is 1, so the phase
  register is clocked only in C2 with at least one `Y_j` = 1. It then loads the one-hot vector
  Y, which sets the new state and clears the old one.

A control step takes two `clk` cycles:

```
clk cycle   phase   what happens at the end of the cycle
   t         C1     xq <= x
   t+1       C2     z  <= (z | set) & ~reset;  if any Y: y <= Y
```

An input applied before cycle t therefore affects `z` and `y` two cycles later. Changing `x`
after the C1 edge has no effect on the current step. Reset (`rst`, synchronous, active high)
clears inputs and outputs and puts the unit in state y1.

## Module map

| file | role |
|------|------|
| `rtl/mpcu_pkg.sv` | sizes, line numbering, identifying functions, X/F and Z∪Y sets, construction rule |
| `rtl/mpcu_top.sv` | the control unit: processor + storage |
| `rtl/microprogram_storage.sv` | three fields, outputs joined |
| `rtl/storage_field.sv` | one state's field: input wiring, banks/slices of parts, enables, output wiring |
| `rtl/memory_unit.sv` | one 2^R x S read-only part with enable |
| `rtl/mpcu_processor.sv` | flip-flops, phase register, clock enabling, clock generator |
| `rtl/input_register.sv`, `output_register.sv`, `phase_register.sv`, `clock_enable_net.sv`, `clock_generator.sv` | processor parts |
| `tb/mpcu_ref_pkg.sv` | reference model: the sum-of-products equations written per line, and the legality test |
| `tb/tb_*.sv` | one self-checking testbench per module |

Line numbering used on every `lines` port:

* z_i:1 is bit 2(i−1).
* z_i:0 is bit 2(i−1)+1.
* Y_j is bit 8+(j−1).

`x[0]` is x1, `z[0]` is z1 and `y[0]` is y1.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/mpcu_pkg.sv tb/mpcu_ref_pkg.sv tb/tb_mpcu_top.sv --top-module tb_mpcu_top
./obj_dir/Vtb_mpcu_top
```

Replace `tb_mpcu_top` with any other testbench name to run that testbench.

`tb_mpcu_top` runs 3000 control steps of the full unit. In each step it picks a random input
combination that is legal in the current state and compares `z` and `y` with the reference
model after the C1 cycle and after the C2 cycle. It also checks that every step starts in C1.
It counts the following and fails if any of them never occurred:

* each of the five state transitions the equations define (y1→y2, y1→y3, y2→y1, y2→y3, y3→y2);
* a held state in each of the three states;
* an output being set;
* an output being reset;
* both banks of the y1 field;
* a reset in the middle of a run.

`tb_microprogram_storage` checks all 64 input combinations in every state, and the idle case
with no state active.

## Changing the control function

The control function is defined entirely in `mpcu_pkg`:

* `identify()` holds the identifying functions.
* `XF_MASK` holds each state's address inputs.
* `ZY_MASK` holds each state's data lines.
* `N_X`, `N_Z` and `N_Y` set the number of inputs, outputs and states.

`MEM_R` and `MEM_S` set the size of the memory parts. Field sizes, the number of parts per
field and all contents follow from these at elaboration. A mask that omits an input or line a
function really uses gives wrong contents. `tb_microprogram_storage` catches this, but only
after its reference model in `tb/mpcu_ref_pkg.sv` has been updated to the new equations.

## Departures and design choices

* **Clocking.** The two phases are enables of one clock, not two separate clock nets. Which
  phase drives which flip-flops (inputs in C1, outputs and state in C2) is this design's
  choice.
* **One-phase variant not built.** The structure can be modified to run on a one-phase clock
  for up to twice the speed. That variant is not built.
* **Single-rank phase register.** The phase register can be drawn as two ranks of flip-flops.
  Here it is one rank with a load enable, which gives the same state sequence in a synchronous
  design.
* **Reset.** Reset values (state y1, inputs and outputs 0) and synchronous reset are choices
  made here.
* **Tri-state outputs.** These are modelled as OR-joined outputs that are 0 while disabled.
* **Conflicting conditions.** These combinations never occur in correct operation:
  * If set and reset of one output are both 1 in C2, the output keeps its value and an
    assertion reports it.
  * If more than one `Y_j` is 1, the phase register would load a vector that is not one-hot,
    and an assertion reports it.
* **Bank assignment.** Which bank of the y1 field answers x6 = 0 is a free choice; here it is
  bank 0.
* **Unreached words.** Memory words a field can never address (unused high address lines) hold
  0.

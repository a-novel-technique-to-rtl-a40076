# MPSLM: a programmable logic cell with a built-in default function

The Modified Programmable Secured Logic Module (MPSLM) is a small,
run-time programmable logic cell with five inputs (A–E) and seven outputs
(F1–F7). It is built from four 3-input look-up tables, like an FPGA logic
element. Two things set it apart from a plain LUT cluster:

* **It is never blank.** An 8-bit *System Identification Number* (SIN) sits
  in on-chip ROM. After power-up every control word register is zero, and
  each LUT then implements the function whose truth table *is* the SIN. An
  observer sees a working module with some function. Nothing shows that it
  has not been configured yet.
* **Control words are scrambled by the SIN.** Between each register and its
  LUT, a *Bit Flipping Logic* block XORs the stored word with the SIN. To get
  a truth table `T`, the user must store `T ^ SIN`. The same stored word
  gives different functions on modules with different SINs, so a
  configuration copied from one module does not work on another. Nothing
  tells the person loading a word whether it was the right one. SINs are
  meant to be handed out one per manufacturer or application (256 of them).

This gives copy resistance without bit-stream encryption hardware, at the
cost of an 8-bit XOR per LUT. Note that the scrambling is a fixed XOR. Anyone
who knows the SIN, or who can observe the default function (which *is* the
SIN), can undo it. The scheme hides configurations from someone who does not
know the architecture. It is not cryptography.

## From stored words to functions

Each LUT `Mk` reads its 8-bit truth table as `cw_k = CWR_k ^ SIN`. Its three
inputs are C, D and E, with C the most significant. Bit `i` of the word is
the output for input index `i = {C,D,E}`. When the word is written MSB first,
bit 7 comes first.

Example: SIN `01001001` has bits 6, 3 and 0 set. Those are input
combinations 110, 011 and 000. So with all registers cleared, F1–F4 each
compute `Z = CDE' + C'DE + C'D'E'`. That is `ABC' + A'BC + A'B'C'` with the
LUT's own inputs renamed. A module with SIN `00101000` instead defaults to
`CD'E + C'DE`.

The LUT outputs are combined by three 2-channel multiplexers:

| output | source | function of |
|---|---|---|
| F1..F4 | LUT M1..M4 | C, D, E |
| F5 | M5 = B ? M2 : M1 | B, C, D, E |
| F6 | M6 = B ? M4 : M3 | B, C, D, E |
| F7 | M7 = A ? M6 : M5 | A, B, C, D, E |

Because of this mux ordering, the four bytes form one 32-bit truth table for
F7, indexed by `{A,B,C,D,E}`:

    T[31:24] -> M4   T[23:16] -> M3   T[15:8] -> M2   T[7:0] -> M1

To implement a 5-variable function `T`, write `T[8k+7:8k] ^ SIN` to the
register of LUT M(k+1). To implement a single 3-variable function on F1,
write `T3 ^ SIN` to M1's register only. The other three registers can stay
zero; their LUTs then keep the SIN function.

## Programming interface

| port | width | meaning |
|---|---|---|
| `clk` | 1 | clock for register writes |
| `rst_n` | 1 | active-low asynchronous reset; clears every register |
| `pm` | 1 | 1 = program mode, 0 = function mode |
| `addr` | 3 | register address |
| `data` | 8 | control word bus |
| `a`, `b` | 1 | variables A, B (mux selects) |
| `cde` | 3 | variables C, D, E (`cde[2]` = C) |
| `f` | 7 | F1..F7, `f[0]` = F1 |

Register map (`mpslm_pkg::reg_addr_e`):

| addr | register |
|---|---|
| 0..3 | control word register of LUT M1..M4 |
| 6 | OCwR, the output control word register |
| 4, 5, 7 | none; writes are ignored |

**Program mode (`pm = 1`).** The address decoder raises the strobe for
`addr`. On the rising edge of `clk`, `data` is stored in that register.
While `pm` is 1, the LUTs see the SIN alone. The module shows its default
function until programming ends, so a half-loaded configuration never
appears at the outputs.

**Function mode (`pm = 0`).** No register can be written. The LUTs see
`CWR ^ SIN`. The outputs are combinational in the inputs and the registers.

**Output control.** OCwR bit `i` = 1 forces F(i+1) to 0. Bit 7 is unused.
OCwR resets to zero, so after reset every output is enabled and the default
function is visible. An OCwR write takes effect from the clock edge that
stores it, even during program mode.

**Latency.** A register write needs one clock edge. There is no other
sequential behaviour; everything from the inputs to F1–F7 is combinational.

## Where this RTL makes its own choices

The block structure follows the source description: SIN ROM, four control
word registers, four Bit Flipping Logic blocks, four 3-input LUTs, three
2-channel muxes, an address decoder with outputs 0–6 gated by `pm`, and an
output block fed by OCwR. The following were not specified and are choices
of this implementation:

* **Clocking and reset.** The clock, the synchronous write, and the
  asynchronous active-low reset to zero are all choices of this design. The
  source only requires the registers to be zero at power-up.
* **Register map.** Only decoder output 6 is known to reach the output
  block. Addresses 4 and 5 were kept free.
* **LUT inputs and mux selects.** The inputs are C, D, E, matching "A, B not
  used" for 3-variable functions. A drives M7's select and B drives the
  selects of M5 and M6. Select 0 passes the lower-numbered LUT.
* **Bit order.** The truth-table bit order was fixed from the SIN examples
  above, which it reproduces exactly.
* **XOR pairing.** The Bit Flipping Logic pairs register bit `i` with SIN
  bit `i`.
* **Program mode shows the SIN.** The source says that in program mode the
  module implements the function based on the SIN. That is taken literally:
  the stored words are masked off while `pm = 1`.
* **Output enable encoding.** The encoding of OCwR is this design's
  (1 = disable, a disabled output drives 0). The source says only that the
  latched bits decide which outputs are enabled. OCwR is an edge-triggered
  register rather than a transparent latch.
* **Sixth register.** The parent design (the unmodified PSLM) has a sixth
  8-bit register where this module has the SIN ROM. Here the ROM is the
  top-level parameter `SIN`, default `8'b01001001`, which synthesis turns
  into constants, as a mask ROM would be.

Not built: the wider versions (more variables) the source mentions as
future extensions.

## Files

| file | contents |
|---|---|
| `rtl/mpslm_pkg.sv` | sizes, `cw_t`, `addr_t`, register-map enum |
| `rtl/mpslm.sv` | top level; parameter `SIN` |
| `rtl/lut3.sv` | N-input LUT (`N_IN = 3`) |
| `rtl/bit_flip_logic.sv` | register ^ SIN |
| `rtl/mux2.sv` | 2-channel mux (M5, M6, M7) |
| `rtl/addr_decoder.sv` | `pm`-gated one-hot write strobes, with a one-hot assertion |
| `rtl/cw_reg.sv` | 8-bit control word register, reset to zero |
| `rtl/output_block.sv` | per-output disable from OCwR |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_mpslm.sv` | end-to-end test of the top at default parameters |
| `tb/tb_mpslm_workloads.sv` | reference functions on four modules with different SINs |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. It has a watchdog that counts a failure if the test hangs. For
example:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/mpslm_pkg.sv tb/tb_mpslm.sv --top-module tb_mpslm -Mdir obj
    ./obj/Vtb_mpslm

For a block test, replace `tb_mpslm` with `tb_lut3`, `tb_cw_reg`, and so on.

What the tests cover:

* **`tb_lut3`** checks all 256 words against all 8 inputs, plus both SIN
  examples written as sums of products.
* **`tb_bit_flip_logic`** checks random words, and checks that `T ^ SIN`
  gives back `T` for every SIN.
* **`tb_mux2`** and **`tb_addr_decoder`** are exhaustive.
* **`tb_cw_reg`** checks reset, write, hold, and an asynchronous reset in
  mid-run.
* **`tb_output_block`** checks random values and masks.
* **`tb_mpslm`** uses a reference model and checks all 32 input
  combinations after every step. It covers:
  * the default SIN function after reset;
  * 24 random 32-bit configurations;
  * the SIN function held during program mode;
  * F7/F5/F6/F1..F4 against the truth table;
  * unscrambled words giving a different function;
  * ignored writes in function mode and to unmapped addresses;
  * output masking with its one-edge latency;
  * a mid-run reset.

  It counts each of these events and fails if any never happened.
* **`tb_mpslm_workloads`** loads eight reference 3-variable functions, four
  at a time and then one at a time in M1. It checks the default function of
  SIN `00101000`. It loads a full adder (sum on F1, carry on F2) into
  modules with SIN `00010011` and `10000001`: their control words differ,
  and each module's words fail as a full adder on the other module. Finally
  it loads a 4-variable parity on F5 and a 5-variable function on F7.

## Size

Coarse synthesis of the default top gives 42 word-level cells and 39
flip-flop bits: four 8-bit control word registers and the 7 used bits of
OCwR (its unused bit is removed). For comparison, the source reports that its
own implementation on a small Spartan-3E FPGA used 40 slices and 58 4-input
LUTs.

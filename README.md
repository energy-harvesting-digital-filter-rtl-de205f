# Two-speed radix-4 Booth multiplier with SPST adder and modified Kogge-Stone adder

This is a serial-parallel signed multiplier that takes one radix-4 Booth digit of the multiplier per step. Because it is serial, it is small, and in many workloads most Booth digits are zero. The design uses that. A step whose digit is zero only shifts and takes one short clock period. A step with a non-zero digit has to go through the adder and gets several clock periods. The multiplier therefore runs at two speeds, and its latency depends on the operand.

Three more ideas reduce the energy and the adder cost:

* **Spurious power suppression (SPST):** the adder's upper half is isolated whenever its operands there are only sign bits. Its result is then rebuilt by a few gates.
* **Modified Kogge-Stone adder (MKSA):** both halves of the adder use a Kogge-Stone parallel prefix network with the redundant black cells removed.
* **Controller optimisations:** the product is taken straight from the shifter, and the controller needs no second counter.

The default build multiplies two signed 32-bit numbers into a 64-bit product in 16 Booth steps.

## Operation

Top module: `spst_tsm` (`rtl/spst_tsm.sv`).

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | start a multiplication; sampled only while idle |
| `a` | in | WIDTH | signed multiplicand, captured at start |
| `b` | in | WIDTH | signed multiplier (Booth recoded), captured at start |
| `product` | out | 2*WIDTH | signed product |
| `busy` | out | 1 | high from the cycle after start until the last step |
| `done` | out | 1 | one-cycle pulse in the last busy cycle |

`product` is already correct in the `done` cycle. It then holds its value until the next `start`.

### Latency

Let N = WIDTH/2 be the number of Booth digits, and let O be the number of those digits that are non-zero. A multiplication then takes

    busy cycles = (N - O) + O * KP,     so N <= cycles <= N * KP

The bounds are reached as follows:

* **N cycles:** b = 0 or b = -1, where every digit is skipped.
* **N * KP cycles:** for example b = 0x5555_5555, where no digit is zero.

The next operation can be started in the cycle after `done`.

## The product register and one step

The product register `P` is `2*WIDTH+3` bits wide and holds three fields, `{H, L, e}`:

* **`H`** (WIDTH+2 bits): the signed accumulator.
* **`L`** (WIDTH bits): holds the part of the multiplier not yet consumed. As it empties, it fills with the low half of the product.
* **`e`** (1 bit): the Booth overlap bit y[2j-1] under the current digit. It is 0 at the start.

At `start`, P is loaded with `{0, b, 0}`. Each step then runs these five stages, one module each:

1. **`booth_encoder`** recodes the window `P[2:0]` into a digit:

   | window | digit | window | digit |
   |---|---|---|---|
   | 000 | 0 | 100 | -2A |
   | 001 | +A | 101 | -A |
   | 010 | +A | 110 | -A |
   | 011 | +2A | 111 | 0 |

2. **`tsm_control`** raises `skip` when the window is 000 or 111.
3. **`pp_generator`** forms 0, A or 2A sign-extended to WIDTH+2 bits. For a negative digit it outputs the one's complement and sets `cin`, and the adder's carry-in adds the missing 1.
4. **`spst_adder`** adds the partial product to `H`.
5. **`tsm_shifter`** selects `H` (when skipping) or the sum. It then shifts the whole register right by two places, with the sign copied into the two vacated top bits.

After N steps, `{H[WIDTH-1:0], L}` is the product.

`H` does not overflow. After each shift its magnitude is below 2^WIDTH / 3, and a partial product is at most 2^WIDTH. Their sum therefore fits in WIDTH+2 signed bits.

### Two speeds: a multicycle adder path

The adder's inputs come from registers: `H`, the multiplicand register, and `P[2:0]`. During a non-skipped step these registers do not change for KP cycles, so the adder has KP clock periods to settle. The controller tracks the wait with a KP-bit one-hot phase register instead of a counter and comparator. The step fires when the last phase bit is set.

For a skipped digit the step fires in its first cycle. Only the shift path matters then, and that path is short.

For timing analysis, declare the path from `p_reg`/`a_reg` through `spst_adder` to `p_reg` as a KP-cycle multicycle path. KP (default 2) should be the smallest integer no less than the adder delay divided by the clock period.

### The controller's counter

The digit counter is log2(N) bits wide and wraps after N steps.

`done` is raised with the N-th step. In that cycle `product` shows the shifter output, so no extra cycle is spent reading the register. In the cycles that follow, `product` is read from the register.

## SPST adder

`spst_adder` splits the WIDTH-bit addition (34 bits in the default multiplier) into a low part of WIDTH/2 bits and a high part. Each part is a separate MKSA, and the carry passes from the low part to the high part.

The detection logic checks the high part of each operand. If both are pure sign extensions (all zeros or all ones), the high adder has no useful work. Its operands are then forced to zero by AND gates, so it does not toggle. The high half of the sum is rebuilt from the two sign bits `sa`, `sb` and the low carry `c`:

| sa sb | high half of the sum |
|---|---|
| 0 0 | 0...0c |
| 1 1 | 1...1c |
| mixed | ~c ~c ... ~c |

In the multiplier this case is common. It happens when the multiplicand is small and the accumulator has not yet grown, which is typical of filter data with small coefficients. `msp_off` reports when the high adder is isolated.

The details of the technique are choices made in this design. These are the two-way split, isolation with AND gates rather than latches, and the compensation table. Only the idea is standard: suppress adder activity on sign-extension bits.

## Modified Kogge-Stone adder

`mksa_adder` is a parallel prefix adder built in three stages:

1. **Pre-processing:** g = a & b and p = a ^ b per bit. The carry-in is folded into bit 0's generate.
2. **Prefix network:** computes every carry G[i:0].
3. **Post-processing:** sum[i] = p[i] ^ G[i-1:0].

The network uses two kinds of cell:

* **Black cell:** builds a group generate and propagate, (G, P) = (Gh | Ph & Gl, Ph & Pl).
* **Grey cell:** forms a group generate only, G = Gh | Ph & Gl.

A plain Kogge-Stone adder has black cells for every power-of-two group at every bit. The modified version keeps only the black cells that some carry actually uses. It then reroutes each carry's final grey cell to join a shorter group with a prefix that is already finished.

The 8-bit network (the module's default width):

| level | black cells | grey cells (finished carries) | pass-through |
|---|---|---|---|
| 1 | 7:6 6:5 5:4 4:3 3:2 | 1:0 | 0, 2 |
| 2 | 7:4 6:3 | 3:0 = 3:2 + 1:0, 2:0 = 2 + 1:0 | 0, 1, 4, 5 |
| 3 | - | 7:0 = 7:4 + 3:0, 6:0 = 6:3 + 2:0, 5:0 = 5:4 + 3:0, 4:0 = 4:3 + 2:0 | 0..3 |

Compared with Kogge-Stone, the cells 2:1, 5:2 and 4:1 are gone, and the depth is still log2(8) = 3.

For other widths, the module applies one rule, which is this design's generalisation of the 8-bit network. It is written in `tsm_pkg::mksa_level()` and `tsm_pkg::mksa_black_mask()` and evaluated at elaboration time:

* Bit i falls in the segment [w/2, w), where w = 2^ceil(log2(i+1)).
* Its carry joins the group G[i : i-2^l+1] with the prefix G[i-2^l : 0].
* l is the largest level below log2(w) for which i-2^l >= max(1, w/2-2). If there is none, l = 0.
* A black cell is generated only if such a group, or a group built from it, needs it.

With this rule the lower half of every segment is finished one level before the upper half needs it, so the depth stays ceil(log2 WIDTH). The two 17-bit halves of the SPST adder are built this way.

## Files

| file | contents |
|---|---|
| `rtl/tsm_pkg.sv` | `booth_digit_t`, MKSA network rule |
| `rtl/booth_encoder.sv` | radix-4 Booth recoder |
| `rtl/pp_generator.sv` | partial product 0, +-A, +-2A |
| `rtl/mksa_adder.sv` | modified Kogge-Stone adder |
| `rtl/spst_adder.sv` | SPST adder (two MKSAs, detection, isolation, compensation) |
| `rtl/tsm_control.sv` | skip, KP-cycle wait, digit counter, done |
| `rtl/tsm_shifter.sv` | skip mux, sign shift, 2-bit shifter |
| `rtl/spst_tsm.sv` | top: registers and wiring |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_spst_tsm_w64` |

### Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `spst_tsm` | `WIDTH` | 32 | operand width; must be even; N = WIDTH/2 |
| `spst_tsm` | `KP` | 2 | cycles given to a non-skipped addition (>= 1) |
| `mksa_adder` | `WIDTH` | 8 | up to 256 |
| `spst_adder` | `WIDTH`, `LSP_W` | 34, WIDTH/2 | |
| `tsm_control` | `N`, `KP` | 16, 2 | |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. Each one has a watchdog. For example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/tsm_pkg.sv tb/tb_spst_tsm.sv --top-module tb_spst_tsm
    ./obj_dir/Vtb_spst_tsm

What each testbench checks:

* **`tb_spst_tsm`** runs the default 32-bit multiplier on a set of operand pairs: known pairs such as 7 x 37 = 259 and 35 x 5 = 175, sign corners (including -2^31 x -2^31), and several hundred random pairs. For every pair it checks:
  * the product against a 64-bit multiplication;
  * the busy time against (N - O) + O*KP;
  * that the product is valid at `done` and held afterwards.

  It also counts skipped digits, slow digits, negative digits, and SPST isolation on and off, and it fails if any of these never occurs.
* **`tb_spst_tsm_w64`** runs the same checks for 64-bit operands with KP = 3.
* **`tb_mksa_adder`** checks the 8-bit adder exhaustively and compares its black and grey cells with the table above. It also checks 34- and 64-bit adders on random inputs and full carry chains.
* **The other testbenches** test their module on its own.

## Departures and limits

* **Digital filter:** the multiplier is the design's core. A digital filter built around it is only its intended application; no filter is included.
* **Energy harvesting:** no energy-harvesting supply is included either.
* **Alternative adders:** Brent-Kung and Ladner-Fischer adders are only alternatives to the MKSA and are not included. Neither is a plain Kogge-Stone adder.
* **KP:** KP = 2 is an assumed value. The right value depends on the adder delay of the target technology.
* **Operand width:** the default is 32 bits. A 64-bit build is obtained with `WIDTH = 64` and is tested.
* **SPST details:** the gate-level details of the SPST adder and the MKSA rule for widths other than 8 are this design's own (see above).
* **Shift order:** the shift of the adder's result is placed after the skip multiplexer, so one shifter serves both the skip and the add path. Shifting before the multiplexer would give the same result.
* **Timing:** the adder is a true multicycle path. A static timing setup must declare it as one, or the clock must be slowed to the adder delay.
* **Power:** nothing in the RTL measures power. The energy savings of skipping and of SPST depend on gate-level activity, which a cycle-based simulation does not show.

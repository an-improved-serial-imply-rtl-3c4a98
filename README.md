# Input-preserving serial IMPLY adder, multiplier and MAC

In memristive in-memory computing, logic is done by the memory cells themselves.
Material implication (IMPLY) is the usual stateful logic: two memristors `p` and
`q` driven together compute `q' = p -> q = !p | q`, and the result overwrites
`q`. Together with FALSE (resetting a cell to 0), this is a complete logic set.
In the *serial* topology a row of memristors has a single computational section,
so each step does exactly one IMPLY or one FALSE.

Classic serial IMPLY full adders overwrite both operands. That is fine for one
addition. But a multiplier or a neural-network multiply-accumulate adds the same
operand (a weight) again and again. Each reuse then needs a COPY to restore it,
which costs 3 steps per bit. The adder here uses one extra work memristor
(2n+4 cells instead of 2n+3) so that operand `a` is never written:

* the sum replaces `b`;
* the carry-out replaces the carry cell `c`;
* each bit costs 20 steps, so an n-bit addition costs 20n steps (640 for n = 32).

The same adder drives a shift-and-add multiplier and an 8 x 8 into 32-bit MAC.
In both, the multiplicand or weight stays in the array for as many operations as
needed.

This RTL is a **logic-level model**. Every memristor is one flip-flop bit
(1 = low resistance R_on, 0 = high resistance R_off). One clock cycle is one
IMPLY/FALSE step. The controllers that sequence the steps are ordinary
synthesizable logic. The analog side is not modelled: voltages, thresholds,
resistance spread and the 30 µs pulse per step.

## The 20-step full adder

Per bit the adder uses the cells `a`, `b` and `c` (carry in, then carry out)
and the work cells `w1`, `w2` and `w3`. It first builds three intermediate terms:

* `X = !a -> b = a | b` (stored over `b` at step 4);
* `Y = a -> !b = NAND(a, b)` (stored in `w2` at step 5);
* `Z = Y -> c = ab + c` (stored over `c` at step 8).

After step 5 `a` is never touched again. The outputs are:

    Sum  = (X -> Z) -> !((Y -> !X) -> !c)
    Cout = !(X -> !Z)   = (a | b)(ab + c)  = majority(a, b, c)

| step | operation | result | step | operation | result |
|---|---|---|---|---|---|
| 1 | FALSE(w1,w2,w3) | | 11 | w1 = w3 -> w1 | (Y -> !X) -> !c |
| 2 | w1 = a -> w1 | !a | 12 | FALSE(w3) | |
| 3 | w2 = b -> w2 | !b | 13 | w3 = c -> w3 | !Z |
| 4 | b = w1 -> b | X | 14 | w3 = b -> w3 | X -> !Z |
| 5 | w2 = a -> w2 | Y | 15 | c = b -> c | X -> Z |
| 6 | FALSE(w1) | | 16 | FALSE(b) | |
| 7 | w1 = c -> w1 | !c | 17 | b = w1 -> b | !((Y -> !X) -> !c) |
| 8 | c = w2 -> c | Z | 18 | b = c -> b | **Sum** |
| 9 | w3 = b -> w3 | !X | 19 | FALSE(c) | |
| 10 | w3 = w2 -> w3 | Y -> !X | 20 | c = w3 -> c | **Cout** |

Bit i+1 uses the carry left in `c` by step 20 of bit i. The stand-alone adder
writes its carry-in `cin` into `c` together with the operands. The multiplier
and MAC instead let step 1 of the first bit also reset `c` (`clr_carry`), which
gives a carry-in of 0 at no extra cost.
`rtl/add_seq.sv` issues this table. The testbenches check the sum, the carry,
the preserved `a` and the exact step count, against integer arithmetic.

## The IMPLY row (`imply_array`)

The row is `NCELLS` bits. Each cycle it applies one `imply_op_t` (defined in
`imply_pkg`):

* `OP_IMP`: `cell[q] <= !cell[p] | cell[q]`. Cell `p` is unchanged.
* `OP_FALSE`: clears `cell[q]` (if `q_en` is set) and any of cells 0..3 named by
  the 4-bit `clr` mask. This is how step 1 resets three work cells at once.
* `OP_NOP`: nothing changes.

Cells 0..3 are always `w1`, `w2`, `w3` and `c`, and operands start at cell 4.
Operands are placed by a masked parallel write (`load_en`, `load_mask`,
`load_val`). This write stands for ordinary crossbar writes and is not a logic
step. It wins over an operation in the same cycle. Reset clears every cell.
Assertions check that an IMPLY names two distinct cells that exist.

## Multiplication and multiply-accumulate (`mult_seq`)

The multiplier bits `x_k` are held by the controller, outside the array. For
each bit k:

* if `x_k = 1`, it runs the adder on the window `B[k+n-1:k] += A` (n bits,
  carry-in 0);
* if `x_k = 0`, it issues nothing.

This is the usual shift-and-add recursion, with a moving window in place of a
shift. The carry-out of each window addition is left in `c`. Where it goes next
is this design's choice, and it differs between the two units:

* **Multiplier (`MAC = 0`, `imply_multiplier`).** B starts at 0 and has 2n cells,
  so `B[k+n]` is still 0 when window k finishes. The carry is moved there in
  three steps: `FALSE(w1)`, `w1 = c -> w1`, `B[k+n] = w1 -> B[k+n]`. Each 1 bit
  of x costs 20n + 3 steps: 163 for n = 8.
* **MAC (`MAC = 1`, `imply_mac`).** The 32-bit accumulator holds an arbitrary
  running sum, so the carry must propagate. The controller runs the same 20-step
  adder over `B[31:k+n]`. Its `a` operand is a cell that always holds 0
  (`a_step = 0`), and the carry is kept from the window addition. A carry out of
  bit 31 is dropped, so the sum wraps modulo 2^32. Each 1 bit k costs
  20·8 + 20·(24 − k) steps, which is at most 4560 steps per MAC (x = 255).
  This is correct for any accumulator value, but slower than a scheme that knew
  where the carry stops. A serial in-memory row cannot know that without reading
  the cell.

The controllers also spend cycles that issue no array operation:

* one decision cycle per multiplier bit;
* one hand-over cycle after each window addition.

The `steps` outputs count only real IMPLY/FALSE steps.

## Units, interfaces and timing

`imply_top` holds three independent units. Each has its own row and its own
ports, and all share `clk` and the active-low asynchronous `rst_n`.

| unit | module | default size | cells | steps per operation |
|---|---|---|---|---|
| `add_*` | `serial_imply_adder` | N = 32 | 2N+4 = 68 | 20N = 640 |
| `mul_*` | `imply_multiplier` | N = 8 | 3N+4 = 28 | (20N+3) per 1 bit of x |
| `mac_*` | `imply_mac` | N = 8, ACC_W = 32 | N+ACC_W+5 = 45 | 20·(32−k) per 1 bit k of x |

All three use the same handshake:

1. While `busy` is low, pulse `load` to write operands (for the adder also
   `cin`). Use `load_a` / `load_w`
   to overwrite the kept operand, and `load_acc` with `acc_in` to preset the
   accumulator (0, or a bias).
2. Pulse `start`. The multiplier and MAC capture `x` at that edge.
3. Wait for the one-cycle `done`. Results are then valid on `sum`/`cout`,
   `product` or `acc`, and stay there until the next load or start.

The adder's `done` comes 20N + 1 cycles after `start`. The multiplier and MAC
also expose event pulses: additions started, carry transfers or ripples, and
skipped zero bits.

## How far to trust it, and where it departs

These parts follow the published algorithm:

* the step table;
* the 2n+4 cell count and the 20n step count;
* the preservation of `a`;
* the shift-and-add scheme;
* the 8-bit operands and the 32-bit MAC result.

Step 3 writes `!b` into `w2`, and `Y` is NAND(a, b). Both are fixed by what
later steps read: step 5 needs `!b` in `w2`, and the carry and sum only come out
right with these values.

These parts are this design's own choices:

* the cell layout;
* the load/start/done interface;
* the free carry-in reset in step 1 (multiplier and MAC) and the loaded
  carry-in (adder);
* the 3-step carry transfer in the multiplier;
* the constant-0 ripple in the MAC;
* the modulo-2^32 wrap;
* the accumulator preset;
* the decision and hand-over cycles.

The published MAC speed-up figures (17–20 %) rest on a step accounting that is
not given, so the MAC step counts here should not be compared with them.

Not built:

* the analog memristor and IMPLY circuit;
* the clipping/shifting requantisation logic outside the array;
* any storage or dataflow for a whole network. One MAC row holds one weight.

Every module has a self-checking testbench in `tb/`, with values worked out
independently of the RTL. Two more run workloads:

* `tb_full_adder_cases` runs the single-bit adder on all eight (a, b, c) inputs.
  It follows X, Y, Z, the sum and the carry step by step.
* `tb_nn_inference` runs five inferences of a 4-input neuron on four
  weight-stationary MAC rows. The weights are written only once. `tb_imply_top` runs all three units together at their
default sizes. It also checks that each mechanism occurs at least once: adder
carry, operand reuse, multiplier addition, transfer and skip, MAC ripple, skip,
wrap-around and weight reuse.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/imply_pkg.sv \
        tb/tb_imply_top.sv --top-module tb_imply_top -Mdir obj_top
    ./obj_top/Vtb_imply_top

Replace `tb_imply_top` with `tb_imply_array`, `tb_add_seq`,
`tb_serial_imply_adder`, `tb_mult_seq`, `tb_imply_multiplier`, `tb_imply_mac`,
`tb_full_adder_cases` or `tb_nn_inference`. Each testbench runs in well under a second.

To change the sizes, set the parameters of `imply_top` (`ADD_N`, `MUL_N`,
`MAC_N`, `MAC_ACC_W`) or of the unit modules. Cell indices are 8 bits wide
(`imply_pkg::CELL_AW`), so a row can have at most 256 cells.

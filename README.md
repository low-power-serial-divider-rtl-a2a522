# 4-bit serial divider by repeated subtraction

This is a small unsigned divider. It works out X / Y by subtracting the
divisor Y from the dividend X again and again. It counts the subtractions
until what is left is smaller than Y. The count is the quotient, and what is
left is the remainder. It needs only one adder, one register, one counter and
a few gates. It takes one clock per unit of the quotient, so 1111 / 0001 takes
15 clocks after the load.

The circuit was first published as a transistor-level design in a low-power
logic style (modified Gate Diffusion Input). That style changes transistor
count and power, not logic. This RTL gives the same logic at gate and register
level. It says nothing about power or area.

## How one subtraction works

The adder never subtracts directly. The divisor is inverted bit by bit, and
the adder's carry input is tied to 1, so the adder forms

    R + ~Y + 1  =  R - Y   (mod 16)

where R is the value in the register. The adder's final carry is 1 exactly
when R >= Y. This is the one's-complement method with the end-around carry
folded into the carry input. When the difference would be negative, the carry
is 0, and that 0 is what stops the division.

The carry is the only control signal:

* It is the counter's count enable. Each step with carry 1 adds one to the
  quotient.
* It is ORed with LOAD to give the register's clock enable. Each step with
  carry 1 replaces R by R - Y.
* When it is 0, register and counter both hold. Nothing further changes, so
  the result simply stays there. No state machine is needed.

Example, 1101 / 0100 (13 / 4):

| falling edge | register R | counter | carry (R >= 0100) |
|--------------|------------|---------|-------------------|
| load         | 1101       | 0000    | 1                 |
| 1            | 1001       | 0001    | 1                 |
| 2            | 0101       | 0010    | 1                 |
| 3            | 0001       | 0011    | 0: stop           |

Quotient 0011, remainder 0001.

## Using it

Ports of `serial_divider` (WIDTH = 4 by default):

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock; every state change is at its **falling** edge |
| `load`      | in  | 1     | 1 over a falling edge: load X into the register and clear the counter |
| `x`         | in  | WIDTH | dividend, needed only at the load edge |
| `y`         | in  | WIDTH | divisor, held for the whole division |
| `quotient`  | out | WIDTH | counter value |
| `remainder` | out | WIDTH | register value |
| `busy`      | out | 1     | adder carry: 1 while R >= Y, 0 when the result is final |

Sequence:

1. Hold Y. Put X on `x`, raise `load`, and let one falling edge pass.
2. Drop `load` before the next falling edge.
3. After floor(X / Y) more falling edges `busy` is 0. `quotient` and
   `remainder` are final and stay until the next load.

Change inputs while `clk` is high, well away from the falling edge.

Limits:

* **Y = 0 is not allowed.** The carry then never falls, and the counter keeps
  counting and wraps.
* X < Y is fine: `busy` is 0 right after the load, the quotient is 0 and the
  remainder is X.
* The quotient can be at most 2^WIDTH - 1, which X / 1 reaches. So the counter
  never overflows for a nonzero divisor.
* `busy` is combinational from the register and `y`. Changing `y` in the middle
  of a division changes the result.

## The blocks

`serial_divider` contains the following blocks:

* **`cla_adder`**: a carry-lookahead adder. Each bit i has a propagate term
  Pi = Ai xor Bi and a generate term Gi = Ai and Bi. Each carry is a two-level
  sum of products of those terms and C0:
  C1 = G0 + P0C0, C2 = G1 + P1G0 + P1P0C0, and so on up to
  C4 = G3 + P3G2 + P3P2G1 + P3P2P1G0 + P3P2P1P0C0. Then Si = Pi xor Ci. For
  other widths the RTL builds the same sums of products with loops.
* **`data_register`**: four bits. Per bit, a `mux2` with LOAD on its select
  takes the dividend (LOAD = 1) or the adder sum. A second `mux2` feeds the
  flip-flop's own output back while the clock enable is 0. Then comes an
  `ms_dff`.
* **`up_counter`**: a synchronous counter. Bit i toggles when
  t[i] = ce & q[0] & ... & q[i-1]. The count enable is the head of this AND
  chain, so 0 on it freezes every bit. That takes 3 two-input ANDs, 4 XORs
  and 4 flip-flops. Clear forces the next state to 0 and wins over the enable.
* **`mux2`**: out = a when s = 0, b when s = 1.
* **`ms_dff`**: a falling-edge D flip-flop.
* Glue in the top: four inverters on Y, the OR gate that forms the register
  enable, and the carry input tied high.

### Clocking: why the falling edge

The original flip-flop is a master-slave pair. The master latch is open while
the clock is high. The slave latch is open while the clock is low, through an
inverter. The output changes only when the clock falls, to the value D had just
before. `ms_dff` is written as one `always_ff @(negedge clk)` register, which
behaves identically. Written as two latches, the feedback through the counter
and the register would be reported as combinational loops by Verilator and by
synthesis, even though the two latches are never open together.

## Where this RTL makes its own choices

The published circuit leaves these points open. They are choices of this RTL:

* **Clear is synchronous.** The counter clears on the falling edge while
  `load` is 1, the same edge that loads the register.
* **The register's clock enable holds the value through a multiplexer.** The
  clock itself is not gated. This avoids a false falling edge if the enable
  drops while the clock is high.
* **`busy` is an output.** The original has no "done" signal. The carry already
  marks the end, so it is brought out.
* **No reset.** A load cycle initialises everything that matters.
* **WIDTH is a parameter.** The design is for 4 bits. Every block also works
  at other widths, for example 5 bits for 18 / 3.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `cla_adder_tb` | all 512 combinations of a, b and cin against the integer a + b + cin |
| `mux2_tb` | all 8 input combinations |
| `ms_dff_tb` | q follows d only at falling edges; no change at rising edges or in between |
| `up_counter_tb` | the full count 0..15, wrap-around, clear over enable, and 300 random ce/clr cycles against a model |
| `data_register_tb` | 400 random load/enable/data cycles against a model |
| `serial_divider_tb` | see below |
| `serial_divider_w5_tb` | WIDTH = 5: 18 / 3 and 200 random divisions, with result and latency |

`serial_divider_tb` runs at the default size. It does all 240 divisions with
X = 0..15 and Y = 1..15, and checks that after the k-th edge the quotient is k
and the register holds X - kY. It checks that `busy` falls after exactly
floor(X / Y) edges, and that the result then holds for three edges. It also
traces 13 / 4 through 1001, 0101, 0001, and checks that 15 / 15 gives 1
remainder 0. It counts the loads, steps, held results, divisions with
X < Y and the maximum quotient 1111, and fails if any of them never happens.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl tb/serial_divider_tb.sv \
              --top-module serial_divider_tb -o sim
    ./obj_dir/sim

Any other testbench runs the same way with its own name. Each runs in well
under a second. To change the width, set `WIDTH` on `serial_divider`. All
blocks follow it.

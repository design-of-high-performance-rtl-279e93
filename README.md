# SCS-MM-New: a radix-2 Montgomery multiplier with iteration skipping

This is synthesizable SystemVerilog for a low-cost Montgomery modular multiplier of
the "semi-carry-save" (SCS) kind. For an odd modulus `N < 2^k` and operands
`0 <= A, B < 2N` it computes

    S = A * B * 2^-(k+2) mod N,      0 <= S < 2N

so a result can go straight back in as an operand, as in RSA-style exponentiation.
The default size is k = 1024.

The intermediate sum stays in carry-save form `(SS, SC)`. Each loop cycle is one row of
full adders behind one 4-to-1 multiplexer, so there is no carry chain in the loop. The
usual costs of that approach are extra cycles for the precomputation and for the final
carry-save to binary conversion, plus one cycle per multiplier bit. Three ideas reduce
them:

* **One adder for everything.** The same adder row also precomputes `D = N + B` and
  converts the result to binary, by repeating `(SS, SC) = SS + SC + 0` until `SC = 0`.
  No separate carry-propagate adder is needed.
* **A configurable adder (CCSA).** Each cell is either a full adder (three-input
  carry-save addition, "1F_CSA") or two half adders in series (two two-input carry-save
  additions per cycle, "2H_CSA"). In 2H mode the precomputation and the conversion take
  half as many cycles.
* **Skipping.** An iteration with `A_i = q_i = 0` and both low carry-save bits zero
  would only divide by two. The previous iteration instead shifts its result by two and
  jumps over it. For random operands about a quarter of the iterations go away: at k = 1024
  a multiplication takes 763 loop cycles on average instead of 1030.

## The loop and why its low bits are simple

Textbook radix-2 Montgomery runs `S = (S + A_i*B + q_i*N) / 2` with
`q_i = (S + A_i*B) mod 2`. Here the operands are transformed first:

| register | value | reason |
|---|---|---|
| `N^` | `N + 1` | N is odd, so adding N when `q_i = 1` always carries out of bit 0. Adding N + 1 puts that carry in the operand instead. Bit 0 of the CSA sum is then 1, and the halving drops it. |
| `B^` | `8B` | The three low bits are zero, so `A_i*B` no longer enters `q_i`. |
| `D^` | `N^ + B^` | The operand for `A_i = q_i = 1`. It is precomputed by the adder row itself. |

Each iteration adds `x = 0, N^, B^, D^` for `(A_i, q_i) = (0,0), (0,1), (1,0), (1,1)`
(block `sm3`). Since `x_0 = 0` always and `x_1, x_2` are `q_i & N^_1`, `q_i & N^_2`, the
next quotient bits depend on only three low bits of `SS[i]` and `SC[i]`:

    SS[i+1]_0 = SS[i]_1 ^ SC[i]_1 ^ x_1          SC[i+1]_0 = SS[i]_0 & SC[i]_0
    q_{i+1}   = SS[i+1]_0 ^ SC[i+1]_0
    skip_{i+1} = !(A_{i+1} | q_{i+1} | SS[i+1]_0)
    q_{i+2}   = (SS[i]_2 ^ SC[i]_2 ^ x_2) ^ maj(SS[i]_1, SC[i]_1, x_1)

`skip_d` computes all of this during iteration i. The chosen `(q^, A^)` pair,
`(q_{i+2}, A_{i+2})` on a skip and `(q_{i+1}, A_{i+1})` otherwise, sits in a flip-flop at
the next edge. So in the next cycle, `sm3` selects `x` directly from flip-flops.

The loop runs iterations `i = -1 .. k+4`. Iteration -1 adds nothing and only primes
`q_0` and `A_0`. There are k+5 halvings against `8B`, giving the factor `2^-(k+2)`. The
last three iterations see `A_i = 0` and pull the value, which is below 17N inside the loop,
back under 2N.

**The registers hold the raw adder outputs** (sum vector, carry vector shifted left by one).
The division by two happens on the way back in: the operand multiplexers `M1`/`M2` feed
the adder with the registers shifted right by one, or by two after a skip. `M4`/`M5`
(`lsb_mux`) repeat the three low bits of that choice for `skip_d`, so its path does not
pass through the wide multiplexers.

A skip is only allowed while the skipped iteration is still inside the loop (`i+1 <= k+4`).
A skipped iteration still halves the value, so skipping past the end would add one halving
too many.

## The configurable carry-save adder

`cfa` is a full adder with a multiplexer on its third input and a gated generate term:

    alpha = 1:  s = a ^ b ^ x,    c = maj(a, b, x)
    alpha = 0:  s = a ^ b ^ cin,  c = (a ^ b) & cin,  cin = a_{j-1} & b_{j-1}

In 2H mode the first half adder's carry (`hc = a & b`) goes to the cell above. That cell's
second half adder adds it. A row of these cells (`ccsa`) therefore does exactly two
`SS + SC` carry-save steps per cycle, and the conversion ends about twice as fast. The
conversion ends when the zero detector (`zero_d`, a wide NOR over `SC`) sees `SC = 0`.
`SS` then holds the binary result. With random data this takes only a few cycles, because
it depends on the longest carry chain.

## One multiplication, cycle by cycle

| phase | cycles | adder mode | M1 / M2 inputs |
|---|---|---|---|
| start (idle) | 1 | - | - ; load `N^ = N+1`, `B^ = 8B`, A |
| PRE_INIT | 1 | 2H | `N^` / `B^` |
| PRE_CONV | until `SC = 0`, +1 | 2H | `SS` / `SC`; then `D^ <- SS`, clear `SS`, `SC` |
| LOOP | k+6 minus skips | 1F | `SS>>1` / `SC>>1`, or `>>2` after a skip |
| CONV_SHIFT | 1 | 2H | the last pending `>>1` or `>>2` |
| CONV | until `SC = 0`, +1 | 2H | `SS` / `SC` |
| DONE | 1 | - | `done` pulses; `result` valid |

Measured over random operands: 772 cycles per multiplication at k = 1024, and 38 at k = 32.

### Interface (`scs_mm_new`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse while `busy` is low. Operands are sampled in that cycle. |
| `a_in`, `b_in` | in | K+1 | operands, each below 2N |
| `n_in` | in | K | odd modulus |
| `busy` | out | 1 | high from the cycle after `start` until `done` |
| `done` | out | 1 | one-cycle pulse |
| `result` | out | K+1 | `A*B*2^-(K+2) mod N`, below 2N. It holds until the next start. |

Parameter `K` (default 1024). The internal datapath is K+6 bits wide.

## Files

`rtl/` has one unit per file. Each file opens with a comment on what it does and on its timing.

* `scs_mm_pkg.sv`: the operand-multiplexer select code and the control states.
* `cfa.sv`, `ccsa.sv`: the configurable adder cell and row.
* `opmux4.sv`: M1/M2. `sm3.sv`: the x selector. `lsb_mux.sv`: M4/M5.
* `skip_d.sv`: quotient look-ahead and skip detection. `zero_d.sv`: end of conversion.
* `a_shreg.sv`: the multiplier shift register. It shifts by one or two and offers `A_{i+1}` and `A_{i+2}`.
* `scs_ctrl.sv`: the control state machine.
* `scs_mm_new.sv`: the top. It instantiates all of the above and holds the `N^`, `B^`, `D^`, `SS`, `SC` and select registers.

## What follows the published architecture and what is this design's own

These parts follow the published SCS-MM-New architecture:

* the block set and how the blocks connect;
* the `N^` and `B^ = 8B` transformations;
* the precomputation of `D` and the conversion on the same adder until `SC = 0`;
* the 1F/2H adder;
* the skip rule and the look-ahead of `q` and `A`;
* iterations `-1 .. k+4`;
* the NOR zero detector.

These are choices made here, because the published description leaves them open:

* **The control part.** Its sequence, the start/busy/done handshake, the one-cycle DONE
  state and clearing `SS`/`SC` before iteration -1 are all chosen here.
* **`N^` is formed by an incrementer at load time.** This is a K-bit carry chain. It sits
  only between the operand input and the `N^` register, outside the loop.
* **The `x_1 = q_i & N^_1` term is kept in `skip_d`.** The published equations drop it on
  the premise that the two low bits of `N^` are zero. `N + 1` meets that only when
  `N mod 4 = 3`. With the term kept, any odd modulus works. For `N mod 4 = 3` the logic
  is the published logic. For other moduli it is one AND gate and one XOR input longer.
* **Widths and ranges.** The operand range (`A, B < 2N`), the K+6-bit datapath and the
  output range are derived here.
* **Multiplexer wiring.** `SS` and `N^` go to M1, and `SC` and `B^` to M2.
* **Gate-level forms.** The gate forms of `cfa` and `sm3` are functional equivalents. The
  published forms (a NAND2 plus an inverting 2-to-1 mux per cell, and a simplified 4-to-1
  mux) are not reproduced gate for gate.

Not included: the earlier multipliers used for comparison (the CSA-based, SCS-based and
modified SCS-based designs), and the non-configurable variant of the adder. Nothing here
checks the published delay and area figures (about 2.17 full-adder delays per cycle, about
9.88k full-adder areas). They depend on a standard-cell library.

## Verification and simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `scs_mm_new_tb` runs 120 multiplications at K = 32, and `scs_mm_new_full_tb` runs 6 at
  the default K = 1024. Both check each result with wide-integer arithmetic:
  `S < 2N` and `(S * 2^(k+2)) mod N == (A*B) mod N`.
* Both also compare the exact start-to-done cycle count against a word-level model of the
  skipping loop.
* Both count the mechanisms and fail if one never happens: skips, all four x selections,
  1F and 2H cycles, zero detection, moduli with `N mod 4 = 1` and `3`, and results fed back
  as operands.
* The unit testbenches cover the cells exhaustively (`cfa`, `lsb_mux`, and all 1024 input
  combinations of `skip_d`) or randomly against arithmetic references.
* `scs_ctrl_tb` plays the datapath around the control part.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/scs_mm_pkg.sv rtl/*.sv \
        tb/scs_mm_new_tb.sv --top-module scs_mm_new_tb -Mdir obj -o sim
    obj/sim

Replace the testbench file and the top module name to run another one. The full-size run
builds in under a minute and simulates in well under a second. Change `K` on the
`scs_mm_new` instance to try another key size. The datapath widths follow from it.

Two assertions guard the design. `scs_ctrl` checks that a skip only occurs where it is
allowed. `scs_mm_new` checks that the adder's top bits are never both set.

Known lint notes, left as they are:

* The top cell's carries in `ccsa` are unused by construction, and `carry[0]` is constant 0.
* Verilator notes that `rst_n` is used both as an asynchronous reset and in the assertions'
  `disable iff`.

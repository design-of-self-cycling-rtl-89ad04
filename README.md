# Self-cycling multiplier: an N x N multiplier built from one adder

An ordinary array multiplier for two N-bit numbers uses N x N bit slices. Each slice
ANDs one multiplicand bit with one multiplier bit and adds the result to a partial sum
and a carry. This design keeps a single slice and sends every partial product through it
in turn:

* the slice's **carry out** comes back as its own carry in on the next step, so the one
  slice walks along a whole row of the array;
* its **sum out** comes back as its sum in one row later, so the same slice also walks
  down the rows.

The product leaves the unit as a serial stream, least significant bit first. Very little
logic is spent: one full adder, one carry flip-flop, a (2N-1)-bit sum delay line, and
the counters that sequence the slots. The price is time: N(N+1) + N(N-1)/2 clock cycles
per product (26 for 4 x 4), one multiplication at a time.

The scheme was first worked out for quantum-dot cellular automata (QCA). In QCA the
clock zones of a wire already store one bit each, so a loop of wire acts as the delay
line. This RTL is a clocked, synchronous version of the same scheme. Its default size is
the 4 x 4 case, and a parameter sets any other width.

## The slot schedule

One clock cycle is one **slot**, in which the unit does one addition. A multiplication is
a sequence of rows, one for each multiplier bit b_j (j = 0 .. N-1). **Row j lasts N+1+j
slots**, numbered k = 0 .. N+j:

| slot k of row j | a, b fed to the unit | what it does |
|---|---|---|
| k < j | 0, 0 | **pass-through**: a low product bit that is already final rides through the unit unchanged, to keep its place in the sum loop |
| j <= k < j+N | a_(k-j), b_j | **partial product**: adds a_(k-j)·b_j + sum in + carry in |
| k = j+N | 0, 0 | **carry-to-sum**: the row's last carry becomes an ordinary sum bit |

Two control bits steer the loops in each slot:

* **controller C** = 0 only in slot 0 of a row. It clears the recycled carry, so each
  row starts with no carry.
* **controller S** = 0 in all of row 0 (there is no previous row to add) and in the
  carry-to-sum slot of every row (that weight is new in this row).

Each row is one slot longer than the one before. Slot k of row j must therefore receive
the sum from slot k of row j-1, which is exactly N+j slots earlier. The sum loop's delay
is set to N+j while row j runs.

All 2N sums of the last row are product bits, least significant first. For 4 x 4 they
are Sa0b0, Sa0b1, Sa0b2, Sa0b3, Sa1b3, Sa2b3, Sa3b3, Ca3b3. The first three reach the
last row through the pass-through slots. The last one is the final carry, turned into a
sum by the carry-to-sum slot.

### Worked example: 1111 x 1111

The four rows take 5 + 6 + 7 + 8 = 26 slots. `tb/tb_self_cycling_unit.sv` replays this
table and checks it in every slot:

```
row 0 (5 slots):  a·b  1 1 1 1 0      cin 0 0 0 0 0      sin 0 0 0 0 0      sum 1 1 1 1 0
row 1 (6 slots):  a·b  0 1 1 1 1 0    cin 0 0 1 1 1 1    sin 1 1 1 1 0 0    sum 1 0 1 1 0 1
row 2 (7 slots):  a·b  0 0 1 1 1 1 0  cin 0 0 0 1 1 1 1  sin 1 0 1 1 0 1 0  sum 1 0 0 1 0 1 1
row 3 (8 slots):  a·b  0 0 0 1 1 1 1 0 cin 0 0 0 0 1 1 1 1 sin 1 0 0 1 0 1 1 0 sum 1 0 0 0 0 1 1 1
```

The sin of each row is the previous row's sum, followed by one 0 in the carry-to-sum
slot. The last row's sums, LSB first, are 1000 0111, which is 1110 0001 = 225 = 15 x 15.

## Blocks

```
self_cycling_multiplier            top: operands in, product out (serial and parallel)
 ├─ input_sequencer                 row/slot counters; issues a, b, controller C/S, loop delay
 ├─ self_cycling_unit               the one adder with both loops
 │   ├─ carry_cycling_unit          adder + carry flip-flop + controller C gate
 │   │   └─ maj_full_adder          a AND b plus sum in plus carry in, in majority gates
 │   └─ sum_loop                    (2N-1)-bit sum history, tap = loop delay, controller S gate
 └─ output_lane                     collects the 2N product bits into a parallel word
scm_pkg                             slot_ctrl_t (a, b, ctrl_c, ctrl_s), row_len(), total_slots()
```

* **maj_full_adder** is built from three-input majority gates, the native gate of QCA:
  ab = MAJ(a,b,0), cout = MAJ(ab,cin,sin), sum = MAJ(~cout, cin, MAJ(ab,sin,~cin)). The
  gate arrangement is this design's choice. Only the arithmetic matters for the rest.
* **carry_cycling_unit** works on its own as a bit-serial adder. It registers carry
  out and returns it the next cycle, ANDed with controller C.
* **sum_loop** is a shift register holding the last 2N-1 sums. It returns the sum from
  `tap_len` cycles ago, ANDed with controller S. Only the tap moves from row to row;
  2N-1 bits is the longest delay needed (row N-1 reads row N-2, which is 2N-1 slots long).
* **input_sequencer** produces the schedule above from two counters. Changing N changes
  only this "input table" and the loop length.
* **output_lane** shifts in the last row's sums and copies them to `product`.

## Interface and timing (top: `self_cycling_multiplier`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous reset, active low |
| start | in | 1 | pulse while `busy` is low: captures `op_a`, `op_b` |
| op_a, op_b | in | N | unsigned operands |
| busy | out | 1 | slots are running |
| sum_out, carry_out | out | 1 | the unit's sum and carry in the current slot |
| sum_in, carry_in | out | 1 | the recycled sum and carry the unit used in the current slot |
| ctrl_c, ctrl_s | out | 1 | controller C and S of the current slot |
| prod_bit_valid | out | 1 | high in the last row's 2N slots: `sum_out` is a product bit |
| product | out | 2N | parallel product, held until the next one |
| done | out | 1 | one-cycle pulse when `product` is updated |

After the clock edge that samples `start`, `busy` rises and the first slot runs.
`busy` stays high for `total_slots(N)` cycles. `done` is high in the cycle after the
last slot, `total_slots(N) + 1` cycles after the start edge (27 for N = 4). A `start`
while `busy` is ignored. Each multiplication has the unit to itself, so products cannot
overlap.

Parameter `N` (default 4) sets the operand width. Counter and tap widths follow from it.
The logic grows only as log N apart from the 2N-1 sum bits and the registers for the
operands and product. Latency grows as 1.5·N².

## How this RTL relates to the QCA circuit

* **Slots instead of clock zones.** In QCA, each zone of a wire holds one bit during one
  phase of a four-phase clock. The original layout balances wire lengths, for example
  one extra zone on the carry-in wire, so that all three inputs of the final majority
  gate arrive together. Here each loop holds its bits in flip-flops and all slot inputs
  arrive in the same cycle, so none of that balancing exists in the RTL.
* **Latency.** The QCA layout is reported at 46 clock cycles per 4 x 4 result, counted in
  QCA clock cycles and including its wire delays. The RTL needs 26 slot cycles plus one
  for the parallel output. It follows the slot count of the predicted truth table, not
  the layout's delay.
* **The sum loop's delay changes from row to row.** The slot schedule, where every row is
  one slot longer and sum in equals the sum one row-length earlier, follows the
  predicted truth table exactly. How the QCA wire loop and its storage lane realise that
  delay is not described. The selectable tap on a (2N-1)-bit shift register is this
  design's own way of doing it.
* **Controllers.** Both controllers force their loop's bit to 0 in the slots where they
  are 0. Their slot patterns come from the truth table; generating them with counters is
  this design's choice.
* **This design's own additions:** the start/busy/done handshake, the reset, the
  parallel output register and the observation ports.
* **Not reproduced:** cell counts, area and simulation settings of the QCA layout. They
  have no meaning for a clocked netlist. The intermediate form that chains four
  carry-cycling units (one per multiplier bit) is also left out. The RTL goes straight to
  the single fully self-cycling unit.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| tb_maj_full_adder | all 16 input combinations against integer addition |
| tb_carry_cycling_unit | 200 bit-serial additions back to back. Half of them leave a carry in the loop, which controller C must clear. |
| tb_sum_loop | random sum stream, random delay and controller S, against a reference history |
| tb_self_cycling_unit | the 26-slot 1111 x 1111 table above: cin, sin, carry, sum in every slot, product 225 |
| tb_input_sequencer | 1111 x 1111 against the table's a, b, controller C columns; 50 random operand pairs against a reference schedule; slot count, last-row flags; start ignored while busy |
| tb_output_lane | 100 random words with idle gaps; product, done pulse, hold |
| tb_self_cycling_multiplier | default N = 4: 1111 x 1111 and all 256 operand pairs, serial and parallel product, latency 27 cycles. It counts that each mechanism occurs: recycled carry, recycled sum, controller C and S clearing, pass-through slots, a carry-to-sum slot carrying a 1, start ignored while busy. |
| tb_multiplier_widths | N = 2, 8, 16, 32 side by side (helper `mult_width_check`), random operands, product and latency |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/scm_pkg.sv tb/tb_self_cycling_multiplier.sv \
    --top-module tb_self_cycling_multiplier -Mdir obj -o sim
./obj/sim
```

Each test finishes in well under a second. To lint the design:
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/scm_pkg.sv rtl/self_cycling_multiplier.sv`.

## Changing the design

* **Width:** set `N` on `self_cycling_multiplier`. Nothing else changes.
* **Schedule:** all slot rules are in `input_sequencer` (the `always_comb` block) and
  `scm_pkg::total_slots`. If you change the row lengths, `tap_len` must still equal the
  length of the previous row, and `sum_loop`'s depth must cover the longest row before
  the last.
* **Adder:** `maj_full_adder` can be replaced by any full adder with the same ports.

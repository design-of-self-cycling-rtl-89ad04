// carry_cycling_unit: one bit-slice adder whose carry out is fed back as its
// own carry in on the next slot, so that a single slice does the work of a
// whole row of the array multiplier, one weight per slot.
//
// Each clock is one slot. In a slot the unit adds a AND b, the sum-in bit
// sin and the recycled carry, and presents sum_out and carry_out
// combinationally. carry_out is stored in a one-bit register; on the next
// slot it returns as cin, gated by controller C (ctrl_c = 0 forces the
// recycled carry to 0, which starts a new row).
//
// Following the document: the carry loop, its one-slot delay and the
// zeroing controller C. This design's own: one register per slot stands for
// the QCA clock zones of the loop, and rst_n (active low, synchronous)
// clears the stored carry.
module carry_cycling_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  input  logic ctrl_c,
  input  logic sin,
  output logic cin,
  output logic sum_out,
  output logic carry_out
);

  logic carry_q;
  logic ab_unused;

  assign cin = carry_q & ctrl_c;

  maj_full_adder u_fa (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .sin  (sin),
    .ab   (ab_unused),
    .sum  (sum_out),
    .cout (carry_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) carry_q <= 1'b0;
    else        carry_q <= carry_out;
  end

endmodule

// self_cycling_multiplier: an N x N unsigned multiplier that uses a single
// one-bit adder unit instead of the N x N slices of an array multiplier.
// The unit's carry out returns as its carry in on the next slot, and its
// sum out returns as its sum in one row later, so every partial product
// a_i * b_j passes through the same unit in turn: rows b_0 .. b_(N-1) one
// after the other, each from weight 0 upward. Area is traded for time.
//
// Blocks: input_sequencer (the input table: serial a/b bits and the two
// loop controllers), self_cycling_unit (adder, carry loop, sum loop) and
// output_lane (collects the 2N product bits).
//
// Interface and timing: pulse start with op_a/op_b while busy is low. The
// slots run for total_slots(N) = N(N+1) + N(N-1)/2 cycles (26 for N = 4);
// during the last 2N of them prod_bit_valid is high and sum_out carries the
// product bits, least significant first. One cycle after the last bit,
// product is updated and done pulses. One multiplication at a time; start
// is ignored while busy. sum_out, carry_out, sum_in, carry_in, ctrl_c and
// ctrl_s show the unit's signals in every slot, the same signals the
// document's layout simulation plots.
//
// The architecture and slot schedule follow the document; the clocked slot
// timing, the handshake and the parallel output are this design's own.
module self_cycling_multiplier
  import scm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   op_a,
  input  logic [N-1:0]   op_b,
  output logic           busy,
  output logic           sum_out,
  output logic           carry_out,
  output logic           sum_in,
  output logic           carry_in,
  output logic           ctrl_c,
  output logic           ctrl_s,
  output logic           prod_bit_valid,
  output logic [2*N-1:0] product,
  output logic           done
);

  slot_ctrl_t                 slot;
  logic [$clog2(2*N)-1:0]     tap_len;
  logic                       last_row, last_slot;

  input_sequencer #(.N(N)) u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .op_a      (op_a),
    .op_b      (op_b),
    .busy      (busy),
    .slot      (slot),
    .tap_len   (tap_len),
    .last_row  (last_row),
    .last_slot (last_slot)
  );

  self_cycling_unit #(.N(N)) u_unit (
    .clk       (clk),
    .rst_n     (rst_n),
    .a         (slot.a),
    .b         (slot.b),
    .ctrl_c    (slot.ctrl_c),
    .ctrl_s    (slot.ctrl_s),
    .tap_len   (tap_len),
    .sin       (sum_in),
    .cin       (carry_in),
    .sum_out   (sum_out),
    .carry_out (carry_out)
  );

  output_lane #(.N(N)) u_lane (
    .clk       (clk),
    .rst_n     (rst_n),
    .bit_valid (last_row),
    .bit_in    (sum_out),
    .last      (last_slot),
    .product   (product),
    .done      (done)
  );

  assign prod_bit_valid = last_row;
  assign ctrl_c         = slot.ctrl_c;
  assign ctrl_s         = slot.ctrl_s;

endmodule

// self_cycling_unit: the single adder unit of the self-cycling multiplier,
// with both its carry and its sum recycled. It is the carry-cycling unit
// (carry out back to carry in after one slot, through controller C) whose
// sum output also returns as its sum input, one row-length later, through
// the sum loop and controller S.
//
// Per slot (one clock) the caller supplies the serial bits a and b, the two
// controller bits and the current row's loop delay tap_len. The unit
// reports sum_out and carry_out of the slot, and the sin/cin it used.
// All outputs are combinational functions of the inputs and the stored
// state; the state (one carry bit, 2N-1 sum bits) updates on the clock.
//
// The structure follows the document; the register-per-slot timing and
// reset are this design's own choices.
module self_cycling_unit #(
  parameter int unsigned N = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    a,
  input  logic                    b,
  input  logic                    ctrl_c,
  input  logic                    ctrl_s,
  input  logic [$clog2(2*N)-1:0]  tap_len,
  output logic                    sin,
  output logic                    cin,
  output logic                    sum_out,
  output logic                    carry_out
);

  carry_cycling_unit u_carry (
    .clk       (clk),
    .rst_n     (rst_n),
    .a         (a),
    .b         (b),
    .ctrl_c    (ctrl_c),
    .sin       (sin),
    .cin       (cin),
    .sum_out   (sum_out),
    .carry_out (carry_out)
  );

  sum_loop #(.N(N)) u_sum (
    .clk     (clk),
    .rst_n   (rst_n),
    .sum_out (sum_out),
    .tap_len (tap_len),
    .ctrl_s  (ctrl_s),
    .sin     (sin)
  );

endmodule

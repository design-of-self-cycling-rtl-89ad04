// input_sequencer: plays the input table of the self-cycling multiplier.
// For every slot it tells the single adder unit which partial product to
// add and how to steer its carry and sum loops.
//
// Row j (0..N-1) lasts N+1+j slots, numbered k = 0..N+j:
//   k <  j        pass-through slot: a = b = 0; the low sum bits that are
//                 already final ride through the unit to keep their place
//   j <= k < j+N  partial-product slot: a = op_a[k-j], b = op_b[j]
//   k == j+N      carry-to-sum slot: a = b = 0; the row's last carry
//                 becomes a sum bit
// Controller C is 0 only in slot 0 of a row (the carry chain restarts);
// controller S is 0 throughout row 0 and in the carry-to-sum slot of every
// row. tap_len = N+j is the sum loop delay, the length of row j-1. The sums
// of row N-1, 2N slots, are the product bits, least significant first.
//
// Interface: a start pulse while idle captures op_a and op_b; the first
// slot is issued in the next cycle, with busy high, and the table runs for
// total_slots(N) cycles (26 for N = 4); last_row marks the product slots
// and last_slot the final one. start is ignored while busy, as the unit
// handles one multiplication at a time. The slot schedule follows the
// document's predicted truth table for the 4x4 case; generating it from
// counters, and the start/busy handshake, are this design's own.
module input_sequencer
  import scm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [N-1:0]            op_a,
  input  logic [N-1:0]            op_b,
  output logic                    busy,
  output slot_ctrl_t              slot,
  output logic [$clog2(2*N)-1:0]  tap_len,
  output logic                    last_row,
  output logic                    last_slot
);

  localparam int unsigned JW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned KW = $clog2(2 * N);

  logic [N-1:0]  a_q, b_q;
  logic [JW-1:0] row_q;
  logic [KW-1:0] k_q;

  int unsigned row_i, k_i;

  always_comb begin
    row_i     = int'(row_q);
    k_i       = int'(k_q);
    slot      = '0;
    tap_len   = KW'(N + row_i);
    last_row  = busy && (row_i == N - 1);
    last_slot = last_row && (k_i == 2 * N - 1);
    if (busy) begin
      slot.ctrl_c = (k_i != 0);
      slot.ctrl_s = (row_i != 0) && (k_i != N + row_i);
      if (k_i >= row_i && k_i < row_i + N) begin
        slot.a = a_q[k_i - row_i];
        slot.b = b_q[row_i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      row_q <= '0;
      k_q   <= '0;
      a_q   <= '0;
      b_q   <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        row_q <= '0;
        k_q   <= '0;
        a_q   <= op_a;
        b_q   <= op_b;
      end
    end else if (k_i == N + row_i) begin
      k_q <= '0;
      if (row_i == N - 1) busy  <= 1'b0;
      else                row_q <= row_q + 1'b1;
    end else begin
      k_q <= k_q + 1'b1;
    end
  end

  // The slot counter never passes the carry-to-sum slot of its row, and
  // the row counter never passes the last row.
  always_ff @(posedge clk) begin
    if (rst_n && busy)
      assert (k_i <= N + row_i && row_i < N)
        else $error("input_sequencer: slot %0d of row %0d out of range", k_i, row_i);
  end

endmodule

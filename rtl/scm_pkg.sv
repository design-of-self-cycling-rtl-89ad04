// scm_pkg: types and schedule arithmetic shared by the self-cycling
// multiplier blocks.
//
// A multiplication of two N-bit operands is played as a sequence of slots,
// one per clock. Row j of the multiplication (partial products a_i * b_j)
// lasts N+1+j slots: j pass-through slots that move the already-final low
// product bits along, N slots with real partial products, and one slot that
// turns the row's final carry into a sum bit. The per-slot control bits are
// bundled in slot_ctrl_t.
package scm_pkg;

  // Control bits applied to the adder unit in one slot.
  typedef struct packed {
    logic a;       // serial multiplicand bit (0 in pass-through slots)
    logic b;       // serial multiplier bit   (0 in pass-through slots)
    logic ctrl_c;  // controller C: 0 clears the recycled carry
    logic ctrl_s;  // controller S: 0 clears the recycled sum
  } slot_ctrl_t;

  // Number of slots in row j of an N x N multiplication.
  function automatic int unsigned row_len(int unsigned n, int unsigned j);
    return n + 1 + j;
  endfunction

  // Slots from the first slot of row 0 to the last slot of row N-1.
  function automatic int unsigned total_slots(int unsigned n);
    return n * (n + 1) + (n * (n - 1)) / 2;
  endfunction

endpackage

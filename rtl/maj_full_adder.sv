// maj_full_adder: the multiplication-addition bit slice of the multiplier,
// written in three-input majority gates, the native gate of quantum-dot
// cellular automata.
//
// It forms the partial product ab = a AND b (a majority gate with one input
// tied to 0) and adds it to the incoming sum bit sin and carry bit cin:
//   cout = MAJ(ab, cin, sin)
//   sum  = MAJ(~cout, cin, MAJ(ab, sin, ~cin))
// The slice's function (partial product plus sum in plus carry in) follows
// the multiplier's truth table; the particular gate arrangement is this
// design's own, as the layout's gate types are not given.
//
// Interface: all single-bit, purely combinational, no clock.
module maj_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic sin,
  output logic ab,
  output logic sum,
  output logic cout
);

  function automatic logic maj3(input logic x, input logic y, input logic z);
    return (x & y) | (y & z) | (x & z);
  endfunction

  logic inner;

  always_comb begin
    ab    = maj3(a, b, 1'b0);
    cout  = maj3(ab, cin, sin);
    inner = maj3(ab, sin, ~cin);
    sum   = maj3(~cout, cin, inner);
  end

endmodule

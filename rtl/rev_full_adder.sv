// Reversible full adder: s = a ^ b ^ ci, co = majority(a, b, ci), from three
// Feynman gates and one Fredkin gate.
//
// The carry of a full adder equals ci when a and b differ and equals a (= b)
// when they agree, so a Fredkin gate whose control is x = a ^ b selects it:
//   u_x    : Feynman(a, b)        -> a, x = a ^ b
//   u_copy : Feynman(ci, 0)       -> ci, ci_copy     (fan-out of ci)
//   u_cy   : Fredkin(x, a, ci)    -> x, co = x ? ci : a, garbage
//   u_sum  : Feynman(x, ci_copy)  -> x (garbage), s = x ^ ci
// Constant inputs: 1. Garbage outputs: 2, brought out on `garbage`.
// Longest path: Feynman, then Fredkin, then Feynman (three gate levels).
//
// Interface: a, b, ci in; s, co, garbage[1:0] out. Combinational.
// That the full adder is made of Feynman and Fredkin gates, with an XOR-based
// sum and a gate-controlled carry, follows the adder architecture; the exact
// netlist is this design's own.
module rev_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       ci,
  output logic       s,
  output logic       co,
  output logic [1:0] garbage
);
  logic a_fwd, x, ci_fwd, ci_copy, x_fwd;

  feynman_gate u_x    (.a(a),     .b(b),       .p(a_fwd),  .q(x));
  feynman_gate u_copy (.a(ci),    .b(1'b0),    .p(ci_fwd), .q(ci_copy));
  fredkin_gate u_cy   (.a(x),     .b(a_fwd),   .c(ci_fwd), .p(x_fwd), .q(co), .r(garbage[0]));
  feynman_gate u_sum  (.a(x_fwd), .b(ci_copy), .p(garbage[1]), .q(s));
endmodule

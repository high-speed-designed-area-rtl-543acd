// Reversible half adder: s = a ^ b, co = a & b, from two Feynman gates and one
// Fredkin gate.
//
// Structure (each gate output feeds at most one gate input):
//   u_copy : Feynman(b, 0)        -> b, b_copy        (fan-out of b)
//   u_and  : Fredkin(a, 0, b)     -> a, co = a & b, ~a & b (garbage)
//   u_xor  : Feynman(b_copy, a)   -> b (garbage), s = a ^ b
// Constant inputs: 2. Garbage outputs: 2, brought out on `garbage` so the
// reversible bookkeeping stays visible; the carry adder ignores them.
//
// Interface: a, b in; s, co, garbage[1:0] out. Combinational, one Fredkin
// plus one Feynman delay from input to output.
// The adder architecture calls for a reversible half adder built from Feynman
// and Fredkin gates but gives no gate-level netlist; this three-gate
// arrangement is this design's own.
module rev_half_adder (
  input  logic       a,
  input  logic       b,
  output logic       s,
  output logic       co,
  output logic [1:0] garbage
);
  logic b_fwd, b_copy, a_fwd;

  feynman_gate u_copy (.a(b),      .b(1'b0), .p(b_fwd),  .q(b_copy));
  fredkin_gate u_and  (.a(a),      .b(1'b0), .c(b_fwd),  .p(a_fwd), .q(co), .r(garbage[0]));
  feynman_gate u_xor  (.a(b_copy), .b(a_fwd), .p(garbage[1]), .q(s));
endmodule

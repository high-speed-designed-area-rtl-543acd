// Feynman gate (controlled NOT), the 2x2 reversible gate of the adder.
//
// It copies its control input to P and XORs it into the target input to
// give Q:  P = A,  Q = A ^ B.  The mapping (A,B) -> (P,Q) is one-to-one, so
// no information is lost. With B tied to 0 the gate makes a copy of A,
// which is how the adders below fan a signal out without breaking the
// one-output-feeds-one-input rule of reversible logic; with B used as data it
// is the XOR that builds every sum bit.
//
// Interface: a, b in; p, q out. Purely combinational, no clock.
// The gate's role (copying and XOR) is the one the adder architecture assigns
// to it; the exact equations are the textbook Feynman gate. P is a plain wire
// from A by definition of the gate.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule

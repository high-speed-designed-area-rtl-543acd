// Fredkin gate (controlled swap), the 3x3 reversible gate of the adder.
//
// The control A passes straight through to P. When A is 0, B goes to Q and C
// to R; when A is 1 the two data lines are swapped:
//   P = A,  Q = A ? C : B,  R = A ? B : C.
// As logic it is two 2:1 multiplexers sharing one select, which is how the
// adders use it: to steer a carry (full adder) or to form an AND with a
// constant-0 data input (half adder). The mapping is one-to-one and keeps the
// number of ones, so it is reversible and conservative.
//
// Interface: a, b, c in; p, q, r out. Purely combinational, no clock.
// The gate's role (controlled routing and multiplexing) follows the adder
// architecture; the equations are the textbook Fredkin gate. P is a plain
// wire from A by definition of the gate.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule

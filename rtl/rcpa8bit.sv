// rcpa8bit: three-operand binary adder built from reversible gates.
//
// {cout, sum} = a + b + c + cin for three N-bit operands (N = 8 by default).
// The addition runs in two stages, both made only of reversible full and half
// adders (Feynman and Fredkin gates):
//   1. rev_csa_row     - one reversible full adder per bit reduces a, b, c to
//                        a partial-sum word ps and a carry word pc, all bits
//                        in parallel (one full-adder delay).
//   2. rev_carry_chain - a cascade of reversible adders adds ps, pc shifted
//                        left by one, and cin into the final binary result.
//
// Interface: a, b, c [N-1:0], cin in; sum [N-1:0], cout [1:0] out.
// cout holds result bits N and N+1 (0..2). Purely combinational: no clock,
// the result is valid one stage-1 plus one stage-2 delay after the inputs
// change. The module and port names and the 8-bit width follow the adder's
// published block symbol; the two-bit carry-out and the exact split into a
// carry-save row and a ripple cascade are this design's choices.
module rcpa8bit #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic [1:0]   cout
);
  logic [N-1:0] ps, pc;

  rev_csa_row     #(.N(N)) u_csa   (.a(a), .b(b), .c(c), .ps(ps), .pc(pc));
  rev_carry_chain #(.N(N)) u_chain (.ps(ps), .pc(pc), .cin(cin), .sum(sum), .cout(cout));
endmodule

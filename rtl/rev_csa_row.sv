// Carry-save row of reversible full adders: the first stage of the
// three-operand adder.
//
// Bit i of the three operands enters full adder i; there is no connection
// between bit positions, so all N bits settle in parallel after one
// full-adder delay whatever N is. The row turns three words into two:
//   a + b + c == ps + 2 * pc     (as unbounded integers)
// ps[i] has weight 2^i and pc[i] has weight 2^(i+1).
//
// Interface: a, b, c [N-1:0] in; ps, pc [N-1:0] out. Combinational.
// N = 8 is the operand width of the adder this row belongs to. The garbage
// outputs of the reversible full adders are left unused here.
module rev_csa_row #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] ps,
  output logic [N-1:0] pc
);
  for (genvar i = 0; i < N; i++) begin : g_bit
    logic [1:0] garbage;
    rev_full_adder u_fa (
      .a(a[i]), .b(b[i]), .ci(c[i]),
      .s(ps[i]), .co(pc[i]), .garbage(garbage)
    );
  end
endmodule

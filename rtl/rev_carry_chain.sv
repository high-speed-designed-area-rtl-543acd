// Carry cascade of reversible adders: the second stage of the three-operand
// adder, turning the carry-save pair (ps, pc) and cin into a binary result.
//
// It computes {cout, sum} = ps + 2*pc + cin, N+2 bits in all:
//   bit 0      : half adder (ps[0], cin)              -> sum[0],  k[0]
//   bit i<N    : full adder (ps[i], pc[i-1], k[i-1])  -> sum[i],  k[i]
//   bit N      : half adder (pc[N-1], k[N-1])         -> cout[0], cout[1]
// The carry k ripples from bit 0 to bit N, so the delay grows linearly with N
// (about N full-adder carry paths).
//
// Interface: ps, pc [N-1:0] and cin in; sum [N-1:0] and cout [1:0] out.
// Combinational. cout holds result bits N and N+1: three N-bit operands plus
// a carry-in can reach 3*(2^N-1)+1, which needs two bits above the sum. The
// cascade of reversible full adders follows the adder architecture; using
// half adders at the two ends and a two-bit carry-out is this design's own.
module rev_carry_chain #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] ps,
  input  logic [N-1:0] pc,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic [1:0]   cout
);
  logic [N-1:0] k;        // carry out of bit i
  logic [1:0]   g_lo, g_hi;

  rev_half_adder u_ha_lo (.a(ps[0]), .b(cin), .s(sum[0]), .co(k[0]), .garbage(g_lo));

  for (genvar i = 1; i < N; i++) begin : g_bit
    logic [1:0] garbage;
    rev_full_adder u_fa (
      .a(ps[i]), .b(pc[i-1]), .ci(k[i-1]),
      .s(sum[i]), .co(k[i]), .garbage(garbage)
    );
  end

  rev_half_adder u_ha_hi (.a(pc[N-1]), .b(k[N-1]), .s(cout[0]), .co(cout[1]), .garbage(g_hi));
endmodule

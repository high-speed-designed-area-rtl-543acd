// End-to-end self-checking testbench for rcpa8bit at its default width
// (N = 8, no parameter override).
//
// Applies every one of the 2^(3N+1) input combinations (33,554,432 at N = 8)
// and compares {cout, sum} with a + b + c + cin computed as an integer here. It also computes the
// carry-save words independently and counts how often each mechanism of the
// adder was exercised:
//   cout = 0, 1 and 2          (all carry-out values)
//   cin = 1                    (carry-in used)
//   full-length carry ripple   (the stage-2 carry runs from bit 0 out of bit N-1)
//   top-bit carry-save carry   (pc[N-1] = 1, handled by the upper half adder)
// A mechanism that never occurred counts as a failure.
module rcpa8bit_tb;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, c, sum;
  logic         cin;
  logic [1:0]   cout;
  int checks = 0, failures = 0;
  int n_cout [3];
  int n_cin = 0, n_ripple = 0, n_pc_top = 0;

  rcpa8bit dut (.a(a), .b(b), .c(c), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] ta, tb, tc, input logic tcin);
    int exp_total;
    logic [N-1:0] ps, pc, prop;
    a = ta; b = tb; c = tc; cin = tcin;
    #1;
    exp_total = int'(ta) + int'(tb) + int'(tc) + int'(tcin);
    checks++;
    if ({cout, sum} !== (N+2)'(exp_total)) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%h b=%h c=%h cin=%b -> cout=%0d sum=%h expected %0d",
                 ta, tb, tc, tcin, cout, sum, exp_total);
    end
    // mechanism coverage, from an independent carry-save model
    ps   = ta ^ tb ^ tc;
    pc   = (ta & tb) | (ta & tc) | (tb & tc);
    prop = ps ^ {pc[N-2:0], 1'b0};
    if (exp_total >> N <= 2) n_cout[exp_total >> N]++;
    if (tcin) n_cin++;
    if (tcin && prop == '1) n_ripple++;
    if (pc[N-1]) n_pc_top++;
  endtask

  initial begin
    n_cout = '{0, 0, 0};
    apply('0, '0, '0, 1'b0);
    apply('1, '1, '1, 1'b1);          // largest total 3*255+1
    apply('1, '0, '0, 1'b1);          // carry ripples across every bit
    apply(8'h55, 8'hAA, 8'h00, 1'b1); // same, made of mixed operands
    apply(8'h80, 8'h80, 8'h80, 1'b0); // only top-bit carries
    apply(8'h01, 8'h01, 8'h01, 1'b1);
    for (longint v = 0; v < (longint'(1) << (3 * N + 1)); v++)
      apply(N'(v >> (2 * N + 1)), N'(v >> (N + 1)), N'(v >> 1), v[0]);
    $display("mechanisms: cout0=%0d cout1=%0d cout2=%0d cin=%0d full_ripple=%0d pc_top=%0d",
             n_cout[0], n_cout[1], n_cout[2], n_cin, n_ripple, n_pc_top);
    checks++;
    if (n_cout[0] == 0 || n_cout[1] == 0 || n_cout[2] == 0 || n_cin == 0 ||
        n_ripple == 0 || n_pc_top == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Exhaustive self-checking testbench for rev_half_adder: all four input
// pairs, checks s and co against the integer sum a + b.
module rev_half_adder_tb;
  logic a, b, s, co;
  logic [1:0] garbage;
  int checks = 0, failures = 0;

  rev_half_adder dut (.a(a), .b(b), .s(s), .co(co), .garbage(garbage));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({co, s} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b -> co=%b s=%b", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

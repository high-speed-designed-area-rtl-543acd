// Exhaustive self-checking testbench for rev_full_adder: all eight inputs,
// checks s and co against the integer sum a + b + ci.
module rev_full_adder_tb;
  logic a, b, ci, s, co;
  logic [1:0] garbage;
  int checks = 0, failures = 0;

  rev_full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co), .garbage(garbage));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} !== 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b -> co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

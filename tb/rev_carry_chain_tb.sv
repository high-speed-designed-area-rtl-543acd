// Self-checking testbench for rev_carry_chain at N = 8: the longest carry
// path, corner words and random words. Checks {cout, sum} against the integer
// ps + 2*pc + cin.
module rev_carry_chain_tb;
  localparam int unsigned N = 8;
  logic [N-1:0] ps, pc, sum;
  logic         cin;
  logic [1:0]   cout;
  int checks = 0, failures = 0;

  rev_carry_chain #(.N(N)) dut (.ps(ps), .pc(pc), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int exp_total;
    #1;
    exp_total = int'(ps) + 2 * int'(pc) + int'(cin);
    checks++;
    if ({cout, sum} !== (N+2)'(exp_total)) begin
      failures++;
      $display("FAIL ps=%h pc=%h cin=%b -> cout=%0d sum=%h expected %0d", ps, pc, cin, cout, sum, exp_total);
    end
  endtask

  initial begin
    ps = '1; pc = '0; cin = 1'b1; check();     // carry runs from bit 0 out of the top
    ps = '1; pc = '1; cin = 1'b1; check();     // largest total, cout = 2
    ps = '0; pc = '0; cin = 1'b0; check();
    ps = '0; pc = '1; cin = 1'b0; check();
    ps = 8'h55; pc = 8'h55; cin = 1'b1; check();
    for (int t = 0; t < 3000; t++) begin
      ps = N'($urandom); pc = N'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

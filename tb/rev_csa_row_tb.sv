// Self-checking testbench for rev_csa_row at N = 8: corner words and random
// words. Checks ps and pc bit by bit against XOR and majority of the three
// operand bits, and checks that ps + 2*pc equals a + b + c.
module rev_csa_row_tb;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, c, ps, pc;
  int checks = 0, failures = 0;

  rev_csa_row #(.N(N)) dut (.a(a), .b(b), .c(c), .ps(ps), .pc(pc));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [N-1:0] exp_ps, exp_pc;
    #1;
    exp_ps = a ^ b ^ c;
    exp_pc = (a & b) | (a & c) | (b & c);
    checks++;
    if (ps !== exp_ps || pc !== exp_pc) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h -> ps=%h pc=%h expected %h %h", a, b, c, ps, pc, exp_ps, exp_pc);
    end
    checks++;
    if (int'(ps) + 2 * int'(pc) != int'(a) + int'(b) + int'(c)) begin
      failures++;
      $display("FAIL weight a=%h b=%h c=%h", a, b, c);
    end
  endtask

  initial begin
    // every bit pattern of (a_i, b_i, c_i) on all bits at once
    for (int v = 0; v < 8; v++) begin
      a = {N{v[2]}}; b = {N{v[1]}}; c = {N{v[0]}};
      check();
    end
    for (int t = 0; t < 2000; t++) begin
      a = N'($urandom); b = N'($urandom); c = N'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

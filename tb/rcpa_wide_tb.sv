// Self-checking testbench for rcpa8bit widened to 16 and 32 bits through its
// N parameter. Random operands plus the all-ones and longest-ripple corners
// are checked against a + b + c + cin computed as a 64-bit integer.
module rcpa_wide_tb;
  logic [15:0] a16, b16, c16, s16;
  logic [31:0] a32, b32, c32, s32;
  logic        cin;
  logic [1:0]  co16, co32;
  int checks = 0, failures = 0;

  rcpa8bit #(.N(16)) dut16 (.a(a16), .b(b16), .c(c16), .cin(cin), .sum(s16), .cout(co16));
  rcpa8bit #(.N(32)) dut32 (.a(a32), .b(b32), .c(c32), .cin(cin), .sum(s32), .cout(co32));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] ta, tb, tc, input logic tcin);
    longint e16, e32;
    a16 = ta[15:0]; b16 = tb[15:0]; c16 = tc[15:0];
    a32 = ta; b32 = tb; c32 = tc; cin = tcin;
    #1;
    e16 = longint'(ta[15:0]) + longint'(tb[15:0]) + longint'(tc[15:0]) + longint'(tcin);
    e32 = longint'(ta) + longint'(tb) + longint'(tc) + longint'(tcin);
    checks += 2;
    if ({co16, s16} !== 18'(e16)) begin
      failures++;
      $display("FAIL N=16 a=%h b=%h c=%h cin=%b -> %h", a16, b16, c16, cin, {co16, s16});
    end
    if ({co32, s32} !== 34'(e32)) begin
      failures++;
      $display("FAIL N=32 a=%h b=%h c=%h cin=%b -> %h", a32, b32, c32, cin, {co32, s32});
    end
  endtask

  initial begin
    apply('1, '1, '1, 1'b1);
    apply('1, '0, '0, 1'b1);
    apply('0, '0, '0, 1'b0);
    for (int t = 0; t < 100000; t++)
      apply($urandom, $urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mult18x18: compares the 36-bit product with 64-bit integer
// multiplication on the extreme operands and random ones.
module tb_mult18x18;
  logic signed [17:0] a, b;
  logic signed [35:0] p;
  int checks = 0, failures = 0;

  mult18x18 dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [17:0] x, input logic [17:0] y);
    longint e;
    a = x; b = y; #1;
    e = longint'($signed(x)) * longint'($signed(y));
    checks++;
    if (longint'(p) != e) begin
      failures++; $display("FAIL %0d * %0d = %0d, expected %0d", $signed(x), $signed(y), p, e);
    end
  endtask

  initial begin
    check(18'h1FFFF, 18'h1FFFF);
    check(18'h20000, 18'h20000);
    check(18'h20000, 18'h1FFFF);
    check(18'h3FFFF, 18'h00005);
    check(18'h0, 18'h2ABCD);
    for (int i = 0; i < 500; i++) check(18'($urandom), 18'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

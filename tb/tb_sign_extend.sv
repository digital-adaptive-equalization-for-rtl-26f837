// tb_sign_extend: checks the two widths the equalizer uses (8 -> 18 and
// 16 -> 18) on corner values and random inputs against $signed arithmetic.
module tb_sign_extend;
  logic [7:0]  in8;   logic [17:0] out8;
  logic [15:0] in16;  logic [17:0] out16;
  int checks = 0, failures = 0;

  sign_extend #(.IN_W(8),  .OUT_W(18)) dut8  (.in_vec(in8),  .out_vec(out8));
  sign_extend #(.IN_W(16), .OUT_W(18)) dut16 (.in_vec(in16), .out_vec(out16));

  task automatic check(input logic [7:0] a, input logic [15:0] b);
    int e8, e16;
    in8 = a; in16 = b; #1;
    e8  = int'($signed(a));
    e16 = int'($signed(b));
    checks += 2;
    if (int'($signed(out8)) != e8) begin
      failures++; $display("FAIL 8->18: in %h out %h", a, out8);
    end
    if (int'($signed(out16)) != e16) begin
      failures++; $display("FAIL 16->18: in %h out %h", b, out16);
    end
  endtask

  initial begin
    check(8'h00, 16'h0000);
    check(8'h7F, 16'h7FFF);
    check(8'h80, 16'h8000);
    check(8'hFF, 16'hFFFF);
    for (int i = 0; i < 200; i++) check(8'($urandom), 16'($urandom));
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

// tb_equalizer: feeds random 16-bit samples through the 8-tap equalizer with
// random coefficients (changed every 10 samples), compares each output with
// an integer FIR model, and checks that done comes 3 rising edges after the
// edge that accepted start (accept, multiply, sum) and that busy covers the
// operation. Also checks the extreme operands (-128 * -32768 on all taps).
module tb_equalizer;
  import eq_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] sample_in = '0;
  logic [63:0] coeffs = '0;
  logic signed [31:0] y_out;
  logic done, busy;
  int checks = 0, failures = 0;
  int hist [8];

  equalizer dut (.clk, .rst_n, .start, .sample_in, .coeffs, .y_out, .done, .busy);

  always #5 clk = ~clk;

  task automatic push(input logic [15:0] s);
    int lat = 0;
    longint e;
    for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = int'($signed(s));
    @(negedge clk); sample_in = s; start = 1;
    @(posedge clk); #1 start = 0; lat = 1;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not set after start"); end
    while (!done) begin @(posedge clk); #1 lat++; end
    e = fir(coeffs, hist);
    checks += 2;
    if (lat != 3) begin failures++; $display("FAIL latency %0d, expected 3", lat); end
    if (longint'(y_out) != e) begin
      failures++; $display("FAIL y=%0d expected %0d", y_out, e);
    end
    @(posedge clk); #1;
    checks++;
    if (done || busy) begin failures++; $display("FAIL done/busy not cleared"); end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      if (n % 10 == 0) coeffs = {$urandom, $urandom};
      push(16'($urandom));
    end
    coeffs = {8{8'h80}};
    for (int n = 0; n < 8; n++) push(16'h8000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

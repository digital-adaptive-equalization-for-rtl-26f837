// tb_signalproc: drives the core exactly as software would (coefficients,
// statusIn[2] frame active, then per sample: signalIn, statusIn[0] up, wait
// for statusOut[0], statusIn[0] down) for several frames of random samples
// and coefficients, and checks against an integer model:
//   - signalOut after each sample (8-tap FIR, tap line kept across frames)
//   - statusOut[0] 4 cycles after statusIn[0] is raised
//   - statusOut[5:3] and [7:6] (sample count, state) during the frame
//   - errorRate and a single errorRateIsValid strobe after sample 12
//   - dataBlockOut (positions 8..15, >0 -> 1, LSB first), one strobe
//   - statusOut[2] after sample 16 and its clearing on acknowledge
//   - statusOutIsValid high whenever statusOut has just changed
//   - a frame abandoned half way returns the core to idle.
module tb_signalproc;
  import eq_ref_pkg::*;

  logic clk = 0, reset_b = 0;
  logic [63:0] coeffArrayIn = '0;
  logic [15:0] signalIn = '0;
  logic [7:0]  statusIn = '0;
  logic [7:0]  statusOut;
  logic statusOutIsValid, dataBlockIsValid, errorRateIsValid;
  logic [7:0]  dataBlockOut;
  logic [15:0] errorRate;
  logic signed [31:0] signalOut;
  int checks = 0, failures = 0;
  int hist [8];
  int err_strobes = 0, data_strobes = 0;
  logic [7:0] prev_status;

  signalproc dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (errorRateIsValid) err_strobes++;
    if (dataBlockIsValid) data_strobes++;
  end

  // statusOutIsValid must be high in every cycle in which statusOut differs
  // from its value in the previous cycle.
  always @(negedge clk) if (reset_b) begin
    if (statusOut != prev_status && !statusOutIsValid) begin
      failures++; $display("FAIL statusOut changed without statusOutIsValid");
    end
    prev_status = statusOut;
  end

  task automatic fail(input string s);
    failures++; $display("FAIL %s (t=%0t)", s, $time);
  endtask

  task automatic send_sample(input logic [15:0] s, input int p, inout longint err,
                             inout logic [7:0] bits);
    int lat = 0;
    longint e;
    for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = int'($signed(s));
    @(negedge clk); signalIn = s;
    @(negedge clk); statusIn[0] = 1;
    do begin @(negedge clk); lat++; end while (!statusOut[0] && lat < 50);
    e = fir(coeffArrayIn, hist);
    checks += 3;
    if (lat != 4) fail($sformatf("sample latency %0d, expected 4", lat));
    if (longint'(signalOut) != e) fail($sformatf("signalOut %0d expected %0d", signalOut, e));
    if (statusOut[5:3] != 3'(p + 1)) fail($sformatf("count %0d at sample %0d", statusOut[5:3], p));
    if (p >= 4 && p < 12) err += err_term(e, REF_PRS[p-4]);
    if (p >= 8) bits[p-8] = (e > 0);
    checks++;
    if (p < 15 && statusOut[7:6] != 2'd1) fail("state not ACTIVE after a sample");
    if (p == 15 && statusOut[7:6] != 2'd3) fail("state not FRAME_DONE after last sample");
    @(negedge clk); statusIn[0] = 0;
    @(negedge clk);
    checks++;
    if (statusOut[0]) fail("sample complete not cleared");
    if (p == 11 || p == 12) begin
      checks++;
      if (!statusOut[1]) fail("error complete not set after PRS window");
      if (errorRate != 16'(sat16(err))) fail($sformatf("errorRate %0d expected %0d", errorRate, sat16(err)));
    end else if (p < 11) begin
      checks++;
      if (statusOut[1]) fail("error complete set too early");
    end
  endtask

  task automatic run_frame();
    longint err = 0;
    logic [7:0] bits = '0;
    int es0 = err_strobes, ds0 = data_strobes;
    @(negedge clk); statusIn[2] = 1;
    @(negedge clk);
    checks++;
    if (statusOut[7:6] != 2'd1) fail("frame not opened");
    for (int p = 0; p < 16; p++) begin
      send_sample(16'($urandom_range(0, 32767)) - 16'd16384, p, err, bits);
      checks++;
      if (p < 15 && statusOut[2]) fail("frame complete too early");
    end
    checks += 4;
    if (!statusOut[2]) fail("frame complete missing");
    if (dataBlockOut != bits) fail($sformatf("data %h expected %h", dataBlockOut, bits));
    if (err_strobes - es0 != 1) fail("errorRateIsValid strobes != 1");
    if (data_strobes - ds0 != 1) fail("dataBlockIsValid strobes != 1");
    @(negedge clk); statusIn[2] = 0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (statusOut[2] || statusOut[7:6] != 2'd0) fail("acknowledge did not return to idle");
  endtask

  initial begin
    for (int i = 0; i < 8; i++) hist[i] = 0;
    prev_status = '0;
    repeat (3) @(posedge clk);
    reset_b = 1;
    for (int f = 0; f < 12; f++) begin
      coeffArrayIn = (f == 0) ? 64'h0000_0008_E040_0000 : {$urandom, $urandom};
      run_frame();
    end
    // abandon a frame after 5 samples, then run a complete one
    begin
      automatic longint err = 0; automatic logic [7:0] bits = '0;
      @(negedge clk); statusIn[2] = 1;
      for (int p = 0; p < 5; p++) send_sample(16'($urandom), p, err, bits);
      @(negedge clk); statusIn[2] = 0;
      @(negedge clk); @(negedge clk);
      checks++;
      if (statusOut[7:6] != 2'd0) fail("abandoned frame did not return to idle");
    end
    run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

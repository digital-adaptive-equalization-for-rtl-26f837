// tb_error_checker: plays frames of 16 equalized samples into the error
// checker and compares the error total with an integer model of the PRS
// comparison (positions 4..11, |(y>>>7) - (+/-8192)|, saturating at 65535).
// Checks that error_valid is a single strobe one cycle after position 11,
// that error_done stays up until the next clear, that samples outside the
// window change nothing, and that a frame of huge errors saturates.
module tb_error_checker;
  import eq_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, sample_valid = 0;
  logic [3:0] sample_index = '0;
  logic signed [31:0] y_in = '0;
  logic [15:0] error_rate;
  logic error_valid, error_done;
  int checks = 0, failures = 0;
  int valid_count = 0;

  error_checker dut (.clk, .rst_n, .clear, .sample_valid, .sample_index, .y_in,
                     .error_rate, .error_valid, .error_done);

  always #5 clk = ~clk;
  always @(posedge clk) if (error_valid) valid_count++;

  task automatic run_frame(input int mode);
    longint total = 0;
    int vc0;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    vc0 = valid_count;
    for (int p = 0; p < 16; p++) begin
      logic signed [31:0] y;
      case (mode)
        0: y = $signed($urandom_range(0, 1 << 22)) - (1 << 21);    // near the levels
        1: y = (p % 2) ? 32'sh7FFF_FFFF : -32'sh7FFF_FFFF;          // saturate
        default: begin                                               // ideal PRS
          bit b = (p >= 4 && p < 12) ? REF_PRS[p-4] : 1'b0;
          y = b ? 32'sd8192 * 128 : -32'sd8192 * 128;
        end
      endcase
      // some idle cycles between samples
      repeat ($urandom_range(0, 2)) @(negedge clk);
      sample_valid = 1; sample_index = 4'(p); y_in = y;
      if (p >= 4 && p < 12) total += err_term(longint'(y), REF_PRS[p-4]);
      @(negedge clk); sample_valid = 0;
      checks++;
      if (p == 11) begin
        if (!(error_valid && error_done && error_rate == 16'(sat16(total)))) begin
          failures++;
          $display("FAIL mode %0d: valid=%b done=%b err=%0d expected %0d",
                   mode, error_valid, error_done, error_rate, sat16(total));
        end
      end else if (error_valid) begin
        failures++; $display("FAIL error_valid at position %0d", p);
      end
      if (p < 11 && error_done) begin
        checks++; failures++; $display("FAIL error_done early at %0d", p);
      end
    end
    checks += 2;
    if (error_rate != 16'(sat16(total)) || !error_done) begin
      failures++; $display("FAIL total changed after window: %0d", error_rate);
    end
    if (valid_count - vc0 != 1) begin
      failures++; $display("FAIL %0d error_valid strobes in a frame", valid_count - vc0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(2);
    checks++;
    if (error_rate != 0) begin failures++; $display("FAIL ideal PRS gave %0d", error_rate); end
    for (int f = 0; f < 40; f++) run_frame(0);
    run_frame(1);
    checks++;
    if (error_rate != 16'hFFFF) begin failures++; $display("FAIL no saturation"); end
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

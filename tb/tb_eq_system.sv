// tb_eq_system: end-to-end test of the equalizer core behind its OPB
// register bank, at the default sizes. The testbench plays the processor:
// for each frame it writes the 8 coefficients, opens the frame, and for
// each of the 16 samples writes signalIn, raises statusIn[0], waits for
// statusOut[0] (by polling in even rounds, on irq in odd ones), lowers
// statusIn[0]; then it polls for frame complete, reads
// the data byte and the error total, and acknowledges.
//
// The samples come from a dispersive channel model: symbols +/-16384 (PRS
// bits, then 8 random data bits per frame, as one continuous stream) passed
// through h = 1 + 0.5 z^-1 + 0.25 z^-2. Three coefficient vectors are scored
// per round, as a genetic-algorithm error evaluation would: an 8-tap
// truncated inverse of h, delayed by 4 taps to match the 4-sample latency
// the error window assumes; a plain delay (no ISI cancellation); all zero.
// Every error total and data byte is compared with an integer model, and
// the inverse must score lowest with its sliced byte equal to the
// transmitted symbols 4..11 of the frame. Mechanisms counted (each must
// occur): samples handshaken, waits on the interrupt, polls that found the sample still running,
// error total complete before the frame ended, frames completed and
// acknowledged, and a bus write to the read-only register being ignored.
module tb_eq_system;
  import eq_ref_pkg::*;

  localparam logic [31:0] BASE = 32'h7E00_0000;
  localparam logic [31:0] A_COEF0 = BASE + 32'd0;
  localparam logic [31:0] A_COEF1 = BASE + 32'd4;
  localparam logic [31:0] A_STATI = BASE + 32'd1016;   // statusIn byte, signalIn half-word
  localparam logic [31:0] A_OUT   = BASE + 32'd1020;   // statusOut, data, error

  logic clk = 0, rst = 1;
  logic signed [31:0] signal_out;
  logic irq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  opb_master_if bus (clk);

  eq_system dut (
    .clk, .rst,
    .opb_abus(bus.abus), .opb_be(bus.be), .opb_dbus(bus.dbus), .opb_rnw(bus.rnw),
    .opb_select(bus.select), .sl_dbus(bus.sl_dbus), .sl_xferAck(bus.sl_xferAck),
    .irq(irq), .signal_out(signal_out));

  // channel state and model of the equalizer's tap line
  int sym_hist [3];
  int hist [8];
  // mechanism counters
  int n_samples = 0, n_irq_waits = 0, n_busy_polls = 0, n_err_early = 0, n_frames = 0, n_acks = 0, n_ro = 0;

  task automatic fail(input string s);
    failures++; $display("FAIL %s (t=%0t)", s, $time);
  endtask

  function automatic int channel(input bit b);
    int s = b ? 16384 : -16384;
    sym_hist[2] = sym_hist[1]; sym_hist[1] = sym_hist[0]; sym_hist[0] = s;
    return sym_hist[0] + sym_hist[1] / 2 + sym_hist[2] / 4;
  endfunction

  task automatic set_status(input logic [7:0] st);
    bus.write(A_STATI, {st, 24'h0}, 4'b1000);
  endtask

  // Runs one frame through the core; returns the error total and data byte
  // read from the registers, and checks them against the model.
  task automatic run_frame(input logic [63:0] coeffs, input logic [7:0] data,
                           input bit use_irq,
                           output int err_hw, output logic [7:0] byte_hw);
    logic [31:0] rd;
    logic [15:0] sym;
    longint err = 0;
    logic [7:0] bits = '0;
    bit seen_err = 0;
    sym = {data, REF_PRS};
    bus.write(A_COEF0, coeffs[31:0]);
    bus.write(A_COEF1, coeffs[63:32]);
    set_status(8'h04);                            // frame active
    for (int p = 0; p < 16; p++) begin
      int x = channel(sym[p]);
      longint y;
      for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = x;
      bus.write(A_STATI, {16'h0, 16'(x)}, 4'b0011);
      set_status(8'h05);                          // sample available
      if (use_irq) begin                          // sleep until the interrupt
        int w = 0;
        checks++;
        if (irq) fail("irq high before the sample was processed");
        while (!irq && w < 100) begin @(posedge clk); w++; end
        #1 n_irq_waits++;
      end
      do begin
        bus.read(A_OUT, rd);
        if (!rd[24]) n_busy_polls++;
      end while (!rd[24]);
      n_samples++;
      y = fir(coeffs, hist);
      checks++;
      if (longint'(signal_out) != y) fail($sformatf("signal_out %0d expected %0d", signal_out, y));
      if (p >= 4 && p < 12) err += err_term(y, REF_PRS[p-4]);
      if (p >= 8) bits[p-8] = (y > 0);
      if (rd[25] && !rd[26] && !seen_err) begin
        seen_err = 1; n_err_early++;
        checks++;
        if (rd[15:0] != 16'(sat16(err))) fail("early error total wrong");
      end
      set_status(8'h04);                          // clear sample available
    end
    do bus.read(A_OUT, rd); while (!rd[26]);
    n_frames++;
    err_hw = int'(rd[15:0]);
    byte_hw = rd[23:16];
    checks += 3;
    if (err_hw != sat16(err)) fail($sformatf("error %0d expected %0d", err_hw, sat16(err)));
    if (byte_hw != bits) fail($sformatf("byte %h expected %h", byte_hw, bits));
    if (!seen_err) fail("error total not complete before frame end");
    // a write to the read-only register must change nothing
    bus.write(A_OUT, 32'h0000_0000);
    bus.read(A_OUT, rd);
    checks++;
    if (rd[15:0] == 16'(err_hw) && rd[23:16] == byte_hw) n_ro++;
    else fail("read-only register was overwritten");
    set_status(8'h00);                            // acknowledge
    do bus.read(A_OUT, rd); while (rd[31:30] != 2'd0);
    n_acks++;
  endtask

  // 8-tap coefficient vectors, coefficient i in bits [8i+7:8i], Q1.7
  function automatic logic [63:0] pack(input int c [8]);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[8*i +: 8] = 8'(c[i]);
    return v;
  endfunction

  initial begin
    automatic int c_inv [8] = '{0, 0, 0, 0, 64, -32, 0, 8};
    automatic int c_dly [8] = '{0, 0, 0, 0, 64, 0, 0, 0};
    automatic int c_zero[8] = '{0, 0, 0, 0, 0, 0, 0, 0};
    logic [63:0] cand [3];
    int err_hw [3];
    logic [7:0] byte_hw [3];
    for (int i = 0; i < 3; i++) sym_hist[i] = 0;
    for (int i = 0; i < 8; i++) hist[i] = 0;
    cand[0] = pack(c_inv); cand[1] = pack(c_dly); cand[2] = pack(c_zero);
    repeat (4) @(posedge clk);
    rst = 0;
    for (int round = 0; round < 4; round++) begin
      automatic int best = 0;
      automatic logic [7:0] data = 8'($urandom);
      for (int k = 0; k < 3; k++) run_frame(cand[k], data, round[0], err_hw[k], byte_hw[k]);
      for (int k = 1; k < 3; k++) if (err_hw[k] < err_hw[best]) best = k;
      checks += 3;
      if (best != 0) fail($sformatf("round %0d: inverse not best (%0d %0d %0d)",
                                   round, err_hw[0], err_hw[1], err_hw[2]));
      if (err_hw[2] != 65535) fail("all-zero coefficients must saturate the error");
      if (round > 0 && byte_hw[0] != {data[3:0], REF_PRS[7:4]})
        fail($sformatf("equalized byte %h, expected symbols %h", byte_hw[0], {data[3:0], REF_PRS[7:4]}));
      $display("round %0d: error inverse=%0d delay=%0d zero=%0d", round, err_hw[0], err_hw[1], err_hw[2]);
    end
    $display("mechanisms: samples=%0d irq_waits=%0d busy_polls=%0d early_error=%0d frames=%0d acks=%0d ro_ignored=%0d",
             n_samples, n_irq_waits, n_busy_polls, n_err_early, n_frames, n_acks, n_ro);
    checks += 7;
    if (n_samples == 0)    fail("no sample handshake");
    if (n_irq_waits == 0)  fail("never waited on the interrupt");
    if (n_busy_polls == 0) fail("never polled a running sample");
    if (n_err_early == 0)  fail("error total never ready before frame end");
    if (n_frames == 0)     fail("no frame completed");
    if (n_acks == 0)       fail("no frame acknowledged");
    if (n_ro == 0)         fail("read-only register never tested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_opb_laregister: exercises the register bank from the bus and from the
// port side: write/read-back of all plain registers, byte-enable writes,
// the I ports (coefficients, status, signal) following the registers, the
// O register loading only while its latch strobe is high, bus writes to the
// O register having no effect, the 128-byte aliasing (offsets 1016/1020),
// addresses outside the window not being answered, zero on sl_dbus outside
// an acknowledge, a one-cycle acknowledge, and irq following the latched
// sample-complete bit.
module tb_opb_laregister;
  localparam logic [31:0] BASE = 32'h7E00_0000;

  logic clk = 0, rst = 1;
  logic [255:0] coeffI;
  logic [7:0]  statusI;
  logic [15:0] signalI;
  logic [7:0]  statusO = '0, dataO = '0;
  logic [15:0] errorO = '0;
  logic lat_s = 0, lat_d = 0, lat_e = 0;
  logic irq;
  int checks = 0, failures = 0;
  logic [31:0] model [32];
  logic [31:0] rd;

  always #5 clk = ~clk;
  opb_master_if bus (clk);

  opb_laregister #(.BASEADDR(BASE)) dut (
    .clk, .rst,
    .opb_abus(bus.abus), .opb_be(bus.be), .opb_dbus(bus.dbus), .opb_rnw(bus.rnw),
    .opb_select(bus.select), .sl_dbus(bus.sl_dbus), .sl_xferAck(bus.sl_xferAck), .irq,
    .register_portCoeffI(coeffI), .register_portStatusI(statusI), .register_portSignalI(signalI),
    .register_portStatusO(statusO), .register_portStatusO_latch(lat_s),
    .register_portDataO(dataO), .register_portDataO_latch(lat_d),
    .register_portErrorO(errorO), .register_portErrorO_latch(lat_e));

  task automatic fail(input string s);
    failures++; $display("FAIL %s (t=%0t)", s, $time);
  endtask

  task automatic expect_read(input int k, input logic [31:0] e, input int offset = 0);
    bus.read(BASE + 32'(offset) + 32'(4 * k), rd);
    checks += 2;
    if (rd != e) fail($sformatf("reg %0d read %h expected %h", k, rd, e));
    if (bus.last_wait != 1) fail($sformatf("ack after %0d cycles", bus.last_wait));
  endtask

  initial begin
    for (int k = 0; k < 32; k++) model[k] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // every register but 31 is writable
    for (int k = 0; k < 31; k++) begin
      model[k] = $urandom;
      bus.write(BASE + 32'(4 * k), model[k]);
    end
    bus.write(BASE + 32'd124, 32'hDEAD_BEEF);   // O register: ignored
    for (int k = 0; k < 32; k++) expect_read(k, model[k]);
    // I ports follow the registers
    checks += 3;
    for (int k = 0; k < 8; k++)
      if (coeffI[32*k +: 32] != model[k]) fail($sformatf("coeff port word %0d", k));
    if (statusI != model[30][31:24]) fail("statusI port");
    if (signalI != model[30][15:0])  fail("signalI port");
    // byte-enable write of offset 1016 only (big-endian lane = be[3])
    bus.write(BASE + 32'd1016, 32'hA5_00_00_00, 4'b1000);
    model[30][31:24] = 8'hA5;
    checks++;
    if (statusI != 8'hA5 || signalI != model[30][15:0]) fail("byte-enable write");
    bus.write(BASE + 32'd1016, 32'h0000_1234, 4'b0011);
    model[30][15:0] = 16'h1234;
    checks++;
    if (signalI != 16'h1234 || statusI != 8'hA5) fail("half-word write");
    expect_read(30, model[30]);
    expect_read(30, model[30], 1024 - 128);    // alias, 1016 = 0x3F8
    // O register: only latched fields load
    @(negedge clk);
    statusO = 8'h8B; dataO = 8'h5C; errorO = 16'h1357;
    lat_s = 1; lat_d = 0; lat_e = 1;
    @(negedge clk);
    lat_s = 0; lat_e = 0;
    statusO = 8'h00; errorO = 16'h0000;   // changes after the strobe are not seen
    expect_read(31, 32'h8B00_1357);
    checks++;
    if (!irq) fail("irq low with status bit 0 latched high");
    @(negedge clk); lat_d = 1;
    @(negedge clk); lat_d = 0; dataO = 8'h00;
    expect_read(31, 32'h8B5C_1357);
    bus.write(BASE + 32'd1020, 32'h0, 4'hF);
    expect_read(31, 32'h8B5C_1357, 896);
    // irq follows the latched status bit 0
    @(negedge clk); statusO = 8'h8A; lat_s = 1;
    @(negedge clk); lat_s = 0;
    checks++;
    if (irq) fail("irq high with status bit 0 latched low");
    expect_read(31, 32'h8A5C_1357);
    // address outside the window: no acknowledge
    bus.read(BASE + 32'h400, rd);
    checks++;
    if (bus.last_wait != 16) fail("foreign address acknowledged");
    // sl_dbus is zero when idle
    @(negedge clk);
    checks++;
    if (bus.sl_dbus != 0 || bus.sl_xferAck) fail("bus not idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

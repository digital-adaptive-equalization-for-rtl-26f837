// eq_system: the equalizer core attached to the processor's OPB bus.
//
// The processor (outside this module) writes the 8 coefficients, the
// current received sample and the handshake bits into opb_laregister, and
// reads back the core's status, data byte and error total from it. The
// wiring is the one of the core's data sheet:
//   registers 0..1 (coeffArrayIn, 8 x 8 bit; coefficient i in register i/4,
//     bits [8*(i%4)+7 : 8*(i%4)])                  -> signalproc.coeffArrayIn
//   register 30 [31:24] statusIn, [15:0] signalIn  -> signalproc
//   signalproc.statusOut / dataBlockOut / errorRate -> register 31, each
//     loaded while its ...IsValid strobe is high
// Only the low 64 bits of the coefficient registers reach the core (the
// register bank reserves 8 registers for coefficients).
//
// One clock: the OPB clock also runs the core. Reset is the OPB reset
// (active high), inverted for the core. signal_out brings out the optional
// equalized-sample output of the core; irq (sample complete, as latched in
// the register bank) is meant for the processor's interrupt controller. Timing is that of the two parts:
// a register access takes two bus cycles, a sample four core cycles after
// statusIn[0] is seen.
module eq_system
  import eq_pkg::*;
#(
  parameter logic [31:0] BASEADDR = 32'h7E00_0000
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [31:0]             opb_abus,
  input  logic [3:0]              opb_be,
  input  logic [31:0]             opb_dbus,
  input  logic                    opb_rnw,
  input  logic                    opb_select,
  output logic [31:0]             sl_dbus,
  output logic                    sl_xferAck,
  output logic                    irq,
  output logic signed [OUT_W-1:0] signal_out
);

  localparam int unsigned COEFF_REGS = 8;

  logic [COEFF_REGS*32-1:0] coeff_regs;
  logic [7:0]  status_in, status_out, data_out;
  logic [15:0] signal_in;
  logic [ERR_W-1:0] error_rate;
  logic status_valid, data_valid, error_valid;

  opb_laregister #(.BASEADDR(BASEADDR), .COEFF_REGS(COEFF_REGS)) u_regs (
    .clk                        (clk),
    .rst                        (rst),
    .opb_abus                   (opb_abus),
    .opb_be                     (opb_be),
    .opb_dbus                   (opb_dbus),
    .opb_rnw                    (opb_rnw),
    .opb_select                 (opb_select),
    .sl_dbus                    (sl_dbus),
    .sl_xferAck                 (sl_xferAck),
    .irq                        (irq),
    .register_portCoeffI        (coeff_regs),
    .register_portStatusI       (status_in),
    .register_portSignalI       (signal_in),
    .register_portStatusO       (status_out),
    .register_portStatusO_latch (status_valid),
    .register_portDataO         (data_out),
    .register_portDataO_latch   (data_valid),
    .register_portErrorO        (error_rate),
    .register_portErrorO_latch  (error_valid)
  );

  signalproc u_core (
    .clk              (clk),
    .reset_b          (!rst),
    .coeffArrayIn     (coeff_regs[N_TAPS*COEFF_W-1:0]),
    .signalIn         (signal_in),
    .statusIn         (status_in),
    .statusOut        (status_out),
    .statusOutIsValid (status_valid),
    .dataBlockOut     (data_out),
    .dataBlockIsValid (data_valid),
    .errorRate        (error_rate),
    .errorRateIsValid (error_valid),
    .signalOut        (signal_out)
  );

endmodule

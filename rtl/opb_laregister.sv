// opb_laregister: "logical addressable register" bank that lets an OPB bus
// master (the processor) talk to a custom core through plain wires.
//
// The bank holds 32 registers of 32 bits. Register k sits at byte offset
// 4*k from BASEADDR; only address bits [6:2] select a register, so the bank
// repeats every 128 bytes inside its 1 KiB window (offsets 1016 and 1020 are
// registers 30 and 31). Two kinds of register are wired to ports:
//   I registers (software writes, the core reads): their contents are
//     always present on the register_port*I outputs; reads return them.
//       registers 0..COEFF_REGS-1 -> register_portCoeffI (register k in
//                                    bits [32k+31:32k])
//       register 30 bits [31:24]  -> register_portStatusI (byte offset 1016)
//       register 30 bits [15:0]   -> register_portSignalI (offsets 1018-1019)
//   O registers (the core writes, software reads): register 31. A field is
//     loaded from its input port in every clock cycle in which its latch
//     strobe is high; bus writes to register 31 are ignored.
//       bits [31:24] <- register_portStatusO (offset 1020)
//       bits [23:16] <- register_portDataO   (offset 1021)
//       bits [15:0]  <- register_portErrorO  (offsets 1022-1023)
// All other registers are plain read/write storage.
//
// Interrupt: irq is bit 0 of the latched status field (register 31 bit 24,
// the core's "sample complete"), so a processor can wait for an interrupt
// instead of polling. It is a level, high for as long as that bit is set;
// software clears its cause by lowering statusIn[0].
//
// Bus: a simplified OPB slave. Bits are numbered little-endian here, while
// OPB is big-endian: byte offset 0 of a word is DBus[31:24] and is enabled
// by opb_be[3]. A transfer starts in a cycle with opb_select high and an
// address inside the window; a write is performed at the end of that cycle
// and sl_xferAck is high in the next cycle, during which sl_dbus carries the
// read data (it is zero otherwise, as OPB slave outputs are OR-ed). The
// master removes opb_select after the acknowledge. No wait states, retry
// or error acknowledge.
//
// The register map and the I/O behaviour follow the core's data sheet; the
// bus timing, the bit numbering, the aliasing and the level-sensitive
// interrupt are this design's choices.
module opb_laregister #(
  parameter logic [31:0] BASEADDR   = 32'h7E00_0000,
  parameter int unsigned COEFF_REGS = 8
) (
  input  logic                       clk,
  input  logic                       rst,        // OPB reset, active high
  // OPB slave side
  input  logic [31:0]                opb_abus,
  input  logic [3:0]                 opb_be,
  input  logic [31:0]                opb_dbus,
  input  logic                       opb_rnw,
  input  logic                       opb_select,
  output logic [31:0]                sl_dbus,
  output logic                       sl_xferAck,
  output logic                       irq,
  // I ports (to the core)
  output logic [COEFF_REGS*32-1:0]   register_portCoeffI,
  output logic [7:0]                 register_portStatusI,
  output logic [15:0]                register_portSignalI,
  // O ports (from the core)
  input  logic [7:0]                 register_portStatusO,
  input  logic                       register_portStatusO_latch,
  input  logic [7:0]                 register_portDataO,
  input  logic                       register_portDataO_latch,
  input  logic [15:0]                register_portErrorO,
  input  logic                       register_portErrorO_latch
);

  localparam int unsigned NREGS  = 32;
  localparam int unsigned REG_I  = 30;
  localparam int unsigned REG_O  = 31;

  logic [31:0] slv_reg [NREGS];
  logic [4:0]  idx;
  logic        hit, start;
  logic [31:0] rdata_q;

  assign idx   = opb_abus[6:2];
  assign hit   = opb_select && (opb_abus[31:10] == BASEADDR[31:10]);
  assign start = hit && !sl_xferAck;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NREGS; k++) slv_reg[k] <= '0;
      sl_xferAck <= 1'b0;
      rdata_q    <= '0;
    end else begin
      sl_xferAck <= start;
      rdata_q    <= start && opb_rnw ? slv_reg[idx] : '0;
      // bus writes, O register excluded
      if (start && !opb_rnw && idx != 5'(REG_O)) begin
        for (int b = 0; b < 4; b++)
          if (opb_be[b]) slv_reg[idx][8*b +: 8] <= opb_dbus[8*b +: 8];
      end
      // O register fields, loaded from the core
      if (register_portStatusO_latch) slv_reg[REG_O][31:24] <= register_portStatusO;
      if (register_portDataO_latch)   slv_reg[REG_O][23:16] <= register_portDataO;
      if (register_portErrorO_latch)  slv_reg[REG_O][15:0]  <= register_portErrorO;
    end
  end

  assign sl_dbus = sl_xferAck ? rdata_q : '0;

  always_comb begin
    for (int k = 0; k < COEFF_REGS; k++) register_portCoeffI[32*k +: 32] = slv_reg[k];
  end
  assign register_portStatusI = slv_reg[REG_I][31:24];
  assign register_portSignalI = slv_reg[REG_I][15:0];
  assign irq                  = slv_reg[REG_O][24];

  // An acknowledge always answers a select seen in the previous cycle.
  assert property (@(posedge clk) disable iff (rst) sl_xferAck |-> $past(opb_select));
  // Never two acknowledges in a row: one transfer per select.
  assert property (@(posedge clk) disable iff (rst) sl_xferAck |=> !sl_xferAck);

endmodule

// opb_master_if: the request/response wires of one OPB slave, with the
// read and write tasks a bus master (the processor, in the testbenches)
// uses: drive address, data, byte enables and select at a falling edge,
// wait for xferAck, sample read data, drop select. Each task counts the
// cycles it waited in last_wait.
interface opb_master_if (input logic clk);
  logic [31:0] abus   = '0;
  logic [3:0]  be     = '0;
  logic [31:0] dbus   = '0;
  logic        rnw    = 1'b0;
  logic        select = 1'b0;
  logic [31:0] sl_dbus;
  logic        sl_xferAck;
  int          last_wait;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       input logic [3:0] bes = 4'hF);
    @(negedge clk);
    abus = addr; dbus = data; be = bes; rnw = 1'b0; select = 1'b1;
    last_wait = 0;
    do begin @(posedge clk); #1 last_wait++; end while (!sl_xferAck && last_wait < 16);
    @(negedge clk);
    select = 1'b0; dbus = '0; be = '0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    abus = addr; be = 4'hF; rnw = 1'b1; select = 1'b1;
    last_wait = 0;
    do begin @(posedge clk); #1 last_wait++; end while (!sl_xferAck && last_wait < 16);
    data = sl_dbus;
    @(negedge clk);
    select = 1'b0; rnw = 1'b0; be = '0;
  endtask
endinterface

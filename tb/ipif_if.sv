// ipif_if: test-side model of the user side of the processor-bus interface unit.
//
// Bundles the Bus2IP/IP2Bus signals of one peripheral and offers the two bus
// cycles a processor performs on a software register: write() and read(). A
// cycle raises one chip-enable bit on the falling clock edge, samples the
// acknowledge (and, for a read, the data) at the next rising edge and drops the
// enable one time unit later, so an access that is acknowledged at once takes
// exactly one clock. An access whose acknowledge is missing is counted in
// missed_acks. Register numbers select chip-enable bit 0 for register 0; data is
// a 32-bit word with bit 0 as the MSB.
interface ipif_if #(
  parameter int unsigned NREG = 4
) (
  input logic clk
);
  logic [0:31]     data;
  logic [0:3]      be;
  logic [0:NREG-1] rdce;
  logic [0:NREG-1] wrce;
  logic [0:31]     rdata;
  logic            rdack;
  logic            wrack;
  logic            err;

  int unsigned missed_acks = 0;
  int unsigned accesses    = 0;

  task automatic idle();
    data = '0;
    be   = '0;
    rdce = '0;
    wrce = '0;
  endtask

  task automatic write(input int unsigned r, input logic [0:31] d,
                       input logic [0:3] bemask = 4'b1111);
    @(negedge clk);
    data    = d;
    be      = bemask;
    wrce    = '0;
    wrce[r] = 1'b1;
    @(posedge clk);
    if (!wrack || err) missed_acks++;
    accesses++;
    #1;
    idle();
  endtask

  task automatic read(input int unsigned r, output logic [0:31] d);
    @(negedge clk);
    rdce    = '0;
    rdce[r] = 1'b1;
    @(posedge clk);
    if (!rdack || err) missed_acks++;
    d = rdata;
    accesses++;
    #1;
    idle();
  endtask

endinterface

// dh_fpga_top: the custom logic of the FPGA key-exchange system.
//
// In the complete system a soft processor runs the Diffie-Hellman software and
// reaches its peripherals over the processor local bus; the bus interface unit
// of each peripheral turns bus cycles into the per-register chip enables seen
// here. Processor, bus, bus interface units, memories, debug module and serial
// port are library cores, so this top holds only the user logic and brings the
// user side of each bus interface out as ports:
//
//   as_*  adder-subtractor peripheral (the key-exchange hardware): 4 registers,
//         operands A and N, option, 17-bit result
//   ag_*  AND-gate peripheral (the bring-up design that proved the bus path):
//         3 registers, inputs a and b, output o
//
// The two peripherals belong to two separate builds of the system and share
// nothing but the bus clock and reset. All accesses complete in one cycle
// (acknowledge in the cycle of the chip enable); see addersub_user_logic and
// andgate_user_logic for the register maps.
module dh_fpga_top (
  input  logic                 Bus2IP_Clk,
  input  logic                 Bus2IP_Reset,

  // adder-subtractor peripheral
  input  logic [0:31]          as_Bus2IP_Data,
  input  logic [0:3]           as_Bus2IP_BE,
  input  logic [0:dh_pkg::AS_NUM_REG-1] as_Bus2IP_RdCE,
  input  logic [0:dh_pkg::AS_NUM_REG-1] as_Bus2IP_WrCE,
  output logic [0:31]          as_IP2Bus_Data,
  output logic                 as_IP2Bus_RdAck,
  output logic                 as_IP2Bus_WrAck,
  output logic                 as_IP2Bus_Error,

  // AND-gate peripheral
  input  logic [0:31]          ag_Bus2IP_Data,
  input  logic [0:3]           ag_Bus2IP_BE,
  input  logic [0:dh_pkg::AG_NUM_REG-1] ag_Bus2IP_RdCE,
  input  logic [0:dh_pkg::AG_NUM_REG-1] ag_Bus2IP_WrCE,
  output logic [0:31]          ag_IP2Bus_Data,
  output logic                 ag_IP2Bus_RdAck,
  output logic                 ag_IP2Bus_WrAck,
  output logic                 ag_IP2Bus_Error
);

  addersub_user_logic u_addersub (
    .Bus2IP_Clk  (Bus2IP_Clk),
    .Bus2IP_Reset(Bus2IP_Reset),
    .Bus2IP_Data (as_Bus2IP_Data),
    .Bus2IP_BE   (as_Bus2IP_BE),
    .Bus2IP_RdCE (as_Bus2IP_RdCE),
    .Bus2IP_WrCE (as_Bus2IP_WrCE),
    .IP2Bus_Data (as_IP2Bus_Data),
    .IP2Bus_RdAck(as_IP2Bus_RdAck),
    .IP2Bus_WrAck(as_IP2Bus_WrAck),
    .IP2Bus_Error(as_IP2Bus_Error)
  );

  andgate_user_logic u_andgate (
    .Bus2IP_Clk  (Bus2IP_Clk),
    .Bus2IP_Reset(Bus2IP_Reset),
    .Bus2IP_Data (ag_Bus2IP_Data),
    .Bus2IP_BE   (ag_Bus2IP_BE),
    .Bus2IP_RdCE (ag_Bus2IP_RdCE),
    .Bus2IP_WrCE (ag_Bus2IP_WrCE),
    .IP2Bus_Data (ag_IP2Bus_Data),
    .IP2Bus_RdAck(ag_IP2Bus_RdAck),
    .IP2Bus_WrAck(ag_IP2Bus_WrAck),
    .IP2Bus_Error(ag_IP2Bus_Error)
  );

endmodule

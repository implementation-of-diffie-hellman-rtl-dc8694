// andgate_user_logic: processor-bus register bank around a two-input AND gate,
// the first custom peripheral, used to prove the processor-to-peripheral path.
//
//   reg 0  write/read  LSB (bit 31) drives gate input a
//   reg 1  write/read  LSB (bit 31) drives gate input b
//   reg 2  read        31 zeros and the gate output o in the LSB
//
// Interface: the user side of the bus interface unit. Data words use big-endian
// bit numbering, bit 0 is the MSB and bit 31 the LSB. Bus2IP_WrCE/RdCE carry one
// chip-enable bit per register, bit 0 for register 0 (RdCE = 100 reads register
// 0, 010 register 1, 001 the gate output). A write stores the enabled byte lanes
// on the rising clock edge. Writes to register 2 are acknowledged and dropped,
// because a read of register 2 returns the gate output rather than a stored word.
//
// Timing: acknowledges are the OR of the chip enables in the same cycle, so every
// access takes one cycle; the gate input changes on the clock edge that ends the
// write. Bus2IP_Reset (synchronous, active high) clears the registers.
//
// Register use and read mux follow the original peripheral; byte enables, reset
// and dropping register-2 writes are this design's choices.
module andgate_user_logic #(
  parameter int unsigned C_SLV_DWIDTH = dh_pkg::SLV_DWIDTH
) (
  input  logic                      Bus2IP_Clk,
  input  logic                      Bus2IP_Reset,
  input  logic [0:C_SLV_DWIDTH-1]   Bus2IP_Data,
  input  logic [0:C_SLV_DWIDTH/8-1] Bus2IP_BE,
  input  logic [0:dh_pkg::AG_NUM_REG-1] Bus2IP_RdCE,
  input  logic [0:dh_pkg::AG_NUM_REG-1] Bus2IP_WrCE,
  output logic [0:C_SLV_DWIDTH-1]   IP2Bus_Data,
  output logic                      IP2Bus_RdAck,
  output logic                      IP2Bus_WrAck,
  output logic                      IP2Bus_Error
);
  import dh_pkg::*;

  localparam int unsigned NBYTES = C_SLV_DWIDTH / 8;

  logic [0:C_SLV_DWIDTH-1] slv_reg [AG_REG_B+1];
  logic [0:C_SLV_DWIDTH-1] slv_ip2bus_data;
  logic                    slv_read_ack, slv_write_ack;
  logic                    o_wire;

  always_ff @(posedge Bus2IP_Clk) begin
    if (Bus2IP_Reset) begin
      for (int r = 0; r <= AG_REG_B; r++) slv_reg[r] <= '0;
    end else begin
      for (int r = 0; r <= AG_REG_B; r++) begin
        if (Bus2IP_WrCE[r]) begin
          for (int b = 0; b < NBYTES; b++) begin
            if (Bus2IP_BE[b]) slv_reg[r][b*8 +: 8] <= Bus2IP_Data[b*8 +: 8];
          end
        end
      end
    end
  end

  and_gate u_and (
    .a(slv_reg[AG_REG_A][C_SLV_DWIDTH-1]),
    .b(slv_reg[AG_REG_B][C_SLV_DWIDTH-1]),
    .o(o_wire)
  );

  always_comb begin
    unique case (Bus2IP_RdCE)
      3'b100:  slv_ip2bus_data = slv_reg[AG_REG_A];
      3'b010:  slv_ip2bus_data = slv_reg[AG_REG_B];
      3'b001:  slv_ip2bus_data = {{(C_SLV_DWIDTH-1){1'b0}}, o_wire};
      default: slv_ip2bus_data = '0;
    endcase
  end

  assign slv_write_ack = |Bus2IP_WrCE;
  assign slv_read_ack  = |Bus2IP_RdCE;

  assign IP2Bus_Data  = slv_read_ack ? slv_ip2bus_data : '0;
  assign IP2Bus_WrAck = slv_write_ack;
  assign IP2Bus_RdAck = slv_read_ack;
  assign IP2Bus_Error = 1'b0;

  a_wrce_onehot: assert property (@(posedge Bus2IP_Clk) disable iff (Bus2IP_Reset)
    $onehot0(Bus2IP_WrCE));
  a_rdce_onehot: assert property (@(posedge Bus2IP_Clk) disable iff (Bus2IP_Reset)
    $onehot0(Bus2IP_RdCE));
  a_rd_xor_wr: assert property (@(posedge Bus2IP_Clk) disable iff (Bus2IP_Reset)
    !(slv_read_ack && slv_write_ack));

endmodule

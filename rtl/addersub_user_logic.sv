// addersub_user_logic: processor-bus register bank around the 17-bit
// adder-subtractor; the hardware half of the Diffie-Hellman key exchange.
//
// The processor does all of the key-exchange arithmetic (modular reduction by
// repeated subtraction, modular addition, double-and-add multiplication and
// square-and-multiply exponentiation) through this one peripheral. Each step
// writes the two operands and the option, then reads the result:
//
//   reg 0  A       write/read  operand m of the adder-subtractor (17 LSBs)
//   reg 1  N       write/read  operand n (17 LSBs)
//   reg 2  option  write/read  LSB: 0 = A + N, 1 = A - N
//   reg 3  result  read        A +/- N, 17 bits sign-extended to 32
//
// Interface: the user side of the bus interface unit. Data words use big-endian
// bit numbering, bit 0 is the MSB and bit 31 the LSB. Bus2IP_WrCE/RdCE carry one
// chip-enable bit per register, bit 0 for register 0. A write stores the
// enabled byte lanes on the rising clock edge; writes to register 3 are
// acknowledged and ignored. Reads are combinational.
//
// Timing: acknowledges are the OR of the chip enables in the same cycle, so every
// access takes one cycle. The result is combinational from the registers: a read
// of register 3 in the cycle after the last operand write returns the new
// result. Bus2IP_Reset (synchronous, active high) clears the registers.
//
// The register roles follow the driver software of the key exchange; byte
// enables, reset, sign extension of the result and the single-cycle handshake
// are this design's choices, modelled on the usual register template.
module addersub_user_logic #(
  parameter int unsigned C_SLV_DWIDTH = dh_pkg::SLV_DWIDTH,
  parameter int unsigned OP_WIDTH     = dh_pkg::OP_WIDTH
) (
  input  logic                      Bus2IP_Clk,
  input  logic                      Bus2IP_Reset,
  input  logic [0:C_SLV_DWIDTH-1]   Bus2IP_Data,
  input  logic [0:C_SLV_DWIDTH/8-1] Bus2IP_BE,
  input  logic [0:dh_pkg::AS_NUM_REG-1] Bus2IP_RdCE,
  input  logic [0:dh_pkg::AS_NUM_REG-1] Bus2IP_WrCE,
  output logic [0:C_SLV_DWIDTH-1]   IP2Bus_Data,
  output logic                      IP2Bus_RdAck,
  output logic                      IP2Bus_WrAck,
  output logic                      IP2Bus_Error
);
  import dh_pkg::*;

  localparam int unsigned NBYTES = C_SLV_DWIDTH / 8;

  // Software registers 0..2 (register 3 is the result and has no storage).
  logic [0:C_SLV_DWIDTH-1] slv_reg [AS_REG_OPT+1];
  logic [0:C_SLV_DWIDTH-1] slv_ip2bus_data;
  logic                    slv_read_ack, slv_write_ack;

  logic [OP_WIDTH-1:0] op_m, op_n, result;
  logic                opt;
  logic [0:C_SLV_DWIDTH-1] result_word;

  // ---------------------------------------------------------------- registers
  always_ff @(posedge Bus2IP_Clk) begin
    if (Bus2IP_Reset) begin
      for (int r = 0; r <= AS_REG_OPT; r++) slv_reg[r] <= '0;
    end else begin
      for (int r = 0; r <= AS_REG_OPT; r++) begin
        if (Bus2IP_WrCE[r]) begin
          for (int b = 0; b < NBYTES; b++) begin
            if (Bus2IP_BE[b]) slv_reg[r][b*8 +: 8] <= Bus2IP_Data[b*8 +: 8];
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- datapath
  // Operands are the OP_WIDTH least significant bits (the high end of the
  // big-endian numbered word).
  assign op_m = slv_reg[AS_REG_A][C_SLV_DWIDTH-OP_WIDTH : C_SLV_DWIDTH-1];
  assign op_n = slv_reg[AS_REG_N][C_SLV_DWIDTH-OP_WIDTH : C_SLV_DWIDTH-1];
  assign opt  = slv_reg[AS_REG_OPT][C_SLV_DWIDTH-1];

  adder_subtractor #(.WIDTH(OP_WIDTH)) u_addsub (
    .m  (op_m),
    .n  (op_n),
    .opt(opt),
    .o  (result)
  );

  assign result_word = {{(C_SLV_DWIDTH-OP_WIDTH){result[OP_WIDTH-1]}}, result};

  // ---------------------------------------------------------------- read mux
  always_comb begin
    unique case (Bus2IP_RdCE)
      4'b1000: slv_ip2bus_data = slv_reg[AS_REG_A];
      4'b0100: slv_ip2bus_data = slv_reg[AS_REG_N];
      4'b0010: slv_ip2bus_data = slv_reg[AS_REG_OPT];
      4'b0001: slv_ip2bus_data = result_word;
      default: slv_ip2bus_data = '0;
    endcase
  end

  // ---------------------------------------------------------------- handshake
  assign slv_write_ack = |Bus2IP_WrCE;
  assign slv_read_ack  = |Bus2IP_RdCE;

  assign IP2Bus_Data  = slv_read_ack ? slv_ip2bus_data : '0;
  assign IP2Bus_WrAck = slv_write_ack;
  assign IP2Bus_RdAck = slv_read_ack;
  assign IP2Bus_Error = 1'b0;

  // Bus rules: at most one register selected, never a read and a write at once.
  a_wrce_onehot: assert property (@(posedge Bus2IP_Clk) disable iff (Bus2IP_Reset)
    $onehot0(Bus2IP_WrCE));
  a_rdce_onehot: assert property (@(posedge Bus2IP_Clk) disable iff (Bus2IP_Reset)
    $onehot0(Bus2IP_RdCE));
  a_rd_xor_wr: assert property (@(posedge Bus2IP_Clk) disable iff (Bus2IP_Reset)
    !(slv_read_ack && slv_write_ack));

endmodule

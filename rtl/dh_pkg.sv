// dh_pkg: constants shared by the Diffie-Hellman adder-subtractor peripheral.
//
// The arithmetic unit works on 17-bit two's complement numbers (one sign bit and
// sixteen magnitude bits), which carry the 16-bit keys of the key exchange. The
// processor sees each peripheral as a bank of 32-bit software registers whose bit
// 0 is the most significant bit, as on the processor's local bus. The register
// roles of the adder-subtractor peripheral are the ones its driver software uses:
// operand A, operand N, the add/subtract option and the result.
package dh_pkg;

  // Width of an operand: 1 sign bit + 16 magnitude bits.
  localparam int unsigned OP_WIDTH = 17;

  // Width of one software register / bus data word.
  localparam int unsigned SLV_DWIDTH = 32;

  // Operation selected by the option bit (carry into bit 0 of the adder).
  typedef enum logic {
    OPT_ADD = 1'b0,
    OPT_SUB = 1'b1
  } addsub_opt_e;

  // Register indices of the adder-subtractor peripheral.
  typedef enum int unsigned {
    AS_REG_A      = 0,  // operand A (minuend / first addend)
    AS_REG_N      = 1,  // operand N (subtrahend / second addend)
    AS_REG_OPT    = 2,  // option, LSB: 0 add, 1 subtract
    AS_REG_RESULT = 3   // result, read only
  } addsub_reg_e;

  localparam int unsigned AS_NUM_REG = 4;

  // Register indices of the AND-gate peripheral.
  typedef enum int unsigned {
    AG_REG_A   = 0,  // gate input a (LSB)
    AG_REG_B   = 1,  // gate input b (LSB)
    AG_REG_OUT = 2   // reads back the gate output in the LSB
  } andgate_reg_e;

  localparam int unsigned AG_NUM_REG = 3;

endpackage

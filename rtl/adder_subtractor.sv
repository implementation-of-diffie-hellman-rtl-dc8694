// adder_subtractor: WIDTH-bit two's complement adder/subtractor.
//
//   opt = 0:  o = m + n
//   opt = 1:  o = m - n = m + ~n + 1
//
// Every bit of n passes through an XOR with opt, so it is inverted when
// subtracting, and opt itself is the carry into bit 0 of the ripple-carry adder,
// which supplies the +1 of the two's complement. Operands and result are signed
// two's complement numbers of WIDTH bits (default 17: a sign bit and 16
// magnitude bits); the result wraps modulo 2^WIDTH and overflow is not flagged.
// Combinational; the delay is that of WIDTH rippling full adders.
module adder_subtractor #(
  parameter int unsigned WIDTH = dh_pkg::OP_WIDTH
) (
  input  logic [WIDTH-1:0] m,
  input  logic [WIDTH-1:0] n,
  input  logic             opt,
  output logic [WIDTH-1:0] o
);

  logic [WIDTH-1:0] p;  // n, conditionally inverted
  logic             unused_cout;

  assign p = n ^ {WIDTH{opt}};

  ripple_carry_adder #(.WIDTH(WIDTH)) u_rca (
    .a     (m),
    .b     (p),
    .option(opt),
    .s     (o),
    .cout  (unused_cout)
  );

endmodule

// full_adder: one-bit full adder, the cell from which the adder-subtractor is built.
//
// sum  = x xor y xor cin
// cout = x&y | cin&(x xor y)   (the majority of the three inputs)
//
// Purely combinational. The equations are those of the classic gate-level full
// adder (two XOR gates for the sum, the carry from the AND/OR network); the
// x^y term is shared between sum and carry.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;  // propagate: x xor y

  always_comb begin
    p    = x ^ y;
    sum  = p ^ cin;
    cout = (x & y) | (cin & p);
  end

endmodule

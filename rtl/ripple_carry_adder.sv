// ripple_carry_adder: WIDTH-bit adder made of a chain of full adders.
//
// Stage i adds a[i], b[i] and the carry out of stage i-1; stage 0 takes the
// 'option' input as its carry in, which is how the adder-subtractor adds the +1
// of a two's complement. The carry ripples from bit 0 to bit WIDTH-1, so the
// result settles after WIDTH full-adder delays. Combinational, no clock.
//
// s = (a + b + option) mod 2^WIDTH; cout is the carry out of the top stage.
// The default width, 17 stages, is the one of the key-exchange design; bringing
// the last carry out as a port is this design's addition.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = dh_pkg::OP_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             option,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  logic [WIDTH:0] carry;  // carry[i] enters stage i

  assign carry[0] = option;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (
      .x   (a[i]),
      .y   (b[i]),
      .cin (carry[i]),
      .sum (s[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule

// and_gate: two-input AND gate, o = a & b.
//
// The first custom peripheral of the system: it has no use of its own beyond
// showing that values written by the processor reach a piece of user logic and
// that its result can be read back. Combinational.
module and_gate (
  input  logic a,
  input  logic b,
  output logic o
);

  assign o = a & b;

endmodule

// full_adder: one-bit full adder, the 3:2 counter of the Wallace tree and the
// cell of the ripple-carry final adder.
//
// s = a ^ b ^ c, co = majority(a, b, c). Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);

  assign s  = a ^ b ^ c;
  assign co = (a & b) | (a & c) | (b & c);

endmodule

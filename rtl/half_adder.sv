// half_adder: one-bit half adder, used by the Wallace tree where only two
// bits of a column are grouped.
//
// s = a ^ b, co = a & b. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);

  assign s  = a ^ b;
  assign co = a & b;

endmodule

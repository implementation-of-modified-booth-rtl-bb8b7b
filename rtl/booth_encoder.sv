// booth_encoder: radix-4 (modified) Booth recoder for one digit.
//
// The recoded operand Y is scanned in overlapping groups of three bits,
// {y[2i+1], y[2i], y[2i-1]}, starting at the LSB with a 0 appended below it.
// Each group selects one of five operations on the other operand X:
//
//   group  op        group  op
//   000    0X        100    -2X
//   001    +X        101    -X
//   010    +X        110    -X
//   011    +2X       111    0X
//
// The table is the standard radix-4 recoding. The most significant bit of the
// group is y[2i+1] and carries weight -2, the other two weight +1 each.
//
// Interface: grp is the 3-bit group, op the selected operation.
// Timing: purely combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0] grp,  // {y[2i+1], y[2i], y[2i-1]}
  output booth_op_e  op
);

  always_comb begin
    unique case (grp)
      3'b000:  op = OP_ZERO;
      3'b001:  op = OP_PX;
      3'b010:  op = OP_PX;
      3'b011:  op = OP_P2X;
      3'b100:  op = OP_M2X;
      3'b101:  op = OP_MX;
      3'b110:  op = OP_MX;
      default: op = OP_ZERO;  // 3'b111
    endcase
  end

endmodule

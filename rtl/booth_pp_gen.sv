// booth_pp_gen: one partial product row of the radix-4 Booth multiplier.
//
// Given the signed operand X and the Booth operation chosen by booth_encoder,
// it produces 0, X, 2X, -X or -2X. 2X is X shifted left by one bit; a
// negative multiple is formed as the two's complement of the positive one,
// by inverting it and adding one.
//
// The row is N+2 bits wide and signed. N+1 bits would hold every value but
// one: -2X for X = -2^(N-1) is +2^N, which needs the extra bit. The width is
// this design's choice; the caller sign-extends the row and shifts it to the
// weight 4^i of its digit.
//
// Interface: x (N bits, signed), op, pp (N+2 bits, signed).
// Timing: purely combinational.
module booth_pp_gen
  import booth_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] x,
  input  booth_op_e    op,
  output logic [N+1:0] pp
);

  logic [N+1:0] x_ext;   // X sign-extended to N+2 bits
  logic [N+1:0] mag;     // X or 2X
  logic         negate;

  assign x_ext = {{2{x[N-1]}}, x};

  always_comb begin
    mag    = '0;
    negate = 1'b0;
    unique case (op)
      OP_PX:   mag = x_ext;
      OP_P2X:  mag = x_ext << 1;
      OP_MX:   begin mag = x_ext;      negate = 1'b1; end
      OP_M2X:  begin mag = x_ext << 1; negate = 1'b1; end
      default: mag = '0;  // OP_ZERO
    endcase
  end

  // Two's complement of the selected multiple when the digit is negative.
  assign pp = negate ? (~mag + 1'b1) : mag;

endmodule

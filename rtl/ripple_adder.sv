// ripple_adder: final carry-propagate adder of the multiplier.
//
// After the Wallace tree two rows remain, a sum row and a carry row; this
// adder adds them to give the product. It is a chain of W one-bit full adders
// with the carry rippling from bit 0 upwards; the carry into bit 0 is 0 and
// the carry out of bit W-1 is dropped, so s = (a + b) mod 2^W, which is the
// correct two's complement product when the rows come from the tree.
//
// That a plain ripple chain is used is this design's choice: the final stage
// is only described as adders that sum up the last two rows.
//
// Interface: a, b, s (W bits each). Timing: purely combinational.
module ripple_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  logic [W-1:0] c;  // c[i] is the carry into bit i

  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    if (i < W-1) begin : g_fa
      full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .s(s[i]), .co(c[i+1]));
    end else begin : g_fa_top
      // Carry out of the top bit is outside the result.
      full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .s(s[i]), .co());
    end
  end

endmodule

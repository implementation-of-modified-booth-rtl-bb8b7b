// booth_wallace_mult: N x N signed multiplier combining radix-4 (modified)
// Booth recoding with a Wallace tree.
//
// Y is recoded: a 0 is appended below its LSB and it is cut into N/2
// overlapping three-bit groups {y[2i+1], y[2i], y[2i-1]}. Each group picks
// 0, +X, -X, +2X or -2X (booth_encoder, booth_pp_gen), so only N/2 partial
// products are formed instead of N. Partial product i is sign-extended to 2N
// bits and shifted left by 2i. The wallace_tree reduces the N/2 rows to a sum
// row and a carry row, and ripple_adder adds those two into the 2N-bit
// product.
//
// Both operands are two's complement. With the default N = 16 the design forms
// 8 partial products and a 32-bit product. For an odd N, Y is first extended
// by one copy of its sign bit so that it splits into whole groups, giving
// (N+1)/2 partial products. Naming follows
// the usual Booth convention that X is the operand multiplied by the digits
// and Y the one that is recoded; x * y = y * x, so which operand is wired to
// which port only changes the internal rows, never the product.
//
// Interface: x, y (N bits, signed) in; prod (2N bits, signed) out.
// Timing: purely combinational, there is no clock.
module booth_wallace_mult
  import booth_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] prod
);

  localparam int unsigned NPP = (N + 1) / 2;  // number of partial products
  localparam int unsigned NY  = 2 * NPP;      // Y width after sign extension
  localparam int unsigned W   = 2 * N;        // product width

  if (N < 3) begin : g_bad_n
    $error("booth_wallace_mult: N must be at least 3");
  end

  logic [NY:0]  y_ext;          // Y sign-extended to even width, 0 appended
  logic [W-1:0] rows [NPP];     // aligned partial products
  logic [W-1:0] sum_row, carry_row;

  assign y_ext = {{(NY-N+1){y[N-1]}}, y[N-2:0], 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_op_e    op;
    logic [N+1:0] pp;
    logic [W-1:0] pp_ext;

    booth_encoder u_enc (.grp(y_ext[2*i+2 -: 3]), .op(op));
    booth_pp_gen #(.N(N)) u_ppg (.x(x), .op(op), .pp(pp));

    // For odd N the top row reaches past bit W-1; those bits only carry
    // sign copies and are dropped (the product fits in W bits).
    assign pp_ext  = {{(W-N-2){pp[N+1]}}, pp};
    assign rows[i] = pp_ext << (2*i);
  end

  wallace_tree #(.ROWS(NPP), .W(W)) u_tree (
    .rows_in(rows),
    .sum_o  (sum_row),
    .carry_o(carry_row)
  );

  ripple_adder #(.W(W)) u_cpa (
    .a(sum_row),
    .b(carry_row),
    .s(prod)
  );

endmodule

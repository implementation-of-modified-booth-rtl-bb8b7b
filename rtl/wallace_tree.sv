// wallace_tree: reduces ROWS partial product rows of W bits to two rows.
//
// At each level the rows are taken three at a time. Every group of three
// rows goes through a row of one-bit full adders, one per bit position: the
// sums form a new row at the same weight and the carries a new row shifted
// one bit to the left. A group of two rows left over at the end goes through
// half adders in the same way, and a single row left over passes unchanged.
// Levels are repeated until two rows remain: the sum row and the carry row
// that the final adder adds.
//
// For the default eight rows (PP1..PP8 of a 16x16 radix-4 Booth multiplier)
// the levels are:
//   level 1: (PP1,PP2,PP3) -> sum1,carry1  (PP4,PP5,PP6) -> sum2,carry2
//            (PP7,PP8) half adders -> sum3,carry3
//   level 2: (sum1,carry1,sum2) -> sum4,carry4  (carry2,sum3,carry3) -> sum5,carry5
//   level 3: (sum4,carry4,sum5) -> sum6,carry6  carry5 passes
//   level 4: (sum6,carry6,carry5) -> prod_sum, prod_carry
// i.e. 8 -> 6 -> 4 -> 3 -> 2 rows. Any ROWS >= 2 works; the grouping rule is
// the same at every size.
//
// All arithmetic is modulo 2^W: a carry out of bit W-1 is dropped, which is
// correct for sign-extended two's complement rows.
//
// Interface: rows_in[ROWS] (W bits each) in; sum_o, carry_o (W bits) out,
// with carry_o already at its weight, so the result is sum_o + carry_o;
// carry_o[0] is therefore always 0.
// Timing: purely combinational, NUM_LEVELS full-adder delays deep.
module wallace_tree #(
  parameter int unsigned ROWS = 8,
  parameter int unsigned W    = 32
) (
  input  logic [W-1:0] rows_in [ROWS],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);

  // Rows left after one level that starts with r rows.
  function automatic int unsigned next_rows(int unsigned r);
    return (r / 3) * 2 + (r % 3);
  endfunction

  // Rows present at the input of level l (level 0 = the partial products).
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned r = ROWS;
    for (int unsigned k = 0; k < l; k++) r = next_rows(r);
    return r;
  endfunction

  // Number of levels needed to reach two rows.
  function automatic int unsigned count_levels();
    int unsigned r = ROWS;
    int unsigned n = 0;
    while (r > 2) begin
      r = next_rows(r);
      n++;
    end
    return n;
  endfunction

  localparam int unsigned NUM_LEVELS = count_levels();

  // Each level l has its own input rows cur[] and output rows nxt[]; row
  // slots past the number of rows in use are 0.
  for (genvar l = 0; l < NUM_LEVELS; l++) begin : g_level
    localparam int unsigned R   = rows_at(l);
    localparam int unsigned G   = R / 3;
    localparam int unsigned REM = R % 3;
    localparam int unsigned RN  = next_rows(R);

    logic [W-1:0] cur [ROWS];
    logic [W-1:0] nxt [ROWS];

    if (l == 0) begin : g_first
      assign cur = rows_in;
    end else begin : g_chain
      assign cur = g_level[l-1].nxt;
    end

    // Groups of three rows: full adders.
    for (genvar g = 0; g < G; g++) begin : g_fa_row
      logic [W-1:0] s;
      logic [W-1:0] c;
      // The carry of bit b has the weight of bit b+1. The carry out of the
      // top bit falls outside the W-bit result and is left unconnected.
      for (genvar b = 0; b < W; b++) begin : g_bit
        if (b < W-1) begin : g_fa
          full_adder u_fa (
            .a (cur[3*g][b]), .b(cur[3*g+1][b]), .c(cur[3*g+2][b]),
            .s (s[b]), .co(c[b+1])
          );
        end else begin : g_fa_top
          full_adder u_fa (
            .a (cur[3*g][b]), .b(cur[3*g+1][b]), .c(cur[3*g+2][b]),
            .s (s[b]), .co()
          );
        end
      end
      assign c[0]       = 1'b0;
      assign nxt[2*g]   = s;
      assign nxt[2*g+1] = c;
    end

    // A leftover pair of rows: half adders.
    if (REM == 2) begin : g_ha_row
      logic [W-1:0] s;
      logic [W-1:0] c;
      for (genvar b = 0; b < W; b++) begin : g_bit
        if (b < W-1) begin : g_ha
          half_adder u_ha (.a(cur[3*G][b]), .b(cur[3*G+1][b]), .s(s[b]), .co(c[b+1]));
        end else begin : g_ha_top
          half_adder u_ha (.a(cur[3*G][b]), .b(cur[3*G+1][b]), .s(s[b]), .co());
        end
      end
      assign c[0]       = 1'b0;
      assign nxt[2*G]   = s;
      assign nxt[2*G+1] = c;
    end else if (REM == 1) begin : g_pass
      // A single leftover row moves on to the next level unchanged.
      assign nxt[2*G] = cur[3*G];
    end

    for (genvar k = RN; k < ROWS; k++) begin : g_unused
      assign nxt[k] = '0;
    end
  end

  if (NUM_LEVELS == 0) begin : g_no_level
    // Two rows (or one) need no reduction.
    assign sum_o   = rows_in[0];
    assign carry_o = (ROWS > 1) ? rows_in[ROWS > 1 ? 1 : 0] : '0;
  end else begin : g_out
    assign sum_o   = g_level[NUM_LEVELS-1].nxt[0];
    assign carry_o = g_level[NUM_LEVELS-1].nxt[1];
  end

endmodule

// booth_wallace_de2_top_tb: end-to-end test of the board-level design at its
// default size. Operands are applied to the switch inputs, the eight
// seven-segment displays are decoded back to a 32-bit number and compared
// with the signed product.
//
// It also counts, from the operands, how often each mechanism of the design
// was exercised and fails if one never was: each of the five radix-4 Booth
// digits (0, +X, -X, +2X, -2X), products of each sign, the most negative
// operand, and every hexadecimal digit on the displays.
module booth_wallace_de2_top_tb;

  logic [15:0] sw_x, sw_y;
  logic [6:0]  hex_n [8];
  int checks = 0, failures = 0;

  int digit_seen [5];   // index: digit + 2
  int neg_prod = 0, pos_prod = 0, zero_prod = 0, min_operand = 0;
  int hex_seen [16];

  booth_wallace_de2_top dut (.sw_x(sw_x), .sw_y(sw_y), .hex_n(hex_n));

  const string LIT[16] = '{
    "abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
    "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] pattern_n(int d);
    logic [6:0] p = '1;
    for (int k = 0; k < LIT[d].len(); k++) p[3'(LIT[d][k] - "a")] = 1'b0;
    return p;
  endfunction

  // Decodes one display; returns -1 for a pattern that is no hex digit.
  function automatic int decode(logic [6:0] seg_n);
    for (int d = 0; d < 16; d++) if (pattern_n(d) == seg_n) return d;
    return -1;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int xv, int yv);
    logic signed [31:0] expected;
    logic [31:0] shown;
    logic [16:0] yext;
    bit bad;
    sw_x = 16'(xv); sw_y = 16'(yv);
    #1;
    expected = 32'($signed(sw_x)) * 32'($signed(sw_y));
    shown = '0;
    bad = 0;
    for (int d = 0; d < 8; d++) begin
      int v = decode(hex_n[d]);
      if (v < 0) bad = 1; else shown[4*d +: 4] = 4'(v);
    end
    checks++;
    if (bad || shown !== expected) begin
      failures++;
      $display("FAIL %0d * %0d: shown %h expected %h", $signed(sw_x), $signed(sw_y), shown, expected);
    end
    // Coverage, computed from the operands and the expected product.
    yext = {sw_y, 1'b0};
    for (int i = 0; i < 8; i++) begin
      int dg = -2 * int'(yext[2*i+2]) + int'(yext[2*i+1]) + int'(yext[2*i]);
      digit_seen[dg + 2]++;
    end
    if (expected < 0) neg_prod++; else if (expected > 0) pos_prod++; else zero_prod++;
    if (sw_x == 16'h8000 || sw_y == 16'h8000) min_operand++;
    for (int d = 0; d < 8; d++) hex_seen[expected[4*d +: 4]]++;
  endtask

  initial begin
    apply(60, 150);  // 9000 = 0x00002328
    apply(-60, 150);
    apply(-32768, -32768);
    apply(-32768, 32767);
    apply(32767, -1);
    apply(0, 12345);
    apply(32'h1234, 32'h0ABC);
    repeat (5000) apply(int'($urandom), int'($urandom));

    for (int k = 0; k < 5; k++) begin
      checks++;
      if (digit_seen[k] == 0) begin failures++; $display("FAIL Booth digit %0d never used", k - 2); end
      else $display("Booth digit %0d used %0d times", k - 2, digit_seen[k]);
    end
    $display("products: %0d negative, %0d positive, %0d zero; most negative operand %0d times",
             neg_prod, pos_prod, zero_prod, min_operand);
    checks++;
    if (neg_prod == 0 || pos_prod == 0 || zero_prod == 0 || min_operand == 0) begin
      failures++;
      $display("FAIL a sign case was never exercised");
    end
    for (int d = 0; d < 16; d++) begin
      checks++;
      if (hex_seen[d] == 0) begin failures++; $display("FAIL hex digit %h never displayed", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

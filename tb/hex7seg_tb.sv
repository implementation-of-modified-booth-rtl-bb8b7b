// hex7seg_tb: checks each of the 16 digits against the list of segments that
// should light, written as segment letters, and checks active-low polarity.
module hex7seg_tb;

  logic [3:0] nibble;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  hex7seg dut (.nibble(nibble), .seg_n(seg_n));

  // Lit segments per digit, by letter (a = top, clockwise, g = middle).
  const string LIT[16] = '{
    "abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
    "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] want_n;
      want_n = '1;
      for (int k = 0; k < LIT[d].len(); k++) want_n[3'(LIT[d][k] - "a")] = 1'b0;
      nibble = 4'(d);
      #1;
      checks++;
      if (seg_n !== want_n) begin
        failures++;
        $display("FAIL digit %h seg_n=%b expected %b", d, seg_n, want_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

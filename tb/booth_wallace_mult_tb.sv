// booth_wallace_mult_tb: the Booth-Wallace multiplier against the signed *
// operator. At N = 16: the worked example 60 x 150 = 9000, the extreme
// operands and random pairs. At N = 8: all 65536 operand pairs. At N = 7 and
// N = 3: all pairs, which exercises the sign extension of an odd-width Y.
// The design is combinational; each result is sampled 1 time unit after the
// operands change.
module booth_wallace_mult_tb;

  logic [15:0] x, y;
  logic [31:0] prod;
  logic [7:0]  x8, y8;
  logic [15:0] prod8;
  int checks = 0, failures = 0;

  booth_wallace_mult           dut   (.x(x),  .y(y),  .prod(prod));
  booth_wallace_mult #(.N(8))  dut8  (.x(x8), .y(y8), .prod(prod8));

  logic [6:0]  x7, y7;
  logic [13:0] prod7;
  logic [2:0]  x3, y3;
  logic [5:0]  prod3;
  booth_wallace_mult #(.N(7))  dut7  (.x(x7), .y(y7), .prod(prod7));
  booth_wallace_mult #(.N(3))  dut3  (.x(x3), .y(y3), .prod(prod3));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(int xv, int yv);
    logic signed [31:0] expected;
    x = 16'(xv); y = 16'(yv);
    #1;
    expected = 32'($signed(x)) * 32'($signed(y));
    checks++;
    if (prod !== expected) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, got %0d", $signed(x), $signed(y), expected, $signed(prod));
    end
  endtask

  initial begin
    // Worked example: 60 x 150 = 9000 (0x2328).
    check16(60, 150);
    checks++;
    if (prod !== 32'd9000) begin failures++; $display("FAIL example 60*150"); end
    check16(150, 60);
    check16(-32768, -32768);
    check16(-32768, 32767);
    check16(32767, 32767);
    check16(-32768, 2);
    check16(-1, -1);
    check16(0, -32768);
    repeat (20000) check16(int'($urandom), int'($urandom));
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        logic signed [15:0] e8;
        x8 = 8'(i); y8 = 8'(j);
        #1;
        e8 = 16'($signed(x8)) * 16'($signed(y8));
        checks++;
        if (prod8 !== e8) begin
          failures++;
          if (failures < 20) $display("FAIL N=8 %0d * %0d = %0d, got %0d", $signed(x8), $signed(y8), e8, $signed(prod8));
        end
      end
    for (int i = 0; i < 128; i++)
      for (int j = 0; j < 128; j++) begin
        logic signed [13:0] e7;
        x7 = 7'(i); y7 = 7'(j);
        #1;
        e7 = 14'($signed(x7)) * 14'($signed(y7));
        checks++;
        if (prod7 !== e7) begin
          failures++;
          if (failures < 20) $display("FAIL N=7 %0d * %0d = %0d, got %0d", $signed(x7), $signed(y7), e7, $signed(prod7));
        end
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        logic signed [5:0] e3;
        x3 = 3'(i); y3 = 3'(j);
        #1;
        e3 = 6'($signed(x3)) * 6'($signed(y3));
        checks++;
        if (prod3 !== e3) begin
          failures++;
          $display("FAIL N=3 %0d * %0d = %0d, got %0d", $signed(x3), $signed(y3), e3, $signed(prod3));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

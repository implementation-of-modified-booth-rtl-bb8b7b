// wallace_tree_tb: the two rows left by the tree must add up, modulo 2^W, to
// the sum of all input rows. Checked at the default size (8 rows of 32 bits)
// with random and all-ones rows, and at other row counts (2, 3, 5, 13) so
// that the half-adder and pass-through cases of the grouping rule are used.
module wallace_tree_tb;

  localparam int W = 32;

  logic [W-1:0] r8 [8];
  logic [W-1:0] s8, c8;
  logic [W-1:0] r2 [2];
  logic [W-1:0] s2, c2;
  logic [W-1:0] r3 [3];
  logic [W-1:0] s3, c3;
  logic [W-1:0] r5 [5];
  logic [W-1:0] s5, c5;
  logic [W-1:0] r13 [13];
  logic [W-1:0] s13, c13;
  int checks = 0, failures = 0;

  wallace_tree                      dut8  (.rows_in(r8),  .sum_o(s8),  .carry_o(c8));
  wallace_tree #(.ROWS(2),  .W(W))  dut2  (.rows_in(r2),  .sum_o(s2),  .carry_o(c2));
  wallace_tree #(.ROWS(3),  .W(W))  dut3  (.rows_in(r3),  .sum_o(s3),  .carry_o(c3));
  wallace_tree #(.ROWS(5),  .W(W))  dut5  (.rows_in(r5),  .sum_o(s5),  .carry_o(c5));
  wallace_tree #(.ROWS(13), .W(W))  dut13 (.rows_in(r13), .sum_o(s13), .carry_o(c13));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string tag, logic [W-1:0] got, logic [W-1:0] expected);
    checks++;
    if (got !== expected) begin
      failures++;
      $display("FAIL %s got=%h expected=%h", tag, got, expected);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [W-1:0] e8, e2, e3, e5, e13;
      e8 = '0; e2 = '0; e3 = '0; e5 = '0; e13 = '0;
      foreach (r8[k])  begin r8[k]  = (t == 0) ? '1 : (t == 1) ? '0 : $urandom; e8  += r8[k];  end
      foreach (r2[k])  begin r2[k]  = $urandom; e2  += r2[k];  end
      foreach (r3[k])  begin r3[k]  = $urandom; e3  += r3[k];  end
      foreach (r5[k])  begin r5[k]  = $urandom; e5  += r5[k];  end
      foreach (r13[k]) begin r13[k] = $urandom; e13 += r13[k]; end
      #1;
      compare("rows=8",  s8  + c8,  e8);
      compare("rows=2",  s2  + c2,  e2);
      compare("rows=3",  s3  + c3,  e3);
      compare("rows=5",  s5  + c5,  e5);
      compare("rows=13", s13 + c13, e13);
      // A real carry-save output: the carry row has no weight-1 bit.
      compare("rows=8 carry lsb", {31'b0, c8[0]}, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

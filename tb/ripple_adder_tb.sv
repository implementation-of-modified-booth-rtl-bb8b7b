// ripple_adder_tb: compares the ripple-carry adder with the + operator for
// long carry chains and random operands, at W = 32 and exhaustively at W = 4.
module ripple_adder_tb;

  logic [31:0] a, b, s;
  logic [3:0]  a4, b4, s4;
  int checks = 0, failures = 0;

  ripple_adder            dut  (.a(a),  .b(b),  .s(s));
  ripple_adder #(.W(4))   dut4 (.a(a4), .b(b4), .s(s4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(logic [31:0] av, logic [31:0] bv);
    a = av; b = bv;
    #1;
    checks++;
    if (s !== av + bv) begin
      failures++;
      $display("FAIL %h + %h = %h, got %h", av, bv, av + bv, s);
    end
  endtask

  initial begin
    check32(32'hFFFF_FFFF, 32'h1);
    check32(32'h7FFF_FFFF, 32'h1);
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'h0, 32'h0);
    repeat (5000) check32($urandom, $urandom);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (s4 !== 4'(i + j)) begin
          failures++;
          $display("FAIL W=4 %0d + %0d got %0d", i, j, s4);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

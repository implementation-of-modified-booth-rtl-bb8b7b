// booth_encoder_tb: exhaustive check of the radix-4 Booth recoder.
//
// For every 3-bit group {y[2i+1], y[2i], y[2i-1]} the expected digit is
// computed arithmetically as -2*y[2i+1] + y[2i] + y[2i-1] and compared with
// the digit value of the operation the recoder selects.
module booth_encoder_tb;
  import booth_pkg::*;

  logic [2:0] grp;
  booth_op_e  op;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp(grp), .op(op));

  function automatic int digit_of(booth_op_e o);
    case (o)
      OP_ZERO: return 0;
      OP_PX:   return 1;
      OP_P2X:  return 2;
      OP_MX:   return -1;
      OP_M2X:  return -2;
      default: return 99;
    endcase
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int expected;
      grp = 3'(g);
      #1;
      expected = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      checks++;
      if (digit_of(op) != expected) begin
        failures++;
        $display("FAIL grp=%b op=%s digit=%0d expected=%0d", grp, op.name(), digit_of(op), expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

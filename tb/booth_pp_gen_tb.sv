// booth_pp_gen_tb: checks the partial product generator for all five Booth
// operations against digit * X computed with integer arithmetic, at the
// default width (N = 16) including the extreme operands, and exhaustively
// at N = 6.
module booth_pp_gen_tb;
  import booth_pkg::*;

  localparam int N = 16;
  localparam int NS = 6;

  logic [N-1:0]  x;
  booth_op_e     op;
  logic [N+1:0]  pp;
  logic [NS-1:0] xs;
  logic [NS+1:0] pps;
  int checks = 0, failures = 0;

  booth_pp_gen #(.N(N))  dut   (.x(x),  .op(op), .pp(pp));
  booth_pp_gen #(.N(NS)) dut_s (.x(xs), .op(op), .pp(pps));

  const booth_op_e OPS[5] = '{OP_ZERO, OP_PX, OP_P2X, OP_MX, OP_M2X};
  const int        DIG[5] = '{0, 1, 2, -1, -2};

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_big(int xv, int k);
    int expected;
    x  = N'(xv);
    op = OPS[k];
    #1;
    expected = DIG[k] * int'($signed(x));
    checks++;
    if (int'($signed(pp)) != expected) begin
      failures++;
      $display("FAIL N=%0d x=%0d op=%s pp=%0d expected=%0d", N, $signed(x), op.name(), $signed(pp), expected);
    end
  endtask

  initial begin
    // Edge operands, then random ones.
    foreach (OPS[k]) begin
      check_big(0, k);
      check_big(1, k);
      check_big(-1, k);
      check_big(32767, k);
      check_big(-32768, k);
      check_big(60, k);
    end
    repeat (2000) check_big(int'($urandom), int'($urandom_range(4)));
    // Exhaustive at the small width.
    for (int v = 0; v < (1 << NS); v++) begin
      foreach (OPS[k]) begin
        int expected;
        xs = NS'(v);
        op = OPS[k];
        #1;
        expected = DIG[k] * int'($signed(xs));
        checks++;
        if (int'($signed(pps)) != expected) begin
          failures++;
          $display("FAIL N=%0d x=%0d op=%s pp=%0d expected=%0d", NS, $signed(xs), op.name(), $signed(pps), expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

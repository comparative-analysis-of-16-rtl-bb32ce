// tb_hard_multiple_gen: self-checking test of the +-3Y generator.
//
// Drives random and extreme 17-bit multiplicands with their negatives and
// checks both outputs against 3*y and -3*y computed as integers.
module tb_hard_multiple_gen;
  localparam int W = 17;

  logic [W-1:0] y, neg_y;
  logic [W+1:0] y3, neg_y3;
  int checks = 0, failures = 0;

  hard_multiple_gen #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int v);
    y     = W'(v);
    neg_y = W'(-v);
    #1;
    checks++;
    if (int'($signed(y3)) != 3 * v || int'($signed(neg_y3)) != -3 * v) begin
      failures++;
      $display("FAIL y=%0d: 3y=%0d -3y=%0d", v, $signed(y3), $signed(neg_y3));
    end
  endtask

  initial begin
    check_one(0);
    check_one(1);
    check_one(-1);
    check_one(21);
    check_one(-21);
    check_one(65535);       // largest unsigned 16-bit multiplicand
    check_one(32767);
    check_one(-32768);      // most negative signed 16-bit multiplicand
    for (int i = 0; i < 2000; i++) check_one(int'($urandom_range(0, 98303)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_booth_r8_ppgen: self-checking test of the partial product generator.
//
// For random multiplicands, applies every digit -4..+4 (with +-3Y supplied as
// integers by the testbench) and checks the output against digit * y.
module tb_booth_r8_ppgen;
  import booth_r8_pkg::*;
  localparam int W = 17;

  logic [W-1:0] y, neg_y;
  logic [W+1:0] y3, neg_y3, pp;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_r8_ppgen #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int v, input int d);
    y      = W'(v);
    neg_y  = W'(-v);
    y3     = (W+2)'(3 * v);
    neg_y3 = (W+2)'(-3 * v);
    digit.neg = (d < 0);
    digit.mag = booth_mag_e'(d < 0 ? -d : d);
    #1;
    checks++;
    if (int'($signed(pp)) != d * v) begin
      failures++;
      $display("FAIL y=%0d digit=%0d: pp=%0d", v, d, $signed(pp));
    end
  endtask

  int vals [5] = '{0, 1, 65535, -32768, 21};

  initial begin
    foreach (vals[k]) for (int d = -4; d <= 4; d++) check_one(vals[k], d);
    for (int i = 0; i < 1000; i++)
      for (int d = -4; d <= 4; d++) check_one(int'($urandom_range(0, 98303)) - 32768, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_booth_r8_encoder: self-checking test of the radix-8 Booth encoder.
//
// Applies all sixteen 4-bit groups and checks the digit against the radix-8
// weight of the group, -4*q[3] + 2*q[2] + q[1] + q[0], and that zero is never
// flagged negative.
module tb_booth_r8_encoder;
  import booth_r8_pkg::*;

  logic [3:0]   group_bits;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_r8_encoder dut (.group_bits(group_bits), .digit(digit));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv, got;
    for (int q = 0; q < 16; q++) begin
      group_bits = 4'(q);
      #1;
      expv = -4 * q[3] + 2 * q[2] + q[1] + q[0];
      got  = digit.neg ? -int'(digit.mag) : int'(digit.mag);
      checks++;
      if (got != expv || int'(digit.mag) > 4 || (digit.neg && digit.mag == MAG0)) begin
        failures++;
        $display("FAIL group=%b expected %0d got neg=%b mag=%0d", group_bits, expv,
                 digit.neg, digit.mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

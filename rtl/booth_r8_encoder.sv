// booth_r8_encoder: radix-8 Booth encoder for one multiplier digit.
//
// Looks at an overlapping group of four multiplier bits
// {y[3i+2], y[3i+1], y[3i], y[3i-1]} (y[-1] = 0 for the first group) and
// recodes it into the signed digit -4*q[3] + 2*q[2] + q[1] + q[0], a value in
// -4..+4. The mapping is the document's add-A/add-S list: 0001 and 0010 add
// one multiplicand, 0011 and 0100 two, 0101 and 0110 three, 0111 four, and the
// upper half adds the same amounts negated (1000: -4 ... 1110: -1); 0000 and
// 1111 add nothing. The output is a magnitude code and a negate flag.
// Purely combinational.
module booth_r8_encoder
  import booth_r8_pkg::*;
(
  input  logic [3:0]   group_bits,  // {y[3i+2], y[3i+1], y[3i], y[3i-1]}
  output booth_digit_t digit        // recoded digit
);

  always_comb begin
    unique case (group_bits)
      4'b0000: digit = '{neg: 1'b0, mag: MAG0};
      4'b0001: digit = '{neg: 1'b0, mag: MAG1};
      4'b0010: digit = '{neg: 1'b0, mag: MAG1};
      4'b0011: digit = '{neg: 1'b0, mag: MAG2};
      4'b0100: digit = '{neg: 1'b0, mag: MAG2};
      4'b0101: digit = '{neg: 1'b0, mag: MAG3};
      4'b0110: digit = '{neg: 1'b0, mag: MAG3};
      4'b0111: digit = '{neg: 1'b0, mag: MAG4};
      4'b1000: digit = '{neg: 1'b1, mag: MAG4};
      4'b1001: digit = '{neg: 1'b1, mag: MAG3};
      4'b1010: digit = '{neg: 1'b1, mag: MAG3};
      4'b1011: digit = '{neg: 1'b1, mag: MAG2};
      4'b1100: digit = '{neg: 1'b1, mag: MAG2};
      4'b1101: digit = '{neg: 1'b1, mag: MAG1};
      4'b1110: digit = '{neg: 1'b1, mag: MAG1};
      default: digit = '{neg: 1'b0, mag: MAG0};  // 4'b1111
    endcase
  end

endmodule

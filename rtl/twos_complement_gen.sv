// twos_complement_gen: two's complement generator producing -MD.
//
// Forms the negative of the (already extended) multiplicand as the bitwise
// inverse plus one. The document gives the block and its output (-MD feeding
// the partial product generator); the invert-and-increment form is the
// textbook one. The input must be wide enough that
// its negative is representable (the caller passes a sign-extended operand).
// Purely combinational.
module twos_complement_gen #(
  parameter int W = 17
) (
  input  logic [W-1:0] a,      // two's complement value
  output logic [W-1:0] neg_a   // -a modulo 2**W
);

  always_comb neg_a = ~a + W'(1);

endmodule

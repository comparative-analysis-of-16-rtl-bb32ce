// booth_r8_ppgen: radix-8 partial product generator for one Booth digit.
//
// Picks the multiple of the multiplicand Y named by one recoded digit:
// 0, +-Y, +-2Y, +-3Y or +-4Y. The easy multiples are shifts of Y or of -Y
// (2Y: one place left, 4Y: two places left); the negative ones shift the
// two's complement -Y, as the document describes. The hard multiples +-3Y come
// in precomputed from the hard multiple generator. The result is a W+2-bit
// two's complement number, not yet shifted to the digit's weight.
// Purely combinational.
module booth_r8_ppgen
  import booth_r8_pkg::*;
#(
  parameter int W = 17
) (
  input  logic [W-1:0]  y,       // multiplicand, two's complement
  input  logic [W-1:0]  neg_y,   // -y
  input  logic [W+1:0]  y3,      // +3y
  input  logic [W+1:0]  neg_y3,  // -3y
  input  booth_digit_t  digit,   // recoded multiplier digit
  output logic [W+1:0]  pp       // digit * y
);

  localparam int MW = W + 2;

  logic [MW-1:0] y1_x, n1_x;

  always_comb begin
    y1_x = MW'(signed'(y));
    n1_x = MW'(signed'(neg_y));
    unique case (digit.mag)
      MAG1:    pp = digit.neg ? n1_x        : y1_x;
      MAG2:    pp = digit.neg ? (n1_x << 1) : (y1_x << 1);
      MAG3:    pp = digit.neg ? neg_y3      : y3;
      MAG4:    pp = digit.neg ? (n1_x << 2) : (y1_x << 2);
      default: pp = '0;
    endcase
  end

endmodule

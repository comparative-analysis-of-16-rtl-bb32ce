// hard_multiple_gen: generator of the hard multiples +3Y and -3Y.
//
// Radix-8 digits need 3Y, which no shift of the multiplicand Y gives. As the
// document prescribes, +3Y is made by adding 2Y (Y shifted left one place) and
// Y, and -3Y by adding -2Y and -Y, where -Y comes from the two's complement
// generator. Both additions use the carry look-ahead adder. Inputs are W-bit
// two's complement values; outputs are W+2 bits, enough for 3Y of any input.
// Purely combinational.
module hard_multiple_gen #(
  parameter int W = 17
) (
  input  logic [W-1:0] y,       // multiplicand, two's complement
  input  logic [W-1:0] neg_y,   // -y, two's complement
  output logic [W+1:0] y3,      // +3y
  output logic [W+1:0] neg_y3   // -3y
);

  localparam int MW = W + 2;

  logic [MW-1:0] y1_x, y2_x, n1_x, n2_x;

  always_comb begin
    y1_x = MW'(signed'(y));
    y2_x = y1_x << 1;
    n1_x = MW'(signed'(neg_y));
    n2_x = n1_x << 1;
  end

  cla_adder #(.W(MW)) u_add_pos (
    .a   (y2_x),
    .b   (y1_x),
    .sum (y3)
  );

  cla_adder #(.W(MW)) u_add_neg (
    .a   (n2_x),
    .b   (n1_x),
    .sum (neg_y3)
  );

endmodule

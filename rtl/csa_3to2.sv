// csa_3to2: one row of carry-save (3:2) adders.
//
// Every bit position holds a full adder: the three input rows become a sum
// row and a carry row whose value together equals x + y + z. The carry row is
// returned already shifted one place left (its bit 0 is zero), both rows are
// W bits and the sum is taken modulo 2**W. No carry travels along the row.
// Purely combinational.
module csa_3to2 #(
  parameter int W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x & y) | (x & z) | (y & z);
    carry = {maj[W-2:0], 1'b0};
  end

endmodule

// sign_ext_corrector: sign extension corrector of the radix-8 Booth multiplier.
//
// The Booth datapath behind it is a signed one. This block lets the same
// datapath multiply unsigned operands: with s_u = 1 (signed) each operand is
// extended with its own top bit, with s_u = 0 (unsigned) it is extended with
// zeros. The one-bit s_u control and its encoding are the document's; the
// extension widths are this design's choice and are the least that hold every
// value exactly:
//   md_ext : N+1 bits, the multiplicand as a signed number.
//   mr_ext : 3*NPP bits, the multiplier as a signed number padded on the left so
//            that it splits into NPP whole 3-bit digit positions.
// Purely combinational.
module sign_ext_corrector
  import booth_r8_pkg::*;
#(
  parameter int N   = 16,
  parameter int NPP = num_pp(N)
) (
  input  logic [N-1:0]     md,      // multiplicand
  input  logic [N-1:0]     mr,      // multiplier
  input  logic             s_u,     // 1: signed operands, 0: unsigned operands
  output logic [N:0]       md_ext,  // multiplicand, N+1 bits two's complement
  output logic [3*NPP-1:0] mr_ext   // multiplier, 3*NPP bits two's complement
);

  logic md_fill;
  logic mr_fill;

  always_comb begin
    md_fill = s_u & md[N-1];
    mr_fill = s_u & mr[N-1];
    md_ext  = {md_fill, md};
    mr_ext  = {{(3*NPP-N){mr_fill}}, mr};
  end

endmodule

// radix8_16bit: 16 x 16 radix-8 Booth multiplier for signed and unsigned operands.
//
// ain is the multiplicand (MD), bin the multiplier (MR), mul the 2N-bit
// product. s_u selects the number format of both operands: 1 signed (two's
// complement), 0 unsigned.
//
// How it works, stage by stage (all combinational, no clock):
//   1. The sign extension corrector widens MD to N+1 bits and MR to 3*NPP bits,
//      by sign (s_u = 1) or by zeros (s_u = 0), so that one signed datapath
//      serves both formats.
//   2. The two's complement generator forms -MD; the hard multiple generator
//      adds 2MD+MD and (-2MD)+(-MD) to get +-3MD.
//   3. NPP Booth encoders each read an overlapping quartet of MR bits
//      {mr[3i+2], mr[3i+1], mr[3i], mr[3i-1]} (mr[-1] = 0) and recode it into a
//      digit in -4..+4; NPP partial product generators select the matching
//      multiple of MD.
//   4. Each partial product is sign-extended to 2N bits and shifted 3i places
//      left; a carry-save adder tree reduces the NPP rows to a sum and a carry
//      row, and a carry look-ahead adder adds them into the product.
// For N = 16, NPP = 6 partial products (an unsigned 16-bit multiplier needs 17
// signed bits, and every radix-8 digit covers 3). The product is exact for all
// signed and all unsigned 16-bit operand pairs.
//
// Taken from the document: the module and port names ain, bin, mul and their
// widths, the s_u control, the stage order (complement generator, Booth
// encoder, partial product generator, CSA tree, CLA), the quartet grouping,
// the digit mapping of its add-A/add-S list, and 3Y = 2Y + Y. This design's
// own choices: the extension widths, the count of six partial products, full
// sign extension of every row, the tree shape and the CLA group size.
module radix8_16bit
  import booth_r8_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]   ain,   // multiplicand MD
  input  logic [N-1:0]   bin,   // multiplier MR
  input  logic           s_u,   // 1: signed x signed, 0: unsigned x unsigned
  output logic [2*N-1:0] mul    // product
);

  localparam int NPP = num_pp(N);  // partial products
  localparam int W   = N + 1;      // extended multiplicand width
  localparam int MW  = W + 2;      // width of a partial product (up to +-4 MD)
  localparam int PW  = 2 * N;      // product width

  logic [W-1:0]       md_ext, md_neg;
  logic [3*NPP-1:0]   mr_ext;
  logic [MW-1:0]      md_x3, md_neg_x3;
  logic [3*NPP:0]     mr_pad;      // mr_ext with the implied zero below bit 0
  booth_digit_t       digit [NPP];
  logic [MW-1:0]      pp    [NPP];
  logic [PW-1:0]      row   [NPP];
  logic [PW-1:0]      tree_sum, tree_carry;

  sign_ext_corrector #(.N(N), .NPP(NPP)) u_sext (
    .md    (ain),
    .mr    (bin),
    .s_u   (s_u),
    .md_ext(md_ext),
    .mr_ext(mr_ext)
  );

  twos_complement_gen #(.W(W)) u_neg (
    .a    (md_ext),
    .neg_a(md_neg)
  );

  hard_multiple_gen #(.W(W)) u_x3 (
    .y     (md_ext),
    .neg_y (md_neg),
    .y3    (md_x3),
    .neg_y3(md_neg_x3)
  );

  assign mr_pad = {mr_ext, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_r8_encoder u_enc (
      .group_bits(mr_pad[3*i +: 4]),
      .digit     (digit[i])
    );

    booth_r8_ppgen #(.W(W)) u_ppg (
      .y     (md_ext),
      .neg_y (md_neg),
      .y3    (md_x3),
      .neg_y3(md_neg_x3),
      .digit (digit[i]),
      .pp    (pp[i])
    );

    // weight 8**i: sign-extend to the product width, shift 3i places
    assign row[i] = PW'(signed'(pp[i])) << (3 * i);
  end

  csa_tree #(.W(PW), .ROWS(NPP)) u_tree (
    .rows (row),
    .sum  (tree_sum),
    .carry(tree_carry)
  );

  cla_adder #(.W(PW)) u_cla (
    .a   (tree_sum),
    .b   (tree_carry),
    .sum (mul)
  );

endmodule

// csa_tree: carry-save adder tree reducing ROWS partial products to two rows.
//
// Level by level, the rows are taken three at a time into 3:2 carry-save adder
// rows (csa_3to2); each group of three becomes a sum row and a carry row, and
// rows left over (one or two) pass to the next level unchanged. Levels repeat
// until two rows remain, which a carry-propagating adder then adds. With the
// default six rows the tree has three levels (6 -> 4 -> 3 -> 2). The document
// names a CSA tree between partial products and the final CLA; the Wallace-style
// grouping is this design's choice. All arithmetic is modulo 2**W.
// Purely combinational.
module csa_tree
  import booth_r8_pkg::*;
#(
  parameter int W    = 32,
  parameter int ROWS = 6
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  localparam int LEVELS = csa_levels(ROWS);

  // Each level has its own input rows (rin) and output rows (rout); level l
  // reads the rout of level l-1.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int RIN  = csa_rows_at(ROWS, l);
    localparam int NCSA = RIN / 3;
    localparam int RLFT = RIN % 3;
    localparam int ROUT = 2 * NCSA + RLFT;

    logic [W-1:0] rin  [RIN];
    logic [W-1:0] rout [ROUT];

    if (l == 0) begin : g_first
      assign rin = rows;
    end else begin : g_next
      assign rin = g_level[l-1].rout;
    end

    for (genvar k = 0; k < NCSA; k++) begin : g_csa
      csa_3to2 #(.W(W)) u_csa (
        .x    (rin[3*k]),
        .y    (rin[3*k+1]),
        .z    (rin[3*k+2]),
        .sum  (rout[2*k]),
        .carry(rout[2*k+1])
      );
    end

    for (genvar k = 0; k < RLFT; k++) begin : g_pass
      assign rout[2*NCSA+k] = rin[3*NCSA+k];
    end
  end

  if (LEVELS == 0) begin : g_short
    // at most two rows: nothing to compress
    assign sum   = rows[0];
    assign carry = (ROWS > 1) ? rows[ROWS-1] : '0;
  end else begin : g_out
    assign sum   = g_level[LEVELS-1].rout[0];
    assign carry = g_level[LEVELS-1].rout[1];
  end

endmodule

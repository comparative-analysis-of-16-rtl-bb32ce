// booth_r8_pkg: types and sizing helpers shared by the radix-8 Booth multiplier.
//
// A radix-8 Booth digit is a signed value in -4..+4. It is carried between the
// encoder and the partial product generators as a magnitude (0..4, one code per
// multiple of the multiplicand) and a negate flag. The helper functions give the
// number of partial products for an N-bit operand and the depth of the 3:2
// carry-save tree that reduces them to two rows. Widths and the digit set follow
// the radix-8 scheme (multiples 0, +-Y, +-2Y, +-3Y, +-4Y); the struct layout and
// the sizing formulas are this design's own.
package booth_r8_pkg;

  // Magnitude of one Booth digit: which multiple of the multiplicand to select.
  typedef enum logic [2:0] {
    MAG0 = 3'd0,
    MAG1 = 3'd1,
    MAG2 = 3'd2,
    MAG3 = 3'd3,
    MAG4 = 3'd4
  } booth_mag_e;

  // One recoded digit: value = (neg ? -1 : +1) * mag. neg is never set with MAG0.
  typedef struct packed {
    logic       neg;
    booth_mag_e mag;
  } booth_digit_t;

  // Partial products for an N-bit multiplier that may be unsigned: the operand
  // is taken as N+1 signed bits and every digit covers 3 of them.
  function automatic int num_pp(input int n);
    return (n + 1 + 2) / 3;
  endfunction

  // Rows left after one level of 3:2 compression of r rows.
  function automatic int csa_rows_next(input int r);
    return 2 * (r / 3) + (r % 3);
  endfunction

  // Rows present before level l of the tree when it starts with r rows.
  function automatic int csa_rows_at(input int r, input int l);
    int rows;
    rows = r;
    for (int i = 0; i < l; i++) rows = (rows > 2) ? csa_rows_next(rows) : rows;
    return rows;
  endfunction

  // Number of 3:2 levels needed to bring r rows down to two.
  function automatic int csa_levels(input int r);
    int rows;
    int lv;
    rows = r;
    lv   = 0;
    while (rows > 2) begin
      rows = csa_rows_next(rows);
      lv++;
    end
    return lv;
  endfunction

endpackage

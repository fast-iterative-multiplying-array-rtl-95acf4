// fima_pkg: shared constants and elaboration-time helpers of the macrocell
// multiplying array.
//
// The array multiplies an N-bit factor A by an M-bit factor B. B is cut into
// rows of K2 bits; the product weights are cut into columns of K1 bits. The
// macrocell in row r, column c adds every partial product a_i*b_j with
// b_j in row r and i+j in [K1*c, K1*c+K1-1] (a K1-wide, K2-tall rectangle of
// the dot diagram). The functions below give, for a row, the first and last
// column that holds such products, and the contents of the COM look-up
// tables. They are evaluated while elaborating; nothing here is hardware on
// its own.
//
// Which columns a row spans follows from the weights of its products; the
// rule that a row whose first bit falls inside a column gets one more cell
// on its left is this design's own (see fima_multiplier).
package fima_pkg;

  function automatic int unsigned ceil_div(int unsigned x, int unsigned y);
    return (x + y - 1) / y;
  endfunction

  // Upper bound on K2 for a given K1: K2 numbers of K1 bits must sum to at
  // most 2*K1 bits, K2*(2^K1 - 1) <= 2^(2*K1) - 1, i.e. K2 <= 2^K1 + 1.
  function automatic int unsigned max_k2(int unsigned k1);
    return (1 << k1) + 1;
  endfunction

  // Cell shapes the structure supports: the second COM table returns 2*K1-1
  // bits split into K1-1 high bits (needs K1 >= 2), the block is split into
  // two non-empty halves (needs K2 >= 2), and K2 rows of K1 bits must sum to
  // at most 2*K1 bits (K2 <= 2^K1 + 1, see max_k2).
  function automatic bit shape_ok(int unsigned k1, int unsigned k2);
    return k1 >= 2 && k2 >= 2 && k2 <= max_k2(k1);
  endfunction

  // Number of rows of macrocells.
  function automatic int unsigned num_rows(int unsigned m, int unsigned k2);
    return ceil_div(m, k2);
  endfunction

  // First column of row r: the column holding weight r*K2 (its lowest b bit
  // times a_0).
  function automatic int unsigned row_first_col(int unsigned r, int unsigned k1,
                                                int unsigned k2);
    return (r * k2) / k1;
  endfunction

  // Last column of row r: the column holding weight r*K2 + (K2-1) + (N-1),
  // the highest b bit of the row (zero-padded to K2 bits) times a_(N-1).
  function automatic int unsigned row_last_col(int unsigned r, int unsigned n,
                                               int unsigned k1, int unsigned k2);
    return (r * k2 + k2 - 1 + n - 1) / k1;
  endfunction

  // Number of carry-save columns: one beyond the last column of the last
  // row, which receives that cell's U, x, y and z outputs.
  function automatic int unsigned num_cols(int unsigned n, int unsigned m,
                                           int unsigned k1, int unsigned k2);
    return row_last_col(num_rows(m, k2) - 1, n, k1, k2) + 2;
  endfunction

  // Contents of a COM table covering ks rows of the rectangle.
  // Address layout: {b[ks-1:0], a[ks+k1-2:0]}. Row j (factor bit b[j]) adds
  // the k1-bit field a[ks-1-j +: k1], so b[0] meets the highest a bits.
  function automatic int unsigned rom_word(int unsigned k1, int unsigned ks,
                                           int unsigned addr);
    int unsigned a_bits, b_bits, sum;
    a_bits = addr & ((1 << (ks + k1 - 1)) - 1);
    b_bits = addr >> (ks + k1 - 1);
    sum = 0;
    for (int unsigned j = 0; j < ks; j++)
      if (((b_bits >> j) & 1) != 0)
        sum += (a_bits >> (ks - 1 - j)) & ((1 << k1) - 1);
    return sum;
  endfunction

endpackage

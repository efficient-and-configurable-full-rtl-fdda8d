// fsbm_pkg -- shared types and size formulas of the full-search block-matching
// (FSBM) processor.
//
// The processor compares an N x N reference macroblock with every candidate
// block of a search window whose displacements run from -(p-1) to +p in each
// direction.  With C processing cores, each core handles floor(2p/C) candidate
// columns of a search row, so the effective number of candidates per row is
//   p_hat = C * floor(2p/C)
// and the effective search area is L x L pixels with L = p_hat + N - 1.
// The gap (passive columns) after each active block is m = floor(2p/C) - N,
// and the last gap additionally holds the N-1 columns of the connection block.
// An active block may have H <= N rows of PEs (H dividing N).  The reference
// block is then split into F = N/H horizontal fractions of H rows; each PE
// keeps F reference pixels and a SAD is the sum of F partial SADs, computed in
// F different sweeps.  These formulas follow the architecture description;
// active blocks with fewer than N columns are not supported here.
//
// Array operations issued by the central controller once per clock:
//   OP_HOLD   keep every search pixel where it is
//   OP_LEFT   rotate the cylinder one column to the left  (column i <- i+1)
//   OP_RIGHT  rotate the cylinder one column to the right (column i <- i-1)
//   OP_LOAD   move every row up by one and load a new bottom row from the
//             search-area input buffer
package fsbm_pkg;

  localparam int unsigned PIX_W = 8;  // luminance sample width

  typedef logic [PIX_W-1:0] pix_t;

  typedef enum logic [1:0] {
    OP_HOLD  = 2'd0,
    OP_LEFT  = 2'd1,
    OP_RIGHT = 2'd2,
    OP_LOAD  = 2'd3
  } arr_op_e;

  // candidates handled by one core in one search row
  function automatic int unsigned cands_per_core(int unsigned p, int unsigned c);
    return (2 * p) / c;
  endfunction

  // effective number of candidate positions per row / column (eq. 1)
  function automatic int unsigned p_hat(int unsigned p, int unsigned c);
    return c * ((2 * p) / c);
  endfunction

  // width of the effective search area (eq. 3)
  function automatic int unsigned search_l(int unsigned n, int unsigned p, int unsigned c);
    return p_hat(p, c) + n - 1;
  endfunction

  // passive columns between two active blocks (eq. 4, i < C, l = N)
  function automatic int unsigned gap_m(int unsigned n, int unsigned p, int unsigned c);
    return ((2 * p) / c) - n;
  endfunction

  // number of reference fractions (rows of the block handled per sweep)
  function automatic int unsigned n_frac(int unsigned n, int unsigned h);
    return n / h;
  endfunction

  // lowest / highest fraction f that window y (array holding search rows
  // y .. y+h-1) serves: candidate row y - f*h must lie in 0 .. ph-1
  function automatic int unsigned frac_lo(int unsigned y, int unsigned n, int unsigned h, int unsigned ph);
    for (int unsigned f = 0; f < n / h; f++)
      if (y < f * h + ph) return f;
    return n / h - 1;
  endfunction

  function automatic int unsigned frac_hi(int unsigned y, int unsigned n, int unsigned h);
    int unsigned r = 0;
    for (int unsigned f = 0; f < n / h; f++)
      if (y >= f * h) r = f;
    return r;
  endfunction

  // bits of a sum of absolute differences over an N x N block
  function automatic int unsigned sad_w(int unsigned n);
    return PIX_W + $clog2(n * n);
  endfunction

endpackage

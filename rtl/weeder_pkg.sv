// weeder_pkg: types, sizes and small helper functions shared by the
// Weeder pattern-matching and post-processing blocks.
//
// A k-mer automaton that tolerates d substitutions has 2d+1 rows of state
// transition elements (STEs); the last STE of every row is a report element.
// Row 0 reports exact matches, rows 2m-1 and 2m report matches with m
// substitutions.  The output vector of the matcher carries one bit per
// report element, pattern p owning bits p*(2d+1) .. p*(2d+1)+2d.
//
// Fixed-point conventions (this design's choice; the original circuit used
// floating point):
//   expected frequency f : unsigned, all bits fraction bits (pure fraction)
//   ratio, ln, score     : LN_FRAC fraction bits, ln and score signed
package weeder_pkg;

  typedef logic [7:0] sym_t;              // one 8-bit input symbol

  localparam int unsigned LN_FRAC   = 16; // fraction bits of ratio / ln / score

  // round(ln(2) * 2^32)
  localparam logic [31:0] LN2_Q32 = 32'd2977044472;

  // Report rows (= report elements) of one automaton.
  function automatic int unsigned rows_of(input int unsigned d);
    return 2 * d + 1;
  endfunction

  // Number of substitutions a report on row r stands for.
  function automatic int unsigned mism_of_row(input int unsigned r);
    return (r + 1) / 2;
  endfunction

  // STEs used by one automaton: (2d+1)k - d^2.
  function automatic int unsigned ste_count(input int unsigned k, input int unsigned d);
    return (2 * d + 1) * k - d * d;
  endfunction

  // Whether grid position (row r, column c) holds an STE.  Row 0 spans all
  // columns; mismatch row 2m-1 starts at column m-1; match row 2m at column m.
  function automatic bit ste_present(input int unsigned r, input int unsigned c);
    if (r == 0)            return 1'b1;
    else if (r % 2 == 1)   return c >= (r + 1) / 2 - 1;
    else                   return c >= r / 2;
  endfunction

endpackage

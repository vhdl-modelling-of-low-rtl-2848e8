// Data background generator for the zero-one scan test.
//
// Produces the full ROWS x COLS image of one of twelve backgrounds: solid
// zero, solid one, checkerboard, row stripes, double row stripes, column
// stripes and double column stripes, each followed by its complement. Cell
// (r, c) of each background is
//   checkerboard  (r + c) mod 2      row stripes     r mod 2
//   double rows   floor(r/2) mod 2   column stripes  c mod 2
//   double cols   floor(c/2) mod 2   solid           0
// and the complement inverts it; row 0 / column 0 start with 0 in the
// non-complemented form. Purely combinational, any array size.
//
// The twelve backgrounds and their layouts follow the document; the codes and
// the order are this design's choices (see mt_pkg::bg_pattern_e).
module bg_pattern_gen #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4
) (
  input  mt_pkg::bg_pattern_e       pattern,
  output logic [ROWS-1:0][COLS-1:0] image
);

  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++)
      for (int unsigned c = 0; c < COLS; c++)
        image[r][c] = mt_pkg::bg_bit(pattern, r, c);
  end

endmodule

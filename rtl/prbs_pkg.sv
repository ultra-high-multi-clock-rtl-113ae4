// prbs_pkg: types and constants shared by the PRBS framer array.
//
// The framer array runs ten pseudo-random binary sequence generators side by
// side. Generator i is a shift register with cells D0..DN (N = PRBS_N[i]) and
// feedback taps at cells DN and DM (M = PRBS_M[i]), i.e. the polynomial
// 1 + x^M + x^N of the pattern "2^N - 1". The ten (N, M) pairs and the
// 256-bit key width are the document's; the pattern numbering used by the
// pattern select input is this design's own.
package prbs_pkg;

  // Number of parallel pattern generators in one framer array.
  localparam int unsigned NUM_PATTERNS = 10;
  // Width of the key and of every framer array output word (D0..D255).
  localparam int unsigned KEY_W = 256;
  // Width of the pattern select code.
  localparam int unsigned SEL_W = 4;

  typedef logic [KEY_W-1:0] word_t;

  // Pattern select codes, in the order the patterns are listed.
  typedef enum logic [SEL_W-1:0] {
    PRBS7   = 4'd0,
    PRBS10  = 4'd1,
    PRBS15  = 4'd2,
    PRBS23  = 4'd3,
    PRBS31  = 4'd4,
    PRBS47  = 4'd5,
    PRBS51  = 4'd6,
    PRBS63  = 4'd7,
    PRBS127 = 4'd8,
    PRBS255 = 4'd9
  } pattern_e;

  // Highest register cell (the register is N+1 bits wide) and second tap.
  localparam int unsigned PRBS_N [NUM_PATTERNS] = '{7, 10, 15, 23, 31, 47, 51, 63, 127, 255};
  localparam int unsigned PRBS_M [NUM_PATTERNS] = '{6,  3, 14, 18, 28, 42, 48, 58, 123, 247};

endpackage

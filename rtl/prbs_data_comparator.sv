// prbs_data_comparator: pattern selection and encryption of a framer array.
//
// Picks one of the ten pattern words by the select code and combines it
// with the 256-bit key in a prbs_xor_cipher cell. The selected word is the
// PRBS output; the combined word is the encrypted output. A select code
// above the last pattern selects an all-zero word, so the encrypted output
// is then the key itself.
//
// The document shows all ten generators and the key entering one data
// comparator that delivers the encrypted word, without saying how the
// patterns share that single output. Choosing one pattern at a time by an
// explicit select code is this design's reading.
//
// Interface: patterns[10], key, sel -> prbs_out, prbs_encr (256 bits each).
// Timing: purely combinational.
module prbs_data_comparator
  import prbs_pkg::*;
(
  input  word_t    patterns [NUM_PATTERNS],
  input  word_t    key,
  input  pattern_e sel,
  output word_t    prbs_out,
  output word_t    prbs_encr
);

  always_comb begin
    prbs_out = '0;
    for (int unsigned i = 0; i < NUM_PATTERNS; i++) begin
      if (sel == SEL_W'(i)) prbs_out = patterns[i];
    end
  end

  prbs_xor_cipher #(.W(KEY_W)) u_encrypt (
    .data_i (prbs_out),
    .key_i  (key),
    .data_o (prbs_encr)
  );

endmodule

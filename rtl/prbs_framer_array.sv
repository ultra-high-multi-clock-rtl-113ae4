// prbs_framer_array: the 256-bit PRBS data framer array with encryption
// and decryption.
//
// Ten PRBS generators (prbs_generator_array) run in parallel from reset. The
// encryption data comparator (prbs_data_comparator) selects one pattern word
// and encrypts it with the 256-bit key; the decryption comparator, a second
// prbs_xor_cipher cell, recovers the PRBS word from the encrypted word with
// the same key. The ports key(255:0), clock, reset, PRBSOUT, PRBSEncr and
// PRBSDecr (all 255:0) are the document's; the pattern select input is this
// design's addition, since the document does not say how one output word is
// shared by the ten patterns.
//
// Interface: clock, reset (asynchronous, active high), key, sel ->
//   prbs_out, prbs_encr, prbs_decr (256 bits each).
// Timing: the generators are registers; the outputs follow them, the key and
//   sel combinationally. A changed sel takes effect in the same cycle.
module prbs_framer_array
  import prbs_pkg::*;
(
  input  logic     clock,
  input  logic     reset,
  input  word_t    key,
  input  pattern_e sel,
  output word_t    prbs_out,
  output word_t    prbs_encr,
  output word_t    prbs_decr
);

  word_t patterns [NUM_PATTERNS];

  prbs_generator_array u_generators (
    .clk      (clock),
    .rst      (reset),
    .patterns (patterns)
  );

  prbs_data_comparator u_encrypt (
    .patterns  (patterns),
    .key       (key),
    .sel       (sel),
    .prbs_out  (prbs_out),
    .prbs_encr (prbs_encr)
  );

  prbs_xor_cipher #(.W(KEY_W)) u_decrypt (
    .data_i (prbs_encr),
    .key_i  (key),
    .data_o (prbs_decr)
  );

endmodule

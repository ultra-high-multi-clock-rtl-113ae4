// prbs_encdec: single-pattern PRBS encryption and decryption unit.
//
// One PRBS generator (by default the 2^7-1 pattern in an 8-cell register,
// taps 7 and 6) runs freely from reset. Its word is encrypted with the key
// by a data comparator cell and the encrypted word is decrypted again by a
// second cell with the same key, so prbs_decr always equals prbs_out. The
// ports key, clock, reset, PRBSEncr and PRBSDecr are the document's top
// level symbol of this unit; prbs_out (the generator word) is brought out
// as in its simulation.
//
// Interface: clock, reset (asynchronous, active high), key[N:0] ->
//   prbs_out, prbs_encr, prbs_decr, all N+1 bits.
// Timing: prbs_out is a register; prbs_encr and prbs_decr follow it and the
//   key combinationally, so all three change together on the clock edge.
//   With key 8'h55 the first words after reset are out 01, 03, 07 ...,
//   encr 54, 56, 52 ...
module prbs_encdec #(
  parameter int unsigned N = 7,
  parameter int unsigned M = 6
) (
  input  logic       clock,
  input  logic       reset,
  input  logic [N:0] key,
  output logic [N:0] prbs_out,
  output logic [N:0] prbs_encr,
  output logic [N:0] prbs_decr
);

  prbs_lfsr #(.N(N), .M(M)) u_lfsr (
    .clk   (clock),
    .rst   (reset),
    .state (prbs_out)
  );

  prbs_xor_cipher #(.W(N + 1)) u_encrypt (
    .data_i (prbs_out),
    .key_i  (key),
    .data_o (prbs_encr)
  );

  prbs_xor_cipher #(.W(N + 1)) u_decrypt (
    .data_i (prbs_encr),
    .key_i  (key),
    .data_o (prbs_decr)
  );

endmodule

// prbs_xor_cipher: the parallel data comparator cell.
//
// Combines a data word with a key word bit by bit: every output bit is 1
// where the data bit and the key bit differ. Applied to a PRBS word it
// encrypts it; applied to the encrypted word with the same key it gives
// back the PRBS word, so one cell serves both directions. The bitwise
// comparison against the key follows the published simulation (key 8'h55
// turns PRBS word 8'h01 into 8'h54 and back); the document does not give
// the gates.
//
// Interface: data_i[W-1:0], key_i[W-1:0] -> data_o[W-1:0].
// Timing: purely combinational.
module prbs_xor_cipher #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] data_i,
  input  logic [W-1:0] key_i,
  output logic [W-1:0] data_o
);

  always_comb begin
    for (int unsigned b = 0; b < W; b++) begin
      data_o[b] = data_i[b] ^ key_i[b];
    end
  end

endmodule

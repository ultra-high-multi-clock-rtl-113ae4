// prbs_generator_array: the ten PRBS pattern generators of one framer array.
//
// Instantiates one prbs_lfsr for each pattern of prbs_pkg (2^7-1, 2^10-1,
// 2^15-1, 2^23-1, 2^31-1, 2^47-1, 2^51-1, 2^63-1, 2^127-1 and 2^255-1, taps
// from the package) on a common clock and reset, so all ten run in parallel
// and in step. Each register word D0..DN is presented zero-extended to the
// 256-bit word width, D0 in bit 0; the bits above DN of each word are
// constant zero by construction (only the 2^255-1 word fills all 256).
//
// Interface: clk, rst (asynchronous, active high) -> patterns[10] (256 bits).
// Timing: registered outputs, one new word per pattern per clock.
module prbs_generator_array
  import prbs_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  output word_t patterns [NUM_PATTERNS]
);

  for (genvar i = 0; i < NUM_PATTERNS; i++) begin : g_pattern
    localparam int unsigned N = PRBS_N[i];
    localparam int unsigned M = PRBS_M[i];

    logic [N:0] state;

    prbs_lfsr #(.N(N), .M(M)) u_lfsr (
      .clk   (clk),
      .rst   (rst),
      .state (state)
    );

    assign patterns[i] = word_t'(state);
  end

endmodule

// prbs_lfsr: one PRBS pattern generator of the framer array.
//
// A shift register with cells D0..DN (state[0] = D0). On every rising clock
// edge the contents move one cell towards DN and D0 takes the XNOR of cells
// DN and DM, so the polynomial is 1 + x^M + x^N as listed for each pattern.
// Reset clears the register; thanks to the XNOR feedback the all-zero state
// is a valid start and the register fills with ones: 01, 03, 07, 0F, ...
// for the default 2^7-1 generator, exactly as in the published simulation.
//
// Following that simulation, the register is N+1 cells wide and the taps are
// cells N and M of it. The sequence repeats with the period this feedback
// gives (63 states for N=7, M=6), which is not the 2^N-1 of a maximal-length
// generator. The asynchronous active-high reset is this design's choice.
//
// Interface: clk, rst (asynchronous, active high), state[N:0].
// Timing: state changes one clock after the edge; no combinational paths.
module prbs_lfsr #(
  parameter int unsigned N = 7,
  parameter int unsigned M = 6
) (
  input  logic       clk,
  input  logic       rst,
  output logic [N:0] state
);

  logic feedback;

  assign feedback = ~(state[N] ^ state[M]);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= '0;
    else     state <= {state[N-1:0], feedback};
  end

  initial begin
    assert (M < N) else $error("prbs_lfsr: tap M=%0d must be below N=%0d", M, N);
  end

endmodule

// prbs_super_frame_array: framer array SoCs grouped into super frames.
//
// NUM_SOC framer arrays (prbs_framer_array) run on one clock, each with its
// own 256-bit key and pattern select. Every GROUP consecutive arrays form one
// very long word super frame: super frame g carries the words of arrays
// GROUP*g .. GROUP*g+GROUP-1, the lowest-numbered array in the lowest 256
// bits. The document gives 32 registers in groups of four (8 x 4 frames per
// clock); those are the defaults. A separate key and select per array is
// this design's choice.
//
// Interface: clock, reset (asynchronous, active high), key[NUM_SOC],
//   sel[NUM_SOC] -> super_out, super_encr, super_decr, each an array of
//   NUM_SOC/GROUP words of GROUP*256 bits.
// Timing: as prbs_framer_array, no added latency.
module prbs_super_frame_array
  import prbs_pkg::*;
#(
  parameter int unsigned NUM_SOC = 32,
  parameter int unsigned GROUP   = 4,
  localparam int unsigned NUM_SUPER = NUM_SOC / GROUP,
  localparam int unsigned SUPER_W   = GROUP * KEY_W
) (
  input  logic               clock,
  input  logic               reset,
  input  word_t              key        [NUM_SOC],
  input  pattern_e           sel        [NUM_SOC],
  output logic [SUPER_W-1:0] super_out  [NUM_SUPER],
  output logic [SUPER_W-1:0] super_encr [NUM_SUPER],
  output logic [SUPER_W-1:0] super_decr [NUM_SUPER]
);

  for (genvar s = 0; s < NUM_SOC; s++) begin : g_soc
    localparam int unsigned G = s / GROUP;
    localparam int unsigned P = s % GROUP;

    prbs_framer_array u_framer (
      .clock     (clock),
      .reset     (reset),
      .key       (key[s]),
      .sel       (sel[s]),
      .prbs_out  (super_out [G][P*KEY_W +: KEY_W]),
      .prbs_encr (super_encr[G][P*KEY_W +: KEY_W]),
      .prbs_decr (super_decr[G][P*KEY_W +: KEY_W])
    );
  end

  initial begin
    assert (NUM_SOC % GROUP == 0)
      else $error("prbs_super_frame_array: NUM_SOC must be a multiple of GROUP");
  end

endmodule

// prbs_asic_top: the PRBS framer array ASIC.
//
// Three parts side by side on one clock and reset:
//  - the super frame array: NUM_SOC 256-bit PRBS framer arrays, each with ten
//    parallel pattern generators, a key and a pattern select, delivering
//    PRBS, encrypted and decrypted words grouped GROUP at a time into super
//    frames;
//  - the single-pattern 8-bit encryption/decryption unit (2^7-1 pattern,
//    8-bit key);
//  - the real-time bit counter with its Tera ... Xona Hertz clocks.
// The parts share no data; the document shows them as separate units driven
// by the same clock. Defaults are the document's sizes (32 arrays in groups
// of four, 2^40 ... 2^90 clock periods).
//
// Interface: see the port list; the super frame ports are arrays of
//   NUM_SOC/GROUP words of GROUP*256 bits.
// Timing: registers inside, outputs combinational from them (see parts).
module prbs_asic_top
  import prbs_pkg::*;
#(
  parameter int unsigned NUM_SOC   = 32,
  parameter int unsigned GROUP     = 4,
  parameter int unsigned TERA_EXP  = 40,
  parameter int unsigned PETA_EXP  = 50,
  parameter int unsigned EXA_EXP   = 60,
  parameter int unsigned ZETTA_EXP = 70,
  parameter int unsigned YOTTA_EXP = 80,
  parameter int unsigned XONA_EXP  = 90,
  localparam int unsigned NUM_SUPER = NUM_SOC / GROUP,
  localparam int unsigned SUPER_W   = GROUP * KEY_W
) (
  input  logic               clock,
  input  logic               reset,
  // super frame array
  input  word_t              soc_key    [NUM_SOC],
  input  pattern_e           soc_sel    [NUM_SOC],
  output logic [SUPER_W-1:0] super_out  [NUM_SUPER],
  output logic [SUPER_W-1:0] super_encr [NUM_SUPER],
  output logic [SUPER_W-1:0] super_decr [NUM_SUPER],
  // 8-bit encryption/decryption unit
  input  logic [7:0]         encdec_key,
  output logic [7:0]         encdec_out,
  output logic [7:0]         encdec_encr,
  output logic [7:0]         encdec_decr,
  // real-time clock
  output logic [XONA_EXP-1:0] rtc_bit_count,
  output logic               tera_clk,
  output logic               peta_clk,
  output logic               exa_clk,
  output logic               zetta_clk,
  output logic               yotta_clk,
  output logic               xona_clk
);

  prbs_super_frame_array #(.NUM_SOC(NUM_SOC), .GROUP(GROUP)) u_super (
    .clock      (clock),
    .reset      (reset),
    .key        (soc_key),
    .sel        (soc_sel),
    .super_out  (super_out),
    .super_encr (super_encr),
    .super_decr (super_decr)
  );

  prbs_encdec #(.N(7), .M(6)) u_encdec (
    .clock     (clock),
    .reset     (reset),
    .key       (encdec_key),
    .prbs_out  (encdec_out),
    .prbs_encr (encdec_encr),
    .prbs_decr (encdec_decr)
  );

  prbs_rtc_clock #(
    .TERA_EXP  (TERA_EXP),
    .PETA_EXP  (PETA_EXP),
    .EXA_EXP   (EXA_EXP),
    .ZETTA_EXP (ZETTA_EXP),
    .YOTTA_EXP (YOTTA_EXP),
    .XONA_EXP  (XONA_EXP),
    .CNT_W     (XONA_EXP)
  ) u_rtc (
    .clk       (clock),
    .rst       (reset),
    .bit_count (rtc_bit_count),
    .tera_clk  (tera_clk),
    .peta_clk  (peta_clk),
    .exa_clk   (exa_clk),
    .zetta_clk (zetta_clk),
    .yotta_clk (yotta_clk),
    .xona_clk  (xona_clk)
  );

endmodule

// prbs_rtc_clock: real-time bit counter with Tera ... Xona Hertz clocks.
//
// A free-running binary counter of the input clock (the "bit count") from
// which six slow clocks are taken: the Tera, Peta, Exa, Zetta, Yotta and
// Xona Hertz clocks have periods of 2^40, 2^50, 2^60, 2^70, 2^80 and 2^90
// input clocks, each high and low for half of that. The exponents are the
// document's; a clock of period 2^E is bit E-1 of the counter, which starts
// at zero after reset, so every derived clock starts low and rises after
// 2^(E-1) input clocks. The counter is as wide as the largest exponent and
// wraps. Counting from zero and taking the clocks from counter bits are this
// design's choices.
//
// Interface: clk, rst (asynchronous, active high) -> bit_count[CNT_W-1:0],
//   tera_clk, peta_clk, exa_clk, zetta_clk, yotta_clk, xona_clk.
// Timing: all outputs are registers (counter bits).
module prbs_rtc_clock #(
  parameter int unsigned TERA_EXP  = 40,
  parameter int unsigned PETA_EXP  = 50,
  parameter int unsigned EXA_EXP   = 60,
  parameter int unsigned ZETTA_EXP = 70,
  parameter int unsigned YOTTA_EXP = 80,
  parameter int unsigned XONA_EXP  = 90,
  parameter int unsigned CNT_W     = XONA_EXP
) (
  input  logic             clk,
  input  logic             rst,
  output logic [CNT_W-1:0] bit_count,
  output logic             tera_clk,
  output logic             peta_clk,
  output logic             exa_clk,
  output logic             zetta_clk,
  output logic             yotta_clk,
  output logic             xona_clk
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) bit_count <= '0;
    else     bit_count <= bit_count + CNT_W'(1);
  end

  assign tera_clk  = bit_count[TERA_EXP-1];
  assign peta_clk  = bit_count[PETA_EXP-1];
  assign exa_clk   = bit_count[EXA_EXP-1];
  assign zetta_clk = bit_count[ZETTA_EXP-1];
  assign yotta_clk = bit_count[YOTTA_EXP-1];
  assign xona_clk  = bit_count[XONA_EXP-1];

  initial begin
    assert (TERA_EXP >= 1 && XONA_EXP <= CNT_W)
      else $error("prbs_rtc_clock: exponents must lie in 1..CNT_W");
  end

endmodule

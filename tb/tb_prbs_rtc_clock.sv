// tb_prbs_rtc_clock: self-checking testbench of prbs_rtc_clock.
//
// The exponents 40 ... 90 cannot be simulated to a clock edge, so the
// counter is shrunk to exponents 2, 3, 4, 5, 6, 7 (same structure, periods
// 4 ... 128 clocks). Checks the bit count against a cycle counter, the level
// of each derived clock, and that each derived clock rises exactly every
// 2^E input clocks, first after 2^(E-1) clocks.
module tb_prbs_rtc_clock;
  localparam int unsigned EXPS [6] = '{2, 3, 4, 5, 6, 7};

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [6:0] bit_count;
  logic [5:0] clks, clks_prev;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned last_rise [6];
  int unsigned rises [6];

  prbs_rtc_clock #(
    .TERA_EXP(2), .PETA_EXP(3), .EXA_EXP(4), .ZETTA_EXP(5), .YOTTA_EXP(6), .XONA_EXP(7), .CNT_W(7)
  ) dut (
    .clk(clk), .rst(rst), .bit_count(bit_count),
    .tera_clk(clks[0]), .peta_clk(clks[1]), .exa_clk(clks[2]),
    .zetta_clk(clks[3]), .yotta_clk(clks[4]), .xona_clk(clks[5])
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned cycles;
    int unsigned period;
    repeat (2) @(negedge clk);
    checks++;
    if (bit_count != 0 || clks != 0) failures++;
    rst = 1'b0;
    clks_prev = clks;
    cycles = 0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      cycles++;
      checks++;
      if (bit_count != 7'(cycles % 128)) begin
        failures++;
        if (failures < 10) $display("FAIL count %0d after %0d clocks", bit_count, cycles);
      end
      for (int k = 0; k < 6; k++) begin
        period = 1 << EXPS[k];
        checks++;
        if (clks[k] != (((cycles % period) >= period / 2) ? 1'b1 : 1'b0)) begin
          failures++;
          if (failures < 10) $display("FAIL clock %0d level after %0d clocks", k, cycles);
        end
        if (clks[k] && !clks_prev[k]) begin
          checks++;
          if ((rises[k] == 0 && cycles != period / 2) ||
              (rises[k] != 0 && cycles - last_rise[k] != period)) begin
            failures++;
            if (failures < 10) $display("FAIL clock %0d rise spacing at %0d", k, cycles);
          end
          rises[k]++;
          last_rise[k] = cycles;
        end
      end
      clks_prev = clks;
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (rises[k] < 2) begin
        failures++;
        $display("FAIL clock %0d rose %0d times", k, rises[k]);
      end
    end
    rst = 1'b1;
    #1;
    checks++;
    if (bit_count != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_prbs_asic_top_full: prbs_asic_top at its default parameters.
//
// The whole chip as specified: 32 framer arrays in groups of four and the
// real-time clock with its 2^40 ... 2^90 periods. Runs 400 clocks of random
// pattern selects and keys and checks every super frame word, the 8-bit
// encryption unit and the 90-bit bit count against reference models. The
// derived clocks must stay low, as the first of them rises only after 2^39
// clocks.
module tb_prbs_asic_top_full;
  import prbs_pkg::*;
  import tb_prbs_ref_pkg::*;

  localparam int unsigned NSOC = 32;
  localparam int unsigned NSUP = 8;

  logic          clock = 1'b0;
  logic          reset = 1'b1;
  word_t         soc_key [NSOC];
  pattern_e      soc_sel [NSOC];
  logic [1023:0] super_out  [NSUP];
  logic [1023:0] super_encr [NSUP];
  logic [1023:0] super_decr [NSUP];
  logic [7:0]    encdec_key;
  logic [7:0]    encdec_out, encdec_encr, encdec_decr;
  logic [89:0]   rtc_bit_count;
  logic [5:0]    clks;
  int unsigned   checks = 0;
  int unsigned   failures = 0;

  prbs_asic_top dut (
    .clock(clock), .reset(reset),
    .soc_key(soc_key), .soc_sel(soc_sel),
    .super_out(super_out), .super_encr(super_encr), .super_decr(super_decr),
    .encdec_key(encdec_key), .encdec_out(encdec_out), .encdec_encr(encdec_encr), .encdec_decr(encdec_decr),
    .rtc_bit_count(rtc_bit_count),
    .tera_clk(clks[0]), .peta_clk(clks[1]), .exa_clk(clks[2]),
    .zetta_clk(clks[3]), .yotta_clk(clks[4]), .xona_clk(clks[5])
  );

  always #5 clock = ~clock;

  localparam int unsigned TAP_N [10] = '{7, 10, 15, 23, 31, 47, 51, 63, 127, 255};
  localparam int unsigned TAP_M [10] = '{6, 3, 14, 18, 28, 42, 48, 58, 123, 247};
  prbs_ref     refs [10];
  prbs_ref     ref8;
  int unsigned cycles = 0;
  initial begin
    for (int i = 0; i < 10; i++) refs[i] = new(TAP_N[i], TAP_M[i]);
    ref8 = new(7, 6);
  end

  always @(posedge clock) begin
    if (reset) begin
      for (int i = 0; i < 10; i++) refs[i].clear();
      ref8.clear();
      cycles = 0;
    end else begin
      for (int i = 0; i < 10; i++) refs[i].step();
      ref8.step();
      cycles++;
    end
  end

  function automatic word_t rand_word();
    word_t w;
    for (int i = 0; i < 8; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp_out;
    logic [7:0] e8;
    for (int s = 0; s < NSOC; s++) begin
      soc_key[s] = rand_word();
      soc_sel[s] = pattern_e'(s % 10);
    end
    encdec_key = 8'h55;
    repeat (2) @(negedge clock);
    reset = 1'b0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clock);
      for (int s = 0; s < NSOC; s++) begin
        soc_sel[s] = pattern_e'($urandom_range(0, 9));
        if ($urandom_range(0, 31) == 0) soc_key[s] = rand_word();
      end
      encdec_key = 8'($urandom);
      #1;
      for (int s = 0; s < NSOC; s++) begin
        exp_out = refs[int'(soc_sel[s])].word();
        check(super_out [s/4][(s%4)*256 +: 256] === exp_out,                "super frame PRBS word");
        check(super_encr[s/4][(s%4)*256 +: 256] === (exp_out ^ soc_key[s]), "super frame encrypted word");
        check(super_decr[s/4][(s%4)*256 +: 256] === exp_out,                "super frame decrypted word");
      end
      e8 = ref8.word()[7:0];
      check(encdec_out == e8, "8-bit PRBS word");
      check(encdec_encr == (e8 ^ encdec_key), "8-bit encrypted word");
      check(encdec_decr == e8, "8-bit decrypted word");
      check(rtc_bit_count == 90'(cycles), "bit count");
      check(clks == '0, "derived clocks low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

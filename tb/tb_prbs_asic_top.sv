// tb_prbs_asic_top: end-to-end testbench of prbs_asic_top.
//
// Keeps the document's array size (32 framer arrays in groups of four) and
// shrinks only the real-time clock exponents to 2 ... 7 so that every
// derived clock toggles. Over 700 clocks it changes the pattern selects and
// keys of all arrays, resets the chip once in mid-run, and checks every
// super frame word, the 8-bit encryption unit and the real-time counter
// against reference models. It counts how often each mechanism happened
// (each pattern selected, key change, reset, 8-bit sequence wrap, each
// derived clock rising) and fails if one never did.
module tb_prbs_asic_top;
  import prbs_pkg::*;
  import tb_prbs_ref_pkg::*;

  localparam int unsigned NSOC = 32;
  localparam int unsigned NSUP = 8;
  localparam int unsigned EXPS [6] = '{2, 3, 4, 5, 6, 7};

  logic          clock = 1'b0;
  logic          reset = 1'b1;
  word_t         soc_key [NSOC];
  pattern_e      soc_sel [NSOC];
  logic [1023:0] super_out  [NSUP];
  logic [1023:0] super_encr [NSUP];
  logic [1023:0] super_decr [NSUP];
  logic [7:0]    encdec_key;
  logic [7:0]    encdec_out, encdec_encr, encdec_decr;
  logic [6:0]    rtc_bit_count;
  logic [5:0]    clks, clks_prev;
  int unsigned   checks = 0;
  int unsigned   failures = 0;

  prbs_asic_top #(
    .TERA_EXP(2), .PETA_EXP(3), .EXA_EXP(4), .ZETTA_EXP(5), .YOTTA_EXP(6), .XONA_EXP(7)
  ) dut (
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
  int unsigned cycles;
  initial begin
    for (int i = 0; i < 10; i++) refs[i] = new(TAP_N[i], TAP_M[i]);
    ref8 = new(7, 6);
  end

  task automatic clear_models();
    for (int i = 0; i < 10; i++) refs[i].clear();
    ref8.clear();
    cycles = 0;
  endtask

  always @(posedge clock) begin
    if (reset) clear_models();
    else begin
      for (int i = 0; i < 10; i++) refs[i].step();
      ref8.step();
      cycles++;
    end
  end

  // mechanism counters
  int unsigned n_selected [10];
  int unsigned n_key_change;
  int unsigned n_reset;
  int unsigned n_wrap8;
  int unsigned n_rise [6];

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

  task automatic check_all();
    word_t exp_out;
    logic [7:0] e8;
    for (int s = 0; s < NSOC; s++) begin
      exp_out = refs[int'(soc_sel[s])].word();
      n_selected[int'(soc_sel[s])]++;
      check(super_out [s/4][(s%4)*256 +: 256] === exp_out,             "super frame PRBS word");
      check(super_encr[s/4][(s%4)*256 +: 256] === (exp_out ^ soc_key[s]), "super frame encrypted word");
      check(super_decr[s/4][(s%4)*256 +: 256] === exp_out,             "super frame decrypted word");
    end
    e8 = ref8.word()[7:0];
    check(encdec_out == e8, "8-bit PRBS word");
    check(encdec_encr == (e8 ^ encdec_key), "8-bit encrypted word");
    check(encdec_decr == e8, "8-bit decrypted word");
    check(rtc_bit_count == 7'(cycles % 128), "bit count");
    for (int k = 0; k < 6; k++) begin
      int unsigned period;
      period = 1 << EXPS[k];
      check(clks[k] == (((cycles % period) >= period / 2) ? 1'b1 : 1'b0), "derived clock level");
      if (clks[k] && !clks_prev[k]) n_rise[k]++;
    end
    clks_prev = clks;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev8;
    for (int s = 0; s < NSOC; s++) begin
      soc_key[s] = rand_word();
      soc_sel[s] = pattern_e'(s % 10);
    end
    encdec_key = 8'h55;
    clks_prev = '0;
    repeat (2) @(negedge clock);
    reset = 1'b0;
    prev8 = '0;
    for (int t = 0; t < 700; t++) begin
      @(negedge clock);
      for (int s = 0; s < NSOC; s++) begin
        if ($urandom_range(0, 3) == 0) soc_sel[s] = pattern_e'($urandom_range(0, 9));
        if ($urandom_range(0, 31) == 0) begin
          soc_key[s] = rand_word();
          n_key_change++;
        end
      end
      if ($urandom_range(0, 15) == 0) begin
        encdec_key = 8'($urandom);
        n_key_change++;
      end
      if (t == 500) begin
        reset = 1'b1;
        clear_models();
        n_reset++;
      end
      if (t == 503) reset = 1'b0;
      #1;
      if (!reset && encdec_out == 8'h00 && prev8 != 8'h00) n_wrap8++;
      prev8 = encdec_out;
      check_all();
    end
    for (int i = 0; i < 10; i++) begin
      $display("pattern %0d selected %0d times", i, n_selected[i]);
      check(n_selected[i] > 0, "pattern never selected");
    end
    $display("key changes %0d, resets %0d, 8-bit sequence wraps %0d", n_key_change, n_reset, n_wrap8);
    check(n_key_change > 0, "no key change");
    check(n_reset > 0, "no reset");
    check(n_wrap8 > 0, "8-bit sequence never wrapped");
    for (int k = 0; k < 6; k++) begin
      $display("derived clock %0d rose %0d times", k, n_rise[k]);
      check(n_rise[k] > 0, "derived clock never rose");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

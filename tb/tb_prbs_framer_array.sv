// tb_prbs_framer_array: self-checking testbench of prbs_framer_array.
//
// Runs the 256-bit framer array for 800 clocks. Every clock the pattern
// select is changed at random, and the key now and then, and the PRBS,
// encrypted and decrypted words are checked against the ten sequence
// reference models. A reset in mid-run is included. Counts how often each
// pattern was selected and fails if one never was.
module tb_prbs_framer_array;
  import prbs_pkg::*;
  import tb_prbs_ref_pkg::*;

  logic     clock = 1'b0;
  logic     reset = 1'b1;
  word_t    key;
  pattern_e sel;
  word_t    prbs_out, prbs_encr, prbs_decr;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned selected [10];

  prbs_framer_array dut (
    .clock(clock), .reset(reset), .key(key), .sel(sel),
    .prbs_out(prbs_out), .prbs_encr(prbs_encr), .prbs_decr(prbs_decr)
  );

  always #5 clock = ~clock;

  localparam int unsigned TAP_N [10] = '{7, 10, 15, 23, 31, 47, 51, 63, 127, 255};
  localparam int unsigned TAP_M [10] = '{6, 3, 14, 18, 28, 42, 48, 58, 123, 247};
  prbs_ref refs [10];
  initial for (int i = 0; i < 10; i++) refs[i] = new(TAP_N[i], TAP_M[i]);

  always @(posedge clock) begin
    for (int i = 0; i < 10; i++) begin
      if (reset) refs[i].clear();
      else       refs[i].step();
    end
  end

  function automatic word_t rand_word();
    word_t w;
    for (int i = 0; i < 8; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  task automatic check_outputs();
    word_t exp_out;
    int s;
    s = int'(sel);
    exp_out = (s < 10) ? refs[s].word() : '0;
    if (s < 10) selected[s]++;
    checks++;
    if (prbs_out !== exp_out) begin
      failures++;
      if (failures < 10) $display("FAIL PRBS word, select %0d at %0t", s, $time);
    end
    checks++;
    if (prbs_encr !== (exp_out ^ key)) begin
      failures++;
      if (failures < 10) $display("FAIL encrypted word, select %0d at %0t", s, $time);
    end
    checks++;
    if (prbs_decr !== exp_out) begin
      failures++;
      if (failures < 10) $display("FAIL decrypted word, select %0d at %0t", s, $time);
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
    key = rand_word();
    sel = PRBS7;
    repeat (2) @(negedge clock);
    reset = 1'b0;
    for (int t = 0; t < 800; t++) begin
      @(negedge clock);
      sel = pattern_e'($urandom_range(0, 9));
      if ($urandom_range(0, 7) == 0) key = rand_word();
      if (t == 400) begin
        // asynchronous reset: the generators clear at once
        reset = 1'b1;
        for (int i = 0; i < 10; i++) refs[i].clear();
      end
      if (t == 402) reset = 1'b0;
      #1;
      check_outputs();
    end
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (selected[i] == 0) begin
        failures++;
        $display("FAIL pattern %0d never selected", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

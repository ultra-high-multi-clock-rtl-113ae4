// tb_prbs_data_comparator: self-checking testbench of prbs_data_comparator.
//
// Drives random pattern words, random keys and every select code, including
// the six unused codes, and checks the selected word and its encryption
// (bits flipped where the key is 1; the key itself for an unused code).
module tb_prbs_data_comparator;
  import prbs_pkg::*;

  word_t    patterns [NUM_PATTERNS];
  word_t    key;
  pattern_e sel;
  word_t    prbs_out, prbs_encr;
  int unsigned checks = 0;
  int unsigned failures = 0;

  prbs_data_comparator dut (
    .patterns(patterns), .key(key), .sel(sel),
    .prbs_out(prbs_out), .prbs_encr(prbs_encr)
  );

  function automatic word_t rand_word();
    word_t w;
    for (int i = 0; i < 8; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp_out;
    for (int it = 0; it < 400; it++) begin
      for (int i = 0; i < 10; i++) patterns[i] = rand_word();
      key = rand_word();
      for (int s = 0; s < 16; s++) begin
        sel = pattern_e'(s);
        #1;
        exp_out = (s < 10) ? patterns[s] : '0;
        checks++;
        if (prbs_out !== exp_out) begin
          failures++;
          if (failures < 10) $display("FAIL select %0d: wrong word", s);
        end
        checks++;
        for (int b = 0; b < 256; b++) begin
          if (prbs_encr[b] !== (key[b] ? ~exp_out[b] : exp_out[b])) begin
            failures++;
            if (failures < 10) $display("FAIL select %0d: encrypted bit %0d", s, b);
            break;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

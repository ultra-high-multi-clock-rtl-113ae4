// tb_prbs_super_frame_array: self-checking testbench of
// prbs_super_frame_array at its default size (32 framer arrays, groups of
// four). Every clock each array gets a random pattern select and now and
// then a new key; every 256-bit slot of the eight PRBS, encrypted and
// decrypted super frames is checked against the reference models. Array s
// must appear in super frame s/4 at slot s%4.
module tb_prbs_super_frame_array;
  import prbs_pkg::*;
  import tb_prbs_ref_pkg::*;

  localparam int unsigned NSOC = 32;
  localparam int unsigned NSUP = 8;

  logic        clock = 1'b0;
  logic        reset = 1'b1;
  word_t       key [NSOC];
  pattern_e    sel [NSOC];
  logic [1023:0] super_out [NSUP];
  logic [1023:0] super_encr [NSUP];
  logic [1023:0] super_decr [NSUP];
  int unsigned checks = 0;
  int unsigned failures = 0;

  prbs_super_frame_array dut (
    .clock(clock), .reset(reset), .key(key), .sel(sel),
    .super_out(super_out), .super_encr(super_encr), .super_decr(super_decr)
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

  task automatic check_all();
    word_t exp_out;
    for (int s = 0; s < NSOC; s++) begin
      exp_out = refs[int'(sel[s])].word();
      checks++;
      if (super_out[s/4][(s%4)*256 +: 256] !== exp_out ||
          super_encr[s/4][(s%4)*256 +: 256] !== (exp_out ^ key[s]) ||
          super_decr[s/4][(s%4)*256 +: 256] !== exp_out) begin
        failures++;
        if (failures < 10) $display("FAIL array %0d at %0t", s, $time);
      end
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
    for (int s = 0; s < NSOC; s++) begin
      key[s] = rand_word();
      sel[s] = pattern_e'(s % 10);
    end
    repeat (2) @(negedge clock);
    reset = 1'b0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clock);
      for (int s = 0; s < NSOC; s++) begin
        sel[s] = pattern_e'($urandom_range(0, 9));
        if ($urandom_range(0, 15) == 0) key[s] = rand_word();
      end
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

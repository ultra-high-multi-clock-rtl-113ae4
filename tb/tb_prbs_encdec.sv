// tb_prbs_encdec: self-checking testbench of prbs_encdec.
//
// With key 8'h55 it checks the first eight PRBS, encrypted and decrypted
// words against the published simulation, all three changing on the same
// clock edge. Then it changes the key at random for a few hundred clocks
// and checks every word against the sequence reference model: encrypted
// word = PRBS word with the bits flipped where the key is 1, decrypted word
// = PRBS word.
module tb_prbs_encdec;
  import tb_prbs_ref_pkg::*;

  logic       clock = 1'b0;
  logic       reset = 1'b1;
  logic [7:0] key = 8'h55;
  logic [7:0] prbs_out, prbs_encr, prbs_decr;
  int unsigned checks = 0;
  int unsigned failures = 0;

  prbs_encdec dut (
    .clock(clock), .reset(reset), .key(key),
    .prbs_out(prbs_out), .prbs_encr(prbs_encr), .prbs_decr(prbs_decr)
  );

  always #5 clock = ~clock;

  prbs_ref r = new(7, 6);
  always @(posedge clock) begin
    if (reset) r.clear();
    else       r.step();
  end

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] OUT_P  [8] = '{8'h01, 8'h03, 8'h07, 8'h0F, 8'h1F, 8'h3F, 8'h7F, 8'hFE};
  localparam logic [7:0] ENCR_P [8] = '{8'h54, 8'h56, 8'h52, 8'h5A, 8'h4A, 8'h6A, 8'h2A, 8'hAB};

  initial begin
    logic [7:0] expw;
    repeat (2) @(negedge clock);
    reset = 1'b0;
    for (int t = 0; t < 8; t++) begin
      @(negedge clock);
      check(prbs_out,  OUT_P[t],  "published PRBS word");
      check(prbs_encr, ENCR_P[t], "published encrypted word");
      check(prbs_decr, OUT_P[t],  "published decrypted word");
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clock);
      key = 8'($urandom);
      #1;
      expw = r.word()[7:0];
      check(prbs_out, expw, "PRBS word");
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (prbs_encr[b] !== (key[b] ? ~expw[b] : expw[b])) failures++;
      end
      check(prbs_decr, expw, "decrypted word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

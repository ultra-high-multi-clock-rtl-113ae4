// tb_prbs_xor_cipher: self-checking testbench of prbs_xor_cipher.
//
// Exhaustively checks the default 8-bit cell (every data word against every
// key): each output bit must be 1 exactly where data and key differ, and a
// second cell with the same key must return the data word. Then checks a
// 256-bit cell with random words.
module tb_prbs_xor_cipher;
  logic [7:0]   d8, k8, e8, r8;
  logic [255:0] d256, k256, e256, r256;
  int unsigned  checks = 0;
  int unsigned  failures = 0;

  prbs_xor_cipher               dut8    (.data_i(d8),   .key_i(k8),   .data_o(e8));
  prbs_xor_cipher               back8   (.data_i(e8),   .key_i(k8),   .data_o(r8));
  prbs_xor_cipher #(.W(256))    dut256  (.data_i(d256), .key_i(k256), .data_o(e256));
  prbs_xor_cipher #(.W(256))    back256 (.data_i(e256), .key_i(k256), .data_o(r256));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    for (int d = 0; d < 256; d++) begin
      for (int k = 0; k < 256; k++) begin
        d8 = 8'(d);
        k8 = 8'(k);
        #1;
        ok = 1'b1;
        for (int b = 0; b < 8; b++) begin
          if (e8[b] !== ((d8[b] != k8[b]) ? 1'b1 : 1'b0)) ok = 1'b0;
        end
        if (r8 !== d8) ok = 1'b0;
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit data %h key %h -> %h / %h", d8, k8, e8, r8);
        end
      end
    end
    // Published example: key 55 turns 01 into 54 and 7F into 2A.
    d8 = 8'h01; k8 = 8'h55; #1; checks++; if (e8 !== 8'h54) failures++;
    d8 = 8'h7F; #1; checks++; if (e8 !== 8'h2A) failures++;
    for (int i = 0; i < 2000; i++) begin
      for (int w = 0; w < 8; w++) begin
        d256[w*32 +: 32] = $urandom;
        k256[w*32 +: 32] = $urandom;
      end
      #1;
      checks++;
      ok = 1'b1;
      for (int b = 0; b < 256; b++) begin
        if (e256[b] !== ((d256[b] != k256[b]) ? 1'b1 : 1'b0)) ok = 1'b0;
      end
      if (r256 !== d256) ok = 1'b0;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL 256-bit word %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_prbs_generator_array: self-checking testbench of prbs_generator_array.
//
// Runs all ten generators for 700 clocks (long enough for every cell of the
// 256-bit register to be reached by the feedback) with a reset in mid-run,
// comparing every zero-extended pattern word with its sequence reference
// model. The taps are written out here from the pattern list, not taken
// from the design's package.
module tb_prbs_generator_array;
  import prbs_pkg::*;
  import tb_prbs_ref_pkg::*;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  word_t patterns [NUM_PATTERNS];
  int unsigned checks = 0;
  int unsigned failures = 0;

  prbs_generator_array dut (.clk(clk), .rst(rst), .patterns(patterns));

  always #5 clk = ~clk;

  localparam int unsigned TAP_N [10] = '{7, 10, 15, 23, 31, 47, 51, 63, 127, 255};
  localparam int unsigned TAP_M [10] = '{6, 3, 14, 18, 28, 42, 48, 58, 123, 247};
  prbs_ref refs [10];

  initial for (int i = 0; i < 10; i++) refs[i] = new(TAP_N[i], TAP_M[i]);

  always @(posedge clk) begin
    for (int i = 0; i < 10; i++) begin
      if (rst) refs[i].clear();
      else     refs[i].step();
    end
  end

  task automatic compare_all();
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (patterns[i] !== refs[i].word()) begin
        failures++;
        if (failures < 10) $display("FAIL pattern %0d at %0t: got %h expected %h", i, $time, patterns[i], refs[i].word());
      end
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    compare_all();
    rst = 1'b0;
    repeat (700) begin
      @(negedge clk);
      compare_all();
    end
    rst = 1'b1;
    @(negedge clk);
    compare_all();
    rst = 1'b0;
    repeat (300) begin
      @(negedge clk);
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

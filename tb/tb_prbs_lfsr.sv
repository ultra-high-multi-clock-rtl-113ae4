// tb_prbs_lfsr: self-checking testbench of prbs_lfsr.
//
// Runs the default 2^7-1 generator and the 2^10-1 (taps 10, 3) and 2^23-1
// (taps 23, 18) generators against the sequence reference model, checks the
// first eight words of the 2^7-1 generator against the published simulation
// (01 03 07 0F 1F 3F 7F FE) and checks the repetition period of the first
// two generators (63 and 1533 clocks, computed separately by enumerating the
// states of the feedback). Also exercises a reset in mid-run.
module tb_prbs_lfsr;
  import tb_prbs_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [7:0]  s7;
  logic [10:0] s10;
  logic [23:0] s23;
  int unsigned checks = 0;
  int unsigned failures = 0;

  prbs_lfsr                 dut7  (.clk(clk), .rst(rst), .state(s7));
  prbs_lfsr #(.N(10), .M(3))  dut10 (.clk(clk), .rst(rst), .state(s10));
  prbs_lfsr #(.N(23), .M(18)) dut23 (.clk(clk), .rst(rst), .state(s23));

  always #5 clk = ~clk;

  prbs_ref r7  = new(7, 6);
  prbs_ref r10 = new(10, 3);
  prbs_ref r23 = new(23, 18);

  always @(posedge clk) begin
    if (rst) begin
      r7.clear(); r10.clear(); r23.clear();
    end else begin
      r7.step(); r10.step(); r23.step();
    end
  end

  task automatic check(input logic [255:0] got, input logic [255:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic compare_all();
    check(256'(s7),  r7.word(),  "prbs7");
    check(256'(s10), r10.word(), "prbs10");
    check(256'(s23), r23.word(), "prbs23");
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] PUBLISHED [8] = '{8'h01, 8'h03, 8'h07, 8'h0F, 8'h1F, 8'h3F, 8'h7F, 8'hFE};

  initial begin
    int unsigned first_repeat7;
    int unsigned first_repeat10;
    first_repeat7  = 0;
    first_repeat10 = 0;
    repeat (3) @(negedge clk);
    check(256'(s7), 256'(0), "reset state");
    rst = 1'b0;
    for (int unsigned t = 0; t < 8; t++) begin
      @(negedge clk);
      check(256'(s7), 256'(PUBLISHED[t]), "published 2^7-1 word");
    end
    // Period: states after reset are counted from 0; the all-zero start
    // state comes back after the period.
    for (int unsigned t = 9; t <= 3100; t++) begin
      @(negedge clk);
      compare_all();
      if (s7 == '0 && first_repeat7 == 0) first_repeat7 = t;
      if (s10 == '0 && first_repeat10 == 0) first_repeat10 = t;
    end
    check(256'(first_repeat7), 256'(63), "2^7-1 register period");
    check(256'(first_repeat10), 256'(1533), "2^10-1 register period");
    // Reset in mid-run, asynchronous.
    rst = 1'b1;
    #1;
    check(256'({s23, s10, s7}), 256'(0), "asynchronous reset");
    @(negedge clk);
    rst = 1'b0;
    repeat (100) begin
      @(negedge clk);
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

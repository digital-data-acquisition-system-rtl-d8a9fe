// tb_sh_adc_model: checks the hold behaviour of the two sample-and-holds, the
// channel selection, the conversion time and the offset-binary codes at
// -5 V, 0 V, +2.5 V and +5 V.
module tb_sh_adc_model;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0, sh = 0, sel = 0, start = 0;
  logic signed [15:0] cmv = 0, smv = 0;
  logic [11:0] data;
  logic busy;

  sh_adc_model #(.CONV_CYCLES(20)) dut (.clk, .rst_n, .cos_mv(cmv), .sin_mv(smv),
                                        .sh_ctrl(sh), .ana_sel(sel), .start, .data, .busy);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  task automatic conv(input bit s, input logic [11:0] expect_code, input string what);
    int n;
    @(negedge clk); sel = s; start = 1;
    @(negedge clk); start = 0;
    n = 0;
    while (busy) begin @(negedge clk); n++; end
    check(n >= 19 && n <= 20, $sformatf("%s: conversion time %0d", what, n));
    check(data == expect_code, $sformatf("%s: code %h exp %h", what, data, expect_code));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    cmv = -16'sd5000; smv = 16'sd0;
    sh = 1; repeat (3) @(negedge clk); sh = 0;
    cmv = 16'sd4000; smv = 16'sd4000;      // must not reach the held values
    conv(1, 12'h000, "COS -5 V");
    conv(0, 12'h800, "SIN 0 V");
    sh = 1; repeat (3) @(negedge clk); sh = 0;
    cmv = 16'sd2500; smv = 16'sd5000;
    sh = 1; repeat (3) @(negedge clk); sh = 0;
    conv(1, 12'hC00, "COS +2.5 V");
    conv(0, 12'hFFF, "SIN +5 V");
    report_and_finish();
  end
endmodule

// tb_clock_display: feeds the display from a reference serializer (written
// here, loaded by the display's own load request) and checks the 48-tick
// load period, the digit shown on each of the nine displays, its seven-segment
// pattern, and that the three millisecond digits light no display.
module tb_clock_display;
  import das_pkg::*;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0, tick = 0;
  logic load_out;
  logic [6:0] seg_n;
  logic [8:0] digit_en;
  logic [3:0] digit_val;
  logic [47:0] word, sreg;
  logic sdat;

  clock_display dut (.clk, .rst_n, .tick_50k(tick), .ser_data(sdat), .load_out,
                     .seg_n, .digit_en, .digit_val);

  always #5 clk = ~clk;
  assign sdat = sreg[47];

  // reference parallel-to-serial register
  always_ff @(posedge clk)
    if (!rst_n) sreg <= '0;
    else if (tick) sreg <= load_out ? word : {sreg[46:0], 1'b0};

  localparam logic [6:0] SEG [10] = '{7'h7E, 7'h30, 7'h6D, 7'h79, 7'h33,
                                      7'h5B, 7'h5F, 7'h70, 7'h7F, 7'h7B};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  initial begin
    int last_load, n, d, shown;
    logic [3:0] exp_d;
    word = 48'h123_14_35_27_986;      // day 123, 14:35:27.986
    repeat (3) @(posedge clk);
    rst_n = 1;
    last_load = -1; n = 0; shown = 0;
    for (int t = 0; t < 48 * 6; t++) begin
      @(negedge clk);
      tick = 1;
      if (load_out) begin
        if (last_load >= 0) check(t - last_load == 48, $sformatf("load period %0d", t - last_load));
        last_load = t;
        n++;
      end
      @(negedge clk);
      tick = 0;
      // after the tick that completes a digit, check latch and display
      if (n >= 2 && ((t - last_load) % 4) == 0 && t != last_load) begin
        d = (t - last_load) / 4 - 1;
        exp_d = word[47 - 4*d -: 4];
        check(digit_val == exp_d, $sformatf("digit %0d value %h exp %h", d, digit_val, exp_d));
        if (d < 9) begin
          check(digit_en == 9'(1 << d), $sformatf("digit %0d enable %b", d, digit_en));
          check(seg_n == ~SEG[exp_d], $sformatf("digit %0d segments", d));
          shown++;
        end else
          check(digit_en == '0, $sformatf("ms digit %0d not shown", d));
      end
    end
    check(n >= 5, "load requests seen");
    check(shown >= 27, "digits displayed");
    report_and_finish();
  end
endmodule

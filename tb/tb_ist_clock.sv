// tb_ist_clock: self-checking test of the digital clock.
// Runs the clock with OSC_DIV = 1 (clk stands for the 1 MHz point of the
// chain), checks the 50 kHz and 1 kHz tick periods, the thumb-wheel preset,
// the second/minute/hour/day roll-over, the 1 Hz output and the four trim
// controls: retard fine/coarse must lose 1 ms / 20 ms, advance fine/coarse
// must gain about 1 ms / 20 ms over a 100 ms interval.
module tb_ist_clock;
  import das_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rf = 0, rc = 0, af = 0, ac = 0, pl = 0;
  logic [11:0] pd = '0;
  logic [7:0] ph = '0, pm = '0;
  logic t1m, t100k, t50k, t1k, sq, pps, min_a, min_tick;
  bcd_time_t tn;
  int checks = 0, failures = 0;

  ist_clock #(.OSC_DIV(1)) dut (
    .clk, .rst_n, .retard_fine(rf), .retard_coarse(rc), .advance_fine(af),
    .advance_coarse(ac), .preset_load(pl), .preset_days(pd), .preset_hours(ph),
    .preset_mins(pm), .tick_1m(t1m), .tick_100k(t100k), .tick_50k(t50k), .tick_1k(t1k),
    .sq_50k(sq), .pps, .min_a, .min_tick, .time_now(tn));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // milliseconds since midnight from the BCD digits
  function automatic longint to_ms(bcd_time_t t);
    return ((((longint'(t.hr_t) * 10 + t.hr_u) * 60 + t.min_t * 10 + t.min_u) * 60
            + t.sec_t * 10 + t.sec_u) * 1000) + t.ms_h * 100 + t.ms_t * 10 + t.ms_u;
  endfunction

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic period_of(input int which, output int p);
    int c;
    c = 0;
    if (which == 0) begin @(posedge clk iff t50k); end else begin @(posedge clk iff t1k); end
    do begin @(posedge clk); c++; end while (!(which == 0 ? t50k : t1k));
    p = c;
  endtask

  task automatic trim(input int which, input int expect_ms, input string name);
    longint a, b;
    @(posedge clk iff t1k);
    @(negedge clk);
    a = to_ms(tn);
    case (which)
      0: rf = 1; 1: rc = 1; 2: af = 1; default: ac = 1;
    endcase
    @(negedge clk);
    {rf, rc, af, ac} = '0;
    wait_cycles(100_000 - 1);
    @(negedge clk);
    b = to_ms(tn);
    check((b - a) >= expect_ms - 1 && (b - a) <= expect_ms + 1,
          $sformatf("%s: %0d ms elapsed in 100 ms, expected %0d", name, b - a, expect_ms));
  endtask

  initial begin : watchdog
    repeat (90_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    wait_cycles(3);
    rst_n = 1'b1;
    period_of(0, p); check(p == 20, $sformatf("50 kHz period %0d", p));
    period_of(1, p); check(p == 1000, $sformatf("1 kHz period %0d", p));

    // preset 365 days 23:59, then run into the next day
    @(negedge clk);
    pd = 12'h365; ph = 8'h23; pm = 8'h59; pl = 1'b1;
    @(negedge clk);
    pl = 1'b0;
    check(tn == bcd_time_t'({12'h365, 8'h23, 8'h59, 8'h00, 12'h000}), "preset value");
    check(min_a == 1'b1, "min_a is minute-units bit 0");
    wait_cycles(250_000);
    @(negedge clk);
    check(tn.ms_h == 4'd2 && tn.ms_t == 4'd5 && tn.ms_u == 4'd0, $sformatf("250 ms: %h", tn));
    check(pps == 1'b1, "1 Hz high in first half second");
    wait_cycles(500_000);
    @(negedge clk);
    check(pps == 1'b0, "1 Hz low in second half second");
    begin : roll
      int mt;
      mt = 0;
      while (!(tn.hr_t == 0 && tn.hr_u == 0)) begin
        @(posedge clk);
        if (min_tick) mt++;
      end
      @(negedge clk);
      check(mt == 1, "one minute tick at roll-over");
      check(tn == bcd_time_t'({12'h366, 8'h00, 8'h00, 8'h00, 12'h000}),
            $sformatf("day roll-over at 60 s: %h", tn));
      check(min_a == 1'b0, "minute bit A after roll-over");
    end

    trim(0, 99, "retard fine");
    trim(1, 80, "retard coarse");
    trim(2, 101, "advance fine");
    trim(3, 120, "advance coarse");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

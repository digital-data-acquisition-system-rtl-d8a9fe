// tb_hex_encoder: enters source code 3,7 on the hex keyboard and loads it,
// checks both nibble latches and the address, checks that a held key is taken
// only once, then in RUN mode checks the 100 Hz address scan (one step per
// ten 1 kHz ticks) and that scan_hold stops it.
module tb_hex_encoder;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0, tick = 0;
  logic write_mode = 0, run_mode = 0, load = 0, hold = 0;
  logic [15:0] keys = '0;
  logic [7:0] addr;
  logic [3:0] khi, klo;
  logic t100;

  hex_encoder dut (.clk, .rst_n, .tick_1k(tick), .write_mode, .run_mode, .keys,
                   .load, .scan_hold(hold), .addr, .key_hi(khi), .key_lo(klo),
                   .tick_100hz(t100));

  always #5 clk = ~clk;
  // 1 kHz tick every 4 clocks
  int tc = 0;
  always @(posedge clk) begin
    tc <= (tc == 3) ? 0 : tc + 1;
    tick <= (tc == 3);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  task automatic press(input int k);
    @(negedge clk); keys = 16'(1 << k);
    repeat (120) @(negedge clk);          // > one full scan of 16 keys
    keys = '0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    logic [7:0] a0;
    int steps, ticks;
    repeat (3) @(negedge clk);
    rst_n = 1;
    write_mode = 1;
    press(3);
    check(khi == 4'h3, $sformatf("high nibble %h", khi));
    press(7);
    check(klo == 4'h7, $sformatf("low nibble %h", klo));
    check(addr == 8'h00, "address unchanged before LOAD");
    @(negedge clk); load = 1; @(negedge clk); @(negedge clk); load = 0;
    check(addr == 8'h37, $sformatf("address after LOAD %h", addr));
    press(4'hA);
    press(4'hF);
    check({khi, klo} == 8'hAF, $sformatf("second entry %h%h", khi, klo));
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    check(addr == 8'hAF, "second LOAD");
    // RUN mode scanning
    write_mode = 0; run_mode = 1;
    a0 = addr; steps = 0; ticks = 0;
    while (steps < 5) begin
      @(posedge clk);
      if (tick) ticks++;
      if (t100) steps++;
    end
    @(negedge clk);
    check(addr == a0 + 8'd5, $sformatf("5 scan steps: %h -> %h", a0, addr));
    check(ticks >= 41 && ticks <= 50, $sformatf("ticks per 5 steps %0d", ticks));
    hold = 1;
    a0 = addr;
    repeat (400) @(negedge clk);
    check(addr == a0, "scan held");
    hold = 0;
    repeat (400) @(negedge clk);
    check(addr != a0, "scan resumes");
    report_and_finish();
  end
endmodule

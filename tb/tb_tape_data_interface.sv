// tb_tape_data_interface: checks the byte layout {6 A/D bits, 0, status bit},
// the inverted data lines, the write/read data display and the stretching of
// a one-clock status pulse to STRETCH clocks.
module tb_tape_data_interface;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0, sib = 0, rw = 1, rdp_n = 1;
  logic [5:0] adc6 = '0;
  logic [7:0] rd_n = '1, status_n = '1, wr, wd_n, sled;
  logic [8:0] dled;

  tape_data_interface #(.STRETCH(30)) dut (
    .clk, .rst_n, .adc6, .sib, .rw_write(rw), .rd_n, .rdp_n, .status_n,
    .wr_byte(wr), .wd_n, .data_led(dled), .status_led(sled));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      adc6 = 6'($urandom); sib = 1'($urandom);
      #1;
      check(wr == {adc6, 1'b0, sib}, "byte layout");
      check(wd_n == ~{adc6, 1'b0, sib}, "inverted data lines");
      check(dled == {1'b0, adc6, 1'b0, sib}, "write data display");
    end
    rw = 0; rd_n = ~8'hA5; rdp_n = 0;
    #1 check(dled == 9'h1A5, "read data display");
    @(negedge clk) status_n = 8'b1111_0111;
    @(negedge clk) status_n = '1;
    n = 0;
    repeat (60) begin @(negedge clk); if (sled[3]) n++; end
    check(n >= 29 && n <= 31, $sformatf("stretched status %0d clocks", n));
    check(sled == 8'h00, "status LEDs off afterwards");
    report_and_finish();
  end
endmodule

// tb_time_deserializer: sends random 48-bit frames on a 50 kHz-style serial
// line (clock period 20 receiver clocks, data changing on the falling edge,
// marker on the first bit) and checks every received word and valid pulse.
module tb_time_deserializer;
  import das_pkg::*;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0, sclk = 0, sdat = 0, sld = 0;
  bcd_time_t tout;
  logic valid;
  int nvalid = 0;

  time_deserializer dut (.clk, .rst_n, .ser_clk(sclk), .ser_data(sdat), .ser_load(sld),
                         .time_out(tout), .valid);

  always #5 clk = ~clk;
  always @(posedge clk) if (valid) nvalid++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  task automatic send_bit(input bit b, input bit first);
    sdat = b; sld = first;
    repeat (10) @(negedge clk);
    sclk = 1;
    repeat (10) @(negedge clk);
    sclk = 0;
  endtask

  initial begin
    logic [47:0] w;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // a partial frame first: must not produce a word
    for (int b = 0; b < 20; b++) send_bit(1'b1, 1'b0);
    check(nvalid == 0, "no word without frame marker");
    for (int f = 0; f < 6; f++) begin
      w = {$urandom, $urandom};
      for (int b = 47; b >= 0; b--) send_bit(w[b], b == 47);
      repeat (5) @(negedge clk);
      check(tout == bcd_time_t'(w), $sformatf("frame %0d: got %h exp %h", f, tout, w));
      check(nvalid == f + 1, $sformatf("valid count %0d", nvalid));
    end
    report_and_finish();
  end
endmodule

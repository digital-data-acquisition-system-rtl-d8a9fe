// tb_time_serializer: checks that a loaded time word is sent most significant
// bit first, one bit per 50 kHz tick, with the frame marker on the first bit
// only, and that a new word is taken at every load.
module tb_time_serializer;
  import das_pkg::*;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0, tick = 0, sq = 0, load = 0;
  bcd_time_t tin;
  logic sclk, sdat, sld;

  time_serializer dut (.clk, .rst_n, .tick_50k(tick), .sq_50k(sq), .load,
                       .time_in(tin), .ser_clk(sclk), .ser_data(sdat), .ser_load(sld));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  task automatic do_tick(input bit ld);
    @(negedge clk); tick = 1; load = ld;
    @(negedge clk); tick = 0; load = 0;
    sq = 1;
    @(negedge clk); sq = 0;
  endtask

  initial begin
    logic [47:0] w;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      w = {$urandom, $urandom};
      tin = bcd_time_t'(w);
      do_tick(1'b1);
      tin = '0;                       // later changes must not matter
      for (int b = 47; b >= 0; b--) begin
        check(sdat == w[b], $sformatf("frame %0d bit %0d", f, b));
        check(sld == (b == 47), $sformatf("frame marker at bit %0d", b));
        check(sclk == sq, "serial clock passes through");
        if (b > 0) do_tick(1'b0);
      end
    end
    report_and_finish();
  end
endmodule

// tb_data_multiplexer: reads all 128 status bits through the address and
// rebuilds the sixteen bytes (byte i, bit j at address j*16+i), compares them
// with the expected status record, and checks that the IST time changes only
// on the modify-time pulse.
module tb_data_multiplexer;
  import das_pkg::*;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0, modt = 0;
  bcd_time_t ist = '0;
  logic [7:0] src = 8'h37;
  logic [3:0] lf = 4'h3;
  logic [5:0] beam = 6'h14;
  hhmm_t on_t;
  logic [6:0] addr = '0;
  logic sib;
  logic [7:0] bytes_o [16];

  data_multiplexer #(.STATION_CODE(STN_RAJKOT)) dut (
    .clk, .rst_n, .ist_in(ist), .modify_time(modt), .source_code(src), .lf_att(lf),
    .beam, .sdt_on(on_t), .ssi_addr(addr), .sib, .ssi_bytes(bytes_o));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  task automatic read_all(output logic [7:0] b [16]);
    for (int a = 0; a < 128; a++) begin
      addr = 7'(a);
      #1 b[a % 16][a / 16] = sib;
    end
  endtask

  initial begin
    logic [7:0] got [16];
    logic [7:0] expb [16];
    on_t.hr_t = 2'd0; on_t.hr_u = 4'd5; on_t.min_t = 3'd0; on_t.min_u = 4'd4;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ist = bcd_time_t'(48'h123_14_35_27_986);
    @(negedge clk);
    read_all(got);
    check(got[0] == 8'h00 && got[5] == 8'h00, "IST not taken without modify time");
    @(negedge clk) modt = 1;
    @(negedge clk) modt = 0;
    ist = bcd_time_t'(48'h999_99_99_99_999);
    @(negedge clk);
    read_all(got);
    expb = '{8'h86, 8'h79, 8'h52, 8'h43, 8'h31, 8'h12, 8'hCD, 8'h37,
             8'h03, 8'h14, 8'h04, 8'h05, 8'h00, 8'hFF, 8'h0F, 8'h0F};
    for (int i = 0; i < 16; i++)
      check(got[i] == expb[i], $sformatf("status byte E%0d: %h exp %h", i, got[i], expb[i]));
    report_and_finish();
  end
endmodule

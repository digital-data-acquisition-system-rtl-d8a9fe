// tb_memory_register: loads the example source (code 37, ON 05:04, OFF 06:04,
// beam 14) with the ON bit low, sets the ON bit in MODIFY mode and checks the
// other fields are kept, then in RUN mode drives the sidereal time and checks
// ON, the scan hold, the ON-bit gating, OFF at the OFF time, manual start and
// manual stop.
module tb_memory_register;
  import das_pkg::*;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0;
  logic wm = 0, mm = 0, rm = 0, wbtn = 0, mstart = 0, mstop = 0;
  logic [7:0] addr = '0;
  src_entry_t wr, rd;
  bcd_time_t sdt = '0;
  logic on, off, hold, busy;

  memory_register dut (.clk, .rst_n, .write_mode(wm), .modify_mode(mm), .run_mode(rm),
                       .write_btn(wbtn), .addr, .wr_entry(wr), .sdt, .manual_start(mstart),
                       .manual_stop(mstop),
                       .rd_entry(rd), .on, .off, .scan_hold(hold), .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  function automatic hhmm_t hm(input logic [15:0] bcd);
    hhmm_t h;
    h.hr_t = bcd[13:12]; h.hr_u = bcd[11:8]; h.min_t = bcd[6:4]; h.min_u = bcd[3:0];
    return h;
  endfunction

  task automatic set_sdt(input logic [15:0] bcd);
    sdt = '0;
    sdt.hr_t = bcd[15:12]; sdt.hr_u = bcd[11:8]; sdt.min_t = bcd[7:4]; sdt.min_u = bcd[3:0];
  endtask

  task automatic press_write();
    @(negedge clk); wbtn = 1; @(negedge clk); wbtn = 0; @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (!busy);
    @(negedge clk);
    addr = 8'h99;
    #1 check(rd == '0, "library cleared after reset");
    // WRITE mode: source 37
    wm = 1;
    addr = 8'h37;
    wr = '{spare: 3'b111, on_bit: 1'b0, lf_att: 4'h3, beam: 6'h14,
           off_time: hm(16'h0604), on_time: hm(16'h0504)};
    press_write();
    wr = '{spare: 3'b000, on_bit: 1'b1, lf_att: 4'h9, beam: 6'h05,
           off_time: hm(16'h0700), on_time: hm(16'h0504)};
    addr = 8'h38;
    press_write();
    addr = 8'h37;
    #1;
    check(rd.on_time == hm(16'h0504) && rd.off_time == hm(16'h0604), "times stored");
    check(rd.beam == 6'h14 && rd.lf_att == 4'h3 && !rd.on_bit && rd.spare == 0, "fields stored");
    // MODIFY mode: ON bit only
    wm = 0; mm = 1;
    wr = '{default: '0};
    wr.on_bit = 1'b1;
    press_write();
    #1;
    check(rd.on_bit && rd.beam == 6'h14 && rd.lf_att == 4'h3 && rd.on_time == hm(16'h0504),
          "modify changes only the ON bit");
    // source 38 ON bit cleared
    addr = 8'h38; wr.on_bit = 1'b0;
    press_write();
    #1 check(!rd.on_bit && rd.lf_att == 4'h9, "source 38 ON bit cleared");
    mm = 0;
    // RUN mode
    rm = 1;
    addr = 8'h37;
    set_sdt(16'h0503);
    repeat (3) @(negedge clk);
    check(!on && !hold, "no ON before ON time");
    set_sdt(16'h0504);
    @(negedge clk);
    check(on && hold && !off, "ON at ON time with ON bit set");
    addr = 8'h38;                       // scan held in a real system; rd changes here
    @(negedge clk);
    check(!on && hold, "ON gated by ON bit of the addressed entry");
    addr = 8'h37;
    set_sdt(16'h0600);
    repeat (3) @(negedge clk);
    check(on && !off, "still ON before OFF time");
    set_sdt(16'h0604);
    @(negedge clk);
    check(!on && off && !hold, "OFF at OFF time");
    addr = 8'h38;
    @(negedge clk);
    check(off, "OFF keeps its ON-bit gate after scan resumes");
    // entry with ON bit low stops the scan but gives no ON
    set_sdt(16'h0504);
    addr = 8'h38;
    @(negedge clk);
    @(negedge clk);
    check(hold && !on, "ON time of an entry with ON bit low: scan held, no ON");
    // leave RUN, manual start
    rm = 0;
    @(negedge clk);
    check(!hold && !on && !off, "flip-flops cleared outside RUN");
    rm = 1; set_sdt(16'h1111); addr = 8'h37;
    @(negedge clk);
    check(!on, "no ON without match");
    mstart = 1;
    repeat (4) @(negedge clk);
    mstart = 0;
    check(on && hold, "manual start sets ON");
    mstop = 1;
    repeat (4) @(negedge clk);
    mstop = 0;
    check(!on && off && !hold, "manual stop sets OFF and releases the scan");
    report_and_finish();
  end
endmodule

// tb_das_top: end-to-end run of one observation on the whole DAS.
//
// The local parameters OSC_DIV and CLK_DIV_1K set the time scale. As kept
// here (1 and 10), a millisecond is 100 IST clocks, 1/100 of real time, and
// the run takes about 9 million clocks. With 10 and 100 the top runs at its
// defaults and the same test needs about 900 million clocks. All waits are
// written in milliseconds. The sidereal oscillator runs 1.0026 times faster
// than the IST one. The
// test loads source 37 (ON 05:04, OFF 05:05, beam 14, LF attenuation 3) from
// the hex keyboard in WRITE mode, sets its ON bit in MODIFY mode, switches to
// RUN, presets the IST clock to day 045 10:00 and, 30 s later, the sidereal
// clock to 05:04. The library scan must stop on source 37, recording must
// start at the next IST minute, write four bytes per 50 ms frame with the
// correct A/D halves and one status bit each, and stop at the sidereal OFF
// time with a file mark. The status bits of the first 128 bytes are rebuilt
// and compared with the expected status record. A tape-transport model takes
// the bytes and reports full 1024-byte records.
// Mechanisms counted (each must occur): keyboard entry, library write, ON-bit
// modify, scan hold on ON match, minute wait, frames, modify-time refresh,
// buffer A and B overflows, file mark, internal reset.
`timescale 1ns/1ps
module tb_das_top;
  import das_pkg::*;
  `include "tb_check.svh"

  // Time scale of this run: IST clocks per millisecond = 10 * OSC_DIV * CLK_DIV_1K
  // (10 000 with the defaults 10 and 100). Any values keep the test valid.
  localparam int OSC_DIV    = 1;
  localparam int CLK_DIV_1K = 10;
  localparam int MS = 10 * OSC_DIV * CLK_DIV_1K;
  localparam int FRAME = 50 * MS;

  // rst_n falls at 1 ns so the asynchronous reset acts before the first edge
  logic clk = 0, clk_sdt = 0, rst_n = 1;
  initial #1 rst_n = 0;
  clock_panel_t ist_panel = '0, sdt_panel = '0;
  mode_sw_t mode = '0;
  logic [15:0] keys = '0;
  logic load_btn = 0, write_btn = 0, manual_start = 0, manual_stop = 0, man_clear = 0;
  src_entry_t entry_sw = '0;
  logic [4:0] man_set = '0;
  logic signed [15:0] cos_mv = 16'sd1234, sin_mv = -16'sd2345;
  logic a_ovf, b_ovf;
  logic [7:0] wd_n, records, status_led, src_addr;
  logic ans_stb_o, go_o, fen_o, wfm_o, rw_o, rf_o, erase_o, ist_pps, ist_min_a, das_on;
  logic [6:0] ist_seg_n, sdt_seg_n;
  logic [8:0] ist_digit_en, sdt_digit_en, data_led;
  src_entry_t src_entry;
  int nbytes, nrecords, nfilemarks;

  das_top #(.OSC_DIV(OSC_DIV), .CLK_DIV_1K(CLK_DIV_1K), .ADC_CONV_CYCLES(20 * OSC_DIV)) dut (
    .clk, .clk_sdt, .rst_n, .ist_panel, .sdt_panel, .mode, .keys, .load_btn, .write_btn,
    .entry_sw, .manual_start, .manual_stop, .man_set, .man_clear, .cos_mv, .sin_mv, .a_ovf, .b_ovf,
    .rd_n(8'hFF), .rdp_n(1'b1), .status_n({6'h3F, ~b_ovf, ~a_ovf}), .wd_n, .ans_stb_o, .go_o,
    .fen_o, .wfm_o, .rw_o, .rf_o, .erase_o, .ist_pps, .ist_min_a, .ist_seg_n, .ist_digit_en,
    .sdt_seg_n, .sdt_digit_en, .src_addr, .src_entry, .das_on, .records, .data_led,
    .status_led);

  pertec_bmtt_model tape (.clk, .wd_n, .ans_stb(ans_stb_o), .fen(fen_o), .rw(rw_o),
                          .go(go_o), .wfm(wfm_o), .a_ovf, .b_ovf, .nbytes, .nrecords,
                          .nfilemarks);

  always #5 clk = ~clk;
  always #4.987 clk_sdt = ~clk_sdt;

  // ---------------- mechanism counters ----------------
  int n_frames = 0, n_modt = 0, n_aovf = 0, n_bovf = 0, n_ires = 0, n_hold = 0;
  logic aq = 0, bq = 0, hq = 0;
  longint last_frame = -1, frame_err = 0;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    aq <= a_ovf; bq <= b_ovf; hq <= dut.scan_hold;
    if (dut.frame_tick) begin
      n_frames++;
      if (last_frame >= 0 && cyc - last_frame != FRAME) frame_err++;
      last_frame = cyc;
    end
    if (dut.modify_time) n_modt++;
    if (a_ovf && !aq) n_aovf++;
    if (b_ovf && !bq) n_bovf++;
    if (dut.int_reset) n_ires++;
    if (dut.scan_hold && !hq) n_hold++;
  end

  initial begin : watchdog
    repeat (200_000 * MS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  task automatic press_key(input int k);
    @(negedge clk) keys = 16'(1 << k);
    repeat (20 * MS) @(negedge clk);
    keys = '0;
    repeat (2 * MS) @(negedge clk);
  endtask

  task automatic push(ref logic b);
    @(negedge clk) b = 1;
    repeat (3) @(negedge clk);
    b = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic panel_load(ref clock_panel_t p, input logic [11:0] d, input logic [7:0] h,
                            input logic [7:0] m);
    p.days = d; p.hours = h; p.mins = m;
    @(negedge clk) p.preset_load = 1;
    repeat (20) @(negedge clk);
    p.preset_load = 0;
  endtask

  function automatic hhmm_t hm(input logic [15:0] bcd);
    hhmm_t h;
    h.hr_t = bcd[13:12]; h.hr_u = bcd[11:8]; h.min_t = bcd[6:4]; h.min_u = bcd[3:0];
    return h;
  endfunction

  initial begin
    longint t_ist0, t_on_sync;
    int n_keys;
    logic [7:0] ssi [16];
    logic [7:0] exp_hi [4];
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait (!dut.mem_busy);
    // ---- WRITE mode: source 37, ON bit low ----
    mode = '{auto_sel: 0, write_sel: 1, modify_sel: 0, run_sel: 0};
    press_key(3);
    press_key(7);
    push(load_btn);
    check(src_addr == 8'h37, $sformatf("keyboard address %h", src_addr));
    n_keys = (src_addr == 8'h37);
    entry_sw = '{spare: 3'b000, on_bit: 1'b0, lf_att: 4'h3, beam: 6'h14,
                 off_time: hm(16'h0505), on_time: hm(16'h0504)};
    push(write_btn);
    check(src_entry.beam == 6'h14 && !src_entry.on_bit, "entry written, ON bit low");
    // ---- MODIFY mode: ON bit high ----
    mode = '{auto_sel: 0, write_sel: 1, modify_sel: 1, run_sel: 0};
    entry_sw = '0;
    entry_sw.on_bit = 1'b1;
    push(write_btn);
    check(src_entry.on_bit && src_entry.beam == 6'h14, "ON bit modified, rest kept");
    // ---- RUN mode ----
    mode = '{auto_sel: 1, write_sel: 0, modify_sel: 0, run_sel: 1};
    panel_load(ist_panel, 12'h045, 8'h10, 8'h00);
    panel_load(sdt_panel, 12'h000, 8'h04, 8'h00);
    t_ist0 = cyc;
    repeat (1000 * MS) @(negedge clk);
    check(!dut.scan_hold && !das_on, "no ON before the ON time");
    check(src_addr != 8'h37, "library being scanned");
    repeat (29_000 * MS) @(negedge clk);
    panel_load(sdt_panel, 12'h000, 8'h05, 8'h04);   // sidereal 05:04
    repeat (100 * MS) @(negedge clk);
    wait (dut.scan_hold);
    repeat (10) @(negedge clk);
    check(src_addr == 8'h37, $sformatf("scan stopped on source %h", src_addr));
    check(dut.mem_on && !das_on, "ON raised, waiting for the IST minute");
    wait (das_on);
    t_on_sync = cyc;
    check((t_on_sync - t_ist0) / MS >= 59_990 && (t_on_sync - t_ist0) / MS <= 60_010,
          $sformatf("recording accepted at IST minute (%0d ms)", (t_on_sync - t_ist0) / MS));
    // ---- recording until the sidereal OFF time ----
    wait (nfilemarks == 1);
    repeat (200 * MS) @(negedge clk);
    check(!das_on && !fen_o, "stopped after file mark");
    check(n_ires >= 1, "internal reset after OFF");

    // ---- check the tape ----
    // the frame running at the OFF time may be cut short
    check(nbytes >= 4 * (n_frames - 1) && nbytes <= 4 * n_frames,
          $sformatf("bytes %0d for %0d frames", nbytes, n_frames));
    check(frame_err == 0, "frames every 50 ms");
    exp_hi = '{6'h27, 6'h39, 6'h10, 6'h3F};
    begin
      int bad = 0;
      for (int i = 0; i < tape.tape.size(); i++)
        if (tape.tape[i][7:2] != exp_hi[i % 4] || tape.tape[i][1] != 1'b0) bad++;
      check(bad == 0, $sformatf("%0d tape bytes with wrong A/D half or bit 1", bad));
    end
    for (int i = 0; i < 16; i++) ssi[i] = '0;
    for (int a = 0; a < 128; a++) ssi[a % 16][a / 16] = tape.tape[a][0];
    check(ssi[6] == 8'hD2 && ssi[7] == 8'h37, $sformatf("station %h source %h", ssi[6], ssi[7]));
    check(ssi[8] == 8'h03 && ssi[9] == 8'h14, "LF attenuation and beam in status");
    check(ssi[10] == 8'h04 && ssi[11] == 8'h05, "sidereal ON time in status");
    check({ssi[12], ssi[13], ssi[14], ssi[15]} == SYNC_WORD, "sync word");
    check(ssi[5] == 8'h04 && ssi[4][7:4] == 4'h5 && ssi[4][3:0] == 4'h1 && ssi[3] == 8'h00 &&
          ssi[2][7:4] == 4'h1 && ssi[2][3:0] == 4'h0,
          $sformatf("IST in status %h%h%h%h%h%h", ssi[5], ssi[4], ssi[3], ssi[2], ssi[1], ssi[0]));
    // second status cycle repeats the fixed fields
    begin
      int bad = 0;
      for (int a = 128; a < 256; a++)
        if ((a % 16) >= 6 && tape.tape[a][0] != tape.tape[a - 128][0]) bad++;
      check(bad == 0, "status repeats every 128 bytes");
    end
    check(nrecords == 2, $sformatf("full records %0d", nrecords));
    check(records == 8'(nrecords + 2), $sformatf("record counter %0d", records));

    // ---- mechanisms ----
    check(n_keys > 0, "mechanism: keyboard entry");
    check(n_hold > 0, "mechanism: scan hold");
    check(n_frames > 0, $sformatf("mechanism: frames %0d", n_frames));
    check(n_modt > 1, $sformatf("mechanism: modify time %0d", n_modt));
    check(n_aovf > 0 && n_bovf > 0, $sformatf("mechanism: overflows A %0d B %0d", n_aovf, n_bovf));
    check(nfilemarks == 1, "mechanism: file mark");
    $display("frames=%0d bytes=%0d records=%0d modify_time=%0d", n_frames, nbytes, nrecords, n_modt);
    report_and_finish();
  end
endmodule

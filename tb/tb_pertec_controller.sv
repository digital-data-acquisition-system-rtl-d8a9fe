// tb_pertec_controller: checks the start sequence after ON (FEN at 2 ms, a
// 1 ms GO at 4 ms), the 20 Hz frame clock (first tick 50 ms after ON, then
// every 50 ms, none in MANUAL), the file-mark sequence after OFF (WFM at 1 ms
// held 140 ms, GO at 3 ms, FEN dropped with WFM, internal reset 1 ms later)
// and that frames stop at OFF.
module tb_pertec_controller;
  `include "tb_check.svh"

  localparam int TK = 8;
  logic clk = 0, rst_n = 0, tick = 0, on = 0, off = 0, auto_m = 1;
  logic frame, fen, wfm, go, ires, rec;
  int tc = 0;
  longint ntick = 0;

  pertec_controller dut (.clk, .rst_n, .tick_1k(tick), .on, .off, .auto_mode(auto_m),
                         .frame_tick(frame), .fen, .wfm, .go, .int_reset(ires), .recording(rec));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    tc <= (tc == TK - 1) ? 0 : tc + 1;
    tick <= (tc == TK - 1);
    if (tick) ntick <= ntick + 1;
  end

  // event times in 1 kHz ticks
  longint t_fen = -1, t_go[$], t_wfm = -1, t_wfm_end = -1, t_fen_end = -1, t_res = -1, t_frames[$];
  logic fen_q = 0, go_q = 0, wfm_q = 0;
  always @(posedge clk) begin
    fen_q <= fen; go_q <= go; wfm_q <= wfm;
    if (fen && !fen_q) t_fen = ntick;
    if (go && !go_q) t_go.push_back(ntick);
    if (wfm && !wfm_q) t_wfm = ntick;
    if (!wfm && wfm_q) t_wfm_end = ntick;
    if (!fen && fen_q) t_fen_end = ntick;
    if (ires) t_res = ntick;
    if (frame) t_frames.push_back(ntick);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  initial begin
    longint t_on, t_off;
    int gowidth;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5 * TK) @(negedge clk);
    on = 1;
    t_on = ntick;
    repeat (20 * TK) @(negedge clk);
    check(t_fen - t_on == 2, $sformatf("FEN %0d ms after ON", t_fen - t_on));
    check(t_go.size() == 1 && t_go[0] - t_on == 4, "GO 4 ms after ON");
    check(rec, "recording");
    repeat (260 * TK) @(negedge clk);
    check(t_frames.size() >= 5, $sformatf("frames %0d", t_frames.size()));
    if (t_frames.size() >= 2) begin
      check(t_frames[0] - t_on >= 49 && t_frames[0] - t_on <= 50, $sformatf("first frame %0d ms", t_frames[0] - t_on));
      for (int i = 1; i < t_frames.size(); i++)
        check(t_frames[i] - t_frames[i-1] == 50, "frame period 50 ms");
    end
    // MANUAL stops the frame clock
    auto_m = 0;
    t_frames.delete();
    repeat (120 * TK) @(negedge clk);
    check(t_frames.size() == 0, "no frames in MANUAL");
    auto_m = 1;
    repeat (3 * TK) @(negedge clk);
    off = 1;
    t_off = ntick;
    t_frames.delete();
    gowidth = 0;
    repeat (150 * TK) begin @(negedge clk); if (go) gowidth++; end
    check(t_wfm - t_off == 1, $sformatf("WFM %0d ms after OFF", t_wfm - t_off));
    check(t_go.size() == 2 && t_go[1] - t_off == 3, "GO 3 ms after OFF");
    check(gowidth == TK, $sformatf("GO width %0d clocks", gowidth));
    check(t_wfm_end - t_wfm == 140, $sformatf("WFM held %0d ms", t_wfm_end - t_wfm));
    check(t_fen_end == t_wfm_end, "FEN drops with WFM");
    check(t_res - t_off == 142, $sformatf("internal reset %0d ms after OFF", t_res - t_off));
    check(!fen && !wfm && !rec, "idle after reset");
    repeat (100 * TK) @(negedge clk);
    check(t_frames.size() == 0, "no frames after OFF");
    report_and_finish();
  end
endmodule

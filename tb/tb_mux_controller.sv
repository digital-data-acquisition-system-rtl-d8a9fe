// tb_mux_controller: checks that ON waits for the IST minute, that each
// 20 Hz frame tick produces the eleven 1 ms slots in the order of the timing
// diagram, four answer strobes per frame (none without FEN), the 7-bit status
// address stepping by the returned count pulses, and one modify-time pulse in
// the S&H slot after each complete 128-byte status cycle.
module tb_mux_controller;
  import das_pkg::*;
  `include "tb_check.svh"

  localparam int TK = 10;   // clocks per 1 kHz tick
  logic clk = 0, rst_n = 0, tick = 0, min_tick = 0, on_in = 0, frame = 0, fen = 1, clr = 0;
  logic on_sync, slot_start, reset_p, sh_p, mux_a, mux_b, cos1, cos2, sin1, sin2, ans, modt;
  slot_e slot;
  logic [6:0] addr;
  int tc = 0, nt = 0;

  mux_controller dut (.clk, .rst_n, .tick_1k(tick), .min_tick, .on_in, .frame_tick(frame),
                      .fen, .count(ans), .cnt_clr(clr), .on_sync, .slot, .slot_start,
                      .reset_p, .sh_p, .mux_a, .mux_b, .cos1, .cos2, .sin1, .sin2,
                      .ans_stb(ans), .modify_time(modt), .ssi_addr(addr));

  always #5 clk = ~clk;
  // 1 kHz ticks; a frame tick on every 50th
  always @(posedge clk) begin
    tc <= (tc == TK - 1) ? 0 : tc + 1;
    tick <= (tc == TK - 1);
    frame <= (tc == TK - 1) && (nt % 50 == 0);
    if (tc == TK - 1) nt <= nt + 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  slot_e seq[$];
  int nans = 0, nmod = 0, mod_ok = 1, frames = 0;
  logic [6:0] addr_at_mod[$];
  always @(posedge clk) begin
    if (slot_start) seq.push_back(slot);
    if (ans) nans++;
    if (modt) begin
      nmod++;
      if (slot != SLOT_SH) mod_ok = 0;
      addr_at_mod.push_back(addr);
    end
    if (frame && on_sync) frames++;
  end

  initial begin
    static slot_e expect_seq[11] = '{SLOT_NOP0, SLOT_RESET, SLOT_SH, SLOT_MUXA, SLOT_COS1,
                                    SLOT_NOP5, SLOT_COS2, SLOT_MUXB, SLOT_SIN1, SLOT_NOP9,
                                    SLOT_SIN2};
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    on_in = 1;
    repeat (2000) @(negedge clk);
    check(!on_sync, "ON waits for the minute pulse");
    check(seq.size() == 0, "no slots before minute");
    @(negedge clk) min_tick = 1;
    @(negedge clk) min_tick = 0;
    check(on_sync, "ON accepted at the minute");
    // one frame: check order and 1 ms per slot
    @(posedge clk iff (frame && on_sync));
    seq.delete();
    nans = 0;
    cyc = 0;
    @(posedge clk);
    while (slot != SLOT_IDLE) begin @(posedge clk); cyc++; end
    check(seq.size() == 11, $sformatf("slots per frame %0d", seq.size()));
    for (int i = 0; i < 11 && i < seq.size(); i++)
      check(seq[i] == expect_seq[i], $sformatf("slot %0d is %s", i, seq[i].name()));
    check(cyc >= 11 * TK - 1 && cyc <= 11 * TK + 1, $sformatf("sequence length %0d clocks", cyc));
    check(nans == 4, $sformatf("answer strobes per frame %0d", nans));
    check(addr == 7'd4, $sformatf("status address after one frame %0d", addr));
    // run 70 frames: two complete status cycles
    nmod = 0; nans = 0;
    addr_at_mod.delete();
    repeat (70) @(posedge clk iff (frame && on_sync));
    repeat (12 * TK) @(posedge clk);
    check(nans == 70 * 4, $sformatf("strobes over 70 frames %0d", nans));
    check(nmod == 2, $sformatf("modify-time pulses %0d", nmod));
    check(mod_ok == 1, "modify time only in S&H slot");
    foreach (addr_at_mod[i]) check(addr_at_mod[i] == 7'd0, "modify time right after address wrap");
    // no strobes without FEN
    fen = 0; nans = 0;
    repeat (3) @(posedge clk iff (frame && on_sync));
    repeat (20 * TK) @(posedge clk);
    check(nans == 0, "no strobe without FEN");
    // ON dropped: sequence stops at once
    on_in = 0;
    @(negedge clk);
    @(negedge clk);
    check(!on_sync && slot == SLOT_IDLE, "ON released");
    clr = 1; @(negedge clk); clr = 0;
    check(addr == 0, "address cleared");
    report_and_finish();
  end
endmodule

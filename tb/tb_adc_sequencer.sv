// tb_adc_sequencer: plays the slot pulses of one frame twice, answers each
// start-conversion with a reference converter (COS -> ABC, SIN -> 123 hex,
// chosen by the mux select at the start pulse) and checks the S&H control,
// two conversions per frame and the four 6-bit outputs in the order COS high,
// COS low, SIN high, SIN low.
module tb_adc_sequencer;
  import das_pkg::*;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0;
  slot_e slot = SLOT_IDLE;
  logic [11:0] adc = 12'h000;
  logic sh, sel, start, oe;
  logic [5:0] d6;
  int nstart = 0;

  adc_sequencer dut (.clk, .rst_n, .reset_p(slot == SLOT_RESET), .sh_p(slot == SLOT_SH),
                     .mux_a(slot == SLOT_MUXA), .mux_b(slot == SLOT_MUXB),
                     .cos1(slot == SLOT_COS1), .cos2(slot == SLOT_COS2),
                     .sin1(slot == SLOT_SIN1), .sin2(slot == SLOT_SIN2),
                     .adc_data(adc), .sh_ctrl(sh), .ana_sel(sel), .adc_start(start),
                     .data6(d6), .byte_oe(oe));

  always #5 clk = ~clk;
  always @(posedge clk) if (start) begin
    nstart++;
    adc <= sel ? 12'hABC : 12'h123;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  initial begin
    logic [5:0] exp6 [4] = '{6'h2A, 6'h3C, 6'h04, 6'h23};
    int k;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      nstart = 0;
      k = 0;
      for (int s = 0; s < 11; s++) begin
        slot = slot_e'(s);
        repeat (20) @(negedge clk);
        check(sh == (slot == SLOT_SH), $sformatf("S&H control in slot %0d", s));
        check(oe == (slot inside {SLOT_COS1, SLOT_COS2, SLOT_SIN1, SLOT_SIN2}), "byte enable");
        if (oe) begin
          check(d6 == exp6[k], $sformatf("frame %0d byte %0d: %h exp %h", f, k, d6, exp6[k]));
          k++;
        end
      end
      slot = SLOT_IDLE;
      repeat (50) @(negedge clk);
      check(nstart == 2, $sformatf("conversions per frame %0d", nstart));
      adc = 12'h000;
    end
    report_and_finish();
  end
endmodule

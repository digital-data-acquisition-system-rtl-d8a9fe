// tb_control_signal_generator: checks each manual control bit and its clear,
// the OR with the automatic commands, the STB_DELAY delay of GO and the
// answer strobe, and the record counter over GO, A-OVF and B-OVF.
module tb_control_signal_generator;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0, mclr = 0, aw = 0, af = 0, awfm = 0, go = 0, stb = 0, ao = 0, bo = 0;
  logic [4:0] mset = '0;
  logic rw, rf, fen, wfm, erase, go_o, stb_o;
  logic [7:0] rec;

  control_signal_generator #(.STB_DELAY(4)) dut (
    .clk, .rst_n, .man_set(mset), .man_clear(mclr), .auto_write(aw), .auto_fen(af),
    .auto_wfm(awfm), .go, .ans_stb(stb), .a_ovf(ao), .b_ovf(bo), .rw_o(rw), .rf_o(rf),
    .fen_o(fen), .wfm_o(wfm), .erase_o(erase), .go_o, .ans_stb_o(stb_o), .records(rec));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report_and_finish();
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    repeat (3) @(negedge clk);
    s = 0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    int d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 5; b++) begin
      @(negedge clk) mset = 5'(1 << b);
      @(negedge clk) mset = '0;
      @(negedge clk);
      check({erase, wfm, fen, rf, rw} == 5'(1 << b), $sformatf("manual bit %0d", b));
      @(negedge clk) mclr = 1;
      @(negedge clk) mclr = 0;
      @(negedge clk);
      check({erase, wfm, fen, rf, rw} == 5'b0, "manual clear");
    end
    aw = 1; af = 1; awfm = 1;
    repeat (2) @(negedge clk);
    check(rw && fen && wfm && !rf && !erase, "automatic commands pass");
    aw = 0; af = 0; awfm = 0;
    // delay of GO and strobe
    @(negedge clk) stb = 1;
    @(negedge clk) stb = 0;
    d = 1;
    while (!stb_o && d < 20) begin @(negedge clk); d++; end
    check(d == 4, $sformatf("strobe delay %0d", d));
    check(rec == 0, "no record counted yet");
    pulse(go);
    pulse(ao);
    pulse(bo);
    pulse(ao);
    check(rec == 4, $sformatf("records %0d", rec));
    report_and_finish();
  end
endmodule

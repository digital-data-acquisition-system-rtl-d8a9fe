// control_signal_generator: final control lines to the tape transport and
// record counter.
//
// A 5-bit register with preset and clear (the manual control register) holds
// the operator's manual commands R/W (write select), R/F (rewind/forward),
// FEN, WFM and ERASE. A high man_set bit presets the matching register bit.
// The original register can only be preset, not loaded, so a set bit stays
// set until `man_clear` clears all five. man_set is the five switch levels
// gated by the panel's load button. Each manual bit is ORed with the
// matching automatic command of the Pertec controller to form the final
// control line. The automatic GO and the
// answer strobe are delayed by STB_DELAY clocks (the monoshot delay in front
// of the transport), so the data and commands settle before the strobe.
// GO, A-buffer overflow and B-buffer overflow are ORed and their rising edges
// counted in an 8-bit record counter shown on two hex displays.
//
// Timing: the final control lines are registered (one clock after their
// inputs); go_o and ans_stb_o come STB_DELAY clocks after go and ans_stb.
//
// The manual register ORed with the automatic commands, the delayed GO and
// answer strobe and the record counter fed by GO, A-OVF and B-OVF follow the
// described control signal generator, as do the five functions in the manual
// register. The delay length and the register being a plain clocked register
// are choices of this implementation.
module control_signal_generator #(
  parameter int unsigned STB_DELAY = 10,
  parameter int unsigned REC_BITS  = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [4:0]          man_set,     // {erase, wfm, fen, rf, rw}
  input  logic                man_clear,
  input  logic                auto_write,  // recording in progress
  input  logic                auto_fen,
  input  logic                auto_wfm,
  input  logic                go,
  input  logic                ans_stb,
  input  logic                a_ovf,
  input  logic                b_ovf,
  output logic                rw_o,
  output logic                rf_o,
  output logic                fen_o,
  output logic                wfm_o,
  output logic                erase_o,
  output logic                go_o,
  output logic                ans_stb_o,
  output logic [REC_BITS-1:0] records
);

  logic [4:0] man;
  logic [STB_DELAY-1:0] go_dl, stb_dl;
  logic rec_ev, rec_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         man <= '0;
    else if (man_clear) man <= '0;
    else                man <= man | man_set;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rw_o    <= 1'b0;
      rf_o    <= 1'b0;
      fen_o   <= 1'b0;
      wfm_o   <= 1'b0;
      erase_o <= 1'b0;
      go_dl   <= '0;
      stb_dl  <= '0;
    end else begin
      rw_o    <= man[0] || auto_write;
      rf_o    <= man[1];
      fen_o   <= man[2] || auto_fen;
      wfm_o   <= man[3] || auto_wfm;
      erase_o <= man[4];
      go_dl   <= {go_dl[STB_DELAY-2:0], go};
      stb_dl  <= {stb_dl[STB_DELAY-2:0], ans_stb};
    end

  assign go_o      = go_dl[STB_DELAY-1];
  assign ans_stb_o = stb_dl[STB_DELAY-1];

  // Record counter: rising edges of GO | A-OVF | B-OVF.
  assign rec_ev = go_o || a_ovf || b_ovf;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rec_q   <= 1'b0;
      records <= '0;
    end else begin
      rec_q <= rec_ev;
      if (rec_ev && !rec_q) records <= records + 1'b1;
    end

endmodule

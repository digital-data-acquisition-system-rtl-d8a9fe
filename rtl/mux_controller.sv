// mux_controller: control-pulse sequencer of the DAS.
//
// The ON request from the memory register is synchronised to the IST minute:
// `on_sync` rises at the first minute boundary after `on_in` rises and falls as
// soon as `on_in` falls. At every 20 Hz frame tick (from the Pertec controller,
// which only runs while ON) one pulse is launched into an 11-stage shift
// register stepped at 1 kHz, so that eleven 1 ms slots follow each other at
// the start of every 50 ms frame, in the order of das_pkg::slot_e:
//   no-op, RESET, S&H / modify time, MUX A, COS byte I, no-op, COS byte II,
//   MUX B, SIN byte I, no-op, SIN byte II.
// `slot` names the active slot (SLOT_IDLE between sequences) and `slot_start`
// pulses for one clock at the beginning of each slot. The answer strobe for the
// tape interface is the start of a byte slot while FEN is asserted.
// The `count` pulses returned by the Pertec controller (one per byte written)
// step a 7-bit counter, the system-status multiplexer address. A falling edge
// of its MSB (one complete 128-bit status cycle) arms the modify-time pulse,
// which is then issued once, in the next S&H slot, to refresh the IST time
// held by the data multiplexer.
//
// The slot order, the 1 kHz shift rate, the minute synchronisation, the answer
// strobe gating and the MSB-edge rule follow the described mux controller and
// its timing diagram; the one-clock strobe, the arming at reset and `cnt_clr`
// are choices of this implementation.
module mux_controller
  import das_pkg::*;
#(
  parameter int unsigned SSI_ADDR_BITS = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     tick_1k,
  input  logic                     min_tick,    // IST minute boundary
  input  logic                     on_in,       // ON from the memory register
  input  logic                     frame_tick,  // 20 Hz from the Pertec controller
  input  logic                     fen,
  input  logic                     count,       // one pulse per byte written
  input  logic                     cnt_clr,     // clear address, arm modify time
  output logic                     on_sync,
  output slot_e                    slot,
  output logic                     slot_start,
  output logic                     reset_p,
  output logic                     sh_p,
  output logic                     mux_a,
  output logic                     mux_b,
  output logic                     cos1,
  output logic                     cos2,
  output logic                     sin1,
  output logic                     sin2,
  output logic                     ans_stb,
  output logic                     modify_time,
  output logic [SSI_ADDR_BITS-1:0] ssi_addr
);

  logic mod_armed;

  // ON synchronised to the IST minute pulse.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)            on_sync <= 1'b0;
    else if (!on_in)       on_sync <= 1'b0;
    else if (min_tick)     on_sync <= 1'b1;

  // 11-slot 1 kHz sequence, started by each 20 Hz frame tick.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      slot       <= SLOT_IDLE;
      slot_start <= 1'b0;
    end else begin
      slot_start <= 1'b0;
      if (!on_sync) begin
        slot <= SLOT_IDLE;
      end else if (frame_tick) begin
        slot       <= SLOT_NOP0;
        slot_start <= 1'b1;
      end else if (tick_1k && slot != SLOT_IDLE) begin
        if (slot == SLOT_SIN2) slot <= SLOT_IDLE;
        else begin
          slot       <= slot_e'(slot + 4'd1);
          slot_start <= 1'b1;
        end
      end
    end

  assign reset_p = (slot == SLOT_RESET);
  assign sh_p    = (slot == SLOT_SH);
  assign mux_a   = (slot == SLOT_MUXA);
  assign mux_b   = (slot == SLOT_MUXB);
  assign cos1    = (slot == SLOT_COS1);
  assign cos2    = (slot == SLOT_COS2);
  assign sin1    = (slot == SLOT_SIN1);
  assign sin2    = (slot == SLOT_SIN2);

  assign ans_stb = slot_start && (cos1 || cos2 || sin1 || sin2) && fen;

  // System-status address counter and modify-time arming.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ssi_addr  <= '0;
      mod_armed <= 1'b1;
    end else if (cnt_clr) begin
      ssi_addr  <= '0;
      mod_armed <= 1'b1;
    end else begin
      if (count) begin
        ssi_addr <= ssi_addr + 1'b1;
        if (ssi_addr == '1) mod_armed <= 1'b1;   // MSB falls
      end
      if (modify_time) mod_armed <= 1'b0;
    end

  assign modify_time = slot_start && sh_p && mod_armed;

endmodule

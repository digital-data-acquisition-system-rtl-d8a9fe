// das_top: digital data acquisition system of one interplanetary-scintillation
// field station.
//
// The station records the SIN and COS outputs of a correlation receiver,
// sampled together at 20 Hz with 12-bit resolution, on a buffered magnetic
// tape, interleaved bit by bit with a 128-bit system-status record (IST time,
// station, source, beam, attenuation, sidereal ON time, sync word). Recording
// of a radio source starts and stops automatically at sidereal times taken
// from a 256-entry source library.
//
// Structure (clock domains in brackets):
//   u_ist_clk, u_ist_disp, u_ist_ser  IST clock, display and serial time [clk]
//   u_sdt_clk, u_sdt_disp, u_sdt_ser  sidereal clock, display, serial [clk_sdt]
//   u_sdt_rx, u_ist_rx                serial time receivers [clk]
//   u_hex                             keyboard encoder / library address
//   u_mem                             source library, ON/OFF comparison
//   u_mux                             20 Hz frame slots, status address
//   u_pertec                          tape commands, 20 Hz frame clock
//   u_adc_seq, u_adc                  A/D control and analog model
//   u_dmux                            system-status serialiser
//   u_csg, u_tape                     final tape controls, byte and displays
// One complete observation: in RUN mode the library is scanned at 100 Hz;
// when the sidereal hours:minutes equal the ON time of an entry whose ON bit
// is set, the scan stops and ON is raised; at the next IST minute the mux
// controller accepts it, the Pertec controller raises FEN and gives GO, and
// from 50 ms later every 50 ms frame writes four bytes (COS high, COS low,
// SIN high, SIN low, each with one status bit). At the OFF time a file mark
// is written (WFM, GO) and the system resets.
//
// All IST-side logic is synchronous to the 10 MHz IST oscillator `clk` with
// clock enables; the sidereal clock runs on its own 10.026 MHz `clk_sdt` and
// its serial time is synchronised into `clk`. `rst_n` is asynchronous; it must
// be released synchronously to both clocks. The analog receiver voltages enter
// as signed millivolts for the behavioural A/D model. OSC_DIV and CLK_DIV_1K
// exist so that a simulation can shorten the millisecond; the defaults give
// real time from 10 MHz oscillators.
//
// Some block outputs are left unconnected at this level because no other
// block or front-panel item uses them: the sidereal clock's own ticks, 1 Hz
// and minute outputs, the display digit values, the receivers' valid strobes,
// the key nibbles, the slot number, the A/D busy flag, the status byte array
// and the formed tape byte (which leaves inverted as wd_n). Lint reports them
// as unused signals.
module das_top
  import das_pkg::*;
#(
  parameter logic [7:0]  STATION_CODE = STN_THALTEJ,
  parameter int unsigned OSC_DIV      = 10,    // oscillator to 1 MHz
  parameter int unsigned CLK_DIV_1K   = 100,   // 100 kHz to 1 kHz
  parameter int unsigned ADC_CONV_CYCLES = 200 // A/D conversion time, clocks
) (
  input  logic               clk,
  input  logic               clk_sdt,
  input  logic               rst_n,
  // clock front panels
  input  clock_panel_t       ist_panel,
  input  clock_panel_t       sdt_panel,
  // DAS front panel
  input  mode_sw_t           mode,
  input  logic [15:0]        keys,
  input  logic               load_btn,
  input  logic               write_btn,
  input  src_entry_t         entry_sw,      // thumb-wheels and toggles
  input  logic               manual_start,
  input  logic               manual_stop,
  input  logic [4:0]         man_set,
  input  logic               man_clear,
  // receiver outputs
  input  logic signed [15:0] cos_mv,
  input  logic signed [15:0] sin_mv,
  // tape transport
  input  logic               a_ovf,
  input  logic               b_ovf,
  input  logic [7:0]         rd_n,
  input  logic               rdp_n,
  input  logic [7:0]         status_n,
  output logic [7:0]         wd_n,
  output logic               ans_stb_o,
  output logic               go_o,
  output logic               fen_o,
  output logic               wfm_o,
  output logic               rw_o,
  output logic               rf_o,
  output logic               erase_o,
  // clock outputs and displays
  output logic               ist_pps,
  output logic               ist_min_a,
  output logic [6:0]         ist_seg_n,
  output logic [8:0]         ist_digit_en,
  output logic [6:0]         sdt_seg_n,
  output logic [8:0]         sdt_digit_en,
  output logic [7:0]         src_addr,
  output src_entry_t         src_entry,
  output logic               das_on,
  output logic [7:0]         records,
  output logic [8:0]         data_led,
  output logic [7:0]         status_led
);

  logic write_mode, modify_mode, run_mode;
  assign write_mode  = !mode.auto_sel &&  mode.write_sel && !mode.modify_sel && !mode.run_sel;
  assign modify_mode = !mode.auto_sel &&  mode.write_sel &&  mode.modify_sel && !mode.run_sel;
  assign run_mode    =  mode.auto_sel && !mode.write_sel && !mode.modify_sel &&  mode.run_sel;

  // ---------------- IST clock [clk] ----------------
  logic ist_1m, ist_100k, ist_50k, ist_1k, ist_sq50, ist_min_tick, ist_load;
  logic ist_sclk, ist_sdat, ist_sld;
  bcd_time_t ist_time, ist_rx_time;
  logic [3:0] ist_dval;

  ist_clock #(.OSC_DIV(OSC_DIV), .DIV_1K(CLK_DIV_1K)) u_ist_clk (
    .clk, .rst_n,
    .retard_fine(ist_panel.retard_fine), .retard_coarse(ist_panel.retard_coarse),
    .advance_fine(ist_panel.advance_fine), .advance_coarse(ist_panel.advance_coarse),
    .preset_load(ist_panel.preset_load), .preset_days(ist_panel.days),
    .preset_hours(ist_panel.hours), .preset_mins(ist_panel.mins),
    .tick_1m(ist_1m), .tick_100k(ist_100k), .tick_50k(ist_50k), .tick_1k(ist_1k),
    .sq_50k(ist_sq50), .pps(ist_pps), .min_a(ist_min_a), .min_tick(ist_min_tick),
    .time_now(ist_time));

  clock_display u_ist_disp (
    .clk, .rst_n, .tick_50k(ist_50k), .ser_data(ist_sdat), .load_out(ist_load),
    .seg_n(ist_seg_n), .digit_en(ist_digit_en), .digit_val(ist_dval));

  time_serializer u_ist_ser (
    .clk, .rst_n, .tick_50k(ist_50k), .sq_50k(ist_sq50), .load(ist_load),
    .time_in(ist_time), .ser_clk(ist_sclk), .ser_data(ist_sdat), .ser_load(ist_sld));

  // ---------------- sidereal clock [clk_sdt] ----------------
  logic sdt_1m, sdt_100k, sdt_50k, sdt_1k, sdt_sq50, sdt_pps, sdt_min_a, sdt_min_tick, sdt_load;
  logic sdt_sclk, sdt_sdat, sdt_sld;
  bcd_time_t sdt_time, sdt_rx_time;
  logic [3:0] sdt_dval;

  ist_clock #(.OSC_DIV(OSC_DIV), .DIV_1K(CLK_DIV_1K)) u_sdt_clk (
    .clk(clk_sdt), .rst_n,
    .retard_fine(sdt_panel.retard_fine), .retard_coarse(sdt_panel.retard_coarse),
    .advance_fine(sdt_panel.advance_fine), .advance_coarse(sdt_panel.advance_coarse),
    .preset_load(sdt_panel.preset_load), .preset_days(sdt_panel.days),
    .preset_hours(sdt_panel.hours), .preset_mins(sdt_panel.mins),
    .tick_1m(sdt_1m), .tick_100k(sdt_100k), .tick_50k(sdt_50k), .tick_1k(sdt_1k),
    .sq_50k(sdt_sq50), .pps(sdt_pps), .min_a(sdt_min_a), .min_tick(sdt_min_tick),
    .time_now(sdt_time));

  clock_display u_sdt_disp (
    .clk(clk_sdt), .rst_n, .tick_50k(sdt_50k), .ser_data(sdt_sdat), .load_out(sdt_load),
    .seg_n(sdt_seg_n), .digit_en(sdt_digit_en), .digit_val(sdt_dval));

  time_serializer u_sdt_ser (
    .clk(clk_sdt), .rst_n, .tick_50k(sdt_50k), .sq_50k(sdt_sq50), .load(sdt_load),
    .time_in(sdt_time), .ser_clk(sdt_sclk), .ser_data(sdt_sdat), .ser_load(sdt_sld));

  // ---------------- serial time into the DAS [clk] ----------------
  logic sdt_rx_valid, ist_rx_valid;

  time_deserializer u_sdt_rx (
    .clk, .rst_n, .ser_clk(sdt_sclk), .ser_data(sdt_sdat), .ser_load(sdt_sld),
    .time_out(sdt_rx_time), .valid(sdt_rx_valid));

  time_deserializer u_ist_rx (
    .clk, .rst_n, .ser_clk(ist_sclk), .ser_data(ist_sdat), .ser_load(ist_sld),
    .time_out(ist_rx_time), .valid(ist_rx_valid));

  // ---------------- hex encoder and memory register ----------------
  logic [3:0] key_hi, key_lo;
  logic tick_100hz, mem_on, mem_off, scan_hold, mem_busy;

  hex_encoder u_hex (
    .clk, .rst_n, .tick_1k(ist_1k), .write_mode(write_mode || modify_mode),
    .run_mode, .keys, .load(load_btn), .scan_hold, .addr(src_addr),
    .key_hi, .key_lo, .tick_100hz);

  memory_register u_mem (
    .clk, .rst_n, .write_mode, .modify_mode, .run_mode, .write_btn,
    .addr(src_addr), .wr_entry(entry_sw), .sdt(sdt_rx_time), .manual_start, .manual_stop,
    .rd_entry(src_entry), .on(mem_on), .off(mem_off), .scan_hold, .busy(mem_busy));

  // ---------------- mux controller and Pertec controller ----------------
  slot_e slot;
  logic slot_start, reset_p, sh_p, mux_a, mux_b, cos1, cos2, sin1, sin2;
  logic ans_stb, modify_time, on_sync;
  logic [6:0] ssi_addr;
  logic frame_tick, fen, wfm, go, int_reset, recording;

  mux_controller u_mux (
    .clk, .rst_n, .tick_1k(ist_1k), .min_tick(ist_min_tick), .on_in(mem_on),
    .frame_tick, .fen, .count(ans_stb_o), .cnt_clr(int_reset), .on_sync,
    .slot, .slot_start, .reset_p, .sh_p, .mux_a, .mux_b, .cos1, .cos2, .sin1, .sin2,
    .ans_stb, .modify_time, .ssi_addr);

  pertec_controller u_pertec (
    .clk, .rst_n, .tick_1k(ist_1k), .on(on_sync), .off(mem_off),
    .auto_mode(mode.auto_sel), .frame_tick, .fen, .wfm, .go, .int_reset, .recording);

  assign das_on = on_sync;

  // ---------------- A/D converter ----------------
  logic sh_ctrl, ana_sel, adc_start, adc_busy, byte_oe;
  logic [11:0] adc_data;
  logic [5:0] data6;

  adc_sequencer u_adc_seq (
    .clk, .rst_n, .reset_p, .sh_p, .mux_a, .mux_b, .cos1, .cos2, .sin1, .sin2,
    .adc_data, .sh_ctrl, .ana_sel, .adc_start, .data6, .byte_oe);

  sh_adc_model #(.CONV_CYCLES(ADC_CONV_CYCLES)) u_adc (
    .clk, .rst_n, .cos_mv, .sin_mv, .sh_ctrl, .ana_sel, .start(adc_start),
    .data(adc_data), .busy(adc_busy));

  // ---------------- data multiplexer ----------------
  logic sib;
  logic [7:0] ssi_bytes [16];

  data_multiplexer #(.STATION_CODE(STATION_CODE)) u_dmux (
    .clk, .rst_n, .ist_in(ist_rx_time), .modify_time, .source_code(src_addr),
    .lf_att(src_entry.lf_att), .beam(src_entry.beam), .sdt_on(src_entry.on_time),
    .ssi_addr, .sib, .ssi_bytes);

  // ---------------- tape side ----------------
  logic [7:0] wr_byte;

  control_signal_generator u_csg (
    .clk, .rst_n, .man_set, .man_clear, .auto_write(recording), .auto_fen(fen),
    .auto_wfm(wfm), .go, .ans_stb, .a_ovf, .b_ovf, .rw_o, .rf_o, .fen_o, .wfm_o,
    .erase_o, .go_o, .ans_stb_o, .records);

  tape_data_interface u_tape (
    .clk, .rst_n, .adc6(data6), .sib, .rw_write(mode.write_sel || rw_o), .rd_n, .rdp_n,
    .status_n, .wr_byte, .wd_n, .data_led, .status_led);

endmodule

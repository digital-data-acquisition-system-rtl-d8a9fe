// das_pkg: types and constants shared by the blocks of the three-site IPS
// data acquisition system (DAS).
//
// Time is carried everywhere as twelve BCD digits (48 bits): days (3 digits),
// hours (2), minutes (2), seconds (2) and milliseconds (3). The source-library
// word is the 40-bit entry stored per radio source. The mux-controller slot
// numbers give the order of the control pulses inside one 50 ms (20 Hz) frame.
package das_pkg;

  // BCD time of day, most significant digit first.
  typedef struct packed {
    logic [3:0] day_h;
    logic [3:0] day_t;
    logic [3:0] day_u;
    logic [3:0] hr_t;
    logic [3:0] hr_u;
    logic [3:0] min_t;
    logic [3:0] min_u;
    logic [3:0] sec_t;
    logic [3:0] sec_u;
    logic [3:0] ms_h;
    logic [3:0] ms_t;
    logic [3:0] ms_u;
  } bcd_time_t;

  localparam int TIME_BITS = $bits(bcd_time_t);   // 48

  // Hours and minutes in the 13-bit packed form used by the source library:
  // hours tens (2 bits), hours units (4), minutes tens (3), minutes units (4).
  typedef struct packed {
    logic [1:0] hr_t;
    logic [3:0] hr_u;
    logic [2:0] min_t;
    logic [3:0] min_u;
  } hhmm_t;

  // One source-library entry (40 bits, ten 4-bit RAM chips wide).
  typedef struct packed {
    logic [2:0] spare;      // unused RAM bits, written as zero
    logic       on_bit;     // source selected for observation
    logic [3:0] lf_att;     // low-frequency attenuation
    logic [5:0] beam;       // beam code (Table of beams: 00..1F)
    hhmm_t      off_time;   // sidereal OFF time
    hhmm_t      on_time;    // sidereal ON time
  } src_entry_t;

  localparam int ENTRY_BITS = $bits(src_entry_t);  // 40

  // Front-panel controls of one digital clock: trim buttons and the
  // thumb-wheel preset of days, hours and minutes (BCD).
  typedef struct packed {
    logic        retard_fine;
    logic        retard_coarse;
    logic        advance_fine;
    logic        advance_coarse;
    logic        preset_load;
    logic [11:0] days;
    logic [7:0]  hours;
    logic [7:0]  mins;
  } clock_panel_t;

  // The four front-panel mode switches.
  typedef struct packed {
    logic auto_sel;     // 1: AUTO, 0: MANUAL
    logic write_sel;    // 1: WRITE, 0: READ
    logic modify_sel;   // 1: MODIFY, 0: NOT MODIFY
    logic run_sel;      // 1: RUN, 0: NOT RUN
  } mode_sw_t;

  // Control-pulse slots of one 20 Hz frame, one 1 ms slot each.
  typedef enum logic [3:0] {
    SLOT_NOP0   = 4'd0,
    SLOT_RESET  = 4'd1,
    SLOT_SH     = 4'd2,   // sample and hold, and modify time
    SLOT_MUXA   = 4'd3,   // analog mux to COS, start conversion
    SLOT_COS1   = 4'd4,   // first byte (6 MSBs) of COS
    SLOT_NOP5   = 4'd5,
    SLOT_COS2   = 4'd6,   // second byte (6 LSBs) of COS
    SLOT_MUXB   = 4'd7,   // analog mux to SIN, start conversion
    SLOT_SIN1   = 4'd8,
    SLOT_NOP9   = 4'd9,
    SLOT_SIN2   = 4'd10,
    SLOT_IDLE   = 4'd15   // no pulse running
  } slot_e;

  localparam int NUM_SLOTS = 11;

  // Fixed parts of the system-status information.
  localparam logic [31:0] SYNC_WORD     = 32'h00FF_0F0F;
  localparam logic [7:0]  STN_THALTEJ   = 8'hD2;
  localparam logic [7:0]  STN_RAJKOT    = 8'hCD;
  localparam logic [7:0]  STN_SURAT     = 8'hC9;

  // Pack the hours and minutes of a BCD time into the 13-bit library form.
  function automatic hhmm_t to_hhmm(bcd_time_t t);
    hhmm_t h;
    h.hr_t  = t.hr_t[1:0];
    h.hr_u  = t.hr_u;
    h.min_t = t.min_t[2:0];
    h.min_u = t.min_u;
    return h;
  endfunction

  // BCD digit to seven segments a..g (bit 6 = a, bit 0 = g), active low as
  // from a 7446 decoder-driver. Codes above 9 blank the digit.
  function automatic logic [6:0] seg7_n(logic [3:0] d);
    logic [6:0] s;
    case (d)
      4'd0: s = 7'b1111110;
      4'd1: s = 7'b0110000;
      4'd2: s = 7'b1101101;
      4'd3: s = 7'b1111001;
      4'd4: s = 7'b0110011;
      4'd5: s = 7'b1011011;
      4'd6: s = 7'b1011111;
      4'd7: s = 7'b1110000;
      4'd8: s = 7'b1111111;
      4'd9: s = 7'b1111011;
      default: s = 7'b0000000;
    endcase
    return ~s;
  endfunction

endpackage

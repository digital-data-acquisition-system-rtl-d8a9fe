// ist_clock: crystal-referenced digital time-of-day clock (IST or sidereal).
//
// The oscillator clock is divided by OSC_DIV to a 1 MHz tick and by a further
// ten to 100 kHz. The 100 kHz tick, or during an advance window every 1 MHz
// tick, drives a divide-by-2 (50 kHz) and a divide-by-DIV_1K (1 kHz at the
// default of 100; a smaller value only speeds up simulation). The 1 kHz
// tick advances BCD counters for milliseconds, seconds, minutes, hours and days.
// Four front-panel controls trim the clock: retard fine/coarse stop the
// oscillator pulses for RF_MS/RC_MS milliseconds; advance fine/coarse feed
// 1 MHz pulses instead of 100 kHz pulses for AF_US/AC_US microseconds, which
// gains nine times the window (about 1 ms and 20 ms at the defaults). A preset
// loads days, hours and minutes from thumb-wheel switches and clears the
// seconds, milliseconds and all dividers.
//
// The divider chain, the retard and advance scheme, the 1 and 20 ms retard
// times and the preset behaviour follow the clock described for the design;
// the advance window lengths and the day counter wrapping from 999 to 000 are
// choices of this implementation. The same module serves as the sidereal clock,
// run from a 10.026 MHz clock.
//
// Interface: all inputs are sampled on clk. The retard/advance inputs act on
// their rising edge (one trigger per press, like the monoshots they replace).
// tick_* outputs are one-clock enables; sq_50k is the 50 kHz square wave
// that clocks the serial time line (it rises half a bit after tick_50k); pps is a 1 Hz square wave, high for the
// first half of each second; min_a is bit A of the minute-units counter and
// min_tick a one-clock pulse when the minute changes.
module ist_clock
  import das_pkg::*;
#(
  parameter int unsigned OSC_DIV = 10,    // oscillator ticks per 1 MHz tick
  parameter int unsigned DIV_1K  = 100,   // 100 kHz ticks per 1 kHz tick (even)
  parameter int unsigned RF_MS   = 1,     // fine retard length
  parameter int unsigned RC_MS   = 20,    // coarse retard length
  parameter int unsigned AF_US   = 111,   // fine advance window
  parameter int unsigned AC_US   = 2222   // coarse advance window
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       retard_fine,
  input  logic       retard_coarse,
  input  logic       advance_fine,
  input  logic       advance_coarse,
  input  logic       preset_load,
  input  logic [11:0] preset_days,   // three BCD digits
  input  logic [7:0] preset_hours,   // two BCD digits
  input  logic [7:0] preset_mins,    // two BCD digits
  output logic       tick_1m,
  output logic       tick_100k,
  output logic       tick_50k,
  output logic       tick_1k,
  output logic       sq_50k,         // 50 kHz square wave, falls at tick_50k
  output logic       pps,
  output logic       min_a,
  output logic       min_tick,
  output bcd_time_t  time_now
);

  localparam int unsigned RETARD_MAX = (RC_MS > RF_MS ? RC_MS : RF_MS) * 1000 * OSC_DIV;
  localparam int unsigned ADV_MAX    = (AC_US > AF_US ? AC_US : AF_US);

  // ---- front-panel edge detection -------------------------------------
  logic [3:0] btn_q;
  logic [3:0] btn_rise;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) btn_q <= '0;
    else        btn_q <= {advance_coarse, advance_fine, retard_coarse, retard_fine};
  assign btn_rise = {advance_coarse, advance_fine, retard_coarse, retard_fine} & ~btn_q;

  // ---- retard: suppress oscillator pulses ------------------------------
  logic [$clog2(RETARD_MAX+1)-1:0] retard_cnt;
  logic osc_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                retard_cnt <= '0;
    else if (btn_rise[1])      retard_cnt <= ($bits(retard_cnt))'(RC_MS * 1000 * OSC_DIV);
    else if (btn_rise[0])      retard_cnt <= ($bits(retard_cnt))'(RF_MS * 1000 * OSC_DIV);
    else if (retard_cnt != 0)  retard_cnt <= retard_cnt - 1'b1;
  assign osc_en = (retard_cnt == 0);

  // ---- 10 MHz -> 1 MHz -> 100 kHz ---------------------------------------
  logic [$clog2(OSC_DIV+1)-1:0] div_osc;
  logic [3:0] div_1m;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      div_osc <= '0;
      div_1m  <= '0;
    end else if (preset_load) begin
      div_osc <= '0;
      div_1m  <= '0;
    end else if (osc_en) begin
      div_osc <= (div_osc == ($bits(div_osc))'(OSC_DIV - 1)) ? '0 : div_osc + 1'b1;
      if (tick_1m) div_1m <= (div_1m == 4'd9) ? 4'd0 : div_1m + 4'd1;
    end
  assign tick_1m   = osc_en && (div_osc == ($bits(div_osc))'(OSC_DIV - 1));
  assign tick_100k = tick_1m && (div_1m == 4'd9);

  // ---- advance: 1 MHz pulses replace the 100 kHz pulses ----------------
  logic [$clog2(ADV_MAX+1)-1:0] adv_cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                         adv_cnt <= '0;
    else if (btn_rise[3])               adv_cnt <= ($bits(adv_cnt))'(AC_US);
    else if (btn_rise[2])               adv_cnt <= ($bits(adv_cnt))'(AF_US);
    else if (adv_cnt != 0 && tick_1m)   adv_cnt <= adv_cnt - 1'b1;

  logic cnt_tick;   // count pulse into the 50 kHz / 1 kHz dividers
  assign cnt_tick = (adv_cnt != 0) ? tick_1m : tick_100k;

  // ---- 100 kHz -> 50 kHz -> 1 kHz ---------------------------------------
  logic [$clog2(DIV_1K)-1:0] div_100;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                div_100 <= '0;
    else if (preset_load)      div_100 <= '0;
    else if (cnt_tick)         div_100 <= (div_100 == ($bits(div_100))'(DIV_1K - 1)) ? '0 : div_100 + 1'b1;
  assign tick_50k = cnt_tick && div_100[0];
  assign tick_1k  = cnt_tick && (div_100 == ($bits(div_100))'(DIV_1K - 1));
  assign sq_50k   = div_100[0];

  // ---- BCD time-of-day counters ------------------------------------------
  logic c_ms, c_sec, c_min, c_hr;
  assign c_ms  = tick_1k && time_now.ms_h == 4'd9 && time_now.ms_t == 4'd9 && time_now.ms_u == 4'd9;
  assign c_sec = c_ms && time_now.sec_t == 4'd5 && time_now.sec_u == 4'd9;
  assign c_min = c_sec && time_now.min_t == 4'd5 && time_now.min_u == 4'd9;
  assign c_hr  = c_min && time_now.hr_t == 4'd2 && time_now.hr_u == 4'd3;
  assign min_tick = c_sec;

  // Increment a chain of BCD digits; each digit wraps at its own limit.
  function automatic logic [3:0] inc_digit(logic [3:0] d, logic [3:0] lim);
    return (d >= lim) ? 4'd0 : d + 4'd1;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      time_now <= '0;
    end else if (preset_load) begin
      time_now        <= '0;
      time_now.day_h  <= preset_days[11:8];
      time_now.day_t  <= preset_days[7:4];
      time_now.day_u  <= preset_days[3:0];
      time_now.hr_t   <= preset_hours[7:4];
      time_now.hr_u   <= preset_hours[3:0];
      time_now.min_t  <= preset_mins[7:4];
      time_now.min_u  <= preset_mins[3:0];
    end else if (tick_1k) begin
      time_now.ms_u <= inc_digit(time_now.ms_u, 4'd9);
      if (time_now.ms_u == 4'd9) begin
        time_now.ms_t <= inc_digit(time_now.ms_t, 4'd9);
        if (time_now.ms_t == 4'd9) time_now.ms_h <= inc_digit(time_now.ms_h, 4'd9);
      end
      if (c_ms) begin
        time_now.sec_u <= inc_digit(time_now.sec_u, 4'd9);
        if (time_now.sec_u == 4'd9) time_now.sec_t <= inc_digit(time_now.sec_t, 4'd5);
      end
      if (c_sec) begin
        time_now.min_u <= inc_digit(time_now.min_u, 4'd9);
        if (time_now.min_u == 4'd9) time_now.min_t <= inc_digit(time_now.min_t, 4'd5);
      end
      if (c_min) begin
        if (c_hr) begin
          time_now.hr_t <= 4'd0;
          time_now.hr_u <= 4'd0;
        end else begin
          time_now.hr_u <= inc_digit(time_now.hr_u, 4'd9);
          if (time_now.hr_u == 4'd9) time_now.hr_t <= time_now.hr_t + 4'd1;
        end
      end
      if (c_hr) begin
        time_now.day_u <= inc_digit(time_now.day_u, 4'd9);
        if (time_now.day_u == 4'd9) begin
          time_now.day_t <= inc_digit(time_now.day_t, 4'd9);
          if (time_now.day_t == 4'd9) time_now.day_h <= inc_digit(time_now.day_h, 4'd9);
        end
      end
    end

  assign pps   = (time_now.ms_h < 4'd5);
  assign min_a = time_now.min_u[0];

endmodule

// clock_display: multiplexed seven-segment display of the serial time.
//
// Four bits of the serial time are gathered in a 4-bit shift register (7495)
// at 50 kHz. A divide-by-4 (7473 pair) strobes the nibble into a latch (7475),
// whose BCD digit is decoded to seven segments (7446, active-low). The
// divide-by-4 output also clocks a divide-by-12 digit counter (7493) whose
// decoded value (7442) selects the display being lit, so each of the twelve
// digits of the frame is shown for 80 us in turn. Only the first nine digits,
// days to seconds, have a display; the three millisecond digits blank it.
// When both counters wrap the display asks the serializer to load a new time
// (`load_out`), which makes the 48-bit, 960 us frame.
//
// Timing: everything advances on tick_50k. The bit on ser_data during one
// bit period is captured at the tick that ends it. digit_en is one-hot,
// active high, and changes together with seg_n.
//
// The counters, the 960 us load pulse and the nine displayed digits follow the
// display described for the design; blanking the display for codes above 9 and
// the active-high digit enables are choices of this implementation.
module clock_display
  import das_pkg::*;
#(
  parameter int unsigned NUM_DIGITS   = 12,
  parameter int unsigned SHOWN_DIGITS = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tick_50k,
  input  logic                    ser_data,
  output logic                    load_out,
  output logic [6:0]              seg_n,      // a..g, active low
  output logic [SHOWN_DIGITS-1:0] digit_en,   // one display lit at a time
  output logic [3:0]              digit_val   // latched BCD digit
);

  logic [1:0] bitc;
  logic [3:0] digc;
  logic [2:0] sh;
  logic [3:0] shown_idx;

  assign load_out = (bitc == 2'd3) && (digc == 4'(NUM_DIGITS - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bitc      <= 2'd0;
      digc      <= 4'(NUM_DIGITS - 1);
      sh        <= '0;
      digit_val <= 4'hF;
      shown_idx <= 4'hF;
    end else if (tick_50k) begin
      sh   <= {sh[1:0], ser_data};
      bitc <= bitc + 2'd1;
      if (bitc == 2'd3) begin
        digit_val <= {sh, ser_data};
        shown_idx <= digc;
        digc      <= (digc == 4'(NUM_DIGITS - 1)) ? 4'd0 : digc + 4'd1;
      end
    end

  always_comb begin
    digit_en = '0;
    if (shown_idx < 4'(SHOWN_DIGITS)) digit_en[shown_idx] = 1'b1;
  end

  assign seg_n = seg7_n(digit_val);

endmodule

// time_deserializer: serial-to-parallel receiver for the 48-bit time frame.
//
// Stands for the 74164 serial-to-parallel converters and the 7495 holding
// registers that bring the clock's serial time into the DAS: one instance takes
// the sidereal time into the memory register, one takes the IST time into the
// data multiplexer. The serial clock, data and frame marker may come from
// another clock domain, so each passes through a two-flip-flop synchronizer.
// A bit is taken on each rising edge of the serial clock; the frame marker
// restarts the bit count, and after the 48th bit the word is copied to
// time_out and `valid` pulses for one clock.
//
// Timing: time_out changes about three clocks after the rising serial-clock
// edge that carries the last bit, once per 960 us frame. The clock must run at
// least ten times faster than the 50 kHz serial clock.
//
// Converting the serial time to parallel follows the design; the synchronizer
// and the use of the frame marker to align the word are choices of this
// implementation.
module time_deserializer
  import das_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ser_clk,
  input  logic      ser_data,
  input  logic      ser_load,
  output bcd_time_t time_out,
  output logic      valid
);

  logic [2:0] clk_s;                 // synchronizer + edge-detect history
  logic [1:0] dat_s, ld_s;
  logic [TIME_BITS-1:0] sreg;
  logic [5:0] cnt;
  logic rise;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      clk_s <= '0;
      dat_s <= '0;
      ld_s  <= '0;
    end else begin
      clk_s <= {clk_s[1:0], ser_clk};
      dat_s <= {dat_s[0], ser_data};
      ld_s  <= {ld_s[0], ser_load};
    end

  assign rise = clk_s[1] && !clk_s[2];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sreg     <= '0;
      cnt      <= '0;
      time_out <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (rise) begin
        sreg <= {sreg[TIME_BITS-2:0], dat_s[1]};
        if (ld_s[1])
          cnt <= 6'd1;
        else if (cnt == 6'(TIME_BITS - 1)) begin
          cnt      <= 6'd0;
          time_out <= {sreg[TIME_BITS-2:0], dat_s[1]};
          valid    <= 1'b1;
        end else if (cnt != 6'd0)
          cnt <= cnt + 6'd1;
      end
    end

endmodule

// time_serializer: parallel-to-serial converter for the 48-bit BCD time.
//
// Equivalent of the chain of 74165 shift registers at the clock's output. On a
// 50 kHz tick with `load` high the current time is copied into the register
// and its most significant bit (days, hundreds digit) is put on the line; on
// every other 50 kHz tick the register shifts by one. The load pulse comes from
// the display's divide-by-48 chain, so a fresh time word goes out every 48
// bits, 960 us at 50 kHz, and the serial time is at most about a millisecond
// old. `ser_load` is high for the first bit of each frame and lets a receiver
// find the frame start; `ser_clk` is the 50 kHz square wave passed through,
// whose rising edge falls in the middle of each bit.
//
// The register length, the 50 kHz rate and the load period follow the clock
// described for the design; the most-significant-digit-first order and the
// frame marker on ser_load are choices of this implementation.
module time_serializer
  import das_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      tick_50k,   // bit period boundary
  input  logic      sq_50k,     // 50 kHz square wave from the clock
  input  logic      load,       // load request from the display counters
  input  bcd_time_t time_in,
  output logic      ser_clk,
  output logic      ser_data,
  output logic      ser_load
);

  logic [TIME_BITS-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sreg     <= '0;
      ser_load <= 1'b0;
    end else if (tick_50k) begin
      ser_load <= load;
      if (load) sreg <= time_in;
      else      sreg <= {sreg[TIME_BITS-2:0], 1'b0};
    end

  assign ser_data = sreg[TIME_BITS-1];
  assign ser_clk  = sq_50k;

endmodule

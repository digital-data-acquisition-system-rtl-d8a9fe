// hex_encoder: hex keyboard encoder and source-address counter.
//
// WRITE (manual) mode: a 4-bit scan counter (74193) steps through the sixteen
// keys of the hex keyboard at 1 kHz and a 16-input multiplexer (74150) looks at
// the key it points to. When that key is pressed the scan clock is stopped and
// the count is the key's code. The first key code goes into the high-nibble
// latch, the next one into the low-nibble latch (two 7475s); a key must be
// released before the next is accepted. Pressing LOAD copies both latches into
// the 8-bit address counter (two 74193s with parallel load), which addresses
// the source-library RAM and the address display.
// RUN mode: the address counter is clocked at 100 Hz (1 kHz IST divided by
// ten, 7490), so the library is scanned one entry every 10 ms; `scan_hold`
// (the ON state of the memory register) stops the scan on the matching entry.
//
// Interface: keys[i] is high while key i is pressed; load is the LOAD switch.
// All inputs are synchronous to clk; key changes are seen within one 1 ms scan
// step of reaching the key. addr changes on the clock after LOAD rises, or on
// a 100 Hz step.
//
// Scanning, the two nibble latches, the parallel load and the 100 Hz RUN scan
// follow the described encoder; the 1 kHz scan rate, the order high nibble
// first and the key-release rule are choices of this implementation.
module hex_encoder #(
  parameter int unsigned ADDR_BITS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick_1k,
  input  logic                 write_mode,   // MAN / WRITE or MODIFY / NOT RUN
  input  logic                 run_mode,     // AUTO / READ / NOT MODIFY / RUN
  input  logic [15:0]          keys,
  input  logic                 load,
  input  logic                 scan_hold,
  output logic [ADDR_BITS-1:0] addr,
  output logic [3:0]           key_hi,
  output logic [3:0]           key_lo,
  output logic                 tick_100hz
);

  logic [3:0] scan;
  logic       key_hit;
  logic       waiting_release;
  logic       next_is_lo;
  logic       load_q;
  logic [3:0] div10;

  assign key_hit = keys[scan];

  // 16-key scan: the scan clock is disabled while the selected key is down.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      scan            <= '0;
      waiting_release <= 1'b0;
      next_is_lo      <= 1'b0;
      key_hi          <= '0;
      key_lo          <= '0;
    end else if (write_mode) begin
      if (key_hit) begin
        if (!waiting_release) begin
          if (next_is_lo) key_lo <= scan;
          else            key_hi <= scan;
          next_is_lo      <= !next_is_lo;
          waiting_release <= 1'b1;
        end
      end else begin
        if (tick_1k) scan <= scan + 4'd1;
        if (keys == 16'd0) waiting_release <= 1'b0;
      end
    end

  // 1 kHz / 10 = 100 Hz for the RUN-mode scan.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) div10 <= '0;
    else if (tick_1k) div10 <= (div10 == 4'd9) ? 4'd0 : div10 + 4'd1;
  assign tick_100hz = tick_1k && (div10 == 4'd9);

  // Address counter: parallel load in WRITE mode, count in RUN mode.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      addr   <= '0;
      load_q <= 1'b0;
    end else begin
      load_q <= load;
      if (write_mode && load && !load_q)
        addr <= ADDR_BITS'({key_hi, key_lo});
      else if (run_mode && tick_100hz && !scan_hold)
        addr <= addr + 1'b1;
    end

endmodule

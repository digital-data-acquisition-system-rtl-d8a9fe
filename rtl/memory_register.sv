// memory_register: source library and ON/OFF time comparison.
//
// Holds one 40-bit entry (das_pkg::src_entry_t) for each of up to 256 radio
// sources: sidereal ON and OFF time (hours and minutes), beam code, LF
// attenuation and the ON bit. The source code is the RAM address.
//   WRITE mode  : a rising edge on `write_btn` stores the whole front-panel
//                 entry at `addr`.
//   MODIFY mode : the same edge changes only the ON bit of the entry.
//   RUN mode    : the address is scanned by the hex encoder at 100 Hz. The
//                 sidereal hours and minutes are compared with the ON time of
//                 the addressed entry (7485 comparators); on equality the ON
//                 flip-flop is set, which also stops the scan (`scan_hold`).
//                 A manual-start push button sets the same flip-flop. While ON,
//                 equality with the OFF time, or the manual-stop push button,
//                 clears ON and sets the OFF flip-flop. The outputs `on` and `off` are the flip-flops
//                 gated with the entry's ON bit (for OFF, the ON bit the held
//                 entry had when OFF was reached, since the scan then resumes),
//                 so only a source whose ON bit is one starts or stops an
//                 observation. An entry whose ON bit is zero still stops the
//                 scan at its ON time, as the comparator sets the flip-flop
//                 before the ON-bit gate, until its OFF time.
// Leaving RUN mode clears both flip-flops.
//
// The RAM is an array with asynchronous read and synchronous write, like the
// static RAMs it stands for. After reset a clear sequence writes zero into all
// entries, one per clock (DEPTH clocks, `busy` high), so that no random entry
// can carry a set ON bit; the library must then be loaded as on a real
// power-up. This clear and the clearing of ON/OFF outside RUN mode are choices
// of this implementation; the fields, the 256 entries, the compare-and-hold
// scheme and the ON-bit gating follow the described memory register.
module memory_register
  import das_pkg::*;
#(
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned ADDR_BITS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 write_mode,
  input  logic                 modify_mode,
  input  logic                 run_mode,
  input  logic                 write_btn,
  input  logic [ADDR_BITS-1:0] addr,
  input  src_entry_t           wr_entry,
  input  bcd_time_t            sdt,
  input  logic                 manual_start,
  input  logic                 manual_stop,
  output src_entry_t           rd_entry,
  output logic                 on,
  output logic                 off,
  output logic                 scan_hold,
  output logic                 busy
);

  src_entry_t mem [DEPTH];

  logic [ADDR_BITS:0] clr_addr;
  logic               wr_q, start_q, stop_q;
  logic [1:0]         start_s, stop_s;
  logic               start_ev, stop_ev;
  logic               on_ff, off_ff, off_bit;
  logic               on_match, off_match;
  hhmm_t              sdt_hm;

  assign busy = !clr_addr[ADDR_BITS] && (clr_addr < (ADDR_BITS+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      clr_addr <= '0;
      wr_q     <= 1'b0;
    end else begin
      wr_q <= write_btn;
      if (busy) clr_addr <= clr_addr + 1'b1;
    end

  // RAM write port (no reset: it is a memory).
  always_ff @(posedge clk) begin
    if (busy)
      mem[clr_addr[ADDR_BITS-1:0]] <= '0;
    else if (write_btn && !wr_q) begin
      if (write_mode)
        mem[addr] <= '{spare: 3'b000, on_bit: wr_entry.on_bit, lf_att: wr_entry.lf_att,
                       beam: wr_entry.beam, off_time: wr_entry.off_time, on_time: wr_entry.on_time};
      else if (modify_mode)
        mem[addr].on_bit <= wr_entry.on_bit;
    end
  end

  assign rd_entry = mem[addr];

  // Magnitude comparators: equality of hours and minutes.
  assign sdt_hm    = to_hhmm(sdt);
  assign on_match  = (sdt_hm == rd_entry.on_time);
  assign off_match = (sdt_hm == rd_entry.off_time);

  // Manual start and stop through synchronizers and edge detectors
  // (debouncing).
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      start_s <= '0;
      start_q <= 1'b0;
      stop_s  <= '0;
      stop_q  <= 1'b0;
    end else begin
      start_s <= {start_s[0], manual_start};
      start_q <= start_s[1];
      stop_s  <= {stop_s[0], manual_stop};
      stop_q  <= stop_s[1];
    end

  assign start_ev = start_s[1] && !start_q;
  assign stop_ev  = stop_s[1] && !stop_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      on_ff   <= 1'b0;
      off_ff  <= 1'b0;
      off_bit <= 1'b0;
    end else if (!run_mode || busy) begin
      on_ff   <= 1'b0;
      off_ff  <= 1'b0;
      off_bit <= 1'b0;
    end else if (on_ff) begin
      if (off_match || stop_ev) begin
        on_ff   <= 1'b0;
        off_ff  <= 1'b1;
        off_bit <= rd_entry.on_bit;
      end
    end else if (on_match || start_ev) begin
      on_ff  <= 1'b1;
      off_ff <= 1'b0;
    end

  assign on        = on_ff  && rd_entry.on_bit;
  assign off       = off_ff && off_bit;
  assign scan_hold = on_ff;

endmodule

// data_multiplexer: serialiser of the 128-bit system-status information (SSI).
//
// The SSI is sixteen bytes, E0..E15:
//   E0..E5   IST time, twelve BCD digits, least significant byte first
//            (E0 = ms tens|units ... E5 = days hundreds|tens)
//   E6       station code (STATION_CODE: D2 Thaltej, CD Rajkot, C9 Surat)
//   E7       source code (the source-library address)
//   E8       LF attenuation in the 4 LSBs, upper bits zero
//   E9       beam code in the 6 LSBs, upper bits zero
//   E10,E11  sidereal ON time: minutes (tens|units), hours (tens|units)
//   E12..E15 sync word 00 FF 0F 0F
// Byte Ei, bit j sits on input i of 16-input multiplexer j (eight 74150s); an
// 8-input multiplexer (74151) picks one of the eight. The 7-bit address from
// the mux controller is split as byte = addr[3:0] (74150 select) and
// bit = addr[6:4] (74151 select). `sib` is the selected bit, combinational
// in the address; it becomes the LSB of each tape byte, so each 128 bytes on
// tape carry one complete SSI.
// The IST time arrives in parallel from a serial receiver and is copied into
// the holding register (7495s) only on `modify_time`, so the time in the SSI
// does not change in the middle of a status cycle.
//
// The byte contents and their positions E0..E15, the sync word, the station
// codes and the 16x8 + 8:1 multiplexer arrangement follow the described data
// multiplexer. The split of the address bits, the digit order inside the IST
// bytes and minutes-before-hours in E10/E11 are choices of this
// implementation.
module data_multiplexer
  import das_pkg::*;
#(
  parameter logic [7:0] STATION_CODE = STN_THALTEJ
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bcd_time_t  ist_in,
  input  logic       modify_time,
  input  logic [7:0] source_code,
  input  logic [3:0] lf_att,
  input  logic [5:0] beam,
  input  hhmm_t      sdt_on,
  input  logic [6:0] ssi_addr,
  output logic       sib,
  output logic [7:0] ssi_bytes [16]
);

  bcd_time_t ist_hold;
  logic [7:0] mux_out;   // outputs of the eight 16-input multiplexers

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)           ist_hold <= '0;
    else if (modify_time) ist_hold <= ist_in;

  always_comb begin
    for (int i = 0; i < 6; i++) ssi_bytes[i] = ist_hold[8*i +: 8];
    ssi_bytes[6]  = STATION_CODE;
    ssi_bytes[7]  = source_code;
    ssi_bytes[8]  = {4'h0, lf_att};
    ssi_bytes[9]  = {2'b00, beam};
    ssi_bytes[10] = {1'b0, sdt_on.min_t, sdt_on.min_u};
    ssi_bytes[11] = {2'b00, sdt_on.hr_t, sdt_on.hr_u};
    ssi_bytes[12] = SYNC_WORD[31:24];
    ssi_bytes[13] = SYNC_WORD[23:16];
    ssi_bytes[14] = SYNC_WORD[15:8];
    ssi_bytes[15] = SYNC_WORD[7:0];
  end

  always_comb
    for (int j = 0; j < 8; j++) mux_out[j] = ssi_bytes[ssi_addr[3:0]][j];

  assign sib = mux_out[ssi_addr[6:4]];

endmodule

// tape_data_interface: byte formation, data lines and front-panel data and
// status displays of the tape interface.
//
// Write path: the tape byte is {six A/D bits, 0, status bit}: the 6-bit half
// word from the A/D converter fills bits 7..2, bit 1 is tied to zero and the
// one-bit system-status stream fills bit 0. The byte goes to the transport on
// inverted (open-collector, active-low) data lines wd_n.
// Display: with R/W set to write, the write byte is shown on the data LEDs;
// with R/W set to read, the eight read-data lines and the read parity line
// (active low from the transport) are shown instead.
// Status: each active-low status line from the transport is inverted and
// stretched to at least STRETCH cycles (the 74123 pulse stretchers), so that
// short status pulses are visible on the LEDs.
//
// Timing: the data path is combinational; the status LEDs are registered.
//
// The byte layout, the inverted data lines and the R/W gating of the data
// displays follow the described interface; the number of status lines and the
// stretch length are choices of this implementation.
module tape_data_interface #(
  parameter int unsigned STATUS_BITS = 8,
  parameter int unsigned STRETCH     = 1000
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [5:0]             adc6,
  input  logic                   sib,
  input  logic                   rw_write,
  input  logic [7:0]             rd_n,
  input  logic                   rdp_n,
  input  logic [STATUS_BITS-1:0] status_n,
  output logic [7:0]             wr_byte,
  output logic [7:0]             wd_n,
  output logic [8:0]             data_led,     // {parity, data}
  output logic [STATUS_BITS-1:0] status_led
);

  localparam int W = $clog2(STRETCH + 1);
  logic [W-1:0] st_cnt [STATUS_BITS];

  assign wr_byte  = {adc6, 1'b0, sib};
  assign wd_n     = ~wr_byte;
  assign data_led = rw_write ? {1'b0, wr_byte} : {~rdp_n, ~rd_n};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < STATUS_BITS; i++) st_cnt[i] <= '0;
    end else begin
      for (int i = 0; i < STATUS_BITS; i++)
        if (!status_n[i])       st_cnt[i] <= W'(STRETCH);
        else if (st_cnt[i] != 0) st_cnt[i] <= st_cnt[i] - 1'b1;
    end

  always_comb
    for (int i = 0; i < STATUS_BITS; i++) status_led[i] = (st_cnt[i] != 0);

endmodule

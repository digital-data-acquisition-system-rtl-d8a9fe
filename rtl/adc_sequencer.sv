// adc_sequencer: digital control of the A/D converter subsystem.
//
// Turns the mux-controller slot pulses into the controls of the analog chain
// and selects which half of the 12-bit conversion result goes to the tape:
//  * sh_ctrl follows the S&H pulse: both sample-and-holds (COS and SIN) track
//    while it is high and hold afterwards, so the two channels are sampled at
//    the same instant.
//  * MUX A and MUX B are ORed into a toggle flip-flop that drives the analog
//    mux select (ana_sel = 1: COS, 0: SIN). One clock after each toggle a
//    start-conversion pulse goes to the A/D converter.
//  * The four byte selects (COS I, COS II, SIN I, SIN II) are ORed into a
//    second toggle flip-flop that picks the six MSBs or the six LSBs of the
//    result (the two tri-state buffers with joined outputs), giving the order
//    COS high, COS low, SIN high, SIN low.
// The RESET slot puts both toggles in their initial state at the start of
// every frame.
//
// Timing: data6 is valid while byte_oe is high (a whole 1 ms byte slot) and
// follows adc_data combinationally; the converter must finish within the
// 1 ms slot between the MUX pulse and the first byte slot.
//
// The toggles, the ORing and the byte order follow the described A/D
// subsystem; the toggle polarities (COS after MUX A, MSBs first after reset)
// and toggling the byte select at the end of each byte slot are choices of
// this implementation that produce the described order.
module adc_sequencer #(
  parameter int unsigned ADC_BITS = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  reset_p,
  input  logic                  sh_p,
  input  logic                  mux_a,
  input  logic                  mux_b,
  input  logic                  cos1,
  input  logic                  cos2,
  input  logic                  sin1,
  input  logic                  sin2,
  input  logic [ADC_BITS-1:0]   adc_data,
  output logic                  sh_ctrl,
  output logic                  ana_sel,
  output logic                  adc_start,
  output logic [ADC_BITS/2-1:0] data6,
  output logic                  byte_oe
);

  logic mux_or, mux_q, byte_q, tsl_sel;

  assign mux_or  = mux_a || mux_b;
  assign byte_oe = cos1 || cos2 || sin1 || sin2;
  assign sh_ctrl = sh_p;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mux_q     <= 1'b0;
      byte_q    <= 1'b0;
      ana_sel   <= 1'b0;
      tsl_sel   <= 1'b0;
      adc_start <= 1'b0;
    end else begin
      mux_q     <= mux_or;
      byte_q    <= byte_oe;
      adc_start <= mux_or && !mux_q && !reset_p;
      if (reset_p) begin
        ana_sel <= 1'b0;
        tsl_sel <= 1'b0;
      end else begin
        if (mux_or && !mux_q)  ana_sel <= !ana_sel;   // rising edge of MUX A/B
        if (!byte_oe && byte_q) tsl_sel <= !tsl_sel;  // end of a byte slot
      end
    end

  assign data6 = tsl_sel ? adc_data[ADC_BITS/2-1:0] : adc_data[ADC_BITS-1:ADC_BITS/2];

endmodule

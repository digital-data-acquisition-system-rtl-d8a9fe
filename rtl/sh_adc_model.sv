// sh_adc_model: behavioural model of the analog front end of the A/D
// subsystem (not synthesizable logic in the real system: two sample-and-hold
// amplifiers, a two-channel analog multiplexer, unity-gain buffers and a
// 12-bit successive-approximation A/D converter).
//
// Analog voltages are represented as signed millivolts in the range
// -5000..+5000 (the receiver's +/-5 V span). While sh_ctrl is high each
// sample-and-hold follows its input; when it falls the value is held.
// ana_sel picks the held COS (1) or SIN (0) value. A pulse on `start` begins
// a conversion that takes CONV_CYCLES clocks, during which `busy` is high;
// the result then appears on `data` and stays until the next conversion.
// The code is offset binary: -5 V gives 000, 0 V gives 800 (hex) and values
// at or above +5 V give FFF.
//
// The sample-and-hold, multiplexer and converter roles and the 12-bit,
// +/-5 V range follow the described A/D subsystem. Offset-binary coding and
// the conversion time are assumptions of this model.
module sh_adc_model #(
  parameter int unsigned CONV_CYCLES = 200
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] cos_mv,
  input  logic signed [15:0] sin_mv,
  input  logic               sh_ctrl,
  input  logic               ana_sel,
  input  logic               start,
  output logic [11:0]        data,
  output logic               busy
);

  logic signed [15:0] cos_hold, sin_hold, conv_in;
  logic [$clog2(CONV_CYCLES+1)-1:0] cnt;

  function automatic logic [11:0] to_code(logic signed [15:0] mv);
    int v;
    v = (int'(mv) + 5000) * 4096 / 10000;
    if (v < 0)    v = 0;
    if (v > 4095) v = 4095;
    return 12'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cos_hold <= '0;
      sin_hold <= '0;
    end else if (sh_ctrl) begin
      cos_hold <= cos_mv;
      sin_hold <= sin_mv;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt     <= '0;
      data    <= 12'h800;
      conv_in <= '0;
    end else if (start) begin
      cnt     <= ($bits(cnt))'(CONV_CYCLES);
      conv_in <= ana_sel ? cos_hold : sin_hold;
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
      if (cnt == 1) data <= to_code(conv_in);
    end

  assign busy = (cnt != 0);

endmodule

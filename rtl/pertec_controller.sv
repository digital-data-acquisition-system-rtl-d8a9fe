// pertec_controller: command sequencer for the buffered magnetic tape transport
// and source of the 20 Hz frame clock.
//
// Two flip-flops remember the ON and OFF commands (rising edges of `on` and
// `off`). While ON is set, OFF is not, and the system is in AUTO, the 1 kHz
// IST tick is passed to a divide-by-50 counter whose output is the 20 Hz frame
// tick for the mux controller; its first tick comes 50 ms after ON.
// A shift register stepped at 1 kHz sequences the tape commands:
//   after ON : FEN (formatter enable) is raised at step 2 and a 1 ms GO pulse
//              is given at step 4, starting the write;
//   after OFF: WFM (write file mark) is raised at step 1 and held for
//              WFM_MS milliseconds (the 140 ms monoshot); a 1 ms GO pulse at
//              step 3 writes the file mark; when WFM ends, FEN drops too, and
//              one millisecond later a one-clock internal reset returns
//              everything, the status address of the mux controller
//              included, to idle.
// All outputs are active high; the tape interface drives them inverted.
//
// The ON/OFF flip-flops, the AUTO gating, the divide-by-50, the commands FEN,
// WFM, GO and internal reset, and the 140 ms WFM length follow the described
// Pertec controller. The step numbers of the command sequence and FEN
// dropping together with WFM are choices of this implementation.
module pertec_controller #(
  parameter int unsigned FRAME_DIV = 50,
  parameter int unsigned WFM_MS    = 140
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick_1k,
  input  logic on,
  input  logic off,
  input  logic auto_mode,
  output logic frame_tick,
  output logic fen,
  output logic wfm,
  output logic go,
  output logic int_reset,
  output logic recording      // ON set and OFF not yet reached
);

  logic on_q, off_q, q1, q2;
  logic [$clog2(FRAME_DIV)-1:0] div;
  logic [3:0] start_sr;
  logic [2:0] stop_sr;
  logic [$clog2(WFM_MS + 1)-1:0] wfm_ms;
  logic released;
  logic gated_1k;

  assign gated_1k  = tick_1k && q1 && auto_mode && !q2;
  assign recording = q1 && !q2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      on_q      <= 1'b0;
      off_q     <= 1'b0;
      q1        <= 1'b0;
      q2        <= 1'b0;
      div       <= '0;
      start_sr  <= '0;
      stop_sr   <= '0;
      wfm_ms    <= '0;
      released  <= 1'b0;
      fen       <= 1'b0;
      wfm       <= 1'b0;
      go        <= 1'b0;
      int_reset <= 1'b0;
    end else begin
      on_q      <= on;
      off_q     <= off;
      int_reset <= 1'b0;
      if (int_reset) begin
        q1       <= 1'b0;
        q2       <= 1'b0;
        div      <= '0;
        start_sr <= '0;
        stop_sr  <= '0;
        wfm_ms   <= '0;
        released <= 1'b0;
        fen      <= 1'b0;
        wfm      <= 1'b0;
        go       <= 1'b0;
      end else begin
        if (gated_1k)
          div <= (div == ($bits(div))'(FRAME_DIV - 1)) ? '0 : div + 1'b1;
        if (tick_1k) begin
          start_sr <= start_sr << 1;
          stop_sr  <= stop_sr << 1;
          go       <= start_sr[3] || stop_sr[2];     // GO during step 4 / step 3
          if (start_sr[1]) fen <= 1'b1;
          if (stop_sr[0])  wfm <= 1'b1;
          if (wfm) begin
            if (wfm_ms == ($bits(wfm_ms))'(WFM_MS - 1)) begin
              fen      <= 1'b0;
              wfm      <= 1'b0;
              released <= 1'b1;
            end else
              wfm_ms <= wfm_ms + 1'b1;
          end
          if (released) int_reset <= 1'b1;
        end
        if (on && !on_q && !q1) begin
          q1       <= 1'b1;
          start_sr <= 4'b0001;
        end
        if (off && !off_q && q1 && !q2) begin
          q2      <= 1'b1;
          stop_sr <= 3'b001;
        end
      end
    end

  assign frame_tick = gated_1k && (div == ($bits(div))'(FRAME_DIV - 1));

endmodule

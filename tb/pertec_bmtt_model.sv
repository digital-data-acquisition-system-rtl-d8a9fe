// pertec_bmtt_model: behavioural model of a buffered magnetic tape transport
// with a Pertec-style formatter interface, for testbenches only.
//
// While FEN and the write select are asserted, each rising edge of the answer
// strobe takes one byte from the inverted data lines into the active buffer.
// When a buffer holds RECORD_LEN bytes it is "written" as one record and the
// transport pulses A-OVF or B-OVF (buffers A and B alternate). GO with WFM
// asserted writes a file mark. All bytes taken are kept in `tape` for
// checking; `rec_end` marks where each record ends.
module pertec_bmtt_model #(
  parameter int RECORD_LEN = 1024,
  parameter int OVF_CYCLES = 4
) (
  input  logic       clk,
  input  logic [7:0] wd_n,
  input  logic       ans_stb,
  input  logic       fen,
  input  logic       rw,
  input  logic       go,
  input  logic       wfm,
  output logic       a_ovf,
  output logic       b_ovf,
  output int         nbytes,
  output int         nrecords,
  output int         nfilemarks
);
  logic [7:0] tape [$];
  int rec_end [$];
  logic stb_q = 0, go_q = 0, buf_b = 0;
  int fill = 0, ovf_cnt = 0;

  initial begin
    a_ovf = 0; b_ovf = 0; nbytes = 0; nrecords = 0; nfilemarks = 0;
  end

  always @(posedge clk) begin
    stb_q <= ans_stb;
    go_q  <= go;
    if (ovf_cnt > 0) begin
      ovf_cnt <= ovf_cnt - 1;
      if (ovf_cnt == 1) begin a_ovf <= 0; b_ovf <= 0; end
    end
    if (ans_stb && !stb_q && fen && rw) begin
      tape.push_back(~wd_n);
      nbytes <= nbytes + 1;
      if (fill == RECORD_LEN - 1) begin
        fill <= 0;
        nrecords <= nrecords + 1;
        rec_end.push_back(nbytes + 1);
        if (buf_b) b_ovf <= 1; else a_ovf <= 1;
        buf_b <= !buf_b;
        ovf_cnt <= OVF_CYCLES;
      end else
        fill <= fill + 1;
    end
    if (go && !go_q && wfm) nfilemarks <= nfilemarks + 1;
  end
endmodule

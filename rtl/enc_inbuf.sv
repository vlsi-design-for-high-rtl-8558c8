// enc_inbuf: the encoder's input registers (the document's "in buf").
//
// It registers every input of the encoder once and selects the character
// source: in normal mode (mode = 1) the character comes from SIN and is valid
// while ACTI is high; in cascade mode (mode = 0) it comes from SINC, the
// character output of the preceding encoder, with its own valid bit, and the
// dictionary input DIN and the initial group code and offset (CODEIN, OFFIN)
// are taken from the neighbouring encoders. In normal mode CODEIN and OFFIN
// are forced to 0, the document's defaults. One clock of latency on every
// path. The pads themselves are not part of this RTL.
module enc_inbuf
  import lzss_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mode,
  input  logic              acti,
  input  logic [CHAR_W-1:0] sin,
  input  vchar_t            sinc,
  input  vchar_t            din,
  input  logic [1:0]        codein,
  input  logic [OFF_W-1:0]  offin,
  output vchar_t            s_q,
  output vchar_t            d_q,
  output logic [1:0]        code_q,
  output logic [OFF_W-1:0]  off_q,
  output logic              mode_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0; d_q <= '0; code_q <= '0; off_q <= '0; mode_q <= 1'b1;
    end else begin
      mode_q <= mode;
      if (mode) begin
        s_q    <= '{v: acti, c: sin};
        code_q <= '0;
        off_q  <= '0;
      end else begin
        s_q    <= sinc;
        code_q <= codein;
        off_q  <= offin;
      end
      d_q <= din;
    end
  end
endmodule

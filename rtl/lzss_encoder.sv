// lzss_encoder: the LZSS encoder chip (Fig. 2 of the design): in buf, VLcell
// array, monitor, packet and sender.
//
// One character enters per clock while ACTI is high (mode = 1) and must keep
// coming every clock until the stream ends; ACTI falling ends the stream. The
// character reaches the last cell 4*N_CELLS+5 clocks later, its codeword
// leaves the monitor at most MAX_LEN+2 clocks after that and appears on DATA
// as part of a 16-bit word with SEND high. FINISH goes low when the last word
// (holding the end codeword) has been sent.
//
// MODE selects the character source: SIN/ACTI (mode = 1) for a single chip or
// the first chip of a cascade, SINC with its valid bit (mode = 0) for the
// following chips, which also take CODEIN/OFFIN from the chip before. INDEX is
// the number of this chip's cell 0 in the whole chain; the chip with INDEX 0
// holds the shortest distances and wraps its own character output back as its
// dictionary, every other chip takes its dictionary from DIN, fed by the next
// chip's DOUT. SOUT, A0 (its valid bit), L0 and OFF0 feed the next chip. The monitor
// always works on this chip's last cell, so only the last chip of a cascade
// gives the coded output. The packet module's Full and Out_again flags are
// internal status only and are left unconnected here. The array is 256 cells (2K window) by default, as in
// the document.
module lzss_encoder
  import lzss_pkg::*;
#(
  parameter int unsigned N_CELLS = 256,
  parameter int unsigned CELL_W  = OFF_W - 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mode,
  input  logic              acti,
  input  logic [CHAR_W-1:0] sin,
  input  vchar_t            sinc,
  input  vchar_t            din,
  input  logic [1:0]        codein,
  input  logic [OFF_W-1:0]  offin,
  input  logic [CELL_W-1:0] index,
  output logic [CHAR_W-1:0] sout,
  output logic              a0,
  output logic [1:0]        l0,
  output logic [OFF_W-1:0]  off0,
  output vchar_t            dout,
  output logic [WORD_W-1:0] data,
  output logic              send,
  output logic              finish
);
  vchar_t           s_q, d_q, s_arr, ch_al, d_arr_in;
  logic [1:0]       code_q;
  logic [OFF_W-1:0] off_q;
  logic             mode_q;

  enc_inbuf u_inbuf (
    .clk, .rst_n, .mode, .acti, .sin, .sinc, .din, .codein, .offin,
    .s_q, .d_q, .code_q, .off_q, .mode_q
  );

  // the chip holding the smallest distances (INDEX 0) wraps its own output
  assign d_arr_in = (index == '0) ? s_arr : d_q;

  vlcell_array #(.N_CELLS(N_CELLS), .CELL_W(CELL_W)) u_array (
    .clk, .rst_n,
    .index    (index),
    .s_in     (s_q),
    .code_in  (code_q),
    .off_in   (off_q),
    .d_in     (d_arr_in),
    .s_out    (s_arr),
    .code_out (l0),
    .off_out  (off0),
    .char_al  (ch_al),
    .d_out    (dout)
  );
  assign sout = s_arr.c;
  assign a0   = s_arr.v;

  logic             cw_valid, over, word_valid, take_res, full, out_again;
  logic [PTR_W-1:0] cw;
  logic [CW_LW-1:0] cw_len;
  logic [WORD_W-1:0] word, res_word;
  logic [5:0]       res;

  enc_monitor u_monitor (
    .clk, .rst_n, .ch(ch_al), .code(l0), .off(off0),
    .cw_valid, .cw, .cw_len, .over
  );

  enc_packet u_packet (
    .clk, .rst_n, .cw_valid, .cw, .cw_len, .take_res,
    .word_valid, .word, .res, .res_word, .full, .out_again
  );

  enc_sender u_sender (
    .clk, .rst_n, .acti(s_q.v), .word_valid, .word, .over, .res, .res_word,
    .take_res, .data, .send, .finish
  );
endmodule

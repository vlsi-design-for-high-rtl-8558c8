// lzss_top: LZSS compression system, encoder chip and decoding processor
// side by side.
//
// The encoder takes one 8-bit character per clock and gives 16-bit words of
// the coded bit stream (enc_data/enc_send); the decoder takes such words and
// gives back one character per clock. They share only the clock and reset:
// a system (or a testbench) connects enc_data to dec_word to check that what
// comes out of the decoder equals what went into the encoder. The encoder's
// cascade ports are brought out so several encoders can be chained to widen
// the window. Defaults: 256 encoding cells and 1024 decoding cells, a window
// of 2048 characters.
module lzss_top
  import lzss_pkg::*;
#(
  parameter int unsigned ENC_CELLS = 256,
  parameter int unsigned DEC_CELLS = 4 * ENC_CELLS
) (
  input  logic              clk,
  input  logic              rst_n,
  // encoder
  input  logic              enc_mode,
  input  logic              enc_acti,
  input  logic [CHAR_W-1:0] enc_sin,
  input  vchar_t            enc_sinc,
  input  vchar_t            enc_din,
  input  logic [1:0]        enc_codein,
  input  logic [OFF_W-1:0]  enc_offin,
  input  logic [OFF_W-4:0]  enc_index,
  output logic [CHAR_W-1:0] enc_sout,
  output logic              enc_a0,
  output logic [1:0]        enc_l0,
  output logic [OFF_W-1:0]  enc_off0,
  output vchar_t            enc_dout,
  output logic [WORD_W-1:0] enc_data,
  output logic              enc_send,
  output logic              enc_finish,
  // decoder
  input  logic [WORD_W-1:0] dec_word,
  input  logic              dec_in_valid,
  output logic              dec_in_ready,
  output logic [CHAR_W-1:0] dec_char,
  output logic              dec_char_valid,
  output logic              dec_done,
  output logic              dec_err
);
  lzss_encoder #(.N_CELLS(ENC_CELLS)) u_enc (
    .clk, .rst_n,
    .mode (enc_mode), .acti (enc_acti), .sin (enc_sin), .sinc (enc_sinc),
    .din (enc_din), .codein (enc_codein), .offin (enc_offin), .index (enc_index),
    .sout (enc_sout), .a0 (enc_a0), .l0 (enc_l0), .off0 (enc_off0),
    .dout (enc_dout), .data (enc_data), .send (enc_send), .finish (enc_finish)
  );

  lzss_decoder #(.N_CELLS(DEC_CELLS)) u_dec (
    .clk, .rst_n,
    .word (dec_word), .in_valid (dec_in_valid), .in_ready (dec_in_ready),
    .char_out (dec_char), .char_valid (dec_char_valid),
    .done (dec_done), .err (dec_err)
  );
endmodule

// lzss_decoder: the LZSS decoding processor (frontend, pre-processor and
// decoding array).
//
// 16-bit words of the coded stream enter at word/in_valid (in_ready accepts
// them). The frontend cuts out codewords, the pre-processor turns each into
// one token per character and the decoding array fills in copied characters.
// One character per clock leaves at char_out/char_valid as long as codewords
// arrive fast enough; the array stalls in clocks without a token. After the
// end codeword the array is clocked N_CELLS more times to drain it and then
// `done` rises. Latency from a token to its character is N_CELLS+1 clocks.
// err pulses if a pointer named a distance beyond the window.
module lzss_decoder
  import lzss_pkg::*;
#(
  parameter int unsigned N_CELLS = 1 << (OFF_W - 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] word,
  input  logic              in_valid,
  output logic              in_ready,
  output logic [CHAR_W-1:0] char_out,
  output logic              char_valid,
  output logic              done,
  output logic              err
);
  dcw_t  cw;
  logic  cw_valid, cw_ready, fe_ended, end_seen, en, out_stb;
  dtok_t tok, tok_out;
  logic [$clog2(N_CELLS+1)-1:0] drain;

  dec_frontend u_frontend (
    .clk, .rst_n, .word, .in_valid, .in_ready,
    .cw, .cw_valid, .cw_ready, .ended(fe_ended)
  );

  dec_preproc u_preproc (
    .clk, .rst_n, .cw, .cw_valid, .in_ready(cw_ready), .tok, .end_seen
  );

  assign en = tok.v || (end_seen && !done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drain <= '0; done <= 1'b0;
    end else if (end_seen && !done && !tok.v) begin
      if (drain == ($bits(drain))'(N_CELLS)) done <= 1'b1;
      else drain <= drain + 1'b1;
    end
  end

  dec_array #(.N_CELLS(N_CELLS)) u_array (
    .clk, .rst_n, .en, .tok_in(tok), .tok_out, .out_stb, .err
  );

  assign char_out   = tok_out.c;
  assign char_valid = out_stb && tok_out.v;
endmodule

// dec_preproc: the decoder's pre-processor.
//
// It takes one codeword at a time from the frontend and turns it into one
// token per output character for the decoding array. A literal gives one
// token that already carries its character. A pointer (offset, length) gives
// `length` successive tokens that carry the offset and are marked active,
// counted out by a down counter. A new codeword is requested (in_ready, the
// document's Request) while the counter is at its last token or idle, so a
// new codeword's first token follows the previous one's last token with no
// gap. The end codeword sets end_seen and stops further requests.
//
// Timing: tok is a register; a codeword accepted in clock t gives its first
// token in clock t+1. tok.v is low in clocks without a token. The document
// raises Request when the counter reaches two and loads the new codeword one
// clock later; the look-ahead here is the same schedule expressed on a
// registered token.
module dec_preproc
  import lzss_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  dcw_t cw,
  input  logic cw_valid,
  output logic in_ready,
  output dtok_t tok,
  output logic end_seen
);
  logic [LEN_W-1:0] cnt;        // tokens still to issue after the current one
  logic [OFF_W-1:0] cur_off;

  assign in_ready = (cnt == '0) && !end_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; cur_off <= '0; tok <= '0; end_seen <= 1'b0;
    end else begin
      tok <= '0;
      if (cnt != '0) begin
        tok <= '{v: 1'b1, done: 1'b0, off: cur_off, c: '0};
        cnt <= cnt - 1'b1;
      end else if (cw_valid && in_ready) begin
        if (!cw.flag) begin
          tok <= '{v: 1'b1, done: 1'b1, off: '0, c: cw.c};
        end else if (cw.len == '0) begin
          end_seen <= 1'b1;
        end else begin
          tok     <= '{v: 1'b1, done: 1'b0, off: cw.off, c: '0};
          cur_off <= cw.off;
          cnt     <= cw.len - 1'b1;
        end
      end
    end
  end
endmodule

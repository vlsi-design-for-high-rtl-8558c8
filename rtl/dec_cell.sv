// dec_cell: one decoding cell.
//
// Tokens (one per output character) move from cell n+1 to cell n, one cell
// per enabled clock; decoded characters move the other way through the S
// registers, from cell n-1 to cell n. Because the two streams pass each other
// at two positions per clock, cell n sees the characters at distances 2n+1
// and 2n+2 behind the token: its own S_n and the S register of cell n+1. A
// token still waiting for its character whose offset field equals 2n takes
// S_n; one whose field equals 2n+1 takes S_{n+1}; any other token passes on
// unchanged. This follows the document's decoding cell.
//
// Interface: tok_in from cell n+1, s_up is cell n+1's S register, s_in feeds
// this cell's S register (cell n-1's S, or for cell 0 its own result). en
// stalls the cell. tok_out and s_q are registers; c_res is the token's
// character after this cell, combinational.
module dec_cell
  import lzss_pkg::*;
#(
  parameter int unsigned CELL_W = OFF_W - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [CELL_W-1:0] cell_no,
  input  dtok_t             tok_in,
  input  logic [CHAR_W-1:0] s_up,
  input  logic [CHAR_W-1:0] s_in,
  output dtok_t             tok_out,
  output logic [CHAR_W-1:0] s_q,
  output dtok_t             tok_res
);
  always_comb begin
    tok_res = tok_in;
    if (tok_in.v && !tok_in.done) begin
      if (tok_in.off == {cell_no, 1'b0}) begin
        tok_res.c    = s_q;
        tok_res.done = 1'b1;
      end else if (tok_in.off == {cell_no, 1'b1}) begin
        tok_res.c    = s_up;
        tok_res.done = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_out <= '0; s_q <= '0;
    end else if (en) begin
      tok_out <= tok_res;
      s_q     <= s_in;
    end
  end
endmodule

// dec_frontend: cuts the incoming bit stream into codewords.
//
// 16-bit words arrive with no codeword boundaries. They are appended to a
// 48-bit left-aligned bit register (count `cnt`) whenever at most 32 bits are
// held. The first held bit is the Flag: 1 means a 17-bit pointer
// {1, offset, length}, 0 a 9-bit literal {0, char}. As soon as the whole
// codeword is held it is offered at cw/cw_valid; when the pre-processor takes
// it (cw_ready) the register shifts left by the codeword's length. Word
// acceptance and codeword removal may happen in the same clock. After the
// end codeword (pointer with length 0) has been taken, the padding bits that
// follow are ignored until reset.
//
// The document's frontend fills two 16-bit registers W0/W1 under a three-step
// enable counter before normal decoding; this design reaches the same state
// with a plain occupancy count. Codeword output is combinational from the
// bit register; in_ready is combinational from the count.
module dec_frontend
  import lzss_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] word,
  input  logic              in_valid,
  output logic              in_ready,
  output dcw_t              cw,
  output logic              cw_valid,
  input  logic              cw_ready,
  output logic              ended
);
  localparam int unsigned BW = 48;
  logic [BW-1:0] bits, b1;
  logic [5:0]    cnt, c1, need;
  logic          take, accept;

  always_comb begin
    need       = bits[BW-1] ? 6'(PTR_W) : 6'(LIT_W);
    cw.flag    = bits[BW-1];
    cw.off     = bits[BW-2 -: OFF_W];
    cw.len     = bits[BW-2-OFF_W -: LEN_W];
    cw.c       = bits[BW-2 -: CHAR_W];
    cw_valid   = !ended && (cnt >= need);
    in_ready   = !ended && (cnt <= 6'd32);
    take       = cw_valid && cw_ready;
    accept     = in_valid && in_ready;
    b1 = take ? (bits << need) : bits;
    c1 = take ? (cnt - need) : cnt;
    if (accept) begin
      b1 = b1 | ({word, {(BW - WORD_W){1'b0}}} >> c1);
      c1 = c1 + 6'd16;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0; cnt <= '0; ended <= 1'b0;
    end else begin
      bits <= b1;
      cnt  <= c1;
      if (take && cw.flag && cw.len == '0) ended <= 1'b1;
    end
  end
endmodule
